// orap_scan_ff: a "normal" circuit flip-flop in scan version.
//
// A 2-to-1 multiplexer picks the functional next state d (scan_enable=0) or
// the scan input si (scan_enable=1). The flip-flop has an active-low
// asynchronous reset. Unlike the key cells it has no pulse generator: scan
// entry leaves its contents alone, so test patterns can be shifted through.
//
// Interface: clk, rst_n, clr, scan_enable, d, si, q. Timing: q updates on the
// rising clk edge.
module orap_scan_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic scan_enable,
  input  logic d,
  input  logic si,
  output logic q
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           q <= 1'b0;
    else if (clr)         q <= 1'b0;
    else if (scan_enable) q <= si;
    else                  q <= d;
  end
endmodule
