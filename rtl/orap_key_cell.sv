// orap_key_cell: one cell of the key-generating LFSR.
//
// A 2-to-1 scan multiplexer selects the LFSR next-state value (scan_enable=0)
// or the scan input si (scan_enable=1) into a D flip-flop with an active-low
// asynchronous clear. The clear comes from a pulse generator owned by this
// cell alone and driven by the same scan_enable that steers the multiplexer,
// so the cell is wiped the moment scan mode is entered, before the first
// shift edge, and cannot keep its scan function if the clear is cut at the
// scan_enable stem.
//
// Interface: clk, scan_enable, d (value from the previous LFSR stage), si
// (scan input), q (key bit and scan output).
// Timing: q takes d or si on the rising clk edge; it is forced to 0 within
// about a nanosecond of scan_enable rising. The cell has no other reset, as
// the described key register has none.
module orap_key_cell (
  input  logic clk,
  input  logic scan_enable,
  input  logic d,
  input  logic si,
  output logic q
);
  timeunit 1ns; timeprecision 1ps;

  logic clr_n;
  logic d_mux;

  orap_pulse_gen u_pulse (
    .scan_enable(scan_enable),
    .clr_n      (clr_n)
  );

  assign d_mux = scan_enable ? si : d;

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) q <= 1'b0;
    else        q <= d_mux;
  end
endmodule
