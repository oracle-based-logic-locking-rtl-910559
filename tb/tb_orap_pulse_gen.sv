// tb_orap_pulse_gen: checks the scan-entry pulse generator model.
// scan_enable is toggled many times with random spacing. After every rising
// edge clr_n must fall (checked 0.1 ns after the edge) and rise again after
// the three-inverter delay (checked 0.5 ns after the edge); after every
// falling edge, and in steady state, clr_n must stay 1.
module tb_orap_pulse_gen;
  timeunit 1ns; timeprecision 1ps;

  logic se;
  logic clr_n;
  int   checks = 0;
  int   failures = 0;
  int   pulses = 0;

  orap_pulse_gen dut (.scan_enable(se), .clr_n(clr_n));

  task automatic expect_clr(input logic exp, input string what);
    checks++;
    if (clr_n !== exp) begin
      failures++;
      $display("FAIL %s: clr_n=%0b expected %0b at %0t", what, clr_n, exp, $realtime);
    end
  endtask

  // pulse counter, independent of the sampling checks
  always @(negedge clr_n) if ($realtime > 2.0) pulses++;

  initial begin
    se = 1'b0;
    #5;
    expect_clr(1'b1, "steady low");
    for (int i = 0; i < 50; i++) begin
      se = 1'b1;
      #0.1;  expect_clr(1'b0, "pulse after rise");
      #0.4;  expect_clr(1'b1, "pulse ended");
      #($urandom_range(2, 20));
      expect_clr(1'b1, "steady high");
      se = 1'b0;
      #0.1;  expect_clr(1'b1, "no pulse after fall");
      #0.4;  expect_clr(1'b1, "no pulse after fall (late)");
      #($urandom_range(2, 20));
    end
    checks++;
    if (pulses != 50) begin
      failures++;
      $display("FAIL pulse count %0d expected 50", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
