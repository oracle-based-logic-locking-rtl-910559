// tb_orap_workloads: runs the owner's flow (key-sequence construction,
// unlocking, unlocked operation, scan-entry clear) at three of the evaluated
// benchmark configurations, side by side: s38584 (186-bit key, 1426
// flip-flops, 304 outputs), b18 (97-bit key, five-input control gates, 3320
// flip-flops, 23 outputs) and b21 (229-bit key, 490 flip-flops, 22 outputs).
// b19 (208-bit key, five-input gates, 6642 flip-flops) has a testbench of its
// own, tb_orap_workload_b19, to keep each build short.
// The key sizes and control-gate widths are those of the evaluation; the
// flip-flop / output split of each benchmark is taken from the benchmark
// suites. A stand-in function replaces each benchmark's logic.
module tb_orap_workloads;
  timeunit 1ns; timeprecision 1ps;

  logic [2:0] done;
  int         c [3];
  int         f [3];
  int         checks, failures;

  orap_e2e_harness #(.NAME("s38584"), .NK(186), .NF(1426), .NP(304), .CI(3))
    u_s38584 (.done(done[0]), .checks(c[0]), .failures(f[0]));
  orap_e2e_harness #(.NAME("b18"), .NK(97), .NF(3320), .NP(23), .CI(5))
    u_b18 (.done(done[1]), .checks(c[1]), .failures(f[1]));
  orap_e2e_harness #(.NAME("b21"), .NK(229), .NF(490), .NP(22), .CI(3))
    u_b21 (.done(done[2]), .checks(c[2]), .failures(f[2]));

  initial begin
    #1;  // let the harnesses initialise done first
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < 3; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #20000;
    $display("FAIL watchdog");
    checks = 0; failures = 1;
    for (int i = 0; i < 3; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
