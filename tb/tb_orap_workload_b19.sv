// tb_orap_workload_b19: the owner's flow (key-sequence construction,
// unlocking, unlocked operation, scan-entry clear) at the largest evaluated
// configuration, b19: 208-bit key, five-input control gates, 6642 flip-flops
// and 30 primary outputs (6672 combinational outputs). Key size and gate
// width are those of the evaluation; the flip-flop / output split is that of
// the benchmark. A stand-in function replaces the benchmark's logic.
module tb_orap_workload_b19;
  timeunit 1ns; timeprecision 1ps;

  logic done;
  int   checks, failures;

  orap_e2e_harness #(.NAME("b19"), .NK(208), .NF(6642), .NP(30), .CI(5))
    u_b19 (.done(done), .checks(checks), .failures(failures));

  initial begin
    #1;  // let the harness initialise done first
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #20000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
