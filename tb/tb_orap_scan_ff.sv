// tb_orap_scan_ff: checks the normal scan flip-flop: asynchronous reset,
// synchronous clear over scan and function, scan load and functional load,
// and that entering scan mode does not disturb its contents.
module tb_orap_scan_ff;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n, clr, se, d, si, q;
  logic exp_q;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  orap_scan_ff dut (.clk(clk), .rst_n(rst_n), .clr(clr), .scan_enable(se),
                    .d(d), .si(si), .q(q));

  task automatic check(input string what);
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, q, exp_q, $realtime);
    end
  endtask

  initial begin
    rst_n = 1'b0; clr = 1'b0; se = 1'b0; d = 1'b1; si = 1'b1;
    #2; exp_q = 1'b0; check("async reset");
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 7) == 0);
      d   = 1'($urandom_range(0, 1));
      si  = 1'($urandom_range(0, 1));
      if ($urandom_range(0, 2) == 0) begin
        se = ~se;
        #1; check("scan entry or exit keeps contents");
      end
      @(posedge clk); #1;
      exp_q = clr ? 1'b0 : (se ? si : d);
      check("clocked load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
