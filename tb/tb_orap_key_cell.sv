// tb_orap_key_cell: checks one key-register cell. With scan_enable low the
// cell loads d on every rising clock edge; with scan_enable high it loads si;
// and each time scan_enable rises the cell is cleared before the next clock
// edge. scan_enable, d and si change on the falling clock edge.
module tb_orap_key_cell;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic se, d, si, q;
  logic exp_q;
  int   checks = 0;
  int   failures = 0;
  int   clears = 0;

  always #5 clk = ~clk;

  orap_key_cell dut (.clk(clk), .scan_enable(se), .d(d), .si(si), .q(q));

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, q, exp, $realtime);
    end
  endtask

  initial begin
    se = 1'b0; d = 1'b1; si = 1'b0;
    @(posedge clk); #1; exp_q = 1'b1; check(exp_q, "load d");
    for (int i = 0; i < 400; i++) begin
      logic se_new;
      @(negedge clk);
      se_new = ($urandom_range(0, 3) == 0) ? ~se : se;
      d  = 1'($urandom_range(0, 1));
      si = 1'($urandom_range(0, 1));
      if (se_new && !se) begin
        se = 1'b1;
        #1;
        exp_q = 1'b0;
        clears++;
        check(exp_q, "cleared on scan entry");
      end else begin
        se = se_new;
      end
      @(posedge clk); #1;
      exp_q = se ? si : d;
      check(exp_q, se ? "scan shift" : "functional load");
    end
    checks++;
    if (clears < 10) begin
      failures++;
      $display("FAIL only %0d scan entries", clears);
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
