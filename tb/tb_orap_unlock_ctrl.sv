// tb_orap_unlock_ctrl: checks the unlock controller's cycle schedule at its
// default size (8 words of 128 bits). A memory model returns the word one
// clock after mem_rd. After unlock_start the expected schedule, cycle by
// cycle, is: flip-flop flush; flush plus key clear (clear_se); eight reads
// at addresses 0..7; shift_en with the word of the previous read for eight
// cycles; unlocked. The test also aborts an unlock with scan_enable, and
// checks that scan_enable after unlocking drops unlocked.
module tb_orap_unlock_ctrl;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 128;
  localparam int L = 8;

  logic          clk = 1'b0;
  logic          rst_n, se, start;
  logic          ff_clear, clear_se, shift_en, mem_rd, busy, unlocked;
  logic [W-1:0]  seed, mem_data;
  logic [2:0]    mem_addr;
  logic [W-1:0]  mem [L];
  int            checks = 0;
  int            failures = 0;
  int            n_unlock = 0, n_abort = 0, n_relock = 0;

  always #5 clk = ~clk;

  orap_unlock_ctrl dut (
    .clk(clk), .rst_n(rst_n), .scan_enable(se), .unlock_start(start),
    .ff_clear(ff_clear), .clear_se(clear_se), .shift_en(shift_en), .seed(seed),
    .mem_rd(mem_rd), .mem_addr(mem_addr), .mem_data(mem_data),
    .busy(busy), .unlocked(unlocked)
  );

  always_ff @(posedge clk) if (mem_rd) mem_data <= mem[mem_addr];

  task automatic expect_sig(input string name, input logic [W-1:0] got,
                            input logic [W-1:0] exp, input int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s = %h expected %h", cyc, name, got, exp);
    end
  endtask

  // Walks the expected schedule; abort_at < 0 means no abort.
  task automatic run_unlock(input int abort_at);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;   // edge just passed saw start
    for (int c = 1; c <= L + 4; c++) begin
      logic e_ffc, e_clr, e_rd, e_sh, e_busy, e_unl;
      if (abort_at >= 0 && c >= abort_at) begin
        se = 1'b1;
        #1;
        expect_sig("abort shift_en", W'(shift_en), '0, c);
        expect_sig("abort mem_rd", W'(mem_rd), '0, c);
        @(negedge clk);
        expect_sig("abort busy", W'(busy), '0, c);
        expect_sig("abort unlocked", W'(unlocked), '0, c);
        expect_sig("abort clear_se", W'(clear_se), '0, c);
        se = 1'b0;
        n_abort++;
        return;
      end
      e_ffc  = (c == 1) || (c == 2);
      e_clr  = (c == 2);
      e_rd   = (c >= 3) && (c < 3 + L);
      e_sh   = (c >= 4) && (c < 4 + L);
      e_busy = (c < 4 + L);
      e_unl  = (c == 4 + L);
      expect_sig("ff_clear", W'(ff_clear), W'(e_ffc), c);
      expect_sig("clear_se", W'(clear_se), W'(e_clr), c);
      expect_sig("mem_rd", W'(mem_rd), W'(e_rd), c);
      expect_sig("shift_en", W'(shift_en), W'(e_sh), c);
      expect_sig("busy", W'(busy), W'(e_busy), c);
      expect_sig("unlocked", W'(unlocked), W'(e_unl), c);
      if (e_rd) expect_sig("mem_addr", W'(mem_addr), W'(c - 3), c);
      expect_sig("seed", seed, e_sh ? mem[c - 4] : '0, c);
      @(negedge clk);
    end
    n_unlock++;
  endtask

  initial begin
    rst_n = 1'b0; se = 1'b0; start = 1'b0;
    for (int a = 0; a < L; a++)
      for (int i = 0; i < W / 32; i++) mem[a][i*32 +: 32] = $urandom;
    mem[3] = '0;  // a free-run word
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_sig("idle unlocked", W'(unlocked), '0, 0);
    expect_sig("idle busy", W'(busy), '0, 0);
    run_unlock(-1);
    // stays unlocked while nothing happens
    repeat (5) @(negedge clk);
    expect_sig("held unlocked", W'(unlocked), 1, 0);
    expect_sig("held shift_en", W'(shift_en), 0, 0);
    // scan entry relocks
    se = 1'b1;
    @(negedge clk); se = 1'b0;
    expect_sig("relocked", W'(unlocked), 0, 0);
    n_relock++;
    // aborted unlocks at several points, each followed by a full one
    for (int ab = 1; ab <= L + 3; ab += 3) begin
      run_unlock(ab);
      run_unlock(-1);
    end
    checks++;
    if (n_unlock < 2 || n_abort < 2 || n_relock < 1) begin
      failures++;
      $display("FAIL coverage unlock=%0d abort=%0d relock=%0d", n_unlock, n_abort, n_relock);
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
