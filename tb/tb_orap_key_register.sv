// tb_orap_key_register: checks the key-generating LFSR at its default size.
// A reference model in the testbench steps an internal-XOR LFSR (feedback
// from the last cell into cell 0 and every eighth cell, memory bits injected
// at even cells, response bits at odd cells) and is compared with the key
// after every clock. The run mixes reseeding, free-run (zero) cycles and
// hold cycles, then checks scan entry: the whole register must read zero
// before the first shift edge, and scan shifting must load si.
module tb_orap_key_register;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 256;

  logic           clk = 1'b0;
  logic           se, shift_en;
  logic [N/2-1:0] seed_mem, seed_resp;
  logic [N-1:0]   si, key, ref_key;
  int             checks = 0;
  int             failures = 0;
  int             n_reseed = 0, n_free = 0, n_hold = 0, n_clear = 0, n_shift = 0;

  always #5 clk = ~clk;

  orap_key_register dut (
    .clk(clk), .scan_enable(se), .shift_en(shift_en), .seed_mem(seed_mem),
    .seed_resp(seed_resp), .si(si), .key(key)
  );

  function automatic logic [N-1:0] lfsr_step(input logic [N-1:0] k,
                                             input logic [N/2-1:0] m,
                                             input logic [N/2-1:0] r);
    logic [N-1:0] nk;
    logic         fb = k[N-1];
    for (int i = 0; i < N; i++) begin
      logic prev = (i == 0) ? 1'b0 : k[i-1];
      logic tap  = (i % 8 == 0);
      logic inj  = (i % 2 == 0) ? m[i/2] : r[i/2];
      nk[i] = prev ^ (tap & fb) ^ inj;
    end
    return nk;
  endfunction

  function automatic logic [N/2-1:0] rand_half();
    logic [N/2-1:0] v;
    for (int i = 0; i < N / 64; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(input string what);
    checks++;
    if (key !== ref_key) begin
      failures++;
      $display("FAIL %s at %0t: key=%h expected %h", what, $realtime, key, ref_key);
    end
  endtask

  initial begin
    se = 1'b0; shift_en = 1'b0; seed_mem = '0; seed_resp = '0; si = '0;
    // clear through scan entry, then leave scan mode
    @(negedge clk); se = 1'b1;
    #1; ref_key = '0; check("cleared at start"); n_clear++;
    @(negedge clk); se = 1'b0;
    @(posedge clk); #1; ref_key = '0; check("zero shifted in");
    for (int c = 0; c < 600; c++) begin
      int kind;
      @(negedge clk);
      kind = $urandom_range(0, 9);
      if (kind < 6) begin
        shift_en = 1'b1; seed_mem = rand_half(); seed_resp = rand_half(); n_reseed++;
      end else if (kind < 8) begin
        shift_en = 1'b1; seed_mem = '0; seed_resp = '0; n_free++;
      end else begin
        shift_en = 1'b0; seed_mem = rand_half(); seed_resp = rand_half(); n_hold++;
      end
      ref_key = shift_en ? lfsr_step(ref_key, seed_mem, seed_resp) : ref_key;
      @(posedge clk); #1; check("lfsr step");
      // occasionally enter scan mode in the middle of unlocking
      if (c % 97 == 96) begin
        @(negedge clk);
        for (int i = 0; i < N / 32; i++) si[i*32 +: 32] = $urandom;
        se = 1'b1;
        #1; ref_key = '0; check("cleared before first shift"); n_clear++;
        @(posedge clk); #1; ref_key = si; check("scan load"); n_shift++;
        @(negedge clk); se = 1'b0; shift_en = 1'b0;
        @(posedge clk); #1; check("hold after scan");
      end
    end
    checks++;
    if (n_reseed == 0 || n_free == 0 || n_hold == 0 || n_clear < 2 || n_shift == 0) begin
      failures++;
      $display("FAIL coverage reseed=%0d free=%0d hold=%0d clear=%0d shift=%0d",
               n_reseed, n_free, n_hold, n_clear, n_shift);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
