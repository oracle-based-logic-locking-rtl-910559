// orap_e2e_harness: one protected circuit of a chosen configuration, driven
// through the owner's flow. It is used by tb_orap_workloads to run the
// evaluated benchmark configurations side by side.
//
// The harness computes a key sequence that makes the LFSR end on the correct
// key (random words, one of them zero for free-run, the last two solved on a
// reference model that includes the locked responses feeding the odd
// reseeding points), unlocks the circuit, checks the key register, compares
// outputs and state with the unprotected stand-in logic for 50 cycles, then
// enters scan mode and checks that the key register is cleared before the
// first shift. It also measures output corruption: the share of the primary
// and next-state lines that differ from the unlocked ones with a random key.
// done rises when it has finished; checks and failures are then final.
module orap_e2e_harness #(
  parameter string NAME = "cfg",
  parameter int    NK   = 256,
  parameter int    NF   = 256,
  parameter int    NP   = 32,
  parameter int    CI   = 3,
  parameter int    NC   = 8,
  parameter int    L    = 8
) (
  output logic done,
  output int   checks,
  output int   failures
);
  timeunit 1ns; timeprecision 1ps;

  localparam int NL    = NF + NP;
  localparam int NG    = NK / CI;
  localparam int MW    = (NK + 1) / 2;
  localparam int RW    = NK / 2;
  localparam int NPI   = 32;
  localparam int AW    = (L > 1) ? $clog2(L) : 1;
  localparam logic [NK-1:0] CK = NK'({(NK + 31) / 32 {32'h5A3C_96E1}});

  logic           clk = 1'b0;
  logic           rst_n, se, start;
  logic [NC-1:0]  scan_in, scan_out;
  logic           busy, unlocked, mem_rd;
  logic [AW-1:0]  mem_addr;
  logic [MW-1:0]  mem_data;
  logic [NF-1:0]  state_q;
  logic [NL-1:0]  comb_out;
  logic [NP-1:0]  po;
  logic [NPI-1:0] pi;
  logic [MW-1:0]  mem [L];

  always #5 clk = ~clk;

  orap_top #(
    .N_KEY(NK), .CTRL_IN(CI), .N_FF(NF), .N_PO(NP), .N_CHAINS(NC), .SEQ_LEN(L)
  ) dut (
    .clk(clk), .rst_n(rst_n), .scan_enable(se), .scan_in(scan_in),
    .scan_out(scan_out), .unlock_start(start), .unlock_busy(busy),
    .unlocked(unlocked), .mem_rd(mem_rd), .mem_addr(mem_addr),
    .mem_data(mem_data), .state_q(state_q), .comb_out(comb_out), .po(po)
  );

  always_ff @(posedge clk) if (mem_rd) mem_data <= mem[mem_addr];

  function automatic logic [NL-1:0] logic_f(input logic [NF-1:0] s, input logic [NPI-1:0] p);
    logic [NL-1:0] o;
    for (int i = 0; i < NF; i++)
      o[i] = s[(i + 1) % NF] ^ (s[(i + 5) % NF] & s[(i + 7) % NF]) ^ p[i % NPI];
    for (int i = 0; i < NP; i++)
      o[NF + i] = s[i % NF] ^ (s[(i + 3) % NF] | p[(i + 1) % NPI]);
    return o;
  endfunction

  assign comb_out = logic_f(state_q, pi);

  function automatic logic [NL-1:0] lock_f(input logic [NK-1:0] k, input logic [NL-1:0] l);
    logic [NL-1:0] o = l;
    for (int g = 0; g < NG; g++) begin
      int lo = g * CI;
      int hi = (g == NG - 1) ? NK - 1 : lo + CI - 1;
      logic wrong = 1'b0;
      for (int b = lo; b <= hi; b++) wrong |= (k[b] != CK[b]);
      o[(g * NL) / NG] ^= wrong;
    end
    return o;
  endfunction

  function automatic logic [NK-1:0] step_f(input logic [NK-1:0] k, input logic [MW-1:0] m,
                                           input logic [RW-1:0] r);
    logic [NK-1:0] nk;
    for (int i = 0; i < NK; i++) begin
      logic prev = (i == 0) ? 1'b0 : k[i-1];
      logic inj  = (i % 2 == 0) ? m[i/2] : r[i/2];
      nk[i] = prev ^ ((i % 8 == 0) & k[NK-1]) ^ inj;
    end
    return nk;
  endfunction

  function automatic logic [NF-1:0] next_state(input logic [NF-1:0] s, input logic [NPI-1:0] p,
                                               input logic [NK-1:0] k);
    logic [NL-1:0] o = lock_f(k, logic_f(s, p));
    return o[NF-1:0];
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%s] %s at %0t", NAME, what, $realtime);
    end
  endtask

  initial begin : flow
    logic [NK-1:0] k, kt;
    logic [NF-1:0] s, s1, s_ref;
    logic [RW-1:0] r2, r1;
    logic [MW-1:0] m2, m1;
    logic          fbp;
    longint        corrupted;
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; se = 1'b0; start = 1'b0; scan_in = '0; pi = '0;

    // owner: build the key sequence
    for (int a = 0; a < L - 2; a++)
      for (int i = 0; i < MW; i++) mem[a][i] = 1'($urandom);
    mem[1] = '0;
    k = '0; s = '0;
    s = next_state(s, '0, k);
    for (int t = 0; t < L - 2; t++) begin
      kt = step_f(k, mem[t], s[RW-1:0]);
      s  = next_state(s, '0, k);
      k  = kt;
    end
    r2  = s[RW-1:0];
    s1  = next_state(s, '0, k);
    r1  = s1[RW-1:0];
    kt  = step_f(k, '0, r2);
    fbp = kt[NK-1];
    m2  = '0;
    for (int j = 0; j < RW; j++)
      m2[j] = CK[2*j+1] ^ (((2*j+1) % 8 == 0) & fbp) ^ r1[j] ^ kt[2*j];
    k  = step_f(k, m2, r2);
    kt = step_f(k, '0, r1);
    for (int j = 0; j < MW; j++) m1[j] = CK[2*j] ^ kt[2*j];
    mem[L-2] = m2;
    mem[L-1] = m1;
    s_ref = next_state(s1, '0, k);   // state after the last LFSR step
    check("reference reaches the correct key", step_f(k, m1, r1) == CK);

    // unlock
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    for (int c = 0; c < L + 10 && !unlocked; c++) @(negedge clk);
    check("unlocked", unlocked);
    check("key register holds the correct key", dut.u_keyreg.key == CK);
    check("state after unlocking", state_q == s_ref);

    // unlocked operation
    for (int c = 0; c < 50; c++) begin
      logic [NL-1:0] raw;
      pi = $urandom;
      #1;
      raw = logic_f(s_ref, pi);
      check("unlocked outputs", po == raw[NL-1:NF]);
      @(negedge clk);
      s_ref = raw[NF-1:0];
      check("unlocked next state", state_q == s_ref);
    end

    // output corruption with random keys (reference model)
    corrupted = 0;
    for (int t = 0; t < 100; t++) begin
      logic [NK-1:0] rk;
      logic [NL-1:0] raw;
      for (int i = 0; i < NK; i++) rk[i] = 1'($urandom);
      for (int i = 0; i < NF; i++) s[i] = 1'($urandom);
      raw = logic_f(s, 32'($urandom));
      corrupted += $countones(lock_f(rk, raw) ^ raw);
    end
    $display("[%s] key %0d bits, %0d key gates of %0d inputs on %0d lines: %0d of %0d lines flipped on average by a random key",
             NAME, NK, NG, CI, NL, corrupted / 100, NL);
    check("random keys corrupt lines", corrupted > 0);

    // scan entry clears the key
    se = 1'b1;
    #1;
    check("key cleared on scan entry", dut.u_keyreg.key == '0);
    @(negedge clk);
    se = 1'b0;
    @(negedge clk);
    check("relocked", !unlocked);
    done = 1'b1;
  end
endmodule
