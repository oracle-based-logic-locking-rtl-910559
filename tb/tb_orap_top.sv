// tb_orap_top: end-to-end test of the protected circuit at its default size
// (256-bit key, 1636 flip-flops, 106 primary outputs, 8 scan chains, 8-word
// key sequence). A small nonlinear next-state / output function stands in
// for the protected combinational logic.
//
// 1. Key sequence. The testbench plays the owner: it picks random words for
//    the first six addresses (one of them all-zero, a free-run cycle),
//    replays unlocking on its own reference model (LFSR, weighted locking,
//    stand-in logic) including the locked responses that feed the odd
//    reseeding points, and solves the last two words so that the LFSR ends
//    on the correct key.
// 2. Unlock, then compare the key register with the correct key, and the
//    outputs and state with the unlocked reference for random inputs.
// 3. Scan test: scan entry must clear the key before the first shift; the
//    whole chain is shifted in, one capture cycle is run with the scanned-in
//    key, and the chain is shifted out; scan_out is compared every cycle with
//    a reference model of the chains.
// 4. Frozen flip-flops: an unlock with the normal flip-flops' values held (as
//    a Trojan would hold them) must not produce the correct key.
// 5. A second ordinary unlock after test must again produce the correct key.
// Every mechanism is counted and a failure is counted for one that never
// happened.
module tb_orap_top;
  timeunit 1ns; timeprecision 1ps;

  localparam int NK  = 256;
  localparam int NF  = 1636;
  localparam int NP  = 106;
  localparam int NL  = NF + NP;
  localparam int NC  = 8;
  localparam int L   = 8;
  localparam int CI  = 3;
  localparam int NG  = NK / CI;
  localparam int NPI = 32;
  localparam logic [NK-1:0] CK = {(NK + 31) / 32 {32'h5A3C_96E1}};

  logic            clk = 1'b0;
  logic            rst_n, se, start;
  logic [NC-1:0]   scan_in, scan_out;
  logic            busy, unlocked, mem_rd;
  logic [2:0]      mem_addr;
  logic [NK/2-1:0] mem_data;
  logic [NF-1:0]   state_q;
  logic [NL-1:0]   comb_out;
  logic [NP-1:0]   po;
  logic [NPI-1:0]  pi;
  logic [NK/2-1:0] mem [L];

  int checks = 0;
  int failures = 0;
  int n_unlock = 0, n_free_run = 0, n_resp_inject = 0, n_gate_actuated = 0;
  int n_scan_clear = 0, n_scan_shift = 0, n_capture = 0, n_freeze_caught = 0;
  int n_func_cycles = 0;

  always #5 clk = ~clk;

  orap_top dut (
    .clk(clk), .rst_n(rst_n), .scan_enable(se), .scan_in(scan_in),
    .scan_out(scan_out), .unlock_start(start), .unlock_busy(busy),
    .unlocked(unlocked), .mem_rd(mem_rd), .mem_addr(mem_addr),
    .mem_data(mem_data), .state_q(state_q), .comb_out(comb_out), .po(po)
  );

  // tamper-proof memory model: word valid one clock after mem_rd
  always_ff @(posedge clk) if (mem_rd) mem_data <= mem[mem_addr];

  // ---------------------------------------------------------------- models
  // stand-in protected logic: comb_out = {po, next_state}
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

  function automatic logic [NK-1:0] step_f(input logic [NK-1:0] k, input logic [NK/2-1:0] m,
                                           input logic [NK/2-1:0] r);
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

  // Replays unlocking from the cleared state; with freeze the flip-flops keep
  // frozen_s throughout (so the one scan shift of the clear cycle moves their
  // values into the key cells). Returns the final key and the state after
  // unlocking.
  task automatic replay(input logic freeze, input logic [NF-1:0] frozen_s,
                        output logic [NK-1:0] k_out, output logic [NF-1:0] s_out);
    logic [NK-1:0] k = freeze ? {frozen_s[NK-1-NC:0], NC'(0)} : '0;
    logic [NF-1:0] s = freeze ? frozen_s : '0;
    if (!freeze) s = next_state(s, '0, k);          // first read cycle, LFSR idle
    for (int t = 0; t < L; t++) begin
      logic [NK-1:0] kn = step_f(k, mem[t], s[NK/2-1:0]);
      if (!freeze) begin
        if (s[NK/2-1:0] != '0) n_resp_inject++;
        if (lock_f(k, logic_f(s, '0)) != logic_f(s, '0)) n_gate_actuated++;
        s = next_state(s, '0, k);
      end
      k = kn;
    end
    k_out = k;
    s_out = s;
  endtask

  task automatic make_key_sequence();
    logic [NK-1:0]   k = '0, kt;
    logic [NF-1:0]   s = '0, s1;
    logic [NK/2-1:0] r2, r1, m2, m1;
    logic            fbp;
    for (int a = 0; a < L - 2; a++)
      for (int i = 0; i < NK / 64; i++) mem[a][i*32 +: 32] = $urandom;
    mem[2] = '0;                                      // free-run word
    s = next_state(s, '0, k);
    for (int t = 0; t < L - 2; t++) begin
      logic [NK-1:0] kn = step_f(k, mem[t], s[NK/2-1:0]);
      s = next_state(s, '0, k);
      k = kn;
    end
    // word L-2 sets the even cells that move into the odd cells at the end
    r2  = s[NK/2-1:0];
    s1  = next_state(s, '0, k);
    r1  = s1[NK/2-1:0];
    kt  = step_f(k, '0, r2);
    fbp = kt[NK-1];
    for (int j = 0; j < NK / 2; j++)
      m2[j] = CK[2*j+1] ^ (((2*j+1) % 8 == 0) & fbp) ^ r1[j] ^ kt[2*j];
    k  = step_f(k, m2, r2);
    // word L-1 sets the even cells directly
    kt = step_f(k, '0, r1);
    for (int j = 0; j < NK / 2; j++) m1[j] = CK[2*j] ^ kt[2*j];
    mem[L-2] = m2;
    mem[L-1] = m1;
    for (int a = 0; a < L; a++) if (mem[a] == '0) n_free_run++;
  endtask

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  task automatic do_unlock();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    for (int c = 0; c < L + 10 && !unlocked; c++) @(negedge clk);
  endtask

  // ---------------------------------------------------------- scan model
  logic [NK-1:0] m_key;
  logic [NF-1:0] m_ff;

  task automatic model_shift(input logic [NC-1:0] sin);
    logic [NK-1:0] nk;
    logic [NF-1:0] nf;
    for (int u = 0; u < NF; u++) begin
      logic uin = (u < NC) ? sin[u] : m_ff[u - NC];
      if (u < NK) begin
        nk[u] = uin;
        nf[u] = m_key[u];
      end else begin
        nf[u] = uin;
      end
    end
    m_key = nk;
    m_ff  = nf;
  endtask

  function automatic logic [NC-1:0] model_out();
    logic [NC-1:0] o;
    for (int c = 0; c < NC; c++) o[c] = m_ff[((NF - 1 - c) / NC) * NC + c];
    return o;
  endfunction

  // ---------------------------------------------------------------- test
  initial begin
    logic [NK-1:0] k_ref;
    logic [NF-1:0] s_ref;
    int            chain_len;
    rst_n = 1'b0; se = 1'b0; start = 1'b0; scan_in = '0; pi = '0;
    make_key_sequence();
    replay(1'b0, '0, k_ref, s_ref);
    check("reference key sequence reaches the correct key", k_ref == CK);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // let the locked circuit run with whatever the key register holds
    for (int c = 0; c < 5; c++) begin pi = $urandom; @(negedge clk); end
    pi = '0;

    // ---- 2. unlock and run
    do_unlock();
    check("unlocked raised", unlocked);
    check("key register holds the correct key", dut.u_keyreg.key == CK);
    check("state after unlocking matches reference", state_q == s_ref);
    if (unlocked && dut.u_keyreg.key == CK) n_unlock++;
    for (int c = 0; c < 100; c++) begin
      logic [NL-1:0] raw;
      pi = $urandom;
      #1;
      raw = logic_f(s_ref, pi);
      check("unlocked outputs equal the unprotected logic", po == raw[NL-1:NF]);
      @(negedge clk);
      s_ref = raw[NF-1:0];
      check("unlocked next state", state_q == s_ref);
      n_func_cycles++;
    end

    // ---- 3. scan test of the unlocked chip
    // longest chain: chain 0 holds units 0, NC, 2*NC, ...; each unit below NK
    // has a key cell and a flip-flop
    chain_len = 0;
    for (int u = 0; u < NF; u += NC) chain_len += (u < NK) ? 2 : 1;
    se = 1'b1;
    #1;
    check("key cleared on scan entry, before the first shift", dut.u_keyreg.key == '0);
    if (dut.u_keyreg.key == '0) n_scan_clear++;
    m_key = '0;
    m_ff  = state_q;
    for (int c = 0; c < chain_len; c++) begin
      scan_in = NC'($urandom);
      @(posedge clk);
      model_shift(scan_in);
      #1;
      check("scan shift-in: key cells", dut.u_keyreg.key == m_key);
      check("scan shift-in: flip-flops", state_q == m_ff);
      n_scan_shift++;
      @(negedge clk);
    end
    check("controller relocked by scan", !unlocked);
    // capture with the scanned-in key (circuit tested locked)
    pi = $urandom;
    se = 1'b0;
    @(posedge clk);
    m_ff = next_state(m_ff, pi, m_key);
    #1;
    check("capture", state_q == m_ff && dut.u_keyreg.key == m_key);
    n_capture++;
    @(negedge clk);
    se = 1'b1;
    #1;
    check("key cleared again on scan entry", dut.u_keyreg.key == '0);
    if (dut.u_keyreg.key == '0) n_scan_clear++;
    m_key = '0;
    for (int c = 0; c < chain_len; c++) begin
      check("scan_out", scan_out == model_out());
      scan_in = '0;
      @(posedge clk);
      model_shift(scan_in);
      @(negedge clk);
    end
    se = 1'b0;

    // ---- 4. unlocking with frozen flip-flops does not give the key
    @(negedge clk);
    begin
      logic [NF-1:0] frozen;
      logic [NK-1:0] k_frozen;
      logic [NF-1:0] s_dummy;
      for (int i = 0; i < NF / 32; i++) frozen[i*32 +: 32] = $urandom;
      force dut.state_q = frozen;
      do_unlock();
      replay(1'b1, frozen, k_frozen, s_dummy);
      check("frozen unlock follows the model", dut.u_keyreg.key == k_frozen);
      check("frozen flip-flops give a wrong key", dut.u_keyreg.key != CK);
      if (dut.u_keyreg.key != CK) n_freeze_caught++;
      release dut.state_q;
    end

    // ---- 5. ordinary unlock again
    rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1; pi = '0;
    @(negedge clk);
    do_unlock();
    check("second unlock gives the correct key", unlocked && dut.u_keyreg.key == CK);
    if (unlocked && dut.u_keyreg.key == CK) n_unlock++;

    $display("mechanisms: unlock=%0d free_run_words=%0d response_injections=%0d",
             n_unlock, n_free_run, n_resp_inject);
    $display("            locked_gate_actuations=%0d scan_clears=%0d shifts=%0d captures=%0d",
             n_gate_actuated, n_scan_clear, n_scan_shift, n_capture);
    $display("            frozen_ff_unlock_rejected=%0d functional_cycles=%0d",
             n_freeze_caught, n_func_cycles);
    check("mechanism unlock", n_unlock >= 2);
    check("mechanism free-run word", n_free_run >= 1);
    check("mechanism response injection", n_resp_inject >= 1);
    check("mechanism key-gate actuation while locked", n_gate_actuated >= 1);
    check("mechanism clear on scan entry", n_scan_clear >= 2);
    check("mechanism scan shift", n_scan_shift >= 1);
    check("mechanism capture", n_capture >= 1);
    check("mechanism frozen flip-flops rejected", n_freeze_caught >= 1);
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
