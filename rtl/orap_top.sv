// orap_top: a sequential circuit protected by the modified OraP scheme and
// weighted logic locking.
//
// The protected combinational logic itself is outside this module: its
// inputs are the state flip-flops (state_q) and its outputs (comb_out, next
// state first, then primary outputs) come back in. Inside are
//   - orap_key_register: the N_KEY-bit key-generating LFSR whose cells clear
//     themselves when scan_enable rises;
//   - orap_unlock_ctrl: clears the key register, then feeds the key sequence
//     from the tamper-proof memory into the LFSR's even reseeding points;
//   - the N_FF normal scan flip-flops (orap_scan_ff); flip-flop j (j <
//     floor(N_KEY/2)) also feeds odd reseeding point j, so the locked circuit's
//     responses during unlocking are part of what makes the key;
//   - orap_weighted_lock: key gates on every line leaving the logic.
//
// Scan chains: the flip-flops are grouped in units, unit u < N_KEY being
// {key cell u, normal flip-flop u} and unit u >= N_KEY being normal
// flip-flop u alone. Unit u goes to chain u % N_CHAINS, in increasing u, so
// every key cell is placed in front of a normal flip-flop and the key cells
// of one chain are interleaved with normal flip-flops. The chip scan_enable
// (pin ORed with the controller's clear request) is one stem for all cells.
// While the controller clears the key register, the chain heads see 0
// instead of scan_in.
//
// Unlocking protocol: reset (rst_n), hold the primary inputs of the logic at
// the values assumed when the key sequence was computed, pulse
// unlock_start, wait for unlocked. The final key is never visible on a port;
// scanning it out returns zeros, because scan entry clears it.
//
// Interface: see the port list. Timing: unlocked rises SEQ_LEN + 3 cycles
// after the cycle in which unlock_start is seen.
//
// Defaults are the s38417 configuration of the evaluation: a 256-bit key
// register (also the largest evaluated key), three-input control gates and
// 1742 combinational outputs, split here into 1636 flip-flops and 106 primary
// outputs as in that benchmark. N_CHAINS, SEQ_LEN and CORRECT_KEY are this
// design's own defaults. Primary-output lines without a key gate pass
// straight from comb_out to po.
module orap_top #(
  parameter int unsigned      N_KEY       = 256,
  parameter int unsigned      TAP_SPACING = 8,
  parameter int unsigned      CTRL_IN     = 3,
  parameter int unsigned      N_FF        = 1636,
  parameter int unsigned      N_PO        = 106,
  parameter int unsigned      N_CHAINS    = 8,
  parameter int unsigned      SEQ_LEN     = 8,
  parameter int unsigned      AW          = (SEQ_LEN > 1) ? $clog2(SEQ_LEN) : 1,
  parameter logic [N_KEY-1:0] CORRECT_KEY = N_KEY'({(N_KEY + 31) / 32 {32'h5A3C_96E1}}),
  parameter int unsigned      MEM_W       = (N_KEY + 1) / 2  // key-sequence word width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // test access
  input  logic                   scan_enable,
  input  logic [N_CHAINS-1:0]    scan_in,
  output logic [N_CHAINS-1:0]    scan_out,
  // unlocking
  input  logic                   unlock_start,
  output logic                   unlock_busy,
  output logic                   unlocked,
  // tamper-proof memory read port
  output logic                   mem_rd,
  output logic [AW-1:0]          mem_addr,
  input  logic [MEM_W-1:0]       mem_data,
  // protected combinational logic
  output logic [N_FF-1:0]        state_q,
  input  logic [N_FF+N_PO-1:0]   comb_out,
  output logic [N_PO-1:0]        po
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N_LINES = N_FF + N_PO;

  logic                 ff_clear;
  logic                 clear_se;
  logic                 se;
  logic                 shift_en;
  logic [MEM_W-1:0]     seed_mem;
  logic [N_KEY/2-1:0]   seed_resp;
  logic [N_KEY-1:0]     key;
  logic [N_KEY-1:0]     key_si;
  logic [N_LINES-1:0]   locked;
  logic [N_FF-1:0]      unit_in;

  assign se = scan_enable | clear_se;

  orap_unlock_ctrl #(
    .SEED_W (MEM_W),
    .SEQ_LEN(SEQ_LEN),
    .AW     (AW)
  ) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .scan_enable (scan_enable),
    .unlock_start(unlock_start),
    .ff_clear    (ff_clear),
    .clear_se    (clear_se),
    .shift_en    (shift_en),
    .seed        (seed_mem),
    .mem_rd      (mem_rd),
    .mem_addr    (mem_addr),
    .mem_data    (mem_data),
    .busy        (unlock_busy),
    .unlocked    (unlocked)
  );

  assign seed_resp = state_q[N_KEY/2-1:0];

  orap_key_register #(
    .N_KEY      (N_KEY),
    .TAP_SPACING(TAP_SPACING)
  ) u_keyreg (
    .clk        (clk),
    .scan_enable(se),
    .shift_en   (shift_en),
    .seed_mem   (seed_mem),
    .seed_resp  (seed_resp),
    .si         (key_si),
    .key        (key)
  );

  orap_weighted_lock #(
    .N_KEY      (N_KEY),
    .N_LINES    (N_LINES),
    .CTRL_IN    (CTRL_IN),
    .CORRECT_KEY(CORRECT_KEY)
  ) u_lock (
    .key      (key),
    .lines_in (comb_out),
    .lines_out(locked)
  );

  assign po = locked[N_FF +: N_PO];

  // scan stitching and normal flip-flops
  for (genvar u = 0; u < N_FF; u++) begin : g_unit
    logic ff_si;
    if (u < N_CHAINS) begin : g_head
      assign unit_in[u] = scan_in[u] & ~clear_se;
    end else begin : g_body
      assign unit_in[u] = state_q[u - N_CHAINS];
    end
    if (u < N_KEY) begin : g_with_key
      assign key_si[u] = unit_in[u];
      assign ff_si     = key[u];
    end else begin : g_plain
      assign ff_si     = unit_in[u];
    end

    orap_scan_ff u_ff (
      .clk        (clk),
      .rst_n      (rst_n),
      .clr        (ff_clear),
      .scan_enable(se),
      .d          (locked[u]),
      .si         (ff_si),
      .q          (state_q[u])
    );
  end

  for (genvar c = 0; c < N_CHAINS; c++) begin : g_so
    localparam int unsigned LAST = ((N_FF - 1 - c) / N_CHAINS) * N_CHAINS + c;
    assign scan_out[c] = state_q[LAST];
  end

  initial begin
    assert (N_FF >= N_KEY && N_FF >= N_CHAINS && MEM_W == (N_KEY + 1) / 2)
      else $error("orap_top: need N_FF >= N_KEY, N_FF >= N_CHAINS, MEM_W not overridden");
  end
endmodule
