// orap_key_register: the key-generating LFSR of the OraP scheme.
//
// N_KEY key cells (orap_key_cell) form an internal-XOR (Galois) LFSR. The
// output of the last cell is the feedback; it enters cell 0 and every cell
// where orap_pkg::tap_at() places a tap (a new tap every TAP_SPACING cells).
// In front of every cell an XOR is a reseeding point, so the cell's next
// value is
//     next[i] = q[i-1] ^ (tap(i) & q[N_KEY-1]) ^ inject[i]      (q[-1] = 0)
// The reseeding points are split in two interleaved halves: even cells take
// a bit of the key-sequence word read from the tamper-proof memory
// (seed_mem, MEM_W = ceil(N_KEY/2) bits), odd cells take a bit of the locked
// circuit's own flip-flop values (seed_resp, RESP_W = floor(N_KEY/2) bits).
// Odd key sizes, as in several evaluated configurations, are allowed. With all-zero injection the LFSR free-runs.
//
// While shift_en is 1 the LFSR steps once per clock; while it is 0 (after
// the whole key sequence has been fed) every cell holds, and key is the final
// key of the locked logic. Every cell is also a scan cell: with scan_enable
// high cell i loads si[i], and the rising edge of scan_enable clears the
// whole register through the cells' pulse generators.
//
// Interface: clk, scan_enable, shift_en, seed_mem[MEM_W], seed_resp[RESP_W],
// si[N_KEY] (scan input of each cell, stitched by the parent), key[N_KEY].
// Timing: one LFSR step per clock with shift_en=1, no latency.
// The LFSR structure, the all-cell reseeding, the interleaved split between
// memory and circuit flip-flops and the tap spacing of eight follow the
// described scheme; the hold multiplexer and the tap positions are this
// design's choices.
module orap_key_register #(
  parameter int unsigned N_KEY       = 256, // key / LFSR size
  parameter int unsigned TAP_SPACING = 8,   // cells between feedback taps
  parameter int unsigned MEM_W       = (N_KEY + 1) / 2,
  parameter int unsigned RESP_W      = N_KEY / 2
) (
  input  logic                 clk,
  input  logic                 scan_enable,
  input  logic                 shift_en,
  input  logic [MEM_W-1:0]     seed_mem,
  input  logic [RESP_W-1:0]    seed_resp,
  input  logic [N_KEY-1:0]     si,
  output logic [N_KEY-1:0]     key
);
  timeunit 1ns; timeprecision 1ps;
  import orap_pkg::*;

  logic             fb;
  logic [N_KEY-1:0] inject;
  logic [N_KEY-1:0] next;
  logic [N_KEY-1:0] d;

  assign fb = key[N_KEY-1];

  for (genvar i = 0; i < N_KEY; i++) begin : g_inject
    if (i % 2 == 0) begin : g_mem
      assign inject[i] = seed_mem[i/2];
    end else begin : g_resp
      assign inject[i] = seed_resp[i/2];
    end
  end

  for (genvar i = 0; i < N_KEY; i++) begin : g_cell
    localparam bit TAP = tap_at(i, TAP_SPACING);
    if (i == 0) begin : g_first
      assign next[i] = fb ^ inject[i];
    end else begin : g_rest
      assign next[i] = key[i-1] ^ (TAP & fb) ^ inject[i];
    end
    assign d[i] = shift_en ? next[i] : key[i];

    orap_key_cell u_cell (
      .clk        (clk),
      .scan_enable(scan_enable),
      .d          (d[i]),
      .si         (si[i]),
      .q          (key[i])
    );
  end

  initial begin
    assert (N_KEY >= 2 && MEM_W == (N_KEY + 1) / 2 && RESP_W == N_KEY / 2)
      else $error("orap_key_register: N_KEY >= 2, MEM_W and RESP_W must not be overridden");
    assert (TAP_SPACING > 0) else $error("orap_key_register: TAP_SPACING must be > 0");
  end
endmodule
