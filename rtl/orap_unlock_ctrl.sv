// orap_unlock_ctrl: logic-locking control logic that unlocks the circuit.
//
// On unlock_start it first clears the circuit's normal flip-flops for two
// clocks (ff_clear), so that the locked responses produced during unlocking,
// which feed the LFSR, are the same every time. In the second of those clocks
// it raises clear_se. That signal is ORed into the chip's scan_enable, so
// every key cell's pulse generator clears the key register (no extra reset
// line is needed for it); the one scan shift that this clock also causes
// moves only zeros, because the flip-flops feeding the key cells were
// cleared in the clock before and the chain heads are gated by the parent
// while clear_se is high. It then
// reads the key sequence, SEQ_LEN words, one per clock, from the
// tamper-proof memory (mem_rd / mem_addr; the word is expected on mem_data
// one clock later) and passes each word to the LFSR's memory reseeding
// points with shift_en high. Free-run cycles between or after seeds are
// all-zero words stored in the memory, so the controller simply walks the
// addresses. When the last word has been applied, shift_en drops, the LFSR
// holds the final key and unlocked is raised.
//
// Any rising of the scan_enable pin clears the key register in hardware; the
// controller sees scan_enable and returns to IDLE (unlocked=0), so a new
// unlock_start is needed after test.
//
// Interface: clk, rst_n (async, active low), scan_enable (chip pin),
// unlock_start, ff_clear, clear_se, shift_en, seed[SEED_W], mem_rd, mem_addr, mem_data,
// busy, unlocked.
// Timing: unlock takes 2 (flush, clear) + SEQ_LEN (reads) + 1 (last word) cycles
// from the cycle after unlock_start; shift_en is high for exactly SEQ_LEN
// cycles. Clearing the normal flip-flops, the sequence length, the memory read latency and the
// abort-on-scan behaviour are this design's choices.
module orap_unlock_ctrl #(
  parameter int unsigned SEED_W  = 128, // bits per key-sequence word
  parameter int unsigned SEQ_LEN = 8,   // words in the key sequence
  parameter int unsigned AW      = (SEQ_LEN > 1) ? $clog2(SEQ_LEN) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              scan_enable,
  input  logic              unlock_start,
  output logic              ff_clear,
  output logic              clear_se,
  output logic              shift_en,
  output logic [SEED_W-1:0] seed,
  output logic              mem_rd,
  output logic [AW-1:0]     mem_addr,
  input  logic [SEED_W-1:0] mem_data,
  output logic              busy,
  output logic              unlocked
);
  timeunit 1ns; timeprecision 1ps;
  import orap_pkg::*;

  ctrl_state_t state, state_n;
  logic [AW-1:0] addr_q, addr_n;
  logic          valid_q;      // mem_data holds a word read last cycle
  logic          clear_q;      // glitch-free copy of (state == ST_CLEAR)

  always_comb begin
    state_n = state;
    addr_n  = addr_q;
    if (scan_enable) begin
      state_n = ST_IDLE;
    end else begin
      unique case (state)
        ST_IDLE:  if (unlock_start) state_n = ST_FLUSH;
        ST_FLUSH: state_n = ST_CLEAR;
        ST_CLEAR: begin
          state_n = ST_LOAD;
          addr_n  = '0;
        end
        ST_LOAD: begin
          if (addr_q == AW'(SEQ_LEN - 1)) state_n = ST_DRAIN;
          else                            addr_n  = addr_q + 1'b1;
        end
        ST_DRAIN: state_n = ST_DONE;
        ST_DONE:  if (unlock_start) state_n = ST_FLUSH;
        default:  state_n = ST_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      addr_q  <= '0;
      valid_q <= 1'b0;
      clear_q <= 1'b0;
    end else begin
      state   <= state_n;
      addr_q  <= addr_n;
      valid_q <= mem_rd;
      clear_q <= (state_n == ST_CLEAR);
    end
  end

  assign ff_clear = (state == ST_FLUSH) || (state == ST_CLEAR);
  // clear_se reaches edge-triggered pulse generators, so it comes straight
  // from a flip-flop rather than from a state decode that could glitch.
  assign clear_se = clear_q;
  assign mem_rd   = (state == ST_LOAD) && !scan_enable;
  assign mem_addr = addr_q;
  assign shift_en = valid_q && !scan_enable;
  assign seed     = shift_en ? mem_data : '0;
  assign busy     = (state == ST_FLUSH) || (state == ST_CLEAR) || (state == ST_LOAD) || (state == ST_DRAIN);
  assign unlocked = (state == ST_DONE);

  initial begin
    assert (SEQ_LEN >= 1) else $error("orap_unlock_ctrl: SEQ_LEN must be >= 1");
    assert ((1 << AW) >= SEQ_LEN) else $error("orap_unlock_ctrl: AW too small");
  end
endmodule
