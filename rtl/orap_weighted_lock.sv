// orap_weighted_lock: weighted logic locking of a set of circuit lines.
//
// N_GATES = N_KEY / CTRL_IN key gates are placed on the N_LINES lines that
// leave the protected combinational logic. Key gate g sits on line
// (g * N_LINES) / N_GATES and is preceded by a control gate over the key bits
// g*CTRL_IN ... g*CTRL_IN+CTRL_IN-1. Even-numbered gates are a NAND control
// gate feeding an XOR key gate, odd-numbered gates an AND control gate
// feeding an XNOR key gate. Where bit k of CORRECT_KEY is 0 an inverter sits
// on the control-gate input, so the control gate sees all ones exactly when
// its key bits equal the correct key; then the key gate is transparent. With
// any other value of those bits the key gate inverts its line, so a random
// key actuates a gate with probability 1 - 2^-CTRL_IN (7/8 for three inputs),
// which is what gives high output corruption. When N_KEY is not a multiple
// of CTRL_IN, the leftover key bits widen the last control gate.
//
// Interface: key[N_KEY], lines_in[N_LINES], lines_out[N_LINES]. Purely
// combinational. The control-gate/key-gate pairing and the three-input
// control gates follow the described locking; placing the gates on the
// logic's output lines, the gate-type alternation, the line spreading and
// the CORRECT_KEY default are this design's choices (the real method places
// gates by fault analysis inside the logic).
module orap_weighted_lock #(
  parameter int unsigned        N_KEY       = 256,
  parameter int unsigned        N_LINES     = 512,
  parameter int unsigned        CTRL_IN     = 3,
  parameter logic [N_KEY-1:0]   CORRECT_KEY = N_KEY'({(N_KEY + 31) / 32 {32'h5A3C_96E1}})
) (
  input  logic [N_KEY-1:0]   key,
  input  logic [N_LINES-1:0] lines_in,
  output logic [N_LINES-1:0] lines_out
);
  timeunit 1ns; timeprecision 1ps;
  import orap_pkg::*;

  localparam int unsigned N_GATES = N_KEY / CTRL_IN;

  logic [N_GATES-1:0] flip;

  for (genvar g = 0; g < N_GATES; g++) begin : g_gate
    localparam gate_type_t TYPE = (g % 2 == 0) ? GATE_NAND_XOR : GATE_AND_XNOR;
    localparam int unsigned W = (g == N_GATES - 1) ? N_KEY - g * CTRL_IN : CTRL_IN;
    localparam logic [W-1:0] INV = ~CORRECT_KEY[g*CTRL_IN +: W];
    logic [W-1:0] ctrl_in;
    logic         ctrl_out;
    assign ctrl_in = key[g*CTRL_IN +: W] ^ INV;
    if (TYPE == GATE_NAND_XOR) begin : g_nand
      assign ctrl_out = ~&ctrl_in;
      assign flip[g]  = ctrl_out;            // XOR with the line
    end else begin : g_and
      assign ctrl_out = &ctrl_in;
      assign flip[g]  = ~ctrl_out;           // XNOR with the line
    end
  end

  always_comb begin
    lines_out = lines_in;
    for (int unsigned g = 0; g < N_GATES; g++) begin
      lines_out[(g * N_LINES) / N_GATES] = lines_in[(g * N_LINES) / N_GATES] ^ flip[g];
    end
  end

  initial begin
    assert (N_GATES >= 1 && N_GATES <= N_LINES)
      else $error("orap_weighted_lock: need 1 <= N_KEY/CTRL_IN <= N_LINES");
  end
endmodule
