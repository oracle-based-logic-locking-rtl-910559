// orap_pkg: types and helper functions shared by the oracle-protection (OraP)
// logic-locking blocks.
//
// - ctrl_state_t: states of the unlock controller.
// - gate_type_t : structure of one weighted-locking key gate.
// - tap_at()    : characteristic-polynomial tap rule of the key-generating
//                 LFSR. Feedback always enters cell 0, and a new tap is placed
//                 after every TAP_SPACING cells (cells 8, 16, 24, ... by
//                 default). The spacing of eight follows the description of
//                 the evaluated key registers; the exact tap cells are this
//                 design's choice.
package orap_pkg;
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,  // key register cleared or stopped, circuit locked
    ST_FLUSH = 3'd1,  // clear the normal flip-flops
    ST_CLEAR = 3'd2,  // raise scan_enable for one cycle: every key cell clears
    ST_LOAD  = 3'd3,  // read the key sequence, one word per cycle
    ST_DRAIN = 3'd4,  // last word still on its way from the memory
    ST_DONE  = 3'd5   // final key held in the LFSR, circuit unlocked
  } ctrl_state_t;

  typedef enum logic {
    GATE_NAND_XOR = 1'b0,  // NAND control gate feeding an XOR key gate
    GATE_AND_XNOR = 1'b1   // AND control gate feeding an XNOR key gate
  } gate_type_t;

  function automatic bit tap_at(int unsigned idx, int unsigned spacing);
    return (idx == 0) || ((idx % spacing) == 0);
  endfunction
endpackage
