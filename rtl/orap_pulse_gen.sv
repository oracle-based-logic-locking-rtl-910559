// orap_pulse_gen: behavioural model of the scan-entry pulse generator that
// sits beside every key-register flip-flop.
//
// This is a timing-dependent circuit, not synthesizable logic: it is written
// as a delay model of a standard-cell structure and must be built from
// hand-placed, size-controlled cells in a real implementation.
//
// Structure: scan_enable goes through a chain of N_INV inverters (odd, three
// by default) and, together with the undelayed scan_enable, into a NAND2.
// In steady state one NAND input is the inverse of the other, so clr_n is 1.
// When scan_enable rises, the delayed, inverted copy is still 1 for the
// chain's delay, so clr_n drops to 0 for about N_INV * T_INV. A falling
// scan_enable makes no pulse.
//
// Interface: scan_enable in, clr_n out (active-low clear of one key cell).
// Timing: clr_n falls T_NAND after scan_enable rises and stays low for
// N_INV * T_INV. The three-inverter chain and the NAND2 follow the
// described cell; the delay values are this model's own.
module orap_pulse_gen #(
  parameter int unsigned N_INV  = 3,     // inverters in the delay chain (odd)
  parameter realtime     T_INV  = 0.1ns, // delay of one inverter
  parameter realtime     T_NAND = 0.05ns // delay of the NAND2
) (
  input  logic scan_enable,
  output logic clr_n
);
  timeunit 1ns; timeprecision 1ps;

  logic [N_INV:0] chain;

  assign chain[0] = scan_enable;
  for (genvar i = 0; i < N_INV; i++) begin : g_inv
    assign #(T_INV) chain[i+1] = ~chain[i];
  end

  assign #(T_NAND) clr_n = ~(scan_enable & chain[N_INV]);

  initial begin
    assert (N_INV % 2 == 1) else $error("orap_pulse_gen: N_INV must be odd");
  end
endmodule
