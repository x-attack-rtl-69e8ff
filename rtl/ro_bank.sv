// ro_bank: behavioural model of a bank of enable-gated ring oscillators,
// the attacker's power-wasting circuit.
//
// Behavioural model, not synthesizable logic: on the FPGA each oscillator
// is a NAND gate (enable, feedback) closing a short loop of look-up tables,
// a combinational loop that only a delay model can simulate. Here every
// oscillator is one NAND stage with a modelled loop delay of RO_DELAY_PS,
// so while en is high each ro_out bit toggles with period 2*RO_DELAY_PS,
// and while en is low every ro_out bit rests at 1. The current the bank draws
// while toggling is what slows down the neighbouring circuits; that
// coupling is outside any logic model. N_RO = 9500 gives the two equal
// banks together 19k oscillators, the size with which the attack succeeded.
// The loop delay is this model's assumption.
module ro_bank #(
  parameter int unsigned N_RO        = 9500,  // oscillators in this bank
  parameter int unsigned RO_DELAY_PS = 1000   // modelled loop delay, ps
) (
  input  logic            en,      // bank enable from the attack controller
  output logic [N_RO-1:0] ro_out   // oscillator outputs (left open on the FPGA)
);
  // All oscillators of the bank switch together, so the whole bank is one
  // vector-wide delayed NAND feedback.
  assign #(RO_DELAY_PS * 1ps) ro_out = ~({N_RO{en}} & ro_out);
endmodule
