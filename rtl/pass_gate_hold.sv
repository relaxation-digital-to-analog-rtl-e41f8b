// pass_gate_hold -- behavioural model (not synthesizable) of a calibration
// pass gate (PG1 or PG2) with the hold capacitor of a VCO control voltage
// (C_VCO1 or C_VCO2).
//
// When SET rises the gate connects the ReDAC capacitor C, at v_in, to the
// hold capacitor; the two share their charge at once:
//   v_hold <- (C*v_in + C_HOLD*v_hold) / (C + C_HOLD).
// When the gate is open the hold capacitor keeps its voltage.  The pass gate
// and the hold capacitor follow the calibration architecture; the
// charge-sharing law, the value of C_HOLD and the absence of charge injection
// are this model's choices.  v_hold starts at V_INIT (0 V: the fastest VCO).
module pass_gate_hold #(
  parameter real C_RED_F  = 450.0e-15,  // ReDAC capacitor C
  parameter real C_HOLD_F = 100.0e-15,  // C_VCO1 / C_VCO2
  parameter real V_INIT   = 0.0
) (
  input  logic set,       // SET_VCOx: gate closed while high
  input  real  v_in,      // ReDAC capacitor voltage
  output real  v_hold     // V_VCOx
);
  timeunit 1ns; timeprecision 1ps;

  initial v_hold = V_INIT;

  always @(posedge set)
    v_hold <= (C_RED_F * v_in + C_HOLD_F * v_hold) / (C_RED_F + C_HOLD_F);
endmodule
