// relax_vco -- behavioural model (not synthesizable) of the relaxation VCO
// (VCO1 and VCO2).
//
// In the oscillator two capacitors C are charged in turn by the current I of
// transistor MP up to the threshold V_TRIP of a set-reset latch, which flips
// and discharges the other one, so the output period is T = 2*C*V_TRIP/I.
// The gate of MP is the control voltage: a higher v_vco gives less current
// and a longer period, 0 V the highest frequency.  The period formula is the
// oscillator's; the current law I = I_MAX*exp(-v_vco/V_SLOPE) (MP in weak
// inversion) and its constants are this model's choices, set so that
// v_vco = 147.8 mV gives T = 40.8 ns, close to the ideal ReDAC period
// RC*ln2 = 39.9 ns.  The control voltage in force at the start of a half period
// sets its length.  The output starts low at time 0 and runs freely.
module relax_vco #(
  parameter real C_OSC_F = 100.0e-15,  // ramp capacitors C
  parameter real V_TRIP  = 0.3,        // latch threshold
  parameter real I_MAX_A = 2.41e-6,    // MP current at v_vco = 0
  parameter real V_SLOPE = 0.3         // exponential slope of I(v_vco)
) (
  input  real  v_vco,   // control voltage (gate of MP)
  output logic clk      // V_CLK
);
  timeunit 1ns; timeprecision 1ps;

  real half_ns;   // current half period, ns

  // I = I_MAX*exp(-v/V_SLOPE), half period = C*V_TRIP/I
  always_comb half_ns = C_OSC_F * V_TRIP / (I_MAX_A * $exp(-v_vco / V_SLOPE)) * 1.0e9;

  initial clk = 1'b0;

  // each half period the ramp of one capacitor reaches V_TRIP and the latch flips
  always begin
    #(half_ns) clk = ~clk;
  end
endmodule
