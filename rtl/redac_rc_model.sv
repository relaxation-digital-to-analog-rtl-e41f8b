// redac_rc_model -- behavioural model (not synthesizable) of the analog core
// of the relaxation DAC: the three-state buffer, the series resistor R and
// the capacitor C.
//
// While ENABLE (buf_en) is high the buffer drives VDD*buf_data and the
// capacitor voltage relaxes towards it with time constant tau = R*C:
//   v(t) = v_inf + (v(t0) - v_inf) * exp(-(t - t0)/tau).
// While ENABLE is low the buffer is in high impedance and the voltage holds.
// With a bit period T = tau*ln2 each period halves the previous charge and
// adds VDD*b_i/2, so after N periods v = code/2^N * VDD.  The model evaluates
// the exact exponential at every change of its inputs, so v_c is exact at
// those instants (in particular at the end of the last bit period) and is
// not updated in between.  cap_reset models an ideal switch that discharges
// C to 0 V; that switch is this design's choice for the reset condition
// v_C(0) = 0.  R, C and VDD default to the converter's 128 kOhm, 450 fF and
// 0.6 V.  Loading of C by the pass gates is not fed back.
module redac_rc_model #(
  parameter real R_OHM = 128.0e3,
  parameter real C_F   = 450.0e-15,
  parameter real VDD   = 0.6
) (
  input  logic buf_data,   // bit driven by the three-state buffer
  input  logic buf_en,     // ENABLE of the buffer
  input  logic cap_reset,  // discharge switch
  output real  v_c         // capacitor voltage, volts
);
  timeunit 1ns; timeprecision 1ps;

  localparam real TAU_NS = R_OHM * C_F * 1.0e9;

  real v;        // capacitor voltage at t_last
  real t_last;   // ns
  real v_inf;    // voltage the buffer drives
  bit  drive;    // buffer enabled in the segment that ends now

  initial begin
    v      = 0.0;
    t_last = 0.0;
    v_inf  = 0.0;
    drive  = 1'b0;
    v_c    = 0.0;
  end

  always @(buf_data, buf_en, cap_reset) begin
    // close the segment that ends now with the old drive conditions
    if (drive) v = v_inf + (v - v_inf) * $exp(-($realtime - t_last) / TAU_NS);
    t_last = $realtime;
    // open the next one
    drive  = buf_en;
    v_inf  = buf_data ? VDD : 0.0;
    if (cap_reset) v = 0.0;
    v_c = v;
  end
endmodule
