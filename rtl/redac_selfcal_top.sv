// redac_selfcal_top -- relaxation DAC with foreground digital self-calibration
// of its clock frequency.
//
// A relaxation DAC (ReDAC) drives an RC network with the bits of the input
// word, LSB first, one bit per clock period T; with T = RC*ln2 the capacitor
// ends at code/2^N * VDD.  Here the clock comes from VCO1, whose control
// voltage V_VCO1 is held on C_VCO1 and is written by the ReDAC itself through
// pass gate PG1.  A second oscillator VCO2, fed through PG2, clocks a counter
// and forms a VCO-based ADC that re-measures the ReDAC output.  The
// calibration controller converts the codes 2^(N-1) and 2^(N-1)-1, compares
// their measured values and moves the calibration word CAL, whose conversion
// sets V_VCO1, until the two measurements are equal.  Then the ReDAC
// converts din in back-to-back frames of N+2 periods of VCO1.
//
// The digital part (cal_fsm, redac_ctrl with its shift register,
// binary_counter) is synthesizable; the analog part (buffer and RC network,
// the two pass gates with their hold capacitors, the two VCOs) consists of
// behavioural models, so this top is a simulation model of the whole
// converter.  The connections are those of the calibration architecture.
// Outputs: v_out is the ReDAC capacitor voltage, valid while sample_valid
// is high; cal_done is high in normal mode.
module redac_selfcal_top #(
  parameter int unsigned N     = 10,
  parameter int unsigned H     = 1024,
  parameter int          BETA  = 1,
  parameter int unsigned CNT_W = 16,
  parameter real C_VCO1_F      = 1.0e-12,    // hold capacitor of V_VCO1
  parameter real C_VCO2_F      = 100.0e-15   // hold capacitor of V_VCO2
) (
  input  logic               rst_n,
  input  logic               cal_start,
  input  logic [N-1:0]       din,
  output real                v_out,
  output logic               clk_redac,
  output logic               sample_valid,
  output logic               cal_busy,
  output logic               cal_done,
  output logic [N-1:0]       cal_word,
  output logic signed [CNT_W:0] delta_m,
  output logic [15:0]        iter_count,
  output real                v_vco1,
  output real                v_vco2
);
  timeunit 1ns; timeprecision 1ps;

  logic             clk_test;
  logic             conv_start, conv_busy, conv_done;
  logic [N-1:0]     conv_code;
  logic             buf_data, buf_en, cap_reset;
  logic             set_vco1, set_vco2;
  logic             cnt_clr, cnt_en;
  logic [CNT_W-1:0] m;
  real              v_c;

  // ---------------- digital: ReDAC logic & control --------------------
  cal_fsm #(.N(N), .H(H), .BETA(BETA), .CNT_W(CNT_W)) u_cal (
    .clk          (clk_redac),
    .rst_n        (rst_n),
    .cal_start    (cal_start),
    .din          (din),
    .conv_start   (conv_start),
    .conv_code    (conv_code),
    .conv_busy    (conv_busy),
    .conv_done    (conv_done),
    .set_vco1     (set_vco1),
    .set_vco2     (set_vco2),
    .cnt_clr      (cnt_clr),
    .cnt_en       (cnt_en),
    .m            (m),
    .cal_word     (cal_word),
    .delta_m      (delta_m),
    .cal_busy     (cal_busy),
    .cal_done     (cal_done),
    .iter_count   (iter_count),
    .sample_valid (sample_valid)
  );

  redac_ctrl #(.N(N)) u_ctrl (
    .clk       (clk_redac),
    .rst_n     (rst_n),
    .start     (conv_start),
    .code      (conv_code),
    .buf_data  (buf_data),
    .buf_en    (buf_en),
    .cap_reset (cap_reset),
    .busy      (conv_busy),
    .done      (conv_done)
  );

  binary_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk_test (clk_test),
    .rst_n    (rst_n),
    .clr      (cnt_clr),
    .en       (cnt_en),
    .m        (m)
  );

  // ---------------- analog (behavioural models) -----------------------
  redac_rc_model u_rc (
    .buf_data  (buf_data),
    .buf_en    (buf_en),
    .cap_reset (cap_reset),
    .v_c       (v_c)
  );

  pass_gate_hold #(.C_HOLD_F(C_VCO1_F)) u_pg1 (.set(set_vco1), .v_in(v_c), .v_hold(v_vco1));
  pass_gate_hold #(.C_HOLD_F(C_VCO2_F)) u_pg2 (.set(set_vco2), .v_in(v_c), .v_hold(v_vco2));

  relax_vco u_vco1 (.v_vco(v_vco1), .clk(clk_redac));
  relax_vco u_vco2 (.v_vco(v_vco2), .clk(clk_test));

  assign v_out = v_c;
endmodule
