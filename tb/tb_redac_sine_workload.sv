// tb_redac_sine_workload -- dynamic and static performance of the ReDAC,
// calibrated against uncalibrated.
//
// Calibrated: the complete self-calibrating converter (redac_selfcal_top at
// its defaults) calibrates itself and then converts a sine of 90 % of full
// scale at 1/(100*T_conv), i.e. 100 samples per period, for 4 periods.
// Uncalibrated: a ReDAC control unit and RC network alone, clocked by this
// bench at a frequency 3.2 % above 1/(RC*ln2), convert the same sine and then
// every code for the static INL.
// For each, the sine samples are fitted to A*sin + B*cos + C at the known
// frequency (exact, since the record holds whole periods); the residual gives
// SNDR and ENOB = (SNDR - 1.76)/6.02, harmonics 2..5 give THD.  Checked:
// calibrated ENOB above 8.5 bits, uncalibrated ENOB and INL clearly worse
// (ENOB at least 1.5 bits lower, INL above 5 LSB), and the uncalibrated
// converter's INL close to the first-order estimate 2^(N-1)*ln2*|dT|/T.
module tb_redac_sine_workload;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 10, M = 400, PER = 100;
  localparam real VDD = 0.6, TAU = 128.0e3 * 450.0e-15 * 1.0e9, TSTAR = TAU * 0.6931471805599453;
  localparam real PI = 3.141592653589793;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] sine_code(input int k);
    return N'($rtoi(511.5 + 0.9 * 511.5 * $sin(2.0 * PI * real'(k % PER) / real'(PER)) + 0.5));
  endfunction

  // ---- calibrated converter ----
  logic rst_n = 1'b0, cal_start = 1'b0;
  logic [N-1:0] din_c = '0;
  real v_out, v_vco1, v_vco2;
  logic clk_redac, sample_valid, cal_busy, cal_done;
  logic [N-1:0] cal_word;
  logic signed [16:0] delta_m;
  logic [15:0] iter_count;

  redac_selfcal_top dut (.rst_n(rst_n), .cal_start(cal_start), .din(din_c), .v_out(v_out),
                         .clk_redac(clk_redac), .sample_valid(sample_valid), .cal_busy(cal_busy),
                         .cal_done(cal_done), .cal_word(cal_word), .delta_m(delta_m),
                         .iter_count(iter_count), .v_vco1(v_vco1), .v_vco2(v_vco2));

  // ---- uncalibrated converter: clock 3.2 % fast ----
  localparam real T_UNCAL = TSTAR / 1.032;
  logic clk_u = 1'b0, start_u = 1'b0;
  logic [N-1:0] din_u = '0;
  logic bd_u, be_u, cr_u, busy_u, done_u;
  real v_u;

  always #(T_UNCAL / 2.0) clk_u = ~clk_u;
  redac_ctrl #(.N(N)) u_ctrl (.clk(clk_u), .rst_n(rst_n), .start(start_u), .code(din_u),
                              .buf_data(bd_u), .buf_en(be_u), .cap_reset(cr_u),
                              .busy(busy_u), .done(done_u));
  redac_rc_model u_rc (.buf_data(bd_u), .buf_en(be_u), .cap_reset(cr_u), .v_c(v_u));

  // ---- analysis ----
  task automatic analyse(input real v[M], input string name, output real sndr, output real enob,
                         output real thd);
    real a, b, c, amp, res, r, hs, hc, hp;
    a = 0.0; b = 0.0; c = 0.0;
    for (int k = 0; k < M; k++) begin
      a += v[k] * $sin(2.0 * PI * k / PER);
      b += v[k] * $cos(2.0 * PI * k / PER);
      c += v[k];
    end
    a = 2.0 * a / M; b = 2.0 * b / M; c = c / M;
    amp = $sqrt(a * a + b * b);
    res = 0.0;
    for (int k = 0; k < M; k++) begin
      r = v[k] - (a * $sin(2.0 * PI * k / PER) + b * $cos(2.0 * PI * k / PER) + c);
      res += r * r;
    end
    res = $sqrt(res / M);
    hp = 0.0;
    for (int h = 2; h <= 5; h++) begin
      hs = 0.0; hc = 0.0;
      for (int k = 0; k < M; k++) begin
        hs += v[k] * $sin(2.0 * PI * h * k / PER);
        hc += v[k] * $cos(2.0 * PI * h * k / PER);
      end
      hs = 2.0 * hs / M; hc = 2.0 * hc / M;
      hp += hs * hs + hc * hc;
    end
    sndr = 20.0 * $log10((amp / $sqrt(2.0)) / res);
    enob = (sndr - 1.76) / 6.02;
    thd  = 20.0 * $log10($sqrt(hp) / amp);
    $display("%s: amplitude %f V, SNDR %f dB, THD %f dB, ENOB %f bits", name, amp, sndr, thd, enob);
  endtask

  real vc_s[M], vu_s[M], vstat[1024];
  real sndr_c, enob_c, thd_c, sndr_u, enob_u, thd_u;

  initial begin
    real gain, inl, inl_u, est, t0, per;
    #100 rst_n = 1'b1;

    // uncalibrated: sine, then all codes
    @(negedge clk_u);
    din_u = sine_code(0);
    start_u = 1'b1;
    for (int k = 0; k < M + 1024; k++) begin
      @(negedge clk_u iff done_u);
      if (k < M) vu_s[k] = v_u;
      else vstat[k - M] = v_u;
      din_u = (k + 1 < M) ? sine_code(k + 1) : N'(k + 1 - M);
    end
    start_u = 1'b0;
    gain = (vstat[1023] - vstat[0]) / 1023.0;
    inl_u = 0.0;
    for (int c = 0; c < 1024; c++) begin
      inl = (vstat[c] - vstat[0] - gain * c) / gain;
      if (inl < 0) inl = -inl;
      if (inl > inl_u) inl_u = inl;
    end
    est = 512.0 * 0.6931471805599453 * (1.0 - T_UNCAL / TSTAR) / (T_UNCAL / TSTAR);
    $display("uncalibrated (clock +3.2 %%): max INL %f LSB, first-order estimate %f LSB", inl_u, est);
    analyse(vu_s, "uncalibrated", sndr_u, enob_u, thd_u);

    // calibrated: wait for the calibration, then the sine
    wait (cal_done);
    @(posedge clk_redac);
    t0 = $realtime;
    repeat (100) @(posedge clk_redac);
    per = ($realtime - t0) / 100.0;
    din_c = sine_code(0);
    @(negedge clk_redac iff sample_valid);   // frame of the earlier din
    for (int k = 0; k < M; k++) begin
      din_c = sine_code(k + 1);
      @(negedge clk_redac iff sample_valid);
      vc_s[k] = v_out;
    end
    $display("calibrated: period %f ns, T_conv %f ns, sine frequency %f kHz", per, (N + 2) * per,
             1.0e6 / (PER * (N + 2) * per));
    analyse(vc_s, "calibrated", sndr_c, enob_c, thd_c);

    check(enob_c > 8.5, "calibrated ENOB above 8.5 bits");
    check(enob_c > enob_u + 1.5, "calibration gains at least 1.5 bits");
    check(thd_c < thd_u - 6.0, "calibration lowers THD by at least 6 dB");
    check(inl_u > 5.0, "uncalibrated INL above 5 LSB");
    check(inl_u > 0.7 * est && inl_u < 1.3 * est, "uncalibrated INL near the first-order estimate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
