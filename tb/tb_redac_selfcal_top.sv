// tb_redac_selfcal_top -- end-to-end test of the self-calibrating ReDAC at
// its default size (N = 10, H = 1024).
// After reset VCO1 runs at its fastest (V_VCO1 = 0 V, T about 25 ns, far
// from RC*ln2 = 39.93 ns).  The bench waits for the calibration to end and
// checks: dm = 0 at the end; the VCO1 period within 0.5 % of RC*ln2; every
// code 0..1023 converted in normal mode against the closed form
//   v = VDD*(1-a)*sum b_i a^(N-1-i), a = exp(-T/RC)
// with the measured T; the static linearity (endpoint INL and DNL within
// 1.5 LSB, mid-scale step |V(512)-V(511)| below 1 LSB); the sample period
// of N+2 clock periods.  A second calibration is started with cal_start.
// Mechanisms counted, each must occur: CAL updates, CAL moving up and down,
// PG1 and PG2 closings, count windows, stops at dm = 0, normal-mode samples,
// restart by cal_start.
module tb_redac_selfcal_top;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 10;
  localparam real VDD = 0.6, TAU = 128.0e3 * 450.0e-15 * 1.0e9, TSTAR = TAU * 0.6931471805599453;
  localparam real LSB = VDD / 1024.0;

  logic rst_n = 1'b0, cal_start = 1'b0;
  logic [N-1:0] din = '0;
  real v_out, v_vco1, v_vco2;
  logic clk_redac, sample_valid, cal_busy, cal_done;
  logic [N-1:0] cal_word;
  logic signed [16:0] delta_m;
  logic [15:0] iter_count;

  redac_selfcal_top dut (.*);

  int checks = 0, failures = 0;
  int n_pg1 = 0, n_pg2 = 0, n_win = 0, n_up = 0, n_down = 0, n_stop = 0, n_samples = 0, n_restart = 0;
  int max_iter = 0;
  real vres[1024];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #30ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(v_vco1) n_pg1++;
  always @(v_vco2) n_pg2++;
  always @(negedge dut.cnt_en) n_win++;
  always @(cal_word) begin : cal_dir
    static int prev = 0;
    if (int'(cal_word) > prev) n_up++;
    if (int'(cal_word) < prev) n_down++;
    prev = int'(cal_word);
  end
  always @(posedge cal_done) begin
    n_stop++;
    if (int'(iter_count) > max_iter) max_iter = int'(iter_count);
    check(delta_m == 0, "calibration ends with dm = 0");
  end
  always @(posedge clk_redac) if (sample_valid) n_samples++;

  function automatic real closed_form(input int w, input real tp);
    real a, s;
    a = $exp(-tp / TAU);
    s = 0.0;
    for (int i = 0; i < N; i++) if (w[i]) s += a ** (N - 1 - i);
    return VDD * (1.0 - a) * s;
  endfunction

  task automatic measure_period(output real tp);
    real t0;
    @(posedge clk_redac);
    t0 = $realtime;
    repeat (100) @(posedge clk_redac);
    tp = ($realtime - t0) / 100.0;
  endtask

  initial begin
    real t_init, t_cal, e, inl, dnl, inl_max, dnl_max, t_s0, gain;
    int code_in_flight;
    #100 rst_n = 1'b1;
    measure_period(t_init);
    $display("uncalibrated VCO1 period %f ns (ideal %f ns)", t_init, TSTAR);
    wait (cal_done);
    $display("calibrated after %0d CAL updates, %0.1f us, CAL=%0d", iter_count, $realtime / 1000.0, cal_word);
    measure_period(t_cal);
    $display("calibrated VCO1 period %f ns, error %f %%", t_cal, (t_cal / TSTAR - 1.0) * 100.0);
    check(t_cal > TSTAR * 0.995 && t_cal < TSTAR * 1.005, "VCO1 period within 0.5 % of RC*ln2");

    // sweep every code in normal mode
    code_in_flight = int'(din);
    for (int k = 0; k <= 1024; k++) begin
      @(negedge clk_redac iff sample_valid);
      if (k > 0) begin
        vres[code_in_flight] = v_out;
        e = v_out - closed_form(code_in_flight, t_cal);
        check(e < 0.01 * LSB && e > -0.01 * LSB,
              $sformatf("code %0d: v=%f expected %f", code_in_flight, v_out, closed_form(code_in_flight, t_cal)));
      end else begin
        t_s0 = $realtime;
      end
      din = (k < 1024) ? N'(k) : '0;    // converted by the frame that starts next
      code_in_flight = int'(din);
      if (k == 1) check($realtime - t_s0 > (N + 2) * t_cal - 0.01 && $realtime - t_s0 < (N + 2) * t_cal + 0.01,
                         $sformatf("sample period %f ns, expected (N+2)T", $realtime - t_s0));
    end
    // static linearity, endpoint fit
    gain = (vres[1023] - vres[0]) / 1023.0;
    inl_max = 0.0; dnl_max = 0.0;
    for (int c = 0; c < 1024; c++) begin
      inl = (vres[c] - vres[0] - gain * c) / gain;
      if (inl < 0) inl = -inl;
      if (inl > inl_max) inl_max = inl;
      if (c > 0) begin
        dnl = (vres[c] - vres[c-1]) / gain - 1.0;
        if (dnl < 0) dnl = -dnl;
        if (dnl > dnl_max) dnl_max = dnl;
      end
    end
    $display("calibrated: max INL %f LSB, max DNL %f LSB, V(512)-V(511) = %f LSB",
             inl_max, dnl_max, (vres[512] - vres[511]) / LSB);
    check(inl_max < 1.5, "max INL below 1.5 LSB");
    check(dnl_max < 1.5, "max DNL below 1.5 LSB");
    e = (vres[512] - vres[511]) / LSB;
    check(e < 1.0 && e > -1.0, "mid-scale step driven to zero");

    // recalibration from normal mode
    @(negedge clk_redac) cal_start = 1'b1;
    @(negedge clk_redac) cal_start = 1'b0;
    wait (!cal_done);
    n_restart++;
    wait (cal_done);
    measure_period(t_cal);
    $display("after restart: %0d CAL updates, period %f ns", iter_count, t_cal);
    check(t_cal > TSTAR * 0.995 && t_cal < TSTAR * 1.005, "period still calibrated after restart");

    $display("mechanisms: updates(max)=%0d up=%0d down=%0d pg1=%0d pg2=%0d windows=%0d stops=%0d samples=%0d restarts=%0d",
             max_iter, n_up, n_down, n_pg1, n_pg2, n_win, n_stop, n_samples, n_restart);
    check(max_iter > 0, "CAL updates happened");
    check(n_up > 0, "CAL moved up");
    check(n_down > 0, "CAL moved down");
    check(n_pg1 > 0, "PG1 closed");
    check(n_pg2 > 0, "PG2 closed");
    check(n_win > 0, "count windows");
    check(n_stop == 2, "two stops at dm = 0");
    check(n_samples >= 1024, "normal-mode samples");
    check(n_restart == 1, "restart by cal_start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
