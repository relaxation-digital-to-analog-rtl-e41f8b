// tb_cal_fsm -- self-checking test of the calibration controller.
// The controller works with the real ReDAC control unit; the analog loop is
// replaced by a plant in this bench: the code converted in step 1 is taken as
// the VCO1 setting v1, and the counter result is 2000 for the code
// 2^(N-1)-1 and 2000 + (TARGET - v1)*3/4 for 2^(N-1), so dm = (TARGET-v1)*3/4.
// Three calibrations are run (targets 300, 1000 and 10, the later two started
// with cal_start from normal mode); they drive CAL into both saturation
// limits.  Checked: the codes of the three steps, which pass gate closes in
// which step, clear before count, the count window of H periods, every CAL
// update against CAL + BETA*dm saturated, the stop at dm = 0, the iteration
// length in clock periods, and in normal mode that din is converted in
// frames of N+2 periods with sample_valid.
module tb_cal_fsm;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 10, H = 32, BETA = 2, CNT_W = 16, SETC = 4, SYNC = 8;
  localparam int ITER_CYC = 3 * (N + 3) + 3 * SETC + 2 * (2 * SYNC + H) + 1;

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0;
  logic [N-1:0] din = '0;
  logic conv_start, conv_busy, conv_done;
  logic [N-1:0] conv_code;
  logic set_vco1, set_vco2, cnt_clr, cnt_en;
  logic [CNT_W-1:0] m;
  logic [N-1:0] cal_word;
  logic signed [CNT_W:0] delta_m;
  logic cal_busy, cal_done, sample_valid;
  logic [15:0] iter_count;
  logic buf_data, buf_en, cap_reset;

  int checks = 0, failures = 0;
  int target = 300;
  int v1 = 0;                    // VCO1 setting seen by the plant
  logic [N-1:0] last_code = '0;  // last code accepted by the ReDAC
  int n_sat_hi = 0, n_sat_lo = 0, n_updates = 0, n_done = 0, n_samples = 0;

  cal_fsm #(.N(N), .H(H), .BETA(BETA), .CNT_W(CNT_W), .SET_CYCLES(SETC), .SYNC_WAIT(SYNC)) dut (.*);
  redac_ctrl #(.N(N)) u_ctrl (.clk(clk), .rst_n(rst_n), .start(conv_start), .code(conv_code),
                              .buf_data(buf_data), .buf_en(buf_en), .cap_reset(cap_reset),
                              .busy(conv_busy), .done(conv_done));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- plant ----
  always_comb m = (last_code == N'(1 << (N - 1))) ? CNT_W'(2000 + ((target - v1) * 3) / 4) : CNT_W'(2000);

  // ---- monitors ----
  int step_seen = 0;          // 1,2,3 from the code of the accepted frame
  int en_len = 0, clr_len = 0;
  int t_iter = -1, cyc = 0;
  logic was_clr;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (conv_start && !conv_busy) begin
      last_code <= conv_code;
      if (!cal_done) begin
        if (conv_code == N'(1 << (N - 1)))           step_seen = 2;
        else if (step_seen == 2 && conv_code == N'((1 << (N - 1)) - 1)) step_seen = 3;
        else begin
          step_seen = 1;
          check(conv_code == cal_word, "step 1 converts CAL");
          if (t_iter >= 0 && iter_count != 0)
            check(cyc - t_iter == ITER_CYC, $sformatf("iteration length %0d, expected %0d", cyc - t_iter, ITER_CYC));
          t_iter = cyc;
        end
      end else begin
        check(conv_code == din, "normal mode converts din");
      end
    end
    if (set_vco1) begin
      check(step_seen == 1 && !set_vco2, "SET_VCO1 only in step 1");
      v1 = int'(last_code);
    end
    if (set_vco2) check(step_seen == 2 || step_seen == 3, "SET_VCO2 only in steps 2 and 3");
    if (cnt_clr) clr_len++;
    if (cnt_en) begin
      check(clr_len == SYNC, "counter cleared before the window");
      en_len++;
    end else if (en_len != 0) begin
      check(en_len == H, $sformatf("window of %0d periods", en_len));
      en_len  = 0;
      clr_len = 0;
    end
    if (sample_valid) begin
      n_samples++;
      check(conv_done, "sample_valid in the hold period");
    end
  end

  // CAL update check
  initial forever begin
    int e;
    @(negedge cnt_en);                     // end of a count window
    if (step_seen == 3) begin
      repeat (SYNC) @(posedge clk);          // settle, then the update period
      e = v1 + ((target - v1) * 3 / 4) * BETA;   // worked out from the plant, not from dm
      if (e < 0) begin e = 0; n_sat_lo++; end
      if (e > 1023) begin e = 1023; n_sat_hi++; end
      @(posedge clk);
      @(negedge clk);
      if ((target - v1) * 3 / 4 == 0) begin
        check(cal_done, "stops when dm = 0");
        check(cal_word == N'(v1), "CAL unchanged at the stop");
        n_done++;
      end else begin
        check(int'(cal_word) == e, $sformatf("CAL update: %0d expected %0d", cal_word, e));
        check(!cal_done, "continues while dm != 0");
        n_updates++;
      end
    end
  end

  task automatic run_normal();
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      din = N'($urandom);
      @(posedge sample_valid);
    end
  endtask

  initial begin
    int t0, s0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(cal_busy && !cal_done, "calibration starts after reset");
    wait (cal_done);
    check(cal_word == 10'd300 || ((300 - int'(cal_word)) * 3 / 4 == 0), "converged to target 300");
    s0 = n_samples;
    run_normal();
    t0 = cyc;
    @(posedge sample_valid);
    @(negedge clk);
    check(cyc - t0 == N + 2, $sformatf("normal-mode sample period %0d", cyc - t0));
    target = 1000;
    @(negedge clk); cal_start = 1'b1;
    @(negedge clk); cal_start = 1'b0;
    wait (!cal_done);
    wait (cal_done);
    check((1000 - int'(cal_word)) * 3 / 4 == 0, "converged to target 1000");
    run_normal();
    target = 10;
    @(negedge clk); cal_start = 1'b1;
    @(negedge clk); cal_start = 1'b0;
    wait (!cal_done);
    wait (cal_done);
    check((10 - int'(cal_word)) * 3 / 4 == 0, "converged to target 10");
    repeat (5) @(negedge clk);
    check(n_sat_hi > 0, "upper saturation exercised");
    check(n_sat_lo > 0, "lower saturation exercised");
    check(n_done == 3, "three stops at dm = 0");
    check(n_updates > 10, "CAL updates happened");
    check(n_samples > s0, "normal-mode samples");
    $display("updates=%0d stops=%0d sat_hi=%0d sat_lo=%0d samples=%0d", n_updates, n_done, n_sat_hi, n_sat_lo, n_samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
