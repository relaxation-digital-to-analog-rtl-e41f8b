// tb_redac_rc_model -- self-checking test of the buffer + RC network model.
// Drives N = 10 bit frames, LSB first, one bit per period T, and compares the
// held voltage with the closed form
//   v(NT) = VDD*(1 - a) * sum_i b_i * a^(N-1-i),  a = exp(-T/RC),
// computed here, for T = RC*ln2 (where v = n/2^N*VDD) and for periods 5 %
// off; checks that the voltage holds with the buffer off and that the reset
// switch empties the capacitor.
module tb_redac_rc_model;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 10;
  localparam real VDD = 0.6, TAU = 128.0e3 * 450.0e-15 * 1.0e9;   // ns
  logic buf_data = 1'b0, buf_en = 1'b0, cap_reset = 1'b0;
  real v_c;
  int checks = 0, failures = 0;

  redac_rc_model dut (.*);

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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input logic [N-1:0] w, input real tp);
    cap_reset = 1'b1;
    #(tp) cap_reset = 1'b0;
    for (int i = 0; i < N; i++) begin
      buf_en   = 1'b1;
      buf_data = w[i];
      #(tp);
    end
    buf_en = 1'b0;
  endtask

  function automatic real closed_form(input logic [N-1:0] w, input real tp);
    real a, s;
    a = $exp(-tp / TAU);
    s = 0.0;
    for (int i = 0; i < N; i++) if (w[i]) s += a ** (N - 1 - i);
    return VDD * (1.0 - a) * s;
  endfunction

  initial begin
    logic [N-1:0] w;
    real tp, e, held, lsb;
    lsb = VDD / 1024.0;
    for (int t = 0; t < 300; t++) begin
      w  = (t < 4) ? N'(t * 341) : N'($urandom);
      tp = (t % 3 == 0) ? 39.925 : ((t % 3 == 1) ? 41.921 : 37.929);   // T*, +5 %, -5 %
      frame(w, tp);
      #1;
      e = v_c - closed_form(w, tp);
      check(e < 1.0e-7 && e > -1.0e-7, $sformatf("code %0d T=%f: v=%f expected %f", w, tp, v_c, closed_form(w, tp)));
      if (t % 3 == 0) begin
        e = v_c - real'(w) * lsb;
        check(e < 0.01 * lsb && e > -0.01 * lsb, $sformatf("ideal T: code %0d v=%f", w, v_c));
      end
      held = v_c;
      buf_data = ~buf_data;
      #500;
      check(v_c == held, "holds while the buffer is off");
    end
    cap_reset = 1'b1;
    #5 cap_reset = 1'b0;
    check(v_c == 0.0, "reset switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
