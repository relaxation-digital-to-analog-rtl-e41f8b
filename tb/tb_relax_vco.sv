// tb_relax_vco -- self-checking test of the relaxation VCO model.
// For a set of control voltages measures the output period over 200 cycles
// and compares it with T = 2*C*V_TRIP/I, I = I_MAX*exp(-v/V_SLOPE), worked
// out here; checks the operating point 147.8 mV -> 40.8 ns and that the
// period grows with the control voltage.
module tb_relax_vco;
  timeunit 1ns; timeprecision 1ps;
  real v = 0.0;
  logic clk;
  int checks = 0, failures = 0;

  relax_vco dut (.v_vco(v), .clk(clk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real period_ns(real vc);
    return 2.0 * 100.0e-15 * 0.3 / (2.41e-6 * $exp(-vc / 0.3)) * 1.0e9;
  endfunction

  initial begin
    real t0, tp, prev;
    prev = 0.0;
    for (int k = 0; k <= 12; k++) begin
      v = (k == 12) ? 0.1478 : 0.05 * k;
      repeat (3) @(posedge clk);
      t0 = $realtime;
      repeat (200) @(posedge clk);
      tp = ($realtime - t0) / 200.0;
      check(tp > period_ns(v) - 0.01 && tp < period_ns(v) + 0.01,
            $sformatf("v=%f T=%f expected %f", v, tp, period_ns(v)));
      if (k > 0 && k < 12) check(tp > prev, "period grows with v");
      if (k == 12) check(tp > 40.7 && tp < 40.9, $sformatf("operating point T=%f", tp));
      prev = tp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
