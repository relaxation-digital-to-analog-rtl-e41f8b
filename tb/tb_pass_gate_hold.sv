// tb_pass_gate_hold -- self-checking test of the pass-gate / hold-capacitor
// model.  Each closing of the gate must give the charge-sharing voltage
// (C*v_in + C_HOLD*v_old)/(C + C_HOLD), computed here; with the gate open the
// held voltage must not follow v_in; repeated closings converge to v_in.
module tb_pass_gate_hold;
  timeunit 1ns; timeprecision 1ps;
  logic set = 1'b0;
  real v_in = 0.0, v_hold;
  real c = 450.0e-15, ch = 1.0e-12;
  int checks = 0, failures = 0;

  pass_gate_hold #(.C_HOLD_F(1.0e-12)) dut (.set(set), .v_in(v_in), .v_hold(v_hold));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real model, d;
    model = 0.0;
    #10;
    check(v_hold == 0.0, "initial 0 V");
    for (int t = 0; t < 100; t++) begin
      v_in = real'($urandom_range(0, 600)) / 1000.0;
      #10 set = 1'b1;
      #10 set = 1'b0;
      model = (c * v_in + ch * model) / (c + ch);
      d = v_hold - model;
      check(d < 1.0e-9 && d > -1.0e-9, $sformatf("shared %f expected %f", v_hold, model));
      v_in = 0.6 - v_in;
      #10;
      check(v_hold == model, "holds with the gate open");
    end
    v_in = 0.1478;
    repeat (60) begin
      #10 set = 1'b1;
      #10 set = 1'b0;
    end
    d = v_hold - 0.1478;
    check(d < 1.0e-6 && d > -1.0e-6, "converges to v_in");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
