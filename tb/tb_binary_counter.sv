// tb_binary_counter -- self-checking test of the VCO-ADC binary counter.
// CLK_TEST runs at a randomly chosen period; a window of H periods of a
// separate CLK_ReDAC is opened after a clear.  The result must equal the
// number of CLK_TEST transitions in the window, 2*H*T_redac/T_test, within
// +-2 (window edges are re-timed by the synchronizers).  Also checks that a
// clear empties the counter, that the value holds after the window, and that
// nothing is counted with en low.
module tb_binary_counter;
  timeunit 1ns; timeprecision 1ps;
  localparam int CNT_W = 16;
  logic clk = 1'b0, clk_test = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [CNT_W-1:0] m;
  real t_test_half = 10.0;
  int checks = 0, failures = 0;

  binary_counter #(.CNT_W(CNT_W)) dut (.clk_test(clk_test), .rst_n(rst_n), .clr(clr), .en(en), .m(m));

  always #20 clk = ~clk;                      // CLK_ReDAC, 40 ns
  always #(t_test_half) clk_test = ~clk_test;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, mm;
    real expv;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      t_test_half = 8.0 + real'($urandom_range(0, 3200)) / 100.0;  // 8..40 ns
      h = (t % 4 == 0) ? 1024 : int'($urandom_range(16, 300));
      @(posedge clk); clr <= 1'b1;
      repeat (8) @(posedge clk);
      clr <= 1'b0;
      check(m == 0, "cleared");
      repeat (3) @(posedge clk);
      check(m == 0, "no count with en low");
      en <= 1'b1;
      repeat (h) @(posedge clk);
      en <= 1'b0;
      repeat (8) @(posedge clk);
      mm   = int'(m);
      expv = 2.0 * h * 40.0 / (2.0 * t_test_half);
      check((real'(mm) > expv - 2.5) && (real'(mm) < expv + 2.5),
            $sformatf("m=%0d expected %f (H=%0d, T_test=%f)", mm, expv, h, 2.0 * t_test_half));
      repeat (5) @(posedge clk);
      check(int'(m) == mm, "m holds after the window");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
