// tb_redac_shift_reg -- self-checking test of the ReDAC shift register.
// Loads random words and checks that the serial output presents the bits
// LSB first, one per clock, that hold (no load, no shift) keeps the output,
// and that load has priority over shift.
module tb_redac_shift_reg;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 10;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic [N-1:0] din = '0;
  logic sout;
  int checks = 0, failures = 0;

  redac_shift_reg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] w;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(sout, 1'b0, "reset value");
    for (int t = 0; t < 200; t++) begin
      w = N'($urandom);
      @(negedge clk); din = w; load = 1'b1; shift = 1'b1;   // load wins
      @(negedge clk); load = 1'b0; shift = 1'b0; din = ~w;
      check(sout, w[0], "b0 after load");
      @(negedge clk);
      check(sout, w[0], "hold keeps b0");
      for (int i = 0; i < N; i++) begin
        check(sout, w[i], $sformatf("bit %0d of %h", i, w));
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
      end
      check(sout, 1'b0, "empty after N shifts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
