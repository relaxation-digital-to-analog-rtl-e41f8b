// tb_redac_ctrl -- self-checking test of the ReDAC control unit.
// Requests conversions of random codes, single and back to back, and checks
// the frame: one load period with cap_reset, N periods with the buffer
// enabled presenting b0..b(N-1), one hold period with done, N+2 periods from
// frame to frame when start is held.
module tb_redac_ctrl;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 10;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] code = '0;
  logic buf_data, buf_en, cap_reset, busy, done;
  int checks = 0, failures = 0;

  redac_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check one frame whose request cycle has just been sampled.
  task automatic frame(input logic [N-1:0] w);
    @(negedge clk);                      // LOAD
    check({31'd0, cap_reset}, 1, "cap_reset in load");
    check({31'd0, buf_en},    0, "buffer off in load");
    check({31'd0, busy},      1, "busy in load");
    for (int i = 0; i < N; i++) begin
      @(negedge clk);                    // DRIVE i
      check({31'd0, buf_en},    1, "buffer on");
      check({31'd0, cap_reset}, 0, "no reset while driving");
      check({31'd0, buf_data},  {31'd0, w[i]}, $sformatf("bit %0d", i));
    end
    @(negedge clk);                      // HOLD
    check({31'd0, done},   1, "done in hold");
    check({31'd0, buf_en}, 0, "buffer off in hold");
    check({31'd0, busy},   0, "not busy in hold");
  endtask

  initial begin
    logic [N-1:0] w;
    int t_prev, t_now, cyc;
    cyc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check({31'd0, busy | done | buf_en}, 0, "idle after reset");
    // single frames with idle gaps
    for (int t = 0; t < 50; t++) begin
      w = N'($urandom);
      @(negedge clk); start = 1'b1; code = w;
      @(posedge clk); #1 start = 1'b0; code = '0;
      frame(w);
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check({31'd0, busy | done}, 0, "idle between frames");
      end
    end
    // back-to-back frames: start held, code changed in each hold period
    t_prev = -1;
    w = N'($urandom);
    @(negedge clk); start = 1'b1; code = w;
    for (int t = 0; t < 50; t++) begin
      @(posedge clk); #1 code = '0;
      frame(w);
      t_now = int'($realtime / 10.0);
      if (t_prev >= 0) check(t_now - t_prev, N + 2, "frame period N+2");
      t_prev = t_now;
      w = N'($urandom);
      code = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
