// binary_counter -- counter of the VCO-based ADC used during calibration.
//
// The counter counts every transition, rising and falling, of CLK_TEST (the
// output of VCO2) while the ENABLE window is open, so that after a window of
// H periods of CLK_ReDAC it holds m = 2*H*T_CLK_ReDAC/T_CLK_TEST, a number
// proportional to the VCO2 frequency and hence to its control voltage.
// Counting both edges follows the converter's description; the way it is
// done (one counter per clock edge, summed) is this design's choice.
//
// clr and en are produced in the CLK_ReDAC domain.  They are brought into
// the CLK_TEST domain by two-flop synchronizers; the falling-edge counter
// samples the synchronized enable as well.  Because of the synchronizers the
// window seen by the counter starts and ends 2-3 CLK_TEST periods late but
// keeps its length, and m settles about three CLK_TEST periods after en
// falls: the controller waits before it reads m, which is then static.
// clr has priority over en.  The counters wrap at 2^CNT_W.
module binary_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk_test,  // CLK_TEST from VCO2
  input  logic             rst_n,     // asynchronous, active low
  input  logic             clr,       // counter reset (CLK_ReDAC domain)
  input  logic             en,        // count window (CLK_ReDAC domain)
  output logic [CNT_W-1:0] m          // transitions counted
);
  timeunit 1ns; timeprecision 1ps;

  logic [1:0]       en_sync, clr_sync;
  logic             en_s, clr_s;
  logic [CNT_W-1:0] cnt_rise, cnt_fall;

  always_ff @(posedge clk_test or negedge rst_n) begin
    if (!rst_n) begin
      en_sync  <= '0;
      clr_sync <= '0;
    end else begin
      en_sync  <= {en_sync[0], en};
      clr_sync <= {clr_sync[0], clr};
    end
  end
  assign en_s  = en_sync[1];
  assign clr_s = clr_sync[1];

  always_ff @(posedge clk_test or negedge rst_n) begin
    if (!rst_n)     cnt_rise <= '0;
    else if (clr_s) cnt_rise <= '0;
    else if (en_s)  cnt_rise <= cnt_rise + 1'b1;
  end

  always_ff @(negedge clk_test or negedge rst_n) begin
    if (!rst_n)     cnt_fall <= '0;
    else if (clr_s) cnt_fall <= '0;
    else if (en_s)  cnt_fall <= cnt_fall + 1'b1;
  end

  assign m = cnt_rise + cnt_fall;
endmodule
