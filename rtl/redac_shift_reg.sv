// redac_shift_reg -- parallel-load shift register of the relaxation DAC.
//
// The word to convert is loaded in parallel and then shifted one place per
// clock period towards bit 0, so that the serial output presents b0 (LSB)
// in the first bit period and b(N-1) (MSB) in the last one.  The serial
// output drives the data input of the three-state buffer that charges the
// RC network.  LSB-first order follows the converter principle; the split of
// the single LOAD/SHIFT line into a load and a shift strobe (so that the
// register can also hold) is a choice of this implementation.
//
// Interface: load has priority over shift; both act on the rising clock edge.
// Timing: sout shows bit i during the i-th clock period after the load edge.
module redac_shift_reg #(
  parameter int unsigned N = 10            // DAC resolution in bits
) (
  input  logic         clk,                // CLK_ReDAC
  input  logic         rst_n,              // asynchronous, active low
  input  logic         load,               // load din
  input  logic         shift,              // shift one place towards bit 0
  input  logic [N-1:0] din,                // parallel word
  output logic         sout                // serial bit to the buffer
);
  timeunit 1ns; timeprecision 1ps;

  logic [N-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sr <= '0;
    else if (load)   sr <= din;
    else if (shift)  sr <= {1'b0, sr[N-1:1]};
  end

  assign sout = sr[0];
endmodule
