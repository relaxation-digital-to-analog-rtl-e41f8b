// redac_ctrl -- digital control unit of the relaxation DAC (ReDAC).
//
// One conversion is a frame of N+2 clock periods:
//   period 0        LOAD : the shift register takes the code and the RC
//                          capacitor is discharged to 0 V (cap_reset),
//   periods 1..N    DRIVE: the three-state buffer is enabled and drives
//                          VDD*b_i, bit b0 first; the register shifts
//                          after each period,
//   period N+1      HOLD : the buffer is released (high impedance), V_C
//                          holds V_DAC(code) = code/2^N * VDD and done is 1.
// The frame length N+2 matches the converter's sampling period
// T_conv = (N+2)T; the split into a load/reset period and a hold period, and
// the reset switch across the capacitor, are choices of this design.
//
// Interface: start is accepted whenever busy is 0, including the HOLD period,
// so back-to-back frames give one sample every N+2 periods.  The code is
// sampled in the same cycle as start.  The shift register is instantiated
// here and its serial output is buf_data.
module redac_ctrl #(
  parameter int unsigned N = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] code,
  output logic         buf_data,   // data input of the three-state buffer
  output logic         buf_en,     // ENABLE of the three-state buffer
  output logic         cap_reset,  // discharge switch across C
  output logic         busy,       // frame in progress (LOAD or DRIVE)
  output logic         done        // HOLD period: V_C is valid
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [1:0] {IDLE, LOAD, DRIVE, HOLD} phase_t;
  localparam int unsigned CW = $clog2(N + 1);

  phase_t        phase;
  logic [CW-1:0] bitcnt;        // bit periods already driven
  logic          accept;
  logic          sr_load;
  logic          sr_shift;

  assign accept = start && (phase == IDLE || phase == HOLD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= IDLE;
      bitcnt <= '0;
    end else begin
      unique case (phase)
        IDLE, HOLD: phase <= accept ? LOAD : IDLE;
        LOAD: begin
          phase  <= DRIVE;
          bitcnt <= '0;
        end
        DRIVE: begin
          if (bitcnt == CW'(N - 1)) phase <= HOLD;
          bitcnt <= bitcnt + 1'b1;
        end
        default: phase <= IDLE;
      endcase
    end
  end

  // The register loads on the edge that ends the request cycle, so that in
  // LOAD it already holds the code; it shifts at the end of each DRIVE period.
  assign sr_load  = accept;
  assign sr_shift = (phase == DRIVE);

  redac_shift_reg #(.N(N)) u_sr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (sr_load),
    .shift (sr_shift),
    .din   (code),
    .sout  (buf_data)
  );

  assign buf_en    = (phase == DRIVE);
  assign cap_reset = (phase == LOAD);
  assign busy      = (phase == LOAD) || (phase == DRIVE);
  assign done      = (phase == HOLD);
endmodule
