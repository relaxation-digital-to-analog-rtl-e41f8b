// cal_fsm -- foreground self-calibration controller of the relaxation DAC.
//
// The ReDAC is linear only when its clock period T equals RC*ln2.  Its clock
// comes from VCO1, whose control voltage is the ReDAC's own output sampled
// onto C_VCO1, so the controller tunes T through a calibration word CAL.
// With a wrong T the two codes around mid scale, 2^(N-1) and 2^(N-1)-1, give
// outputs whose difference departs from 1 LSB, and it is driven to zero:
//   step 1: convert CAL, close PG1 (SET_VCO1): V_VCO1 <- V_DAC(CAL);
//   step 2: convert 2^(N-1), close PG2 (SET_VCO2), clear the counter, count
//           VCO2 transitions for H clock periods: m_hi;
//   step 3: the same for 2^(N-1)-1: m_lo;
//   update: dm = m_hi - m_lo; stop if dm = 0, else CAL <- CAL + BETA*dm
//           and repeat from step 1.
// When dm = 0 the controller enters normal mode: back-to-back ReDAC frames
// convert din, and sample_valid marks the period in which the output holds.
// The three steps, the update rule and the stop rule follow the calibration
// flow chart; the sign of the update is that of the flow chart (the VCOs
// slow down as their control voltage rises, so dm falls as the output step
// grows and a positive BETA gives negative feedback).  The values of H and
// BETA, saturation of CAL to 0..2^N-1, the pass-gate time SET_CYCLES, the
// counter clear time and the wait before m is read (SYNC_WAIT, covering the
// counter's synchronizers), start after reset and restart by cal_start are
// this design's choices.
//
// Timing: one iteration takes 3*(N+3) + 3*SET_CYCLES + 2*(2*SYNC_WAIT + H)
// + 1 clock periods.  Everything runs on CLK_ReDAC.
module cal_fsm #(
  parameter int unsigned N          = 10,   // ReDAC resolution
  parameter int unsigned H          = 1024, // count window in CLK_ReDAC periods
  parameter int          BETA       = 1,    // feedback gain
  parameter int unsigned CNT_W      = 16,   // counter width
  parameter int unsigned CAL_INIT   = 0,    // CAL after reset
  parameter int unsigned SET_CYCLES = 4,    // pass gate closed, periods
  parameter int unsigned SYNC_WAIT  = 8     // counter clear / settle, periods
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cal_start,     // restart calibration
  input  logic [N-1:0]       din,           // normal-mode data
  // ReDAC control unit
  output logic               conv_start,
  output logic [N-1:0]       conv_code,
  input  logic               conv_busy,
  input  logic               conv_done,
  // pass gates
  output logic               set_vco1,
  output logic               set_vco2,
  // binary counter
  output logic               cnt_clr,
  output logic               cnt_en,
  input  logic [CNT_W-1:0]   m,
  // status
  output logic [N-1:0]       cal_word,
  output logic signed [CNT_W:0] delta_m,
  output logic               cal_busy,
  output logic               cal_done,
  output logic [15:0]        iter_count,
  output logic               sample_valid
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [3:0] {
    S_START, S_CONV, S_SET, S_CLR, S_COUNT, S_SETTLE, S_UPDATE, S_NORMAL, S_DRAIN
  } state_t;
  typedef enum logic [1:0] {STEP1 = 2'd1, STEP2 = 2'd2, STEP3 = 2'd3} step_t;

  localparam int unsigned TMAX = (H > SYNC_WAIT) ? ((H > SET_CYCLES) ? H : SET_CYCLES)
                                                 : ((SYNC_WAIT > SET_CYCLES) ? SYNC_WAIT : SET_CYCLES);
  localparam int unsigned TW = $clog2(TMAX + 1);
  localparam logic [N-1:0] CODE_HI = N'(1) << (N - 1);   // 2^(N-1)
  localparam logic [N-1:0] CODE_LO = CODE_HI - 1'b1;      // 2^(N-1)-1
  localparam int CAL_MAX = (1 << N) - 1;

  state_t          state;
  step_t           step;
  logic [TW-1:0]   timer;
  logic [N-1:0]    cal;
  logic [CNT_W-1:0] m_hi, m_lo;
  logic            restart_pend;
  logic signed [CNT_W:0] dm;
  logic signed [47:0]    cal_next_wide;
  logic [N-1:0]    cal_next;

  assign dm = $signed({1'b0, m_hi}) - $signed({1'b0, m_lo});

  // CAL + BETA*dm, saturated to the N-bit range
  always_comb begin
    cal_next_wide = 48'(signed'({1'b0, cal})) + 48'(BETA) * 48'(dm);
    if (cal_next_wide < 0)             cal_next = '0;
    else if (cal_next_wide > 48'(CAL_MAX)) cal_next = N'(CAL_MAX);
    else                               cal_next = N'(cal_next_wide);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_START;
      step         <= STEP1;
      timer        <= '0;
      cal          <= N'(CAL_INIT);
      m_hi         <= '0;
      m_lo         <= '0;
      delta_m      <= '0;
      iter_count   <= '0;
      restart_pend <= 1'b0;
    end else begin
      unique case (state)
        S_START: state <= S_CONV;                 // conv_start issued here
        S_CONV: if (conv_done) begin
          state <= S_SET;
          timer <= '0;
        end
        S_SET: begin
          timer <= timer + 1'b1;
          if (timer == TW'(SET_CYCLES - 1)) begin
            timer <= '0;
            if (step == STEP1) begin
              step  <= STEP2;
              state <= S_START;
            end else begin
              state <= S_CLR;
            end
          end
        end
        S_CLR: begin
          timer <= timer + 1'b1;
          if (timer == TW'(SYNC_WAIT - 1)) begin
            timer <= '0;
            state <= S_COUNT;
          end
        end
        S_COUNT: begin
          timer <= timer + 1'b1;
          if (timer == TW'(H - 1)) begin
            timer <= '0;
            state <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          timer <= timer + 1'b1;
          if (timer == TW'(SYNC_WAIT - 1)) begin
            timer <= '0;
            if (step == STEP2) begin
              m_hi  <= m;
              step  <= STEP3;
              state <= S_START;
            end else begin
              m_lo  <= m;
              state <= S_UPDATE;
            end
          end
        end
        S_UPDATE: begin
          delta_m <= dm;
          step    <= STEP1;
          if (dm == 0) begin
            state <= S_NORMAL;
          end else begin
            cal        <= cal_next;
            iter_count <= iter_count + 1'b1;
            state      <= S_START;
          end
        end
        S_NORMAL: if (cal_start) begin
          restart_pend <= 1'b1;
          state        <= S_DRAIN;
        end
        S_DRAIN: if (!conv_busy && !conv_done) begin  // let the last frame end
          restart_pend <= 1'b0;
          iter_count   <= '0;
          state        <= S_START;
        end
        default: state <= S_START;
      endcase
    end
  end

  always_comb begin
    unique case (step)
      STEP1:   conv_code = cal;
      STEP2:   conv_code = CODE_HI;
      default: conv_code = CODE_LO;
    endcase
    if (state == S_NORMAL) conv_code = din;
  end

  assign conv_start   = (state == S_START) || (state == S_NORMAL && !cal_start);
  assign set_vco1     = (state == S_SET) && (step == STEP1);
  assign set_vco2     = (state == S_SET) && (step != STEP1);
  assign cnt_clr      = (state == S_CLR);
  assign cnt_en       = (state == S_COUNT);
  assign cal_word     = cal;
  assign cal_done     = (state == S_NORMAL);
  assign cal_busy     = !cal_done && !restart_pend;
  assign sample_valid = (state == S_NORMAL) && conv_done;

  // A calibration conversion is only requested when the ReDAC is free.
  property p_start_free;
    @(posedge clk) disable iff (!rst_n) (state == S_START) |-> !conv_busy;
  endproperty
  a_start_free: assert property (p_start_free);
  // The pass gates are never closed while the buffer could be driving.
  a_set_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               (set_vco1 || set_vco2) |-> !conv_busy);
endmodule
