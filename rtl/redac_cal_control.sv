// Calibration control of the self-calibrating ReDAC.
//
// Tunes the ReDAC clock period T = 2m/f_clk until T = RC*ln2. The two
// mid-scale codes 2^(N-1)-1 and 2^(N-1) must give output voltages one LSB
// apart; with T too short the second comes out lower than the first, with T
// too long higher. The FSM compares them with a single-slope measurement:
//   step 1  convert 2^(N-1)-1 (the control block adds the T_del low phase)
//   step 2  discharge C through R_disch, counting q up until V_C <= V_T
//   step 3  convert 2^(N-1)
//   step 4  discharge again, counting q down until V_C <= V_T
// q is then the difference of the two discharge times. If q = 0 the
// calibration ends; otherwise m moves one step by the sign of q (up when
// q > 0, i.e. when the larger code gave the smaller voltage) and the steps
// repeat.
//
// Interface: a high level on cal starts a calibration from idle. The first
// calibration after reset starts from m = M0; later ones (periodic
// re-calibration against drift) continue from the current m, so they take
// only as many iterations as m has to move. q is cleared at the start.
// end_cal is high once the calibration has finished and stays high until
// cal is released. convert/data go to the control block through
// the input mux (sel = 1), which answers with ready. stop_n is the comparator
// output; q, q_sign and q_zero come from the up/down counter. All outputs are
// decoded from the state register; the FSM runs on f_clk.
//
// As in the published design: the four steps, discharge starting on the f_clk edge
// after the conversion's hold phase begins, m = m + sign(q) after step 4, stop
// on q = 0. This design's choices: the FSM also stops when the sign of q
// reverses from one iteration to the next, because with a time resolution of
// one f_clk cycle q moves by several counts per step of m and may never be
// exactly zero. It then keeps whichever of the last two m values gave the
// smaller |q| (stepping back by one if needed), so m ends within half a step
// of the point where the two voltages are equal. q is cleared at the start
// of each iteration; cal is a level.
module redac_cal_control
  import redac_pkg::*;
#(
  parameter int unsigned N   = REDAC1_N,
  parameter int unsigned Q_W = REDAC_Q_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cal,
  output logic         end_cal,
  // to/from the ReDAC control block (through the input mux)
  output logic         convert,
  output logic [N-1:0] data,
  input  logic         ready,
  // discharge network and comparator
  output logic         discharge,
  input  logic         stop_n,
  // up/down counter
  output logic         cnt_rst,
  output logic         cnt_en,
  output logic         cnt_up_dn_n,
  input  logic         q_sign,
  input  logic         q_zero,
  input  logic signed [Q_W-1:0] q,
  // clock divider
  output logic         m_rst,
  output logic         m_en,
  output logic         m_up_dn_n,
  // status
  output cal_state_e   state,
  output logic         reversed   // last calibration ended on a sign reversal
);

  localparam logic [N-1:0] CODE_LO = {1'b0, {(N-1){1'b1}}};  // 2^(N-1)-1
  localparam logic [N-1:0] CODE_HI = {1'b1, {(N-1){1'b0}}};  // 2^(N-1)

  logic prev_valid, prev_sign;
  logic [Q_W-1:0] prev_mag, mag;   // |q| of the previous and current iteration
  logic step_back;                 // on reversal: the previous m was closer
  logic calibrated;   // a calibration has completed since reset

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= CAL_IDLE;
      prev_valid <= 1'b0;
      prev_sign  <= 1'b0;
      prev_mag   <= '0;
      reversed   <= 1'b0;
      calibrated <= 1'b0;
    end else begin
      unique case (state)
        CAL_IDLE:     if (cal) state <= CAL_RESET;
        CAL_RESET: begin
          prev_valid <= 1'b0;
          reversed   <= 1'b0;
          state      <= CAL_S1_REQ;
        end
        CAL_S1_REQ:   if (!ready) state <= CAL_S1_WAIT;
        CAL_S1_WAIT:  if (ready)  state <= CAL_S2_DISCH;
        CAL_S2_DISCH: if (!stop_n) state <= CAL_S3_REQ;
        CAL_S3_REQ:   if (!ready) state <= CAL_S3_WAIT;
        CAL_S3_WAIT:  if (ready)  state <= CAL_S4_DISCH;
        CAL_S4_DISCH: if (!stop_n) state <= CAL_DECIDE;
        CAL_DECIDE: begin
          if (q_zero) begin
            state <= CAL_DONE;
          end else if (prev_valid && (q_sign != prev_sign)) begin
            reversed <= 1'b1;
            state    <= CAL_DONE;
          end else begin
            prev_valid <= 1'b1;
            prev_sign  <= q_sign;
            prev_mag   <= mag;
            state      <= CAL_CLEAR;
          end
        end
        CAL_CLEAR:    state <= CAL_S1_REQ;
        CAL_DONE: begin
          calibrated <= 1'b1;
          if (!cal) state <= CAL_IDLE;
        end
        default:      state <= CAL_IDLE;
      endcase
    end
  end

  assign mag       = q_sign ? Q_W'(-q) : Q_W'(q);
  assign step_back = mag > prev_mag;

  always_comb begin
    convert     = (state == CAL_S1_REQ) || (state == CAL_S3_REQ);
    data        = (state == CAL_S3_REQ || state == CAL_S3_WAIT) ? CODE_HI : CODE_LO;
    discharge   = (state == CAL_S2_DISCH) || (state == CAL_S4_DISCH);
    cnt_en      = discharge;
    cnt_up_dn_n = (state == CAL_S2_DISCH);
    cnt_rst     = (state == CAL_RESET) || (state == CAL_CLEAR);
    m_rst       = (state == CAL_RESET) && !calibrated;
    // m = m + sign(q): up for q > 0 (sign bit 0, q nonzero). On a sign
    // reversal the same step goes back to the previous m, taken only if
    // that m gave the smaller |q|.
    m_en        = (state == CAL_DECIDE) && !q_zero &&
                  (!(prev_valid && (q_sign != prev_sign)) || step_back);
    m_up_dn_n   = !q_sign;
    end_cal     = (state == CAL_DONE);
  end

endmodule
