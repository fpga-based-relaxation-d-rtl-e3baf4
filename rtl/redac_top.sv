// Self-calibrating relaxation DAC (ReDAC), FPGA part.
//
// The converter drives an external RC network with the bits of the input
// word, LSB first, one bit per ReDAC clock period T, through a three-state
// buffer; after the MSB the buffer is driven low for a short T_del and then
// released, and the capacitor holds n/2^N * VDD provided T = RC*ln2. The
// FPGA therefore has to (a) generate T from its system clock, (b) stream the
// bits, and (c) tune T to the actual RC, which it does by converting the two
// mid-scale codes, timing how long each takes to discharge through R_disch
// down to a comparator threshold, and moving T until the two times agree.
//
// Blocks (all on clk = f_clk):
//   redac_clock_divider   T = 2m/f_clk and its copy delayed by T_del
//   redac_control         shift register, Convert/Ready, buffer control
//   redac_mux             sel = 0: synthesizer drives the converter,
//                         sel = 1: calibration control does
//   redac_synth           test patterns (constant, ramp, sine)
//   redac_cal_control     calibration FSM
//   redac_updown_counter  discharge-time counter q
// Off-chip (to be connected to the pins): the three-state buffer (buf_data,
// buf_enable_n), the open-drain discharge buffer with R_disch (discharge),
// and the comparator against V_T (comp_stop_n = 1 while V_C > V_T).
//
// Defaults are the 13-bit prototype (50 MHz system clock, R = 180 kOhm,
// C = 1 nF, so m0 = 3119 and T = 124.76 us; T_del = 2.4 us = 120 cycles;
// 514 S/s class sample rate with N + 2 periods per conversion). For the
// 11-bit prototype use N = 11, M0 = 179, M_DEL = 30.
//
// Usage: hold cal high with sel = 1 until end_cal rises (m then holds the
// calibrated division factor and stays there), then set sel = 0 and pick a
// synthesizer mode. The first calibration after reset starts from m = M0;
// repeating it later (to follow drift of R and C) continues from the
// current m.
module redac_top
  import redac_pkg::*;
#(
  parameter int unsigned N     = REDAC1_N,
  parameter int unsigned M_W   = redac_pkg::REDAC_M_W,
  parameter int unsigned M0    = REDAC1_M0,
  parameter int unsigned M_DEL = REDAC1_M_DEL,
  parameter int unsigned Q_W   = redac_pkg::REDAC_Q_W,
  parameter int unsigned HOLD  = BETA,
  parameter int unsigned PH_W  = 16
) (
  input  logic                  clk,            // f_clk
  input  logic                  rst_n,
  // calibration
  input  logic                  cal,
  output logic                  end_cal,
  input  logic                  sel,            // 0: synthesizer, 1: calibration
  // digital synthesizer settings
  input  syn_mode_e             syn_mode,
  input  logic [N-1:0]          syn_const_code,
  input  logic [N-1:0]          syn_amplitude,
  input  logic [PH_W-1:0]       syn_phase_inc,
  // to the analog front end
  output logic                  buf_data,
  output logic                  buf_enable_n,   // 1: buffer in high impedance
  output logic                  discharge,      // 1: open-drain pulls through R_disch
  input  logic                  comp_stop_n,    // comparator: 1 while V_C > V_T
  // status
  output logic                  ready,
  output logic                  clk_redac,
  output logic                  clk_redac_del,
  output logic [M_W-1:0]        m,
  output logic signed [Q_W-1:0] q,
  output cal_state_e            cal_state,
  output logic                  cal_reversed
);

  logic         tick, tick_del;
  logic         m_rst, m_en, m_up_dn_n;
  logic         cnt_rst, cnt_en, cnt_up_dn_n, q_sign, q_zero;
  logic         syn_convert, cal_convert, convert;
  logic [N-1:0] syn_data, cal_data, data;

  redac_clock_divider #(.M_W(M_W), .M0(M0), .M_DEL(M_DEL)) u_div (
    .clk, .rst_n, .m_rst, .m_en, .m_up_dn_n, .m,
    .clk_redac, .clk_redac_del, .tick, .tick_del
  );

  redac_synth #(.N(N), .HOLD(HOLD), .PH_W(PH_W)) u_synth (
    .clk, .rst_n, .tick, .ready,
    .mode(syn_mode), .const_code(syn_const_code), .amplitude(syn_amplitude),
    .phase_inc(syn_phase_inc), .convert(syn_convert), .data(syn_data)
  );

  redac_cal_control #(.N(N), .Q_W(Q_W)) u_cal (
    .clk, .rst_n, .cal, .end_cal,
    .convert(cal_convert), .data(cal_data), .ready,
    .discharge, .stop_n(comp_stop_n),
    .cnt_rst, .cnt_en, .cnt_up_dn_n, .q_sign, .q_zero, .q,
    .m_rst, .m_en, .m_up_dn_n,
    .state(cal_state), .reversed(cal_reversed)
  );

  redac_mux #(.N(N)) u_mux (
    .sel, .convert0(syn_convert), .data0(syn_data),
    .convert1(cal_convert), .data1(cal_data), .convert, .data
  );

  redac_control #(.N(N)) u_ctl (
    .clk, .rst_n, .tick, .tick_del, .convert, .data,
    .ready, .buf_data, .enable_n(buf_enable_n)
  );

  redac_updown_counter #(.Q_W(Q_W)) u_cnt (
    .clk, .rst_n, .rst(cnt_rst), .en(cnt_en), .up_dn_n(cnt_up_dn_n),
    .stop_n(comp_stop_n), .q, .sign(q_sign), .zero(q_zero)
  );

  // the discharge path must never fight the buffer
  assert property (@(posedge clk) disable iff (!rst_n) discharge |-> buf_enable_n);

endmodule
