// Shared types and prototype constants of the relaxation DAC (ReDAC).
//
// A ReDAC converts an N-bit word by driving a first-order RC network with
// the word's bits, LSB first, for one ReDAC clock period T each; with
// T = RC*ln2 the capacitor ends at n/2^N * VDD. Everything here runs from one
// system clock f_clk; the ReDAC clock is a divided copy of it (see
// redac_clock_divider).
//
// The constants below are the two prototypes built on a 50 MHz FPGA board:
// ReDAC1 (13 bit, R = 180 kOhm, C = 1 nF, T_del = 2.4 us) and ReDAC2 (11 bit,
// R = 4.7 kOhm, C = 2.2 nF, T_del = 0.6 us). The initial division factor is
// m0 = floor(f_clk * RC * ln2 / 2). The width of m (12 bit) follows the stated
// 12-bit tuning resolution of the ReDAC clock; the discharge-counter width is
// this design's own choice, sized for the longest discharge of either board.
package redac_pkg;

  // ReDAC1 (the default configuration)
  localparam int unsigned REDAC1_N     = 13;
  localparam int unsigned REDAC1_M0    = 3119;  // floor(50e6 * 180e3 * 1e-9 * ln2 / 2)
  localparam int unsigned REDAC1_M_DEL = 120;   // 2.4 us at 50 MHz

  // ReDAC2
  localparam int unsigned REDAC2_N     = 11;
  localparam int unsigned REDAC2_M0    = 179;   // floor(50e6 * 4.7e3 * 2.2e-9 * ln2 / 2)
  localparam int unsigned REDAC2_M_DEL = 30;    // 0.6 us at 50 MHz

  localparam int unsigned REDAC_M_W = 12;  // width of the division factor m
  localparam int unsigned REDAC_Q_W = 18;  // signed discharge-time counter width
  localparam int unsigned BETA      = 2;   // hold phase, in ReDAC clock periods

  // Test patterns of the digital synthesizer
  typedef enum logic [1:0] {
    SYN_CONST = 2'd0,   // repeat one code (static measurement of a single code)
    SYN_RAMP  = 2'd1,   // all codes in turn, for INL/DNL
    SYN_SINE  = 2'd2,   // sine wave, for spectral measurements
    SYN_OFF   = 2'd3    // no conversion requests
  } syn_mode_e;

  // Calibration control states (steps #1..#4 of the calibration flow)
  typedef enum logic [3:0] {
    CAL_IDLE,
    CAL_RESET,     // reset m to m0 and clear q
    CAL_S1_REQ,    // step 1: request conversion of 2^(N-1)-1
    CAL_S1_WAIT,   //         wait for the conversion and T_del to end
    CAL_S2_DISCH,  // step 2: discharge C, count q up
    CAL_S3_REQ,    // step 3: request conversion of 2^(N-1)
    CAL_S3_WAIT,
    CAL_S4_DISCH,  // step 4: discharge C, count q down
    CAL_DECIDE,    // q == 0 ? end : m = m + sign(q)
    CAL_CLEAR,     // clear q before the next iteration
    CAL_DONE
  } cal_state_e;

endpackage
