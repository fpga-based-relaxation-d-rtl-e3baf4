// Digital test-pattern synthesizer for the ReDAC.
//
// Feeds the ReDAC control block with input words and Convert requests at the
// converter's sample rate, one conversion every N + BETA ReDAC clock periods
// (N bit periods plus a hold phase of BETA periods, the last part of the
// N + 2 pulses a conversion takes). Patterns (mode):
//   SYN_CONST  the word const_code, again and again
//   SYN_RAMP   0, 1, 2, ... 2^N-1, 0, ... (every code once, for INL/DNL)
//   SYN_SINE   2^(N-1) + amplitude * sin(2*pi*phase / 2^PH_W), the phase
//              advancing by phase_inc per sample (tone = f_s*phase_inc/2^PH_W)
//   SYN_OFF    no requests
// The sine is computed from the phase: the top two phase bits select the
// quadrant, the rest is mirrored into [0, pi/2] and evaluated as a 9th-order
// Taylor polynomial in Q30 fixed point (error below 4e-6 of full scale), so
// no table is stored. Results are clamped to 0 .. 2^N-1.
//
// Interface/timing: tick is the ReDAC clock enable. At the last tick of each
// sample period, if the control block is ready, convert is raised together
// with the new word; it is dropped once ready falls (the conversion has
// started on the following tick). The sine arithmetic is combinational from
// the phase register and has a whole sample period to settle.
//
// The published design only says that a programmable synthesizer generates the static
// and dynamic test patterns; the patterns, the phase-accumulator sine and the
// request timing are this design's own.
module redac_synth
  import redac_pkg::*;
#(
  parameter int unsigned N    = REDAC1_N,
  parameter int unsigned HOLD = BETA,
  parameter int unsigned PH_W = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,
  input  logic            ready,
  input  syn_mode_e       mode,
  input  logic [N-1:0]    const_code,
  input  logic [N-1:0]    amplitude,   // sine peak amplitude, in LSB
  input  logic [PH_W-1:0] phase_inc,
  output logic            convert,
  output logic [N-1:0]    data
);

  localparam int unsigned P   = N + HOLD;          // ticks per sample
  localparam int unsigned P_W = $clog2(P);
  localparam int unsigned F   = PH_W - 2;          // bits within a quadrant

  localparam logic signed [63:0] ONE    = 64'sd1 << 30;
  localparam logic signed [63:0] HALFPI = 64'sd1686629713;     // pi/2 * 2^30
  localparam logic signed [63:0] R6     = 64'sd178956971;      // 2^30 / 6
  localparam logic signed [63:0] R20    = 64'sd53687091;       // 2^30 / 20
  localparam logic signed [63:0] R42    = 64'sd25565282;       // 2^30 / 42
  localparam logic signed [63:0] R72    = 64'sd14913081;       // 2^30 / 72

  logic [P_W-1:0]  tcnt;
  logic [PH_W-1:0] phase;
  logic [N-1:0]    ramp;
  logic [N-1:0]    sine_code;

  // ---- sine of the current phase -------------------------------------
  logic [F:0]   u;                 // position within the quadrant, 0 .. 2^F
  logic signed [63:0] u64, amp64, x, x2, t4, t3, t2, t1, s, v, code;

  assign u  = phase[F] ? (F+1)'(1 << F) - (F+1)'(phase[F-1:0])   // quadrants 1, 3
                       : (F+1)'(phase[F-1:0]);
  assign u64   = 64'(u);
  assign amp64 = 64'(amplitude);
  assign x  = (u64 * HALFPI) >>> F;                       // angle, Q30
  assign x2 = (x * x) >>> 30;
  assign t4 = ONE - ((x2 * R72) >>> 30);
  assign t3 = ONE - ((((x2 * t4) >>> 30) * R42) >>> 30);
  assign t2 = ONE - ((((x2 * t3) >>> 30) * R20) >>> 30);
  assign t1 = ONE - ((((x2 * t2) >>> 30) * R6) >>> 30);
  assign s  = (x * t1) >>> 30;                                    // sin, Q30
  assign v  = (amp64 * s + (ONE >>> 1)) >>> 30;
  assign code = phase[PH_W-1] ? (64'sd1 << (N-1)) - v
                              : (64'sd1 << (N-1)) + v;

  always_comb begin
    if (code < 0)                              sine_code = '0;
    else if (code > ((64'sd1 << N) - 1))  sine_code = '1;
    else                                       sine_code = N'(code);
  end

  // ---- sample timing and requests ------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt    <= '0;
      phase   <= '0;
      ramp    <= '0;
      convert <= 1'b0;
      data    <= '0;
    end else begin
      if (convert && !ready) convert <= 1'b0;
      if (tick) begin
        tcnt <= (tcnt == P_W'(P - 1)) ? '0 : tcnt + 1'b1;
        if (tcnt == P_W'(P - 1) && ready && mode != SYN_OFF) begin
          convert <= 1'b1;
          unique case (mode)
            SYN_CONST: data <= const_code;
            SYN_RAMP: begin
              data <= ramp;
              ramp <= ramp + 1'b1;
            end
            SYN_SINE: begin
              data  <= sine_code;
              phase <= phase + phase_inc;
            end
            default: ;
          endcase
        end
      end
    end
  end

endmodule
