// Behavioural model (not synthesizable) of the ReDAC analog output stage:
// the three-state buffer, the RC network and the open-drain discharge path
// through R_disch, all acting on the capacitor node V_C.
//
// The model advances once per system clock cycle (at the falling edge, using
// the levels the FPGA held during the cycle), solving the network exactly
// for a piecewise-constant drive:
//   buffer enabled  : V_C relaxes toward VDD*buf_data with time constant
//                     tau0 = r_ohm*C; optionally a second, fast parasitic
//                     mode (time constant TAU1_S, residues
//                     a0 = tau0/(tau0-tau1), a1 = tau1/(tau1-tau0)) stands for
//                     the distributed capacitance of the resistor;
//   high impedance  : V_C holds (no leakage);
//   discharge = 1   : V_C decays with tau = R_DISCH*C.
// r_ohm is an input so that a testbench can move the RC time constant (a
// component tolerance or drift) while running.
module redac_rc_model #(
  parameter real C_F     = 1.0e-9,
  parameter real R_DISCH = 820.0e3,
  parameter real VDD     = 3.3,
  parameter real TCLK_S  = 20.0e-9,
  parameter real TAU1_S  = 0.0
) (
  input  logic clk,
  input  logic buf_data,
  input  logic enable_n,
  input  logic discharge,
  input  real  r_ohm,
  output real  vc
);
  real y0 = 0.0, y1 = 0.0;

  always @(negedge clk) begin
    real tau0, a0, a1, v;
    tau0 = r_ohm * C_F;
    a0 = 1.0; a1 = 0.0;
    if (TAU1_S > 0.0) begin
      a0 = tau0 / (tau0 - TAU1_S);
      a1 = TAU1_S / (TAU1_S - tau0);
    end
    if (!enable_n) begin
      v  = buf_data ? VDD : 0.0;
      y0 = a0 * v + (y0 - a0 * v) * $exp(-TCLK_S / tau0);
      if (TAU1_S > 0.0)
        y1 = a1 * v + (y1 - a1 * v) * $exp(-TCLK_S / TAU1_S);
    end else if (discharge) begin
      y0 = y0 * $exp(-TCLK_S / (R_DISCH * C_F));
      y1 = y1 * $exp(-TCLK_S / (R_DISCH * C_F));
    end
    vc = y0 + y1;
  end

  initial vc = 0.0;
endmodule
