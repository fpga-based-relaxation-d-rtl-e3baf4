// Up/down discharge-time counter of the self-calibration module.
//
// Together with the discharge resistor and the comparator it forms a
// single-slope time-to-digital converter: while en is high and the
// comparator reports the capacitor still above V_T (stop_n = 1), q counts
// one per f_clk cycle, up in calibration step 2 and down in step 4. At the
// end of step 4, q holds the difference of the two discharge times; its sign
// bit (MSB, two's complement) tells the calibration control which way to move
// the ReDAC clock period, and zero tells it that the two voltages are equal.
//
// Interface: rst clears q synchronously; en, up_dn_n and stop_n are sampled
// every f_clk cycle; sign and zero are decoded from the q register.
//
// As in the published design: counter at f_clk, En/Rst/Up-Down inputs, Stop from the
// comparator, sign = MSB of q. This design's choices: the zero flag (the
// calibration flow tests q = 0), the width Q_W, and saturation at the signed
// limits instead of wrapping.
module redac_updown_counter #(
  parameter int unsigned Q_W = redac_pkg::REDAC_Q_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rst,      // synchronous clear
  input  logic                  en,
  input  logic                  up_dn_n,  // 1: count up, 0: count down
  input  logic                  stop_n,   // comparator: 0 once V_C <= V_T
  output logic signed [Q_W-1:0] q,
  output logic                  sign,     // MSB of q
  output logic                  zero
);

  localparam logic signed [Q_W-1:0] Q_MAX = {1'b0, {(Q_W-1){1'b1}}};
  localparam logic signed [Q_W-1:0] Q_MIN = {1'b1, {(Q_W-1){1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              q <= '0;
    else if (rst)                            q <= '0;
    else if (en && stop_n) begin
      if (up_dn_n && q != Q_MAX)             q <= q + 1'b1;
      else if (!up_dn_n && q != Q_MIN)       q <= q - 1'b1;
    end
  end

  assign sign = q[Q_W-1];
  assign zero = (q == '0);

endmodule
