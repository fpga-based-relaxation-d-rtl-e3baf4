// ReDAC clock divider.
//
// Generates the ReDAC clock f_clk,ReDAC = f_clk / (2m) and a delayed copy of
// it, shifted by M_DEL system clocks (T_del = M_DEL / f_clk), from one
// free-running counter. The counter runs 0 .. m-1; when it reaches the
// terminal count the ReDAC clock flip-flop toggles (so T = 2m / f_clk), and
// when it passes M_DEL-1 the delayed-clock flip-flop toggles. The delayed
// clock ends the driven-low phase after each conversion (parasitic error
// suppression).
//
// The division factor m is a register loaded with M0 by m_rst and moved by
// one step (m_en, up when m_up_dn_n = 1) by the calibration control.
//
// Timing: everything is clocked by clk (f_clk). Besides the two divided
// clocks the block outputs single-cycle strobes, tick and tick_del, that are
// high in the f_clk cycle just before the respective divided clock rises.
// The rest of the design uses them as clock enables, so the whole design is
// one clock domain and the registers enabled by tick change on the same
// f_clk edge on which clk_redac rises.
//
// As in the published design: divide-by-2m by a free-running counter,
// two comparators, two toggle flip-flops, m initialised to m0 and tuned in
// steps of one. This design's choices: the terminal-count test is ">=" rather
// than "==" so that a decrement of m while the counter already holds m-1
// cannot make it run past; m is kept between M_DEL+1 and its maximum; the
// delayed clock resets high so that it lags the ReDAC clock from the start.
module redac_clock_divider #(
  parameter int unsigned M_W   = redac_pkg::REDAC_M_W,
  parameter int unsigned M0    = redac_pkg::REDAC1_M0,
  parameter int unsigned M_DEL = redac_pkg::REDAC1_M_DEL
) (
  input  logic           clk,
  input  logic           rst_n,        // asynchronous reset, active low
  input  logic           m_rst,        // load m with M0
  input  logic           m_en,         // step m by one
  input  logic           m_up_dn_n,    // 1: m+1, 0: m-1
  output logic [M_W-1:0] m,
  output logic           clk_redac,    // f_clk / (2m)
  output logic           clk_redac_del,// clk_redac delayed by M_DEL f_clk cycles
  output logic           tick,         // clk_redac rises at the next clk edge
  output logic           tick_del      // clk_redac_del rises at the next clk edge
);

  localparam logic [M_W-1:0] M_MIN = M_W'(M_DEL + 1);
  localparam logic [M_W-1:0] M_MAX = '1;

  logic [M_W-1:0] cnt;
  logic           terminal, del_hit;

  assign terminal = (cnt >= m - 1'b1);
  assign del_hit  = (cnt == M_W'(M_DEL - 1));
  assign tick     = terminal & ~clk_redac;
  assign tick_del = del_hit  & ~clk_redac_del;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt           <= '0;
      clk_redac     <= 1'b0;
      clk_redac_del <= 1'b1;
    end else begin
      cnt           <= terminal ? '0 : cnt + 1'b1;
      clk_redac     <= clk_redac ^ terminal;
      clk_redac_del <= clk_redac_del ^ del_hit;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          m <= M_W'(M0);
    else if (m_rst)                      m <= M_W'(M0);
    else if (m_en && m_up_dn_n && m != M_MAX)  m <= m + 1'b1;
    else if (m_en && !m_up_dn_n && m > M_MIN)  m <= m - 1'b1;
  end

  initial begin
    assert (M_DEL >= 1 && M_DEL < M0)
      else $error("M_DEL must lie between 1 and M0-1");
    assert (M0 < (1 << M_W))
      else $error("M0 does not fit in M_W bits");
  end

endmodule
