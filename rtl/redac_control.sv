// ReDAC control block.
//
// Turns an N-bit word into the bit stream that drives the RC network. On the
// first ReDAC clock edge (tick) at which Convert is high and the block is
// idle, it loads DATA into a shift register, drops Ready and enables the
// three-state buffer (enable_n = 0) with bit b0 on buf_data. Each further
// ReDAC clock edge shifts the register right, so bit b_i is driven during
// ReDAC period i. On the edge that ends the MSB period the buffer is driven
// low instead of being released; only at the next rising edge of the delayed
// ReDAC clock (tick_del, T_del later) is it put in high impedance
// (enable_n = 1) and Ready raised again. Holding the buffer low for T_del lets
// the fast parasitic modes of the RC network decay while barely attenuating
// the converted voltage, which then holds on the capacitor.
//
// Interface: convert/data are sampled at tick while ready = 1; the requester
// keeps data stable until ready falls. A conversion occupies N ReDAC periods
// plus T_del; a new one can start at the next tick after ready rises. The
// hold time between conversions is set by the requester.
//
// As in the published design: LSB-first shift register, drive-low then three-state
// after T_del, Convert/Ready handshake. This design's choices: one f_clk
// domain with tick/tick_del clock enables instead of the divided clocks
// themselves; Ready and Enable are both decoded from the idle state.
module redac_control #(
  parameter int unsigned N = redac_pkg::REDAC1_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,       // ReDAC clock rising edge (enable)
  input  logic         tick_del,   // delayed ReDAC clock rising edge (enable)
  input  logic         convert,
  input  logic [N-1:0] data,
  output logic         ready,
  output logic         buf_data,   // value driven by the three-state buffer
  output logic         enable_n    // 1: buffer in high impedance
);

  typedef enum logic [1:0] {IDLE, SHIFT, LOW} state_e;

  state_e                 state;
  logic [N-1:0]           sr;
  logic [$clog2(N)-1:0]   bitcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      sr     <= '0;
      bitcnt <= '0;
    end else begin
      unique case (state)
        IDLE: if (tick && convert) begin
          sr     <= data;
          bitcnt <= '0;
          state  <= SHIFT;
        end
        SHIFT: if (tick) begin
          if (bitcnt == ($clog2(N))'(N - 1)) begin
            state <= LOW;
          end else begin
            sr     <= sr >> 1;
            bitcnt <= bitcnt + 1'b1;
          end
        end
        LOW: if (tick_del) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign ready    = (state == IDLE);
  assign enable_n = (state == IDLE);
  assign buf_data = (state == SHIFT) & sr[0];

  // tick and tick_del never coincide (M_DEL >= 1)
  assert property (@(posedge clk) disable iff (!rst_n) !(tick && tick_del));

endmodule
