// Input multiplexer of the ReDAC control block.
//
// Chooses who drives the Convert request and the DATA word: the digital
// test-pattern synthesizer in normal operation (sel = 0) or the calibration
// control during self-calibration (sel = 1). Purely combinational; Ready from
// the control block goes back to both requesters unchanged.
module redac_mux #(
  parameter int unsigned N = redac_pkg::REDAC1_N
) (
  input  logic         sel,
  input  logic         convert0,
  input  logic [N-1:0] data0,
  input  logic         convert1,
  input  logic [N-1:0] data1,
  output logic         convert,
  output logic [N-1:0] data
);

  always_comb begin
    if (sel) begin
      convert = convert1;
      data    = data1;
    end else begin
      convert = convert0;
      data    = data0;
    end
  end

endmodule
