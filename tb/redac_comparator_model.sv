// Behavioural model (not synthesizable) of the calibration comparator: its
// output stop_n is 1 while the capacitor voltage is above the threshold V_T
// (set by a resistive divider, VDD/4 on the prototypes) and 0 at or below it.
module redac_comparator_model #(
  parameter real VT = 3.3 / 4.0
) (
  input  real  v,
  output logic stop_n
);
  always_comb stop_n = (v > VT);
endmodule
