// tadc_comparator: BEHAVIOURAL MODEL (not synthesizable) of the in-pixel
// voltage comparator of the TADC.
// vcomp is 1 while the signal ramp voltage (+ input, Vo1 or Vo2) exceeds the
// reference ramp (- input, VoREF) by more than the input offset.  As the
// reference ramp climbs past the stored voltage the output toggles to 0,
// which freezes the Gray code held in the pixel memory.
module tadc_comparator #(
  parameter real OFFSET_V = 0.0
) (
  input  real  vp,
  input  real  vn,
  output logic vcomp
);
  timeunit 1ps; timeprecision 1fs;

  always_comb vcomp = (vp > vn + OFFSET_V);
endmodule
