// thermo_coder: fine-time coder of the external-clock TDC.
// The frozen delay line holds a thermometer code: taps 0..k-1 have toggled,
// the rest have not.  The coder returns k, the number of buffer delays that
// elapsed between START and the next clock edge, saturated to the 4-bit
// output (with the tap delay matched to 1/16 of the doubled clock period at
// most 15 taps can toggle).  Counting ones rather than looking for the 1->0
// boundary also tolerates a bubble in the code.  Combinational.
module thermo_coder #(
  parameter int unsigned TAPS = 16,
  parameter int unsigned OW   = $clog2(TAPS)
) (
  input  logic [TAPS-1:0] therm,
  output logic [OW-1:0]   bin
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    int unsigned n;
    n = 0;
    for (int i = 0; i < TAPS; i++) n += therm[i];
    bin = (n > (2**OW - 1)) ? OW'(2**OW - 1) : OW'(n);
  end
endmodule
