// freq_doubler: BEHAVIOURAL MODEL (not synthesizable) of the pixel-level
// clock doubler of the TDC-EC.
// The global clock is XORed with a copy of itself delayed by a quarter
// period, which yields a clock at twice the frequency with a 50 % duty cycle
// (for a 50 % input).  The quarter-period delay is a parameter; it defaults
// to a quarter of the 280 MHz period.
module freq_doubler #(
  parameter real DLY_PS = 1.0e6 / 280.0 / 4.0
) (
  input  logic ck,
  output logic ck2x
);
  timeunit 1ps; timeprecision 1fs;

  logic ck_d;

  initial ck_d = 1'b0;
  always @(ck) ck_d <= #(DLY_PS) ck;

  assign ck2x = ck ^ ck_d;
endmodule
