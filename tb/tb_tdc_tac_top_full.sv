// tb_tdc_tac_top_full: the end-to-end test of tdc_tac_top at full size:
// three 32 x 32 arrays with every parameter of the top at its default.
// See tdc_tac_top_stim for the frames run, the checks and the mechanisms.
module tb_tdc_tac_top_full;
  timeunit 1ps; timeprecision 1fs;
  tdc_tac_top_stim stim ();
endmodule
