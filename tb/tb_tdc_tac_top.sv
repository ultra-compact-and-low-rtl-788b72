// tb_tdc_tac_top: end-to-end test of tdc_tac_top with 8 x 8 arrays (all
// other parameters at their defaults).  See tdc_tac_top_stim for the
// frames run, the checks made and the mechanisms counted.
module tb_tdc_tac_top;
  timeunit 1ps; timeprecision 1fs;
  tdc_tac_top_stim #(.ROWS(8), .COLS(8)) stim ();
endmodule
