// gray_counter: global Gray-code counter of the TADC array.
// A binary count advanced by inc is presented on the GCC bus in Gray code, so
// only one bus line changes per step; a pixel that samples the bus while it
// changes can be off by at most one code.  clr restarts the count at zero
// synchronously.  Outputs are registered.
module gray_counter #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] bin,   // binary value of the count
  output logic [W-1:0] gcc    // Gray-coded count
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      bin <= '0;
    else if (clr)    bin <= '0;
    else if (inc)    bin <= bin + 1'b1;

  assign gcc = bin ^ (bin >> 1);
endmodule
