// coarse_counter: coarse interpolator of the TDCs.
// Counts active edges of its clock while enabled; cleared asynchronously
// before each frame.  The silicon uses a ripple counter (each bit toggled by
// the previous one); this is the synchronous equivalent, which holds the same
// value once the ripple has settled.  Counts wrap modulo 2**W, as a ripple
// counter does.  W is 6 in the external-clock TDC and 7 in the ring TDC.
module coarse_counter #(
  parameter int unsigned W = 6
) (
  input  logic         clk,    // counted clock (doubled global clock or ring node)
  input  logic         clr,    // asynchronous clear, active high
  input  logic         en,     // count this edge
  output logic [W-1:0] count
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk or posedge clr)
    if (clr)     count <= '0;
    else if (en) count <= count + 1'b1;
endmodule
