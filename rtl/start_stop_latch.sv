// start_stop_latch: arms a time measurement for one frame.
// The first rising edge of start (the SPAD pulse) sets started; the first
// rising edge of stop after that sets stopped.  run = started & ~stopped is
// the interval being measured.  Further photons, and stop edges before any
// photon, are ignored until clr, so with a periodic STOP the measurement runs
// from the photon to the next STOP edge (reverse start-stop).  Both flags are
// asynchronous flip-flops cleared by clr (active high).
module start_stop_latch (
  input  logic start,
  input  logic stop,
  input  logic clr,
  output logic started,
  output logic stopped,
  output logic run
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge start or posedge clr)
    if (clr) started <= 1'b0;
    else     started <= 1'b1;

  always_ff @(posedge stop or posedge clr)
    if (clr)          stopped <= 1'b0;
    else if (started) stopped <= 1'b1;

  assign run = started & ~stopped;
endmodule
