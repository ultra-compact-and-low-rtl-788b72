// tac_aec_selector: steers the SPAD EVENT pulse to the TADC stage that is
// acquiring in the current frame (Stage1 or Stage2; the other one is being
// converted meanwhile).
//   TAC mode (mode_aec = 0): the first EVENT of the frame starts the ramp and
//     the next STOP edge ends it, so the stage charges for the photon arrival
//     time measured back from STOP.
//   AEC mode (mode_aec = 1): the stage charges for the duration of every
//     EVENT pulse, so its voltage grows with the number of events (photon
//     counting, time-uncorrelated imaging); STOP is not used.
// clr (from the stage reset of the new frame) re-arms the start/stop flags.
// Outputs are combinational from the flags, the event and the selects.
module tac_aec_selector (
  input  logic event_i,   // SPAD EVENT pulse
  input  logic stop,      // STOP, from the laser reference
  input  logic clr,       // re-arm at the start of a frame
  input  logic mode_aec,  // 0: TAC (timing), 1: AEC (event counting)
  input  logic acq_sel,   // stage acquiring: 0 = Stage1, 1 = Stage2
  output logic charge1,   // switch of Stage1 on
  output logic charge2    // switch of Stage2 on
);
  timeunit 1ps; timeprecision 1fs;

  logic started, stopped, run, active;

  start_stop_latch u_latch (
    .start(event_i), .stop(stop), .clr(clr),
    .started(started), .stopped(stopped), .run(run)
  );

  assign active  = mode_aec ? event_i : run;
  assign charge1 = active & ~acq_sel;
  assign charge2 = active &  acq_sel;
endmodule
