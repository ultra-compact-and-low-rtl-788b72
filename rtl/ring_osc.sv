// ring_osc: BEHAVIOURAL MODEL (not synthesizable) of the in-pixel ring
// oscillator of the RO-TDC.
// Four differential delay stages in a loop; the last stage feeds back with
// swapped polarity, so the node levels step through eight states per period
// (one stage delay each), like a 4-bit Johnson counter.  While run is high
// the state advances every stage delay; when run falls the state freezes
// (the stop switches inside the loop).  clr returns every node to 0.
// The stage delay is TD_NOM_PS * SKEW * (1 - GAIN * (tune - mid)): a larger
// tune code stands for more tail current in the NMOS-regulated buffers, hence
// a faster ring.  SKEW models a process/supply offset that the calibration
// loop must remove.  The hysteresis output stage that guards against
// metastability is not modelled: the frozen state is always a clean one.
module ring_osc #(
  parameter int unsigned STAGES    = 4,
  parameter int unsigned TUNE_W    = 6,
  parameter real         TD_NOM_PS = 52.0,   // stage delay at mid tune code
  parameter real         GAIN      = 0.01,   // relative delay change per code
  parameter real         SKEW      = 1.0     // process offset of this ring
) (
  input  logic              run,
  input  logic              clr,
  input  logic [TUNE_W-1:0] tune,
  output logic [STAGES-1:0] ring   // node levels, node 0 first
);
  timeunit 1ps; timeprecision 1fs;

  localparam int MID = 2 ** (TUNE_W - 1);

  function automatic real stage_delay(input logic [TUNE_W-1:0] t);
    return TD_NOM_PS * SKEW * (1.0 - GAIN * real'(int'(t) - MID));
  endfunction

  initial ring = '0;

  always begin
    wait (run || clr);
    if (clr) begin
      ring = '0;
      wait (!clr);
    end else begin
      #(stage_delay(tune));
      if (clr)      ring = '0;
      else if (run) ring = {ring[STAGES-2:0], ~ring[STAGES-1]};
    end
  end
endmodule
