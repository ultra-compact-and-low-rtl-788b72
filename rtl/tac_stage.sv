// tac_stage: BEHAVIOURAL MODEL (not synthesizable) of one TAC ramp stage
// (Stage1, Stage2 or StageREF of the TADC pixel).
// A current source charges the capacitor Cs while the switch is on
// (charge = 1), so the output voltage rises by SLOPE_V_PER_PS for every
// picosecond of charging; res (RES) discharges Cs to VRES.  The output is
// updated when a charging interval ends, which is when the pixel compares
// it; it saturates at VMAX, the top of the ramp.  One model serves the
// signal stages (charged from photon to STOP, or by event pulses in AEC mode)
// and the reference stage (charged by the global CNT pulses).
module tac_stage #(
  parameter real SLOPE_V_PER_PS = 1.0 / 10240.0, // 1 V over 64 LSB of 160 ps
  parameter real VRES           = 0.0,
  parameter real VMAX           = 1.2
) (
  input  logic charge,
  input  logic res,
  output real  vo
);
  timeunit 1ps; timeprecision 1fs;

  realtime t0;

  initial begin
    vo = VRES;
    t0 = 0;
  end

  always @(posedge charge or negedge charge or posedge res) begin
    if (res) begin
      vo = VRES;
      t0 = $realtime;
    end else if (charge) begin
      t0 = $realtime;
    end else begin
      vo = vo + SLOPE_V_PER_PS * ($realtime - t0);
      if (vo > VMAX) vo = VMAX;
    end
  end
endmodule
