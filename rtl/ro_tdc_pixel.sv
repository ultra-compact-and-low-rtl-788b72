// ro_tdc_pixel: one ring-oscillator TDC pixel (10-bit result).
// The SPAD pulse (start) switches on a local 4-stage ring oscillator; the next
// STOP edge freezes it.  A 7-bit counter counts ring periods (falling edges of
// the last ring node, i.e. every 8 stage delays) and the frozen ring state
// gives 3 fine bits, so code = {coarse, fine} = number of stage delays
// between the photon and STOP (LSB = one stage delay, 52 ps nominal; range
// 1024 LSB).  At frame end the code is stored into one of two memories
// (store, wsel) and the converter is cleared (clr), so the previous frame
// can be read (rsel) during acquisition.  No photon gives code 0.
// Structure (ring, coarse counter, ring-state coder, two memories) follows
// the published RO-TDC; the start/stop arming and the memory write timing
// are this design's own.
module ro_tdc_pixel #(
  parameter int unsigned COARSE_W  = 7,
  parameter int unsigned FINE_W    = 3,
  parameter int unsigned TUNE_W    = 6,
  parameter real         TD_NOM_PS = 52.0,
  parameter real         SKEW      = 1.0
) (
  input  logic                       clk,     // memory clock
  input  logic                       rst_n,
  input  logic                       start,   // SPAD pulse
  input  logic                       stop,    // global STOP
  input  logic                       clr,     // clear converter (asynchronous)
  input  logic [TUNE_W-1:0]          tune,    // global ring bias code
  input  logic                       store,   // write code into memory wsel
  input  logic                       wsel,
  input  logic                       rsel,
  output logic [COARSE_W+FINE_W-1:0] code,    // live converter output
  output logic [COARSE_W+FINE_W-1:0] rdata    // memory rsel
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned STAGES = 2 ** (FINE_W - 1);

  logic              started, stopped, run;
  logic [STAGES-1:0] ring;
  logic [COARSE_W-1:0] coarse;
  logic [FINE_W-1:0]   fine;

  start_stop_latch u_latch (
    .start(start), .stop(stop), .clr(clr),
    .started(started), .stopped(stopped), .run(run)
  );

  ring_osc #(.STAGES(STAGES), .TUNE_W(TUNE_W), .TD_NOM_PS(TD_NOM_PS), .SKEW(SKEW)) u_ring (
    .run(run), .clr(clr), .tune(tune), .ring(ring)
  );

  coarse_counter #(.W(COARSE_W)) u_coarse (
    .clk(~ring[STAGES-1]), .clr(clr), .en(1'b1), .count(coarse)
  );

  johnson_coder #(.STAGES(STAGES)) u_coder (.ring(ring), .fine(fine));

  assign code = {coarse, fine};

  pixel_dual_mem #(.W(COARSE_W + FINE_W)) u_mem (
    .clk(clk), .rst_n(rst_n), .wsel(wsel), .clr(1'b0), .we(store),
    .wdata(code), .rsel(rsel), .rdata(rdata)
  );
endmodule
