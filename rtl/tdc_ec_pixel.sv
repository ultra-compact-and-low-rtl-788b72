// tdc_ec_pixel: one external-clock TDC pixel (10-bit result).
// The global clock ck is doubled in the pixel (ck2x).  The SPAD pulse (start)
// launches an edge down a 16-tap delay line; the first ck2x rising edge after
// start (fine_stop) freezes the line, whose thermometer code gives the 4-bit
// fine value: buffer delays from the photon to that edge.  A 6-bit counter
// then counts the following ck2x edges until the next STOP edge.  With the tap
// delay equal to 1/16 of the ck2x period,
//   code = {coarse, fine} = (photon -> last ck2x edge before STOP) / tap delay,
// so STOP should arrive just after a ck2x edge (laser synchronous to ck).
// At frame end the code is stored into one of two memories and the converter
// is cleared.  No photon gives code 0.  The doubler, delay line, coder,
// counter and two memories follow the published TDC-EC; the arming latch and
// the fine_stop flip-flop are this design's own realisation of "stopped on the
// first clock edge after START".
module tdc_ec_pixel #(
  parameter int unsigned TAPS     = 16,
  parameter int unsigned COARSE_W = 6,
  parameter int unsigned FINE_W   = 4,
  parameter real         CK_PERIOD_PS = 1.0e6 / 280.0
) (
  input  logic                       clk,     // memory clock
  input  logic                       rst_n,
  input  logic                       ck,      // global TDC clock (280 MHz)
  input  logic                       start,   // SPAD pulse
  input  logic                       stop,    // global STOP
  input  logic                       clr,     // clear converter (asynchronous)
  input  logic                       store,
  input  logic                       wsel,
  input  logic                       rsel,
  output logic [COARSE_W+FINE_W-1:0] code,
  output logic [COARSE_W+FINE_W-1:0] rdata
);
  timeunit 1ps; timeprecision 1fs;

  logic ck2x, started, stopped, run, fine_stop;
  logic [TAPS-1:0]     taps;
  logic [FINE_W-1:0]   fine;
  logic [COARSE_W-1:0] coarse;

  freq_doubler #(.DLY_PS(CK_PERIOD_PS / 4.0)) u_dbl (.ck(ck), .ck2x(ck2x));

  start_stop_latch u_latch (
    .start(start), .stop(stop), .clr(clr),
    .started(started), .stopped(stopped), .run(run)
  );

  // first doubled-clock edge after the photon
  always_ff @(posedge ck2x or posedge clr)
    if (clr) fine_stop <= 1'b0;
    else     fine_stop <= started;

  delay_line #(.TAPS(TAPS), .TD_PS(CK_PERIOD_PS / 2.0 / real'(TAPS))) u_dl (
    .start(started), .freeze(fine_stop), .clr(clr), .taps(taps)
  );

  thermo_coder #(.TAPS(TAPS), .OW(FINE_W)) u_coder (.therm(taps), .bin(fine));

  coarse_counter #(.W(COARSE_W)) u_coarse (
    .clk(ck2x), .clr(clr), .en(fine_stop & run), .count(coarse)
  );

  assign code = {coarse, fine};

  pixel_dual_mem #(.W(COARSE_W + FINE_W)) u_mem (
    .clk(clk), .rst_n(rst_n), .wsel(wsel), .clr(1'b0), .we(store),
    .wdata(code), .rsel(rsel), .rdata(rdata)
  );
endmodule
