// ro_tdc_array: ROWS x COLS array of ring-oscillator TDC pixels (32 x 32).
// Every pixel has its own SPAD input and ring; STOP, the frame sequencing and
// the ring bias code are global.  The bias code comes from a calibration loop
// (ro_calib) that runs a replica ring against the reference clock clk_ref and
// locks its stage delay to TD_TARGET_PS, standing in for the mean array
// resolution.  Frame sequencing (tdc_frame_ctrl): frame_end stores all codes
// into one memory bank, clears the converters and swaps banks.  Readout: the
// pixels of row row_addr drive the column buses col_data from the bank that
// holds the last stored frame.  The readout scheme and the replica ring are
// this design's own; the document gives only the loop's purpose.
module ro_tdc_array #(
  parameter int unsigned ROWS          = 32,
  parameter int unsigned COLS          = 32,
  parameter int unsigned CODE_W        = 10,
  parameter int unsigned TUNE_W        = 6,
  parameter real         TD_TARGET_PS  = 52.0,   // locked stage delay (LSB)
  parameter real         TD_NOM_PS     = 52.0,   // stage delay at mid code, before skew
  parameter real         SKEW          = 1.0,    // process offset of all rings
  parameter real         REF_PERIOD_PS = 25000.0, // clk_ref period (40 MHz)
  parameter int unsigned CAL_WINDOW    = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clk_ref,
  input  logic [ROWS-1:0][COLS-1:0]     spad,
  input  logic                          stop,
  input  logic                          frame_end,
  input  logic [$clog2(ROWS)-1:0]       row_addr,
  output logic [COLS-1:0][CODE_W-1:0]   col_data,
  output logic [TUNE_W-1:0]             tune,
  output logic                          cal_locked,
  output logic                          rbank
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned TARGET =
      int'(real'(CAL_WINDOW) * REF_PERIOD_PS / (8.0 * TD_TARGET_PS));

  logic store, pix_clr, wbank;
  logic rep_run, rep_clr;
  logic [3:0] rep_ring;
  logic [CODE_W-1:0] rdata [ROWS][COLS];

  tdc_frame_ctrl u_frame (
    .clk(clk), .rst_n(rst_n), .frame_end(frame_end),
    .store(store), .pix_clr(pix_clr), .wbank(wbank), .rbank(rbank)
  );

  ring_osc #(.STAGES(4), .TUNE_W(TUNE_W), .TD_NOM_PS(TD_NOM_PS), .SKEW(SKEW)) u_replica (
    .run(rep_run), .clr(rep_clr), .tune(tune), .ring(rep_ring)
  );

  ro_calib #(.TUNE_W(TUNE_W), .WINDOW(CAL_WINDOW), .TARGET(TARGET),
             .TOL((TARGET + 99) / 100)) u_calib (
    .clk_ref(clk_ref), .rst_n(rst_n), .ring_last(rep_ring[3]),
    .replica_run(rep_run), .replica_clr(rep_clr), .tune(tune), .locked(cal_locked)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [CODE_W-1:0] code;
      ro_tdc_pixel #(.COARSE_W(CODE_W - 3), .FINE_W(3), .TUNE_W(TUNE_W),
                     .TD_NOM_PS(TD_NOM_PS), .SKEW(SKEW)) u_px (
        .clk(clk), .rst_n(rst_n), .start(spad[r][c]), .stop(stop), .clr(pix_clr),
        .tune(tune), .store(store), .wsel(wbank), .rsel(rbank),
        .code(code), .rdata(rdata[r][c])
      );
    end
  end

  always_comb
    for (int c = 0; c < COLS; c++) col_data[c] = rdata[row_addr][c];
endmodule
