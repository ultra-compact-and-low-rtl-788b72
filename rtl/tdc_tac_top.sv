// tdc_tac_top: the three pixel-level time converters side by side, each as a
// 32 x 32 array with its own ports, as they were built for comparison:
//   ro_*   : ring-oscillator TDC, 10 bit, ~52 ps LSB, with bias calibration
//            loop locked to clk_ref;
//   ec_*   : external-clock TDC, 10 bit, 1/32 of the 280 MHz period LSB;
//   tadc_* : time-to-amplitude converter with in-pixel single-slope ADC,
//            6 bit Gray code, 160 ps LSB, TAC or AEC (event counting) mode.
// The SPAD front-ends, the PLL making ck_ec and the chip-level readout and
// pads are outside: their signals are ports.  clk clocks frame sequencing,
// memories, readout and the TADC conversion (one CNT pulse per two cycles);
// CLK_PERIOD_PS must match its period, because the width of a CNT pulse sets
// the TADC reference step (one 160 ps LSB per pulse).
module tdc_tac_top
  import tdc_pkg::*;
#(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 32,
  parameter real         CLK_PERIOD_PS = 5000.0   // period of clk (200 MHz)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // RO-TDC
  input  logic                              ro_clk_ref,
  input  logic [ROWS-1:0][COLS-1:0]         ro_spad,
  input  logic                              ro_stop,
  input  logic                              ro_frame_end,
  input  logic [$clog2(ROWS)-1:0]           ro_row,
  output logic [COLS-1:0][RO_CODE_W-1:0]    ro_col_data,
  output logic [5:0]                        ro_tune,
  output logic                              ro_cal_locked,
  output logic                              ro_rbank,
  // TDC-EC
  input  logic                              ec_ck,
  input  logic [ROWS-1:0][COLS-1:0]         ec_spad,
  input  logic                              ec_stop,
  input  logic                              ec_frame_end,
  input  logic [$clog2(ROWS)-1:0]           ec_row,
  output logic [COLS-1:0][EC_CODE_W-1:0]    ec_col_data,
  output logic                              ec_rbank,
  // TADC
  input  logic [ROWS-1:0][COLS-1:0]         tadc_spad,
  input  logic                              tadc_stop,
  input  logic                              tadc_mode_aec,
  input  logic                              tadc_frame_start,
  input  logic [$clog2(ROWS)-1:0]           tadc_row,
  output logic [COLS-1:0][GCC_W-1:0]        tadc_col_data,
  output logic                              tadc_conv_busy,
  output logic                              tadc_rd_sel
);
  timeunit 1ps; timeprecision 1fs;

  ro_tdc_array #(.ROWS(ROWS), .COLS(COLS), .CODE_W(RO_CODE_W)) u_ro (
    .clk(clk), .rst_n(rst_n), .clk_ref(ro_clk_ref), .spad(ro_spad), .stop(ro_stop),
    .frame_end(ro_frame_end), .row_addr(ro_row), .col_data(ro_col_data),
    .tune(ro_tune), .cal_locked(ro_cal_locked), .rbank(ro_rbank)
  );

  tdc_ec_array #(.ROWS(ROWS), .COLS(COLS), .CODE_W(EC_CODE_W), .CK_PERIOD_PS(EC_CK_PERIOD_PS)) u_ec (
    .clk(clk), .rst_n(rst_n), .ck(ec_ck), .spad(ec_spad), .stop(ec_stop),
    .frame_end(ec_frame_end), .row_addr(ec_row), .col_data(ec_col_data), .rbank(ec_rbank)
  );

  tadc_array #(.ROWS(ROWS), .COLS(COLS), .GCC_W(GCC_W), .CNT_PULSE_PS(CLK_PERIOD_PS)) u_tadc (
    .clk(clk), .rst_n(rst_n), .spad(tadc_spad), .stop(tadc_stop), .mode_aec(tadc_mode_aec),
    .frame_start(tadc_frame_start), .row_addr(tadc_row), .col_data(tadc_col_data),
    .conv_busy(tadc_conv_busy), .rd_sel(tadc_rd_sel)
  );
endmodule
