// tadc_array: ROWS x COLS array of TADC pixels (32 x 32) with the global
// conversion controller.  tadc_ctrl drives the stage resets, the CNT pulses
// and the Gray-code bus GCC of every pixel; STOP and the TAC/AEC mode are
// global too.  A frame_start pulse begins a new frame: one stage of every
// pixel starts acquiring while the other is converted (127 clock cycles),
// and the memory written by the previous conversion is read out, row by
// row, on the column buses col_data (Gray code; decode with
// tdc_pkg::gray2bin).  The readout scheme is this design's own.
module tadc_array #(
  parameter int unsigned ROWS         = 32,
  parameter int unsigned COLS         = 32,
  parameter int unsigned GCC_W        = 6,
  parameter real         LSB_PS       = 160.0,
  parameter real         CNT_PULSE_PS = 5000.0   // conversion clock period
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [ROWS-1:0][COLS-1:0]  spad,
  input  logic                       stop,
  input  logic                       mode_aec,
  input  logic                       frame_start,
  input  logic [$clog2(ROWS)-1:0]    row_addr,
  output logic [COLS-1:0][GCC_W-1:0] col_data,
  output logic                       conv_busy,
  output logic                       rd_sel
);
  timeunit 1ps; timeprecision 1fs;

  logic acq_sel, conv_sel, res1, res2, res_ref, cnt, sample, conv_clr;
  logic [GCC_W-1:0] gcc;
  logic [GCC_W-1:0] rdata [ROWS][COLS];

  tadc_ctrl #(.GCC_W(GCC_W)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .frame_start(frame_start),
    .acq_sel(acq_sel), .conv_sel(conv_sel), .rd_sel(rd_sel),
    .res1(res1), .res2(res2), .res_ref(res_ref), .cnt(cnt), .gcc(gcc),
    .sample(sample), .conv_clr(conv_clr), .busy(conv_busy)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic vcomp;
      tadc_pixel #(.GCC_W(GCC_W), .LSB_PS(LSB_PS), .CNT_PULSE_PS(CNT_PULSE_PS)) u_px (
        .clk(clk), .rst_n(rst_n), .event_i(spad[r][c]), .stop(stop), .mode_aec(mode_aec),
        .acq_sel(acq_sel), .conv_sel(conv_sel), .rd_sel(rd_sel),
        .res1(res1), .res2(res2), .res_ref(res_ref), .cnt(cnt), .gcc(gcc),
        .sample(sample), .conv_clr(conv_clr), .vcomp(vcomp), .rdata(rdata[r][c])
      );
    end
  end

  always_comb
    for (int c = 0; c < COLS; c++) col_data[c] = rdata[row_addr][c];
endmodule
