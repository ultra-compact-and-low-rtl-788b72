// tdc_ec_array: ROWS x COLS array of external-clock TDC pixels (32 x 32).
// The 280 MHz clock ck (from an on-chip PLL, outside this block) and STOP are
// distributed to all pixels; each pixel doubles ck locally.  Frame sequencing
// and readout are the same as in ro_tdc_array: frame_end stores all codes
// into one memory bank, clears the converters and swaps banks; row row_addr
// of the last stored frame drives the column buses col_data.  The readout
// scheme is this design's own.
module tdc_ec_array #(
  parameter int unsigned ROWS   = 32,
  parameter int unsigned COLS   = 32,
  parameter int unsigned CODE_W = 10,
  parameter real         CK_PERIOD_PS = 1.0e6 / 280.0
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ck,
  input  logic [ROWS-1:0][COLS-1:0]   spad,
  input  logic                        stop,
  input  logic                        frame_end,
  input  logic [$clog2(ROWS)-1:0]     row_addr,
  output logic [COLS-1:0][CODE_W-1:0] col_data,
  output logic                        rbank
);
  timeunit 1ps; timeprecision 1fs;

  logic store, pix_clr, wbank;
  logic [CODE_W-1:0] rdata [ROWS][COLS];

  tdc_frame_ctrl u_frame (
    .clk(clk), .rst_n(rst_n), .frame_end(frame_end),
    .store(store), .pix_clr(pix_clr), .wbank(wbank), .rbank(rbank)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [CODE_W-1:0] code;
      tdc_ec_pixel #(.TAPS(16), .COARSE_W(CODE_W - 4), .FINE_W(4),
                     .CK_PERIOD_PS(CK_PERIOD_PS)) u_px (
        .clk(clk), .rst_n(rst_n), .ck(ck), .start(spad[r][c]), .stop(stop),
        .clr(pix_clr), .store(store), .wsel(wbank), .rsel(rbank),
        .code(code), .rdata(rdata[r][c])
      );
    end
  end

  always_comb
    for (int c = 0; c < COLS; c++) col_data[c] = rdata[row_addr][c];
endmodule
