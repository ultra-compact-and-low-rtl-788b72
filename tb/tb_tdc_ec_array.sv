// tb_tdc_ec_array: a 4 x 4 TDC-EC array on a 280 MHz clock.  Three frames
// with a photon in most pixels; STOP comes 300 ps after a doubled-clock edge.
// After each frame_end all rows are read and compared with
// floor((last ck2x edge before STOP - photon) / (period / 32)), computed here;
// photon times are kept away from code boundaries.
module tb_tdc_ec_array;
  timeunit 1ps; timeprecision 1fs;
  localparam int ROWS = 4, COLS = 4;
  localparam real T  = 1.0e6 / 280.0;
  localparam real H  = T / 2.0;
  localparam real TD = H / 16.0;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ck = 0, stop = 0, frame_end = 0, rbank;
  logic [ROWS-1:0][COLS-1:0] spad = '0;
  logic [1:0] row_addr = 0;
  logic [COLS-1:0][9:0] col_data;
  int expc [ROWS][COLS];
  real elast;

  tdc_ec_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #(H) ck = ~ck;
  always #5000 clk = ~clk;

  initial begin
    #300000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic photon(input int r, input int c, input real t);
    #(t - $realtime) spad[r][c] = 1'b1;
    #300 spad[r][c] = 1'b0;
  endtask

  initial begin
    #20000 rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      @(negedge clk);
      elast = ($floor($realtime / H) + 70.0) * H;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          automatic int rr = r, cc = c;
          automatic int n = 16 + $urandom % 1000;       // taps before the last edge
          automatic real tph = elast - (real'(n) + 0.5) * TD;
          if ($urandom % 5 == 0) expc[r][c] = 0;
          else begin
            expc[r][c] = n;
            fork photon(rr, cc, tph); join_none
          end
        end
      #(elast + 300.0 - $realtime) stop = 1;
      #2000 stop = 0;
      @(negedge clk) frame_end = 1;
      @(negedge clk) frame_end = 0;
      repeat (3) @(negedge clk);
      for (int r = 0; r < ROWS; r++) begin
        row_addr = 2'(r);
        #10;
        for (int c = 0; c < COLS; c++) begin
          checks++;
          if (col_data[c] != 10'(expc[r][c])) begin
            failures++;
            $display("FAIL frame %0d pixel %0d,%0d code=%0d exp=%0d", f, r, c, col_data[c], expc[r][c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
