// tb_ro_tdc_array: a 4 x 4 RO-TDC array whose rings are 10 % slow.  Waits
// for the calibration loop to lock, derives the locked stage delay from the
// tune code and the ring delay law, then runs three frames with a photon in
// most pixels at a random time before the common STOP.  After each frame_end
// every row is read from the column buses and compared with
// floor((STOP - photon) / stage delay); pixels without a photon read 0.
module tb_ro_tdc_array;
  timeunit 1ps; timeprecision 1fs;
  localparam int ROWS = 4, COLS = 4;
  localparam real SKEW = 1.1;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clk_ref = 0, stop = 0, frame_end = 0, cal_locked, rbank;
  logic [ROWS-1:0][COLS-1:0] spad = '0;
  logic [1:0] row_addr = 0;
  logic [COLS-1:0][9:0] col_data;
  logic [5:0] tune;
  int expc [ROWS][COLS];
  real td, tstop;

  ro_tdc_array #(.ROWS(ROWS), .COLS(COLS), .SKEW(SKEW), .CAL_WINDOW(16)) dut (.*);

  always #5000 clk = ~clk;
  always #12500 clk_ref = ~clk_ref;

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
    wait (cal_locked);
    td = 52.0 * SKEW * (1.0 - 0.01 * real'(int'(tune) - 32));
    $display("locked: tune=%0d stage delay %f ps", tune, td);
    checks++;
    if (td < 52.0 * 0.985 || td > 52.0 * 1.015) failures++;
    for (int f = 0; f < 3; f++) begin
      @(negedge clk);
      tstop = $realtime + 60000.0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          automatic int rr = r, cc = c;
          automatic int n = $urandom % 1024;
          if ($urandom % 5 == 0) expc[r][c] = 0;
          else begin
            expc[r][c] = n;
            fork photon(rr, cc, tstop - (real'(n) + 0.5) * td); join_none
          end
        end
      #(tstop - $realtime) stop = 1;
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
