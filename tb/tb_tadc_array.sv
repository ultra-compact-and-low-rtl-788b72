// tb_tadc_array: a 4 x 4 TADC array.  Four frames alternate TAC and AEC
// mode; each pixel gets a random photon time before STOP (TAC) or a random
// number (below 16) of 490 ps event pulses (AEC).  Each frame is converted during the
// next one and read out, row by row in Gray code, during the one after;
// the decoded codes are compared with values computed here.
module tb_tadc_array;
  import tdc_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  localparam int ROWS = 4, COLS = 4;
  localparam real LSB = 160.0;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, stop = 0, mode_aec = 0, frame_start = 0, conv_busy, rd_sel;
  logic [ROWS-1:0][COLS-1:0] spad = '0;
  logic [1:0] row_addr = 0;
  logic [COLS-1:0][5:0] col_data;
  int expc [3][ROWS][COLS];
  real tstop;

  tadc_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #2500 clk = ~clk;

  initial begin
    #300000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic photon(input int r, input int c, input real t, input int width);
    #(t - $realtime) spad[r][c] = 1'b1;
    #(width) spad[r][c] = 1'b0;
  endtask

  initial begin
    #20000 rst_n = 1;
    for (int f = 0; f < 5; f++) begin
      @(negedge clk);
      mode_aec = f[0];
      tstop = $realtime + 40000.0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          automatic int rr = r, cc = c;
          if (mode_aec) begin
            automatic int n = $urandom % 16;          // events of 490 ps each
            expc[f % 3][r][c] = int'($floor(real'(n) * 490.0 / LSB));
            for (int p = 0; p < n; p++) begin
              automatic real tp = $realtime + 1000.0 + real'(p) * 1500.0;
              fork photon(rr, cc, tp, 490); join_none
            end
          end else begin
            automatic int n = $urandom % 70;
            expc[f % 3][r][c] = (n > 63) ? 63 : n;
            fork photon(rr, cc, tstop - (real'(n) + 0.5) * LSB, 300); join_none
          end
        end
      #(tstop - $realtime) stop = 1;
      #2000 stop = 0;
      #1000;
      wait (!conv_busy);
      @(negedge clk);
      // memory now readable holds frame f-2
      if (f >= 2) begin
        for (int r = 0; r < ROWS; r++) begin
          row_addr = 2'(r);
          #10;
          for (int c = 0; c < COLS; c++) begin
            checks++;
            if (gray2bin(col_data[c]) != 6'(expc[(f + 1) % 3][r][c])) begin
              failures++;
              $display("FAIL frame %0d pixel %0d,%0d code=%0d exp=%0d", f - 2, r, c,
                       gray2bin(col_data[c]), expc[(f + 1) % 3][r][c]);
            end
          end
        end
      end
      frame_start = 1; @(negedge clk) frame_start = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
