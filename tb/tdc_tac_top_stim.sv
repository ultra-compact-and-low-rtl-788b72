// tdc_tac_top_stim: end-to-end stimulus and checker for tdc_tac_top, used by
// tb_tdc_tac_top (8 x 8 arrays) and tb_tdc_tac_top_full (32 x 32, every
// parameter at its default).  The three arrays run concurrently:
//   RO-TDC : wait for the calibration loop to lock, then two frames with a
//            STOP before the photons (must be ignored), photons at random
//            times in most pixels, STOP, frame_end, readout of all rows;
//   TDC-EC : two frames on the 280 MHz clock, STOP just after a doubled-clock
//            edge, readout of all rows;
//   TADC   : frames in TAC and AEC mode, each converted during the next frame
//            (photons arrive while the previous frame converts) and read out
//            the frame after, including codes beyond full scale.
// Every code is compared with a value computed here from the photon times.
// Mechanisms are counted and each must occur at least once: calibration
// lock, bank swap, coarse-counter carry (RO and EC), nonzero fine code,
// pixel without photon, ignored early STOP, TAC mode, AEC mode, TADC
// saturation, acquisition during conversion.
module tdc_tac_top_stim #(
  parameter int ROWS = 32,
  parameter int COLS = 32
);
  import tdc_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  localparam int RW = $clog2(ROWS);
  localparam real T  = EC_CK_PERIOD_PS;
  localparam real H  = T / 2.0;
  localparam real TDE = H / 16.0;
  localparam real LSB = 160.0;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ro_clk_ref = 0, ec_ck = 0;
  logic [ROWS-1:0][COLS-1:0] ro_spad = '0, ec_spad = '0, tadc_spad = '0;
  logic ro_stop = 0, ro_frame_end = 0, ec_stop = 0, ec_frame_end = 0;
  logic tadc_stop = 0, tadc_mode_aec = 0, tadc_frame_start = 0;
  logic [RW-1:0] ro_row = 0, ec_row = 0, tadc_row = 0;
  logic [COLS-1:0][9:0] ro_col_data, ec_col_data;
  logic [COLS-1:0][5:0] tadc_col_data;
  logic [5:0] ro_tune;
  logic ro_cal_locked, ro_rbank, ec_rbank, tadc_conv_busy, tadc_rd_sel;

  // mechanism counters
  int n_lock, n_swap, n_ro_carry, n_ec_carry, n_ec_fine, n_nophoton, n_early_stop;
  int n_tac, n_aec, n_sat, n_overlap;

  // the full-size run leaves every parameter of the top at its default
  if (ROWS == 32 && COLS == 32) begin : g_full
    tdc_tac_top dut (.*);
  end else begin : g_small
    tdc_tac_top #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  end

  always #2500 clk = ~clk;                 // 200 MHz system clock
  always #12500 ro_clk_ref = ~ro_clk_ref;  // 40 MHz reference
  always #(H) ec_ck = ~ec_ck;              // 280 MHz

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 40) $display("FAIL %s", what);
    end
  endtask

  task automatic pulse_ro(input int r, input int c, input real t);
    #(t - $realtime) ro_spad[r][c] = 1'b1;
    #300 ro_spad[r][c] = 1'b0;
  endtask
  task automatic pulse_ec(input int r, input int c, input real t);
    #(t - $realtime) ec_spad[r][c] = 1'b1;
    #300 ec_spad[r][c] = 1'b0;
  endtask
  task automatic pulse_tadc(input int r, input int c, input real t, input int w);
    #(t - $realtime) tadc_spad[r][c] = 1'b1;
    #(w) tadc_spad[r][c] = 1'b0;
  endtask

  // ---------------- RO-TDC ----------------
  task automatic run_ro();
    int expc [ROWS][COLS];
    real td, tstop;
    logic bank0;
    wait (ro_cal_locked);
    n_lock++;
    td = 52.0 * (1.0 - 0.01 * real'(int'(ro_tune) - 32));
    for (int f = 0; f < 2; f++) begin
      @(negedge clk);
      bank0 = ro_rbank;
      tstop = $realtime + 60000.0;
      ro_stop = 1; #2000 ro_stop = 0;       // STOP before any photon
      n_early_stop++;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          automatic int rr = r, cc = c;
          automatic int n = $urandom % 1024;
          if ($urandom % 8 == 0) begin expc[r][c] = 0; n_nophoton++; end
          else begin
            expc[r][c] = n;
            if (n >= 8) n_ro_carry++;
            fork pulse_ro(rr, cc, tstop - (real'(n) + 0.5) * td); join_none
          end
        end
      #(tstop - $realtime) ro_stop = 1;
      #2000 ro_stop = 0;
      @(negedge clk) ro_frame_end = 1;
      @(negedge clk) ro_frame_end = 0;
      repeat (3) @(negedge clk);
      if (ro_rbank != bank0) n_swap++;
      for (int r = 0; r < ROWS; r++) begin
        ro_row = RW'(r);
        #10;
        for (int c = 0; c < COLS; c++)
          chk(ro_col_data[c] == 10'(expc[r][c]),
              $sformatf("RO frame %0d pixel %0d,%0d code=%0d exp=%0d", f, r, c, ro_col_data[c], expc[r][c]));
      end
    end
  endtask

  // ---------------- TDC-EC ----------------
  task automatic run_ec();
    int expc [ROWS][COLS];
    real elast;
    logic bank0;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk);
      bank0 = ec_rbank;
      elast = ($floor($realtime / H) + 70.0) * H;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          automatic int rr = r, cc = c;
          automatic int n = 16 + $urandom % 1000;
          if ($urandom % 8 == 0) begin expc[r][c] = 0; n_nophoton++; end
          else begin
            expc[r][c] = n;
            if (n >= 32) n_ec_carry++;
            if (n % 16 != 0) n_ec_fine++;
            fork pulse_ec(rr, cc, elast - (real'(n) + 0.5) * TDE); join_none
          end
        end
      #(elast + 300.0 - $realtime) ec_stop = 1;
      #2000 ec_stop = 0;
      @(negedge clk) ec_frame_end = 1;
      @(negedge clk) ec_frame_end = 0;
      repeat (3) @(negedge clk);
      if (ec_rbank != bank0) n_swap++;
      for (int r = 0; r < ROWS; r++) begin
        ec_row = RW'(r);
        #10;
        for (int c = 0; c < COLS; c++)
          chk(ec_col_data[c] == 10'(expc[r][c]),
              $sformatf("EC frame %0d pixel %0d,%0d code=%0d exp=%0d", f, r, c, ec_col_data[c], expc[r][c]));
      end
    end
  endtask

  // ---------------- TADC ----------------
  task automatic run_tadc();
    int expc [3][ROWS][COLS];
    real tstop;
    for (int f = 0; f < 4; f++) begin
      @(negedge clk);
      tadc_mode_aec = (f == 1);
      if (tadc_mode_aec) n_aec++; else n_tac++;
      if (tadc_conv_busy) n_overlap++;
      tstop = $realtime + 40000.0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          automatic int rr = r, cc = c;
          if (tadc_mode_aec) begin
            automatic int n = $urandom % 16;
            expc[f % 3][r][c] = int'($floor(real'(n) * 490.0 / LSB));
            for (int p = 0; p < n; p++) begin
              automatic real tp = $realtime + 1000.0 + real'(p) * 1500.0;
              fork pulse_tadc(rr, cc, tp, 490); join_none
            end
          end else begin
            automatic int n = $urandom % 72;
            if ($urandom % 8 == 0) begin expc[f % 3][r][c] = 0; n_nophoton++; end
            else begin
              expc[f % 3][r][c] = (n > 63) ? 63 : n;
              if (n > 63) n_sat++;
              fork pulse_tadc(rr, cc, tstop - (real'(n) + 0.5) * LSB, 300); join_none
            end
          end
        end
      #(tstop - $realtime) tadc_stop = 1;
      #2000 tadc_stop = 0;
      #1000;
      wait (!tadc_conv_busy);
      @(negedge clk);
      if (f >= 2)
        for (int r = 0; r < ROWS; r++) begin
          tadc_row = RW'(r);
          #10;
          for (int c = 0; c < COLS; c++)
            chk(gray2bin(tadc_col_data[c]) == 6'(expc[(f + 1) % 3][r][c]),
                $sformatf("TADC frame %0d pixel %0d,%0d code=%0d exp=%0d", f - 2, r, c,
                          gray2bin(tadc_col_data[c]), expc[(f + 1) % 3][r][c]));
        end
      tadc_frame_start = 1; @(negedge clk) tadc_frame_start = 0;
    end
  endtask

  initial begin
    {n_lock, n_swap, n_ro_carry, n_ec_carry, n_ec_fine, n_nophoton, n_early_stop} = '0;
    {n_tac, n_aec, n_sat, n_overlap} = '0;
    #20000 rst_n = 1;
    repeat (4) @(negedge clk);             // let the post-reset clear pulses finish
    fork
      run_ro();
      run_ec();
      run_tadc();
    join
    $display("mechanisms: lock=%0d swap=%0d ro_carry=%0d ec_carry=%0d ec_fine=%0d nophoton=%0d early_stop=%0d tac=%0d aec=%0d sat=%0d overlap=%0d",
             n_lock, n_swap, n_ro_carry, n_ec_carry, n_ec_fine, n_nophoton, n_early_stop,
             n_tac, n_aec, n_sat, n_overlap);
    chk(n_lock > 0, "calibration lock never happened");
    chk(n_swap >= 4, "bank swap missing");
    chk(n_ro_carry > 0 && n_ec_carry > 0, "coarse carry never happened");
    chk(n_ec_fine > 0, "fine code never nonzero");
    chk(n_nophoton > 0, "no pixel without photon");
    chk(n_early_stop > 0, "no early STOP");
    chk(n_tac > 0 && n_aec > 0, "TAC/AEC mode switch missing");
    chk(n_sat > 0, "no TADC saturation");
    chk(n_overlap > 0, "no acquisition during conversion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
