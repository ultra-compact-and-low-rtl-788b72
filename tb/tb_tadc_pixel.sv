// tb_tadc_pixel: one TADC pixel driven by the global controller.  Each frame
// the acquiring stage gets a photon at a random time before STOP (TAC mode)
// or a random number of fixed-width event pulses (AEC mode); during the next
// frame it is converted, and one frame later the result is read.  Expected
// codes are computed here: TAC floor((STOP - photon) / 160 ps), AEC
// floor(events * width / 160 ps), both saturated at 63; no photon gives 0.
// Also checks the conversion time (127 clock cycles).
module tb_tadc_pixel;
  import tdc_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  localparam real LSB = 160.0;
  localparam real TCLK = 5000.0;
  logic clk = 0, rst_n = 0, event_i = 0, stop = 0, mode_aec = 0, frame_start = 0;
  logic acq_sel, conv_sel, rd_sel, res1, res2, res_ref, cnt, sample, conv_clr, busy, vcomp;
  logic [5:0] gcc, rdata;
  int expq[$];
  int e, nb;

  tadc_ctrl #(.GCC_W(6)) ctrl (.clk(clk), .rst_n(rst_n), .frame_start(frame_start),
    .acq_sel(acq_sel), .conv_sel(conv_sel), .rd_sel(rd_sel), .res1(res1), .res2(res2),
    .res_ref(res_ref), .cnt(cnt), .gcc(gcc), .sample(sample), .conv_clr(conv_clr), .busy(busy));

  tadc_pixel #(.GCC_W(6), .LSB_PS(LSB), .CNT_PULSE_PS(TCLK)) dut (.*);

  always #(TCLK / 2.0) clk = ~clk;

  initial begin
    #500000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, w;
    #20000 rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      // acquisition of frame f (conversion of frame f-1 runs meanwhile)
      mode_aec = (f % 5 == 4);
      #20000;
      if (mode_aec) begin
        n = $urandom % 12;
        w = 300 + 10 * ($urandom % 50);
        for (int p = 0; p < n; p++) begin
          event_i = 1; #(w) event_i = 0; #3000;
        end
        e = int'($floor(real'(n * w) / LSB + 1e-9));
        if (real'(n * w) / LSB - real'(e) < 0.05 && e > 0) e = -2;  // too close: do not check
      end else if (f % 7 == 3) begin
        e = 0;                                  // no photon
      end else begin
        n = $urandom % 70;
        event_i = 1; #200 event_i = 0;
        #((real'(n) + 0.5) * LSB - 200.0);
        e = n;
      end
      stop = 1; #2000 stop = 0;
      if (e > 63) e = 63;
      expq.push_back(e);
      wait (!busy);
      @(negedge clk);
      // result of frame f-2 is in the readout memory now
      if (f >= 2) begin
        e = expq.pop_front();
        if (e != -2) begin
          checks++;
          if (gray2bin(rdata) != 6'(e)) begin
            failures++;
            $display("FAIL frame %0d code=%0d exp=%0d", f - 2, gray2bin(rdata), e);
          end
        end
      end
      frame_start = 1; @(negedge clk) frame_start = 0;
      nb = 0;
      while (busy) begin nb++; @(negedge clk); end
      checks++;
      if (nb != 127) begin failures++; $display("FAIL conversion took %0d cycles", nb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
