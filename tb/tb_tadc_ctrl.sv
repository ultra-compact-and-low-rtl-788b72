// tb_tadc_ctrl: follows three frame starts and checks the controller's
// sequence: stage roles swap every frame, the new acquiring stage gets one
// reset pulse, a conversion has one clear cycle then 63 CNT pulses of one
// cycle each, each followed by a sample strobe with GCC = Gray(k), and takes
// 127 cycles in total (busy); the readout memory is the one not converted.
module tb_tadc_ctrl;
  import tdc_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, frame_start = 0;
  logic acq_sel, conv_sel, rd_sel, res1, res2, res_ref, cnt, sample, conv_clr, busy;
  logic [5:0] gcc;

  tadc_ctrl #(.GCC_W(6)) dut (.*);

  always #2500 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic prev_acq;
    int ncnt, nsample, nbusy, nres1, nres2, nclr;
    #6000 rst_n = 1;
    @(negedge clk);
    chk(acq_sel == 0 && conv_sel == 1 && !busy, "reset state");
    for (int f = 0; f < 3; f++) begin
      prev_acq = acq_sel;
      frame_start = 1; @(negedge clk); frame_start = 0;
      chk(acq_sel == ~prev_acq && conv_sel == prev_acq, "role swap");
      chk(rd_sel == ~conv_sel, "read select");
      ncnt = 0; nsample = 0; nbusy = 0; nres1 = 0; nres2 = 0; nclr = 0;
      for (int c = 0; c < 140; c++) begin
        nres1 += res1; nres2 += res2; nclr += conv_clr;
        if (busy) nbusy++;
        if (cnt) begin
          ncnt++;
          chk(!sample, "cnt and sample exclusive");
        end
        if (sample) begin
          nsample++;
          chk(gray2bin(gcc) == 6'(nsample), "gcc during sample");
        end
        if (c == 0) chk(res_ref && conv_clr, "clear cycle first");
        @(negedge clk);
      end
      chk(ncnt == 63, $sformatf("63 CNT pulses (%0d)", ncnt));
      chk(nsample == 63, "63 samples");
      chk(nbusy == 127, $sformatf("127 busy cycles (%0d)", nbusy));
      chk(nclr == 1, "one clear cycle");
      chk(acq_sel ? (nres2 == 1 && nres1 == 0) : (nres1 == 1 && nres2 == 0), "reset of acquiring stage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
