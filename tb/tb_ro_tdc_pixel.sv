// tb_ro_tdc_pixel: random photon-to-STOP intervals over the whole 10-bit
// range; the code must equal floor(interval / stage delay) (intervals are
// placed half a stage delay away from a code boundary).  A STOP before the
// photon and a second photon are ignored; no photon gives 0.  Codes are
// stored alternately into the two memories and read back one frame later.
module tb_ro_tdc_pixel;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  localparam real TD = 52.0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, clr = 0, store = 0, wsel = 0, rsel = 0;
  logic [5:0] tune = 32;
  logic [9:0] code, rdata;
  int n, prev_n;

  ro_tdc_pixel #(.TD_NOM_PS(TD)) dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #500000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev_n = -1;
    #20000 rst_n = 1;
    clr = 1; #1000;
    for (int f = 0; f < 40; f++) begin
      @(negedge clk) clr = 0;
      #1000 stop = 1; #1000 stop = 0;           // STOP before the photon
      n = (f % 10 == 9) ? -1 : int'($urandom % 1024);
      #3000;
      if (n >= 0) begin
        start = 1; #200 start = 0;
        #((real'(n) + 0.5) * TD - 200.0);
        stop = 1; #1000 stop = 0;
        #500 start = 1; #200 start = 0;         // late photon
      end else begin
        stop = 1; #1000 stop = 0;
      end
      #2000;
      checks++;
      if (code != 10'((n < 0) ? 0 : n)) begin
        failures++;
        $display("FAIL frame %0d code=%0d exp=%0d", f, code, n);
      end
      // store into bank f%2, then read the previous frame from the other one
      @(negedge clk) begin wsel = f[0]; store = 1; end
      @(negedge clk) store = 0;
      rsel = f[0];
      #10;
      checks++;
      if (rdata != 10'((n < 0) ? 0 : n)) begin failures++; $display("FAIL mem now"); end
      if (prev_n != -2 && f > 0) begin
        rsel = ~f[0];
        #10;
        checks++;
        if (rdata != 10'((prev_n < 0) ? 0 : prev_n)) begin failures++; $display("FAIL mem prev"); end
      end
      prev_n = n;
      clr = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
