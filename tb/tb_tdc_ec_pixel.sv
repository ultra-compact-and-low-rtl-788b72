// tb_tdc_ec_pixel: 280 MHz clock; photons at random times, STOP 300 ps after
// a later doubled-clock edge.  The expected code, worked out here from the
// clock grid, is floor((last ck2x edge before STOP - photon) / tap delay),
// tap delay = period / 32.  Photons closer than 20 ps to a code boundary are
// skipped.  Also checks no-photon frames and the two memories.
module tb_tdc_ec_pixel;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  localparam real T  = 1.0e6 / 280.0;
  localparam real H  = T / 2.0;          // doubled-clock period
  localparam real TD = H / 16.0;
  logic clk = 0, rst_n = 0, ck = 0, start = 0, stop = 0, clr = 0, store = 0, wsel = 0, rsel = 0;
  logic [9:0] code, rdata;
  int expc, prev_exp;
  real tph, tstop, elast, x;
  int kedges;

  tdc_ec_pixel dut (.*);

  always #(H) ck = ~ck;          // ck rises at odd multiples of H, falls at even
  always #5000 clk = ~clk;

  initial begin
    #500000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev_exp = -1;
    #20000 rst_n = 1;
    clr = 1; #1000;
    for (int f = 0; f < 40; f++) begin
      @(negedge clk) clr = 0;
      #20000;
      // photon: random time, away from tap boundaries relative to the grid
      do begin
        tph = $realtime + 1000.0 + real'($urandom % 100000) / 10.0;
        x = (tph / H - $floor(tph / H)) * 16.0;  // taps since previous edge
        x = x - $floor(x);
      end while (x < 0.2 || x > 0.8);
      kedges = 1 + $urandom % 60;
      elast = ($floor(tph / H) + real'(kedges)) * H;     // last edge before STOP
      tstop = elast + 300.0;
      expc = int'($floor((elast - tph) / TD));
      if (f % 10 == 7) expc = -1;
      if (expc >= 0) begin
        #(tph - $realtime) start = 1;
        #200 start = 0;
      end
      #(tstop - $realtime) stop = 1;
      #1000 stop = 0;
      #2000;
      checks++;
      if (code != 10'((expc < 0) ? 0 : expc)) begin
        failures++;
        $display("FAIL frame %0d code=%0d exp=%0d", f, code, expc);
      end
      @(negedge clk) begin wsel = f[0]; store = 1; end
      @(negedge clk) store = 0;
      if (f > 0) begin
        rsel = ~f[0];
        #10;
        checks++;
        if (rdata != 10'((prev_exp < 0) ? 0 : prev_exp)) begin failures++; $display("FAIL mem prev"); end
      end
      prev_exp = expc;
      clr = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
