// tb_freq_doubler: drives a 280 MHz clock and checks that the doubled clock
// has rising edges every half input period (within 1 ps) and a duty cycle
// near 50 %.
module tb_freq_doubler;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  localparam real T = 1.0e6 / 280.0;
  logic ck = 0, ck2x;
  realtime last_rise, last_fall;
  int rises = 0;

  freq_doubler #(.DLY_PS(T / 4.0)) dut (.ck(ck), .ck2x(ck2x));

  always #(T / 2.0) ck = ~ck;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge ck2x) begin
    if (rises > 2) begin
      checks++;
      if ($realtime - last_rise > T / 2.0 + 1.0 || $realtime - last_rise < T / 2.0 - 1.0) begin
        failures++;
        $display("FAIL period %f", $realtime - last_rise);
      end
    end
    rises++;
    last_rise = $realtime;
  end

  always @(negedge ck2x) begin
    if (rises > 2) begin
      checks++;
      if ($realtime - last_rise > T / 4.0 + 1.0 || $realtime - last_rise < T / 4.0 - 1.0) begin
        failures++;
        $display("FAIL high time %f", $realtime - last_rise);
      end
    end
    last_fall = $realtime;
  end

  initial begin
    #(200.0 * T);
    checks++;
    if (rises < 395) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
