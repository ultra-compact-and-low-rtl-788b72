// tb_delay_line: launches START and freezes the line after a random time;
// the number of toggled taps must be floor(time / tap delay) (at most 16)
// and the code must be a clean thermometer.  Checks clr and that a frozen
// line stays frozen.
module tb_delay_line;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  localparam real TD = 111.0;
  logic start = 0, freeze = 0, clr = 1;
  logic [15:0] taps;
  int n, e;

  delay_line #(.TAPS(16), .TD_PS(TD)) dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000 clr = 0;
    for (int i = 0; i < 60; i++) begin
      n = $urandom % 19;
      #1000 start = 1;
      #((real'(n) + 0.5) * TD) freeze = 1;
      #100 start = 0;
      #3000;
      e = (n > 16) ? 16 : n;
      checks++;
      if (taps != 16'((17'(1) << e) - 1)) begin
        failures++;
        $display("FAIL n=%0d taps=%b", n, taps);
      end
      clr = 1; #200;
      checks++;
      if (taps != 0) failures++;
      clr = 0; freeze = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
