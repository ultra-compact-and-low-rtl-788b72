// tb_thermo_coder: every thermometer code of the 16-tap line (0..16 taps
// toggled) must give the tap count, saturated at 15; a single bubble must
// not move the result by more than one.
module tb_thermo_coder;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [15:0] therm;
  logic [3:0]  bin;

  thermo_coder #(.TAPS(16)) dut (.therm(therm), .bin(bin));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 16; k++) begin
      therm = 16'((17'(1) << k) - 1);
      #10;
      checks++;
      if (bin != 4'((k > 15) ? 15 : k)) begin
        failures++;
        $display("FAIL k=%0d bin=%0d", k, bin);
      end
    end
    for (int k = 3; k < 15; k++) begin
      therm = 16'((17'(1) << k) - 1);
      therm[k-2] = 1'b0;
      therm[k]   = 1'b1;
      #10;
      checks++;
      if (bin != 4'(k)) begin
        failures++;
        $display("FAIL bubble k=%0d bin=%0d", k, bin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
