// tb_tac_stage: charges the ramp for random intervals (one or several
// pulses) and compares the output voltage with slope * total charging time;
// checks reset to Vres and clipping at Vmax after long charges.
module tb_tac_stage;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  localparam real SLOPE = 1.0e-4;   // V/ps
  logic charge = 0, res = 1;
  real  vo, expv, d;
  int   pulses;

  tac_stage #(.SLOPE_V_PER_PS(SLOPE), .VRES(0.1), .VMAX(1.2)) dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input real e);
    checks++;
    if (vo > e + 1e-6 || vo < e - 1e-6) begin
      failures++;
      $display("FAIL vo=%f exp=%f", vo, e);
    end
  endtask

  initial begin
    #1000 res = 0;
    check(0.1);
    for (int i = 0; i < 30; i++) begin
      expv = 0.1;
      pulses = 1 + $urandom % 4;
      for (int p = 0; p < pulses; p++) begin
        d = real'(100 + $urandom % 2500);
        #500 charge = 1;
        #(d) charge = 0;
        expv += SLOPE * d;
      end
      #100;
      check(expv > 1.2 ? 1.2 : expv);
      res = 1; #100 res = 0;
      check(0.1);
    end
    // long charge: the ramp must clip at VMAX
    for (int i = 0; i < 3; i++) begin
      #500 charge = 1;
      #(15000 + 5000 * i) charge = 0;
      #100;
      check(1.2);
      res = 1; #100 res = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
