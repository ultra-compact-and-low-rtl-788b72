// tb_ring_osc: runs the ring model for measured intervals at several tune
// codes and checks that the frozen state equals the Johnson state reached
// after floor(interval / stage delay) steps, with the stage delay computed
// here from the documented delay law; also checks clr.
module tb_ring_osc;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic run = 0, clr = 1;
  logic [5:0] tune = 32;
  logic [3:0] ring, expv;
  real td, interval;
  int n;

  ring_osc #(.STAGES(4), .TUNE_W(6), .TD_NOM_PS(52.0), .GAIN(0.01), .SKEW(1.1)) dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000 clr = 0;
    for (int i = 0; i < 40; i++) begin
      tune = 6'(20 + ($urandom % 25));
      td = 52.0 * 1.1 * (1.0 - 0.01 * real'(int'(tune) - 32));
      n = 3 + ($urandom % 200);
      interval = (real'(n) + 0.5) * td;     // half a step away from any edge
      #1000 run = 1;
      #(interval) run = 0;
      #1000;
      for (int k = 0; k < 4; k++) expv[k] = ((n % 8) > k) && ((n % 8) <= k + 4);
      checks++;
      if (ring != expv) begin
        failures++;
        $display("FAIL tune=%0d n=%0d ring=%b exp=%b", tune, n, ring, expv);
      end
      clr = 1; #500;
      checks++;
      if (ring != 0) failures++;
      clr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
