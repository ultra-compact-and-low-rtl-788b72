// tb_johnson_coder: walks the ring through every one of its 8 legal states
// (built from the step count, independent of the coder) and checks the fine
// code equals the number of stage delays elapsed.
module tb_johnson_coder;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [3:0] ring;
  logic [2:0] fine;

  johnson_coder #(.STAGES(4)) dut (.ring(ring), .fine(fine));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++)
      for (int n = 0; n < 8; n++) begin
        // node i is high from step i+1 to step i+4 of each period
        for (int i = 0; i < 4; i++) ring[i] = (n > i) && (n <= i + 4);
        #10;
        checks++;
        if (fine != 3'(n)) begin
          failures++;
          $display("FAIL step %0d ring=%b fine=%0d", n, ring, fine);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
