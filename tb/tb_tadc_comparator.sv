// tb_tadc_comparator: random input voltage pairs; the output must be 1
// exactly when the + input exceeds the - input plus the offset.
module tb_tadc_comparator;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  real vp, vn;
  logic vcomp;

  tadc_comparator #(.OFFSET_V(0.01)) dut (.vp(vp), .vn(vn), .vcomp(vcomp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      vp = real'($urandom % 1000) / 1000.0;
      vn = (i % 2 == 0) ? vp - 0.02 : real'($urandom % 1000) / 1000.0;
      #10;
      checks++;
      if (vcomp != (vp - vn > 0.01)) begin
        failures++;
        $display("FAIL vp=%f vn=%f vcomp=%b", vp, vn, vcomp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
