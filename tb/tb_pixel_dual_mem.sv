// tb_pixel_dual_mem: random writes, clears and reads of the two pixel words,
// compared with a two-entry reference model.
module tb_pixel_dual_mem;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wsel = 0, clr = 0, we = 0, rsel = 0;
  logic [9:0] wdata = 0, rdata;
  logic [9:0] model [2];

  pixel_dual_mem #(.W(10)) dut (.*);

  always #500 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model[0] = 0; model[1] = 0;
    #1200 rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      for (int r = 0; r < 2; r++) begin
        rsel = r[0];
        #1;
        checks++;
        if (rdata != model[r]) begin
          failures++;
          $display("FAIL i=%0d word %0d = %h exp %h", i, r, rdata, model[r]);
        end
      end
      wsel  = $urandom % 2;
      we    = ($urandom % 2) != 0;
      clr   = ($urandom % 8) == 0;
      wdata = 10'($urandom);
      if (clr)     model[wsel] = 0;
      else if (we) model[wsel] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
