// tb_coarse_counter: random enables over several wraps of a 6-bit counter,
// compared with a reference count kept in the testbench; checks the
// asynchronous clear too.
module tb_coarse_counter;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, en = 0;
  logic [5:0] count;
  int ref_count;

  coarse_counter #(.W(6)) dut (.clk(clk), .clr(clr), .en(en), .count(count));

  always #500 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_count = 0;
    #1200 clr = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      checks++;
      if (count != 6'(ref_count)) begin
        failures++;
        $display("FAIL cycle %0d count=%0d exp=%0d", i, count, ref_count % 64);
      end
      en = ($urandom % 4) != 0;
      if (en) ref_count = (ref_count + 1) % 64;
      if (i == 300) begin
        #100 clr = 1;
        #10;
        checks++;
        if (count != 0) failures++;
        #10 clr = 0;
        ref_count = en ? 1 : 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
