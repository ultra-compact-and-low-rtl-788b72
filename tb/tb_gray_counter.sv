// tb_gray_counter: counts through two full cycles of the 6-bit Gray counter
// with random stalls; checks the binary value against a reference count, that
// consecutive codes differ in exactly one bit, and that the Gray code decodes
// back to the count.
module tb_gray_counter;
  import tdc_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [5:0] bin, gcc, prev;
  int ref_count;

  gray_counter #(.W(6)) dut (.*);

  always #500 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_count = 0;
    #1200 rst_n = 1;
    prev = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      checks += 2;
      if (bin != 6'(ref_count)) begin failures++; $display("FAIL bin %0d exp %0d", bin, ref_count); end
      if (gray2bin(gcc) != 6'(ref_count)) begin failures++; $display("FAIL gcc %b", gcc); end
      if (gcc != prev && !(i > 0 && ref_count == 0)) begin
        checks++;
        if ($countones(gcc ^ prev) != 1) begin failures++; $display("FAIL step %b->%b", prev, gcc); end
      end
      prev = gcc;
      inc = ($urandom % 3) != 0;
      clr = (i == 180);
      if (clr) ref_count = 0; else if (inc) ref_count = (ref_count + 1) % 64;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
