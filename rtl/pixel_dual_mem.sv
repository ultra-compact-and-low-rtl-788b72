// pixel_dual_mem: the two in-pixel result memories.
// Each pixel holds two W-bit words so that the result of one frame can be
// read out while the next frame is being acquired or converted.  wsel picks
// the word that is written (clear or write enable), rsel the word that drives
// rdata.  Writes take effect on the rising edge of clk; rdata is
// combinational from the stored words.  clr has priority over we.
module pixel_dual_mem #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous reset of both words to zero
  input  logic         wsel,   // word written: 0 = memory 1, 1 = memory 2
  input  logic         clr,    // clear the selected word
  input  logic         we,     // write wdata into the selected word
  input  logic [W-1:0] wdata,
  input  logic         rsel,   // word read: 0 = memory 1, 1 = memory 2
  output logic [W-1:0] rdata
);
  timeunit 1ps; timeprecision 1fs;

  logic [W-1:0] mem [2];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mem[0] <= '0;
      mem[1] <= '0;
    end else if (clr) mem[wsel] <= '0;
    else if (we)      mem[wsel] <= wdata;

  assign rdata = mem[rsel];
endmodule
