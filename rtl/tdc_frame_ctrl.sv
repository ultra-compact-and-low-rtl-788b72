// tdc_frame_ctrl: frame sequencer shared by the two TDC arrays.
// On a frame_end pulse (after the last STOP of the frame) it
//   cycle 1: stores every pixel's code into memory bank wbank (store = 1),
//   cycle 2: clears the pixel converters (pix_clr = 1) and swaps the banks,
// so rbank always points at the bank holding the last stored frame, which
// can be read out while the next frame is acquired.  The pixel converters
// clear on the rising edge of pix_clr, so the first cycle after reset issues
// one pix_clr pulse; reset selects bank 0 for writing.  All outputs are
// registered.
module tdc_frame_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic frame_end,
  output logic store,
  output logic pix_clr,
  output logic wbank,
  output logic rbank
);
  timeunit 1ps; timeprecision 1fs;

  logic init_done;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      store     <= 1'b0;
      pix_clr   <= 1'b0;
      wbank     <= 1'b0;
      init_done <= 1'b0;
    end else begin
      init_done <= 1'b1;
      store     <= frame_end;
      pix_clr   <= store | ~init_done;
      if (store) wbank <= ~wbank;
    end

  assign rbank = ~wbank;
endmodule
