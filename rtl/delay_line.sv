// delay_line: BEHAVIOURAL MODEL (not synthesizable) of the 16-tap
// differential delay line of the TDC-EC fine interpolator.
// When start rises the edge travels down the chain, toggling tap i after
// (i+1) buffer delays.  When freeze rises (the first clock edge after START)
// the switches between the stages open and the taps hold their levels, so
// taps is a thermometer code of the START-to-clock-edge time.  clr empties
// the line.  taps[i] = 1 means "stage i has toggled"; the alternating
// polarity of the real inverting stages is folded into that convention.
// Only one START per clr is propagated.
module delay_line #(
  parameter int unsigned TAPS  = 16,
  parameter real         TD_PS = 1.0e6 / 280.0 / 2.0 / 16.0  // 1/16 of the doubled 280 MHz period
) (
  input  logic            start,
  input  logic            freeze,
  input  logic            clr,
  output logic [TAPS-1:0] taps
);
  timeunit 1ps; timeprecision 1fs;

  initial taps = '0;

  always begin
    wait (start || clr);
    if (clr) begin
      taps = '0;
      wait (!clr);
    end else begin
      for (int i = 0; i < TAPS; i++) begin
        #(TD_PS);
        if (clr || freeze) break;
        taps[i] = 1'b1;
      end
      wait (clr);
    end
  end
endmodule
