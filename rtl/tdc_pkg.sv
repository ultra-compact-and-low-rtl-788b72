// tdc_pkg: widths, nominal timing and small helper functions shared by the
// three pixel-level time converters (RO-TDC, TDC-EC, TADC).
// The bit widths follow the published architectures: a 7+3 bit ring-oscillator
// TDC, a 6+4 bit external-clock TDC and a 6-bit Gray-coded TAC/ADC.
// Timing values are in picoseconds; they drive only the behavioural models of
// the analog parts (ring, delay line, doubler, ramps).
package tdc_pkg;
  timeunit 1ps; timeprecision 1fs;

  // RO-TDC
  localparam int unsigned RO_COARSE_W = 7;
  localparam int unsigned RO_FINE_W   = 3;
  localparam int unsigned RO_CODE_W   = RO_COARSE_W + RO_FINE_W;
  localparam int unsigned RO_STAGES   = 4;

  // TDC-EC
  localparam int unsigned EC_COARSE_W = 6;
  localparam int unsigned EC_FINE_W   = 4;
  localparam int unsigned EC_CODE_W   = EC_COARSE_W + EC_FINE_W;
  localparam int unsigned EC_TAPS     = 16;
  localparam real         EC_CK_PERIOD_PS = 1.0e6 / 280.0;    // 280 MHz global clock

  // TADC
  localparam int unsigned GCC_W = 6;

  // Binary to Gray code.
  function automatic logic [GCC_W-1:0] bin2gray(input logic [GCC_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  // Gray code to binary.
  function automatic logic [GCC_W-1:0] gray2bin(input logic [GCC_W-1:0] g);
    logic [GCC_W-1:0] b;
    b[GCC_W-1] = g[GCC_W-1];
    for (int i = GCC_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction
endpackage
