// tadc_pixel: one time-to-amplitude-to-digital converter pixel (6-bit).
// Acquisition: the TAC/AEC selector sends the SPAD EVENT to the acquiring
// stage (acq_sel).  In TAC mode that stage's capacitor charges from the photon
// to the next STOP edge; in AEC mode it charges during every EVENT pulse.
// Conversion (during the next frame): the other stage (conv_sel) is connected
// to the + input of the comparator, the in-pixel reference stage StageREF to
// the - input.  The array-wide CNT pulses raise StageREF by one step each;
// while the comparator still reads 1 the pixel copies the Gray-code bus GCC
// into memory conv_sel at every sample strobe.  When the reference passes the
// stored voltage the comparator toggles and the memory keeps the code, the
// largest k with Vsignal > k * Vstep.  The memory rd_sel can be read out
// meanwhile.  The reference stage is a copy of the signal stages; its slope is
// set so that one CNT pulse (CNT_PULSE_PS long) adds the voltage a signal
// stage gains in LSB_PS, which makes the LSB LSB_PS of arrival time.
// Structure follows the published TADC; widths, slopes and sequencing
// details are this design's choices.
module tadc_pixel #(
  parameter int unsigned GCC_W        = 6,
  parameter real         LSB_PS       = 160.0,
  parameter real         VFULL        = 1.0,      // signal voltage at 2**GCC_W LSB
  parameter real         CNT_PULSE_PS = 5000.0    // width of one CNT pulse
) (
  input  logic             clk,        // conversion clock
  input  logic             rst_n,
  input  logic             event_i,    // SPAD EVENT pulse
  input  logic             stop,       // STOP (laser reference)
  input  logic             mode_aec,
  input  logic             acq_sel,
  input  logic             conv_sel,
  input  logic             rd_sel,
  input  logic             res1,
  input  logic             res2,
  input  logic             res_ref,
  input  logic             cnt,
  input  logic [GCC_W-1:0] gcc,
  input  logic             sample,
  input  logic             conv_clr,
  output logic             vcomp,      // comparator output (observation)
  output logic [GCC_W-1:0] rdata       // memory rd_sel (Gray code)
);
  timeunit 1ps; timeprecision 1fs;

  localparam real SLOPE     = VFULL / (real'(2 ** GCC_W) * LSB_PS);
  localparam real SLOPE_REF = SLOPE * LSB_PS / CNT_PULSE_PS;

  logic charge1, charge2;
  real  vo1, vo2, vref, vsel;

  tac_aec_selector u_sel (
    .event_i(event_i), .stop(stop), .clr(acq_sel ? res2 : res1),
    .mode_aec(mode_aec), .acq_sel(acq_sel), .charge1(charge1), .charge2(charge2)
  );

  tac_stage #(.SLOPE_V_PER_PS(SLOPE))     u_stage1 (.charge(charge1), .res(res1),    .vo(vo1));
  tac_stage #(.SLOPE_V_PER_PS(SLOPE))     u_stage2 (.charge(charge2), .res(res2),    .vo(vo2));
  tac_stage #(.SLOPE_V_PER_PS(SLOPE_REF)) u_ref    (.charge(cnt),     .res(res_ref), .vo(vref));

  always_comb vsel = conv_sel ? vo2 : vo1;

  tadc_comparator u_comp (.vp(vsel), .vn(vref), .vcomp(vcomp));

  pixel_dual_mem #(.W(GCC_W)) u_mem (
    .clk(clk), .rst_n(rst_n), .wsel(conv_sel), .clr(conv_clr), .we(sample & vcomp),
    .wdata(gcc), .rsel(rd_sel), .rdata(rdata)
  );
endmodule
