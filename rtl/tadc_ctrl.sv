// tadc_ctrl: global controller of the TADC array.
// At every frame_start it swaps the roles of the two signal stages: the
// stage that has just acquired (conv_sel) is converted while the other one
// (acq_sel) is reset (res1/res2 pulse for one cycle) and acquires the new
// frame.  The conversion is a single-slope ramp shared by the whole array:
//   CLR   : reference stages reset (res_ref), selected pixel words cleared
//           (conv_clr), Gray counter cleared;
//   CNT   : one CNT pulse of one clock period charges every in-pixel
//           reference stage by one LSB step; the Gray counter advances;
//   SAMPLE: sample = 1, pixels whose comparator still reads 1 (signal above
//           reference) copy the Gray code into their memory.
// CNT/SAMPLE repeat 2**GCC_W - 1 times, so a conversion takes
// 1 + 2*(2**GCC_W - 1) clock cycles (127 for 6 bits), after which each pixel
// holds the largest k with Vsignal > k * Vstep.  rd_sel points at the memory
// written by the previous conversion, which is free for readout.
// The stage resets act on their rising edge, so the first cycle after reset
// pulses res1 and res2 once.  res_ref is decoded from the state register
// and drives the edge-triggered reset of the reference ramps, so lint sees the
// state both as synchronous data and as an asynchronous control; that is
// intended.
module tadc_ctrl #(
  parameter int unsigned GCC_W = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame_start,
  output logic             acq_sel,   // stage acquiring: 0 = Stage1, 1 = Stage2
  output logic             conv_sel,  // stage / memory being converted
  output logic             rd_sel,    // memory free for readout
  output logic             res1,
  output logic             res2,
  output logic             res_ref,
  output logic             cnt,       // CNT pulse to the reference stages
  output logic [GCC_W-1:0] gcc,       // Gray-code bus GCC
  output logic             sample,
  output logic             conv_clr,
  output logic             busy
);
  timeunit 1ps; timeprecision 1fs;

  typedef enum logic [1:0] {S_IDLE, S_CLR, S_CNT, S_SAMPLE} state_t;
  state_t state;
  logic   init_done;

  logic             g_clr, g_inc;
  logic [GCC_W-1:0] g_bin;

  gray_counter #(.W(GCC_W)) u_gcc (
    .clk(clk), .rst_n(rst_n), .clr(g_clr), .inc(g_inc), .bin(g_bin), .gcc(gcc)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= S_IDLE;
      acq_sel  <= 1'b0;
      conv_sel <= 1'b1;
      res1     <= 1'b0;
      res2     <= 1'b0;
      init_done <= 1'b0;
    end else begin
      init_done <= 1'b1;
      res1 <= ~init_done;   // both signal stages reset once after reset
      res2 <= ~init_done;
      if (frame_start) begin
        acq_sel  <= ~acq_sel;
        conv_sel <= acq_sel;
        if (acq_sel) res1 <= 1'b1;   // Stage1 acquires next
        else         res2 <= 1'b1;
        state <= S_CLR;
      end else begin
        unique case (state)
          S_IDLE:   state <= S_IDLE;
          S_CLR:    state <= S_CNT;
          S_CNT:    state <= S_SAMPLE;
          S_SAMPLE: state <= (g_bin == {GCC_W{1'b1}}) ? S_IDLE : S_CNT;
        endcase
      end
    end

  assign g_clr    = (state == S_CLR);
  assign g_inc    = (state == S_CNT);
  assign res_ref  = (state == S_CLR);
  assign conv_clr = (state == S_CLR);
  assign cnt      = (state == S_CNT);
  assign sample   = (state == S_SAMPLE);
  assign busy     = (state != S_IDLE);
  assign rd_sel   = ~conv_sel;
endmodule
