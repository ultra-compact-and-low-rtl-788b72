// ro_calib: calibration loop of the RO-TDC array.
// It locks the ring-oscillator stage delay to a stable reference clock by
// adjusting the shared bias code 'tune' (the NMOS tail-current gate voltage of
// every ring stage).  A replica ring is run for WINDOW reference cycles while
// a counter counts its periods (falling edges of its last node).  The ring is
// then stopped, and after two settling cycles the count is compared with
// TARGET: too few periods -> tune + 1 (faster), too many -> tune - 1, within
// +/- TOL -> locked.  The replica is then cleared and the next window starts.
// This is a frequency-locked, bang-bang loop; one iteration takes
// WINDOW + 4 reference cycles.  replica_clr, decoded from the state, is the
// asynchronous clear of the period counter and of the replica ring, which
// lint reports as a state flopped both synchronously and asynchronously;
// that is intended.
module ro_calib #(
  parameter int unsigned TUNE_W = 6,
  parameter int unsigned CNT_W  = 16,
  parameter int unsigned WINDOW = 64,      // reference cycles per measurement
  parameter int unsigned TARGET = 3846,    // ring periods expected in WINDOW
  parameter int unsigned TOL    = 38       // accepted error, in periods
) (
  input  logic              clk_ref,
  input  logic              rst_n,
  input  logic              ring_last,    // last node of the replica ring
  output logic              replica_run,
  output logic              replica_clr,
  output logic [TUNE_W-1:0] tune,
  output logic              locked
);
  timeunit 1ps; timeprecision 1fs;

  typedef enum logic [1:0] {C_CLEAR, C_RUN, C_SETTLE, C_UPDATE} cstate_t;
  cstate_t state;

  logic [$clog2(WINDOW+1)-1:0] tcount;
  logic [CNT_W-1:0]            periods;

  // period counter, clocked by the replica ring itself
  coarse_counter #(.W(CNT_W)) u_periods (
    .clk(~ring_last), .clr(replica_clr), .en(1'b1), .count(periods)
  );

  always_ff @(posedge clk_ref or negedge rst_n)
    if (!rst_n) begin
      state  <= C_CLEAR;
      tcount <= '0;
      tune   <= TUNE_W'(2 ** (TUNE_W - 1));
      locked <= 1'b0;
    end else begin
      unique case (state)
        C_CLEAR: begin
          tcount <= '0;
          state  <= C_RUN;
        end
        C_RUN: begin
          tcount <= tcount + 1'b1;
          if (32'(tcount) == WINDOW - 1) begin
            tcount <= '0;
            state  <= C_SETTLE;
          end
        end
        C_SETTLE: begin
          tcount <= tcount + 1'b1;
          if (32'(tcount) == 1) state <= C_UPDATE;
        end
        C_UPDATE: begin
          if (32'(periods) + TOL < TARGET) begin
            locked <= 1'b0;
            if (tune != '1) tune <= tune + 1'b1;
          end else if (32'(periods) > TARGET + TOL) begin
            locked <= 1'b0;
            if (tune != '0) tune <= tune - 1'b1;
          end else begin
            locked <= 1'b1;
          end
          state <= C_CLEAR;
        end
      endcase
    end

  assign replica_run = (state == C_RUN);
  assign replica_clr = (state == C_CLEAR);
endmodule
