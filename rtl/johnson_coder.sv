// johnson_coder: fine-time coder of the ring-oscillator TDC.
// A ring of four delay stages whose last stage feeds back inverted steps
// through eight states per oscillation period (0000, 0001, 0011, 0111, 1111,
// 1110, 1100, 1000 with node 0 as bit 0), exactly like a 4-bit Johnson counter.
// The number of stage delays elapsed within the period is the fine code:
//   node3 = 0 : fine = number of ones on nodes 0..2
//   node3 = 1 : fine = 4 + number of zeros on nodes 0..2
// Using a power-of-two number of stages makes this mapping a plain 3-bit
// binary code, as the architecture intends.  Purely combinational.
module johnson_coder #(
  parameter int unsigned STAGES = 4
) (
  input  logic [STAGES-1:0]         ring,   // frozen ring node levels, node 0 first
  output logic [$clog2(2*STAGES)-1:0] fine  // stage delays elapsed in the current period
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    logic [$clog2(2*STAGES)-1:0] ones;
    ones = '0;
    for (int i = 0; i < STAGES - 1; i++) ones += ring[i];
    if (ring[STAGES-1]) fine = STAGES[$clog2(2*STAGES)-1:0] + (STAGES[$clog2(2*STAGES)-1:0] - 1'b1 - ones);
    else                fine = ones;
  end
endmodule
