// tb_ro_calib: closes the calibration loop around a replica ring whose
// delay is 20 % slow (SKEW = 1.2).  The loop must lock, with a tune code
// that brings the stage delay within 1 % of the 52 ps target (the code is
// computed here from the ring's delay law), and must stay locked.
module tb_ro_calib;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  localparam real TREF = 25000.0;
  localparam int WINDOW = 16;
  localparam int TARGET = int'(real'(WINDOW) * TREF / (8.0 * 52.0));
  logic clk_ref = 0, rst_n = 0, run, rclr, locked;
  logic [5:0] tune;
  logic [3:0] ring;
  real td;
  int iters = 0;

  ring_osc #(.STAGES(4), .TUNE_W(6), .TD_NOM_PS(52.0), .SKEW(1.2)) replica (
    .run(run), .clr(rclr), .tune(tune), .ring(ring));

  ro_calib #(.TUNE_W(6), .WINDOW(WINDOW), .TARGET(TARGET), .TOL((TARGET + 99) / 100)) dut (
    .clk_ref(clk_ref), .rst_n(rst_n), .ring_last(ring[3]), .replica_run(run),
    .replica_clr(rclr), .tune(tune), .locked(locked));

  always #(TREF / 2.0) clk_ref = ~clk_ref;
  always @(posedge rclr) iters++;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60000 rst_n = 1;
    wait (locked);
    td = 52.0 * 1.2 * (1.0 - 0.01 * real'(int'(tune) - 32));
    checks++;
    if (td > 52.0 * 1.015 || td < 52.0 * 0.985) begin
      failures++;
      $display("FAIL locked at tune %0d, delay %f", tune, td);
    end
    checks++;
    if (iters < 10) begin failures++; $display("FAIL locked too early (%0d)", iters); end
    repeat (5 * (WINDOW + 4)) @(posedge clk_ref);
    checks++;
    if (!locked) begin failures++; $display("FAIL lost lock"); end
    $display("locked after %0d iterations, tune=%0d, stage delay %f ps", iters, tune, td);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
