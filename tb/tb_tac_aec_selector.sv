// tb_tac_aec_selector: in TAC mode the acquiring stage must charge from the
// first EVENT to the next STOP edge only (later events and earlier STOPs
// ignored) and the other stage never; in AEC mode the acquiring stage
// charges exactly during each EVENT pulse.  Measures the charging time of
// each stage and compares it with the expected one.
module tb_tac_aec_selector;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic event_i = 0, stop = 0, clr = 0, mode_aec = 0, acq_sel = 0;
  logic charge1, charge2;
  realtime on1 = 0, on2 = 0, t1, t2;

  tac_aec_selector dut (.*);

  always @(posedge charge1) t1 = $realtime;
  always @(negedge charge1) on1 += $realtime - t1;
  always @(posedge charge2) t2 = $realtime;
  always @(negedge charge2) on2 += $realtime - t2;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_on(input real e1, input real e2);
    checks += 2;
    if (on1 > e1 + 0.5 || on1 < e1 - 0.5) begin failures++; $display("FAIL stage1 %f exp %f", on1, e1); end
    if (on2 > e2 + 0.5 || on2 < e2 - 0.5) begin failures++; $display("FAIL stage2 %f exp %f", on2, e2); end
    on1 = 0; on2 = 0;
  endtask

  // periodic STOP, 25 ns period, high 2 ns
  task automatic stop_pulse();
    stop = 1; #2000 stop = 0;
  endtask

  initial begin
    int d;
    #1000;
    for (int i = 0; i < 20; i++) begin
      acq_sel = i[0];
      mode_aec = 0;
      clr = 1; #100 clr = 0;
      // a STOP before the photon is ignored
      stop_pulse(); #3000;
      d = 500 + $urandom % 15000;
      event_i = 1; #300 event_i = 0;
      #(d - 300);
      stop_pulse();
      // a second photon after STOP must not restart the ramp
      #1000 event_i = 1; #300 event_i = 0;
      #2000 stop_pulse();
      #100;
      if (acq_sel) expect_on(0, d); else expect_on(d, 0);
      // AEC: three pulses of random width
      mode_aec = 1;
      clr = 1; #100 clr = 0;
      d = 0;
      for (int p = 0; p < 3; p++) begin
        int w;
        w = 200 + $urandom % 800;
        d += w;
        #500 event_i = 1; #(w) event_i = 0;
        stop_pulse();
      end
      #100;
      if (acq_sel) expect_on(0, d); else expect_on(d, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
