// tb_tid_sensor - self-checking test of the self-timed sensor core.
//
// Two sensors run side by side: one with the default 70 ps inverter delay
// (unirradiated) and one with 80 ps (standing for a dose-degraded chain).
// For pulse counts 8, 12 and 16 the test resets both, raises start and
// times the rising edge of done. The expected Start-to-Done time is
// (2 * pulses - 1) trips through 256 stages. It also counts the pulses that
// reach the counter, checks that the ring stops once done is high, and that
// a reset in the middle of a conversion aborts it cleanly.
`timescale 1ns/1ps
module tb_tid_sensor;

  localparam int unsigned N = 256;

  logic       reset, start;
  logic [3:0] cfg;
  logic       done_f, done_i;
  int         checks = 0, failures = 0;
  int         edges_f, edges_after;
  bit         counting;

  tid_sensor dut_f (.reset(reset), .start(start), .count_cfg(cfg), .done(done_f));
  tid_sensor #(.STAGE_DELAY_PS(80)) dut_i (.reset(reset), .start(start), .count_cfg(cfg), .done(done_i));

  // Pulses reaching the counter of the unirradiated sensor.
  always @(posedge dut_f.delayed) if (counting) edges_f++;
  always @(dut_f.pulse)           if (done_f)   edges_after++;

  task automatic expect_time(string what, realtime got, realtime exp);
    checks++;
    if (got < exp - 0.001 || got > exp + 0.001) begin
      failures++;
      $display("FAIL %s: %0.3f ns expected %0.3f ns", what, got, exp);
    end
  endtask

  task automatic expect_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int      pulses_list[3] = '{8, 12, 16};
    realtime t0, tf, ti, prev_shift;
    reset = 1'b0; start = 1'b0; cfg = 4'd15; counting = 0;
    #1 reset = 1'b1;
    edges_f = 0; edges_after = 0;
    prev_shift = 0;
    #50;
    foreach (pulses_list[k]) begin
      automatic int p = pulses_list[k];
      cfg = 4'(p - 1);
      reset = 1'b0; start = 1'b0; #1 reset = 1'b1; #50;
      expect_int("done low in reset", int'(done_f | done_i), 0);
      reset = 1'b0; #50;
      edges_f = 0; counting = 1;
      t0 = $realtime;
      start = 1'b1;
      fork
        begin wait (done_f); tf = $realtime; end
        begin wait (done_i); ti = $realtime; end
      join
      counting = 0;
      expect_time($sformatf("unirradiated Start-to-Done, %0d pulses", p), tf - t0,
                  (2 * p - 1) * N * 0.070);
      expect_time($sformatf("irradiated Start-to-Done, %0d pulses", p), ti - t0,
                  (2 * p - 1) * N * 0.080);
      expect_int($sformatf("pulses counted, %0d pulses", p), edges_f, p);
      // More pulses, more shift for the same degradation.
      checks++;
      if (!((ti - tf) > prev_shift)) begin
        failures++;
        $display("FAIL shift with %0d pulses not larger than with fewer", p);
      end
      prev_shift = ti - tf;
      // The ring must stop once Done is high.
      edges_after = 0;
      #(3 * N * 0.080);
      expect_int("pulse edges after done", edges_after, 0);
      expect_int("done held", int'(done_f & done_i), 1);
      start = 1'b0;
    end
    // Reset in the middle of a conversion, then a full conversion.
    cfg = 4'd15;
    reset = 1'b0; #1 reset = 1'b1; #50; reset = 1'b0; #50;
    start = 1'b1; #200;
    reset = 1'b1; #1;
    expect_int("reset stops the ring", int'(dut_f.pulse), 0);
    start = 1'b0; #100;
    expect_int("done low after abort", int'(done_f), 0);
    reset = 1'b0; #50;
    t0 = $realtime; start = 1'b1;
    wait (done_f); tf = $realtime;
    expect_time("conversion after abort", tf - t0, 31 * N * 0.070);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
