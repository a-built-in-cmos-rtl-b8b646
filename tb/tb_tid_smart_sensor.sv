// tb_tid_smart_sensor - end-to-end test of the TID smart sensor.
//
// Three complete sensors share a 100 MHz clock and the measurement
// requests: one unirradiated (70 ps per inverter), one standing for a
// dose-degraded chain (80 ps per inverter) and one with a 5-bit converter
// that is too short for the 12 and 16 pulse conversions. For the 8, 12 and 16 pulse settings
// it checks the converted value against ceil(T / 10 ns) + 1 with
// T = (2 * pulses - 1) * 256 * stage delay, that the degraded sensor reads
// higher and that the difference grows with the pulse count, that the ring
// stops after Done, and that the short converter reports a timeout when
// the reading overflows it. Each of
// these mechanisms is counted and must occur at least once.
`timescale 1ns/1ps
module tb_tid_smart_sensor;

  localparam realtime TCLK = 10.0;

  logic        clk = 1'b0, rst_n, measure;
  logic [3:0]  cfg;
  logic        busy_f, valid_f, tout_f, start_f, done_f;
  logic        busy_i, valid_i, tout_i, start_i, done_i;
  logic        busy_t, valid_t, tout_t, start_t, done_t;
  logic [15:0] res_f, res_i;
  logic [4:0]  res_t;
  int          checks = 0, failures = 0;
  int          n_conv = 0, n_cfg8 = 0, n_cfg12 = 0, n_cfg16 = 0, n_shift = 0, n_shift_grow = 0;
  int          n_timeout = 0, n_ring_stop = 0, ring_edges = 0;
  bit          watch_ring = 0;

  always #(TCLK / 2) clk = ~clk;

  tid_smart_sensor u_fresh (
    .clk(clk), .rst_n(rst_n), .measure(measure), .pulse_count_cfg(cfg), .busy(busy_f),
    .result_valid(valid_f), .delay_cycles(res_f), .timeout(tout_f),
    .sensor_start(start_f), .sensor_done(done_f));

  tid_smart_sensor #(.STAGE_DELAY_PS(80)) u_irr (
    .clk(clk), .rst_n(rst_n), .measure(measure), .pulse_count_cfg(cfg), .busy(busy_i),
    .result_valid(valid_i), .delay_cycles(res_i), .timeout(tout_i),
    .sensor_start(start_i), .sensor_done(done_i));

  tid_smart_sensor #(.TDC_W(5)) u_short (
    .clk(clk), .rst_n(rst_n), .measure(measure), .pulse_count_cfg(cfg), .busy(busy_t),
    .result_valid(valid_t), .delay_cycles(res_t), .timeout(tout_t),
    .sensor_start(start_t), .sensor_done(done_t));

  // Activity of the unirradiated ring after its Done.
  always @(u_fresh.u_sensor.pulse) if (watch_ring) ring_edges++;

  task automatic expect_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pulses_list[3] = '{8, 12, 16};
    int prev_shift = 0;
    rst_n = 1'b0; measure = 1'b0; cfg = 4'd15;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      prev_shift = 0;
      foreach (pulses_list[k]) begin
        automatic int      p   = pulses_list[k];
        automatic realtime t_f = (2 * p - 1) * 256 * 0.070;
        automatic realtime t_i = (2 * p - 1) * 256 * 0.080;
        automatic int      e_f = int'($ceil(t_f / TCLK)) + 1;
        automatic int      e_i = int'($ceil(t_i / TCLK)) + 1;
        automatic bit got_f = 0, got_i = 0, got_t = 0;
        cfg = 4'(p - 1);
        @(posedge clk); #1 measure = 1'b1;
        @(posedge clk); #1 measure = 1'b0;
        while (!(got_f && got_i && got_t)) begin
          @(posedge clk); #1;
          if (valid_f) begin
            got_f = 1; n_conv++;
            expect_int($sformatf("unirradiated reading, %0d pulses", p), int'(res_f), e_f);
            expect_int("unirradiated no timeout", int'(tout_f), 0);
            // Done has stopped the ring: no further pulse edges.
            ring_edges = 0; watch_ring = 1;
          end
          if (valid_i) begin
            got_i = 1; n_conv++;
            expect_int($sformatf("irradiated reading, %0d pulses", p), int'(res_i), e_i);
          end
          if (valid_t) begin
            got_t = 1;
            // A 5-bit converter holds readings up to 31 cycles only.
            expect_int("short converter timeout flag", int'(tout_t), int'(e_f > 31));
            expect_int("short converter reading", int'(res_t), (e_f > 31) ? 31 : e_f);
            if (tout_t) n_timeout++;
          end
        end
        repeat (60) @(posedge clk);
        #1 watch_ring = 0;
        expect_int("ring stopped after Done", ring_edges, 0);
        if (ring_edges == 0) n_ring_stop++;
        checks++;
        if (res_i > res_f) n_shift++;
        else begin failures++; $display("FAIL dose shift not seen, %0d pulses", p); end
        checks++;
        if (int'(res_i) - int'(res_f) > prev_shift) n_shift_grow++;
        else begin failures++; $display("FAIL shift does not grow with pulses (%0d)", p); end
        prev_shift = int'(res_i) - int'(res_f);
        case (p)
          8:  n_cfg8++;
          12: n_cfg12++;
          default: n_cfg16++;
        endcase
      end
    end
    expect_seen("conversion", n_conv);
    expect_seen("8-pulse setting", n_cfg8);
    expect_seen("12-pulse setting", n_cfg12);
    expect_seen("16-pulse setting", n_cfg16);
    expect_seen("dose-induced delay shift", n_shift);
    expect_seen("sensitivity growing with pulse count", n_shift_grow);
    expect_seen("converter timeout", n_timeout);
    expect_seen("Done stops the pulse generator", n_ring_stop);
    $display("mechanisms: conversions=%0d cfg8=%0d cfg12=%0d cfg16=%0d shift=%0d shift_grow=%0d timeout=%0d ring_stop=%0d",
             n_conv, n_cfg8, n_cfg12, n_cfg16, n_shift, n_shift_grow, n_timeout, n_ring_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
