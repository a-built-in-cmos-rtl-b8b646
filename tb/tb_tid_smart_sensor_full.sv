// tb_tid_smart_sensor_full - one complete measurement of the TID smart
// sensor at its default configuration (256 inverters of 70 ps, 16-bit
// converter, 4-cycle sensor reset) with the 16-pulse setting.
//
// Checks the raw Start-to-Done time of the sensor (31 trips through the
// chain, 555.52 ns), the converted value ceil(555.52 ns / 10 ns) + 1 = 57
// and the request-to-result latency of 4 + 57 + 1 clock cycles.
`timescale 1ns/1ps
module tb_tid_smart_sensor_full;

  logic        clk = 1'b0, rst_n, measure;
  logic [3:0]  cfg;
  logic        busy, valid, tout, s_start, s_done;
  logic [15:0] res;
  int          checks = 0, failures = 0;
  realtime     t_start, t_done;

  always #5 clk = ~clk;

  tid_smart_sensor dut (
    .clk(clk), .rst_n(rst_n), .measure(measure), .pulse_count_cfg(cfg), .busy(busy),
    .result_valid(valid), .delay_cycles(res), .timeout(tout),
    .sensor_start(s_start), .sensor_done(s_done));

  always @(posedge s_start) t_start = $realtime;
  always @(posedge s_done)  t_done  = $realtime;

  task automatic expect_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    rst_n = 1'b0; measure = 1'b0; cfg = 4'd15;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int m = 0; m < 3; m++) begin
      @(posedge clk); #1 measure = 1'b1;
      @(posedge clk); #1 measure = 1'b0;
      lat = 0;
      while (!valid) begin @(posedge clk); #1; lat++; end
      expect_int("reading", int'(res), 57);
      expect_int("no timeout", int'(tout), 0);
      expect_int("latency", lat, 4 + 57 + 1);
      expect_int("Start-to-Done in ps", int'((t_done - t_start) * 1000.0), 555520);
      @(posedge clk); #1;
      expect_int("idle", int'(busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
