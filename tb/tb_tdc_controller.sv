// tb_tdc_controller - self-checking test of the control / time-to-digital unit.
//
// A behavioural sensor in the testbench answers each rising sensor_start
// with a rising sensor_done after a chosen time T (not a whole number of
// clock periods) and clears done on sensor_reset. For each measurement the
// test checks the reset pulse length, that start is only raised after the
// reset, the converted value ceil(T / Tclk) + 1, the one-cycle result_valid
// strobe, the request-to-result latency RESET_CYCLES + delay_cycles + 1 and
// busy. A second controller with a 5-bit counter checks the timeout.
`timescale 1ns/1ps
module tb_tdc_controller;

  localparam realtime TCLK = 10.0;
  localparam int      RST_CYC = 4;

  logic        clk = 1'b0, rst_n;
  logic        measure;
  logic        busy, valid, timeout, s_reset, s_start, s_done;
  logic [15:0] result;
  // Timeout instance.
  logic        busy_t, valid_t, timeout_t, s_reset_t, s_start_t, s_done_t;
  logic [4:0]  result_t;
  realtime     t_done;
  int          checks = 0, failures = 0;
  int          cycle = 0;

  always #(TCLK / 2) clk = ~clk;
  always @(posedge clk) cycle++;

  tdc_controller #(.RESET_CYCLES(RST_CYC)) dut (
    .clk(clk), .rst_n(rst_n), .measure(measure), .busy(busy), .result_valid(valid),
    .delay_cycles(result), .timeout(timeout), .sensor_reset(s_reset),
    .sensor_start(s_start), .sensor_done(s_done));

  tdc_controller #(.TDC_W(5), .RESET_CYCLES(2)) dut_t (
    .clk(clk), .rst_n(rst_n), .measure(measure), .busy(busy_t), .result_valid(valid_t),
    .delay_cycles(result_t), .timeout(timeout_t), .sensor_reset(s_reset_t),
    .sensor_start(s_start_t), .sensor_done(s_done_t));

  // Behavioural sensors: Done follows Start after t_done, reset clears it.
  always @(posedge s_reset) s_done = 1'b0;
  always @(posedge s_start) begin
    if (s_reset) begin failures++; $display("FAIL start while reset"); end
    #(t_done);
    s_done = 1'b1;
  end
  assign s_done_t = 1'b0;  // never answers: forces a timeout

  task automatic expect_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rst_len, req_cycle, exp_val, valid_len;
    rst_n = 1'b0; measure = 1'b0; s_done = 1'b0; t_done = 100.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int m = 0; m < 20; m++) begin
      t_done = 20.0 + real'($urandom_range(0, 900)) + 0.37;
      exp_val = int'($ceil(t_done / TCLK)) + 1;
      #1 measure = 1'b1;
      @(posedge clk);
      #1;
      req_cycle = cycle;
      measure = 1'b0;
      expect_int("busy after request", int'(busy), 1);
      rst_len = 0;
      while (s_reset) begin rst_len++; @(posedge clk); #1; end
      expect_int("sensor reset length", rst_len, RST_CYC);
      expect_int("start raised after reset", int'(s_start), 1);
      while (!valid) begin @(posedge clk); #1; end
      expect_int("delay_cycles", int'(result), exp_val);
      expect_int("no timeout", int'(timeout), 0);
      expect_int("start released", int'(s_start), 0);
      expect_int("latency", cycle - req_cycle, RST_CYC + exp_val + 1);
      valid_len = 0;
      while (valid) begin valid_len++; @(posedge clk); #1; end
      expect_int("valid strobe length", valid_len, 1);
      @(posedge clk); #1;
      expect_int("idle again", int'(busy), 0);
      expect_int("result held", int'(result), exp_val);
      // Let the timeout instance finish too.
      while (busy_t) begin @(posedge clk); #1; end
      repeat (2) @(posedge clk);
    end
    // The timeout instance ran every request into its counter limit.
    #1 measure = 1'b1;
    @(posedge clk);
    #1 measure = 1'b0;
    while (!valid_t) begin @(posedge clk); #1; end
    expect_int("timeout flagged", int'(timeout_t), 1);
    expect_int("timeout value", int'(result_t), 31);
    expect_int("timeout releases start", int'(s_start_t), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
