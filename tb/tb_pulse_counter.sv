// tb_pulse_counter - self-checking test of the Done counter.
//
// For every value of the 4-bit counter constant, resets the counter, sends
// rising edges on pulse_in and checks that done rises on edge number
// constant + 1 and not before, and that it then stays high for further
// edges until the next reset. Covers the 8, 12 and 16 pulse settings.
`timescale 1ns/1ps
module tb_pulse_counter;

  logic       reset, pulse_in, done;
  logic [3:0] cfg;
  int         checks = 0, failures = 0;

  pulse_counter dut (.reset(reset), .pulse_in(pulse_in), .count_cfg(cfg), .done(done));

  task automatic expect_done(string what, logic exp, int c, int n);
    checks++;
    if (done !== exp) begin
      failures++;
      $display("FAIL %s cfg=%0d edge=%0d: done=%0b expected %0b", what, c, n, done, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b0; pulse_in = 1'b0; cfg = 4'd0;
    #1 reset = 1'b1;
    #5;
    for (int c = 0; c < 16; c++) begin
      cfg = 4'(c);
      reset = 1'b0; #1 reset = 1'b1; #5;
      expect_done("in reset", 1'b0, c, 0);
      reset = 1'b0; #5;
      for (int n = 1; n <= c + 4; n++) begin
        pulse_in = 1'b1; #5;
        expect_done("after edge", (n >= c + 1), c, n);
        pulse_in = 1'b0; #5;
      end
    end
    // Reset in the middle of a count starts over.
    cfg = 4'd15;
    reset = 1'b1; #5; reset = 1'b0; #5;
    for (int n = 0; n < 10; n++) begin pulse_in = 1'b1; #5; pulse_in = 1'b0; #5; end
    reset = 1'b1; #5; reset = 1'b0; #5;
    for (int n = 1; n <= 16; n++) begin
      pulse_in = 1'b1; #5;
      expect_done("restart", (n == 16), 15, n);
      pulse_in = 1'b0; #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
