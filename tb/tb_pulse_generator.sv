// tb_pulse_generator - self-checking test of the sensor's pulse generator.
//
// Drives reset, start, done and echo by hand and compares pulse, after
// every change, with a reference model kept in the testbench: the generator
// is armed by a rising start edge, disarmed by reset, and while armed and
// not done its output is the inverse of echo. Random sequences follow the
// directed ones. A time watchdog ends the run if it hangs.
`timescale 1ns/1ps
module tb_pulse_generator;

  logic reset, start, done, echo, pulse;
  int   checks = 0, failures = 0;
  bit   ref_armed;

  pulse_generator dut (.reset(reset), .start(start), .done(done), .echo(echo), .pulse(pulse));

  task automatic check_out(string what);
    logic exp;
    #1;
    exp = ref_armed & ~done & ~echo;
    checks++;
    if (pulse !== exp) begin
      failures++;
      $display("FAIL %s: pulse=%0b expected %0b (reset=%0b start=%0b done=%0b echo=%0b)",
               what, pulse, exp, reset, start, done, echo);
    end
  endtask

  // Apply one input change, update the reference model, then check.
  task automatic drive(logic r, logic s, logic d, logic e, string what);
    logic old_s = start;
    reset = r; start = s; done = d; echo = e;
    if (r)                 ref_armed = 1'b0;
    else if (s && !old_s)  ref_armed = 1'b1;
    check_out(what);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b0; start = 1'b0; done = 1'b0; echo = 1'b0;
    #1 reset = 1'b1; ref_armed = 1'b0;
    check_out("in reset");
    drive(0, 0, 0, 0, "idle after reset");
    drive(0, 1, 0, 0, "armed by start");
    drive(0, 1, 0, 1, "echo high drives pulse low");
    drive(0, 1, 0, 0, "echo low drives pulse high");
    drive(0, 0, 0, 0, "start low keeps generator armed");
    drive(0, 0, 1, 0, "done stops pulses");
    drive(0, 0, 1, 1, "done holds pulse low");
    drive(1, 0, 0, 0, "reset disarms");
    drive(0, 0, 0, 0, "stays idle after reset");
    drive(0, 0, 0, 1, "echo alone does not start it");
    drive(1, 1, 0, 0, "start during reset is ignored");
    drive(0, 1, 0, 0, "start already high when reset drops");
    // Random sequences.
    for (int i = 0; i < 400; i++) begin
      drive(($urandom_range(0, 9) == 0), 1'($urandom_range(0, 1)), ($urandom_range(0, 3) == 0),
            1'($urandom_range(0, 1)), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
