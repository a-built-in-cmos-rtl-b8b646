// tb_delay_path - self-checking test of the inverter-chain delay model.
//
// Sends rising and falling edges through the 256-stage chain at its default
// stage delay and through a short 8-stage chain with a larger stage delay,
// timestamps each output edge and checks that the output has the input's
// polarity and lags it by exactly stages x stage delay. It also checks that
// the output does not move before that time.
`timescale 1ns/1ps
module tb_delay_path;

  logic in_a, out_a, in_b, out_b;
  int   checks = 0, failures = 0;

  delay_path dut_a (.in_pulse(in_a), .out_pulse(out_a));
  delay_path #(.N_STAGES(8), .STAGE_DELAY_PS(125)) dut_b (.in_pulse(in_b), .out_pulse(out_b));

  task automatic expect_eq(string what, realtime got, realtime exp);
    checks++;
    if (got < exp - 0.0005 || got > exp + 0.0005) begin
      failures++;
      $display("FAIL %s: got %0.3f ns expected %0.3f ns", what, got, exp);
    end
  endtask

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    in_a = 1'b0; in_b = 1'b0;
    #100;
    expect_bit("A settles low", out_a, 1'b0);
    expect_bit("B settles low", out_b, 1'b0);
    for (int e = 0; e < 6; e++) begin
      automatic logic v = (e % 2 == 0);
      // 256 x 70 ps = 17.92 ns
      t0 = $realtime;
      in_a = v;
      #17.9;
      expect_bit("A not yet switched", out_a, !v);
      wait (out_a == v);
      expect_eq("A delay", $realtime - t0, 17.92);
      #20;
      // 8 x 125 ps = 1 ns
      t0 = $realtime;
      in_b = v;
      #0.99;
      expect_bit("B not yet switched", out_b, !v);
      wait (out_b == v);
      expect_eq("B delay", $realtime - t0, 1.0);
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
