// tb_tid_dose_sweep - readings of the smart sensor across an irradiation
// campaign.
//
// Six complete sensors, identical except for the inverter delay of their
// chain, stand for one device read at increasing accumulated dose: from
// 70 ps (about 555 ns Start-to-Done with 16 pulses, unirradiated) up to
// 97 ps (about 770 ns, the order of the slowest readings seen after a
// heavy dose). All are triggered together with the 16-pulse setting and
// each reading is checked against ceil(T / 10 ns) + 1 with
// T = 31 * 256 * t_inv. The test also checks that the readings rise
// strictly with the inverter delay, that none overflows the 16-bit
// converter, and repeats the sweep with 8 pulses, where every shift must
// be smaller than with 16.
`timescale 1ns/1ps
module tb_tid_dose_sweep;

  localparam int      NS        = 6;
  localparam int      DELAYS[NS] = '{70, 72, 74, 78, 85, 97};
  localparam realtime TCLK      = 10.0;

  logic        clk = 1'b0, rst_n, measure;
  logic [3:0]  cfg;
  logic [NS-1:0] valid, tout, busy;
  logic [15:0] res [NS];
  int          checks = 0, failures = 0;

  always #(TCLK / 2) clk = ~clk;

  for (genvar i = 0; i < NS; i++) begin : g_dut
    logic s_start, s_done;
    tid_smart_sensor #(.STAGE_DELAY_PS(DELAYS[i])) u_dut (
      .clk(clk), .rst_n(rst_n), .measure(measure), .pulse_count_cfg(cfg), .busy(busy[i]),
      .result_valid(valid[i]), .delay_cycles(res[i]), .timeout(tout[i]),
      .sensor_start(s_start), .sensor_done(s_done));
  end

  task automatic expect_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got [NS];
    int shift16 [NS];
    rst_n = 1'b0; measure = 1'b0; cfg = 4'd15;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (shift16[i]) shift16[i] = 0;
    for (int pass = 0; pass < 2; pass++) begin
      automatic int p = (pass == 0) ? 16 : 8;
      automatic logic [NS-1:0] seen = '0;
      cfg = 4'(p - 1);
      @(posedge clk); #1 measure = 1'b1;
      @(posedge clk); #1 measure = 1'b0;
      while (seen != '1) begin
        @(posedge clk); #1;
        for (int i = 0; i < NS; i++) if (valid[i]) begin
          seen[i] = 1'b1;
          got[i]  = int'(res[i]);
          expect_int($sformatf("%0d pulses, %0d ps reading", p, DELAYS[i]), got[i],
                     int'($ceil((2 * p - 1) * 256 * DELAYS[i] * 0.001 / TCLK)) + 1);
          expect_int($sformatf("%0d pulses, %0d ps no overflow", p, DELAYS[i]), int'(tout[i]), 0);
        end
      end
      for (int i = 1; i < NS; i++) begin
        checks++;
        if (got[i] <= got[i-1]) begin
          failures++;
          $display("FAIL %0d pulses: reading at %0d ps not above %0d ps", p, DELAYS[i], DELAYS[i-1]);
        end
      end
      for (int i = 1; i < NS; i++) begin
        if (pass == 0) shift16[i] = got[i] - got[0];
        else begin
          checks++;
          if (!(got[i] - got[0] < shift16[i])) begin
            failures++;
            $display("FAIL shift at %0d ps with 8 pulses not below the 16-pulse shift", DELAYS[i]);
          end
        end
      end
      $display("%0d pulses: readings %0d %0d %0d %0d %0d %0d cycles", p,
               got[0], got[1], got[2], got[3], got[4], got[5]);
      repeat (5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
