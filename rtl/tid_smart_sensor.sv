// tid_smart_sensor - total-ionizing-dose smart sensor: the self-timed
// delay-path sensor together with its control and time-to-digital interface.
//
// A measurement request makes the controller reset the sensor, raise Start
// and count reference clock cycles until the sensor's Done comes back. The
// sensor's Start-to-Done time is set by 2 * (pulse_count_cfg + 1) - 1 trips
// through a 256-inverter chain whose delay grows with absorbed dose, so the
// count in delay_cycles rises with dose; a larger pulse count gives a larger
// change per unit of dose. The sensor core runs without a clock; only the
// controller uses clk.
//
// Interface: clk, rst_n (synchronous, active low), measure, pulse_count_cfg
// (4-bit counter constant, 15 = 16 pulses as in the fabricated sensor);
// busy, result_valid (one-cycle strobe), delay_cycles, timeout, and the raw
// sensor handshake sensor_start / sensor_done for observation.
// Timing: see tdc_controller; with the default 70 ps stage delay and 16
// pulses a conversion takes about 555 ns (about 58 cycles of a 100 MHz
// clock).
//
// The three-block sensor, the chain length and the 4-bit counter follow the
// document; the clocked controller, its reference clock and the widths of
// the result are this design's choices.
`timescale 1ns/1ps
module tid_smart_sensor #(
  parameter int unsigned N_STAGES       = 256,
  parameter int unsigned STAGE_DELAY_PS = 70,
  parameter int unsigned TDC_W          = 16,
  parameter int unsigned RESET_CYCLES   = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      measure,
  input  logic [tid_pkg::CNT_W-1:0] pulse_count_cfg,
  output logic                      busy,
  output logic                      result_valid,
  output logic [TDC_W-1:0]          delay_cycles,
  output logic                      timeout,
  output logic                      sensor_start,
  output logic                      sensor_done
);

  logic sensor_reset;

  tdc_controller #(
    .TDC_W        (TDC_W),
    .RESET_CYCLES (RESET_CYCLES)
  ) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .measure      (measure),
    .busy         (busy),
    .result_valid (result_valid),
    .delay_cycles (delay_cycles),
    .timeout      (timeout),
    .sensor_reset (sensor_reset),
    .sensor_start (sensor_start),
    .sensor_done  (sensor_done)
  );

  tid_sensor #(
    .N_STAGES       (N_STAGES),
    .STAGE_DELAY_PS (STAGE_DELAY_PS)
  ) u_sensor (
    .reset     (sensor_reset),
    .start     (sensor_start),
    .count_cfg (pulse_count_cfg),
    .done      (sensor_done)
  );

endmodule
