// tid_sensor - self-timed total-ionizing-dose sensor core.
//
// Three blocks in a loop: the pulse generator launches edges into the
// radiation-sensitive delay path, the delay path returns them to the
// generator (so the pair oscillates with a half period of one trip through
// the chain) and to the counter, and the counter raises done after
// count_cfg + 1 pulses, which stops the generator. The time from the rising
// edge of start to the rising edge of done is therefore about
// (2 * (count_cfg + 1) - 1) trips through the delay path and grows with the
// absorbed dose; it is the sensor's reading. Increasing the pulse count
// raises both the conversion time and the sensitivity to dose.
//
// Interface: reset (asynchronous, active high; clears the generator and the
// counter registers), start (rising edge begins a conversion; keep it high
// until done), count_cfg (pulse-count constant), done. There is no clock.
//
// Structure and signal names follow the document's block diagram; the
// feedback of the delay-path output into the pulse generator is this
// design's reading of how a self-timed generator paces its pulses. The
// ring through pulse_generator and delay_path is an intended combinational
// loop (a ring oscillator).
`timescale 1ns/1ps
module tid_sensor #(
  parameter int unsigned N_STAGES       = 256,
  parameter int unsigned STAGE_DELAY_PS = 70,
  parameter int unsigned CNT_W          = tid_pkg::CNT_W
) (
  input  logic             reset,
  input  logic             start,
  input  logic [CNT_W-1:0] count_cfg,
  output logic             done
);

  logic pulse;    // pulse generator -> delay path
  logic delayed;  // delay path -> counter and pulse generator

  pulse_generator u_pulse_gen (
    .reset (reset),
    .start (start),
    .done  (done),
    .echo  (delayed),
    .pulse (pulse)
  );

  delay_path #(
    .N_STAGES       (N_STAGES),
    .STAGE_DELAY_PS (STAGE_DELAY_PS)
  ) u_delay_path (
    .in_pulse  (pulse),
    .out_pulse (delayed)
  );

  pulse_counter #(
    .CNT_W (CNT_W)
  ) u_counter (
    .reset     (reset),
    .pulse_in  (delayed),
    .count_cfg (count_cfg),
    .done      (done)
  );

endmodule
