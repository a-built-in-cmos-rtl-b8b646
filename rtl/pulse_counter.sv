// pulse_counter - counts the pulses that leave the delay path and raises Done.
//
// The counter register is clocked by the delay-path output itself, so it
// needs no system clock. Each rising edge of pulse_in increments count;
// the edge that arrives when count already equals the constant count_cfg
// sets done instead, so done rises on pulse number count_cfg + 1. done
// stays high, and the counter holds, until reset. With the 4-bit constant
// at its largest value (15) the counter waits for 16 pulses, the setting of
// the fabricated sensor; smaller constants give a shorter conversion and a
// proportionally smaller sensitivity to dose.
//
// Interface: reset (asynchronous, active high), pulse_in, count_cfg[CNT_W-1:0]
// in; done out. Timing: done is a register output that rises one clock-to-Q
// after the counted edge of pulse_in.
//
// The document gives the width (4 bits), the 16-pulse setting and the role
// of the block; the "constant + 1" encoding is this design's choice.
`timescale 1ns/1ps
module pulse_counter #(
  parameter int unsigned CNT_W = tid_pkg::CNT_W
) (
  input  logic             reset,
  input  logic             pulse_in,
  input  logic [CNT_W-1:0] count_cfg,
  output logic             done
);

  logic [CNT_W-1:0] count;

  always_ff @(posedge pulse_in or posedge reset) begin
    if (reset) begin
      count <= '0;
      done  <= 1'b0;
    end else if (!done) begin
      if (count == count_cfg) done  <= 1'b1;
      else                    count <= count + 1'b1;
    end
  end

endmodule
