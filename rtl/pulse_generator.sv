// pulse_generator - self-timed pulse source of the TID sensor.
//
// A rising edge on start sets the "armed" register (cleared asynchronously
// by reset). While armed and while the counter has not raised done, the
// output is the inverse of the delay-path output (echo). Because the
// 256-stage delay path does not invert, pulse -> delay path -> echo -> pulse
// forms a ring oscillator whose half period is one trip through the delay
// path: the generator launches a new edge each time the previous one comes
// back, so the circuit needs no clock. When done rises the output is forced
// low and the ring stops.
//
// Interface: reset, start, done, echo in; pulse out. There is no clock.
// Timing: pulse rises as soon as start has armed the register (echo is low
// after reset); afterwards each echo edge produces the opposite pulse edge
// after one gate delay.
//
// The document gives the block's role (self-timed internal clock, armed by
// Start, stopped by Done, reset by the control, Fig. 1). Closing the loop
// through the delay path and the NAND-style gating are this design's
// choices. The loop through the delay path is intentional: a tool that
// flattens the sensor will see it as a combinational loop.
`timescale 1ns/1ps
module pulse_generator (
  input  logic reset,  // asynchronous, active high
  input  logic start,  // rising edge starts a conversion
  input  logic done,   // from the pulse counter
  input  logic echo,   // output of the delay path
  output logic pulse   // into the delay path
);

  logic armed;

  always_ff @(posedge start or posedge reset) begin
    if (reset) armed <= 1'b0;
    else       armed <= 1'b1;
  end

  always_comb pulse = armed & ~done & ~echo;

endmodule
