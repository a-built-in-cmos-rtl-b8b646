// tid_pkg - constants and types shared by the TID delay-path sensor.
//
// The sensor counts pulses that circulate through a radiation-sensitive
// inverter chain; the counter constant is 4 bits wide and the fabricated
// sensor uses the largest 4-bit pulse count (16 pulses). The encoding of the
// constant (pulses counted = constant + 1) is this design's choice. The
// controller state type belongs to the clocked control/time-to-digital unit,
// whose structure is also this design's own.
`timescale 1ns/1ps
package tid_pkg;

  // Width of the pulse-count constant (the document: a 4-bit pulse count).
  localparam int unsigned CNT_W = 4;

  // States of the external control / time-to-digital converter.
  typedef enum logic [1:0] {
    CTRL_IDLE  = 2'd0,  // waiting for a measurement request
    CTRL_RESET = 2'd1,  // holding the sensor registers in reset
    CTRL_RUN   = 2'd2,  // Start high, counting reference cycles until Done
    CTRL_DONE  = 2'd3   // result presented, Start released
  } ctrl_state_t;

endpackage
