// tdc_controller - clocked control and time-to-digital converter for the
// self-timed TID sensor.
//
// The sensor itself has no clock: it answers a rising Start with a rising
// Done after a time that grows with the absorbed dose. This block plays the
// part of the external control system. On a measure request it asserts
// sensor_reset for RESET_CYCLES clock cycles (clearing the sensor's pulse
// generator and counter), then raises sensor_start and counts reference
// clock cycles until the asynchronous sensor_done, passed through a
// two-flop synchronizer, is seen high. It then releases sensor_start,
// stores the count in delay_cycles and pulses result_valid for one cycle.
// If the count reaches its all-ones value before Done arrives the
// conversion is abandoned and timeout is set with the result.
// sensor_reset is high while rst_n is low and during the RESET state, and
// low otherwise, so every measurement gives the sensor's asynchronous-reset
// registers a fresh rising reset edge.
//
// Interface: clk, rst_n (synchronous, active low), measure (request, taken
// in IDLE), busy, result_valid, delay_cycles[TDC_W-1:0], timeout; sensor side
// sensor_reset, sensor_start, sensor_done.
// Timing: for a Start-to-Done time T that is not a whole number of clock
// periods Tclk, delay_cycles = ceil(T / Tclk) + 1 (the synchronizer adds its
// fixed latency). The resolution is one clock period. A full measurement
// takes RESET_CYCLES + delay_cycles + 1 cycles from the clock edge that
// accepts the request to the one that raises result_valid.
//
// The document states what the control does (reset the sensor registers,
// excite Start, wait for Done) and that a time-to-digital converter is
// needed; the counter-based converter, its width, the reset length and the
// timeout are this design's choices.
`timescale 1ns/1ps
module tdc_controller
  import tid_pkg::*;
#(
  parameter int unsigned TDC_W        = 16,
  parameter int unsigned RESET_CYCLES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             measure,
  output logic             busy,
  output logic             result_valid,
  output logic [TDC_W-1:0] delay_cycles,
  output logic             timeout,
  output logic             sensor_reset,
  output logic             sensor_start,
  input  logic             sensor_done
);

  localparam int unsigned RST_W = (RESET_CYCLES > 1) ? $clog2(RESET_CYCLES) : 1;

  ctrl_state_t      state;
  logic [1:0]       done_sync;
  logic [RST_W-1:0] rst_cnt;
  logic [TDC_W-1:0] count;

  // Two-flop synchronizer for the asynchronous Done.
  always_ff @(posedge clk) begin
    if (!rst_n) done_sync <= '0;
    else        done_sync <= {done_sync[0], sensor_done};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= CTRL_IDLE;
      rst_cnt      <= '0;
      count        <= '0;
      delay_cycles <= '0;
      timeout      <= 1'b0;
      result_valid <= 1'b0;
      sensor_reset <= 1'b1;
      sensor_start <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      unique case (state)
        CTRL_IDLE: begin
          sensor_start <= 1'b0;
          sensor_reset <= 1'b0;
          if (measure) begin
            state        <= CTRL_RESET;
            sensor_reset <= 1'b1;
            rst_cnt      <= '0;
          end
        end
        CTRL_RESET: begin
          if (rst_cnt == RST_W'(RESET_CYCLES - 1)) begin
            state        <= CTRL_RUN;
            sensor_reset <= 1'b0;
            sensor_start <= 1'b1;
            count        <= '0;
          end else begin
            rst_cnt <= rst_cnt + 1'b1;
          end
        end
        CTRL_RUN: begin
          if (done_sync[1] || count == '1) begin
            state        <= CTRL_DONE;
            sensor_start <= 1'b0;
            delay_cycles <= count;
            timeout      <= !done_sync[1];
            result_valid <= 1'b1;
          end else begin
            count <= count + 1'b1;
          end
        end
        CTRL_DONE: begin
          state <= CTRL_IDLE;
        end
        default: state <= CTRL_IDLE;
      endcase
    end
  end

  always_comb busy = (state != CTRL_IDLE);

  // A new conversion only starts after the sensor has been reset.
  a_start_after_reset: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(sensor_start) |-> $past(sensor_reset));
  // Start and reset are never asserted together.
  a_no_start_in_reset: assert property (@(posedge clk) disable iff (!rst_n)
    !(sensor_start && sensor_reset));

endmodule
