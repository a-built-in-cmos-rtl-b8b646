// delay_path - behavioural model of the radiation-sensitive inverter chain.
//
// This is a behavioural model, not synthesizable logic: the real part is a
// full-custom chain of N_STAGES minimum-length inverters whose threshold
// voltages shift with absorbed total ionizing dose, which slows every stage.
// Here each stage is an inverter with a transport delay of STAGE_DELAY_PS
// picoseconds; an even number of stages makes the path non-inverting. A
// larger STAGE_DELAY_PS stands for a more irradiated chain.
//
// Interface: in_pulse in, out_pulse out. Timing: out_pulse follows in_pulse
// after N_STAGES * STAGE_DELAY_PS picoseconds.
//
// The document gives the 256-inverter chain. The 70 ps stage delay is this
// design's estimate: with 16 counted pulses (31 trips through the chain in
// this sensor) it gives a Start-to-Done time of about 555 ns, the order of
// the unirradiated readings reported for the prototype.
`timescale 1ns/1ps
module delay_path #(
  parameter int unsigned N_STAGES       = 256,
  parameter int unsigned STAGE_DELAY_PS = 70
) (
  input  logic in_pulse,
  output logic out_pulse
);

  localparam realtime STAGE_DELAY = STAGE_DELAY_PS * 1ps;

  wire [N_STAGES:0] node;

  assign node[0] = in_pulse;

  for (genvar i = 0; i < N_STAGES; i++) begin : g_inv
    assign #(STAGE_DELAY) node[i+1] = ~node[i];
  end

  assign out_pulse = node[N_STAGES];

endmodule
