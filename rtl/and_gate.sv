// and_gate -- N-input AND gate used for the combined control actions.
//
// The output is high only when every input is high. In the control system
// this confirms an event only when several sensors agree, for example a fire
// is signalled only when the thermostat, the smoke detector and the light
// sensor are all active. The original design uses two 3-input gates
// (N = 3, the default).
//
// Interface: in[N-1:0] are the sensor inputs, y is their AND.
//
// Timing: purely combinational, no clock and no reset.
module and_gate #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] in,
  output logic         y
);

  assign y = &in;

endmodule
