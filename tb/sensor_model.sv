// sensor_model -- behavioural model of a switching sensor with a response time.
//
// Not synthesizable; for board-level simulation only. The physical event
// (heat, smoke, light, low water level, an object in range) is the input
// `event_in`; the conditioned logic-level output `sense` follows it after the
// sensor's response time RESPONSE_NS, on both edges (transport delay). The
// signal-conditioning divider in front of the logic is folded into this
// model: it only scales the voltage and adds no logic function.
module sensor_model #(
  parameter real RESPONSE_NS = 1.0e6
) (
  input  logic event_in,
  output logic sense
);
  timeunit 1ns;
  timeprecision 1ps;

  initial sense = 1'b0;

  always @(event_in) sense <= #(RESPONSE_NS) event_in;
endmodule
