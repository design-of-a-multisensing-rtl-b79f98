// uln2003_model -- behavioural model of a seven-channel Darlington driver
// feeding LEDs, buzzers, lamps and DC motors.
//
// Not synthesizable; for board-level simulation only. Each channel's
// `load_on` follows its logic input after the switching time TAMP_NS on both
// edges (transport delay). load_on high means the channel sinks current and
// its load is powered.
module uln2003_model #(
  parameter real TAMP_NS = 100.0e3
) (
  input  logic [6:0] in,
  output logic [6:0] load_on
);
  timeunit 1ns;
  timeprecision 1ps;

  initial load_on = '0;

  always @(in) load_on <= #(TAMP_NS) in;
endmodule
