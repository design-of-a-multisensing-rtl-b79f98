// sn74373_model -- behavioural model of an octal transparent D latch with
// output enable, as used between the sensors and the logic inputs.
//
// Not synthesizable; for board-level simulation only. While `le` is high the
// outputs follow the inputs; when `le` falls they hold the last value. When
// `oe_n` is high the real part's outputs float; this two-state model drives
// them low instead. The part's own propagation delay is a few nanoseconds
// and is left out.
module sn74373_model (
  input  logic [7:0] d,
  input  logic       le,
  input  logic       oe_n,
  output logic [7:0] q
);
  logic [7:0] held;

  initial held = '0;

  always @(d or le) if (le) held = d;

  assign q = oe_n ? 8'h00 : held;
endmodule
