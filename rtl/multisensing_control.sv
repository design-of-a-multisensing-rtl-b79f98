// multisensing_control -- control logic of a reconfigurable multisensing system.
//
// Six binary sensor signals enter the logic after signal conditioning and an
// input latch on the board. The logic produces two kinds of control action:
//
//  * Individual actions. Three 2-to-4 decoders each take one pair of sensor
//    inputs and raise exactly one of four outputs. Decoder 1 maps (A1,A2) to
//    B1..B4, decoder 2 maps (C1,C2) to D1..D4 and decoder 3 maps (E1,E2) to
//    F1..F4. Output 1 of a group means "neither sensor active", output 2
//    "only the second sensor", output 3 "only the first sensor", output 4
//    "both sensors".
//  * Combined actions. Two 3-input AND gates fire only when all of their
//    sensors are active: G1 = A1 & A2 & C1 and G2 = C2 & E1 & E2. With the
//    thermostat, smoke detector and light sensor wired to A1, A2 and C1, G1
//    confirms a fire.
//
// Changing which actions exist (the "reconfiguration" of the system) is done
// by editing and re-synthesising this module; nothing is programmable at run
// time.
//
// Interface: the inputs and outputs keep the pin names of the original
// design. Vectors b, d and f are numbered 4:1 so that b[1] is B1.
//
// Timing: purely combinational. There is no clock, no reset and no state; an
// output settles one gate-level path after its inputs change (a few
// nanoseconds on the original FPGA, far below the millisecond response times
// of the sensors).
//
// The decoder and gate structure, the input pairing of the decoders and the
// inputs of both AND gates follow the original design. The assignment of
// physical sensors to inputs other than the fire group is a board-level
// choice and not fixed here.
module multisensing_control (
  input  logic       a1,
  input  logic       a2,
  input  logic       c1,
  input  logic       c2,
  input  logic       e1,
  input  logic       e2,
  output logic [4:1] b,
  output logic [4:1] d,
  output logic [4:1] f,
  output logic       g1,
  output logic       g2
);

  // Individual actions: one decoder per sensor pair.
  decoder_2to4 #(.SEL_W(2)) u_dec_first  (.sel({a1, a2}), .y(b));
  decoder_2to4 #(.SEL_W(2)) u_dec_second (.sel({c1, c2}), .y(d));
  decoder_2to4 #(.SEL_W(2)) u_dec_third  (.sel({e1, e2}), .y(f));

  // Combined actions: both gates need all three of their sensors active.
  and_gate #(.N(3)) u_and_first  (.in({a1, a2, c1}), .y(g1));
  and_gate #(.N(3)) u_and_second (.in({c2, e1, e2}), .y(g2));

endmodule
