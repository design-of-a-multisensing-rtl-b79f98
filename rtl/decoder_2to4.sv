// decoder_2to4 -- binary line decoder used for the individual control actions.
//
// Two sensor inputs select exactly one of four outputs. The selected output
// goes high: y[0] when neither sensor is active, y[1] when only the second input
// is active, y[2] when only the first is active, and y[3] when both are active.
// Each output line can then drive its own actuator, so every sensor (or pair of
// sensors) maps to a distinct action. The design uses three of these decoders
// on the sensor pairs (A1,A2), (C1,C2) and (E1,E2).
//
// Interface: sel[SEL_W-1] is the first input of the pair (A1, C1 or E1) and
// sel[0] the last (A2, C2 or E2); y[i] is high when sel == i. The decoder of
// the original design is 2-to-4 (SEL_W = 2); the width is a parameter so the
// same code also builds wider decoders.
//
// Timing: purely combinational, no clock and no reset. An output follows its
// inputs after the gate delay only, with no pipeline stage.
//
// The output order and the one-hot behaviour follow the original design's
// decoder equations; writing it as a compare against the index is this
// implementation's choice.
module decoder_2to4 #(
  parameter int unsigned SEL_W = 2
) (
  input  logic [SEL_W-1:0]      sel,
  output logic [(1<<SEL_W)-1:0] y
);

  always_comb begin
    for (int unsigned i = 0; i < (1 << SEL_W); i++) begin
      y[i] = (sel == SEL_W'(i));
    end
  end

endmodule
