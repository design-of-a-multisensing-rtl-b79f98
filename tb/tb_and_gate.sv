// tb_and_gate -- self-checking test of the 3-input AND gate.
//
// Applies all eight input combinations and expects the output high only for
// the combination with every input high. Combinational: sampled one time
// unit after each change, no clock.
module tb_and_gate;
  logic [2:0] in;
  logic       y;
  int checks = 0;
  int failures = 0;

  and_gate #(.N(3)) dut (.in(in), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      in = 3'(k);
      #1;
      checks++;
      if (y !== (k == 7)) begin
        failures++;
        $display("FAIL in=%b y=%b", in, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
