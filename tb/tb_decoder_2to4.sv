// tb_decoder_2to4 -- self-checking test of the 2-to-4 decoder.
//
// Applies all four input codes and compares every output line with the
// decoder's truth table written out gate by gate (output 1 = neither input,
// 2 = second input only, 3 = first input only, 4 = both). Also checks that
// exactly one line is high. The decoder is combinational, so outputs are
// sampled one time unit after each input change, with no clock.
module tb_decoder_2to4;
  logic [1:0] sel;
  logic [3:0] y;
  int checks = 0;
  int failures = 0;

  decoder_2to4 dut (.sel(sel), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic first, second;
    logic [3:0] exp;
    for (int k = 0; k < 4; k++) begin
      first  = k[1];
      second = k[0];
      sel    = {first, second};
      #1;
      exp[0] = !first && !second;
      exp[1] = !first &&  second;
      exp[2] =  first && !second;
      exp[3] =  first &&  second;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL sel=%b y=%b expected %b", sel, y, exp);
      end
      checks++;
      if ($countones(y) != 1) begin
        failures++;
        $display("FAIL sel=%b y=%b is not one-hot", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
