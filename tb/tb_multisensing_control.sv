// tb_multisensing_control -- end-to-end test of the multisensing control logic.
//
// Runs the top level at its default (and only) configuration through:
//  1. all 64 combinations of the six sensor inputs, each compared with a
//     reference model written as per-output Boolean equations;
//  2. the individual setting: each of the six sensors activated on its own,
//     as in the experiments, checking the one action line it must raise;
//  3. the combined setting: thermostat, smoke detector and light sensor
//     (inputs A1, A2, C1) active together must confirm a fire on G1, and any
//     two of the three must not;
//  4. the second combined action, G2 = C2 & E1 & E2.
// It counts how often each mechanism happened (every decoder line raised,
// each combined action raised, a combined action held off by a missing
// sensor) and counts a failure for one that never did. The logic has no
// clock, so the latency check is that outputs are correct one time unit
// after the inputs change, with no clock edge in between.
module tb_multisensing_control;
  logic a1, a2, c1, c2, e1, e2;
  logic [4:1] b, d, f;
  logic g1, g2;
  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  int line_high [12];
  int g1_fired = 0;
  int g2_fired = 0;
  int g1_held_off = 0;
  int individual_actions = 0;

  multisensing_control dut (
    .a1(a1), .a2(a2), .c1(c1), .c2(c2), .e1(e1), .e2(e2),
    .b(b), .d(d), .f(f), .g1(g1), .g2(g2)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference decoder: one output per input pair, spelled out.
  function automatic logic [4:1] ref_dec(input logic first, input logic second);
    ref_dec[1] = ~first & ~second;
    ref_dec[2] = ~first &  second;
    ref_dec[3] =  first & ~second;
    ref_dec[4] =  first &  second;
  endfunction

  task automatic apply(input logic [5:0] s);
    {a1, a2, c1, c2, e1, e2} = s;
    #1;
  endtask

  task automatic check_all(input string tag);
    logic [4:1] eb, ed, ef;
    logic eg1, eg2;
    eb  = ref_dec(a1, a2);
    ed  = ref_dec(c1, c2);
    ef  = ref_dec(e1, e2);
    eg1 = a1 & a2 & c1;
    eg2 = c2 & e1 & e2;
    checks++;
    if (b !== eb || d !== ed || f !== ef || g1 !== eg1 || g2 !== eg2) begin
      failures++;
      $display("FAIL %s in=%b%b%b%b%b%b b=%b/%b d=%b/%b f=%b/%b g1=%b/%b g2=%b/%b",
               tag, a1, a2, c1, c2, e1, e2, b, eb, d, ed, f, ef, g1, eg1, g2, eg2);
    end
    for (int i = 1; i <= 4; i++) begin
      if (b[i]) line_high[i-1]++;
      if (d[i]) line_high[i+3]++;
      if (f[i]) line_high[i+7]++;
    end
    if (g1) g1_fired++;
    if (g2) g2_fired++;
  endtask

  initial begin
    logic [5:0] s;
    foreach (line_high[i]) line_high[i] = 0;

    // 1. Exhaustive sweep.
    for (int k = 0; k < 64; k++) begin
      apply(6'(k));
      check_all("sweep");
    end

    // 2. Individual setting: one sensor at a time. Input order
    //    {A1,A2,C1,C2,E1,E2}; the sensor raises line 3 (first input of its
    //    pair) or line 2 (second input) of its decoder group.
    for (int i = 5; i >= 0; i--) begin
      logic [4:1] grp;
      s = 6'b1 << i;
      apply(s);
      check_all("individual");
      case (i)
        5, 4: grp = b;
        3, 2: grp = d;
        default: grp = f;
      endcase
      checks++;
      if (grp !== ((i % 2 == 1) ? 4'b0100 : 4'b0010) || g1 || g2) begin
        failures++;
        $display("FAIL individual sensor %0d group=%b g1=%b g2=%b", i, grp, g1, g2);
      end else begin
        individual_actions++;
      end
    end

    // 3. Combined setting: fire confirmed only by all three sensors.
    apply(6'b111000);
    check_all("fire");
    checks++;
    if (!g1) begin
      failures++;
      $display("FAIL fire not confirmed");
    end
    for (int drop = 3; drop <= 5; drop++) begin
      s = 6'b111000 & ~(6'b1 << drop);
      apply(s);
      check_all("fire-partial");
      checks++;
      if (g1) begin
        failures++;
        $display("FAIL fire confirmed with only two sensors (%b)", s);
      end else begin
        g1_held_off++;
      end
    end

    // 4. Second combined action.
    apply(6'b000111);
    check_all("g2");
    checks++;
    if (!g2 || g1) begin
      failures++;
      $display("FAIL second combined action g1=%b g2=%b", g1, g2);
    end

    // Every mechanism must have happened at least once.
    foreach (line_high[i]) begin
      checks++;
      if (line_high[i] == 0) begin
        failures++;
        $display("FAIL decoder line %0d never raised", i);
      end
    end
    checks++;
    if (individual_actions != 6) begin
      failures++;
      $display("FAIL only %0d of 6 individual actions seen", individual_actions);
    end
    checks++;
    if (g1_fired == 0 || g2_fired == 0 || g1_held_off == 0) begin
      failures++;
      $display("FAIL combined actions g1=%0d g2=%0d held_off=%0d", g1_fired, g2_fired, g1_held_off);
    end
    $display("mechanisms: individual=%0d g1_fired=%0d g2_fired=%0d g1_held_off=%0d",
             individual_actions, g1_fired, g2_fired, g1_held_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
