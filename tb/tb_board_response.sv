// tb_board_response -- board-level timing test of the multisensing control
// system: sensors -> input latch -> control logic -> Darlington driver.
//
// The six sensors are behavioural models with the response times of the
// experimental setup (thermostat 200 ms, light sensor 350 ms, smoke detector
// 100 ms, float level switch 100 ms, two ultrasonic sensors 5 ms). The input
// latch is held transparent and the driver switches in 100 us. Sensor to
// input mapping: thermostat A1, smoke detector A2, light sensor C1, float
// switch C2, ultrasonic sensors E1 and E2. Driver channels 0..5 carry the
// line each sensor raises on its own (B3, B2, D3, D2, F3, F2) and channel 6
// carries the fire confirmation G1.
//
// Individual setting: each sensor is triggered alone and the time from the
// physical event to its load switching on must equal its response time plus
// the driver time. It is also compared with the calculated total delay
// Ts + Tio + Tamp of the experiments (Tio being the logic's measured 6.4-6.5
// ns input-to-output delay, which this zero-delay simulation leaves out) and
// must lie within 10 ns of it.
// Combined setting: thermostat, smoke detector and light sensor triggered
// together must switch the fire load on after the slowest of them (350 ms)
// plus the driver time; with one of the three missing it must stay off.
module tb_board_response;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real TAMP_NS = 100.0e3;
  // Response times in ns, index = sensor number (see header).
  localparam real TS_NS [6] = '{200.0e6, 100.0e6, 350.0e6, 100.0e6, 5.0e6, 5.0e6};
  // Input-to-output delays of the logic measured on the FPGA, in ns, same
  // order. The calculated total delay of a sensor is Ts + Tio + Tamp.
  localparam real TIO_NS [6] = '{6.386, 6.409, 6.399, 6.416, 6.490, 6.523};
  localparam real TOL_NS = 10.0;

  logic [5:0] phys_event;
  logic [5:0] sense;
  logic [7:0] latch_q;
  logic [4:1] b, d, f;
  logic g1, g2;
  logic [6:0] load_on;

  int checks = 0;
  int failures = 0;
  int individual_seen = 0;
  int fire_seen = 0;
  int fire_held_off = 0;

  for (genvar i = 0; i < 6; i++) begin : g_sensor
    sensor_model #(.RESPONSE_NS(TS_NS[i])) u_sensor (.event_in(phys_event[i]), .sense(sense[i]));
  end

  sn74373_model u_latch (.d({2'b00, sense}), .le(1'b1), .oe_n(1'b0), .q(latch_q));

  multisensing_control u_logic (
    .a1(latch_q[0]), .a2(latch_q[1]), .c1(latch_q[2]),
    .c2(latch_q[3]), .e1(latch_q[4]), .e2(latch_q[5]),
    .b(b), .d(d), .f(f), .g1(g1), .g2(g2)
  );

  uln2003_model #(.TAMP_NS(TAMP_NS)) u_driver (
    .in({g1, f[2], f[3], d[2], d[3], b[2], b[3]}),
    .load_on(load_on)
  );

  initial begin
    #1.0e10;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Let every sensor and the driver settle with all events removed.
  task automatic settle();
    phys_event = '0;
    #400.0e6;
  endtask

  initial begin
    realtime t0, dt;
    real calc_ns;
    phys_event = '0;
    #1.0e6;

    // Individual setting.
    for (int i = 0; i < 6; i++) begin
      calc_ns = TS_NS[i] + TIO_NS[i] + TAMP_NS;
      t0 = $realtime;
      phys_event[i] = 1'b1;
      wait (load_on[i]);
      dt = $realtime - t0;
      checks++;
      if (dt < TS_NS[i] + TAMP_NS - 0.001 || dt > TS_NS[i] + TAMP_NS + 0.001 ||
          dt > calc_ns + TOL_NS || dt < calc_ns - TOL_NS) begin
        failures++;
        $display("FAIL sensor %0d delay %0.6f ms, calculated %0.9f ms", i, dt / 1.0e6, calc_ns / 1.0e6);
      end else begin
        individual_seen++;
        $display("sensor %0d: event to load %0.4f ms (calculated %0.9f ms)", i, dt / 1.0e6, calc_ns / 1.0e6);
      end
      checks++;
      if (load_on != 7'(1 << i)) begin
        failures++;
        $display("FAIL sensor %0d alone switched loads %b", i, load_on);
      end
      settle();
    end

    // Combined setting: one of the three fire sensors missing each time.
    for (int miss = 0; miss < 3; miss++) begin
      phys_event = 6'b000111 & ~6'(1 << miss);
      #(400.0e6);
      checks++;
      if (load_on[6]) begin
        failures++;
        $display("FAIL fire confirmed without sensor %0d", miss);
      end else begin
        fire_held_off++;
      end
      settle();
    end

    // Combined setting: all three fire sensors.
    t0 = $realtime;
    phys_event = 6'b000111;
    wait (load_on[6]);
    dt = $realtime - t0;
    checks++;
    if (dt < TS_NS[2] + TAMP_NS - 0.001 || dt > TS_NS[2] + TAMP_NS + 0.001) begin
      failures++;
      $display("FAIL fire confirmation after %0.6f ms, expected %0.6f ms", dt / 1.0e6, (TS_NS[2] + TAMP_NS) / 1.0e6);
    end else begin
      fire_seen++;
      $display("fire confirmed %0.4f ms after the event", dt / 1.0e6);
    end
    settle();

    checks++;
    if (individual_seen != 6 || fire_seen != 1 || fire_held_off != 3) begin
      failures++;
      $display("FAIL mechanisms individual=%0d fire=%0d held_off=%0d", individual_seen, fire_seen, fire_held_off);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
