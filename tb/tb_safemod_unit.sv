// tb_safemod_unit: end-to-end test of the two-channel unit at a reduced
// clock (1 kHz: 100 cycles per 100 ms sample, 400 cycles per speed window)
// with short OAD limits (T1 = 5, T2 = 4, T3 = 9 samples) and the reference
// thresholds V1 = 10, V2 = 22 pulses. Each channel has its own field model
// (relay read-back, pull-up/pull-down stage, fault injection).
//
// Normal operation: standstill and door unlock, start (moving), hysteresis
// band held in both directions, T3 alarm with the pedal held, alarm
// cancelled by activity, T1 alarm, T2 brake, silencing, brake release at
// standstill, an attentive operator never alarmed, a pedal glitch filtered
// out, periodic input tests passing. Diagnostics, each after a reset: relay
// that does not pick up, speed sensors disagreeing, pedal contacts
// inconsistent, sensor supply alarm, input stuck in the input test,
// zero-velocity disagreement between channels; every failure of one channel
// must make the other fail too, and the combined (series) outputs must go to
// the safe state. Every mechanism is counted and must occur.
module tb_safemod_unit;
  import safemod_pkg::*;
  localparam int SP = 100;  // cycles per sample
  localparam int W  = 400;  // cycles per speed window

  logic clk = 1'b0, rst_n = 1'b0;
  cfg_t cfg;
  field_in_t plant, plant_b_spd, in_a, in_b, stuck_hi_a, stuck_lo_a, stuck_hi_b, stuck_lo_b;
  coil_t coil_a, coil_b, dead_a, dead_b;
  logic sa_a, sa_b, fh_a, fl_a, fh_b, fl_b;
  logic brake_released, doors_unlocked, deadman_alarm, failure_alarm;
  status_t st_a, st_b;
  int checks = 0, failures = 0;
  int hp1 = 0, hp2 = 0, hp_b = -1;   // half periods in cycles, 0 = stopped, hp_b -1 = same as A

  safemod_unit #(.CLK_HZ(1000), .TEST_SETTLE_CYC(8)) dut (
    .clk, .rst_n, .cfg_a(cfg), .cfg_b(cfg), .in_a, .in_b,
    .sensor_alarm_a(sa_a), .sensor_alarm_b(sa_b),
    .force_hi_a(fh_a), .force_lo_a(fl_a), .force_hi_b(fh_b), .force_lo_b(fl_b),
    .coil_a, .coil_b, .brake_released, .doors_unlocked, .deadman_alarm, .failure_alarm,
    .status_a(st_a), .status_b(st_b));

  field_model u_fa (.plant, .coil(coil_a), .force_hi(fh_a), .force_lo(fl_a),
                    .stuck_hi(stuck_hi_a), .stuck_lo(stuck_lo_a), .relay_dead(dead_a), .fin(in_a));
  field_model u_fb (.plant(plant_b_spd), .coil(coil_b), .force_hi(fh_b), .force_lo(fl_b),
                    .stuck_hi(stuck_hi_b), .stuck_lo(stuck_lo_b), .relay_dead(dead_b), .fin(in_b));

  always #5 clk = ~clk;

  // speed sensor waveforms
  logic s1 = 1'b0, s2 = 1'b0, sb = 1'b0;
  initial forever begin if (hp1 == 0) @(posedge clk); else begin repeat (hp1) @(posedge clk); s1 = ~s1; end end
  initial forever begin if (hp2 == 0) @(posedge clk); else begin repeat (hp2) @(posedge clk); s2 = ~s2; end end
  initial forever begin if (hp_b <= 0) @(posedge clk); else begin repeat (hp_b) @(posedge clk); sb = ~sb; end end
  always_comb begin
    plant.spd1 = s1;
    plant.spd2 = s2;
    plant_b_spd = plant;
    if (hp_b >= 0) begin plant_b_spd.spd1 = sb; plant_b_spd.spd2 = sb; end
  end

  // ------------------------------------------------------ mechanism counters
  int m_to_still = 0, m_to_moving = 0, m_band_hold = 0, m_t3_alarm = 0, m_t1_alarm = 0;
  int m_cancel = 0, m_t2_brake = 0, m_silence = 0, m_release = 0, m_attentive = 0;
  int m_glitch = 0, m_input_test = 0, m_f_relay = 0, m_f_speed = 0, m_f_contact = 0;
  int m_f_sensor = 0, m_f_input = 0, m_f_zv = 0, m_peer_fail = 0, m_series = 0;
  logic zv_q = 1'b0;
  always @(posedge clk) begin
    zv_q <= st_a.zero_vel;
    if (rst_n && st_a.zero_vel && !zv_q) m_to_still++;
    if (rst_n && !st_a.zero_vel && zv_q) m_to_moving++;
  end
  always @(posedge fh_a) m_input_test++;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  task automatic need(input int count, input string name);
    checks++;
    if (count == 0) begin failures++; $display("FAIL: mechanism never happened: %s", name); end
    else $display("mechanism %-22s %0d", name, count);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic pedal(input logic pressed);
    plant.pedal_no = pressed;
    plant.pedal_nc = !pressed;
  endtask

  // cycles until the dead-man alarm reaches `val`
  task automatic until_alarm(input logic val, input int max, output int n);
    n = 0;
    while (deadman_alarm !== val && n < max) begin @(posedge clk); n++; end
  endtask

  task automatic restart();
    rst_n = 1'b0;
    hp1 = 0; hp2 = 0; hp_b = -1;
    plant = '0; plant.ign_a = 1'b1; plant.ign_b = 1'b1; pedal(1'b0);
    stuck_hi_a = '0; stuck_lo_a = '0; stuck_hi_b = '0; stuck_lo_b = '0;
    dead_a = '0; dead_b = '0; sa_a = 1'b0; sa_b = 1'b0;
    cycles(5);
    rst_n = 1'b1;
    cycles(3 * W);
    check(st_a.zero_vel && st_b.zero_vel && doors_unlocked && brake_released && !failure_alarm,
          "not healthy at standstill after reset");
  endtask

  // both channels must end up failed, combined outputs safe
  task automatic expect_failure(input string what);
    check(failure_alarm, {what, ": no failure alarm"});
    check(st_a.failure && st_b.failure, {what, ": not both channels failed"});
    check(!brake_released && !doors_unlocked, {what, ": combined outputs not safe"});
    if (st_a.failure && st_b.failure) m_peer_fail++;
  endtask

  // wait until channel A reports motion (at most three windows)
  task automatic wait_moving();
    int k;
    k = 0;
    while (st_a.zero_vel && k < 3 * W) begin @(posedge clk); k++; end
    cycles(5);
  endtask

  int n, t_rise;
  initial begin
    cfg = '{v1: 12'd10, v2: 12'd22, t1: 10'd5, t2: 10'd4, t3: 10'd9};
    restart();
    m_to_still = 0;  // count only commanded transitions
    // ---------------------------------------------------------------- motion
    hp1 = 5; hp2 = 5;                         // 40 pulses per window
    wait_moving();
    check(!st_a.zero_vel && !st_b.zero_vel && !doors_unlocked, "motion not detected");
    // T3: pedal pressed right after supervision starts, then held
    pedal(1'b1);
    until_alarm(1'b1, 30 * SP, n);
    check(n >= (9 + 1) * SP && n <= (9 + 3) * SP + 5, $sformatf("T3 alarm after %0d cycles", n));
    if (deadman_alarm) m_t3_alarm++;
    // activity cancels
    pedal(1'b0);
    until_alarm(1'b0, 5 * SP, n);
    check(!deadman_alarm && brake_released, "alarm not cancelled by activity");
    if (!deadman_alarm) m_cancel++;
    // T1: pedal left released; count from the release above
    until_alarm(1'b1, 30 * SP, t_rise);
    check(n + t_rise >= (5 + 1) * SP && n + t_rise <= (5 + 3) * SP + 5,
          $sformatf("T1 alarm after %0d cycles", n + t_rise));
    if (deadman_alarm) m_t1_alarm++;
    // T2: brake
    n = 0;
    while (brake_released && n < 20 * SP) begin @(posedge clk); n++; end
    check(n >= 4 * SP - 2 && n <= 4 * SP + 5, $sformatf("brake %0d cycles after alarm", n));
    check(deadman_alarm && !coil_a.brake_release && !coil_b.brake_release, "brake state");
    if (!brake_released) m_t2_brake++;
    // alarm disable while moving: silenced, still braking
    plant.alarm_dis = 1'b1; cycles(4 * SP); plant.alarm_dis = 1'b0; cycles(SP);
    check(!deadman_alarm && !brake_released, "silencing");
    if (!deadman_alarm && !brake_released) m_silence++;
    // slow into the hysteresis band (16 pulses): still moving
    hp1 = 12; hp2 = 12;
    cycles(3 * W);
    check(!st_a.zero_vel, "band: flag changed while moving");
    if (!st_a.zero_vel && st_a.speed > 10 && st_a.speed < 22) m_band_hold++;
    // stop (4 pulses) then acknowledge
    hp1 = 50; hp2 = 50;
    cycles(2 * W + 20);
    check(st_a.zero_vel && doors_unlocked && !brake_released, "stop: doors / brake");
    plant.alarm_dis = 1'b1; cycles(4 * SP); plant.alarm_dis = 1'b0; cycles(SP);
    check(brake_released, "brake not released at standstill after ack");
    if (brake_released) m_release++;
    // band from standstill: still
    hp1 = 12; hp2 = 12;
    cycles(3 * W);
    check(st_a.zero_vel, "band: flag changed while still");
    if (st_a.zero_vel && st_a.speed > 10 && st_a.speed < 22) m_band_hold++;
    // attentive operator while moving
    hp1 = 5; hp2 = 5;
    wait_moving();
    check(!st_a.zero_vel, "restart not detected");
    for (int k = 0; k < 20; k++) begin
      pedal(!k[0]); cycles(3 * SP);
      check(!deadman_alarm, "alarm with an attentive operator");
    end
    if (!deadman_alarm) m_attentive++;
    // glitch of 50 cycles on a held pedal does not restart the T3 timing
    pedal(1'b0); cycles(3 * SP);
    pedal(1'b1);
    cycles(4 * SP); pedal(1'b0); cycles(50); pedal(1'b1);
    until_alarm(1'b1, 30 * SP, n);
    n = n + 4 * SP + 50;
    check(n >= (9 + 1) * SP && n <= (9 + 3) * SP + 5, $sformatf("T3 alarm with glitch after %0d cycles", n));
    if (n <= (9 + 3) * SP + 5) m_glitch++;
    // standstill ends supervision; the operator stays active while stopping
    hp1 = 0; hp2 = 0;
    for (int k = 0; k < 4; k++) begin pedal(k[0]); cycles(3 * SP); end
    check(!deadman_alarm && brake_released, "alarm kept at standstill");
    check(!failure_alarm && st_a.faults == '0 && st_b.faults == '0, "failure in normal operation");
    check(m_input_test >= 20, "input tests not running");

    // ------------------------------------------------------------- diagnostics
    restart();
    dead_a.door_unlock = 1'b1;            // door relay A never picks up
    cycles(2000);
    check(st_a.faults.relay, "dead relay");
    if (st_a.faults.relay) m_f_relay++;
    expect_failure("relay");

    restart();
    hp1 = 5; hp2 = 0;                     // sensor 2 dead while moving
    cycles(6 * W);
    check(st_a.faults.speed_mismatch && st_b.faults.speed_mismatch, "speed mismatch");
    if (st_a.faults.speed_mismatch) m_f_speed++;
    expect_failure("speed");

    restart();
    stuck_lo_b.pedal_nc = 1'b1;           // NC contact open with pedal released (B only)
    cycles(1500);
    check(st_b.faults.contacts && st_a.faults.peer_failed, "contact fault");
    if (st_b.faults.contacts) m_f_contact++;
    expect_failure("contacts");

    restart();
    sa_b = 1'b1;                          // sensor supply alarm on channel B
    cycles(1200);
    check(st_b.faults.sensor_supply, "sensor supply alarm");
    if (st_b.faults.sensor_supply) m_f_sensor++;
    expect_failure("sensor supply");

    restart();
    stuck_hi_a.spd1 = 1'b1;              // speed line 1 of A stuck high: at standstill only the input test sees it
    cycles(2000);
    check(st_a.faults.input_test, "stuck input not found by input test");
    if (st_a.faults.input_test) m_f_input++;
    expect_failure("input test");

    restart();
    hp_b = 5;                             // channel B sees motion, A standstill
    cycles(3000);
    check(st_a.faults.peer_zv || st_b.faults.peer_zv, "zero-velocity disagreement");
    if (st_a.faults.peer_zv || st_b.faults.peer_zv) m_f_zv++;
    expect_failure("zv disagreement");
    // 1oo2D: one channel's relays alone open the series connection
    check(!coil_a.door_unlock || !coil_b.door_unlock, "series outputs");
    restart();
    hp_b = 5;
    cycles(2 * W + 20);
    if (coil_a.door_unlock && !coil_b.door_unlock && !doors_unlocked) m_series++;

    // --------------------------------------------------------------- summary
    need(m_to_still, "standstill detected");
    need(m_to_moving, "motion detected");
    need(m_band_hold, "hysteresis band held");
    need(m_t3_alarm, "T3 alarm");
    need(m_cancel, "alarm cancelled");
    need(m_t1_alarm, "T1 alarm");
    need(m_t2_brake, "T2 brake");
    need(m_silence, "alarm silenced");
    need(m_release, "brake released");
    need(m_attentive, "attentive operator");
    need(m_glitch, "pedal glitch filtered");
    need(m_input_test, "input test run");
    need(m_f_relay, "relay read-back fault");
    need(m_f_speed, "speed mismatch fault");
    need(m_f_contact, "contact fault");
    need(m_f_sensor, "sensor supply fault");
    need(m_f_input, "input test fault");
    need(m_f_zv, "channel zv disagreement");
    need(m_peer_fail, "peer failure taken over");
    need(m_series, "series 1oo2D output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
