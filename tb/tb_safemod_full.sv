// tb_safemod_full: one complete dead-man operation of the two-channel unit
// at full size: 20 MHz clock, 100 ms sampling, 400 ms speed windows, 500 ms
// self-tests and the reference configuration V1 = 10, V2 = 22 pulses,
// T1 = 2 s, T2 = 2 s, T3 = 10 s. About 9 s of train time:
//   standstill -> doors unlocked; start at 100 pulses/s (about 15 km/h with
//   80 teeth per turn of a 711 mm wheel) -> doors locked; the driver
//   presses the pedal, then releases it and stays inactive -> dead-man
//   alarm after T1, emergency brake after a further T2; the train stops ->
//   doors unlock; the driver operates the alarm-disable switch -> brake
//   released. Times are checked against T1/T2 plus the filter latency.
module tb_safemod_full;
  import safemod_pkg::*;
  localparam longint CYC = 50;               // ns per clock (20 MHz)
  localparam longint SP  = 100_000_000;      // ns per 100 ms sample

  logic clk = 1'b0, rst_n = 1'b0;
  cfg_t cfg;
  field_in_t plant, in_a, in_b, none;
  coil_t coil_a, coil_b, no_dead;
  logic fh_a, fl_a, fh_b, fl_b;
  logic brake_released, doors_unlocked, deadman_alarm, failure_alarm;
  status_t st_a, st_b;
  int checks = 0, failures = 0, n_tests = 0;
  logic moving = 1'b0;

  safemod_unit dut (
    .clk, .rst_n, .cfg_a(cfg), .cfg_b(cfg), .in_a, .in_b,
    .sensor_alarm_a(1'b0), .sensor_alarm_b(1'b0),
    .force_hi_a(fh_a), .force_lo_a(fl_a), .force_hi_b(fh_b), .force_lo_b(fl_b),
    .coil_a, .coil_b, .brake_released, .doors_unlocked, .deadman_alarm, .failure_alarm,
    .status_a(st_a), .status_b(st_b));

  field_model u_fa (.plant, .coil(coil_a), .force_hi(fh_a), .force_lo(fl_a),
                    .stuck_hi(none), .stuck_lo(none), .relay_dead(no_dead), .fin(in_a));
  field_model u_fb (.plant, .coil(coil_b), .force_hi(fh_b), .force_lo(fl_b),
                    .stuck_hi(none), .stuck_lo(none), .relay_dead(no_dead), .fin(in_b));

  always #(CYC / 2) clk = ~clk;

  // speed sensors: 100 pulses/s while moving, sensor 2 a quarter period late
  logic s1 = 1'b0, s2 = 1'b0;
  initial forever begin
    #2_500_000;
    if (moving) s1 = ~s1;
    #2_500_000;
    if (moving) s2 = ~s2;
  end
  always_comb begin
    plant      = '0;
    plant.spd1 = s1;
    plant.spd2 = s2;
    plant.ign_a = 1'b1;
    plant.ign_b = 1'b1;
    plant.pedal_no = pedal_pressed;
    plant.pedal_nc = !pedal_pressed;
    plant.alarm_dis = alarm_dis;
  end
  logic pedal_pressed = 1'b0, alarm_dis = 1'b0;

  always @(posedge fh_a) n_tests++;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #(64'd15_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t0, dt;
  initial begin
    cfg = CFG_DEFAULT;
    none = '0; no_dead = '0;
    #(10 * CYC);
    rst_n = 1'b1;
    // standstill
    #(64'd1_000_000_000);
    check(st_a.zero_vel && st_b.zero_vel && doors_unlocked && brake_released,
          "standstill: doors unlocked, brake released");
    // start
    moving = 1'b1;
    t0 = $time;
    wait (!st_a.zero_vel);
    dt = $time - t0;
    $display("motion detected after %0d ms", dt / 1_000_000);
    check(dt <= 8 * SP + 1000, "motion detected within two windows");
    check(st_a.speed >= 38 && st_a.speed <= 41, $sformatf("speed count %0d per window", st_a.speed));
    #(10 * CYC);
    check(!doors_unlocked, "doors locked while moving");
    // driver presses, then releases the pedal and stays inactive
    pedal_pressed = 1'b1;
    #(64'd1_000_000_000);
    check(!deadman_alarm, "alarm with an active driver");
    pedal_pressed = 1'b0;
    t0 = $time;
    wait (deadman_alarm);
    dt = $time - t0;
    $display("dead-man alarm %0d ms after the pedal was released", dt / 1_000_000);
    check(dt >= 21 * SP && dt <= 23 * SP + 1000, "T1 = 2 s plus filter latency");
    t0 = $time;
    wait (!brake_released);
    dt = $time - t0;
    $display("emergency brake %0d ms after the alarm", dt / 1_000_000);
    check(dt >= 20 * SP - 1000 && dt <= 20 * SP + 1000, "T2 = 2 s");
    // train stops
    moving = 1'b0;
    t0 = $time;
    wait (st_a.zero_vel);
    dt = $time - t0;
    $display("standstill detected after %0d ms", dt / 1_000_000);
    #(10 * CYC);
    check(doors_unlocked && !brake_released, "stopped: doors unlocked, still braking");
    // alarm disable
    alarm_dis = 1'b1;
    #(64'd400_000_000);
    alarm_dis = 1'b0;
    #(64'd100_000_000);
    check(brake_released && !deadman_alarm, "brake released after alarm disable");
    check(!failure_alarm && st_a.faults == '0 && st_b.faults == '0, "no failure");
    check(n_tests >= 15, $sformatf("%0d input self-tests ran", n_tests));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
