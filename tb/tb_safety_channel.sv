// tb_safety_channel: one channel at a reduced clock (1 kHz, so 100 cycles
// per 100 ms sample) with a peer model that keeps its heartbeat alive and
// echoes the channel's zero-velocity flag. Checks standstill detection and
// door unlock, motion detection, the T1 alarm and T2 brake through the
// relay outputs, brake release at standstill with the alarm-disable switch,
// that periodic input tests run without failures, and that a relay that
// does not pick up latches a failure and puts both relays in the safe state.
module tb_safety_channel;
  import safemod_pkg::*;
  localparam int SP = 100;  // cycles per sample
  logic clk = 1'b0, rst_n = 1'b0;
  cfg_t cfg;
  field_in_t plant, fin, no_stuck;
  coil_t coil, relay_dead;
  logic force_hi, force_lo, dm, fa, sensor_alarm;
  xchan_t peer_in, peer_out;
  status_t status;
  int checks = 0, failures = 0, hp1 = 0, n_tests = 0;

  safety_channel #(.CLK_HZ(1000), .TEST_SETTLE_CYC(8)) dut (
    .clk, .rst_n, .cfg, .fin, .sensor_alarm, .peer_in, .peer_out, .force_hi, .force_lo,
    .coil, .deadman_alarm(dm), .failure_alarm(fa), .status);

  field_model u_field (.plant, .coil, .force_hi, .force_lo, .stuck_hi(no_stuck),
                       .stuck_lo(no_stuck), .relay_dead, .fin);

  always #5 clk = ~clk;

  // peer: alive, agrees on zero velocity, no failure
  logic peer_hb = 1'b0, peer_zv = 1'b0;
  always @(posedge clk) peer_zv <= peer_out.zero_vel;
  initial forever begin repeat (SP) @(posedge clk); peer_hb <= ~peer_hb; end
  assign peer_in = '{heartbeat: peer_hb, zero_vel: peer_zv, failure: 1'b0};

  // speed sensors: square waves of half period hp1 cycles (0 = stopped)
  initial forever begin
    if (hp1 == 0) @(posedge clk);
    else begin repeat (hp1) @(posedge clk); plant.spd1 = ~plant.spd1; plant.spd2 = ~plant.spd2; end
  end

  always @(posedge force_hi) n_tests++;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  int n;
  initial begin
    cfg = '{v1: 12'd10, v2: 12'd22, t1: 10'd5, t2: 10'd4, t3: 10'd9};
    plant = '0; plant.ign_a = 1'b1; plant.ign_b = 1'b1; plant.pedal_nc = 1'b1;
    no_stuck = '0; relay_dead = '0; sensor_alarm = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (1000) @(posedge clk);
    check(status.zero_vel, "standstill not detected");
    check(coil.door_unlock && coil.brake_release, "relays not energised at standstill");
    // start moving: 40 pulses per window
    hp1 = 5;
    repeat (1000) @(posedge clk);
    check(!status.zero_vel && !coil.door_unlock, "motion not detected");
    // operator inactive: alarm then brake
    plant.pedal_no = 1'b1; plant.pedal_nc = 1'b0;
    repeat (400) @(posedge clk);
    plant.pedal_no = 1'b0; plant.pedal_nc = 1'b1;
    n = 0;
    while (!dm && n < 20 * SP) begin @(posedge clk); n++; end
    check(n >= 7 * SP - 2 && n <= 8 * SP + 4, $sformatf("T1 alarm after %0d cycles", n));
    n = 0;
    while (coil.brake_release && n < 20 * SP) begin @(posedge clk); n++; end
    check(n >= 4 * SP - 2 && n <= 4 * SP + 4, $sformatf("brake %0d cycles after alarm", n));
    // stop, acknowledge
    hp1 = 0;
    repeat (1000) @(posedge clk);
    check(!coil.brake_release && status.zero_vel, "brake released before ack");
    plant.alarm_dis = 1'b1; repeat (400) @(posedge clk); plant.alarm_dis = 1'b0;
    repeat (200) @(posedge clk);
    check(coil.brake_release && !dm, "brake not released after ack at standstill");
    check(!fa && status.faults == '0, "failure during normal operation");
    check(n_tests >= 10, $sformatf("only %0d input tests ran", n_tests));
    // door relay does not pick up
    relay_dead.door_unlock = 1'b1;
    repeat (1500) @(posedge clk);
    check(fa && status.faults.relay, "dead relay not latched");
    check(!coil.door_unlock && !coil.brake_release, "relays not in safe state after failure");
    check(peer_out.failure, "failure not signalled to peer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
