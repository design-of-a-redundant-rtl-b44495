// tb_oad: directed scenarios of the dead-man timing with T1 = 5, T2 = 4,
// T3 = 9 sample ticks: alarm after T1 with the pedal released, after T3
// with it pressed, brake after a further T2, alarm cancelled by activity,
// no alarm while the operator keeps changing the pedal, supervision off
// when the vehicle is still, brake held until still + alarm-disable, and
// silencing. Tick counts from the last pedal change are checked exactly.
module tb_oad;
  import safemod_pkg::*;
  localparam int T1 = 5, T2 = 4, T3 = 9;
  logic clk = 1'b0, rst_n = 1'b0, sample_tick = 1'b0;
  logic enable = 1'b0, pedal = 1'b0, ack = 1'b0, zv = 1'b1;
  logic alarm, brake;
  oad_state_e state;
  int checks = 0, failures = 0;

  oad dut (.clk, .rst_n, .sample_tick, .enable, .pedal, .alarm_ack(ack), .zero_vel(zv),
           .t1(10'(T1)), .t2(10'(T2)), .t3(10'(T3)), .alarm, .brake, .state);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(negedge clk); sample_tick = 1'b1;
    @(negedge clk); sample_tick = 1'b0;
    @(negedge clk);
  endtask

  // count ticks until alarm (or brake) rises; returns -1 if not within max
  task automatic ticks_until(input bit want_brake, input int max, output int n);
    n = -1;
    for (int i = 1; i <= max; i++) begin
      tick();
      if (want_brake ? brake : alarm) begin n = i; break; end
    end
  endtask

  // move the pedal: it takes effect at the next tick
  task automatic set_pedal(input logic p);
    pedal = p;
    tick();
  endtask

  int n;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // still vehicle: no supervision
    repeat (30) tick();
    check(!alarm && !brake && state == OAD_IDLE, "supervising while still");
    // start moving, pedal pressed
    zv = 1'b0; enable = 1'b1; tick();
    set_pedal(1'b1);
    ticks_until(1'b0, 40, n);
    check(n == T3, $sformatf("T3 alarm after %0d ticks", n));
    // activity cancels the alarm
    set_pedal(1'b0);
    check(!alarm && state == OAD_WATCH, "alarm not cancelled by activity");
    // released: T1 then T2
    ticks_until(1'b0, 40, n);
    check(n == T1, $sformatf("T1 alarm after %0d ticks", n));
    ticks_until(1'b1, 40, n);
    check(n == T2, $sformatf("brake after %0d ticks of alarm", n));
    check(alarm, "alarm off while braking");
    // activity no longer helps; ack while moving silences, keeps braking
    set_pedal(1'b1); set_pedal(1'b0);
    check(brake, "brake released by pedal");
    ack = 1'b1; tick(); ack = 1'b0; tick();
    check(brake && !alarm, "ack while moving: brake kept, alarm silenced");
    enable = 1'b0; repeat (3) tick();
    check(brake, "brake dropped when enable fell");
    // still + ack releases the brake
    zv = 1'b1; repeat (2) tick();
    check(brake, "brake dropped without ack");
    ack = 1'b1; tick(); ack = 1'b0; tick();
    check(!brake && !alarm && state == OAD_IDLE, "brake not released when still + ack");
    // an attentive operator never raises the alarm
    zv = 1'b0; enable = 1'b1; tick();
    for (int k = 0; k < 20; k++) begin
      set_pedal(~pedal);
      repeat (T1 - 3) tick();
      check(!alarm, "alarm with an active operator");
    end
    // stopping clears an alarm
    set_pedal(1'b0);
    ticks_until(1'b0, 40, n);
    check(n > 0, "no alarm");
    enable = 1'b0; zv = 1'b1; repeat (2) tick();
    check(!alarm && state == OAD_IDLE, "alarm kept after stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
