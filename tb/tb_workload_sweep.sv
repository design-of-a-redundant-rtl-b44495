// tb_workload_sweep: the speed-threshold bench test of a channel at full
// size (20 MHz clock, 100 ms sampling, 400 ms windows, V1 = 10, V2 = 22).
// As with a signal generator, the speed-sensor frequency is stepped up
// through V1 and V2 and back down. At every step the counted pulses must
// match the frequency (+-1), and the zero-velocity flag and the door relay
// must follow the hysteresis rule; the rule is also checked against the
// counts the channel reports in every window. The peer channel is
// modelled as alive and in agreement.
module tb_workload_sweep;
  import safemod_pkg::*;
  localparam longint CYC = 50;             // ns per clock
  localparam longint SP  = 100_000_000;    // ns per sample

  logic clk = 1'b0, rst_n = 1'b0;
  cfg_t cfg;
  field_in_t plant, fin, none;
  coil_t coil, no_dead;
  logic force_hi, force_lo, dm, fa;
  xchan_t peer_in, peer_out;
  status_t status;
  int checks = 0, failures = 0;

  safety_channel dut (.clk, .rst_n, .cfg, .fin, .sensor_alarm(1'b0), .peer_in, .peer_out,
                      .force_hi, .force_lo, .coil, .deadman_alarm(dm), .failure_alarm(fa), .status);

  field_model u_field (.plant, .coil, .force_hi, .force_lo, .stuck_hi(none), .stuck_lo(none),
                       .relay_dead(no_dead), .fin);

  always #(CYC / 2) clk = ~clk;

  // peer: heartbeat every 100 ms, echoes the zero-velocity flag
  logic peer_hb = 1'b0;
  initial forever begin #(SP); peer_hb = ~peer_hb; end
  assign peer_in = '{heartbeat: peer_hb, zero_vel: peer_out.zero_vel, failure: 1'b0};

  // speed sensors: n_per_window pulses per 400 ms (0 = stopped)
  int n_per_window = 0;
  logic s1 = 1'b0;
  initial forever begin
    if (n_per_window == 0) #(1_000_000);
    else begin #(longint'(200_000_000) / longint'(n_per_window)); s1 = ~s1; end
  end
  logic pedal_pressed = 1'b0;
  always_comb begin
    plant = '0;
    plant.spd1 = s1; plant.spd2 = s1;
    plant.ign_a = 1'b1; plant.ign_b = 1'b1;
    plant.pedal_no = pedal_pressed; plant.pedal_nc = !pedal_pressed;
  end

  // hysteresis rule checked on every window result
  logic model_zv = 1'b0;
  int n_windows = 0;
  always @(posedge clk) if (rst_n && dut.valid1) begin
    // the flag register updates in this same clock edge; compare next cycle
    fork
      begin
        automatic int v = (dut.count1 > dut.count2) ? int'(dut.count1) : int'(dut.count2);
        if (!model_zv && v <= int'(cfg.v1)) model_zv = 1'b1;
        else if (model_zv && v >= int'(cfg.v2)) model_zv = 1'b0;
        @(posedge clk); #1;
        n_windows++;
        checks++;
        if (status.zero_vel != model_zv) begin
          failures++;
          $display("FAIL @%0t: count %0d flag %b expected %b", $time, v, status.zero_vel, model_zv);
        end
      end
    join_none
  end

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

  int steps [] = '{0, 10, 16, 21, 22, 30, 23, 16, 11, 10, 0};
  logic expect_zv [] = '{1, 1, 1, 1, 0, 0, 0, 0, 0, 1, 1};
  initial begin
    cfg = CFG_DEFAULT;
    none = '0; no_dead = '0;
    #(10 * CYC);
    rst_n = 1'b1;
    foreach (steps[i]) begin
      n_per_window = steps[i];
      #(8 * SP + 1000);   // one window to change over, one clean window
      check(int'(status.speed) >= steps[i] - 1 && int'(status.speed) <= steps[i] + 1,
            $sformatf("%0d pulses/window counted as %0d", steps[i], status.speed));
      check(status.zero_vel == expect_zv[i],
            $sformatf("%0d pulses/window: flag %b expected %b", steps[i], status.zero_vel, expect_zv[i]));
      check(coil.door_unlock == expect_zv[i], "door relay does not follow the flag");
      $display("%2d pulses/window: count %0d, still %b", steps[i], status.speed, status.zero_vel);
    end
    check(!fa, "no failure");
    check(n_windows > 20, "window results seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
