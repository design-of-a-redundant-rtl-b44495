// tb_workload_t3: the pressed-pedal dead-man case at full size (20 MHz,
// T3 = 10 s, T2 = 2 s). The train runs at 40 pulses per window, and the
// driver presses the pedal and keeps it pressed. The dead-man alarm must
// come T3 plus the filter latency (0.1 to 0.3 s) after the press, and the
// emergency brake exactly T2 after the alarm. The peer channel is modelled
// as alive and in agreement.
module tb_workload_t3;
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
  int n_per_window = 40;
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

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #(64'd20_000_000_000);
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
    // T3 with the pedal held while moving
    #(8 * SP);
    check(!status.zero_vel, "not moving");
    pedal_pressed = 1'b1;
    t0 = $time;
    wait (dm);
    dt = $time - t0;
    $display("dead-man alarm %0d ms after the pedal was pressed and held", dt / 1_000_000);
    check(dt >= 101 * SP && dt <= 103 * SP + 1000, "T3 = 10 s plus filter latency");
    t0 = $time;
    wait (!coil.brake_release);
    dt = $time - t0;
    check(dt >= 20 * SP - 1000 && dt <= 20 * SP + 1000, $sformatf("brake %0d ms after alarm", dt / 1_000_000));
    check(!fa, "no failure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
