// safety_channel: one of the two independent channels (A or B) of the
// dead-man's vigilance device.
//
// Data flow, all clocked by the 20 MHz system clock:
//   field inputs -> sync2 -> input_test (periodic pull-up/pull-down check)
//                         -> speed_counter x2 -> zvd (zero-velocity flag)
//                                             -> speed_check
//                         -> abf (contacts, 10 Hz, 5 Hz rejection)
//                               -> oad (dead-man timing T1/T2/T3)
//                               -> contact_check, relay_monitor
//   peer flags -> sync2 -> xchan_monitor (heartbeat, zero-velocity, failure)
//   all checks -> diag_collector (latched every 500 ms) -> failure
// Outputs (registered):
//   coil.brake_release = ignition on and no OAD brake request and no failure
//   coil.door_unlock   = vehicle still and no failure
// A de-energised coil is the safe state (brake applied, doors locked), which
// is also what the pulled-down coil inputs give when the logic is not
// running. The two channels' relay contacts are wired in series outside
// this block. `status` carries the information offered to the event
// recorder; the serial protocol that carries it is not part of this RTL.
// The function split follows the reference design; the reactions to a fault
// (both relays off, latched until reset) and the ignition handling (both
// contacts closed = on, brake kept applied while off) are this design's
// choices.
module safety_channel
  import safemod_pkg::*;
#(
  parameter int unsigned CLK_HZ           = 20_000_000,
  parameter int unsigned SAMPLE_HZ        = 10,
  parameter int unsigned WINDOW_SAMPLES   = 4,
  parameter int unsigned SELFTEST_SAMPLES = 5,
  parameter int unsigned TEST_SETTLE_CYC  = 200
) (
  input  logic      clk,
  input  logic      rst_n,
  input  cfg_t      cfg,
  input  field_in_t fin,
  input  logic      sensor_alarm,
  input  xchan_t    peer_in,
  output xchan_t    peer_out,
  output logic      force_hi,
  output logic      force_lo,
  output coil_t     coil,
  output logic      deadman_alarm,
  output logic      failure_alarm,
  output status_t   status
);
  // ---------------------------------------------------------------- inputs
  field_in_t fs;            // synchronised raw inputs
  logic      sensor_alarm_s;
  xchan_t    peer_s;

  sync2 #(.N(N_FIELD)) u_sync_fin (.clk, .rst_n, .d(fin), .q(fs));
  sync2 #(.N(1)) u_sync_alarm (.clk, .rst_n, .d(sensor_alarm), .q(sensor_alarm_s));
  sync2 #(.N($bits(xchan_t))) u_sync_peer (.clk, .rst_n, .d(peer_in), .q(peer_s));

  // -------------------------------------------------------------- timebase
  logic sample_tick, window_tick, selftest_tick;

  timebase #(
    .CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ),
    .WINDOW_SAMPLES(WINDOW_SAMPLES), .SELFTEST_SAMPLES(SELFTEST_SAMPLES)
  ) u_timebase (.clk, .rst_n, .sample_tick, .window_tick, .selftest_tick);

  // ------------------------------------------------- pull-up/pull-down test
  logic test_busy, test_fail;

  input_test #(.N(N_FIELD), .SETTLE_CYC(TEST_SETTLE_CYC)) u_input_test (
    .clk, .rst_n, .start(selftest_tick), .din(fs),
    .force_hi, .force_lo, .busy(test_busy), .fail(test_fail)
  );

  // ------------------------------------------------- zero-velocity detection
  logic [CNT_W-1:0] count1, count2, speed;
  logic             valid1, valid2;
  logic             zero_vel;
  logic             speed_fault;

  speed_counter #(.CNT_W(CNT_W)) u_cnt1 (
    .clk, .rst_n, .pulse(fs.spd1), .window_tick, .pause(test_busy),
    .count(count1), .valid(valid1)
  );
  speed_counter #(.CNT_W(CNT_W)) u_cnt2 (
    .clk, .rst_n, .pulse(fs.spd2), .window_tick, .pause(test_busy),
    .count(count2), .valid(valid2)
  );

  zvd #(.CNT_W(CNT_W)) u_zvd (
    .clk, .rst_n, .valid(valid1 & valid2), .count1, .count2,
    .v1(cfg.v1), .v2(cfg.v2), .zero_vel, .speed
  );

  speed_check #(.CNT_W(CNT_W)) u_speed_check (
    .clk, .rst_n, .valid(valid1 & valid2), .count1, .count2, .fault(speed_fault)
  );

  // ------------------------------------------------------ anti-bounce bank
  localparam int unsigned N_ABF = 7;
  logic [N_ABF-1:0] abf_in, abf_out;
  logic pedal_no, pedal_nc, ign_a, ign_b, alarm_dis, rb_brake_nc, rb_door_nc;

  assign abf_in = {fs.pedal_no, fs.pedal_nc, fs.ign_a, fs.ign_b,
                   fs.alarm_dis, fs.rb_brake_nc, fs.rb_door_nc};
  assign {pedal_no, pedal_nc, ign_a, ign_b,
          alarm_dis, rb_brake_nc, rb_door_nc} = abf_out;

  abf #(.N(N_ABF)) u_abf (
    .clk, .rst_n, .sample_tick, .hold(test_busy), .din(abf_in), .dout(abf_out)
  );

  logic ign_on;
  assign ign_on = ign_a & ign_b;

  // ------------------------------------------- operator alertness detection
  logic       oad_alarm, oad_brake;
  oad_state_e oad_state;

  oad u_oad (
    .clk, .rst_n, .sample_tick, .enable(ign_on & ~zero_vel),
    .pedal(pedal_no), .alarm_ack(alarm_dis), .zero_vel,
    .t1(cfg.t1), .t2(cfg.t2), .t3(cfg.t3),
    .alarm(oad_alarm), .brake(oad_brake), .state(oad_state)
  );

  // ------------------------------------------------------------ diagnostics
  logic   contact_fault, relay_fault, failure;
  logic   peer_dead, peer_zv, peer_failed, heartbeat;
  fault_t fault_now, faults;

  contact_check u_contact_check (
    .clk, .rst_n, .sample_tick, .pedal_no, .pedal_nc, .ign_a, .ign_b,
    .fault(contact_fault)
  );

  relay_monitor #(.N(2)) u_relay_monitor (
    .clk, .rst_n, .sample_tick, .hold(test_busy),
    .coil({coil.brake_release, coil.door_unlock}),
    .nc_rb({rb_brake_nc, rb_door_nc}), .fault(relay_fault)
  );

  xchan_monitor u_xchan (
    .clk, .rst_n, .sample_tick, .selftest_tick, .own_zv(zero_vel),
    .peer(peer_s), .heartbeat, .peer_dead, .peer_zv, .peer_failed
  );

  always_comb begin
    fault_now                = '0;
    fault_now.peer_dead      = peer_dead;
    fault_now.peer_zv        = peer_zv;
    fault_now.peer_failed    = peer_failed;
    fault_now.relay          = relay_fault;
    fault_now.input_test     = test_fail;
    fault_now.contacts       = contact_fault;
    fault_now.speed_mismatch = speed_fault;
    fault_now.sensor_supply  = sensor_alarm_s;
  end

  diag_collector u_diag (
    .clk, .rst_n, .selftest_tick, .fault_in(fault_now), .faults, .failure
  );

  // ---------------------------------------------------------------- outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coil          <= '0;
      deadman_alarm <= 1'b0;
      failure_alarm <= 1'b0;
    end else begin
      coil.brake_release <= ign_on && !oad_brake && !failure;
      coil.door_unlock   <= zero_vel && !failure;
      deadman_alarm      <= oad_alarm;
      failure_alarm      <= failure;
    end
  end

  // A latched failure puts both relays in the safe state on the next cycle.
  a_failure_safe: assert property (@(posedge clk) disable iff (!rst_n)
    failure |=> (coil == '0));
  // The brake is never released while the dead-man function requests it.
  a_brake_held: assert property (@(posedge clk) disable iff (!rst_n)
    oad_brake |=> !coil.brake_release);

  assign peer_out = '{heartbeat: heartbeat, zero_vel: zero_vel, failure: failure};

  assign status = '{faults: faults, failure: failure, zero_vel: zero_vel,
                    speed: speed, oad_state: oad_state};
endmodule
