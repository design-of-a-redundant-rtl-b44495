// safemod_unit: the complete redundant dead-man's vigilance device, two
// safety channels (A and B) working in parallel under a one-out-of-two with
// diagnostics (1oo2D) policy.
//
// Each channel reads its own copy of the field inputs (it has its own
// acquisition front-end with its own pull-up/pull-down test stage), runs
// zero-velocity detection, operator alertness detection and its
// self-tests, and drives its own brake and door relays. The channels cross
// over their heartbeat, zero-velocity and failure flags. The safety relays
// of the two channels are wired in series, modelled here as an AND: the
// brake is released and the doors unlocked only while both channels agree.
// Audio alarms sound if either channel asks (OR). Coil outputs of each
// channel are also brought out, because the relay read-back contacts
// (inputs in_x.rb_*) belong to those relays. The series connection and the
// cross-over follow the reference design; the OR of the alarms is this
// design's choice. All outputs are registered in the channels; the combined
// outputs add no delay.
module safemod_unit
  import safemod_pkg::*;
#(
  parameter int unsigned CLK_HZ          = 20_000_000,
  parameter int unsigned TEST_SETTLE_CYC = 200
) (
  input  logic      clk,
  input  logic      rst_n,
  input  cfg_t      cfg_a,
  input  cfg_t      cfg_b,
  input  field_in_t in_a,
  input  field_in_t in_b,
  input  logic      sensor_alarm_a,
  input  logic      sensor_alarm_b,
  output logic      force_hi_a,
  output logic      force_lo_a,
  output logic      force_hi_b,
  output logic      force_lo_b,
  output coil_t     coil_a,
  output coil_t     coil_b,
  output logic      brake_released,
  output logic      doors_unlocked,
  output logic      deadman_alarm,
  output logic      failure_alarm,
  output status_t   status_a,
  output status_t   status_b
);
  xchan_t a_to_b, b_to_a;
  logic   dm_a, dm_b, fail_a, fail_b;

  safety_channel #(.CLK_HZ(CLK_HZ), .TEST_SETTLE_CYC(TEST_SETTLE_CYC)) u_chan_a (
    .clk, .rst_n, .cfg(cfg_a), .fin(in_a), .sensor_alarm(sensor_alarm_a),
    .peer_in(b_to_a), .peer_out(a_to_b), .force_hi(force_hi_a),
    .force_lo(force_lo_a), .coil(coil_a), .deadman_alarm(dm_a),
    .failure_alarm(fail_a), .status(status_a)
  );

  safety_channel #(.CLK_HZ(CLK_HZ), .TEST_SETTLE_CYC(TEST_SETTLE_CYC)) u_chan_b (
    .clk, .rst_n, .cfg(cfg_b), .fin(in_b), .sensor_alarm(sensor_alarm_b),
    .peer_in(a_to_b), .peer_out(b_to_a), .force_hi(force_hi_b),
    .force_lo(force_lo_b), .coil(coil_b), .deadman_alarm(dm_b),
    .failure_alarm(fail_b), .status(status_b)
  );

  assign brake_released = coil_a.brake_release & coil_b.brake_release;
  assign doors_unlocked = coil_a.door_unlock & coil_b.door_unlock;
  assign deadman_alarm  = dm_a | dm_b;
  assign failure_alarm  = fail_a | fail_b;
endmodule
