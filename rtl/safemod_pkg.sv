// safemod_pkg: types and default constants shared by the dead-man's vigilance
// device (zero-velocity detection + operator alertness detection) RTL.
//
// The default configuration values are the ones given for the reference
// installation: V1 = 10 and V2 = 22 pulses per 400 ms window (about 3 and
// 6 km/h with 80-tooth, 711 mm wheels), T1 = 2 s, T2 = 2 s, T3 = 10 s. Times
// are expressed in units of the 100 ms input sampling period. Widths, the
// field-input ordering and the fault encoding are this design's own choices.
package safemod_pkg;

  localparam int unsigned CNT_W = 12;  // speed pulse count per window
  localparam int unsigned TMR_W = 10;  // OAD limits, in 100 ms units

  // Maintenance configuration of one channel.
  typedef struct packed {
    logic [CNT_W-1:0] v1;  // still below or at this count
    logic [CNT_W-1:0] v2;  // moving at or above this count
    logic [TMR_W-1:0] t1;  // max time pedal released
    logic [TMR_W-1:0] t2;  // alarm-to-brake time
    logic [TMR_W-1:0] t3;  // max time pedal pressed
  } cfg_t;

  localparam cfg_t CFG_DEFAULT = '{v1: 12'd10, v2: 12'd22,
                                   t1: 10'd20, t2: 10'd20, t3: 10'd100};

  // Raw field inputs of one channel, as delivered by its acquisition
  // front-end (after the Schmitt triggers). 1 = contact closed / line high.
  typedef struct packed {
    logic spd1;         // speed sensor 1
    logic spd2;         // speed sensor 2
    logic pedal_no;     // pedal normally-open contact (1 = pressed)
    logic pedal_nc;     // pedal normally-closed contact (0 = pressed)
    logic ign_a;        // ignition contact a
    logic ign_b;        // ignition contact b
    logic alarm_dis;    // dead-man alarm disable switch
    logic rb_brake_nc;  // brake relay NC read-back (1 = coil off)
    logic rb_door_nc;   // door relay NC read-back (1 = coil off)
  } field_in_t;

  localparam int unsigned N_FIELD = $bits(field_in_t);

  // Relay coil drives. Energised = brake released / doors unlocked.
  typedef struct packed {
    logic brake_release;
    logic door_unlock;
  } coil_t;

  // Flags exchanged between channel A and channel B on the rear plug.
  typedef struct packed {
    logic heartbeat;  // toggles every 100 ms while the channel is alive
    logic zero_vel;   // own zero-velocity flag
    logic failure;    // own latched failure
  } xchan_t;

  typedef enum logic [1:0] {
    OAD_IDLE  = 2'd0,  // vehicle still or ignition off: not supervising
    OAD_WATCH = 2'd1,  // timing the operator's activity
    OAD_ALARM = 2'd2,  // dead-man audio alarm, T2 running
    OAD_BRAKE = 2'd3   // emergency brake requested
  } oad_state_e;

  // Diagnostic results, one bit per check.
  typedef struct packed {
    logic peer_dead;       // no heartbeat from the other channel
    logic peer_zv;         // zero-velocity flags of the channels disagree
    logic peer_failed;     // other channel reports a failure
    logic relay;           // relay read-back does not match the coil
    logic input_test;      // pull-up/pull-down test failed
    logic contacts;        // pedal or ignition contacts inconsistent
    logic speed_mismatch;  // speed sensors 1 and 2 disagree
    logic sensor_supply;   // analog sensor supply/line monitor alarm
  } fault_t;

  // Channel information offered to the event recorder.
  typedef struct packed {
    fault_t           faults;
    logic             failure;
    logic             zero_vel;
    logic [CNT_W-1:0] speed;
    oad_state_e       oad_state;
  } status_t;

endpackage
