// field_model: testbench model of one channel's field side. It closes the
// relay read-back loop (a relay's NC contact is closed while its coil is
// off), applies the channel's pull-up/pull-down test stage (force_hi wins
// over force_lo, both over the real level) and lets a testbench inject
// faults: lines stuck high or low, and relays that never pick up (NC stays
// closed).
module field_model
  import safemod_pkg::*;
(
  input  field_in_t plant,       // console controls and speed sensors
  input  coil_t     coil,        // channel's coil drives
  input  logic      force_hi,
  input  logic      force_lo,
  input  field_in_t stuck_hi,
  input  field_in_t stuck_lo,
  input  coil_t     relay_dead,  // relay does not pick up
  output field_in_t fin
);
  field_in_t lvl, forced;

  always_comb begin
    lvl             = plant;
    lvl.rb_brake_nc = !coil.brake_release || relay_dead.brake_release;
    lvl.rb_door_nc  = !coil.door_unlock || relay_dead.door_unlock;
    forced          = force_hi ? field_in_t'('1) : force_lo ? field_in_t'('0) : lvl;
    fin             = (forced | stuck_hi) & ~stuck_lo;
  end
endmodule
