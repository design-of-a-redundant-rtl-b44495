// oad: operator alertness detection (the dead-man's vigilance function).
//
// While `enable` is high (ignition on and vehicle moving) the FSM times, in
// 100 ms sample ticks, how long the pedal has stayed in its current state:
//   WATCH: a pedal change restarts the timer. If the pedal stays released
//          for T1 ticks, or pressed for T3 ticks, go to ALARM.
//   ALARM: dead-man audio alarm on. A pedal change returns to WATCH; T2
//          ticks without one go to BRAKE.
//   BRAKE: emergency brake requested, alarm on. The operator's
//          alarm-disable switch silences the alarm; the brake request is
//          dropped (back to IDLE) once the vehicle is still and the switch
//          is operated.
//   IDLE:  not supervising (enable low); WATCH starts with a fresh timer.
// Dropping `enable` leaves WATCH/ALARM for IDLE but never leaves BRAKE.
// The T1/T2/T3 rules follow the reference design; how activity during the
// alarm and the brake release are handled is this design's choice. Times
// are checked on sample ticks, so each limit is met to within one tick;
// outputs are registered.
module oad
  import safemod_pkg::*;
#(
  parameter int unsigned W = TMR_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sample_tick,
  input  logic         enable,
  input  logic         pedal,
  input  logic         alarm_ack,
  input  logic         zero_vel,
  input  logic [W-1:0] t1,
  input  logic [W-1:0] t2,
  input  logic [W-1:0] t3,
  output logic         alarm,
  output logic         brake,
  output oad_state_e   state
);
  logic [W-1:0] timer;
  logic         pedal_q;
  logic         silenced;
  logic         change;
  logic [W-1:0] limit;

  assign change = (pedal != pedal_q);
  assign limit  = pedal ? t3 : t1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= OAD_IDLE;
      timer    <= '0;
      pedal_q  <= 1'b0;
      silenced <= 1'b0;
    end else if (sample_tick) begin
      pedal_q <= pedal;
      unique case (state)
        OAD_IDLE: begin
          timer    <= '0;
          silenced <= 1'b0;
          if (enable) state <= OAD_WATCH;
        end
        OAD_WATCH: begin
          if (!enable) begin
            state <= OAD_IDLE;
          end else if (change) begin
            timer <= '0;
          end else if (timer + 1'b1 >= limit) begin
            state <= OAD_ALARM;
            timer <= '0;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        OAD_ALARM: begin
          if (!enable) begin
            state <= OAD_IDLE;
          end else if (change) begin
            state <= OAD_WATCH;
            timer <= '0;
          end else if (timer + 1'b1 >= t2) begin
            state <= OAD_BRAKE;
            timer <= '0;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        OAD_BRAKE: begin
          if (alarm_ack) silenced <= 1'b1;
          if (zero_vel && alarm_ack) state <= OAD_IDLE;
        end
        default: state <= OAD_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alarm <= 1'b0;
      brake <= 1'b0;
    end else begin
      alarm <= (state == OAD_ALARM) || (state == OAD_BRAKE && !silenced);
      brake <= (state == OAD_BRAKE);
    end
  end
endmodule
