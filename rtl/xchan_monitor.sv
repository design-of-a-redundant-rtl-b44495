// xchan_monitor: supervision of the other safety channel.
//
// The two channels exchange a heartbeat, their zero-velocity flag and their
// failure flag. This block
//  - toggles its own heartbeat on every sample tick (100 ms);
//  - reports peer_dead if the peer's heartbeat has not changed for more than
//    HB_TIMEOUT sample ticks;
//  - on every self-test tick (500 ms) compares the peer's zero-velocity flag
//    with its own and reports peer_zv after ZV_PERSIST disagreeing checks in
//    a row (the channels' observation windows are not aligned);
//  - reports peer_failed one cycle after the peer's failure flag is high.
// Peer inputs must already be synchronised. Exchanging vitality, zero-
// velocity and failure flags follows the reference design; the heartbeat
// and the timeouts are this design's choices.
module xchan_monitor
  import safemod_pkg::*;
#(
  parameter int unsigned HB_TIMEOUT = 3,
  parameter int unsigned ZV_PERSIST = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sample_tick,
  input  logic   selftest_tick,
  input  logic   own_zv,
  input  xchan_t peer,
  output logic   heartbeat,
  output logic   peer_dead,
  output logic   peer_zv,
  output logic   peer_failed
);
  localparam int unsigned HW = $clog2(HB_TIMEOUT + 2);
  localparam int unsigned ZW = $clog2(ZV_PERSIST + 1);

  logic          peer_hb_q;
  logic [HW-1:0] hb_age;
  logic [ZW-1:0] zv_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      heartbeat <= 1'b0;
      peer_hb_q <= 1'b0;
      hb_age    <= '0;
      zv_cnt    <= '0;
      peer_dead <= 1'b0;
      peer_zv   <= 1'b0;
      peer_failed <= 1'b0;
    end else begin
      peer_failed <= peer.failure;
      peer_hb_q <= peer.heartbeat;
      if (sample_tick) heartbeat <= !heartbeat;

      if (peer.heartbeat != peer_hb_q) begin
        hb_age    <= '0;
        peer_dead <= 1'b0;
      end else if (sample_tick) begin
        if (hb_age == HW'(HB_TIMEOUT)) peer_dead <= 1'b1;
        else                           hb_age <= hb_age + 1'b1;
      end

      if (selftest_tick) begin
        if (peer.zero_vel == own_zv) begin
          zv_cnt  <= '0;
          peer_zv <= 1'b0;
        end else if (zv_cnt == ZW'(ZV_PERSIST - 1)) begin
          peer_zv <= 1'b1;
        end else begin
          zv_cnt <= zv_cnt + 1'b1;
        end
      end
    end
  end
endmodule
