// speed_counter: counts the pulses of one speed sensor (encoder on a wheel)
// over each observation window, the raw speed measurement of zero-velocity
// detection.
//
// Rising edges of the synchronised sensor line are counted between two
// window_tick strobes (400 ms apart). On window_tick the count of the window
// just ended is copied to `count` (with `valid` high for one cycle) and the
// counter restarts; an edge in that same cycle belongs to the new window.
// The count saturates at its maximum. While `pause` is high (the self-test
// is forcing the line) edges are tracked but not counted. Counting over a
// fixed window follows the reference design; saturation and pausing are
// this design's choices.
module speed_counter #(
  parameter int unsigned CNT_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pulse,
  input  logic             window_tick,
  input  logic             pause,
  output logic [CNT_W-1:0] count,
  output logic             valid
);
  logic             pulse_q;
  logic [CNT_W-1:0] acc;
  logic             edge_seen;

  assign edge_seen = pulse && !pulse_q && !pause;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pulse_q <= 1'b0;
      acc     <= '0;
      count   <= '0;
      valid   <= 1'b0;
    end else begin
      pulse_q <= pulse;
      valid   <= window_tick;
      if (window_tick) begin
        count <= acc;
        acc   <= CNT_W'(edge_seen);
      end else if (edge_seen && acc != '1) begin
        acc <= acc + 1'b1;
      end
    end
  end
endmodule
