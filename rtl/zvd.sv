// zvd: zero-velocity detection with hysteresis.
//
// At the end of every observation window (`valid` from the speed counters)
// the speed v is taken as the larger of the two sensor counts and the flag
// S is updated as
//   S := 1  if S = 0 and v <= V1   (train has stopped)
//   S := 0  if S = 1 and v >= V2   (train has started moving)
//   S unchanged otherwise,
// which is the reference design's rule; V1 < V2 gives the hysteresis that
// keeps vibration from toggling the flag. V1 and V2 come from the
// maintenance configuration. Using the larger count (so one sensor reading
// low cannot declare a standstill) and resetting to S = 0 (moving, doors
// locked) are this design's choices. The flag changes one cycle after valid.
module zvd #(
  parameter int unsigned CNT_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic [CNT_W-1:0] count1,
  input  logic [CNT_W-1:0] count2,
  input  logic [CNT_W-1:0] v1,
  input  logic [CNT_W-1:0] v2,
  output logic             zero_vel,
  output logic [CNT_W-1:0] speed
);
  logic [CNT_W-1:0] v;

  assign v = (count1 > count2) ? count1 : count2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zero_vel <= 1'b0;
      speed    <= '0;
    end else if (valid) begin
      speed <= v;
      if (!zero_vel && v <= v1)     zero_vel <= 1'b1;
      else if (zero_vel && v >= v2) zero_vel <= 1'b0;
    end
  end
endmodule
