// abf: bank of anti-bounce filters for the contact inputs of a channel
// (pedal, ignition, alarm-disable switch, relay read-backs).
//
// Each input is sampled on sample_tick (10 Hz). A filtered output only takes
// a new level after that level has been seen on STABLE consecutive samples;
// any disagreeing sample restarts the count. With STABLE = 2 a level must
// last at least one full 100 ms sample period, so switching faster than 5 Hz
// never reaches the output, which is the filtering the reference design
// asks for. While hold is high (the pull-up/pull-down self-test is forcing
// the lines) samples are skipped. Outputs reset to 0 and follow the inputs
// STABLE samples later; a change appears one cycle after the deciding tick.
module abf #(
  parameter int unsigned N      = 7,
  parameter int unsigned STABLE = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sample_tick,
  input  logic         hold,
  input  logic [N-1:0] din,
  output logic [N-1:0] dout
);
  localparam int unsigned CW = $clog2(STABLE + 1);

  logic [CW-1:0] cnt [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0;
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else if (sample_tick && !hold) begin
      for (int i = 0; i < N; i++) begin
        if (din[i] == dout[i]) begin
          cnt[i] <= '0;
        end else if (cnt[i] == CW'(STABLE - 1)) begin
          dout[i] <= din[i];
          cnt[i]  <= '0;
        end else begin
          cnt[i] <= cnt[i] + 1'b1;
        end
      end
    end
  end
endmodule
