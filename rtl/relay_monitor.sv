// relay_monitor: read-back check of the output relays.
//
// Each relay has force-guided contacts; its normally-closed contact is read
// back (through the anti-bounce filter) and must be closed (1) exactly when
// the coil is de-energised. After any change of a coil command the check of
// that relay is suspended for SETTLE_SAMPLES sample ticks (400 ms by
// default), which covers the relay operate time and the filter delay. When
// settled, a read-back equal to the coil command raises `fault` (level,
// combinational from registered state). `hold` suspends the check while the
// self-test forces the inputs. The read-back principle follows the
// reference design; the settle time is this design's choice.
module relay_monitor #(
  parameter int unsigned N              = 2,
  parameter int unsigned SETTLE_SAMPLES = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sample_tick,
  input  logic         hold,
  input  logic [N-1:0] coil,
  input  logic [N-1:0] nc_rb,
  output logic         fault
);
  localparam int unsigned SW = $clog2(SETTLE_SAMPLES + 1);

  logic [N-1:0]  coil_q;
  logic [SW-1:0] settle [N];
  logic [N-1:0]  mismatch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coil_q <= '0;
      for (int i = 0; i < N; i++) settle[i] <= '0;
    end else begin
      coil_q <= coil;
      for (int i = 0; i < N; i++) begin
        if (coil[i] != coil_q[i])
          settle[i] <= '0;
        else if (sample_tick && settle[i] != SW'(SETTLE_SAMPLES))
          settle[i] <= settle[i] + 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++)
      mismatch[i] = (settle[i] == SW'(SETTLE_SAMPLES)) && (nc_rb[i] == coil[i]);
  end

  assign fault = !hold && (|mismatch);
endmodule
