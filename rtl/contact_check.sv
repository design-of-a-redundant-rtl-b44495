// contact_check: plausibility check of the operator's double-contact
// controls.
//
// The pedal has a normally-open and a normally-closed contact, so after
// filtering they must always be complementary; the ignition switch has two
// contacts that must agree. Evaluated on each sample tick: a violation seen
// on PERSIST consecutive samples (300 ms by default, to allow the two
// contacts to switch a sample apart) raises `fault`; a clean sample clears
// it. The contact pairs follow the reference design; the check and its
// persistence are this design's reading of its input-signal diagnostics.
module contact_check #(
  parameter int unsigned PERSIST = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_tick,
  input  logic pedal_no,
  input  logic pedal_nc,
  input  logic ign_a,
  input  logic ign_b,
  output logic fault
);
  localparam int unsigned PW = $clog2(PERSIST + 1);

  logic [PW-1:0] bad_cnt;
  logic          bad;

  assign bad = (pedal_no == pedal_nc) || (ign_a != ign_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bad_cnt <= '0;
      fault   <= 1'b0;
    end else if (sample_tick) begin
      if (!bad) begin
        bad_cnt <= '0;
        fault   <= 1'b0;
      end else if (bad_cnt == PW'(PERSIST - 1)) begin
        fault <= 1'b1;
      end else begin
        bad_cnt <= bad_cnt + 1'b1;
      end
    end
  end
endmodule
