// diag_collector: the periodic self-test register of a channel.
//
// On every self-test tick (500 ms) the current results of all diagnostics
// are ORed into the latched fault register; `failure` is high while any
// fault is latched. Faults stay latched until reset, so the channel holds
// its outputs in the safe state and keeps the failure alarm on. Sampling
// every 500 ms follows the reference design; latching until reset is this
// design's choice. Outputs change one cycle after the tick.
module diag_collector
  import safemod_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   selftest_tick,
  input  fault_t fault_in,
  output fault_t faults,
  output logic   failure
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) faults <= '0;
    else if (selftest_tick) faults <= faults | fault_in;
  end

  assign failure = |faults;
endmodule
