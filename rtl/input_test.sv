// input_test: sequencer of the pull-up/pull-down self-test of the
// acquisition front-end.
//
// On `start` (the 500 ms self-test tick) it drives force_hi for SETTLE_CYC
// cycles and then checks that every synchronised input reads 1; it then
// drives force_lo for SETTLE_CYC cycles and checks that every input reads 0;
// finally it releases the lines and waits SETTLE_CYC more cycles so the
// real levels are back before `busy` drops. `busy` tells the filters and
// counters to ignore the inputs meanwhile. `fail` holds the result of the
// last completed test (1 = some input did not follow) and is cleared when a
// new test passes. A start while busy is ignored. Forcing all inputs high and
// low follows the reference design; the sequence and timing are this
// design's choices. A test lasts 3*SETTLE_CYC + 3 cycles.
module input_test #(
  parameter int unsigned N          = 9,
  parameter int unsigned SETTLE_CYC = 200
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] din,
  output logic         force_hi,
  output logic         force_lo,
  output logic         busy,
  output logic         fail
);
  typedef enum logic [1:0] {T_IDLE, T_HIGH, T_LOW, T_RELEASE} phase_e;

  localparam int unsigned CW = $clog2(SETTLE_CYC + 1);

  phase_e        phase;
  logic [CW-1:0] cnt;
  logic          err;
  logic          done;

  assign done     = (cnt == CW'(SETTLE_CYC - 1));
  assign force_hi = (phase == T_HIGH);
  assign force_lo = (phase == T_LOW);
  assign busy     = (phase != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= T_IDLE;
      cnt   <= '0;
      err   <= 1'b0;
      fail  <= 1'b0;
    end else begin
      cnt <= done ? '0 : cnt + 1'b1;
      unique case (phase)
        T_IDLE: begin
          cnt <= '0;
          if (start) begin
            phase <= T_HIGH;
            err   <= 1'b0;
          end
        end
        T_HIGH: if (done) begin
          if (din != '1) err <= 1'b1;
          phase <= T_LOW;
        end
        T_LOW: if (done) begin
          if (din != '0) err <= 1'b1;
          phase <= T_RELEASE;
        end
        T_RELEASE: if (done) begin
          phase <= T_IDLE;
          fail  <= err;
        end
        default: phase <= T_IDLE;
      endcase
    end
  end

  // The pull stage must never be driven both ways.
  a_force_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(force_hi && force_lo));
endmodule
