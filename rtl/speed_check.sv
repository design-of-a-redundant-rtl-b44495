// speed_check: consistency check between speed sensor 1 and speed sensor 2,
// one of the periodic diagnostics of a channel.
//
// On every window result (`valid`) the difference of the two counts is
// compared with a tolerance of ABS_TOL + max(count1, count2) >> REL_SHIFT
// (4 pulses + 25 % by default), which allows wheel slip and a pulse of
// quantisation. If the difference exceeds the tolerance in PERSIST
// consecutive windows, `fault` goes high; it drops again after one window
// within tolerance (latching is done by the diagnostic collector). The check
// itself follows the reference design; tolerance and persistence are this
// design's choices.
module speed_check #(
  parameter int unsigned CNT_W     = 12,
  parameter int unsigned ABS_TOL   = 4,
  parameter int unsigned REL_SHIFT = 2,
  parameter int unsigned PERSIST   = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic [CNT_W-1:0] count1,
  input  logic [CNT_W-1:0] count2,
  output logic             fault
);
  localparam int unsigned PW = $clog2(PERSIST + 1);

  logic [CNT_W-1:0] hi, lo, diff;
  logic [CNT_W:0]   tol;
  logic [PW-1:0]    bad_cnt;
  logic             bad;

  assign hi   = (count1 > count2) ? count1 : count2;
  assign lo   = (count1 > count2) ? count2 : count1;
  assign diff = hi - lo;
  assign tol  = (CNT_W+1)'(ABS_TOL) + (CNT_W+1)'(hi >> REL_SHIFT);
  assign bad  = ({1'b0, diff} > tol);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bad_cnt <= '0;
      fault   <= 1'b0;
    end else if (valid) begin
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
