// sync2: two-flop synchroniser for a bundle of asynchronous inputs from the
// acquisition front-end. Output lags the input by two clock cycles. The
// reset value of every stage is RST_VAL.
module sync2 #(
  parameter int unsigned N       = 1,
  parameter logic [N-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  logic [N-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
