// timebase: derives the three periodic strobes of a safety channel from the
// system clock (20 MHz in the reference design).
//
// sample_tick   one-cycle pulse every CLK_HZ/SAMPLE_HZ cycles (100 ms): the
//               rate at which contact inputs are sampled and OAD times run.
// window_tick   coincides with every WINDOW_SAMPLES-th sample tick (400 ms):
//               end of a speed-pulse observation window.
// selftest_tick coincides with every SELFTEST_SAMPLES-th sample tick
//               (500 ms): start of the periodic self-test.
// The 10 Hz rate, 400 ms window, 500 ms self-test period and 20 MHz clock
// follow the reference design; deriving all three from one divider is this
// design's choice. The first sample tick comes one full period after reset.
module timebase #(
  parameter int unsigned CLK_HZ           = 20_000_000,
  parameter int unsigned SAMPLE_HZ        = 10,
  parameter int unsigned WINDOW_SAMPLES   = 4,
  parameter int unsigned SELFTEST_SAMPLES = 5
) (
  input  logic clk,
  input  logic rst_n,
  output logic sample_tick,
  output logic window_tick,
  output logic selftest_tick
);
  localparam int unsigned DIV  = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned DW   = $clog2(DIV);
  localparam int unsigned WW   = $clog2(WINDOW_SAMPLES + 1);
  localparam int unsigned SW   = $clog2(SELFTEST_SAMPLES + 1);

  logic [DW-1:0] div_cnt;
  logic [WW-1:0] win_cnt;
  logic [SW-1:0] st_cnt;
  logic          wrap;

  assign wrap = (div_cnt == DW'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt       <= '0;
      win_cnt       <= '0;
      st_cnt        <= '0;
      sample_tick   <= 1'b0;
      window_tick   <= 1'b0;
      selftest_tick <= 1'b0;
    end else begin
      sample_tick   <= wrap;
      window_tick   <= 1'b0;
      selftest_tick <= 1'b0;
      div_cnt       <= wrap ? '0 : div_cnt + 1'b1;
      if (wrap) begin
        if (win_cnt == WW'(WINDOW_SAMPLES - 1)) begin
          win_cnt     <= '0;
          window_tick <= 1'b1;
        end else begin
          win_cnt <= win_cnt + 1'b1;
        end
        if (st_cnt == SW'(SELFTEST_SAMPLES - 1)) begin
          st_cnt        <= '0;
          selftest_tick <= 1'b1;
        end else begin
          st_cnt <= st_cnt + 1'b1;
        end
      end
    end
  end

  a_window_on_sample: assert property (@(posedge clk) disable iff (!rst_n)
    window_tick |-> sample_tick);
  a_selftest_on_sample: assert property (@(posedge clk) disable iff (!rst_n)
    selftest_tick |-> sample_tick);
endmodule
