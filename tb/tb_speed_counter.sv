// tb_speed_counter: feeds a known number of pulses of random spacing into
// each observation window and checks the count reported at the window end,
// plus that edges are ignored while paused and that the count saturates.
module tb_speed_counter;
  localparam int W = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pulse = 1'b0, window_tick = 1'b0, pause = 1'b0;
  logic [W-1:0] count;
  logic valid;
  int checks = 0, failures = 0;

  speed_counter #(.CNT_W(W)) dut (.clk, .rst_n, .pulse, .window_tick, .pause, .count, .valid);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulses(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); pulse = 1'b1;
      repeat (1 + $urandom_range(3)) @(negedge clk);
      pulse = 1'b0;
      repeat (1 + $urandom_range(3)) @(negedge clk);
    end
  endtask

  task automatic end_window(input int expect_n);
    @(negedge clk); window_tick = 1'b1;
    @(negedge clk); window_tick = 1'b0;
    check(valid, "valid missing after window tick");
    check(int'(count) == expect_n, $sformatf("count %0d expected %0d", count, expect_n));
    @(negedge clk);
    check(!valid, "valid longer than one cycle");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    end_window(0);
    for (int w = 0; w < 30; w++) begin
      int n = $urandom_range(40);
      pulses(n);
      end_window(n);
    end
    // paused edges are not counted
    pulses(5);
    pause = 1'b1; pulses(7); pause = 1'b0;
    repeat (2) @(negedge clk);
    pulses(2);
    end_window(7);
    // saturation at 63
    pulses(80);
    end_window(63);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
