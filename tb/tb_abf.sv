// tb_abf: drives the anti-bounce filter bank with random sample streams, a
// 5 Hz chatter (level changing on every 100 ms sample) and a hold window,
// and compares every output with a reference model: an output takes a new
// level only when the last two samples both showed it.
module tb_abf;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_tick = 1'b0, hold = 1'b0;
  logic [N-1:0] din = '0, dout;
  logic [N-1:0] prev = '0, model = '0;
  int checks = 0, failures = 0;

  abf #(.N(N), .STABLE(2)) dut (.clk, .rst_n, .sample_tick, .hold, .din, .dout);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one sample: present d, pulse sample_tick, update model, compare
  task automatic sample(input logic [N-1:0] d);
    din = d;
    @(negedge clk); sample_tick = 1'b1;
    @(negedge clk); sample_tick = 1'b0;
    if (!hold) begin
      for (int i = 0; i < N; i++)
        if (d[i] == prev[i]) model[i] = d[i];
      prev = d;
    end
    repeat (2) @(negedge clk);
    check(dout == model, $sformatf("dout %b model %b", dout, model));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(dout == '0, "reset value");
    // random streams
    repeat (400) sample(N'($urandom));
    // settle to all ones, then chatter at 5 Hz: output must not move
    repeat (3) sample('1);
    check(dout == '1, "settled high");
    for (int k = 0; k < 20; k++) begin
      sample(k[0] ? '1 : '0);
      check(dout == '1, "5 Hz chatter passed the filter");
    end
    // a single-sample glitch low is removed
    sample('1); sample('0); sample('1);
    check(dout == '1, "one-sample glitch passed");
    // hold: samples ignored
    hold = 1'b1;
    repeat (4) sample('0);
    check(dout == '1, "filter sampled during hold");
    hold = 1'b0;
    sample('0); sample('0);
    check(dout == '0, "two low samples not accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
