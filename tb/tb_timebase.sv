// tb_timebase: checks the sample, window and self-test strobe periods of
// timebase at a reduced clock (100 Hz clock, 10 Hz samples: 10 cycles per
// sample), including that window and self-test strobes coincide with a
// sample strobe and that every strobe is one cycle wide.
module tb_timebase;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_tick, window_tick, selftest_tick;
  int checks = 0, failures = 0;

  timebase #(.CLK_HZ(100), .SAMPLE_HZ(10), .WINDOW_SAMPLES(4), .SELFTEST_SAMPLES(5))
    dut (.clk, .rst_n, .sample_tick, .window_tick, .selftest_tick);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_s = -1, last_w = -1, last_t = -1, n_s = 0, n_w = 0, n_t = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (1000) begin
      @(posedge clk); #1;
      cyc++;
      if (sample_tick) begin
        if (last_s >= 0) check(cyc - last_s == 10, $sformatf("sample period %0d", cyc - last_s));
        last_s = cyc; n_s++;
      end
      if (window_tick) begin
        check(sample_tick, "window tick without sample tick");
        if (last_w >= 0) check(cyc - last_w == 40, $sformatf("window period %0d", cyc - last_w));
        last_w = cyc; n_w++;
      end
      if (selftest_tick) begin
        check(sample_tick, "self-test tick without sample tick");
        if (last_t >= 0) check(cyc - last_t == 50, $sformatf("self-test period %0d", cyc - last_t));
        last_t = cyc; n_t++;
      end
    end
    check(n_s == 100, $sformatf("sample ticks %0d", n_s));
    check(n_w == 25, $sformatf("window ticks %0d", n_w));
    check(n_t == 20, $sformatf("self-test ticks %0d", n_t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
