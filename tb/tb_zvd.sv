// tb_zvd: applies window counts that sweep up and down across V1 = 10 and
// V2 = 22, plus random counts, and compares the zero-velocity flag with the
// hysteresis rule evaluated in the testbench. Also checks that counts
// between the thresholds never change the flag.
module tb_zvd;
  localparam int W = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 1'b0;
  logic [W-1:0] c1 = '0, c2 = '0, v1 = 12'd10, v2 = 12'd22, speed;
  logic zero_vel;
  logic model = 1'b0;
  int checks = 0, failures = 0, rises = 0, falls = 0;

  zvd #(.CNT_W(W)) dut (.clk, .rst_n, .valid, .count1(c1), .count2(c2), .v1, .v2, .zero_vel, .speed);

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

  task automatic window(input int a, input int b);
    int v;
    c1 = W'(a); c2 = W'(b);
    v = (a > b) ? a : b;
    @(negedge clk); valid = 1'b1;
    @(negedge clk); valid = 1'b0;
    if (!model && v <= int'(v1)) begin model = 1'b1; rises++; end
    else if (model && v >= int'(v2)) begin model = 1'b0; falls++; end
    check(zero_vel == model, $sformatf("counts %0d/%0d: flag %b expected %b", a, b, zero_vel, model));
    check(int'(speed) == v, "speed value");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!zero_vel, "reset to moving");
    // acceleration and deceleration sweeps
    for (int s = 0; s <= 40; s++) window(s, s);
    for (int s = 40; s >= 0; s--) window(s, s);
    // inside the hysteresis band the flag holds
    window(0, 0);
    for (int s = 11; s <= 21; s++) begin window(s, s); check(zero_vel, "still flag dropped inside band"); end
    window(30, 30);
    for (int s = 21; s >= 11; s--) begin window(s, s); check(!zero_vel, "moving flag dropped inside band"); end
    // only one sensor reading high keeps the train moving
    window(0, 30);
    check(!zero_vel, "larger count not used");
    // random
    repeat (300) window($urandom_range(35), $urandom_range(35));
    // other thresholds
    v1 = 12'd3; v2 = 12'd5;
    repeat (100) window($urandom_range(8), $urandom_range(8));
    check(rises > 5 && falls > 5, "too few transitions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
