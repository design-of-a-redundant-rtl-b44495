// tb_speed_check: random and directed pairs of sensor counts; the fault
// output is compared with a model of the tolerance (4 + 25 % of the larger
// count) and the three-window persistence.
module tb_speed_check;
  localparam int W = 12;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [W-1:0] c1 = '0, c2 = '0;
  logic fault;
  int checks = 0, failures = 0, nbad = 0, nfault = 0;
  logic model = 1'b0;

  speed_check #(.CNT_W(W)) dut (.clk, .rst_n, .valid, .count1(c1), .count2(c2), .fault);

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
    int hi, lo;
    c1 = W'(a); c2 = W'(b);
    hi = (a > b) ? a : b; lo = (a > b) ? b : a;
    @(negedge clk); valid = 1'b1;
    @(negedge clk); valid = 1'b0;
    if (hi - lo > 4 + hi / 4) nbad++; else nbad = 0;
    model = (nbad >= 3);
    if (model) nfault++;
    check(fault == model, $sformatf("counts %0d/%0d fault %b expected %b", a, b, fault, model));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) window(100, 120);          // 20 <= 4 + 30: fine
    window(100, 140); window(100, 140);   // 40 > 39: two bad windows
    check(!fault, "fault after two windows");
    window(100, 140);
    check(fault, "no fault after three windows");
    window(50, 50);
    check(!fault, "fault not cleared");
    repeat (3) window(0, 30);             // dead sensor
    check(fault, "dead sensor not flagged");
    repeat (500) begin
      int a, b;
      a = int'($urandom_range(200));
      b = a + int'($urandom_range(60)) - 30;
      if (b < 0) b = 0;
      window(a, b);
    end
    repeat (50) window($urandom_range(4), $urandom_range(4));
    check(nfault > 2, "random run never faulted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
