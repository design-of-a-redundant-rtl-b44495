// tb_input_test: models the pull-up/pull-down stage (inputs read 1 under
// force_hi, 0 under force_lo, their real value otherwise, and optionally a
// line stuck at 0 or 1) and checks the test sequence length, that force_hi
// and force_lo never overlap, and the pass/fail result.
module tb_input_test;
  localparam int N = 9, SETTLE = 20;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] real_in = '0, stuck1 = '0, stuck0 = '0, din;
  logic force_hi, force_lo, busy, fail;
  int checks = 0, failures = 0;

  input_test #(.N(N), .SETTLE_CYC(SETTLE)) dut (.clk, .rst_n, .start, .din,
                                                .force_hi, .force_lo, .busy, .fail);

  always #5 clk = ~clk;

  assign din = ((force_hi ? '1 : force_lo ? '0 : real_in) | stuck1) & ~stuck0;

  always @(posedge clk) if (force_hi && force_lo) begin
    failures++; $display("FAIL: force_hi and force_lo together");
  end

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

  task automatic run_test(input logic expect_fail);
    int nbusy, nhi, nlo;
    nbusy = 0; nhi = 0; nlo = 0;
    real_in = N'($urandom);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (busy) begin
      nbusy++; if (force_hi) nhi++; if (force_lo) nlo++;
      if (nbusy == SETTLE) begin @(negedge clk); start = 1'b1; end   // ignored
      else @(negedge clk);
      start = 1'b0;
    end
    check(nbusy == 3 * SETTLE, $sformatf("test lasted %0d cycles", nbusy));
    check(nhi == SETTLE && nlo == SETTLE, "force phase lengths");
    check(fail == expect_fail, $sformatf("fail %b expected %b", fail, expect_fail));
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !force_hi && !force_lo && !fail, "idle after reset");
    repeat (3) run_test(1'b0);
    for (int i = 0; i < N; i++) begin
      stuck0 = '0; stuck1 = '0;
      if (i % 2 == 0) stuck0[i] = 1'b1; else stuck1[i] = 1'b1;
      run_test(1'b1);
    end
    stuck0 = '0; stuck1 = '0;
    run_test(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
