// tb_diag_collector: random fault patterns, sampled only on self-test
// ticks; checks the latched register against an OR-accumulating model, that
// faults between ticks are not taken, and that only reset clears them.
module tb_diag_collector;
  import safemod_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, selftest_tick = 1'b0;
  fault_t fin = '0, faults, model = '0;
  logic failure;
  int checks = 0, failures = 0;

  diag_collector dut (.clk, .rst_n, .selftest_tick, .fault_in(fin), .faults, .failure);

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

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 20; round++) begin
      for (int k = 0; k < 6; k++) begin
        // a pulse between ticks is ignored
        fin = fault_t'($urandom); @(negedge clk);
        check(faults == model, "fault taken without a tick");
        // one tick with a sparse pattern
        fin = fault_t'($urandom & $urandom & $urandom);
        selftest_tick = 1'b1; @(negedge clk); selftest_tick = 1'b0;
        model = model | fin;
        check(faults == model, $sformatf("faults %b expected %b", faults, model));
        check(failure == (model != '0), "failure flag");
      end
      rst_n = 1'b0; @(negedge clk); rst_n = 1'b1; model = '0;
      check(faults == '0 && !failure, "reset does not clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
