// tb_contact_check: drives random contact combinations, sample by sample,
// and compares the fault output with a model (pedal contacts must be
// complementary, ignition contacts equal, violation on three consecutive
// samples). Directed cases cover a one- and two-sample disagreement that
// must be tolerated.
module tb_contact_check;
  logic clk = 1'b0, rst_n = 1'b0, sample_tick = 1'b0;
  logic pno = 1'b0, pnc = 1'b1, ia = 1'b1, ib = 1'b1;
  logic fault;
  int checks = 0, failures = 0, nbad = 0, nfault = 0;

  contact_check dut (.clk, .rst_n, .sample_tick, .pedal_no(pno), .pedal_nc(pnc),
                     .ign_a(ia), .ign_b(ib), .fault);

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

  task automatic sample(input logic a, input logic b, input logic c, input logic d);
    logic model;
    pno = a; pnc = b; ia = c; ib = d;
    @(negedge clk); sample_tick = 1'b1;
    @(negedge clk); sample_tick = 1'b0;
    if ((a == b) || (c != d)) nbad++; else nbad = 0;
    model = (nbad >= 3);
    if (model) nfault++;
    check(fault == model, $sformatf("contacts %b%b%b%b fault %b expected %b", a, b, c, d, fault, model));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) sample(0, 1, 1, 1);
    sample(1, 1, 1, 1); sample(1, 0, 1, 1);             // one-sample overlap
    sample(0, 0, 1, 1); sample(0, 0, 1, 1); sample(0, 1, 1, 1);
    check(!fault, "short disagreement flagged");
    repeat (3) sample(1, 0, 1, 0);                      // ignition contact open
    check(fault, "ignition disagreement not flagged");
    sample(1, 0, 0, 0);
    repeat (3) sample(1, 1, 0, 0);                      // pedal welded
    check(fault, "pedal disagreement not flagged");
    repeat (600) begin
      logic [3:0] r;
      r = 4'($urandom);
      if (r[3:2] != 2'b00) r = {r[3], ~r[3], r[1], r[1]};   // mostly healthy
      sample(r[3], r[2], r[1], r[0]);
    end
    check(nfault > 0, "random run never faulted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
