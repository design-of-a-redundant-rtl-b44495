// tb_xchan_monitor: a peer model that toggles its heartbeat every sample
// tick; checks the own heartbeat toggles, no fault while the peer is alive
// and agrees, peer_dead after the heartbeat stops for more than three
// ticks, peer_zv only after three disagreeing self-test checks, and that
// the peer's failure flag is reported.
module tb_xchan_monitor;
  import safemod_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, sample_tick = 1'b0, selftest_tick = 1'b0;
  logic own_zv = 1'b0, hb, dead, pzv, pfail;
  xchan_t peer = '0;
  logic peer_alive = 1'b1;
  int checks = 0, failures = 0, nticks = 0;

  xchan_monitor dut (.clk, .rst_n, .sample_tick, .selftest_tick, .own_zv, .peer,
                     .heartbeat(hb), .peer_dead(dead), .peer_zv(pzv), .peer_failed(pfail));

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

  task automatic tick();
    logic hb_before;
    hb_before = hb;
    @(negedge clk);
    sample_tick = 1'b1;
    selftest_tick = (nticks % 5 == 4);
    if (peer_alive) peer.heartbeat = ~peer.heartbeat;
    @(negedge clk);
    sample_tick = 1'b0; selftest_tick = 1'b0;
    nticks++;
    check(hb != hb_before, "own heartbeat did not toggle");
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (30) tick();
    check(!dead && !pzv && !pfail, "fault with healthy peer");
    // heartbeat stops
    peer_alive = 1'b0;
    repeat (3) tick();
    check(!dead, "peer_dead too early");
    repeat (2) tick();
    check(dead, "dead peer not detected");
    peer_alive = 1'b1; tick(); tick();
    check(!dead, "peer_dead not cleared");
    // zero-velocity disagreement: 2 checks tolerated, 3rd flagged
    peer.zero_vel = 1'b1;
    repeat (10) tick();
    check(!pzv, "zv disagreement flagged after two checks");
    repeat (5) tick();
    check(pzv, "zv disagreement not flagged after three checks");
    own_zv = 1'b1; repeat (5) tick();
    check(!pzv, "zv flag not cleared on agreement");
    peer.failure = 1'b1; tick();
    check(pfail, "peer failure not reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
