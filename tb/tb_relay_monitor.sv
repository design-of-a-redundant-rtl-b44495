// tb_relay_monitor: a relay model whose NC read-back follows the coil after
// a delay; checks no fault for a healthy relay (delay shorter than the
// settle time), a fault for a welded or stuck relay once settled, and that
// hold masks the check.
module tb_relay_monitor;
  logic clk = 1'b0, rst_n = 1'b0, sample_tick = 1'b0, hold = 1'b0;
  logic [1:0] coil = '0, rb;
  logic [1:0] stuck_closed = '0, stuck_open = '0;
  logic fault;
  logic [1:0] dly [3];
  int checks = 0, failures = 0, cyc = 0;

  relay_monitor #(.N(2), .SETTLE_SAMPLES(4)) dut (.clk, .rst_n, .sample_tick, .hold,
                                                 .coil, .nc_rb(rb), .fault);

  always #5 clk = ~clk;

  // relay model: NC closed when coil off, 2 sample periods of delay
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sample_tick <= (cyc % 10 == 9);
    if (sample_tick) begin
      dly[0] <= ~coil;
      dly[1] <= dly[0];
      dly[2] <= dly[1];
    end
  end
  assign rb = (dly[1] | stuck_closed) & ~stuck_open;

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

  int nfault;
  task automatic run(input int n_cycles);
    nfault = 0;
    repeat (n_cycles) begin @(negedge clk); if (fault) nfault++; end
  endtask

  initial begin
    dly[0] = '1; dly[1] = '1; dly[2] = '1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(200);
    check(nfault == 0, "fault with healthy relays off");
    for (int k = 0; k < 8; k++) begin
      coil = 2'($urandom);
      run(200);
      check(nfault == 0, $sformatf("fault with healthy relays, coil %b", coil));
    end
    // brake relay welded (NC stays open although coil off)
    coil = 2'b00; run(100);
    stuck_open = 2'b10;
    run(60);
    check(nfault > 0, "welded relay not detected");
    stuck_open = '0; run(50);
    // door relay does not pick up: NC stays closed with coil on
    coil = 2'b01; stuck_closed = 2'b01;
    run(30);
    check(nfault == 0, "fault inside settle time");
    run(60);
    check(nfault > 0, "relay not picking up not detected");
    hold = 1'b1; run(50);
    check(nfault == 0, "fault while held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
