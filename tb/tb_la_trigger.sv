// tb_la_trigger: self-checking test of the trigger sequencer. Checks that it
// waits while armed, fires on the first matching edge (including masked
// don't-care bits), fires on a forced trigger, runs until full or stop, that a
// new arm restarts it, and that window and fired cover exactly the expected
// edges.
module tb_la_trigger;
  import apsi_pkg::*;
  localparam int unsigned W = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, arm, force_trig, stop, full, window, fired;
  logic [W-1:0] probe, value, mask;
  la_state_e state;
  int checks = 0, failures = 0;

  la_trigger #(.PROBE_W(W)) dut (.clk, .rst, .arm, .force_trig, .stop, .full,
    .probe, .value, .mask, .state, .window, .fired);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %0d)", what, state); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; arm = 0; force_trig = 0; stop = 0; full = 0;
    probe = '0; value = 16'hA5_00; mask = 16'hFF_00;
    tick(); tick(); rst = 0;
    check(state == LA_IDLE, "idle after reset");
    probe = 16'hA5_12;
    #1 check(!window && !fired, "no capture while idle");
    arm = 1; tick(); arm = 0;
    check(state == LA_ARMED, "armed");
    // non-matching values keep it armed
    for (int k = 0; k < 5; k++) begin
      probe = 16'h5A_00 + 16'(k); #1;
      check(!window && !fired, "no capture before trigger");
      tick();
      check(state == LA_ARMED, "still armed");
    end
    // matching upper byte, don't-care lower byte
    probe = 16'hA5_77; #1;
    check(fired && window, "fires on pattern with don't-care bits");
    tick();
    check(state == LA_RUN, "running after trigger");
    probe = 16'h0000; #1;
    check(window && !fired, "window open while running, whatever the probe");
    tick(); tick();
    full = 1; #1;
    check(!window, "no capture once full");
    tick(); full = 0;
    check(state == LA_DONE, "done after full");
    // re-arm and force
    mask = 16'hFFFF; value = 16'h1234; probe = 16'h0000;
    arm = 1; tick(); arm = 0;
    check(state == LA_ARMED, "re-armed");
    tick();
    force_trig = 1; #1;
    check(fired && window, "forced trigger fires");
    tick(); force_trig = 0;
    check(state == LA_RUN, "running after forced trigger");
    stop = 1; #1;
    check(!window, "stop closes the window");
    tick(); stop = 0;
    check(state == LA_DONE, "done after stop");
    // stop while armed
    arm = 1; tick(); arm = 0;
    stop = 1; tick(); stop = 0;
    check(state == LA_DONE, "stop while armed");
    // arm while running restarts
    arm = 1; tick(); arm = 0; force_trig = 1; tick(); force_trig = 0;
    check(state == LA_RUN, "running");
    arm = 1; #1;
    check(!window, "arm closes the window");
    tick(); arm = 0;
    check(state == LA_ARMED, "arm while running restarts");
    // arm and force together start the capture at once
    stop = 1; tick(); stop = 0;
    arm = 1; force_trig = 1; #1;
    check(!window, "no sample on the arm edge itself");
    tick(); arm = 0; force_trig = 0; #1;
    check(state == LA_RUN && window, "arm with force starts the capture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
