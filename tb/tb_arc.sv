// Testbench for arc: checks that the angle ignores ticks before the first
// sync, counts one step per tick, wraps at the period (3600 steps of 0.2
// degree) and is forced to 0 by sync, with a one-cycle step strobe for each
// change.
module tb_arc;
  import inj_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0, sync = 0;
  angle_t angle;
  logic step, synced;
  int checks = 0, failures = 0;
  int exp_angle;
  int wraps = 0;

  arc dut (.clk, .rst_n, .angle_tick_i(tick), .sync_i(sync),
           .angle_o(angle), .step_o(step), .synced_o(synced));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t angle=%0d exp=%0d", what, $time, angle, exp_angle); end
  endtask

  task automatic pulse_tick();
    @(negedge clk) tick = 1;
    @(negedge clk) tick = 0;
    check(step == 1'b1 || !synced, "step strobe");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ticks before sync do nothing
    repeat (5) pulse_tick();
    check(angle == 0 && !synced, "hold before sync");
    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    check(synced && angle == 0 && step, "sync to zero");
    exp_angle = 0;
    // two full engine cycles and a bit
    for (int i = 0; i < 2 * ANGLE_PERIOD + 100; i++) begin
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
      exp_angle = (exp_angle + 1) % ANGLE_PERIOD;
      if (exp_angle == 0) wraps++;
      check(angle == angle_t'(exp_angle), "count");
      check(step, "step");
      @(negedge clk);
      check(!step, "step one cycle");
    end
    check(wraps == 2, "wrap count");
    // sync in the middle of a cycle forces 0
    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    check(angle == 0, "resync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
