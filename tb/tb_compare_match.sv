// Testbench for compare_match: sweeps the angle through two engine cycles
// and checks the match pulses of a one-shot and a continuous unit against
// the reference angles, including disarm.
module tb_compare_match;
  import inj_pkg::*;
  logic clk = 0, rst_n = 0;
  angle_t angle = 0;
  logic step = 0;
  logic arm1 = 0, dis1 = 0, arm2 = 0, dis2 = 0;
  angle_t ref1 = 0, ref2 = 0;
  logic armed1, match1, armed2, match2;
  int checks = 0, failures = 0, n1 = 0, n2 = 0;

  compare_match #(.ONE_SHOT(1'b1)) u1 (.clk, .rst_n, .angle_i(angle), .step_i(step),
    .arm_i(arm1), .ref_i(ref1), .disarm_i(dis1), .armed_o(armed1), .match_o(match1));
  compare_match #(.ONE_SHOT(1'b0)) u2 (.clk, .rst_n, .angle_i(angle), .step_i(step),
    .arm_i(arm2), .ref_i(ref2), .disarm_i(dis2), .armed_o(armed2), .match_o(match2));

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t angle=%0d", what, $time, angle); end
  endtask

  // one angle step: new angle with strobe, then a clock to see the match
  task automatic step_to(int a, bit exp1, bit exp2);
    @(negedge clk) angle = angle_t'(a); step = 1;
    @(negedge clk) step = 0;
    check(match1 == exp1, "one-shot match");
    check(match2 == exp2, "continuous match");
    if (match1) n1++;
    if (match2) n2++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) arm1 = 1; ref1 = 12'd1234; arm2 = 1; ref2 = 12'd77;
    @(negedge clk) arm1 = 0; arm2 = 0;
    check(armed1 && armed2, "armed");
    for (int c = 0; c < 2; c++)
      for (int a = 0; a < ANGLE_PERIOD; a++)
        step_to(a, (c == 0) && (a == 1234), a == 77);
    check(!armed1, "one-shot disarmed");
    check(n1 == 1 && n2 == 2, "match counts");
    // angle equal to the reference without a step strobe gives nothing
    @(negedge clk) angle = 12'd77;
    @(negedge clk);
    check(!match2, "no match without step");
    // disarm stops the continuous unit
    @(negedge clk) dis2 = 1;
    @(negedge clk) dis2 = 0;
    step_to(77, 0, 0);
    check(!armed2, "disarm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
