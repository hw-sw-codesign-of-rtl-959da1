// Testbench for inj_command: opens and closes the injector at random
// times and checks the output level and the measured opening time
// against the number of time-base ticks counted while it was open.
module tb_inj_command;
  import inj_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0, open = 0, close = 0;
  logic inj, closed;
  itime_t actual;
  int checks = 0, failures = 0;

  inj_command dut (.clk, .rst_n, .tick_i(tick), .open_i(open), .close_i(close),
                   .inj_o(inj), .actual_o(actual), .closed_o(closed));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 50; k++) begin
      int len, ticks;
      len = 2 + ($urandom % 200);
      @(negedge clk) open = 1;
      @(negedge clk) open = 0;
      check(inj, "opened");
      ticks = 0;
      for (int i = 0; i < len; i++) begin
        tick = ($urandom % 4 == 0);
        if (tick) ticks++;
        @(negedge clk);
        check(inj, "stays open");
      end
      tick = 0;
      close = 1;
      @(negedge clk) close = 0;
      check(!inj, "closed");
      check(closed, "closed pulse");
      check(actual == itime_t'(ticks), $sformatf("actual %0d exp %0d", actual, ticks));
      @(negedge clk);
      check(!closed, "closed pulse one cycle");
      // ticks while closed do not count
      repeat (10) begin tick = 1; @(negedge clk); end
      tick = 0;
      check(actual == itime_t'(ticks), "holds while closed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
