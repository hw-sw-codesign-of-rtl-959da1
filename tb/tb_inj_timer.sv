// Testbench for inj_timer: for random load values, counts the time-base
// ticks from start to expiry and checks them against the load value;
// also checks that stop abandons a count without an expiry.
module tb_inj_timer;
  import inj_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0, start = 0, stop = 0;
  itime_t load = 0;
  logic running, expired;
  int checks = 0, failures = 0;

  inj_timer dut (.clk, .rst_n, .tick_i(tick), .start_i(start), .load_i(load),
                 .stop_i(stop), .running_o(running), .expired_o(expired));

  always #5 clk = ~clk;

  // tick every 3rd clock
  int div = 0;
  always @(posedge clk) begin
    div  <= (div == 2) ? 0 : div + 1;
    tick <= (div == 2);
  end

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
    for (int k = 0; k < 40; k++) begin
      int n, ticks, clocks;
      n = (k < 2) ? k : 1 + ($urandom % 300);
      @(negedge clk) start = 1; load = itime_t'(n);
      @(negedge clk) start = 0;
      ticks = 0; clocks = 0;
      while (!expired && clocks < 10000) begin
        @(posedge clk);
        #1;
        if (tick && !expired) ticks++;
        clocks++;
      end
      // expiry comes one clock after the n-th tick (n=0: after the 1st tick)
      check(ticks == ((n == 0) ? 1 : n), $sformatf("ticks %0d for load %0d", ticks, n));
      check(!running, "stopped after expiry");
    end
    // stop
    @(negedge clk) start = 1; load = 16'd50;
    @(negedge clk) start = 0;
    repeat (20) @(negedge clk);
    stop = 1;
    @(negedge clk) stop = 0;
    check(!running, "stop");
    repeat (400) begin @(negedge clk); check(!expired, "no expiry after stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
