// Testbench for edge_detector: drives level pulses of random length and
// checks that each gives exactly one one-cycle output pulse, three clocks
// after the rising input is sampled.
module tb_edge_detector;
  logic clk = 0, rst_n = 0, sig = 0, pulse;
  int checks = 0, failures = 0;
  int edges_in = 0, pulses_out = 0;
  logic [3:0] hist;   // sig sampled at previous clock edges

  edge_detector dut (.clk, .rst_n, .sig_i(sig), .pulse_o(pulse));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: pulse at edge k equals (sig at edge k-3) & !(sig at edge k-4)
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (pulse !== (hist[2] & ~hist[3])) begin
        failures++;
        $display("mismatch at %0t: pulse=%b hist=%b", $time, pulse, hist);
      end
      if (pulse) pulses_out++;
    end
    hist <= {hist[2:0], sig};
  end

  initial begin
    hist = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) begin
      int hi, lo;
      hi = 1 + ($urandom % 6);
      lo = 1 + ($urandom % 6);
      @(negedge clk) sig = 1; edges_in++;
      repeat (hi) @(negedge clk);
      sig = 0;
      repeat (lo) @(negedge clk);
    end
    repeat (6) @(posedge clk);
    checks++;
    if (pulses_out != edges_in) begin
      failures++;
      $display("pulse count %0d, expected %0d", pulses_out, edges_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
