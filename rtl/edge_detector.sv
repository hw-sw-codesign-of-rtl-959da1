// Edge detector.
//
// Turns a level pulse that may last many clock cycles into a pulse of
// exactly one clock cycle, issued on the rising edge of the input. This
// is how pulses from outside the synchronous hardware (sensor pulses,
// software strobes) are brought to a one-cycle event protocol. The input
// is first passed through a two-flop synchronizer (this design's choice,
// since the sources are asynchronous to the clock).
//
// Timing: pulse_o rises three clocks after the input's rising edge is
// sampled (two synchronizer stages plus the edge register) and lasts one
// clock. A new pulse needs the input low for at least one sampled cycle.
module edge_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic sig_i,    // level input, any length
  output logic pulse_o   // one-cycle pulse per rising edge
);

  logic [2:0] sh;  // sync stage 0, sync stage 1, previous value

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh      <= '0;
      pulse_o <= 1'b0;
    end else begin
      sh      <= {sh[1:0], sig_i};
      pulse_o <= sh[1] & ~sh[2];
    end
  end

endmodule
