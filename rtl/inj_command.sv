// Injector command.
//
// Drives one injector output (1 = open) and measures how long it was
// actually open, in time-base ticks, so that software can work out the
// fuel quantity actually injected. open_i opens the injector and clears
// the measurement; close_i closes it, and then closed_o pulses for one
// clock with actual_o holding the final count. The count saturates at its
// maximum. close_i wins over open_i.
//
// What the block does follows the design; the tick-count measurement is
// this design's choice.
//
// Timing: inj_o changes one clock after open_i / close_i.
module inj_command import inj_pkg::*; (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   tick_i,
  input  logic   open_i,
  input  logic   close_i,
  output logic   inj_o,
  output itime_t actual_o,
  output logic   closed_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inj_o    <= 1'b0;
      actual_o <= '0;
      closed_o <= 1'b0;
    end else begin
      closed_o <= 1'b0;
      if (close_i) begin
        if (inj_o) closed_o <= 1'b1;
        inj_o <= 1'b0;
      end else if (open_i) begin
        inj_o    <= 1'b1;
        actual_o <= '0;
      end else if (inj_o && tick_i && actual_o != '1) begin
        actual_o <= actual_o + 1'b1;
      end
    end
  end

endmodule
