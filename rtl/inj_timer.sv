// Opening-time timer.
//
// Loaded with an opening time at start_i, it counts down once per
// time-base tick and raises a one-cycle expired_o pulse on the tick that
// takes it to zero; a time of zero expires on the first tick. stop_i
// abandons the count without an expiry pulse. start_i wins over stop_i.
//
// The timer is named by the design; its down-counting form and the tick
// input (a shared prescaled time base) are this design's choice.
//
// Timing: for a load value N >= 1 the expiry pulse comes one clock after
// the N-th tick following start_i.
module inj_timer import inj_pkg::*; (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   tick_i,    // time base
  input  logic   start_i,
  input  itime_t load_i,
  input  logic   stop_i,
  output logic   running_o,
  output logic   expired_o
);

  itime_t remain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remain    <= '0;
      running_o <= 1'b0;
      expired_o <= 1'b0;
    end else begin
      expired_o <= 1'b0;
      if (start_i) begin
        remain    <= load_i;
        running_o <= 1'b1;
      end else if (stop_i) begin
        running_o <= 1'b0;
      end else if (running_o && tick_i) begin
        if (remain <= itime_t'(1)) begin
          remain    <= '0;
          running_o <= 1'b0;
          expired_o <= 1'b1;
        end else begin
          remain <= remain - 1'b1;
        end
      end
    end
  end

endmodule
