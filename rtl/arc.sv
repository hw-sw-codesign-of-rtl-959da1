// Angular clock generator (engine angle reference).
//
// Keeps the engine angle: a counter over one 720 degree engine cycle in
// 0.2 degree steps (0..ANGLE_PERIOD-1). Each one-cycle angle_tick_i pulse
// advances the angle by one step and wraps at the period; a sync_i pulse
// (the camshaft reference, taken here as angle 0) forces the angle to 0.
// The angle is only counted once the first sync has been seen, so that
// the reference is never used before it is phased to the engine.
//
// The period and resolution follow the application; turning raw
// crankshaft tooth signals into 0.2 degree pulses is done ahead of this
// block, and the sync-at-zero convention is this design's choice.
//
// Timing: angle_o and step_o update one clock after the input pulse;
// step_o is a one-cycle strobe marking each new angle value.
module arc import inj_pkg::*; #(
  parameter int unsigned PERIOD = ANGLE_PERIOD
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   angle_tick_i, // one 0.2 degree step (one-cycle pulse)
  input  logic   sync_i,       // cycle reference, angle 0 (one-cycle pulse)
  output angle_t angle_o,
  output logic   step_o,       // angle_o has just taken a new value
  output logic   synced_o      // a sync has been seen
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      angle_o  <= '0;
      step_o   <= 1'b0;
      synced_o <= 1'b0;
    end else begin
      step_o <= 1'b0;
      if (sync_i) begin
        angle_o  <= '0;
        step_o   <= 1'b1;
        synced_o <= 1'b1;
      end else if (angle_tick_i && synced_o) begin
        angle_o <= (angle_o == angle_t'(PERIOD - 1)) ? '0 : angle_o + 1'b1;
        step_o  <= 1'b1;
      end
    end
  end

endmodule
