// Compare&match unit.
//
// Holds a reference angle and raises a one-cycle match pulse on the angle
// step at which the engine angle equals it. Because the engine angle moves
// one step at a time, equality cannot be skipped over. The unit is armed
// by arm_i, which loads ref_i; in one-shot mode (ONE_SHOT=1) it disarms
// itself after a match, otherwise it matches once per engine cycle until
// disarmed. disarm_i clears it; arm_i wins when both are high.
//
// The function (angle compare against a programmed value) is what the
// name implies; the arming scheme is this design's choice.
//
// Timing: match_o is registered, one clock after step_o.
module compare_match import inj_pkg::*; #(
  parameter bit ONE_SHOT = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  angle_t angle_i,
  input  logic   step_i,    // angle_i has a new value this cycle
  input  logic   arm_i,
  input  angle_t ref_i,
  input  logic   disarm_i,
  output logic   armed_o,
  output logic   match_o
);

  angle_t ref_q;
  logic   hit;

  assign hit = armed_o && step_i && (angle_i == ref_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q   <= '0;
      armed_o <= 1'b0;
      match_o <= 1'b0;
    end else begin
      match_o <= hit && !arm_i && !disarm_i;
      if (arm_i) begin
        ref_q   <= ref_i;
        armed_o <= 1'b1;
      end else if (disarm_i) begin
        armed_o <= 1'b0;
      end else if (hit && ONE_SHOT) begin
        armed_o <= 1'b0;
      end
    end
  end

endmodule
