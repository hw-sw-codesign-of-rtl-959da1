// Injection channel of one cylinder.
//
// Groups the hardware that serves one injector: three compare&match units
// (cycle start, stroke opening angle, stroke closure angle), one
// opening-time timer, the stroke sequencer and the injector command. Four
// such channels give the 12 compare&match units, 4 timers and 8 custom
// control blocks (4 sequencers, 4 injector commands) of the hardware
// partition. The grouping by cylinder is this design's reading of those
// counts.
//
// The cycle-start comparator runs continuously with the cylinder's
// programmed angle; it is re-armed whenever that angle is changed or the
// channel is enabled, and disarmed while the channel is disabled.
//
// Timing: from an angle step that matches the opening angle, the injector
// output rises 3 clocks later (comparator, sequencer, injector command).
module inj_channel import inj_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  input  angle_t      angle_i,
  input  logic        step_i,
  input  logic        tick_i,      // time base of the opening times
  input  cyl_cfg_t    cfg_i,
  output logic        inj_o,       // injector drive, 1 = open
  output cyl_status_t status_o,
  output logic        cycle_end_o, // interrupt request: cycle ended
  output logic        busy_o
);

  logic   tdc_arm, tdc_disarm, tdc_armed, tdc_match;
  angle_t tdc_q;
  logic   en_q;

  logic   open_arm, open_disarm, open_armed, open_match;
  logic   close_arm, close_disarm, close_armed, close_match;
  angle_t open_ref, close_ref;
  logic   t_start, t_stop, t_running, t_expired;
  itime_t t_load, actual;
  logic   c_open, c_close, c_closed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tdc_q <= '0;
      en_q  <= 1'b0;
    end else begin
      tdc_q <= cfg_i.tdc_a;
      en_q  <= cfg_i.enable;
    end
  end

  assign tdc_arm    = cfg_i.enable && (!en_q || (tdc_q != cfg_i.tdc_a));
  assign tdc_disarm = !cfg_i.enable;

  compare_match #(.ONE_SHOT(1'b0)) u_cm_tdc (
    .clk, .rst_n, .angle_i, .step_i,
    .arm_i(tdc_arm), .ref_i(cfg_i.tdc_a), .disarm_i(tdc_disarm),
    .armed_o(tdc_armed), .match_o(tdc_match)
  );

  compare_match #(.ONE_SHOT(1'b1)) u_cm_open (
    .clk, .rst_n, .angle_i, .step_i,
    .arm_i(open_arm), .ref_i(open_ref), .disarm_i(open_disarm),
    .armed_o(open_armed), .match_o(open_match)
  );

  compare_match #(.ONE_SHOT(1'b1)) u_cm_close (
    .clk, .rst_n, .angle_i, .step_i,
    .arm_i(close_arm), .ref_i(close_ref), .disarm_i(close_disarm),
    .armed_o(close_armed), .match_o(close_match)
  );

  inj_timer u_timer (
    .clk, .rst_n, .tick_i,
    .start_i(t_start), .load_i(t_load), .stop_i(t_stop),
    .running_o(t_running), .expired_o(t_expired)
  );

  stroke_seq u_seq (
    .clk, .rst_n, .cfg_i,
    .tdc_i(tdc_match), .open_match_i(open_match), .close_match_i(close_match),
    .expired_i(t_expired), .closed_i(c_closed), .actual_i(actual),
    .open_arm_o(open_arm), .open_ref_o(open_ref), .open_disarm_o(open_disarm),
    .close_arm_o(close_arm), .close_ref_o(close_ref), .close_disarm_o(close_disarm),
    .timer_start_o(t_start), .timer_load_o(t_load), .timer_stop_o(t_stop),
    .inj_open_o(c_open), .inj_close_o(c_close),
    .status_o, .cycle_end_o, .busy_o
  );

  inj_command u_cmd (
    .clk, .rst_n, .tick_i,
    .open_i(c_open), .close_i(c_close),
    .inj_o, .actual_o(actual), .closed_o(c_closed)
  );

  // While the injector is held open by a stroke its timer runs or has just
  // expired: an open command always comes with a timer start.
  a_open_timer: assert property (@(posedge clk) disable iff (!rst_n) c_open |-> t_start);
  // A match only comes from an armed comparator.
  a_open_armed: assert property (@(posedge clk) disable iff (!rst_n) $rose(open_match) |-> $past(open_armed));

  // The armed and running flags are not needed inside the channel.
  logic unused;
  assign unused = tdc_armed ^ open_armed ^ close_armed ^ t_running;

endmodule
