// Stroke sequencer: the injection control of one cylinder.
//
// At the cylinder's cycle-start angle (tdc_i, the exhaust top dead centre
// at which the control law hands over the strokes of the coming cycle) it
// copies the stroke table from the command registers into its own active
// copy, reports the cycle just ended, raises cycle_end_o (an interrupt
// request to software) and starts the new cycle at stroke 0. Software can
// therefore rewrite the command registers at any time during a cycle; what
// is there at the next cycle start is what that cycle executes. For each of the n_strokes strokes
// it arms the open comparator with the stroke's opening angle and the
// close comparator with its closure angle. The injector opens on the open
// match, never before the opening angle, and the opening-time timer starts.
// It closes when the timer expires or, if the closure angle comes first,
// on the close match (the stroke is then "cut"), so it is never open past
// the closure angle. A stroke whose closure angle passes before it could
// open is skipped. The next stroke's opening angle is armed as soon as the
// current stroke opens; if it is reached while the injector is still open,
// the next stroke opens right after the current one closes. Strokes not
// finished when the next cycle starts are abandoned, and an injector still
// open is closed then. Clearing enable closes the injector and stops.
//
// The windowed open/close rule and the 5-stroke limit follow the design;
// the state machine, the pending-open rule and the status bookkeeping are
// this design's own.
//
// Timing: each command (arm, open, close, timer start) is issued one clock
// after the event that causes it; the sequencer reacts to every event in
// the cycle it arrives. The cycle-start angle in cfg_i is used by the
// channel's cycle comparator, not here, so lint reports those bits unused.
module stroke_seq import inj_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  input  cyl_cfg_t    cfg_i,
  // events
  input  logic        tdc_i,          // cycle-start angle reached
  input  logic        open_match_i,
  input  logic        close_match_i,
  input  logic        expired_i,      // opening time elapsed
  input  logic        closed_i,       // injector command has closed
  input  itime_t      actual_i,       // measured opening time (valid with closed_i)
  // compare&match control
  output logic        open_arm_o,
  output angle_t      open_ref_o,
  output logic        open_disarm_o,
  output logic        close_arm_o,
  output angle_t      close_ref_o,
  output logic        close_disarm_o,
  // timer and injector command
  output logic        timer_start_o,
  output itime_t      timer_load_o,
  output logic        timer_stop_o,
  output logic        inj_open_o,
  output logic        inj_close_o,
  // status
  output cyl_status_t status_o,
  output logic        cycle_end_o,
  output logic        busy_o          // a cycle is in progress
);

  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_OPEN, S_DONE} state_t;

  typedef logic [NSTR_W-1:0] idx_t;

  state_t              state;
  idx_t                idx, cls_idx;
  logic                pend;
  logic [N_STROKE-1:0] done_w, cut_w;
  idx_t                n_eff, n_new;
  stroke_cfg_t [N_STROKE-1:0] tab;   // active stroke table of this cycle

  assign n_new  = (cfg_i.n_strokes > idx_t'(N_STROKE)) ? idx_t'(N_STROKE) : cfg_i.n_strokes;
  assign busy_o = (state == S_ARMED) || (state == S_OPEN);

  // one-hot bit of the current stroke
  function automatic logic [N_STROKE-1:0] bit_of(idx_t i);
    return N_STROKE'(1) << i;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      idx            <= '0;
      n_eff          <= '0;
      tab            <= '0;
      cls_idx        <= '0;
      pend           <= 1'b0;
      done_w         <= '0;
      cut_w          <= '0;
      status_o       <= '0;
      cycle_end_o    <= 1'b0;
      open_arm_o     <= 1'b0;
      open_ref_o     <= '0;
      open_disarm_o  <= 1'b0;
      close_arm_o    <= 1'b0;
      close_ref_o    <= '0;
      close_disarm_o <= 1'b0;
      timer_start_o  <= 1'b0;
      timer_load_o   <= '0;
      timer_stop_o   <= 1'b0;
      inj_open_o     <= 1'b0;
      inj_close_o    <= 1'b0;
    end else begin
      cycle_end_o    <= 1'b0;
      open_arm_o     <= 1'b0;
      open_disarm_o  <= 1'b0;
      close_arm_o    <= 1'b0;
      close_disarm_o <= 1'b0;
      timer_start_o  <= 1'b0;
      timer_stop_o   <= 1'b0;
      inj_open_o     <= 1'b0;
      inj_close_o    <= 1'b0;

      if (closed_i) status_o.actual[cls_idx] <= actual_i;

      if (!cfg_i.enable) begin
        if (state == S_OPEN) begin
          inj_close_o  <= 1'b1;
          timer_stop_o <= 1'b1;
          cls_idx      <= idx;
        end
        if (state != S_IDLE) begin
          open_disarm_o  <= 1'b1;
          close_disarm_o <= 1'b1;
        end
        state <= S_IDLE;
        pend  <= 1'b0;
      end else if (tdc_i) begin
        // report the cycle that ends here
        if (state == S_OPEN) begin
          inj_close_o     <= 1'b1;
          timer_stop_o    <= 1'b1;
          cls_idx         <= idx;
          status_o.done   <= done_w | bit_of(idx);
          status_o.cut    <= cut_w  | bit_of(idx);
        end else begin
          status_o.done   <= done_w;
          status_o.cut    <= cut_w;
        end
        done_w      <= '0;
        cut_w       <= '0;
        cycle_end_o <= 1'b1;
        idx         <= '0;
        pend        <= 1'b0;
        tab         <= cfg_i.stroke;
        n_eff       <= n_new;
        if (n_new == '0) begin
          state          <= S_DONE;
          open_disarm_o  <= 1'b1;
          close_disarm_o <= 1'b1;
        end else begin
          state       <= S_ARMED;
          open_arm_o  <= 1'b1;
          open_ref_o  <= cfg_i.stroke[0].open_a;
          close_arm_o <= 1'b1;
          close_ref_o <= cfg_i.stroke[0].close_a;
        end
      end else begin
        unique case (state)
          S_ARMED: begin
            if (close_match_i) begin
              // window closed before the stroke could open: skip it
              pend <= 1'b0;
              if (idx + 1'b1 >= n_eff) begin
                state          <= S_DONE;
                open_disarm_o  <= 1'b1;
                close_disarm_o <= 1'b1;
              end else begin
                idx         <= idx + 1'b1;
                open_arm_o  <= 1'b1;
                open_ref_o  <= tab[idx + 1'b1].open_a;
                close_arm_o <= 1'b1;
                close_ref_o <= tab[idx + 1'b1].close_a;
              end
            end else if (open_match_i || pend) begin
              state         <= S_OPEN;
              pend          <= 1'b0;
              inj_open_o    <= 1'b1;
              timer_start_o <= 1'b1;
              timer_load_o  <= tab[idx].t_open;
              if (idx + 1'b1 < n_eff) begin
                open_arm_o <= 1'b1;
                open_ref_o <= tab[idx + 1'b1].open_a;
              end
            end
          end
          S_OPEN: begin
            if (expired_i || close_match_i) begin
              inj_close_o <= 1'b1;
              cls_idx     <= idx;
              done_w      <= done_w | bit_of(idx);
              if (!expired_i) begin
                cut_w        <= cut_w | bit_of(idx);
                timer_stop_o <= 1'b1;
              end
              if (idx + 1'b1 >= n_eff) begin
                state          <= S_DONE;
                open_disarm_o  <= 1'b1;
                close_disarm_o <= 1'b1;
                pend           <= 1'b0;
              end else begin
                state       <= S_ARMED;
                idx         <= idx + 1'b1;
                close_arm_o <= 1'b1;
                close_ref_o <= tab[idx + 1'b1].close_a;
                pend        <= pend | open_match_i;
              end
            end else if (open_match_i) begin
              pend <= 1'b1;
            end
          end
          default: ;  // S_IDLE, S_DONE: wait for the next cycle start
        endcase
      end
    end
  end

  // Command rules: never open and close in the same clock, and only open
  // an injector that the sequencer does not already hold open.
  a_open_close: assert property (@(posedge clk) disable iff (!rst_n) !(inj_open_o && inj_close_o));
  a_open_once:  assert property (@(posedge clk) disable iff (!rst_n) inj_open_o |-> state == S_OPEN);
  a_timer_open: assert property (@(posedge clk) disable iff (!rst_n) timer_start_o == inj_open_o);

endmodule
