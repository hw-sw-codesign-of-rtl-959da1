// Testbench for stroke_seq: drives the sequencer's events (cycle start,
// open and close matches, timer expiry, injector closed) directly and
// checks every command it issues one clock later: comparator arming with
// the right stroke's angles, injector open/close, timer start with the
// stroke's opening time, cut and skipped strokes, the pending open of a
// stroke whose angle arrives while the previous one is still open, the
// forced close at a new cycle and on disable, and the reported status.
module tb_stroke_seq;
  import inj_pkg::*;
  logic clk = 0, rst_n = 0;
  cyl_cfg_t cfg;
  logic tdc = 0, om = 0, cm = 0, exp_ = 0, closed = 0;
  itime_t actual_in = 0;
  logic open_arm, open_disarm, close_arm, close_disarm;
  angle_t open_ref, close_ref;
  logic t_start, t_stop, inj_open, inj_close, cycle_end, busy;
  itime_t t_load;
  cyl_status_t st;
  int checks = 0, failures = 0;

  stroke_seq dut (
    .clk, .rst_n, .cfg_i(cfg),
    .tdc_i(tdc), .open_match_i(om), .close_match_i(cm), .expired_i(exp_),
    .closed_i(closed), .actual_i(actual_in),
    .open_arm_o(open_arm), .open_ref_o(open_ref), .open_disarm_o(open_disarm),
    .close_arm_o(close_arm), .close_ref_o(close_ref), .close_disarm_o(close_disarm),
    .timer_start_o(t_start), .timer_load_o(t_load), .timer_stop_o(t_stop),
    .inj_open_o(inj_open), .inj_close_o(inj_close),
    .status_o(st), .cycle_end_o(cycle_end), .busy_o(busy));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // apply one event for one clock, then look at the registered commands
  typedef enum {E_NONE, E_TDC, E_OPEN, E_CLOSE, E_EXP, E_OPEN_EXP} ev_t;
  task automatic ev(ev_t e);
    @(negedge clk);
    tdc  = (e == E_TDC);
    om   = (e == E_OPEN) || (e == E_OPEN_EXP);
    cm   = (e == E_CLOSE);
    exp_ = (e == E_EXP) || (e == E_OPEN_EXP);
    @(negedge clk);
    tdc = 0; om = 0; cm = 0; exp_ = 0;
  endtask

  task automatic quiet(string what);
    check(!open_arm && !close_arm && !inj_open && !inj_close && !t_start && !cycle_end, what);
  endtask

  task automatic report_close(int v);
    @(negedge clk) closed = 1; actual_in = itime_t'(v);
    @(negedge clk) closed = 0;
  endtask

  function automatic stroke_cfg_t mk(int o, int c, int t);
    stroke_cfg_t s;
    s.open_a = angle_t'(o); s.close_a = angle_t'(c); s.t_open = itime_t'(t);
    return s;
  endfunction

  initial begin
    cfg = '0;
    cfg.enable = 1; cfg.n_strokes = 3; cfg.tdc_a = 12'd100;
    cfg.stroke[0] = mk(200, 300, 11);
    cfg.stroke[1] = mk(400, 500, 22);
    cfg.stroke[2] = mk(600, 700, 33);
    cfg.stroke[3] = mk(800, 900, 44);
    cfg.stroke[4] = mk(1000, 1100, 55);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // nothing happens before the first cycle start
    ev(E_OPEN);  quiet("idle ignores open");
    check(!busy, "idle");

    // cycle start: arm stroke 0
    ev(E_TDC);
    check(cycle_end, "cycle end irq");
    check(open_arm && open_ref == 200, "arm open 0");
    check(close_arm && close_ref == 300, "arm close 0");
    check(busy, "busy");
    // stroke 0 opens, timer starts, stroke 1 opening angle armed
    ev(E_OPEN);
    check(inj_open && t_start && t_load == 11, "open 0");
    check(open_arm && open_ref == 400 && !close_arm, "arm open 1");
    // timer expiry closes it normally
    ev(E_EXP);
    check(inj_close && !t_stop, "close 0 by timer");
    check(close_arm && close_ref == 500 && !open_arm, "arm close 1");
    report_close(11);
    check(st.actual[0] == 11, "actual 0");
    // stroke 1 opens and is cut by its closure angle
    ev(E_OPEN);
    check(inj_open && t_load == 22 && open_arm && open_ref == 600, "open 1");
    ev(E_CLOSE);
    check(inj_close && t_stop, "cut 1");
    check(close_arm && close_ref == 700, "arm close 2");
    report_close(17);
    check(st.actual[1] == 17, "actual 1");
    // stroke 2's window passes without an open: skipped, cycle done
    ev(E_CLOSE);
    check(!inj_open && !inj_close && open_disarm && close_disarm, "skip 2, done");
    check(!busy, "done");
    ev(E_OPEN); quiet("done ignores open");
    // next cycle start reports done=011, cut=010; the new table has 2 strokes
    cfg.n_strokes = 2;
    ev(E_TDC);
    check(cycle_end && st.done == 5'b00011 && st.cut == 5'b00010, "status");

    // pending open: stroke 1 reached while stroke 0 still open
    ev(E_OPEN);       check(inj_open && t_load == 11, "open 0 again");
    ev(E_OPEN);       quiet("pending recorded");
    ev(E_EXP);        check(inj_close && close_arm && close_ref == 500, "close 0");
    @(negedge clk);   check(inj_open && t_start && t_load == 22, "pending opens 1");
    check(!open_arm, "no stroke 2 to arm");
    // open match and expiry in the same clock: expiry taken, open pending
    ev(E_OPEN_EXP);   check(inj_close, "close 1");
    check(open_disarm && close_disarm, "last stroke done");

    // cycle start while a stroke is open forces it closed
    cfg.n_strokes = 5;
    ev(E_TDC);
    ev(E_OPEN);       check(inj_open, "open 0");
    ev(E_TDC);
    check(inj_close && t_stop && cycle_end, "forced close at cycle start");
    check(st.done == 5'b00001 && st.cut == 5'b00001, "forced close counted as cut");
    check(open_arm && open_ref == 200, "re-armed stroke 0");

    // all five strokes run; a table change within the cycle waits for the next one
    cfg.n_strokes = 1;
    @(negedge clk) cfg.n_strokes = 5;
    for (int s = 0; s < 5; s++) begin
      ev(E_OPEN);
      check(inj_open && t_load == itime_t'(11 * (s + 1)), $sformatf("open %0d", s));
      check(open_arm == (s < 4), $sformatf("arm next %0d", s));
      ev(E_EXP);
      check(inj_close, $sformatf("close %0d", s));
    end
    check(!busy, "five done");
    ev(E_TDC);
    check(st.done == 5'b11111 && st.cut == 5'b00000, "five strokes status");

    // zero strokes: cycle starts, nothing armed
    cfg.n_strokes = 0;
    ev(E_TDC);
    check(cycle_end && !open_arm && open_disarm, "zero strokes");

    // disable while open closes the injector
    cfg.n_strokes = 1;
    ev(E_TDC);
    ev(E_OPEN);  check(inj_open, "open before disable");
    @(negedge clk) cfg.enable = 0;
    @(negedge clk);
    check(inj_close && t_stop && open_disarm, "disable closes");
    ev(E_TDC);   quiet("disabled ignores cycle start");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
