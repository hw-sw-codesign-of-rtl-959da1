// Testbench for inj_channel: one cylinder's channel runs several engine
// cycles with a moving engine angle (one 0.2 degree step every ASTEP
// clocks) and a time base (one tick every TSTEP clocks). Each cycle gets a
// fresh random stroke table of 1..5 non-overlapping windows; some opening
// times are chosen to fit their window and some to overrun it, and the
// last cycle has a window that crosses angle 0. The testbench checks each
// injector opening against the stroke's opening angle, each closing
// against the opening time or the closure angle, the 3-clock latency from
// the matching angle step to the injector output, and the status
// reported at the next cycle start.
module tb_inj_channel;
  import inj_pkg::*;
  localparam int ASTEP = 8;
  localparam int TSTEP = 10;
  localparam int TDC   = 50;

  logic clk = 0, rst_n = 0;
  angle_t angle = 0;
  logic step = 0, tick = 0;
  cyl_cfg_t cfg, act;   // command registers, table of the running cycle
  logic inj, cycle_end, busy;
  cyl_status_t st;
  int checks = 0, failures = 0;

  inj_channel dut (.clk, .rst_n, .angle_i(angle), .step_i(step), .tick_i(tick),
                   .cfg_i(cfg), .inj_o(inj), .status_o(st), .cycle_end_o(cycle_end),
                   .busy_o(busy));

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t angle=%0d", what, $time, angle); end
  endtask

  // angle and time base generators
  int acnt = 0, tcnt = 0, clocks_since_step = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      acnt <= (acnt == ASTEP - 1) ? 0 : acnt + 1;
      step <= (acnt == ASTEP - 1);
      if (acnt == ASTEP - 1) angle <= (angle == ANGLE_PERIOD - 1) ? '0 : angle + 1'b1;
      tcnt <= (tcnt == TSTEP - 1) ? 0 : tcnt + 1;
      tick <= (tcnt == TSTEP - 1);
      clocks_since_step <= (acnt == ASTEP - 1) ? 0 : clocks_since_step + 1;
    end
  end

  // expectations of the running cycle
  int  exp_n = 0;
  bit  exp_cut [N_STROKE];
  int  cur = 0;           // stroke now expected to open
  int  open_ticks = 0;
  bit  inj_q = 0;
  // the monitor samples at the falling edge, when every register has settled
  int  meas [N_STROKE];
  bit  got_done [N_STROKE];
  bit  got_cut  [N_STROKE];
  int  n_cut = 0, n_timed = 0, n_cycles = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (inj && tick) open_ticks <= open_ticks + 1;
      if (inj && !inj_q) begin
        // rising edge: 3 clocks after the step to the opening angle
        check(cur < exp_n, "unexpected opening");
        check(angle == act.stroke[cur].open_a, $sformatf("open angle of stroke %0d", cur));
        check(clocks_since_step == 3, $sformatf("open latency %0d", clocks_since_step));
        open_ticks <= 0;
      end
      if (!inj && inj_q) begin
        meas[cur] = open_ticks;
        got_done[cur] = 1;
        if (exp_cut[cur]) begin
          check(angle == act.stroke[cur].close_a, $sformatf("cut at closure angle, stroke %0d", cur));
          n_cut++;
          got_cut[cur] = 1;
        end else begin
          check(open_ticks == int'(act.stroke[cur].t_open), $sformatf("opening time of stroke %0d: %0d", cur, open_ticks));
          n_timed++;
        end
        cur++;
      end
      inj_q <= inj;
    end
  end

  // random table of n windows between angle 100 and 3500
  function automatic cyl_cfg_t make_table(int n, bit wrap_last);
    cyl_cfg_t c;
    int a;
    c = '0;
    c.enable = 1; c.n_strokes = NSTR_W'(n); c.tdc_a = angle_t'(TDC);
    a = 100;
    for (int s = 0; s < n; s++) begin
      int w, avail;
      w = 60 + ($urandom % 200);
      c.stroke[s].open_a  = angle_t'(a);
      c.stroke[s].close_a = angle_t'(a + w);
      if (wrap_last && s == n - 1) begin
        c.stroke[s].open_a  = angle_t'(3550);
        c.stroke[s].close_a = angle_t'(20);
        w = 70;
      end
      avail = w * ASTEP / TSTEP;
      c.stroke[s].t_open = itime_t'(($urandom % 2) ? avail * 6 / 10 : avail * 14 / 10);
      a = a + w + 20 + ($urandom % 300);
    end
    return c;
  endfunction

  task automatic set_expect(cyl_cfg_t c);
    act = c;
    exp_n = int'(c.n_strokes);
    for (int s = 0; s < N_STROKE; s++) begin
      int w;
      w = (int'(c.stroke[s].close_a) - int'(c.stroke[s].open_a) + ANGLE_PERIOD) % ANGLE_PERIOD;
      exp_cut[s] = int'(c.stroke[s].t_open) > w * ASTEP / TSTEP;
      got_done[s] = 0; got_cut[s] = 0; meas[s] = 0;
    end
    cur = 0;
  endtask

  initial begin
    act = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg = make_table(5, 0);
    // first cycle start latches the first table
    @(posedge cycle_end);
    set_expect(cfg);
    @(negedge clk);
    cfg = make_table(3, 0);
    for (int cyc = 0; cyc < 5; cyc++) begin
      @(posedge cycle_end);
      @(negedge clk);
      // the cycle that just ended
      check(cur == exp_n, $sformatf("strokes executed %0d of %0d", cur, exp_n));
      for (int s = 0; s < N_STROKE; s++) begin
        check(st.done[s] == got_done[s], $sformatf("done bit %0d", s));
        check(st.cut[s]  == got_cut[s],  $sformatf("cut bit %0d", s));
        if (got_done[s]) check(int'(st.actual[s]) == meas[s], $sformatf("actual %0d", s));
      end
      n_cycles++;
      // the table written during the ended cycle runs now; write the next one
      set_expect(cfg);
      cfg = make_table(1 + ($urandom % 5), cyc == 2);
    end
    check(n_cut > 0 && n_timed > 0, "both closing causes seen");
    $display("cycles=%0d timed=%0d cut=%0d", n_cycles, n_timed, n_cut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
