// End-to-end testbench of inj_driver_top at its default parameters.
//
// A 40 MHz clock and an engine turning at 8000 rpm: one 0.2 degree angle
// pulse every 167 clocks (4.2 us), a cam-sync pulse at angle 0, so one
// 720 degree engine cycle lasts 3600 * 167 clocks (15 ms). The four
// cylinders start their cycles 180 degrees apart. A small software model
// plays the CPU: it writes the stroke tables over the register bus, and
// on each cylinder's interrupt it checks the reported status of the cycle
// that ended, writes the table for the following cycle and clears the
// flag.
//
// Each cycle every cylinder runs one of three stroke tables:
//   plain   five separate windows, each closed by its timer or, when the
//           opening time overruns the window, by its closure angle;
//   overlap stroke 1's opening angle comes while stroke 0 is still open
//           (it opens right after stroke 0 closes), stroke 2's opening
//           angle has already passed (its window closes and it is skipped);
//   forced  the last window reaches past the next cycle start, where the
//           injector is closed.
// The monitor checks each injector edge against the stroke it belongs to
// and counts each mechanism; a mechanism that never happens is a failure.
// So are an unexpected edge, a missing stroke and a wrong status value.
module tb_inj_driver_top;
  import inj_pkg::*;
  localparam int ASTEP  = 167;   // clocks per 0.2 degree at 8000 rpm, 40 MHz
  localparam int TDIV   = 40;    // clocks per opening-time tick (top default)
  localparam int NCYC   = 4;     // engine cycles checked

  typedef enum int {K_TIMER, K_ANGLE, K_TDC} close_t;
  typedef enum int {T_PLAIN, T_OVERLAP, T_FORCED} table_t;

  logic clk = 0, rst_n = 0;
  logic angle_clk = 0, cam = 0;
  logic [8:0] addr = 0;
  logic wr = 0, rd = 0;
  logic [7:0] wdata = 0, rdata;
  logic [N_CYL-1:0] irq, inj;
  angle_t angle;
  int checks = 0, failures = 0;

  inj_driver_top dut (
    .clk, .rst_n, .angle_clk_i(angle_clk), .cam_sync_i(cam),
    .bus_addr_i(addr), .bus_wr_i(wr), .bus_wdata_i(wdata), .bus_rd_i(rd),
    .bus_rdata_o(rdata), .irq_o(irq), .inj_o(inj), .angle_o(angle));

  always #12.5ns clk = ~clk;

  initial begin
    #100ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t angle=%0d", what, $time, angle); end
  endtask

  // ---------------------------------------------------------------- engine
  int eng = 3590;          // engine model angle, in 0.2 degree steps
  int ecnt = 0;
  always @(posedge clk) begin
    ecnt <= (ecnt == ASTEP - 1) ? 0 : ecnt + 1;
    if (ecnt == ASTEP - 1) eng <= (eng + 1) % ANGLE_PERIOD;
    angle_clk <= (ecnt < 2);                       // 2-clock wide pulses
    cam       <= (eng == 0) && (ecnt < 3);         // 3-clock wide sync
  end

  // ------------------------------------------------------- stroke tables
  // written[c]: table in the command registers (runs from the next cycle
  // start); act[c]: table of the running cycle; expectations alongside.
  cyl_cfg_t written [N_CYL], act [N_CYL];
  table_t   wtype [N_CYL];
  bit       w_skip [N_CYL][N_STROKE], a_skip [N_CYL][N_STROKE];
  bit       w_pend [N_CYL][N_STROKE], a_pend [N_CYL][N_STROKE];
  close_t   w_kind [N_CYL][N_STROKE], a_kind [N_CYL][N_STROKE];

  function automatic int tdc_of(int c);
    return c * 900;                               // 180 degrees apart
  endfunction

  function automatic angle_t rel(int c, int a);
    return angle_t'((tdc_of(c) + a) % ANGLE_PERIOD);
  endfunction

  function automatic int avail(int w);             // ticks in a window of w steps
    return w * ASTEP / TDIV;
  endfunction

  task automatic make_table(int c, table_t t);
    cyl_cfg_t g;
    g = '0;
    g.enable = 1; g.tdc_a = angle_t'(tdc_of(c));
    for (int s = 0; s < N_STROKE; s++) begin
      w_skip[c][s] = 0; w_pend[c][s] = 0; w_kind[c][s] = K_TIMER;
    end
    unique case (t)
      T_PLAIN: begin
        int a;
        a = 100;
        g.n_strokes = 5;
        for (int s = 0; s < 5; s++) begin
          int w;
          w = 60 + ($urandom % 200);
          g.stroke[s].open_a  = rel(c, a);
          g.stroke[s].close_a = rel(c, a + w);
          if ($urandom % 3 == 0) begin
            g.stroke[s].t_open = itime_t'(avail(w) * 14 / 10);
            w_kind[c][s] = K_ANGLE;
          end else begin
            g.stroke[s].t_open = itime_t'(avail(w) * 6 / 10);
          end
          a = a + w + 20 + ($urandom % 300);
        end
      end
      T_OVERLAP: begin
        g.n_strokes = 4;
        g.stroke[0] = '{rel(c, 100), rel(c, 400), itime_t'(avail(300) / 2)};
        g.stroke[1] = '{rel(c, 150), rel(c, 500), itime_t'(50)};
        w_pend[c][1] = 1;
        g.stroke[2] = '{rel(c, 120), rel(c, 700), itime_t'(100)};
        w_skip[c][2] = 1;
        g.stroke[3] = '{rel(c, 800), rel(c, 900), itime_t'(avail(100) / 2)};
      end
      T_FORCED: begin
        g.n_strokes = 2;
        g.stroke[0] = '{rel(c, 100), rel(c, 200), itime_t'(avail(100) / 2)};
        g.stroke[1] = '{rel(c, 3500), rel(c, 3700), itime_t'(avail(400))};
        w_kind[c][1] = K_TDC;
      end
    endcase
    written[c] = g;
    wtype[c] = t;
  endtask

  // ------------------------------------------------------------------ bus
  semaphore bus_lock = new(1);

  task automatic bus_wr(int a, int d);
    @(negedge clk) addr = 9'(a); wdata = 8'(d); wr = 1;
    @(negedge clk) wr = 0;
  endtask

  task automatic bus_rd(int a, output logic [7:0] d);
    @(negedge clk) addr = 9'(a); rd = 1;
    @(negedge clk) rd = 0;
    d = rdata;
  endtask

  task automatic wr16(int a, int v);
    bus_wr(a, v & 8'hff);
    bus_wr(a + 1, (v >> 8) & 8'hff);
  endtask

  task automatic write_table(int c);
    cyl_cfg_t g;
    g = written[c];
    wr16(c * 64 + 2, int'(g.tdc_a));
    for (int s = 0; s < N_STROKE; s++) begin
      wr16(c * 64 + 8 + 8 * s,  int'(g.stroke[s].open_a));
      wr16(c * 64 + 10 + 8 * s, int'(g.stroke[s].close_a));
      wr16(c * 64 + 12 + 8 * s, int'(g.stroke[s].t_open));
    end
    bus_wr(c * 64, {4'h0, g.n_strokes, g.enable});
  endtask

  // -------------------------------------------------------------- monitor
  int  cur      [N_CYL];              // next stroke expected to open
  int  cyc_id   [N_CYL];
  int  o_s      [N_CYL];              // stroke now open, its cycle, its kind
  int  o_cyc    [N_CYL];
  close_t o_kind [N_CYL];
  cyl_cfg_t o_tab [N_CYL];
  int  ticks    [N_CYL];
  int  since_fall [N_CYL];
  int  meas     [N_CYL][2][N_STROKE];  // measured ticks, by cycle parity
  bit  seen_done[N_CYL][2][N_STROKE];
  bit  seen_cut [N_CYL][2][N_STROKE];
  bit  inj_q    [N_CYL];
  int  n_timer = 0, n_cut = 0, n_pend = 0, n_skip = 0, n_forced = 0;
  int  n_simul = 0, n_five = 0, n_irq = 0, n_wrap = 0;
  int  ended = 0;
  angle_t angle_q = 0;
  bit  simul_q = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (angle == 0 && angle_q == ANGLE_PERIOD - 1) n_wrap++;
      angle_q <= angle;
      if (($countones(inj) >= 2) && !simul_q) n_simul++;
      simul_q <= ($countones(inj) >= 2);
      for (int c = 0; c < N_CYL; c++) begin
        if (dut.cycle_end[c]) begin
          // a new cycle begins with the table written during the last one
          if (cyc_id[c] > 0) check(cur[c] == int'(act[c].n_strokes), $sformatf("cyl %0d: all strokes accounted for", c));
          act[c] = written[c];
          a_skip[c] = w_skip[c]; a_pend[c] = w_pend[c]; a_kind[c] = w_kind[c];
          cur[c] = 0;
          cyc_id[c]++;
          for (int s = 0; s < N_STROKE; s++) begin
            meas[c][cyc_id[c] % 2][s] = 0;
            seen_done[c][cyc_id[c] % 2][s] = 0;
            seen_cut[c][cyc_id[c] % 2][s] = 0;
          end
        end
        // skipped strokes are passed over in the expectation
        while (cur[c] < int'(act[c].n_strokes) && a_skip[c][cur[c]] && !inj[c] &&
               (angle == act[c].stroke[cur[c]].close_a)) begin
          n_skip++;
          cur[c]++;
        end
        if (inj[c] && !inj_q[c]) begin
          check(cur[c] < int'(act[c].n_strokes), $sformatf("cyl %0d: opening expected", c));
          if (a_pend[c][cur[c]]) begin
            check(since_fall[c] <= 3, $sformatf("cyl %0d: pending stroke opens right after the previous one", c));
            n_pend++;
          end else begin
            check(angle == act[c].stroke[cur[c]].open_a, $sformatf("cyl %0d: opens at opening angle of stroke %0d", c, cur[c]));
          end
          o_s[c] = cur[c]; o_cyc[c] = cyc_id[c]; o_kind[c] = a_kind[c][cur[c]]; o_tab[c] = act[c];
          ticks[c] = 0;
          cur[c]++;
        end
        if (inj[c] && dut.tick) ticks[c]++;
        if (!inj[c] && inj_q[c]) begin
          unique case (o_kind[c])
            K_TIMER: begin
              check(ticks[c] == int'(o_tab[c].stroke[o_s[c]].t_open), $sformatf("cyl %0d: opening time of stroke %0d", c, o_s[c]));
              n_timer++;
            end
            K_ANGLE: begin
              check(angle == o_tab[c].stroke[o_s[c]].close_a, $sformatf("cyl %0d: cut at closure angle", c));
              n_cut++;
            end
            K_TDC: begin
              check(angle == o_tab[c].tdc_a && o_cyc[c] == cyc_id[c] - 1, $sformatf("cyl %0d: forced close at cycle start", c));
              n_forced++;
            end
          endcase
          meas[c][o_cyc[c] % 2][o_s[c]] = ticks[c];
          seen_done[c][o_cyc[c] % 2][o_s[c]] = 1;
          seen_cut[c][o_cyc[c] % 2][o_s[c]] = (o_kind[c] != K_TIMER);
          since_fall[c] = 0;
        end else if (since_fall[c] < 1000) begin
          since_fall[c]++;
        end
        inj_q[c] <= inj[c];
      end
    end
  end

  // ------------------------------------------------------------ software
  initial begin
    logic [7:0] d, lo, hi;
    for (int c = 0; c < N_CYL; c++) begin
      cur[c] = 0; cyc_id[c] = 0; inj_q[c] = 0; since_fall[c] = 1000;
      act[c] = '0;
      for (int s = 0; s < N_STROKE; s++) begin a_skip[c][s] = 0; a_pend[c][s] = 0; a_kind[c][s] = K_TIMER; end
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    bus_wr(9'h101, 8'h0f);
    for (int c = 0; c < N_CYL; c++) begin
      make_table(c, table_t'(c % 3));
      write_table(c);
    end
    while (ended < NCYC * N_CYL) begin
      int c;
      @(negedge clk);
      if (irq == 0) continue;
      repeat (10) @(negedge clk);
      c = 0;
      while (!irq[c]) c++;
      n_irq++;
      bus_rd(9'h100, d);
      check(d[c], "irq flag set");
      if (cyc_id[c] > 1) begin
        // report of the cycle that just ended
        int p;
        logic [7:0] dc;
        p = (cyc_id[c] - 1) % 2;
        bus_rd(c * 64 + 8'h31, dc);
        bus_rd(c * 64 + 8'h30, d);
        for (int s = 0; s < N_STROKE; s++) begin
          check(d[s] == seen_done[c][p][s], $sformatf("cyl %0d: DONE bit %0d", c, s));
          check(dc[s] == seen_cut[c][p][s], $sformatf("cyl %0d: CUT bit %0d", c, s));
          if (seen_done[c][p][s]) begin
            bus_rd(c * 64 + 14 + 8 * s, lo);
            bus_rd(c * 64 + 15 + 8 * s, hi);
            check({hi, lo} == 16'(meas[c][p][s]), $sformatf("cyl %0d: ACTUAL of stroke %0d", c, s));
          end
        end
        if (d == 8'h1f) n_five++;
        ended++;
      end
      // the table for the cycle after this one
      make_table(c, table_t'((c + cyc_id[c]) % 3));
      write_table(c);
      bus_wr(9'h100, 8'(1 << c));
    end
    check(n_timer > 0,  "a stroke closed by its timer");
    check(n_cut > 0,    "a stroke cut at its closure angle");
    check(n_pend > 0,   "a pending stroke opened after the previous one");
    check(n_skip > 0,   "a stroke skipped after its window passed");
    check(n_forced > 0, "an injector closed at the cycle start");
    check(n_simul > 0,  "two injections at once");
    check(n_five > 0,   "five strokes in one cycle");
    check(n_wrap > 0,   "engine angle wrapped");
    $display("timer=%0d cut=%0d pending=%0d skipped=%0d forced=%0d simultaneous=%0d five=%0d irq=%0d wraps=%0d",
             n_timer, n_cut, n_pend, n_skip, n_forced, n_simul, n_five, n_irq, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
