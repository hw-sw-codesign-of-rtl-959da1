// Workload testbench: closely spaced strokes on two injectors at once.
//
// The hard case for the injection driver is a train of strokes that
// follow each other within a few microseconds, on two cylinders at the
// same time, at the maximum engine speed. This testbench runs the top at
// its default parameters with a 40 MHz clock and the engine at 8000 rpm
// (one 0.2 degree step every 167 clocks, 4.2 us). Cylinders 0 and 1 each
// get five strokes at the same engine angles: 8 us long, with their
// opening angles 2 steps (8.4 us) apart, so a stroke opens less than half
// a microsecond after the previous one closed, in both injectors together. Cylinders 2
// and 3 stay disabled. Over three engine cycles every stroke must open at
// its own opening angle and last its full time, and every cycle must
// report all five strokes done and none cut.
module tb_workload_close_strokes;
  import inj_pkg::*;
  localparam int ASTEP = 167;
  localparam int NCYC  = 3;
  localparam int TOPEN = 8;          // us
  localparam int FIRST = 1000;       // angle of the first stroke
  localparam int GAP   = 2;          // steps between opening angles

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
    #80ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t angle=%0d", what, $time, angle); end
  endtask

  int eng = 3590, ecnt = 0;
  always @(posedge clk) begin
    ecnt <= (ecnt == ASTEP - 1) ? 0 : ecnt + 1;
    if (ecnt == ASTEP - 1) eng <= (eng + 1) % ANGLE_PERIOD;
    angle_clk <= (ecnt < 2);
    cam       <= (eng == 0) && (ecnt < 3);
  end

  task automatic bus_wr(int a, int d);
    @(negedge clk) addr = 9'(a); wdata = 8'(d); wr = 1;
    @(negedge clk) wr = 0;
  endtask

  task automatic bus_rd(int a, output logic [7:0] d);
    @(negedge clk) addr = 9'(a); rd = 1;
    @(negedge clk) rd = 0;
    d = rdata;
  endtask

  // monitor: opening angles, opening times, gaps, simultaneous openings
  int  nopen [2], ticks [2], strokes [2];
  bit  q [2];
  int  both = 0, min_gap = 1 << 30, gap [2];
  always @(negedge clk) begin
    if (rst_n) begin
      if (inj[0] && inj[1] && !(q[0] && q[1])) both++;
      for (int c = 0; c < 2; c++) begin
        if (inj[c] && dut.tick) ticks[c]++;
        if (inj[c] && !q[c]) begin
          check(angle == angle_t'(FIRST + GAP * nopen[c]), $sformatf("cyl %0d stroke %0d opening angle", c, nopen[c]));
          if (nopen[c] > 0 && gap[c] < min_gap) min_gap = gap[c];
          ticks[c] = 0;
          nopen[c] = (nopen[c] + 1) % 5;
        end
        if (!inj[c] && q[c]) begin
          check(ticks[c] == TOPEN, $sformatf("cyl %0d opening time %0d", c, ticks[c]));
          strokes[c]++;
          gap[c] = 0;
        end else if (!inj[c]) begin
          gap[c]++;
        end
        q[c] <= inj[c];
      end
    end
  end

  initial begin
    logic [7:0] d;
    int cycles [2];
    for (int c = 0; c < 2; c++) begin
      nopen[c] = 0; ticks[c] = 0; strokes[c] = 0; q[c] = 0; gap[c] = 0; cycles[c] = 0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    bus_wr(9'h101, 8'h03);
    for (int c = 0; c < 2; c++) begin
      bus_wr(c * 64 + 2, (c * 900) & 8'hff);
      bus_wr(c * 64 + 3, (c * 900) >> 8);
      for (int s = 0; s < 5; s++) begin
        int o, k;
        o = FIRST + GAP * s;
        k = o + 3 * GAP;
        bus_wr(c * 64 + 8 + 8 * s, o & 8'hff);  bus_wr(c * 64 + 9 + 8 * s, o >> 8);
        bus_wr(c * 64 + 10 + 8 * s, k & 8'hff); bus_wr(c * 64 + 11 + 8 * s, k >> 8);
        bus_wr(c * 64 + 12 + 8 * s, TOPEN);     bus_wr(c * 64 + 13 + 8 * s, 0);
      end
      bus_wr(c * 64, (5 << 1) | 1);
    end
    while (cycles[0] < NCYC + 1 || cycles[1] < NCYC + 1) begin
      int c;
      @(negedge clk);
      if (irq == 0) continue;
      c = irq[0] ? 0 : 1;
      cycles[c]++;
      if (cycles[c] > 1) begin
        bus_rd(c * 64 + 8'h30, d); check(d == 8'h1f, $sformatf("cyl %0d all five strokes done", c));
        bus_rd(c * 64 + 8'h31, d); check(d == 8'h00, $sformatf("cyl %0d no stroke cut", c));
        for (int s = 0; s < 5; s++) begin
          bus_rd(c * 64 + 14 + 8 * s, d); check(d == TOPEN, $sformatf("cyl %0d ACTUAL %0d", c, s));
        end
      end
      bus_wr(9'h100, 1 << c);
    end
    check(strokes[0] >= 5 * NCYC && strokes[1] >= 5 * NCYC, "all strokes executed");
    check(both >= 5 * NCYC, "strokes on both injectors at once");
    check(min_gap * 25 < 5000, "strokes less than 5 us apart");
    $display("strokes=%0d/%0d simultaneous=%0d shortest gap=%0d ns", strokes[0], strokes[1], both, min_gap * 25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
