// Testbench for csr_bank: writes random values to every command register
// of every cylinder through the 8-bit bus and checks both the read-back
// and the structured configuration seen by the channels; drives status
// values and checks their read-back; checks the interrupt flags (set by a
// cycle end, masked by the enables, cleared by writing 1, a set winning
// over a clear in the same clock) and the engine angle read-back.
module tb_csr_bank;
  import inj_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [8:0] addr = 0;
  logic wr = 0, rd = 0;
  logic [7:0] wdata = 0, rdata;
  cyl_cfg_t    [N_CYL-1:0] cfg;
  cyl_status_t [N_CYL-1:0] status;
  logic [N_CYL-1:0] busy = 0, cend = 0, irq;
  angle_t angle = 0;
  int checks = 0, failures = 0;

  csr_bank dut (.clk, .rst_n, .addr_i(addr), .wr_i(wr), .wdata_i(wdata), .rd_i(rd),
                .rdata_o(rdata), .cfg_o(cfg), .status_i(status), .busy_i(busy),
                .cycle_end_i(cend), .angle_i(angle), .irq_o(irq));

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

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

  task automatic rd16(int a, output int v);
    logic [7:0] lo, hi;
    bus_rd(a, lo);
    bus_rd(a + 1, hi);
    v = {hi, lo};
  endtask

  int en [N_CYL], ns [N_CYL], tdc [N_CYL];
  int op [N_CYL][N_STROKE], cl [N_CYL][N_STROKE], tt [N_CYL][N_STROKE];

  initial begin
    logic [7:0] d;
    int v;
    status = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // command registers
    for (int c = 0; c < N_CYL; c++) begin
      en[c] = $urandom % 2; ns[c] = $urandom % 6; tdc[c] = $urandom % ANGLE_PERIOD;
      bus_wr(c * 64, (ns[c] << 1) | en[c]);
      wr16(c * 64 + 2, tdc[c]);
      for (int s = 0; s < N_STROKE; s++) begin
        op[c][s] = $urandom % ANGLE_PERIOD; cl[c][s] = $urandom % ANGLE_PERIOD;
        tt[c][s] = $urandom % 65536;
        wr16(c * 64 + 8 + 8 * s, op[c][s]);
        wr16(c * 64 + 10 + 8 * s, cl[c][s]);
        wr16(c * 64 + 12 + 8 * s, tt[c][s]);
      end
    end
    for (int c = 0; c < N_CYL; c++) begin
      check(cfg[c].enable == en[c][0] && cfg[c].n_strokes == ns[c][2:0], "ctrl fields");
      check(cfg[c].tdc_a == angle_t'(tdc[c]), "tdc field");
      bus_rd(c * 64, d);  check(d == 8'((ns[c] << 1) | en[c]), "ctrl read");
      rd16(c * 64 + 2, v); check(v == tdc[c], "tdc read");
      for (int s = 0; s < N_STROKE; s++) begin
        check(cfg[c].stroke[s].open_a  == angle_t'(op[c][s]), "open field");
        check(cfg[c].stroke[s].close_a == angle_t'(cl[c][s]), "close field");
        check(cfg[c].stroke[s].t_open  == itime_t'(tt[c][s]), "time field");
        rd16(c * 64 + 8 + 8 * s, v);  check(v == op[c][s], "open read");
        rd16(c * 64 + 10 + 8 * s, v); check(v == cl[c][s], "close read");
        rd16(c * 64 + 12 + 8 * s, v); check(v == tt[c][s], "time read");
      end
    end
    // status registers
    for (int c = 0; c < N_CYL; c++) begin
      for (int s = 0; s < N_STROKE; s++) status[c].actual[s] = itime_t'($urandom);
      status[c].done = 5'($urandom); status[c].cut = 5'($urandom);
      busy[c] = 1'($urandom);
    end
    for (int c = 0; c < N_CYL; c++) begin
      for (int s = 0; s < N_STROKE; s++) begin
        rd16(c * 64 + 14 + 8 * s, v); check(v == int'(status[c].actual[s]), "actual read");
        bus_wr(c * 64 + 14 + 8 * s, 8'h5a);   // read-only
        rd16(c * 64 + 14 + 8 * s, v); check(v == int'(status[c].actual[s]), "actual read-only");
      end
      bus_rd(c * 64 + 8'h30, d); check(d == 8'(status[c].done), "done read");
      bus_rd(c * 64 + 8'h31, d); check(d == 8'(status[c].cut), "cut read");
      bus_rd(c * 64 + 8'h32, d); check(d == {7'h0, busy[c]}, "busy read");
    end
    // interrupts
    bus_wr(9'h101, 8'h0b);
    bus_rd(9'h101, d); check(d == 8'h0b, "irq enable read");
    @(negedge clk) cend = 4'b0110;
    @(negedge clk) cend = 4'b0000;
    bus_rd(9'h100, d); check(d == 8'h06, "irq flags");
    check(irq == 4'b0010, "irq masked");
    bus_wr(9'h100, 8'h02);
    bus_rd(9'h100, d); check(d == 8'h04, "irq clear");
    check(irq == 4'b0000, "irq line low");
    // set and clear of the same flag in one clock: set wins
    @(negedge clk) addr = 9'h100; wdata = 8'h04; wr = 1; cend = 4'b0101;
    @(negedge clk) wr = 0; cend = 0;
    bus_rd(9'h100, d); check(d == 8'h05, "set wins over clear");
    check(irq == 4'b0001, "irq line 0");
    // angle
    angle = 12'd3599;
    rd16(9'h102, v); check(v == 3599, "angle read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
