// Command and status registers on the CPU system bus.
//
// Software (the opening-time algorithm and the control law run on the
// CPU) writes the stroke table of each cylinder here and reads back what
// was actually injected. Each cycle end of a cylinder sets its bit in the
// interrupt status register; an enabled bit drives that cylinder's
// interrupt request line, and software clears it by writing a 1.
//
// Bus: 8-bit data, byte addresses, single-cycle write strobe; read data
// is registered on the read strobe (one clock latency). 16-bit quantities
// are two bytes, low byte first. The register map is this design's own:
//
//   cylinder c (c = 0..3) at base c*0x40
//     0x00        CTRL   [0] enable, [3:1] number of strokes (0..5)    RW
//     0x02/0x03   TDC    cycle-start angle, 0..3599 (12 bits)          RW
//     0x08+8s     stroke s = 0..4:
//       +0/+1     OPEN   opening angle                                 RW
//       +2/+3     CLOSE  closure angle                                 RW
//       +4/+5     TOPEN  opening time in time-base ticks               RW
//       +6/+7     ACTUAL measured opening time                         RO
//     0x30        DONE   strokes executed in the last cycle            RO
//     0x31        CUT    strokes closed by their closure angle         RO
//     0x32        BUSY   [0] a cycle is in progress                    RO
//   global
//     0x100       IRQ    [3:0] cycle-end flags, write 1 to clear       RW1C
//     0x101       IRQEN  [3:0] interrupt enables                       RW
//     0x102/0x103 ANGLE  current engine angle                          RO
//
// A 16-bit value written one byte at a time is used by the hardware as
// soon as each byte lands, so software updates a cylinder's table right
// after its cycle-end interrupt, before the first stroke of the new cycle.
module csr_bank import inj_pkg::*; (
  input  logic                    clk,
  input  logic                    rst_n,
  // system bus
  input  logic [8:0]              addr_i,
  input  logic                    wr_i,
  input  logic [7:0]              wdata_i,
  input  logic                    rd_i,
  output logic [7:0]              rdata_o,
  // to and from the channels
  output cyl_cfg_t    [N_CYL-1:0] cfg_o,
  input  cyl_status_t [N_CYL-1:0] status_i,
  input  logic        [N_CYL-1:0] busy_i,
  input  logic        [N_CYL-1:0] cycle_end_i,
  input  angle_t                  angle_i,
  output logic        [N_CYL-1:0] irq_o
);

  logic [N_CYL-1:0] irq_stat, irq_en;

  // address fields
  logic       glob;
  logic [1:0] cyl;
  logic [5:0] off;
  logic [2:0] s;      // stroke number for offsets 0x08..0x2F
  logic [2:0] f;      // byte inside the stroke's 8 bytes
  logic       is_stroke;

  assign glob      = addr_i[8];
  assign cyl       = addr_i[7:6];
  assign off       = addr_i[5:0];
  assign s         = 3'(off[5:3] - 3'd1);
  assign f         = off[2:0];
  assign is_stroke = (off >= 6'h08) && (off < 6'h08 + 6'(8 * N_STROKE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_o    <= '0;
      irq_stat <= '0;
      irq_en   <= '0;
    end else begin
      // hardware sets, software clears; a set in the same cycle wins
      if (wr_i && glob && off == 6'h00) irq_stat <= (irq_stat & ~wdata_i[N_CYL-1:0]) | cycle_end_i;
      else                              irq_stat <= irq_stat | cycle_end_i;

      if (wr_i && glob && off == 6'h01) irq_en <= wdata_i[N_CYL-1:0];

      if (wr_i && !glob) begin
        if (off == 6'h00) begin
          cfg_o[cyl].enable    <= wdata_i[0];
          cfg_o[cyl].n_strokes <= wdata_i[3:1];
        end
        if (off == 6'h02) cfg_o[cyl].tdc_a[7:0]         <= wdata_i;
        if (off == 6'h03) cfg_o[cyl].tdc_a[ANGLE_W-1:8] <= wdata_i[ANGLE_W-9:0];
        if (is_stroke) begin
          unique case (f)
            3'd0: cfg_o[cyl].stroke[s].open_a[7:0]          <= wdata_i;
            3'd1: cfg_o[cyl].stroke[s].open_a[ANGLE_W-1:8]  <= wdata_i[ANGLE_W-9:0];
            3'd2: cfg_o[cyl].stroke[s].close_a[7:0]         <= wdata_i;
            3'd3: cfg_o[cyl].stroke[s].close_a[ANGLE_W-1:8] <= wdata_i[ANGLE_W-9:0];
            3'd4: cfg_o[cyl].stroke[s].t_open[7:0]          <= wdata_i;
            3'd5: cfg_o[cyl].stroke[s].t_open[15:8]         <= wdata_i;
            default: ;  // ACTUAL is read-only
          endcase
        end
      end
    end
  end

  // read path
  logic [7:0] rmux;

  always_comb begin
    rmux = 8'h00;
    if (glob) begin
      unique case (off)
        6'h00:   rmux = 8'(irq_stat);
        6'h01:   rmux = 8'(irq_en);
        6'h02:   rmux = angle_i[7:0];
        6'h03:   rmux = 8'(angle_i[ANGLE_W-1:8]);
        default: rmux = 8'h00;
      endcase
    end else if (is_stroke) begin
      unique case (f)
        3'd0: rmux = cfg_o[cyl].stroke[s].open_a[7:0];
        3'd1: rmux = 8'(cfg_o[cyl].stroke[s].open_a[ANGLE_W-1:8]);
        3'd2: rmux = cfg_o[cyl].stroke[s].close_a[7:0];
        3'd3: rmux = 8'(cfg_o[cyl].stroke[s].close_a[ANGLE_W-1:8]);
        3'd4: rmux = cfg_o[cyl].stroke[s].t_open[7:0];
        3'd5: rmux = cfg_o[cyl].stroke[s].t_open[15:8];
        3'd6: rmux = status_i[cyl].actual[s][7:0];
        3'd7: rmux = status_i[cyl].actual[s][15:8];
        default: ;
      endcase
    end else begin
      unique case (off)
        6'h00:   rmux = {4'h0, cfg_o[cyl].n_strokes, cfg_o[cyl].enable};
        6'h02:   rmux = cfg_o[cyl].tdc_a[7:0];
        6'h03:   rmux = 8'(cfg_o[cyl].tdc_a[ANGLE_W-1:8]);
        6'h30:   rmux = 8'(status_i[cyl].done);
        6'h31:   rmux = 8'(status_i[cyl].cut);
        6'h32:   rmux = {7'h00, busy_i[cyl]};
        default: rmux = 8'h00;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rdata_o <= '0;
    else if (rd_i) rdata_o <= rmux;
  end

  assign irq_o = irq_stat & irq_en;

  // Bus rule: a cycle is either a read or a write.
  a_rd_wr: assert property (@(posedge clk) disable iff (!rst_n) !(rd_i && wr_i));

endmodule
