// Multiple-injection driver, hardware partition.
//
// Drives the four injectors of a four-cylinder direct-injection engine
// with up to five injection strokes per cylinder in each 720 degree engine
// cycle, each inside its own engine-angle window. Software on the CPU
// computes the opening time of every stroke and writes the stroke table
// through the system bus registers; this hardware places the strokes in
// angle, times them, reports what was actually injected and interrupts the
// CPU once per cylinder cycle.
//
// Inside: the raw angle-clock and cam-sync pulses go through edge
// detectors into the angular clock generator, which keeps the engine
// angle (0.2 degree steps, 0..3599). A prescaler makes the time base of
// the opening times. Four injection channels, one per cylinder, each with
// three compare&match units, a timer, a stroke sequencer and an injector
// command, act on the angle; the register bank connects them to the bus.
//
// The four-cylinder, five-stroke, 0.2 degree, 720 degree figures, the
// per-cylinder interrupts to the CPU and the split between software
// (opening-time computation, control law) and hardware (angle-based
// stroke control) follow the target application; the block structure
// inside the channels and all timing are this design's own.
//
// Interface: system clock (40 MHz on the target device), active-low
// asynchronous reset, raw sensor pulses (any length of at least one clock,
// separated by at least one clock low), an 8-bit register bus (see
// csr_bank) and one interrupt line and one injector output per cylinder.
module inj_driver_top import inj_pkg::*; #(
  parameter int unsigned TICK_DIV = 40   // clocks per opening-time tick (1 us at 40 MHz)
) (
  input  logic             clk,
  input  logic             rst_n,
  // engine sensors, already shaped to pulses
  input  logic             angle_clk_i,  // one pulse per 0.2 degree of engine angle
  input  logic             cam_sync_i,   // cycle reference: engine angle 0
  // system bus
  input  logic [8:0]       bus_addr_i,
  input  logic             bus_wr_i,
  input  logic [7:0]       bus_wdata_i,
  input  logic             bus_rd_i,
  output logic [7:0]       bus_rdata_o,
  output logic [N_CYL-1:0] irq_o,
  // injectors
  output logic [N_CYL-1:0] inj_o,
  output angle_t           angle_o       // engine angle, for observation
);

  logic angle_tick, sync_pulse, step, synced, tick;

  cyl_cfg_t    [N_CYL-1:0] cfg;
  cyl_status_t [N_CYL-1:0] status;
  logic        [N_CYL-1:0] cycle_end, busy;

  edge_detector u_ed_angle (.clk, .rst_n, .sig_i(angle_clk_i), .pulse_o(angle_tick));
  edge_detector u_ed_sync  (.clk, .rst_n, .sig_i(cam_sync_i),  .pulse_o(sync_pulse));

  arc u_arc (
    .clk, .rst_n, .angle_tick_i(angle_tick), .sync_i(sync_pulse),
    .angle_o, .step_o(step), .synced_o(synced)
  );

  tick_gen #(.DIV(TICK_DIV)) u_tick (.clk, .rst_n, .tick_o(tick));

  csr_bank u_csr (
    .clk, .rst_n,
    .addr_i(bus_addr_i), .wr_i(bus_wr_i), .wdata_i(bus_wdata_i),
    .rd_i(bus_rd_i), .rdata_o(bus_rdata_o),
    .cfg_o(cfg), .status_i(status), .busy_i(busy), .cycle_end_i(cycle_end),
    .angle_i(angle_o), .irq_o
  );

  for (genvar c = 0; c < N_CYL; c++) begin : g_cyl
    inj_channel u_ch (
      .clk, .rst_n, .angle_i(angle_o), .step_i(step), .tick_i(tick),
      .cfg_i(cfg[c]), .inj_o(inj_o[c]), .status_o(status[c]),
      .cycle_end_o(cycle_end[c]), .busy_o(busy[c])
    );
  end

  // synced_o is for observation only; the angle holds at 0 until the first sync
  logic unused;
  assign unused = synced;

endmodule
