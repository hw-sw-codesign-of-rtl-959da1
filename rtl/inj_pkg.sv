// Shared types and constants of the multiple-injection driver.
//
// The engine angle is a counter with a 720 degree period and a 0.2 degree
// step, so one engine cycle is 3600 angle steps (0..3599). Four cylinders,
// one injector each, and at most five injection strokes per cylinder per
// engine cycle follow the application the design is made for. The 12-bit
// angle and 16-bit opening-time widths, and the register map implied by
// the structs below, are this design's own choices.
package inj_pkg;

  localparam int unsigned N_CYL        = 4;     // cylinders / injectors
  localparam int unsigned N_STROKE     = 5;     // max strokes per cylinder per cycle
  localparam int unsigned ANGLE_PERIOD = 3600;  // 720 deg / 0.2 deg
  localparam int unsigned ANGLE_W      = 12;    // bits for 0..3599
  localparam int unsigned TIME_W       = 16;    // opening time, in time-base ticks
  localparam int unsigned NSTR_W       = 3;     // bits for 0..N_STROKE

  typedef logic [ANGLE_W-1:0] angle_t;
  typedef logic [TIME_W-1:0]  itime_t;

  // One stroke: its angle window [open_a, close_a] and the opening time
  // computed by software from the requested fuel quantity.
  typedef struct packed {
    angle_t open_a;
    angle_t close_a;
    itime_t t_open;
  } stroke_cfg_t;

  // Command registers of one cylinder.
  typedef struct packed {
    logic                       enable;
    logic [NSTR_W-1:0]          n_strokes;  // 0..N_STROKE strokes this cycle
    angle_t                     tdc_a;      // angle at which the cylinder's cycle starts
    stroke_cfg_t [N_STROKE-1:0] stroke;
  } cyl_cfg_t;

  // Status of one cylinder, reported back to software.
  typedef struct packed {
    itime_t [N_STROKE-1:0] actual;     // measured opening time of each stroke
    logic   [N_STROKE-1:0] done;       // strokes executed in the last complete cycle
    logic   [N_STROKE-1:0] cut;        // strokes closed by the closure angle
  } cyl_status_t;

endpackage
