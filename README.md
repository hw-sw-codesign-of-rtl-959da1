# Multiple-injection driver: hardware partition

A direct-injection engine fires its fuel in several short injections, called
*strokes*, in each engine cycle. Each stroke has to start inside its own window of
engine angle and last a computed time. This RTL is the hardware half of a driver that
does that for a four-cylinder engine. Software on a small microcontroller decides
*what* to inject: for every stroke it computes the opening angle, the closure angle
and the injector opening time. The hardware decides *when*. It follows the engine
angle in 0.2 degree steps, opens each injector at the right angle, closes it when the
opening time has elapsed or at the closure angle at the latest, measures how long it
was really open, and interrupts the processor once per cylinder cycle.

The split follows the hardware/software co-design case study "HW/SW Codesign of a
Multiple Injection Driver Automotive Subsystem Using a Configurable System-on-Chip"
(Baleani, Conti, Ferrari, Sangiovanni-Vincentelli). That study mapped the driver onto
an 8032 microcontroller plus an embedded FPGA. Its second mapping is the one that met
every timing requirement: it moves the injection control into custom hardware next
to timers and compare&match units. The study names these units and their counts but
does not publish their logic. The state machines, widths, register map and timing
here are this design's own, built to the requirements the study states.

## Engine angle and the injection cycle

The engine angle covers one full engine cycle: 720 degrees, two crankshaft turns, in
steps of 0.2 degree. That gives the integer range 0..3599, held in 12 bits (`angle_t`).
At the maximum engine speed of 8000 rpm one step lasts 4.17 us, or 167 cycles of the
40 MHz system clock. That is the event rate the hardware must keep up with.

The angular clock generator (`arc`) counts that angle. Its inputs are:

* `angle_clk_i`, one pulse per 0.2 degree. Deriving these pulses from the crankshaft
  tooth wheel happens before this design.
* `cam_sync_i`, the camshaft reference, which marks angle 0.

Both inputs may be any number of clocks long. An `edge_detector` on each one
synchronises it and turns it into a single-clock event. The angle stays at 0 until
the first sync arrives, and then wraps from 3599 to 0.

Each cylinder has its own **cycle-start angle** (`TDC`), normally its exhaust top
dead centre. Its injection cycle runs from one pass of that angle to the next. At the
cycle start, the cylinder's channel does four things:

1. It copies the stroke table from the command registers into its own active copy.
   Strokes run from this copy for the whole cycle.
2. It publishes the results of the cycle that just ended: the DONE and CUT bits. The
   measured times are published as each stroke closes.
3. It raises the cylinder's interrupt flag.
4. It arms stroke 0.

The software therefore always writes the table for the **next** cycle, and can do so
at any time during the current one. The natural moment is right after the
cylinder's interrupt.

## How a stroke is placed: the sequencing rules

Each stroke *s* has an opening angle `OPEN[s]`, a closure angle `CLOSE[s]` and an
opening time `TOPEN[s]` in 1 us ticks. At most five strokes run per cylinder per
cycle (`N_STROKE = 5`); `CTRL.nstrokes` gives how many run this cycle. The stroke
sequencer (`stroke_seq`) handles them in order and applies these rules:

* **Open.** The injector opens on the angle step at which the engine angle equals
  `OPEN[s]`, never earlier. Three clocks later the output `inj_o` is high.
* **Close by time.** The opening-time timer starts with `TOPEN[s]` when the injector
  opens. The injector closes when the timer expires. The stroke then counts as done.
* **Cut.** If the engine angle reaches `CLOSE[s]` first, the injector closes there.
  The stroke counts as done and *cut*, meaning less fuel than requested went in. This
  enforces "closed before the closure angle" whatever the requested time.
* **Pending open.** The opening angle of stroke *s+1* is armed as soon as stroke *s*
  opens. If it arrives while stroke *s* is still open, the sequencer remembers it.
  Stroke *s+1* then opens one clock after stroke *s* closes. This is still after its
  opening angle, so back-to-back strokes are never lost.
* **Skip.** If `CLOSE[s]` passes before stroke *s* could open, the stroke is
  abandoned and the sequencer moves to *s+1*. This happens when `OPEN[s]` lay before
  the point at which it was armed. The stroke's DONE bit stays 0.
* **Forced close.** If an injector is still open when the next cycle starts, it is
  closed there and the stroke is reported done and cut. The same close happens when
  software clears `CTRL.enable`. The remaining strokes of a cycle that ends early are
  dropped.

Windows may cross angle 0 (for example 3550..20), because every compare is an
equality on a counter that moves one step at a time. Nothing requires the windows to
be in increasing order, but the order in the table is the order of execution.

Each stroke is driven by three compare&match units per cylinder:

| unit   | armed with            | armed when                          | mode       |
|--------|-----------------------|-------------------------------------|------------|
| cycle  | `TDC`                 | enable, or `TDC` register changed   | continuous |
| open   | `OPEN[s]`             | cycle start (s=0), stroke s-1 opens | one-shot   |
| close  | `CLOSE[s]`            | cycle start (s=0), stroke s-1 ends  | one-shot   |

Four channels (`inj_channel`) of three compare&match units, one timer and two control
blocks (sequencer and injector command) make the 12 compare&match units, 4 timers and
8 custom blocks of the study's hardware partition. Nothing is shared between
channels, so all four injectors can be open together. The requirement is two.

## What software sees: registers and interrupts

The register bank (`csr_bank`) sits on the 8-bit processor bus. It has byte
addresses, a single-cycle write strobe and a read strobe with one clock of latency.
16-bit values are stored low byte first.

| address            | name     | contents                                          | access |
|--------------------|----------|---------------------------------------------------|--------|
| `c*0x40 + 0x00`    | CTRL     | [0] enable, [3:1] number of strokes 0..5          | RW     |
| `c*0x40 + 0x02/03` | TDC      | cycle-start angle 0..3599                         | RW     |
| `c*0x40 + 0x08+8s` | OPEN     | stroke s opening angle (+0/+1)                    | RW     |
|                    | CLOSE    | stroke s closure angle (+2/+3)                    | RW     |
|                    | TOPEN    | stroke s opening time, 1 us ticks (+4/+5)         | RW     |
|                    | ACTUAL   | stroke s measured opening time (+6/+7)            | RO     |
| `c*0x40 + 0x30`    | DONE     | strokes executed in the last complete cycle       | RO     |
| `c*0x40 + 0x31`    | CUT      | strokes closed by angle in the last cycle         | RO     |
| `c*0x40 + 0x32`    | BUSY     | [0] cycle in progress                             | RO     |
| `0x100`            | IRQ      | [3:0] cycle-start flags; write 1 to clear         | RW1C   |
| `0x101`            | IRQEN    | [3:0] interrupt enables                           | RW     |
| `0x102/0x103`      | ANGLE    | current engine angle                              | RO     |

In these addresses `c` is the cylinder, 0..3, and `s` is the stroke, 0..4.

`irq_o[c]` is `IRQ[c] & IRQEN[c]`. If a new flag is set in the same clock as a clear,
the flag stays set. A typical interrupt handler for cylinder `c` does four things:

1. Read DONE, CUT and ACTUAL for the cycle that just ended.
2. Convert ACTUAL into an injected fuel quantity for the control law.
3. Write the next table.
4. Clear `IRQ[c]`.

ACTUAL[s] keeps its value until stroke *s* closes again in the new cycle. The first
stroke of a cycle normally comes well after the cycle start, so the handler has ample
time.

The hardware uses a 16-bit value as soon as each byte of it is written. This does not
matter for the stroke table, which is only used from its copy at the next cycle
start. It does matter for `TDC` and `CTRL`, which act immediately.

## Block structure and timing

```
angle_clk_i -> edge_detector --+
cam_sync_i  -> edge_detector --+-> arc --(angle, step)--+--> inj_channel[0..3] --> inj_o[3:0]
                                                        |       |   cm_tdc, cm_open, cm_close
tick_gen (clk/40 = 1 us tick) --------------------------+       |   inj_timer, stroke_seq,
                                                                 |   inj_command
bus <--> csr_bank <-- cfg / status / cycle_end -----------------+
            +--> irq_o[3:0]
```

| path                                                  | latency          |
|-------------------------------------------------------|------------------|
| `angle_clk_i` rises -> new angle                      | 4 clock edges    |
| angle step at `OPEN[s]` -> `inj_o` high               | 3 clocks         |
| angle step at `CLOSE[s]` -> `inj_o` low               | 3 clocks         |
| last opening-time tick -> `inj_o` low                 | 3 clocks         |
| angle step at `TDC` -> interrupt flag set             | 3 clocks         |
| stroke s closes -> pending stroke s+1 opens           | `inj_o` low for 1 clock |

All outputs are registered. The measured opening time counts the time-base ticks
seen while `inj_o` is high. For a stroke closed by its timer it equals `TOPEN[s]`, as
long as the tick period is more than 3 clocks. That holds for the default of 40.
Setting `TOPEN` to 0 gives the shortest possible pulse, under one tick.

## Parameters and sizes

| name           | default | where        | meaning                                   |
|----------------|---------|--------------|-------------------------------------------|
| `N_CYL`        | 4       | `inj_pkg`    | cylinders and injectors                   |
| `N_STROKE`     | 5       | `inj_pkg`    | strokes per cylinder per cycle            |
| `ANGLE_PERIOD` | 3600    | `inj_pkg`    | 720 degrees in 0.2 degree steps           |
| `ANGLE_W`      | 12      | `inj_pkg`    | angle width                               |
| `TIME_W`       | 16      | `inj_pkg`    | opening time width (up to 65.5 ms)        |
| `TICK_DIV`     | 40      | top          | clocks per time tick (1 us at 40 MHz)     |

The cylinder count, the stroke limit, the angle period and resolution, and the clock
rate come from the application. The widths and the 1 us time unit are choices of
this design. The register map in `csr_bank` is laid out for four cylinders. Changing
`N_CYL` also means changing its address decode.

After synthesis the design is about 1300 word-level cells and 2700 flip-flops. About
850 of the flip-flops are the command registers and about 810 are the four active
stroke-table copies. The study's target had a 2048-cell programmable fabric, and
there the command and status registers were the fabric's built-in bus registers.
Whether the remainder fits depends on what one of its cells holds.

## Departures and own choices

Compared with the case study:

* The study places the opening-time computation ("algorithm") and the control law in
  software. They are not part of this RTL; the bus and interrupt ports stand in for
  them. The processor, the fabric and its bus, and the injector power stage are not
  included either.
* The study uses 4 interrupt service routines. Here there is one interrupt line per
  cylinder, which is an assumption.
* The study's edge detector translates pulses to a one-clock protocol at the
  interface of the hardware. Here it sits on the two sensor inputs, with a two-flop
  synchronizer added.
* These are all this design's own: the per-cylinder grouping of the 12 comparators, 4
  timers and 8 control blocks, the double-buffered stroke table, the pending-open,
  skip and forced-close rules, and reporting the injected quantity as a measured
  opening time.
* The angle generator takes ready-made 0.2 degree pulses. The tooth-wheel
  processing that produces them from the crankshaft sensor is not part of it.

## Simulating

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
          rtl/inj_pkg.sv tb/tb_inj_driver_top.sv --top-module tb_inj_driver_top -Mdir obj
./obj/Vtb_inj_driver_top
```

| testbench            | what it exercises                                                        |
|----------------------|--------------------------------------------------------------------------|
| `tb_edge_detector`   | random pulse lengths; one output pulse each, exact latency              |
| `tb_arc`             | hold before sync, counting, wrap at 3600, resync                        |
| `tb_compare_match`   | one-shot and continuous matches over two cycles, disarm                 |
| `tb_inj_timer`       | tick count to expiry for random loads, stop                             |
| `tb_inj_command`     | output level and measured time against counted ticks                    |
| `tb_stroke_seq`      | every rule above, event by event, one clock at a time                   |
| `tb_inj_channel`     | one cylinder over 6 cycles with random tables and a window across 0     |
| `tb_csr_bank`        | every register, read-only status, interrupt set, clear and mask         |
| `tb_inj_driver_top`  | whole design at default parameters (see below)                          |
| `tb_workload_close_strokes` | five 8 us strokes 8.4 us apart on two injectors at once, 8000 rpm |

`tb_inj_driver_top` runs the top with no parameter changes. It uses a 40 MHz clock
and an engine at 8000 rpm, with one angle pulse every 167 clocks, for about four
engine cycles. A software model writes tables and services interrupts. Cylinders
rotate through three kinds of table:

* five separate strokes, some ending on time and some cut;
* overlapping windows that produce a pending open and a skipped stroke;
* a last stroke reaching past the next cycle start.

The testbench checks every injector edge against its stroke and every status
register against what it measured. It also counts each mechanism: timer close, cut,
pending open, skip, forced close, simultaneous injections in two cylinders, a full
five-stroke cycle and angle wrap. A mechanism that never occurs counts as a failure.
It runs in about 10 seconds.
