// moems_pkg: types and constants shared by the two-axis resonant-mirror driver.
//
// The system runs from one 125 MHz clock (8 ns per cycle). Frequency-generator
// periods, loop delays and duty cycles are counted in those cycles; the timing
// monitor counts in 1 ns steps obtained from four 45-degree-shifted copies of
// the same clock sampled on both edges. The 125 MHz clock, the 8 ns drive
// resolution, the 1 ns measurement resolution and the 32 s start-up delay are
// the design's own numbers; the field widths below are chosen here to cover
// mirrors from about 480 Hz upwards (periods up to 2^18 cycles) and 16.7 ms of
// measured time.
package moems_pkg;

  localparam int unsigned CLK_HZ        = 125_000_000;
  // Start-up delay of the frequency generator after reset: 32 s.
  localparam logic [31:0] STARTUP_32S   = 32'd4_000_000_000;

  localparam int unsigned PER_W  = 18;  // period / delay counters, 8 ns units
  localparam int unsigned MEAS_W = 24;  // measured periods and phases, 1 ns units
  localparam int unsigned TS_W   = 32;  // free-running 1 ns timestamps

  // Per-axis run-time configuration.
  typedef struct packed {
    logic [31:0]      startup_cycles; // delay from reset to first drive edge
    logic [PER_W-1:0] period;         // open-loop period (cycles) or sweep start
    logic             sweep_en;       // 1: sweep the period from 'period' to 'sweep_stop'
    logic [PER_W-1:0] sweep_stop;     // last period of the sweep
    logic [PER_W-1:0] sweep_step;     // period change per sweep step (magnitude)
    logic [7:0]       sweep_dwell;    // periods spent on each sweep step (0 counts as 1)
    logic             pll_req;        // 1: hand the drive over to the sense loop
    logic [PER_W-1:0] delay_target;   // sense-to-drive delay to reach in PLL mode (0: keep)
    logic [PER_W-1:0] delay_step;     // largest delay change per mirror period
    logic [7:0]       duty;           // drive high time in 1/256 of the period (PLL mode)
  } axis_cfg_t;

  typedef enum logic [2:0] {
    LOOP_OFF    = 3'd0,  // waiting for the frequency generator, drive idle
    LOOP_OPEN   = 3'd1,  // drive = frequency generator, phase monitored
    LOOP_SWITCH = 3'd2,  // delay block armed, waiting for the toggle event
    LOOP_PLL    = 3'd3   // drive = delayed sense signal
  } loop_state_e;

  // One record of the timing monitor: periods and phases of both axes, in ns.
  typedef struct packed {
    logic [MEAS_W-1:0] t1;
    logic [MEAS_W-1:0] phi1;
    logic [MEAS_W-1:0] t2;
    logic [MEAS_W-1:0] phi2;
  } meas_rec_t;

endpackage
