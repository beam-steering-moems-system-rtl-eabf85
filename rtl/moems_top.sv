// moems_top: two-axis resonant piezo-mirror driver with 1 ns timing monitor.
//
// Each mirror axis has a frequency generator (start-up timer, static or swept
// period in 8 ns steps) and a mirror loop controller that drives the axis'
// actuator pair either from the generator (open loop) or from its own sense
// signal through an adjustable delay (phase-locked loop). The two sense signals
// and a sample event (the PLL sample clock, or an external trigger when
// trig_sel is set) go to the timing monitor, which measures both periods and
// both phases with 1 ns resolution. Each sample gives a record that the data
// serializer sends to the host over the UART, either raw (mode 0) or converted
// to two angles by the look-up-table post-processing (mode 1).
//
// Clocks: clk_0 is the 125 MHz system clock; clk_45, clk_90 and clk_135 are the
// same clock shifted by 1, 2 and 3 ns; sample_clk and baud_clk are slower PLL
// outputs (e.g. 100 kHz and 12 MHz) and are treated as asynchronous. rst_n is
// asserted asynchronously and must be released synchronously to clk_0.
// The PLL, the analog front end and the UART-USB bridge are outside: drive and
// sense are the comparator / half-bridge levels of the analog front end.
// The block structure follows the design's block diagram; the configuration
// ports stand in for the host settings, whose transport is not specified.
module moems_top
  import moems_pkg::*;
(
  input  logic                clk_0,
  input  logic                clk_45,
  input  logic                clk_90,
  input  logic                clk_135,
  input  logic                sample_clk,
  input  logic                baud_clk,
  input  logic                rst_n,
  input  logic                soft_rst,
  // analog front end
  input  logic                sense1,
  input  logic                sense2,
  output logic                drive1_0,
  output logic                drive1_180,
  output logic                drive2_0,
  output logic                drive2_180,
  // external sample trigger
  input  logic                ext_trig,
  input  logic                trig_sel,
  // configuration
  input  axis_cfg_t           cfg1,
  input  axis_cfg_t           cfg2,
  input  logic                out_mode,   // 0: raw T/phi records, 1: angles
  input  logic [14:0]         k0_1,
  input  logic [14:0]         k0_2,
  // host link
  output logic                uart_txd,
  // status
  output loop_state_e         state1,
  output loop_state_e         state2,
  output logic [PER_W-1:0]    delay1,
  output logic [PER_W-1:0]    delay2,
  output logic                sweep_done1,
  output logic                sweep_done2,
  output logic                switch_evt1,
  output logic                switch_evt2,
  output logic                lost_evt1,
  output logic                lost_evt2,
  output logic                rec_valid,
  output meas_rec_t           rec,
  output logic                ang_valid,
  output logic signed [15:0]  ang1,
  output logic signed [15:0]  ang2,
  output logic [15:0]         rec_dropped,
  output logic [31:0]         rec_sent,
  output logic [1:0]          meas_valid,
  output logic [31:0]         sample_count
);

  axis_cfg_t   cfg [2];
  logic [1:0]  fg_ref, fg_run, fg_pstart;
  logic [1:0]  sense, drv0, drv180, sw_done, sw_evt, lo_evt;
  logic [PER_W-1:0] fg_per [2];
  logic [PER_W-1:0] t_ref [2], t_sense [2], phi [2], dly [2];
  loop_state_e st [2];

  assign cfg[0] = cfg1;
  assign cfg[1] = cfg2;
  assign sense  = {sense2, sense1};

  for (genvar a = 0; a < 2; a++) begin : g_axis
    freq_gen u_fg (
      .clk           (clk_0),
      .rst_n,
      .soft_rst,
      .startup_cycles(cfg[a].startup_cycles),
      .period        (cfg[a].period),
      .sweep_en      (cfg[a].sweep_en),
      .sweep_stop    (cfg[a].sweep_stop),
      .sweep_step    (cfg[a].sweep_step),
      .sweep_dwell   (cfg[a].sweep_dwell),
      .ref_o         (fg_ref[a]),
      .running       (fg_run[a]),
      .period_start  (fg_pstart[a]),
      .cur_period    (fg_per[a]),
      .sweep_done    (sw_done[a])
    );

    mirror_loop_ctrl u_mlc (
      .clk         (clk_0),
      .rst_n,
      .en          (fg_run[a]),
      .ref_i       (fg_ref[a]),
      .sense       (sense[a]),
      .pll_req     (cfg[a].pll_req),
      .delay_target(cfg[a].delay_target),
      .delay_step  (cfg[a].delay_step),
      .duty        (cfg[a].duty),
      .drive_0     (drv0[a]),
      .drive_180   (drv180[a]),
      .state       (st[a]),
      .t_ref       (t_ref[a]),
      .t_sense     (t_sense[a]),
      .phi         (phi[a]),
      .delay_cur   (dly[a]),
      .switch_evt  (sw_evt[a]),
      .lost_evt    (lo_evt[a])
    );
  end

  assign drive1_0   = drv0[0];
  assign drive1_180 = drv180[0];
  assign drive2_0   = drv0[1];
  assign drive2_180 = drv180[1];
  assign state1     = st[0];
  assign state2     = st[1];
  assign delay1     = dly[0];
  assign delay2     = dly[1];
  assign sweep_done1 = sw_done[0];
  assign sweep_done2 = sw_done[1];
  assign switch_evt1 = sw_evt[0];
  assign switch_evt2 = sw_evt[1];
  assign lost_evt1   = lo_evt[0];
  assign lost_evt2   = lo_evt[1];

  // ----------------------------------------------------------- measurement
  logic       sample_src;

  assign sample_src = trig_sel ? ext_trig : sample_clk;

  timing_monitor u_tm (
    .clk_0, .clk_45, .clk_90, .clk_135, .rst_n,
    .sense1, .sense2,
    .sample_in   (sample_src),
    .rec_valid,
    .t1          (rec.t1),
    .phi1        (rec.phi1),
    .t2          (rec.t2),
    .phi2        (rec.phi2),
    .ax_valid    (meas_valid),
    .sample_count
  );

  logic        ac_busy;
  logic [15:0] ac_dropped;

  angle_calc u_ac (
    .clk      (clk_0),
    .rst_n,
    .in_valid (rec_valid & out_mode),
    .t1       (rec.t1),
    .phi1     (rec.phi1),
    .t2       (rec.t2),
    .phi2     (rec.phi2),
    .k0_1,
    .k0_2,
    .busy     (ac_busy),
    .out_valid(ang_valid),
    .angle1   (ang1),
    .angle2   (ang2),
    .dropped  (ac_dropped)
  );

  data_serializer u_ser (
    .clk      (clk_0),
    .rst_n,
    .baud_clk,
    .mode     (out_mode),
    .rec_valid,
    .rec,
    .ang_valid,
    .ang1,
    .ang2,
    .txd      (uart_txd),
    .busy     (),
    .dropped  (rec_dropped),
    .sent     (rec_sent)
  );

endmodule
