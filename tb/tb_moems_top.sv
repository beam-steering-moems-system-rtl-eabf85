// tb_moems_top: end-to-end run of the two-axis driver with two mirror models,
// at the full 125 MHz timing and the example periods of 145146 cycles
// (861.2 Hz) for axis 1 and 136608 cycles (915 Hz) for axis 2.
//
// Sequence: staggered start-up of the two axes; axis 2 sweeps its period up to
// 136608; both axes run open loop and the timing monitor must report
// T1 = 1161168 ns and T2 = 1092864 ns, a 16:17 ratio; both axes are handed over
// to PLL mode without a period jump; axis 1's delay is ramped, shortening its
// period by 8 us; axis 2's sense is stalled and the axis must fall back to open
// loop and lock again; the output switches to angle records, checked against
// k0*sin(2*pi*phi/T); a burst of external triggers overruns the link and must
// drop records. The UART byte stream is decoded and compared with the records.
// Each mechanism is counted and must occur at least once.
module tb_moems_top;
  import moems_pkg::*;
  localparam int P1 = 145146, P2 = 136608;
  localparam int LAG1 = 1_000_000, LAG2 = 930_000;   // ns

  logic clk_0 = 0, clk_45 = 0, clk_90 = 0, clk_135 = 0, sample_clk = 0, baud_clk = 0;
  logic rst_n = 0, soft_rst = 0, ext_trig = 0, trig_sel = 0, out_mode = 0;
  logic sense1, sense2, stall1 = 0, stall2 = 0;
  logic drive1_0, drive1_180, drive2_0, drive2_180, uart_txd;
  axis_cfg_t cfg1, cfg2;
  logic [14:0] k0_1 = 15'd10000, k0_2 = 15'd20000;
  loop_state_e state1, state2;
  logic [PER_W-1:0] delay1, delay2;
  logic sweep_done1, sweep_done2, switch_evt1, switch_evt2, lost_evt1, lost_evt2;
  logic rec_valid, ang_valid;
  meas_rec_t rec;
  logic signed [15:0] ang1, ang2;
  logic [15:0] rec_dropped;
  logic [31:0] rec_sent, sample_count;
  logic [1:0] meas_valid;
  int count, frame_errors;
  int checks = 0, failures = 0;

  initial forever #4 clk_0 = ~clk_0;
  initial begin #1; forever #4 clk_45  = ~clk_45;  end
  initial begin #2; forever #4 clk_90  = ~clk_90;  end
  initial begin #3; forever #4 clk_135 = ~clk_135; end
  logic sample_run = 1;
  always #5000.3 sample_clk = sample_run ? ~sample_clk : 1'b0;   // 100 kHz sample clock
  always #41.667 baud_clk = ~baud_clk;                // 12 MBd

  moems_top dut (.*);
  mirror_model u_m1 (.drive_0(drive1_0), .stall(stall1), .lag_ns(LAG1), .sense(sense1));
  mirror_model u_m2 (.drive_0(drive2_0), .stall(stall2), .lag_ns(LAG2), .sense(sense2));
  uart_rx_model u_rx (.baud_clk, .txd(uart_txd), .count, .frame_errors);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic bit near(input longint a, input longint b, input longint tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  // ---------------------------------------------------------------- counters
  int n_start1 = 0, n_start2 = 0, n_sweep = 0, n_switch1 = 0, n_switch2 = 0;
  int n_lost2 = 0, n_ramp = 0, n_raw = 0, n_ang = 0, n_drop = 0, n_ratio = 0;
  logic st1_d = 0, st2_d = 0;
  longint cyc = 0, start1_cyc = 0, start2_cyc = 0;
  always @(posedge clk_0) begin
    cyc <= cyc + 1;
    st1_d <= (state1 != LOOP_OFF);
    st2_d <= (state2 != LOOP_OFF);
    if (rst_n && state1 != LOOP_OFF && !st1_d) begin n_start1++; start1_cyc = cyc; end
    if (rst_n && state2 != LOOP_OFF && !st2_d) begin n_start2++; start2_cyc = cyc; end
    if (rst_n && switch_evt1) n_switch1++;
    if (rst_n && switch_evt2) n_switch2++;
    if (rst_n && lost_evt2) n_lost2++;
  end

  // Expected UART bytes, captured when the serializer takes a record.
  logic [7:0] exp_b [$];
  logic [31:0] sent_d = 0;
  always @(posedge clk_0) begin
    sent_d <= rec_sent;
    if (rst_n && rec_sent != sent_d) begin
      if (out_mode) begin
        exp_b.push_back(ang1[15:8]); exp_b.push_back(ang1[7:0]);
        exp_b.push_back(ang2[15:8]); exp_b.push_back(ang2[7:0]);
      end else begin
        for (int i = 11; i >= 0; i--) exp_b.push_back(rec[8*i +: 8]);
      end
    end
  end

  // Angle check: each angle record against the record it came from.
  meas_rec_t last_rec;
  always @(posedge clk_0) begin
    if (rst_n && rec_valid) last_rec <= rec;
    if (rst_n && ang_valid) begin
      real a1, a2;
      n_ang++;
      a1 = real'(k0_1) * $sin(2.0 * 3.14159265358979 * real'(last_rec.phi1) / real'(last_rec.t1));
      a2 = real'(k0_2) * $sin(2.0 * 3.14159265358979 * real'(last_rec.phi2) / real'(last_rec.t2));
      // 4096 steps per turn: allowed error k0 * 2*pi/4096 plus rounding.
      chk(near(longint'(ang1), longint'($rtoi(a1)), 17), $sformatf("angle1 %0d vs %0.1f", ang1, a1));
      chk(near(longint'(ang2), longint'($rtoi(a2)), 32), $sformatf("angle2 %0d vs %0.1f", ang2, a2));
    end
  end

  bit phase_chk = 1;   // off while a sense signal is stalled
  // Raw record sanity: phases below periods once both axes are measured.
  always @(posedge clk_0) begin
    if (rst_n && rec_valid && !out_mode && meas_valid == 2'b11 && phase_chk) begin
      n_raw++;
      chk(rec.phi1 < rec.t1 + 24'd8 && rec.phi2 < rec.t2 + 24'd8, "phase within the period");
    end
  end

  initial begin
    #60_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_ns(input longint ns);
    #(ns);
  endtask

  task automatic wait_rec();
    @(posedge clk_0);
    while (!rec_valid) @(posedge clk_0);
  endtask

  logic [PER_W-1:0] d_before;
  longint t1_before;
  initial begin
    cfg1 = '0; cfg2 = '0;
    cfg1.startup_cycles = 32'd1000;   cfg1.period = PER_W'(P1); cfg1.duty = 8'd128;
    cfg2.startup_cycles = 32'd200000; cfg2.period = PER_W'(136000); cfg2.duty = 8'd128;
    cfg2.sweep_en = 1; cfg2.sweep_stop = PER_W'(P2); cfg2.sweep_step = PER_W'(304);
    cfg2.sweep_dwell = 8'd1;
    repeat (5) @(posedge clk_0);
    rst_n = 1;
    // ---- start-up and sweep
    wait (sweep_done2);
    n_sweep++;
    chk(n_start1 == 1 && n_start2 == 1 && start2_cyc - start1_cyc >= 199000 &&
        start2_cyc - start1_cyc <= 199100, $sformatf("staggered start %0d", start2_cyc - start1_cyc));
    // ---- open-loop 16:17 pattern
    wait_ns(3 * 1_200_000);
    wait_rec();
    chk(rec.t1 == 24'(P1 * 8) && rec.t2 == 24'(P2 * 8),
        $sformatf("open-loop periods %0d %0d ns", rec.t1, rec.t2));
    chk(16 * int'(rec.t1) == 17 * int'(rec.t2), "16:17 period ratio");
    if (16 * int'(rec.t1) == 17 * int'(rec.t2)) n_ratio++;
    // ---- hand-over to PLL
    cfg1.pll_req = 1; cfg2.pll_req = 1;
    $display("%0.3f ms: open-loop checks done", $realtime / 1.0e6);
    wait (n_switch1 >= 1 && n_switch2 >= 1);
    $display("%0.3f ms: both axes in PLL mode", $realtime / 1.0e6);
    chk(state1 == LOOP_PLL && state2 == LOOP_PLL, "both axes in PLL mode");
    chk(near(longint'(delay1), longint'(P1 - LAG1 / 8), 8) && near(longint'(delay2), longint'(P2 - LAG2 / 8), 8),
        $sformatf("hand-over delays %0d %0d", delay1, delay2));
    for (int i = 0; i < 400; i++) begin
      wait_rec();
      chk(near(longint'(rec.t1), longint'(P1 * 8), 24) && near(longint'(rec.t2), longint'(P2 * 8), 24),
          $sformatf("PLL periods %0d %0d", rec.t1, rec.t2));
    end
    // ---- delay ramp on axis 1: 1000 cycles shorter in steps of 200
    d_before = delay1;
    t1_before = longint'(rec.t1);
    cfg1.delay_step = PER_W'(200);
    cfg1.delay_target = delay1 - PER_W'(1000);
    wait_ns(8 * 1_200_000);
    wait_rec();
    if (delay1 == d_before - PER_W'(1000)) n_ramp++;
    chk(delay1 == d_before - PER_W'(1000), "ramp reached target");
    chk(near(longint'(rec.t1), t1_before - 8000, 24), $sformatf("period after ramp %0d", rec.t1));
    // ---- shock on axis 2
    $display("%0.3f ms: ramp done, stalling axis 2", $realtime / 1.0e6);
    phase_chk = 0;
    stall2 = 1;
    wait (n_lost2 == 1);
    chk(state2 == LOOP_OPEN, "axis 2 back in open loop");
    stall2 = 0;
    $display("%0.3f ms: axis 2 lost its sense signal", $realtime / 1.0e6);
    wait (n_switch2 == 2);
    chk(state2 == LOOP_PLL, "axis 2 locked again");
    wait_ns(3 * 1_200_000);
    phase_chk = 1;
    $display("%0.3f ms: axis 2 locked again", $realtime / 1.0e6);
    // ---- angle records
    out_mode = 1;
    wait_ns(1_000_000);
    out_mode = 0;
    chk(n_ang >= 90, $sformatf("%0d angle records", n_ang));
    // ---- external trigger burst at 400 kHz: the link cannot keep up
    wait_ns(200_000);
    trig_sel = 1;
    for (int i = 0; i < 40; i++) begin
      ext_trig = 1; #1250; ext_trig = 0; #1250;
    end
    trig_sel = 0;
    n_drop = int'(rec_dropped);
    $display("%0.3f ms: trigger burst done", $realtime / 1.0e6);
    chk(rec_dropped >= 16'd25, $sformatf("dropped %0d of the burst", rec_dropped));
    // ---- UART stream: stop sampling and let the link drain
    sample_run = 0;
    wait_ns(300_000);
    chk(frame_errors == 0, "UART stop bits");
    chk(count == exp_b.size(), $sformatf("%0d bytes received, %0d expected", count, exp_b.size()));
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < count && i < exp_b.size(); i++) if (u_rx.bytes[i] != exp_b[i]) bad++;
      chk(bad == 0, $sformatf("%0d UART bytes differ", bad));
    end
    // ---- every mechanism seen
    chk(n_start1 > 0 && n_start2 > 0, "start-up");
    chk(n_sweep > 0, "sweep");
    chk(n_ratio > 0, "16:17 open-loop pattern");
    chk(n_switch1 > 0 && n_switch2 > 0, "hand-over");
    chk(n_ramp > 0, "delay ramp");
    chk(n_lost2 > 0, "loss of sense");
    chk(n_raw > 0, "raw records");
    chk(n_ang > 0, "angle records");
    chk(n_drop > 0, "dropped records");
    $display("mechanisms: start %0d/%0d sweep %0d ratio %0d switch %0d/%0d ramp %0d lost %0d raw %0d angle %0d dropped %0d bytes %0d",
             n_start1, n_start2, n_sweep, n_ratio, n_switch1, n_switch2, n_ramp, n_lost2, n_raw, n_ang,
             n_drop, count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
