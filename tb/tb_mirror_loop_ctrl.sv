// tb_mirror_loop_ctrl: closes the loop of one axis through a mirror model with a
// fixed lag and checks, in clock cycles: idle outputs, open-loop drive equal to
// the reference, the measured lag, a seamless hand-over to PLL mode (no drive
// period differs from the reference period by more than 2 cycles), PLL
// oscillation with the reference stopped, the delay ramp and its effect on the
// period, the duty cycle, and the fallback to open loop after the sense stops.
module tb_mirror_loop_ctrl;
  import moems_pkg::*;
  localparam int PW  = 18;
  localparam int P   = 1000;   // reference period, cycles
  localparam int LAG = 300;    // mirror lag, cycles

  logic clk = 0, rst_n = 0, en = 0, ref_i = 0, sense, pll_req = 0, stall = 0;
  logic [PW-1:0] delay_target = '0, delay_step = '0;
  logic [7:0] duty = 8'd128;
  logic drive_0, drive_180, switch_evt, lost_evt;
  loop_state_e state;
  logic [PW-1:0] t_ref, t_sense, phi, delay_cur;
  int checks = 0, failures = 0, cyc = 0;
  int n_switch = 0, n_lost = 0;
  bit ref_run = 0;
  int rcnt = 0;

  always #4 clk = ~clk;

  mirror_loop_ctrl dut (.clk, .rst_n, .en, .ref_i, .sense, .pll_req, .delay_target, .delay_step,
                        .duty, .drive_0, .drive_180, .state, .t_ref, .t_sense, .phi, .delay_cur,
                        .switch_evt, .lost_evt);
  mirror_model u_mirror (.drive_0, .stall, .lag_ns(LAG * 8), .sense);

  // Reference square wave, P cycles, P/2 high.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ref_run) begin
      rcnt  <= (rcnt == P - 1) ? 0 : rcnt + 1;
      ref_i <= (rcnt < P / 2);
    end else begin
      rcnt  <= 0;
      ref_i <= 1'b0;
    end
    if (rst_n && switch_evt) n_switch++;
    if (rst_n && lost_evt) n_lost++;
  end

  int rises[$], falls[$];
  logic d_d = 0;
  always @(posedge clk) begin
    d_d <= drive_0;
    if (rst_n && drive_0 && !d_d) rises.push_back(cyc);
    if (rst_n && !drive_0 && d_d) falls.push_back(cyc);
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic bit near(input int a, input int b, input int tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last_period;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    chk(!drive_0 && !drive_180, "outputs idle while disabled");
    // ---- open loop
    ref_run = 1;
    en = 1;
    repeat (5 * P) @(posedge clk);
    chk(state == LOOP_OPEN, "open-loop state");
    chk(drive_180 == !drive_0, "complementary drive");
    for (int i = 1; i < rises.size(); i++) chk(rises[i] - rises[i-1] == P, "open-loop period");
    chk(t_ref == PW'(P), $sformatf("measured reference period %0d", t_ref));
    chk(t_sense == PW'(P), $sformatf("measured sense period %0d", t_sense));
    chk(near(int'(phi), LAG + 3, 1), $sformatf("measured lag %0d", phi));
    // ---- hand-over
    rises.delete();
    pll_req = 1;
    wait (n_switch == 1);
    chk(state == LOOP_PLL, "PLL state after switch");
    chk(near(int'(delay_cur), P - LAG - 4, 1), $sformatf("aligned delay %0d", delay_cur));
    repeat (3 * P) @(posedge clk);
    for (int i = 1; i < rises.size(); i++)
      chk(near(rises[i] - rises[i-1], P, 2), $sformatf("period across hand-over %0d", rises[i] - rises[i-1]));
    // ---- free running: stop the reference, the loop keeps oscillating
    ref_run = 0;
    rises.delete();
    repeat (5 * P) @(posedge clk);
    chk(rises.size() >= 4, "drive oscillates without the reference");
    for (int i = 1; i < rises.size(); i++) chk(near(rises[i] - rises[i-1], P, 2), "free-running period");
    // ---- delay ramp: 100 cycles shorter in steps of 20
    rises.delete();
    delay_step = PW'(20);
    delay_target = delay_cur - PW'(100);
    repeat (10 * P) @(posedge clk);
    chk(delay_cur == delay_target, "delay reached target");
    for (int i = 1; i < rises.size(); i++) begin
      if (i > 1) chk(rises[i] - rises[i-1] <= last_period && last_period - (rises[i] - rises[i-1]) <= 22,
                     "period ramp step");
      last_period = rises[i] - rises[i-1];
    end
    chk(near(last_period, P - 100, 2), $sformatf("period after ramp %0d", last_period));
    // ---- duty cycle: one quarter of the period high
    duty = 8'd64;
    rises.delete(); falls.delete();
    repeat (4 * P) @(posedge clk);
    for (int i = 0; i < rises.size() && i < falls.size(); i++)
      if (falls[i] > rises[i]) chk(near(falls[i] - rises[i], (P - 100) / 4, 2), "quarter duty");
    // ---- shock: sense stops, controller falls back to the reference
    ref_run = 1;
    stall = 1;
    repeat (4 * P) @(posedge clk);
    chk(n_lost == 1, "loss of sense detected");
    chk(state == LOOP_OPEN || state == LOOP_SWITCH, "back in open loop");
    stall = 0;
    repeat (12 * P) @(posedge clk);
    chk(n_switch == 2 && state == LOOP_PLL, $sformatf("relocked after the shock: %0d %s %0d", n_switch, state.name(), n_lost));
    // ---- disable
    en = 0;
    repeat (3) @(posedge clk);
    chk(!drive_0 && !drive_180 && state == LOOP_OFF, "disabled again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
