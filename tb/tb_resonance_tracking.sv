// tb_resonance_tracking: one axis in closed loop with a resonant mirror model
// (Q = 200, resonance at 1000 cycles). After the hand-over from open loop the
// average drive period must sit at the resonance; changing the sense-to-drive
// delay by 10 cycles must move it by less than half a cycle (the loop follows
// the mirror, not the delay); moving the resonance by 0.5 % (1005 cycles, like
// the few-hertz shift of a hardening spring) must move the loop with it, and
// the axis must stay locked throughout.
module tb_resonance_tracking;
  import moems_pkg::*;
  localparam int PW = 18;
  localparam int P  = 1000;

  logic clk = 0, rst_n = 0, en = 0, ref_i = 0, sense, pll_req = 0;
  logic [PW-1:0] delay_target = '0, delay_step = PW'(2);
  logic [7:0] duty = 8'd128;
  logic drive_0, drive_180, switch_evt, lost_evt;
  loop_state_e state;
  logic [PW-1:0] t_ref, t_sense, phi, delay_cur;
  int t0_ps = P * 8000;
  int checks = 0, failures = 0, n_lost = 0, n_switch = 0;
  longint cyc = 0;
  int rcnt = 0;

  always #4 clk = ~clk;

  mirror_loop_ctrl dut (.clk, .rst_n, .en, .ref_i, .sense, .pll_req, .delay_target, .delay_step,
                        .duty, .drive_0, .drive_180, .state, .t_ref, .t_sense, .phi, .delay_cur,
                        .switch_evt, .lost_evt);
  resonant_mirror_model #(.Q(200.0)) u_mirror (.drive_0, .t0_ps, .sense);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rcnt  <= (rcnt == P - 1) ? 0 : rcnt + 1;
    ref_i <= (rcnt < P / 2);
    if (rst_n && lost_evt) n_lost++;
    if (rst_n && switch_evt) n_switch++;
  end

  longint rises[$];
  logic d_d = 0;
  always @(posedge clk) begin
    d_d <= drive_0;
    if (rst_n && drive_0 && !d_d) rises.push_back(cyc);
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Average drive period over the last n periods, in cycles.
  function automatic real avg_period(input int n);
    int k;
    k = rises.size();
    if (k <= n) return 0.0;
    return real'(rises[k-1] - rises[k-1-n]) / real'(n);
  endfunction

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real p0, p1, p2;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    en = 1;
    repeat (10 * P) @(posedge clk);
    chk(state == LOOP_OPEN && phi > PW'(240) && phi < PW'(260), $sformatf("open-loop lag %0d", phi));
    pll_req = 1;
    wait (n_switch == 1);
    repeat (200 * P) @(posedge clk);
    p0 = avg_period(100);
    chk(p0 > 999.5 && p0 < 1000.5, $sformatf("PLL period at resonance %0.2f", p0));
    // Shorter delay: the loop stays at the resonance.
    delay_target = delay_cur - PW'(10);
    repeat (200 * P) @(posedge clk);
    p1 = avg_period(100);
    chk(p1 - p0 < 0.5 && p0 - p1 < 0.5, $sformatf("period after delay change %0.2f", p1));
    // Resonance moves to 1005 cycles: the loop follows.
    t0_ps = 1005 * 8000;
    repeat (300 * P) @(posedge clk);
    p2 = avg_period(100);
    chk(p2 > 1004.5 && p2 < 1005.5, $sformatf("period after resonance shift %0.2f", p2));
    chk(n_lost == 0 && state == LOOP_PLL, "stayed locked");
    $display("average periods: %0.2f %0.2f %0.2f cycles", p0, p1, p2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
