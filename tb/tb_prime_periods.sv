// tb_prime_periods: the prime-number scanning example. Both axes run open loop
// at 145177 and 136621 cycles; the timing monitor must report periods of
// 1161416 ns and 1092968 ns, 0.2 Hz and 0.1 Hz away from the 16:17 pattern
// (145146 / 136608 cycles), and the phase pair must not repeat after 18.6 ms.
module tb_prime_periods;
  import moems_pkg::*;
  localparam int P1 = 145177, P2 = 136621;
  logic clk_0 = 0, clk_45 = 0, clk_90 = 0, clk_135 = 0, sample_clk = 0, baud_clk = 0;
  logic rst_n = 0, soft_rst = 0, ext_trig = 0, trig_sel = 0, out_mode = 0;
  logic sense1, sense2;
  logic drive1_0, drive1_180, drive2_0, drive2_180, uart_txd;
  axis_cfg_t cfg1, cfg2;
  logic [14:0] k0_1 = 15'd1000, k0_2 = 15'd1000;
  loop_state_e state1, state2;
  logic [PER_W-1:0] delay1, delay2;
  logic sweep_done1, sweep_done2, switch_evt1, switch_evt2, lost_evt1, lost_evt2;
  logic rec_valid, ang_valid;
  meas_rec_t rec;
  logic signed [15:0] ang1, ang2;
  logic [15:0] rec_dropped;
  logic [31:0] rec_sent, sample_count;
  logic [1:0] meas_valid;
  int checks = 0, failures = 0;

  initial forever #4 clk_0 = ~clk_0;
  initial begin #1; forever #4 clk_45  = ~clk_45;  end
  initial begin #2; forever #4 clk_90  = ~clk_90;  end
  initial begin #3; forever #4 clk_135 = ~clk_135; end
  always #41.667 baud_clk = ~baud_clk;

  moems_top dut (.*);
  mirror_model u_m1 (.drive_0(drive1_0), .stall(1'b0), .lag_ns(300_000), .sense(sense1));
  mirror_model u_m2 (.drive_0(drive2_0), .stall(1'b0), .lag_ns(250_000), .sense(sense2));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic sample_at(output meas_rec_t r);
    sample_clk = 1;
    @(posedge clk_0);
    while (!rec_valid) @(posedge clk_0);
    r = rec;
    sample_clk = 0;
  endtask

  initial begin
    #40_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  meas_rec_t a, b;
  initial begin
    cfg1 = '0; cfg2 = '0;
    cfg1.startup_cycles = 32'd100; cfg1.period = PER_W'(P1); cfg1.duty = 8'd128;
    cfg2.startup_cycles = 32'd100; cfg2.period = PER_W'(P2); cfg2.duty = 8'd128;
    repeat (5) @(posedge clk_0);
    rst_n = 1;
    #5_000_000;
    sample_at(a);
    chk(a.t1 == 24'(P1 * 8), $sformatf("T1 %0d", a.t1));
    chk(a.t2 == 24'(P2 * 8), $sformatf("T2 %0d", a.t2));
    // 16:17 pattern repeat time later the pair of phases has moved on.
    #(18_577_344 - 100);
    sample_at(b);
    chk(b.t1 == 24'(P1 * 8) && b.t2 == 24'(P2 * 8), "periods stable");
    chk(a.phi1 != b.phi1 || a.phi2 != b.phi2, "pattern does not repeat after 18.6 ms");
    $display("phases at t and t+18.58 ms: %0d/%0d and %0d/%0d ns", a.phi1, a.phi2, b.phi1, b.phi2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
