// tb_freq_gen: self-checking test of the start-up timer, static periods (even
// and odd), the linear sweep and the soft reset of freq_gen. Reference edge
// spacings are measured in clock cycles and compared with the programmed values.
module tb_freq_gen;
  localparam int PW = 18;
  logic clk = 0, rst_n = 0, soft_rst = 0;
  logic [31:0] startup;
  logic [PW-1:0] period, sweep_stop, sweep_step;
  logic sweep_en;
  logic [7:0] sweep_dwell;
  logic ref_o, running, period_start, sweep_done;
  logic [PW-1:0] cur_period;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #4 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  freq_gen dut (.clk, .rst_n, .soft_rst, .startup_cycles(startup), .period, .sweep_en,
                .sweep_stop, .sweep_step, .sweep_dwell, .ref_o, .running, .period_start,
                .cur_period, .sweep_done);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Cycle numbers of ref rising and falling edges.
  int rises[$], falls[$];
  logic ref_d = 0;
  always @(posedge clk) begin
    ref_d <= ref_o;
    if (rst_n && ref_o && !ref_d) rises.push_back(cyc);
    if (rst_n && !ref_o && ref_d) falls.push_back(cyc);
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_rel, rst_cyc;
  initial begin
    startup = 32'd40; period = 18'd10; sweep_en = 0; sweep_stop = 0; sweep_step = 0;
    sweep_dwell = 0;
    wait_cycles(3);
    rst_n = 1;
    rst_cyc = cyc;
    // Start-up delay: output stays low until startup cycles have passed.
    wait_cycles(30);
    chk(!running && rises.size() == 0, "output active during start-up");
    wait_cycles(80);
    chk(running, "not running after start-up");
    chk(rises.size() > 0 && rises[0] - rst_cyc >= 40 && rises[0] - rst_cyc <= 44,
        $sformatf("first edge at %0d after reset", rises.size() ? rises[0] - rst_cyc : -1));
    // Static even period: 5 high, 5 low.
    for (int i = 1; i < rises.size(); i++) chk(rises[i] - rises[i-1] == 10, "period 10");
    for (int i = 0; i < falls.size(); i++) chk(falls[i] - rises[i] == 5, "high time 5");
    // Static odd period 11: 6 high, 5 low.
    period = 18'd11;
    wait_cycles(30);
    rises.delete(); falls.delete();
    wait_cycles(70);
    for (int i = 1; i < rises.size(); i++) chk(rises[i] - rises[i-1] == 11, "period 11");
    for (int i = 0; i < falls.size() && i < rises.size(); i++)
      if (falls[i] > rises[i]) chk(falls[i] - rises[i] == 6, "high time 6");
    chk(rises.size() >= 5, "enough edges at period 11");
    // Sweep 11 -> 17 in steps of 2, two periods per step.
    sweep_stop = 18'd17; sweep_step = 18'd2; sweep_dwell = 8'd2;
    @(posedge period_start);
    rises.delete();
    sweep_en = 1;
    wait (sweep_done);
    wait_cycles(60);
    begin
      int seen13 = 0, seen15 = 0, seen17 = 0, bad = 0;
      for (int i = 1; i < rises.size(); i++) begin
        int d;
        d = rises[i] - rises[i-1];
        if (d == 13) seen13++;
        else if (d == 15) seen15++;
        else if (d == 17) seen17++;
        else if (d != 11) bad++;
      end
      chk(seen13 == 2 && seen15 == 2 && seen17 >= 2 && bad == 0,
          $sformatf("sweep steps 13:%0d 15:%0d 17:%0d other:%0d", seen13, seen15, seen17, bad));
      chk(cur_period == 18'd17, "sweep end period");
    end
    // Soft reset: output stops, start-up delay runs again.
    soft_rst = 1; wait_cycles(1); soft_rst = 0;
    t_rel = cyc;
    rises.delete();
    wait_cycles(20);
    chk(!running && !ref_o, "soft reset stops the generator");
    wait_cycles(60);
    chk(running && rises.size() > 0 && rises[0] - t_rel >= 40 && rises[0] - t_rel <= 45,
        "restart after soft reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
