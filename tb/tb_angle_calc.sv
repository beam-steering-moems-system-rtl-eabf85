// tb_angle_calc: feeds phase/period pairs covering all four quadrants, phases
// beyond the period and a zero period, and compares both angles with
// k0 * sin(2*pi*(q+0.5)/4096) computed with the simulator's real arithmetic,
// q = floor(4096*phi/T). Also checks the latency of 31 cycles (12 fewer per axis whose phase needs no division) and that a record
// arriving while busy is dropped and counted.
module tb_angle_calc;
  localparam int MW = 24;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [MW-1:0] t1, phi1, t2, phi2;
  logic [14:0] k0_1, k0_2;
  logic busy, out_valid;
  logic signed [15:0] angle1, angle2;
  logic [15:0] dropped;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  angle_calc dut (.clk, .rst_n, .in_valid, .t1, .phi1, .t2, .phi2, .k0_1, .k0_2, .busy,
                  .out_valid, .angle1, .angle2, .dropped);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int expect_angle(input longint t, input longint phi, input int k0);
    longint q;
    real s;
    int mag;
    if (t == 0) q = 0;
    else if (phi >= t) q = 4095;
    else q = (phi * 4096) / t;
    s = $sin(2.0 * 3.14159265358979323846 * (real'(q) + 0.5) / 4096.0);
    mag = int'($floor(((s < 0 ? -s : s) * 32767.0) + 0.5));
    mag = (mag * k0) >>> 15;
    return (s < 0) ? -mag : mag;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat, e1, e2;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      longint T1, T2, F1, F2;
      T1 = 1_000_000 + longint'($urandom_range(0, 1_000_000));
      T2 = 500_000 + longint'($urandom_range(0, 1_500_000));
      F1 = (i % 50 == 7) ? T1 + 5 : longint'($urandom_range(0, 32'(T1 - 1)));
      F2 = (i % 40 == 3) ? T2 : (longint'(i) * T2) / 300;
      if (i == 11) T2 = 0;
      t1 = MW'(T1); phi1 = MW'(F1); t2 = MW'(T2); phi2 = MW'(F2);
      k0_1 = 15'($urandom_range(0, 32767));
      k0_2 = (i % 3 == 0) ? 15'd32767 : 15'd1000;
      e1 = expect_angle(T1, F1, int'(k0_1));
      e2 = expect_angle(T2, F2, int'(k0_2));
      @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid) begin
        @(negedge clk);
        lat++;
        // A second record while busy must be dropped.
        if (i == 5 && lat == 4) begin
          in_valid = 1; @(negedge clk); in_valid = 0; lat++;
        end
      end
      chk(lat == 31 - 12 * (((T1 == 0 || F1 >= T1) ? 1 : 0) + ((T2 == 0 || F2 >= T2) ? 1 : 0)),
          $sformatf("latency %0d", lat));
      chk(int'(angle1) - e1 <= 1 && e1 - int'(angle1) <= 1,
          $sformatf("angle1 %0d expected %0d (T=%0d phi=%0d)", angle1, e1, T1, F1));
      chk(int'(angle2) - e2 <= 1 && e2 - int'(angle2) <= 1,
          $sformatf("angle2 %0d expected %0d (T=%0d phi=%0d)", angle2, e2, T2, F2));
    end
    chk(dropped == 16'd1, $sformatf("dropped %0d", dropped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
