// tb_timing_monitor: two square waves with known periods (ns, edges on half
// nanoseconds) and a train of sample events at irregular times. The expected
// period of each axis is the programmed one; the expected phase at a sample is
// ceil(sample time) - ceil(last sense rising edge time), worked out from the
// edge times the testbench itself produced. Every record is compared.
module tb_timing_monitor;
  localparam int MW = 24;
  localparam int P1 = 10007;    // ns
  localparam int P2 = 9343;     // ns
  logic clk_0 = 0, clk_45 = 0, clk_90 = 0, clk_135 = 0, rst_n = 0;
  logic sense1 = 0, sense2 = 0, sample_in = 0;
  logic rec_valid;
  logic [MW-1:0] t1, phi1, t2, phi2;
  logic [1:0] ax_valid;
  logic [31:0] sample_count;
  int checks = 0, failures = 0;

  initial forever #4 clk_0 = ~clk_0;
  initial begin #1; forever #4 clk_45  = ~clk_45;  end
  initial begin #2; forever #4 clk_90  = ~clk_90;  end
  initial begin #3; forever #4 clk_135 = ~clk_135; end

  timing_monitor dut (.clk_0, .clk_45, .clk_90, .clk_135, .rst_n, .sense1, .sense2, .sample_in,
                      .rec_valid, .t1, .phi1, .t2, .phi2, .ax_valid, .sample_count);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  longint last1 = -1, last2 = -1;
  int     n1 = 0, n2 = 0;
  longint e_phi1[$], e_phi2[$];
  int     e_ok1[$], e_ok2[$];

  // Sense waves, started at half-nanosecond offsets.
  initial begin
    #1000.5;
    forever begin
      last1 = longint'($ceil($realtime)); n1++;
      sense1 = 1; #(P1 / 2); sense1 = 0; #(P1 - P1 / 2);
    end
  end
  initial begin
    #1333.5;
    forever begin
      last2 = longint'($ceil($realtime)); n2++;
      sense2 = 1; #(P2 / 2); sense2 = 0; #(P2 - P2 / 2);
    end
  end

  int n_rec = 0;
  always @(posedge clk_0) begin
    if (rst_n && rec_valid) begin
      n_rec++;
      if (e_phi1.size() == 0) chk(0, "record without sample");
      else begin
        longint p1, p2; int ok1, ok2;
        p1 = e_phi1.pop_front(); p2 = e_phi2.pop_front();
        ok1 = e_ok1.pop_front(); ok2 = e_ok2.pop_front();
        if (ok1 != 0) begin
          chk(t1 == MW'(P1), $sformatf("T1 %0d", t1));
          chk(phi1 == MW'(p1), $sformatf("phi1 %0d expected %0d", phi1, p1));
        end
        if (ok2 != 0) begin
          chk(t2 == MW'(P2), $sformatf("T2 %0d", t2));
          chk(phi2 == MW'(p2), $sformatf("phi2 %0d expected %0d", phi2, p2));
        end
      end
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20 rst_n = 1;
    // Samples spaced 2.5 .. 4.5 us apart (on half nanoseconds), skipping
    // the few ns around a sense edge where the expected order is ambiguous.
    #25000;
    for (int i = 0; i < 200; i++) begin
      longint ts;
      #(2500 + int'($urandom_range(0, 2000)));
      #0.5;
      ts = longint'($ceil($realtime));
      e_phi1.push_back(ts - last1);
      e_phi2.push_back(ts - last2);
      e_ok1.push_back((n1 >= 3 && ts - last1 > 8) ? 1 : 0);
      e_ok2.push_back((n2 >= 3 && ts - last2 > 8) ? 1 : 0);
      sample_in = 1; #40; sample_in = 0;
    end
    #200;
    chk(n_rec == 200, $sformatf("%0d records", n_rec));
    chk(sample_count == 200, "sample count");
    chk(ax_valid == 2'b11, "both axes valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
