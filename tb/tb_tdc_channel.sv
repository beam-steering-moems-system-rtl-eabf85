// tb_tdc_channel: drives rising edges at known fractional-nanosecond times into
// the multi-phase sampler and checks that each edge is reported exactly once and
// that (clk_0 cycle * 8 + fine) - ceil(edge time) is the same constant for every
// edge, i.e. the 1 ns slot is correct in all eight positions.
module tb_tdc_channel;
  logic clk_0 = 0, clk_45 = 0, clk_90 = 0, clk_135 = 0, rst_n = 0, din = 0;
  logic edge_o;
  logic [2:0] fine_o;
  int checks = 0, failures = 0;
  longint cyc = 0;

  initial forever #4 clk_0 = ~clk_0;
  initial begin #1; forever #4 clk_45  = ~clk_45;  end
  initial begin #2; forever #4 clk_90  = ~clk_90;  end
  initial begin #3; forever #4 clk_135 = ~clk_135; end

  tdc_channel dut (.clk_0, .clk_45, .clk_90, .clk_135, .rst_n, .din, .edge_o, .fine_o);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  longint exp_q[$];   // ceil(edge time) in ns
  longint offset;
  bit     have_offset = 0;
  int     n_rep = 0;

  always @(posedge clk_0) begin
    cyc <= cyc + 1;
    if (rst_n && edge_o) begin
      longint ts;
      ts = cyc * 8 + longint'(fine_o);
      n_rep++;
      if (exp_q.size() == 0) chk(0, "edge reported without input edge");
      else begin
        longint d;
        d = ts - exp_q.pop_front();
        if (!have_offset) begin offset = d; have_offset = 1; end
        chk(d == offset, $sformatf("timestamp offset %0d, expected %0d", d, offset));
      end
    end
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real t;
  initial begin
    #20 rst_n = 1;
    #100;
    // 40 edges; each at an integer + 0.5 ns so the slot is unambiguous.
    for (int i = 0; i < 40; i++) begin
      int gap;
      gap = 37 + (i * 13) % 23 + int'($urandom_range(0, 7));
      #(gap);
      #0.5;
      t = $realtime;
      exp_q.push_back(longint'($ceil(t)));
      din = 1;
      #(11 + i % 5);
      din = 0;
      #0.5;
    end
    #200;
    chk(n_rep == 40, $sformatf("%0d edges reported", n_rep));
    chk(exp_q.size() == 0, "edges left unreported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
