// tb_data_serializer: raw records offered at 100 kHz with a 12 MHz baud clock
// must all arrive (12 bytes each, fields most significant byte first); records
// offered at 200 kHz must lose every other one and count the losses; angle
// records produce 4 bytes each. The byte stream is decoded by a receiver model.
module tb_data_serializer;
  import moems_pkg::*;
  logic clk = 0, rst_n = 0, baud_clk = 0, mode = 0, rec_valid = 0, ang_valid = 0;
  meas_rec_t rec;
  logic signed [15:0] ang1, ang2;
  logic txd, busy;
  logic [15:0] dropped;
  logic [31:0] sent;
  int count, frame_errors;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  always #41.667 baud_clk = ~baud_clk;   // 12 MHz

  data_serializer dut (.clk, .rst_n, .baud_clk, .mode, .rec_valid, .rec, .ang_valid, .ang1, .ang2,
                       .txd, .busy, .dropped, .sent);
  uart_rx_model u_rx (.baud_clk, .txd, .count, .frame_errors);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [7:0] exp_b [$];

  task automatic push_rec(input bit keep);
    rec = {24'($urandom), 24'($urandom), 24'($urandom), 24'($urandom)};
    if (keep) for (int i = 11; i >= 0; i--) exp_b.push_back(rec[8*i +: 8]);
    @(negedge clk); rec_valid = 1; @(negedge clk); rec_valid = 0;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    // 30 raw records at 100 kHz: the link's full rate, nothing dropped.
    for (int i = 0; i < 30; i++) begin
      push_rec(1);
      #(10000 - 16);
    end
    #12000;
    chk(dropped == 0, $sformatf("dropped %0d at 100 kHz", dropped));
    chk(count == 360, $sformatf("%0d bytes at 100 kHz", count));
    // 20 raw records at 200 kHz: every other one dropped.
    for (int i = 0; i < 20; i++) begin
      push_rec(i % 2 == 0);
      #(5000 - 16);
    end
    #12000;
    chk(dropped == 10, $sformatf("dropped %0d at 200 kHz", dropped));
    chk(count == 360 + 120, $sformatf("%0d bytes after 200 kHz", count));
    // Angle mode: 4 bytes per record.
    mode = 1;
    for (int i = 0; i < 10; i++) begin
      ang1 = 16'($urandom); ang2 = 16'($urandom);
      exp_b.push_back(ang1[15:8]); exp_b.push_back(ang1[7:0]);
      exp_b.push_back(ang2[15:8]); exp_b.push_back(ang2[7:0]);
      @(negedge clk); ang_valid = 1; rec_valid = 1; @(negedge clk); ang_valid = 0; rec_valid = 0;
      #4000;
    end
    #4000;
    chk(count == 520, $sformatf("%0d bytes after angle records", count));
    chk(sent == 30 + 10 + 10, $sformatf("sent %0d", sent));
    chk(frame_errors == 0, "stop bits");
    for (int i = 0; i < exp_b.size() && i < count; i++)
      chk(u_rx.bytes[i] == exp_b[i], $sformatf("byte %0d: %h expected %h", i, u_rx.bytes[i], exp_b[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
