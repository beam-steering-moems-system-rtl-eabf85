// tb_uart_tx: sends 64 random bytes back to back through uart_tx with a 12 MHz
// baud clock next to the 125 MHz system clock, decodes them with a receiver
// model and checks data, stop bits, the idle level and that a full byte takes
// ten baud periods.
module tb_uart_tx;
  logic clk = 0, rst_n = 0, baud_clk = 0, valid = 0;
  logic [7:0] data;
  logic ready, txd;
  int count, frame_errors;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;
  always #41.667 baud_clk = ~baud_clk;   // 12 MHz

  uart_tx dut (.clk, .rst_n, .baud_clk, .valid, .data, .ready, .txd);
  uart_rx_model u_rx (.baud_clk, .txd, .count, .frame_errors);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] sent [$];
  realtime t0, t1;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40) @(posedge clk);
    chk(txd == 1'b1, "line idles high");
    t0 = $realtime;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      data = 8'($urandom);
      sent.push_back(data);
      valid = 1;
      @(negedge clk);
      valid = 0;
    end
    wait (count == 64);
    t1 = $realtime;
    // 64 frames of 10 bits at 83.33 ns, plus up to two bit times of start-up.
    chk(t1 - t0 >= 64 * 10 * 83.0 && t1 - t0 <= (64 * 10 + 2) * 83.4,
        $sformatf("64 bytes took %0.1f ns", t1 - t0));
    for (int i = 0; i < 64; i++)
      chk(u_rx.bytes[i] == sent[i], $sformatf("byte %0d: %h expected %h", i, u_rx.bytes[i], sent[i]));
    chk(frame_errors == 0, "stop bits");
    repeat (200) @(posedge clk);
    chk(txd == 1'b1 && ready, "idle after the last byte");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
