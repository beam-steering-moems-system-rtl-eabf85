// uart_tx: 8N1 asynchronous serial transmitter paced by an external baud clock.
//
// The baud clock (a PLL output, asynchronous to clk) is synchronised with two
// flip-flops; each of its rising edges is one bit time. A byte offered with
// 'valid' while 'ready' is high is sent as a start bit (0), eight data bits
// least significant first, and a stop bit (1). The line idles high.
//
// Timing: the start bit begins at the first baud edge after the byte is taken;
// one byte occupies ten baud periods. The baud clock must be slower than half
// of clk. The frame format is this design's choice; the design only names a
// UART link to a USB bridge and a PLL baud clock.
module uart_tx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       baud_clk,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  logic b_meta, b_sync, b_d, tick;
  logic [9:0] sh;       // frame still to send, LSB first
  logic [3:0] nbits;    // bits left including the one on the line
  logic       loaded;   // frame waiting for its first baud edge

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_meta <= 1'b0; b_sync <= 1'b0; b_d <= 1'b0;
    end else begin
      b_meta <= baud_clk; b_sync <= b_meta; b_d <= b_sync;
    end
  end
  assign tick  = b_sync & ~b_d;
  assign ready = !loaded && nbits == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '1; nbits <= '0; loaded <= 1'b0; txd <= 1'b1;
    end else begin
      if (valid && ready) begin
        sh     <= {1'b1, data, 1'b0};
        loaded <= 1'b1;
      end
      if (tick) begin
        if (loaded) begin
          txd    <= sh[0];
          sh     <= {1'b1, sh[9:1]};
          nbits  <= 4'd9;
          loaded <= 1'b0;
        end else if (nbits != '0) begin
          txd   <= sh[0];
          sh    <= {1'b1, sh[9:1]};
          nbits <= nbits - 4'd1;
        end else begin
          txd <= 1'b1;
        end
      end
    end
  end

endmodule
