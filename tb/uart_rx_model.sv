// uart_rx_model: behavioural 8N1 receiver for testbenches (not synthesizable).
//
// It samples the line on each falling edge of the same baud clock that paces
// the transmitter, i.e. half a bit after the transmitter may change the line.
// Each received byte is appended to 'bytes'; 'count' is the number of bytes so
// far and 'frame_errors' counts missing stop bits.
module uart_rx_model (
  input  logic baud_clk,
  input  logic txd,
  output int   count,
  output int   frame_errors
);
  logic [7:0] bytes [$];
  int   bitn = -1;
  logic [7:0] sh;

  initial begin
    count = 0;
    frame_errors = 0;
  end

  always @(negedge baud_clk) begin
    if (bitn < 0) begin
      if (!txd) bitn = 0;                  // start bit
    end else if (bitn < 8) begin
      sh = {txd, sh[7:1]};
      bitn++;
    end else begin
      if (!txd) frame_errors++;
      bytes.push_back(sh);
      count++;
      bitn = -1;
    end
  end
endmodule
