// data_serializer: turns timing-monitor records into a byte stream on a UART.
//
// Two formats, chosen with 'mode':
//   mode 0 (raw):   12 bytes per sample event, T1, phi1, T2, phi2 in ns, each
//                   as 24 bits, most significant byte first;
//   mode 1 (angle): 4 bytes per sample event, the signed 16-bit angles of
//                   axis 1 then axis 2, most significant byte first.
// A record is taken only when the previous one has been sent completely;
// records arriving earlier are dropped and counted ('dropped'), so the host
// always receives whole records. With a 12 MBd baud clock a raw record takes
// 120 bit times, i.e. 100 000 records per second; angle records allow three
// times that.
//
// Timing: bytes are handed to uart_tx back to back; 'busy' is high from the
// accepted record until its last byte has been handed to the transmitter, so
// the next record can wait there while that byte is on the line. Record layout and the
// drop policy are this design's choices; the design describes the serializer's
// task, the raw period/phase stream at 100k records per second and the angle
// formula as a way to compress it.
module data_serializer
  import moems_pkg::*;
#(
  parameter int unsigned MW = moems_pkg::MEAS_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 baud_clk,
  input  logic                 mode,
  input  logic                 rec_valid,
  input  meas_rec_t            rec,
  input  logic                 ang_valid,
  input  logic signed [15:0]   ang1,
  input  logic signed [15:0]   ang2,
  output logic                 txd,
  output logic                 busy,
  output logic [15:0]          dropped,
  output logic [31:0]          sent
);

  localparam int unsigned NB = 12;

  logic [8*NB-1:0] buf_q;     // bytes to send, next one in the top byte
  logic [3:0]      left;      // bytes not yet handed to the UART
  logic            tx_ready;
  logic            tx_valid;
  logic            take;

  assign take     = mode ? ang_valid : rec_valid;
  assign tx_valid = (left != '0);
  assign busy     = (left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0; left <= '0; dropped <= '0; sent <= '0;
    end else begin
      if (tx_valid && tx_ready) begin
        buf_q <= {buf_q[8*NB-9:0], 8'h00};
        left  <= left - 4'd1;
      end else if (take && left == '0) begin
        if (mode) begin
          buf_q <= {ang1, ang2, {(8*NB-32){1'b0}}};
          left  <= 4'd4;
        end else begin
          buf_q <= {rec.t1, rec.phi1, rec.t2, rec.phi2};
          left  <= 4'(NB);
        end
        sent <= sent + 32'd1;
      end
      if (take && (left != '0 || (tx_valid && tx_ready)) && dropped != 16'hFFFF)
        dropped <= dropped + 16'd1;
    end
  end

  // Handshake rule towards the transmitter: an offered byte stays offered,
  // unchanged, until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (tx_valid && !tx_ready) |=> (tx_valid && $stable(buf_q[8*NB-1 -: 8])));

  uart_tx u_tx (
    .clk, .rst_n, .baud_clk,
    .valid(tx_valid),
    .data (buf_q[8*NB-1 -: 8]),
    .ready(tx_ready),
    .txd
  );

endmodule
