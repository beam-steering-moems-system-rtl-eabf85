// tdc_channel: 1 ns rising-edge detector built from four phase-shifted clocks.
//
// The asynchronous input is sampled by eight flip-flops: on the rising and the
// falling edge of each of four 125 MHz clocks shifted by 0, 45, 90 and 135
// degrees. Within one 8 ns period of clk_0 these samples are taken at 0, 1, 2,
// ... 7 ns (45-degree rising edges first, then the falling edges). At each clk_0
// rising edge the eight samples are copied into the clk_0 domain, retimed once
// more, and searched for the first 0->1 step (the previous window's last sample
// is kept so that a step between windows is found too).
//
// Interface and timing: 'edge_o' pulses for one clk_0 cycle per input rising
// edge, with 'fine_o' = the 1 ns slot (0..7) in which the input was first seen
// high. The result appears a fixed four clk_0 cycles after the window in which
// the edge happened, so timestamps built from a clk_0 counter plus fine_o
// differ from true time by the same constant for every channel. Only one rising
// edge per 8 ns window is reported. The multi-phase, dual-edge sampling follows
// the design description; the retiming depth is this design's choice.
module tdc_channel (
  input  logic       clk_0,
  input  logic       clk_45,
  input  logic       clk_90,
  input  logic       clk_135,
  input  logic       rst_n,
  input  logic       din,
  output logic       edge_o,
  output logic [2:0] fine_o
);

  // Capture flops, one per 1 ns slot.
  logic s0, s1, s2, s3, s4, s5, s6, s7;
  always_ff @(posedge clk_0)   s0 <= din;
  always_ff @(posedge clk_45)  s1 <= din;
  always_ff @(posedge clk_90)  s2 <= din;
  always_ff @(posedge clk_135) s3 <= din;
  always_ff @(negedge clk_0)   s4 <= din;
  always_ff @(negedge clk_45)  s5 <= din;
  always_ff @(negedge clk_90)  s6 <= din;
  always_ff @(negedge clk_135) s7 <= din;

  logic [7:0] r1, r2;   // bit k = sample taken k ns after the window start
  logic       last;     // last sample of the previous window
  logic       found;
  logic [2:0] pos;

  always_comb begin
    found = 1'b0;
    pos   = '0;
    for (int k = 7; k >= 0; k--) begin
      if (r2[k] && ((k == 0) ? !last : !r2[(k == 0) ? 0 : k-1])) begin
        found = 1'b1;
        pos   = 3'(k);
      end
    end
  end

  always_ff @(posedge clk_0 or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0; r2 <= '0; last <= 1'b1; edge_o <= 1'b0; fine_o <= '0;
    end else begin
      r1     <= {s7, s6, s5, s4, s3, s2, s1, s0};
      r2     <= r1;
      last   <= r2[7];
      edge_o <= found;
      fine_o <= pos;
    end
  end

endmodule
