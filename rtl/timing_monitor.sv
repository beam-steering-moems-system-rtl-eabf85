// timing_monitor: running period and phase timers for two coupled resonators.
//
// Three tdc_channel instances timestamp the rising edges of the two sense
// signals and of the sample event with 1 ns resolution (timestamp = clk_0 cycle
// count * 8 + fine slot). For each axis the period T is the difference of two
// consecutive sense-edge timestamps, measured cycle to cycle. At every sample
// event the phase phi of each axis, the time since that axis' last sense rising
// edge, is taken, and a record {T1, phi1, T2, phi2} is issued; a sense edge seen
// in the same 8 ns window but no later than the sample counts as the last edge.
//
// Interface and timing: rec_valid pulses for one clk_0 cycle per sample event,
// five cycles after it; ax_valid[i] is set once axis i has seen two edges
// (before that T and phi of that axis are zero). Values are in ns and saturate
// at 2^MW-1. Timestamps wrap after 2^32 ns; differences are taken modulo that.
// The 1 ns timers and the record contents follow the design description; the
// widths and the handling of coincident edges are this design's choices.
module timing_monitor
  import moems_pkg::*;
#(
  parameter int unsigned MW = moems_pkg::MEAS_W
) (
  input  logic          clk_0,
  input  logic          clk_45,
  input  logic          clk_90,
  input  logic          clk_135,
  input  logic          rst_n,
  input  logic          sense1,
  input  logic          sense2,
  input  logic          sample_in,
  output logic          rec_valid,
  output logic [MW-1:0] t1,
  output logic [MW-1:0] phi1,
  output logic [MW-1:0] t2,
  output logic [MW-1:0] phi2,
  output logic [1:0]    ax_valid,
  output logic [31:0]   sample_count
);

  localparam logic [MW-1:0] SAT = '1;

  logic [2:0]      e;           // edge pulses: sense1, sense2, sample
  logic [2:0]      f [3];       // fine slots
  logic [TS_W-4:0] coarse;
  logic [TS_W-1:0] ts [3];

  tdc_channel u_tdc_s1 (.clk_0, .clk_45, .clk_90, .clk_135, .rst_n, .din(sense1),
                        .edge_o(e[0]), .fine_o(f[0]));
  tdc_channel u_tdc_s2 (.clk_0, .clk_45, .clk_90, .clk_135, .rst_n, .din(sense2),
                        .edge_o(e[1]), .fine_o(f[1]));
  tdc_channel u_tdc_sm (.clk_0, .clk_45, .clk_90, .clk_135, .rst_n, .din(sample_in),
                        .edge_o(e[2]), .fine_o(f[2]));

  always_ff @(posedge clk_0 or negedge rst_n) begin
    if (!rst_n) coarse <= '0;
    else        coarse <= coarse + 1'b1;
  end
  for (genvar i = 0; i < 3; i++) begin : g_ts
    assign ts[i] = {coarse, f[i]};
  end

  function automatic logic [MW-1:0] sat(input logic [TS_W-1:0] d);
    return (d > TS_W'(SAT)) ? SAT : d[MW-1:0];
  endfunction

  logic [TS_W-1:0] last_ts [2];
  logic [1:0]      seen;
  logic [MW-1:0]   per [2];
  logic [MW-1:0]   ph  [2];

  // Phase of each axis at a sample in this cycle.
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      if (e[i] && f[i] <= f[2])
        ph[i] = sat(ts[2] - ts[i]);
      else
        ph[i] = sat(ts[2] - last_ts[i]);
    end
  end

  always_ff @(posedge clk_0 or negedge rst_n) begin
    if (!rst_n) begin
      seen <= '0; ax_valid <= '0; rec_valid <= 1'b0; sample_count <= '0;
      t1 <= '0; t2 <= '0; phi1 <= '0; phi2 <= '0;
      for (int i = 0; i < 2; i++) begin
        last_ts[i] <= '0;
        per[i]     <= '0;
      end
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (e[i]) begin
          last_ts[i] <= ts[i];
          seen[i]    <= 1'b1;
          if (seen[i]) begin
            per[i]      <= sat(ts[i] - last_ts[i]);
            ax_valid[i] <= 1'b1;
          end
        end
      end
      rec_valid <= e[2];
      if (e[2]) begin
        sample_count <= sample_count + 32'd1;
        t1   <= per[0];
        t2   <= per[1];
        phi1 <= ax_valid[0] ? ph[0] : '0;
        phi2 <= ax_valid[1] ? ph[1] : '0;
      end
    end
  end

endmodule
