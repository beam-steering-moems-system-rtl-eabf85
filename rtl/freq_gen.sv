// freq_gen: start-up timer and square-wave frequency generator for one mirror axis.
//
// After reset (or a soft reset) the generator waits startup_cycles clock cycles
// (the system uses 32 s) with its output low, then produces a square wave whose
// period is a whole number of 8 ns system-clock cycles, e.g. 145146 cycles for
// 861.2 Hz. The first ceil(P/2) cycles of each period are high. In static mode
// the period follows 'period', taken at each period boundary. In sweep mode the
// period starts at 'period' and moves by 'sweep_step' towards 'sweep_stop' after
// every 'sweep_dwell' periods, then stays there and raises sweep_done.
//
// Timing: ref_o rises in the cycle after period_start pulses; 'running' rises
// when the start-up delay has elapsed. Periods below 2 cycles are taken as 2.
// The static/sweep modes, start-up timer and 8 ns resolution follow the design
// description; the sweep profile (linear, dwell count) is this design's choice.
module freq_gen
  import moems_pkg::*;
#(
  parameter int unsigned PW = moems_pkg::PER_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          soft_rst,        // restarts the start-up timer
  input  logic [31:0]   startup_cycles,
  input  logic [PW-1:0] period,
  input  logic          sweep_en,
  input  logic [PW-1:0] sweep_stop,
  input  logic [PW-1:0] sweep_step,
  input  logic [7:0]    sweep_dwell,
  output logic          ref_o,
  output logic          running,
  output logic          period_start,    // pulse: a new period begins
  output logic [PW-1:0] cur_period,
  output logic          sweep_done
);

  logic [31:0]   st_cnt;
  logic [PW-1:0] pcnt;
  logic [PW-1:0] hi_len;
  logic [7:0]    dwell_cnt;
  logic [PW-1:0] next_per;
  logic [PW-1:0] per_clamped;

  function automatic logic [PW-1:0] clamp2(input logic [PW-1:0] p);
    return (p < PW'(2)) ? PW'(2) : p;
  endfunction

  assign per_clamped = clamp2(period);
  assign hi_len      = cur_period - (cur_period >> 1);

  // Next sweep period: one step towards the stop value, never past it.
  always_comb begin
    next_per = cur_period;
    if (cur_period < sweep_stop)
      next_per = (sweep_stop - cur_period > sweep_step) ? cur_period + sweep_step : sweep_stop;
    else if (cur_period > sweep_stop)
      next_per = (cur_period - sweep_stop > sweep_step) ? cur_period - sweep_step : sweep_stop;
    next_per = clamp2(next_per);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_cnt       <= '0;
      running      <= 1'b0;
      pcnt         <= '0;
      cur_period   <= PW'(2);
      dwell_cnt    <= '0;
      sweep_done   <= 1'b0;
      period_start <= 1'b0;
      ref_o        <= 1'b0;
    end else if (soft_rst) begin
      st_cnt       <= '0;
      running      <= 1'b0;
      pcnt         <= '0;
      dwell_cnt    <= '0;
      sweep_done   <= 1'b0;
      period_start <= 1'b0;
      ref_o        <= 1'b0;
    end else if (!running) begin
      period_start <= 1'b0;
      ref_o        <= 1'b0;
      if (st_cnt >= startup_cycles) begin
        running      <= 1'b1;
        cur_period   <= per_clamped;
        pcnt         <= '0;
        dwell_cnt    <= '0;
        sweep_done   <= 1'b0;
        period_start <= 1'b1;
      end else begin
        st_cnt <= st_cnt + 32'd1;
      end
    end else begin
      period_start <= 1'b0;
      ref_o        <= (pcnt < hi_len);
      if (pcnt >= cur_period - PW'(1)) begin
        pcnt         <= '0;
        period_start <= 1'b1;
        if (!sweep_en) begin
          cur_period <= per_clamped;
          dwell_cnt  <= '0;
          sweep_done <= 1'b0;
        end else if (dwell_cnt + 8'd1 >= sweep_dwell) begin
          dwell_cnt  <= '0;
          cur_period <= next_per;
          sweep_done <= (next_per == clamp2(sweep_stop));
        end else begin
          dwell_cnt  <= dwell_cnt + 8'd1;
        end
      end else begin
        pcnt <= pcnt + PW'(1);
      end
    end
  end

endmodule
