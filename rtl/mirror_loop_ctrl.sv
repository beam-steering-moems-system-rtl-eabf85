// mirror_loop_ctrl: open-loop / phase-locked-loop drive controller for one axis.
//
// The comparator output of the axis' sense amplifier ('sense', asynchronous) and
// the frequency generator's square wave ('ref_i') are both watched in the 125 MHz
// domain. The controller has two operating modes:
//  * open loop: the drive is the frequency generator's signal as it is. The
//    controller measures the reference period T and the phase lag phi from each
//    drive rising edge to the next sense rising edge, and counts how many
//    consecutive lags agree within PHASE_TOL cycles (stability monitor).
//  * phase-locked loop: every sense rising edge, delayed by D cycles in the
//    adjustable delay block, starts a drive pulse that lasts duty/256 of the last
//    measured sense period. The mirror itself closes the loop, so it oscillates
//    near its resonance; changing D or the duty cycle moves the frequency.
// Hand-over: once pll_req is set and LOCK_COUNT stable lags were seen, D is set
// to T - phi - 1, so the delayed sense edge lands on the next reference rising
// edge; the delay block is armed and the source changes at that toggle event,
// leaving the drive edges where they were. In PLL mode D then moves by at most
// delay_step per mirror period towards delay_target (0 keeps D). If no sense
// edge arrives for two sense periods (shock, lost resonance) the controller
// falls back to open loop and locks again.
//
// Interface: drive_0 / drive_180 are the drive and its complement for the two
// actuators of the pair; both are low while the axis is off.
// Timing: sense passes a two-flop synchroniser, so D and phi include that
// latency; the drive output is registered. D must stay below the mirror period:
// a sense edge arriving while a delay is pending restarts the delay.
// The two modes, the hand-over rule, the adjustable delay and duty cycle follow
// the design description; the stability count, tolerance, loss timeout and
// delay ramp are this design's choices.
module mirror_loop_ctrl
  import moems_pkg::*;
#(
  parameter int unsigned PW         = moems_pkg::PER_W,
  parameter int unsigned LOCK_COUNT = 4,
  parameter int unsigned PHASE_TOL  = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,            // frequency generator running
  input  logic          ref_i,         // frequency generator square wave
  input  logic          sense,         // comparator output, asynchronous
  input  logic          pll_req,
  input  logic [PW-1:0] delay_target,
  input  logic [PW-1:0] delay_step,
  input  logic [7:0]    duty,
  output logic          drive_0,
  output logic          drive_180,
  output loop_state_e   state,
  output logic [PW-1:0] t_ref,         // measured reference period, cycles
  output logic [PW-1:0] t_sense,       // measured sense period, cycles
  output logic [PW-1:0] phi,           // last drive-to-sense lag (open loop), cycles
  output logic [PW-1:0] delay_cur,     // current sense-to-drive delay D
  output logic          switch_evt,    // pulse: source changed to the sense loop
  output logic          lost_evt       // pulse: sense lost, back to open loop
);

  localparam logic [PW-1:0] MAXV = '1;

  // ---------------------------------------------------------------- inputs
  logic s_meta, s_sync, s_d, sense_rise;
  logic ref_d, ref_rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_meta <= 1'b0; s_sync <= 1'b0; s_d <= 1'b0; ref_d <= 1'b0;
    end else begin
      s_meta <= sense; s_sync <= s_meta; s_d <= s_sync; ref_d <= ref_i;
    end
  end
  assign sense_rise = s_sync & ~s_d;
  assign ref_rise   = ref_i & ~ref_d;

  // ------------------------------------------------- period and phase timers
  logic [PW-1:0] scnt, rcnt;         // cycles since last sense / ref rising edge
  logic          ref_seen, sense_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scnt <= '0; rcnt <= '0; t_ref <= '0; t_sense <= '0;
      ref_seen <= 1'b0; sense_seen <= 1'b0;
    end else begin
      if (sense_rise) begin
        if (sense_seen) t_sense <= scnt;
        sense_seen <= 1'b1;
        scnt <= PW'(1);
      end else if (scnt != MAXV) scnt <= scnt + PW'(1);
      if (ref_rise) begin
        if (ref_seen) t_ref <= rcnt;
        ref_seen <= 1'b1;
        rcnt <= PW'(1);
      end else if (rcnt != MAXV) rcnt <= rcnt + PW'(1);
    end
  end

  // ---------------------------------------------------- adjustable delay block
  logic          dly_arm;            // start a delay (from the FSM)
  logic [PW-1:0] dly_val;            // delay to use for it
  logic          dly_active, dly_out, dly_fire;
  logic [PW-1:0] dcnt, hcnt, h_len;
  logic [PW+7:0] h_prod;

  assign h_prod   = t_sense * duty;
  assign h_len    = (h_prod[PW+7:8] == '0) ? PW'(1) : h_prod[PW+7:8];
  assign dly_fire = dly_active && (dcnt <= PW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly_active <= 1'b0; dly_out <= 1'b0; dcnt <= '0; hcnt <= '0;
    end else begin
      if (dly_arm) begin
        dly_active <= 1'b1;
        dcnt       <= dly_val;
      end else if (dly_fire) begin
        dly_active <= 1'b0;
      end else if (dly_active) begin
        dcnt <= dcnt - PW'(1);
      end
      if (dly_fire && !dly_arm) begin
        dly_out <= 1'b1;
        hcnt    <= h_len;
      end else if (dly_out) begin
        if (hcnt <= PW'(1)) dly_out <= 1'b0;
        else                hcnt    <= hcnt - PW'(1);
      end
    end
  end

  // --------------------------------------------------------- mode controller
  logic [PW-1:0] phi_prev;
  logic [7:0]    stable_cnt;
  logic          phi_valid;
  logic [PW-1:0] phi_now, phi_diff, d_align;
  logic          sel_pll;
  logic          lost;

  assign phi_now  = rcnt;
  assign phi_diff = (phi_now > phi_prev) ? phi_now - phi_prev : phi_prev - phi_now;
  assign d_align  = (t_ref > phi_now + PW'(1)) ? t_ref - phi_now - PW'(1) : PW'(1);
  // Lost: no sense edge for two measured periods (or for the timer's range).
  assign lost     = (t_sense != '0) && (({1'b0, scnt} > {t_sense, 1'b0}) || scnt == MAXV);

  always_comb begin
    dly_arm = 1'b0;
    dly_val = delay_cur;
    if (state == LOOP_OPEN && sense_rise && pll_req && ref_seen && t_ref != '0 &&
        stable_cnt >= 8'(LOCK_COUNT)) begin
      dly_arm = 1'b1;
      dly_val = d_align;
    end else if ((state == LOOP_PLL || state == LOOP_SWITCH) && sense_rise) begin
      dly_arm = 1'b1;
      dly_val = delay_cur;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= LOOP_OFF;
      phi        <= '0;
      phi_prev   <= '0;
      phi_valid  <= 1'b0;
      stable_cnt <= '0;
      delay_cur  <= '0;
      sel_pll    <= 1'b0;
      switch_evt <= 1'b0;
      lost_evt   <= 1'b0;
    end else begin
      switch_evt <= 1'b0;
      lost_evt   <= 1'b0;
      if (!en) begin
        state      <= LOOP_OFF;
        sel_pll    <= 1'b0;
        stable_cnt <= '0;
        phi_valid  <= 1'b0;
      end else begin
        unique case (state)
          LOOP_OFF: begin
            state   <= LOOP_OPEN;
            sel_pll <= 1'b0;
          end
          LOOP_OPEN: begin
            sel_pll <= 1'b0;
            if (sense_rise && ref_seen) begin
              phi      <= phi_now;
              phi_prev <= phi_now;
              phi_valid <= 1'b1;
              if (phi_valid && phi_diff <= PW'(PHASE_TOL)) begin
                if (stable_cnt != 8'hFF) stable_cnt <= stable_cnt + 8'd1;
              end else begin
                stable_cnt <= '0;
              end
              if (dly_arm) begin
                delay_cur <= d_align;
                state     <= LOOP_SWITCH;
              end
            end
          end
          LOOP_SWITCH: begin
            // Toggle event: the reference rises (or the delayed sense fires).
            if (ref_rise || dly_fire) begin
              sel_pll    <= 1'b1;
              state      <= LOOP_PLL;
              switch_evt <= 1'b1;
            end
          end
          LOOP_PLL: begin
            if (!pll_req || lost) begin
              sel_pll    <= 1'b0;
              state      <= LOOP_OPEN;
              stable_cnt <= '0;
              phi_valid  <= 1'b0;
              lost_evt   <= lost;
            end else if (sense_rise && delay_target != '0) begin
              if (delay_cur < delay_target)
                delay_cur <= (delay_target - delay_cur > delay_step) ? delay_cur + delay_step : delay_target;
              else if (delay_cur > delay_target)
                delay_cur <= (delay_cur - delay_target > delay_step) ? delay_cur - delay_step : delay_target;
            end
          end
          default: state <= LOOP_OFF;
        endcase
      end
    end
  end

  // ------------------------------------------------------------ drive output
  logic drv;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drv <= 1'b0;
    else        drv <= (state == LOOP_OFF || !en) ? 1'b0 : (sel_pll ? dly_out : ref_i);
  end
  logic on;
  assign on        = en && (state != LOOP_OFF);
  assign drive_0   = on & drv;
  assign drive_180 = on & ~drv;

  // The two actuators of a pair are never driven high together.
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(drive_0 && drive_180));

endmodule
