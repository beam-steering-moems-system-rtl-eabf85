// resonant_mirror_model: behavioural second-order resonator with a comparator
// on its sense output (not synthesizable).
//
// At every rising edge of drive_0 the drive period T is measured and the
// steady-state phase lag of a resonator with period t0_ps and quality factor
// Q is computed, theta = atan2(2*zeta*f*f0, f0^2 - f^2) with zeta = 1/(2Q)
// (90 degrees at resonance). The lag actually applied follows that value with
// the mechanical time constant, by a fraction pi/Q per period. The sense output
// rises theta/(2*pi)*T after the drive edge and falls half a period later.
// t0_ps may be changed at run time (e.g. spring hardening moving the resonance).
module resonant_mirror_model #(
  parameter real Q = 200.0
) (
  input  logic drive_0,
  input  int   t0_ps,
  output logic sense
);
  localparam real PI = 3.14159265358979;

  real    t_prev = -1.0;
  real    theta  = PI / 2.0;
  real    t_q[$];
  logic   v_q[$];
  real    last_due = 0.0;

  initial sense = 1'b0;

  task automatic schedule(input real due, input logic v);
    if (due <= last_due) due = last_due + 0.001;
    last_due = due;
    t_q.push_back(due);
    v_q.push_back(v);
  endtask

  always @(posedge drive_0) begin
    real now, per, f, f0, target;
    now = $realtime;
    if (t_prev >= 0.0) begin
      per    = now - t_prev;
      f      = 1.0 / per;
      f0     = 1000.0 / real'(t0_ps);
      target = $atan2(f * f0 / Q, f0 * f0 - f * f);
      theta  = theta + (PI / Q) * (target - theta);
      schedule(now + theta / (2.0 * PI) * per, 1'b1);
      schedule(now + theta / (2.0 * PI) * per + per / 2.0, 1'b0);
    end
    t_prev = now;
  end

  initial begin
    forever begin
      wait (t_q.size() != 0);
      if (t_q[0] > $realtime) #(t_q[0] - $realtime);
      sense = v_q[0];
      void'(t_q.pop_front());
      void'(v_q.pop_front());
    end
  end
endmodule
