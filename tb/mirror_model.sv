// mirror_model: behavioural stand-in for a resonant piezo mirror, its drive
// buffers, sense amplifier and comparator (not synthesizable).
//
// The digital sense signal follows drive_0 after a fixed transport delay of
// lag_ns nanoseconds, which models the phase lag of the mirror response and
// the analog chain. 'stall' holds the sense output low, as after a mechanical
// shock that stops the oscillation. The lag can be changed at run time.
module mirror_model (
  input  logic drive_0,
  input  logic stall,
  input  int   lag_ns,
  output logic sense
);
  logic    delayed = 1'b0;
  longint  t_q[$];
  logic    v_q[$];

  // Every drive change is queued with its due time and replayed in order.
  always @(drive_0) begin
    t_q.push_back(longint'($time) + longint'(lag_ns));
    v_q.push_back(drive_0);
  end

  initial begin
    forever begin
      wait (t_q.size() != 0);
      if (t_q[0] > longint'($time)) #(t_q[0] - longint'($time));
      delayed = v_q[0];
      void'(t_q.pop_front());
      void'(v_q.pop_front());
    end
  end

  assign sense = delayed & ~stall;
endmodule
