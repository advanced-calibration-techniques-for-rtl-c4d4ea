// Behavioural model: transport (non-inertial) delay of a single wire.
//
// Every change of `in` reappears on `out` delay_ps picoseconds later, so
// pulses shorter than the delay pass through intact, as they do in a chain of
// delay cells. The delay is an input and may change at run time; an edge is
// never scheduled ahead of an edge already in flight, so edges keep their
// order. Used by the delay-line and DLL models; it is not synthesizable.
`timescale 1ps/1ps
module transport_delay (
  input  logic        in,
  input  int unsigned delay_ps,
  output logic        out
);
  logic    val_q[$];
  longint  time_q[$];
  event    pushed;
  longint  due;

  initial out = 1'b0;

  always @(in) begin
    due = longint'($time) + longint'(delay_ps);
    if (time_q.size() != 0 && due < time_q[time_q.size()-1])
      due = time_q[time_q.size()-1];
    val_q.push_back(in);
    time_q.push_back(due);
    ->pushed;
  end

  initial forever begin
    if (val_q.size() == 0) @pushed;
    else begin
      if (time_q[0] > longint'($time)) #(time_q[0] - longint'($time));
      out = val_q.pop_front();
      void'(time_q.pop_front());
    end
  end
endmodule
