`timescale 1ps/1ps
// grant_hold: behavioural model (not synthesizable logic) of the time the
// asynchronous side keeps the local clock paused.
// In silicon the clock stays paused for as long as the asynchronous FSM,
// the mutex and the FIFO cells take to complete one handshake edge; the
// RTL of those cells has zero delay. This model stands in for that time:
// req_out rises with req_in and falls HOLD_PS picoseconds after req_in
// has fallen (req_out = req_in | req_in delayed). HOLD_PS defaults to
// 200 ps, the pause of about 0.2 ns seen in the document's timing trace.
// HOLD_PS = 0 gives the zero-delay behaviour.
module grant_hold #(
  parameter int unsigned HOLD_PS = 200
) (
  input  logic req_in,
  output logic req_out
);
  logic req_late;

  assign #(HOLD_PS) req_late = req_in;
  assign req_out = req_in | req_late;
endmodule
