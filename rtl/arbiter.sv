`timescale 1ps/1ps
// arbiter: merges the two channel requests of the asynchronous FSM (receive
// and transmit) into one clock-pause request for the clock mutex.
// A mutex picks one of req_rx / req_tx; the winner's request goes out on
// creq. When the clock mutex answers on cgnt (local clock paused), the
// grant is passed back to the winning channel only. All signals are
// four-phase: a channel keeps its request high until it has finished and
// then lowers it, which frees both mutexes in turn.
// The split into a channel mutex and a clock mutex is this design's
// reading of the separate "Arbiter" and "Mutual Exclusion" blocks.
module arbiter (
  input  logic req_rx,
  input  logic req_tx,
  output logic gnt_rx,
  output logic gnt_tx,
  output logic creq,
  input  logic cgnt
);
  logic a_rx, a_tx;

  mutex u_mx (
    .r1(req_rx),
    .r2(req_tx),
    .g1(a_rx),
    .g2(a_tx)
  );

  assign creq   = a_rx | a_tx;
  assign gnt_rx = a_rx & cgnt;
  assign gnt_tx = a_tx & cgnt;
endmodule
