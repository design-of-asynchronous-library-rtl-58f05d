`timescale 1ps/1ps
// afsm: asynchronous finite state machine of a pausible-clock port. It
// carries out the four-phase handshakes with the two FIFOs, and it touches
// the state shared with the synchronous module only while that module's
// clock is paused (gnt_* high).
//
// Receive channel (FIFO output side -> synchronous module):
//   req_rx rises when a handshake edge of the incoming FIFO needs service:
//   a new word (rx_req high, rx_ack low) while the holding register is
//   empty, or the return to zero (rx_req low, rx_ack high). Under gnt_rx a
//   new word is latched into rx_data, the register is marked full by making
//   rx_wtog differ from rx_rtog, and rx_ack rises; on the second visit
//   rx_ack falls. The request drops as soon as rx_ack matches rx_req.
// Transmit channel (synchronous module -> FIFO input side):
//   a word is pending while tx_wtog differs from tx_rtog. Under gnt_tx the
//   machine raises tx_req (the word on tx_data is already stable in the
//   synchronous register); when the FIFO has answered with tx_ack it lowers
//   tx_req and marks the register empty (tx_rtog = tx_wtog) under a second
//   grant. tx_data is passed to the FIFO by the enclosing port.
// Every handshake edge therefore pauses the clock once, as in the timing
// trace of the document. rst_n (active low) clears all state.
// The state is held in latches whose enables are the grants; the feedback
// of rx_ack and tx_req on themselves is that of the asynchronous machine.
// Lint therefore reports combinational loops through rx_ack, tx_req,
// tx_rtog and rx_empty: they are the machine's state-holding feedback and
// settle after one change, so they stand.
module afsm #(
  parameter int unsigned W = async_pkg::DATA_W
) (
  input  logic         rst_n,
  // incoming FIFO (its output side)
  input  logic         rx_req,
  output logic         rx_ack,
  input  logic [W-1:0] rx_fifo_data,
  // outgoing FIFO (its input side)
  output logic         tx_req,
  input  logic         tx_ack,
  // arbiter
  output logic         req_rx,
  input  logic         gnt_rx,
  output logic         req_tx,
  input  logic         gnt_tx,
  // shared with the synchronous side
  output logic [W-1:0] rx_data,
  output logic         rx_wtog,
  input  logic         rx_rtog,
  input  logic         tx_wtog,
  output logic         tx_rtog
);
  logic rx_empty, tx_pending;

  assign rx_empty   = (rx_wtog == rx_rtog);
  assign tx_pending = (tx_wtog != tx_rtog);

  assign req_rx = (rx_req & ~rx_ack & rx_empty) | (~rx_req & rx_ack);
  assign req_tx = (tx_pending & ~tx_req & ~tx_ack) | (tx_req & tx_ack);

  // receive channel
  always_latch begin
    if (!rst_n) begin
      rx_ack  = 1'b0;
      rx_wtog = 1'b0;
    end else if (gnt_rx) begin
      if (rx_req && !rx_ack && rx_empty) begin
        rx_data = rx_fifo_data;
        rx_wtog = ~rx_rtog;
        rx_ack  = 1'b1;
      end else if (!rx_req && rx_ack) begin
        rx_ack  = 1'b0;
      end
    end
  end

  // transmit channel
  always_latch begin
    if (!rst_n) begin
      tx_req  = 1'b0;
      tx_rtog = 1'b0;
    end else if (gnt_tx) begin
      if (tx_pending && !tx_req && !tx_ack) begin
        tx_req  = 1'b1;
      end else if (tx_req && tx_ack) begin
        tx_req  = 1'b0;
        tx_rtog = tx_wtog;
      end
    end
  end

  // a grant is only ever given to a channel that asked for it
  always_comb assert (!(gnt_rx && gnt_tx)) else $error("afsm: both channels granted");
endmodule
