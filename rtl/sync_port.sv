`timescale 1ps/1ps
// sync_port: the synchronous side of a pausible-clock port, clocked by the
// port's own (pausible) clock sysclk. It gives the synchronous logic module
// a plain valid/ready interface:
//   receive:  rx_valid is high while the holding register written by the
//             asynchronous FSM is full; a cycle with rx_valid and rx_ready
//             consumes the word (flips rx_rtog).
//   transmit: tx_ready is high while the transmit register is empty; a
//             cycle with tx_valid and tx_ready loads tx_data and marks it
//             pending (flips tx_wtog).
// Full/empty are toggle pairs: one bit written on this side, one by the
// FSM. The FSM changes its bits only while sysclk is paused low, so they
// are stable at every rising edge and need no synchronizer: this is the
// point of the pausible clock. The received word itself sits in the FSM's
// holding latch and goes to the module directly. rst_n is an asynchronous
// active-low reset.
// The valid/ready interface is this design's choice.
module sync_port #(
  parameter int unsigned W = async_pkg::DATA_W
) (
  input  logic         sysclk,
  input  logic         rst_n,
  // synchronous logic module
  output logic         rx_valid,
  input  logic         rx_ready,
  input  logic         tx_valid,
  output logic         tx_ready,
  input  logic [W-1:0] tx_din,
  // asynchronous FSM
  input  logic         rx_wtog,
  output logic         rx_rtog,
  output logic [W-1:0] tx_data,
  output logic         tx_wtog,
  input  logic         tx_rtog
);
  assign rx_valid = (rx_wtog != rx_rtog);
  assign tx_ready = (tx_wtog == tx_rtog);

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      rx_rtog <= 1'b0;
      tx_wtog <= 1'b0;
      tx_data <= '0;
    end else begin
      if (rx_valid && rx_ready) rx_rtog <= ~rx_rtog;
      if (tx_valid && tx_ready) begin
        tx_data <= tx_din;
        tx_wtog <= ~tx_wtog;
      end
    end
  end
endmodule
