`timescale 1ps/1ps
// pcc: pausible clocking control port of one synchronous module. It makes
// the module's local clock and connects the module to one incoming and one
// outgoing asynchronous FIFO without synchronizers.
//
// Clock: a ring oscillator whose loop is closed through a mutex. The ring
// output rclk requests the mutex on one side; the grant on that side is
// sysclk, which is fed back into the ring. On the other side the arbiter
// requests the mutex on behalf of the asynchronous FSM. While the FSM
// holds the mutex, a rising rclk is not granted: sysclk stays low and the
// ring waits, so the clock period is stretched. The FSM updates the shared
// registers only while it holds the mutex, and sysclk never rises during
// that time, so the synchronous side samples them safely.
//
// Structure: ring_oscillator (clock generation) + mutex (mutual exclusion)
// + grant_hold (models the completion time of a handshake edge, HOLD_PS,
// about 0.2 ns by default, so that the clock really is stretched) + arbiter + afsm (asynchronous finite state machine) + sync_port
// (registers of the synchronous side). Unpaused, sysclk runs with period
// 2*RING_STAGES*STAGE_PS (462 ps, about 2.2 GHz, by default).
// rst_n (active low) resets the FSM and the synchronous registers and
// stops the ring; enable starts and stops the ring.
// Lint reports combinational loops through the grants, rx_ack, tx_req and
// tx_rtog: these are the request/grant handshakes between the FSM, the
// arbiter and the mutexes, which are self-timed by design and settle after
// every event, so they stand.
module pcc #(
  parameter int unsigned W           = async_pkg::DATA_W,
  parameter int unsigned RING_STAGES = async_pkg::RING_STAGES,
  parameter int unsigned STAGE_PS    = async_pkg::STAGE_PS,
  parameter int unsigned HOLD_PS     = 200
) (
  input  logic         rst_n,
  input  logic         enable,
  output logic         sysclk,
  // synchronous logic module
  output logic         rx_valid,
  input  logic         rx_ready,
  output logic [W-1:0] rx_dout,
  input  logic         tx_valid,
  output logic         tx_ready,
  input  logic [W-1:0] tx_din,
  // incoming FIFO, output side
  input  logic         rx_req,
  output logic         rx_ack,
  input  logic [W-1:0] rx_fifo_data,
  // outgoing FIFO, input side
  output logic         tx_req,
  input  logic         tx_ack,
  output logic [W-1:0] tx_fifo_data
);
  logic rclk, creq, creq_held, cgnt, unused_buf;
  logic req_rx, gnt_rx, req_tx, gnt_tx;
  logic rx_wtog, rx_rtog, tx_wtog, tx_rtog;

  ring_oscillator #(.STAGES(RING_STAGES), .STAGE_PS(STAGE_PS)) u_clkgen (
    .select  (1'b1),
    .enable  (enable & rst_n),
    .ring_in (sysclk),
    .ring_out(rclk),
    .buf_out (unused_buf)
  );

  // time the asynchronous side takes to finish a handshake edge
  grant_hold #(.HOLD_PS(HOLD_PS)) u_hold (
    .req_in (creq),
    .req_out(creq_held)
  );

  mutex u_clkmx (
    .r1(rclk),
    .r2(creq_held),
    .g1(sysclk),
    .g2(cgnt)
  );

  arbiter u_arb (
    .req_rx(req_rx),
    .req_tx(req_tx),
    .gnt_rx(gnt_rx),
    .gnt_tx(gnt_tx),
    .creq  (creq),
    .cgnt  (cgnt)
  );

  afsm #(.W(W)) u_fsm (
    .rst_n       (rst_n),
    .rx_req      (rx_req),
    .rx_ack      (rx_ack),
    .rx_fifo_data(rx_fifo_data),
    .tx_req      (tx_req),
    .tx_ack      (tx_ack),
    .req_rx      (req_rx),
    .gnt_rx      (gnt_rx),
    .req_tx      (req_tx),
    .gnt_tx      (gnt_tx),
    .rx_data     (rx_dout),
    .rx_wtog     (rx_wtog),
    .rx_rtog     (rx_rtog),
    .tx_wtog     (tx_wtog),
    .tx_rtog     (tx_rtog)
  );

  sync_port #(.W(W)) u_sync (
    .sysclk  (sysclk),
    .rst_n   (rst_n),
    .rx_valid(rx_valid),
    .rx_ready(rx_ready),
    .tx_valid(tx_valid),
    .tx_ready(tx_ready),
    .tx_din  (tx_din),
    .rx_wtog (rx_wtog),
    .rx_rtog (rx_rtog),
    .tx_data (tx_fifo_data),
    .tx_wtog (tx_wtog),
    .tx_rtog (tx_rtog)
  );
endmodule
