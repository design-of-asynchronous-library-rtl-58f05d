`timescale 1ps/1ps
// interface_chip: the 32-bit interface between two synchronous modules
// (side A, e.g. a CPU, and side B, e.g. a peripheral) that run on
// different, independently generated clocks.
// Each side has a pausible clocking control port (pcc) that makes its
// local clock (a_sysclk, b_sysclk) and hands words to and from the side's
// logic through a valid/ready interface on that clock. Two 4-stage
// asynchronous micropipeline FIFOs join the ports, one per direction:
// A transmit -> fifo_ab -> B receive and B transmit -> fifo_ba -> A
// receive. The two clocks differ by their ring stage delays (STAGE_PS_A,
// STAGE_PS_B); no signal crosses between them except through the FIFOs
// and the clock-pausing handshakes.
// Beside the interface sits the characterization structure of the cell
// library: a free-running ring oscillator whose isolation-buffered output
// drives a divide-by-256 toggle counter (ro_out), and a Select cell with
// its pins brought out. rst_n is active low and also clears the FIFOs.
// Lint reports combinational loops through the FIFO request/acknowledge
// wires and the Select cell outputs: the FIFOs and ports are self-timed
// circuits whose handshakes close loops through C-elements and latches by
// design, so these warnings stand.
module interface_chip #(
  parameter int unsigned DATA_W      = async_pkg::DATA_W,
  parameter int unsigned FIFO_STAGES = async_pkg::FIFO_STAGES,
  parameter int unsigned RING_STAGES = async_pkg::RING_STAGES,
  parameter int unsigned STAGE_PS_A  = async_pkg::STAGE_PS,
  parameter int unsigned STAGE_PS_B  = 14
) (
  input  logic              rst_n,
  // side A
  input  logic              a_enable,
  output logic              a_sysclk,
  output logic              a_rx_valid,
  input  logic              a_rx_ready,
  output logic [DATA_W-1:0] a_rx_data,
  input  logic              a_tx_valid,
  output logic              a_tx_ready,
  input  logic [DATA_W-1:0] a_tx_data,
  // side B
  input  logic              b_enable,
  output logic              b_sysclk,
  output logic              b_rx_valid,
  input  logic              b_rx_ready,
  output logic [DATA_W-1:0] b_rx_data,
  input  logic              b_tx_valid,
  output logic              b_tx_ready,
  input  logic [DATA_W-1:0] b_tx_data,
  // ring oscillator test structure
  input  logic              ro_select,
  input  logic              ro_enable,
  input  logic              ro_reset,
  output logic              ro_out,
  // Select cell
  input  logic              sel_in,
  input  logic              sel_sel,
  input  logic              sel_cdn,
  output logic              sel_out_t,
  output logic              sel_out_f
);
  logic              ab_req_in, ab_ack_out, ab_req_out, ab_ack_in;
  logic              ba_req_in, ba_ack_out, ba_req_out, ba_ack_in;
  logic [DATA_W-1:0] ab_din, ab_dout, ba_din, ba_dout;
  logic              ro_loop, ro_buf;

  pcc #(.W(DATA_W), .RING_STAGES(RING_STAGES), .STAGE_PS(STAGE_PS_A)) u_pcc_a (
    .rst_n(rst_n), .enable(a_enable), .sysclk(a_sysclk),
    .rx_valid(a_rx_valid), .rx_ready(a_rx_ready), .rx_dout(a_rx_data),
    .tx_valid(a_tx_valid), .tx_ready(a_tx_ready), .tx_din(a_tx_data),
    .rx_req(ba_req_out), .rx_ack(ba_ack_in), .rx_fifo_data(ba_dout),
    .tx_req(ab_req_in), .tx_ack(ab_ack_out), .tx_fifo_data(ab_din)
  );

  pcc #(.W(DATA_W), .RING_STAGES(RING_STAGES), .STAGE_PS(STAGE_PS_B)) u_pcc_b (
    .rst_n(rst_n), .enable(b_enable), .sysclk(b_sysclk),
    .rx_valid(b_rx_valid), .rx_ready(b_rx_ready), .rx_dout(b_rx_data),
    .tx_valid(b_tx_valid), .tx_ready(b_tx_ready), .tx_din(b_tx_data),
    .rx_req(ab_req_out), .rx_ack(ab_ack_in), .rx_fifo_data(ab_dout),
    .tx_req(ba_req_in), .tx_ack(ba_ack_out), .tx_fifo_data(ba_din)
  );

  micropipeline_fifo #(.W(DATA_W), .STAGES(FIFO_STAGES)) u_fifo_ab (
    .clear(~rst_n),
    .req_in(ab_req_in), .ack_out(ab_ack_out), .data_in(ab_din),
    .req_out(ab_req_out), .ack_in(ab_ack_in), .data_out(ab_dout)
  );

  micropipeline_fifo #(.W(DATA_W), .STAGES(FIFO_STAGES)) u_fifo_ba (
    .clear(~rst_n),
    .req_in(ba_req_in), .ack_out(ba_ack_out), .data_in(ba_din),
    .req_out(ba_req_out), .ack_in(ba_ack_in), .data_out(ba_dout)
  );

  ring_oscillator #(.STAGES(RING_STAGES), .STAGE_PS(STAGE_PS_A)) u_ro (
    .select(ro_select), .enable(ro_enable),
    .ring_in(ro_loop), .ring_out(ro_loop), .buf_out(ro_buf)
  );

  ring_divider #(.BITS(async_pkg::DIV_BITS)) u_div (
    .in(ro_buf), .reset(ro_reset), .out(ro_out)
  );

  select_elem u_sel (
    .in(sel_in), .sel(sel_sel), .cdn(sel_cdn),
    .out_t(sel_out_t), .out_f(sel_out_f)
  );
endmodule
