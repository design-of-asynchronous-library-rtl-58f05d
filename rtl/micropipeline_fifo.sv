`timescale 1ps/1ps
// micropipeline_fifo: asynchronous FIFO built as a transparent-latch,
// four-phase, bundled-data micropipeline of STAGES stages (4 by default),
// W bits wide (32 by default).
// Each stage is a pipeline_control and a W-bit trans_latch. The control
// stages form a chain: stage i takes its request from stage i-1 (Req_in
// for the first) and its acknowledge from stage i+1 (Ack_in for the last).
// Input side: the sender puts a word on data_in, then raises req_in; the
// FIFO raises ack_out once the word is held in stage 0; the sender lowers
// req_in and the FIFO lowers ack_out (return to zero). Output side: same
// protocol with req_out / ack_in, data_out valid while req_out is high.
// A word and its return-to-zero phase occupy two adjacent stages, so the
// four stages hold up to two words at once. clear (active high) empties
// the FIFO. Zero-delay model: the document's stage delays (about 0.7 ns
// request to request) are not modelled, only the ordering of events.
module micropipeline_fifo #(
  parameter int unsigned W      = async_pkg::DATA_W,
  parameter int unsigned STAGES = async_pkg::FIFO_STAGES
) (
  input  logic         clear,
  input  logic         req_in,
  output logic         ack_out,
  input  logic [W-1:0] data_in,
  output logic         req_out,
  input  logic         ack_in,
  output logic [W-1:0] data_out
);
  logic [STAGES:0]   req;          // req[i] enters stage i, req[STAGES] = req_out
  logic [STAGES:0]   ack;          // ack[i] leaves stage i, ack[STAGES] = ack_in
  logic [STAGES-1:0] en;
  logic [W-1:0]      d [STAGES+1]; // d[i] enters stage i

  assign req[0] = req_in;
  assign d[0]   = data_in;
  assign ack[STAGES] = ack_in;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    pipeline_control u_ctl (
      .clear   (clear),
      .req_in  (req[i]),
      .ack_out (ack[i]),
      .req_out (req[i+1]),
      .ack_in  (ack[i+1]),
      .latch_en(en[i])
    );
    trans_latch #(.W(W)) u_lat (
      .en(en[i]),
      .d (d[i]),
      .q (d[i+1])
    );
  end

  assign ack_out  = ack[0];
  assign req_out  = req[STAGES];
  assign data_out = d[STAGES];
endmodule
