`timescale 1ps/1ps
// pipeline_control: control of one stage of the four-phase bundled-data
// micropipeline (one "Pipeline Control" box of the FIFO).
// A Muller C-element combines the request from the previous stage with the
// inverted acknowledge from the next stage. Its output is at once the
// request to the next stage and the acknowledge to the previous one:
//   c = C(req_in, ~ack_in);  req_out = ack_out = c.
// The data latch of the stage is open while c is low (stage empty or
// returning to zero) and closes when c rises, capturing the word that the
// sender holds until it sees the acknowledge. clear (active high) resets
// the C-element through its active-low clear pin.
// The C-element with inverted acknowledge and the latch polarity are this
// design's reading of the control box; the document shows only the box.
// The C-element output feeds back into its own latch, and through the
// neighbouring stages' acknowledges into this stage again; lint reports
// this as a combinational loop, which is the intended asynchronous
// control and stands.
module pipeline_control (
  input  logic clear,
  input  logic req_in,
  output logic ack_out,
  output logic req_out,
  input  logic ack_in,
  output logic latch_en
);
  logic c;

  muller_c u_c (
    .a  (req_in),
    .b  (~ack_in),
    .cdn(~clear),
    .q  (c)
  );

  assign req_out  = c;
  assign ack_out  = c;
  assign latch_en = ~c;
endmodule
