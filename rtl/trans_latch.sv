`timescale 1ps/1ps
// trans_latch: W-bit transparent latch, the datapath cell of the
// micropipeline FIFO. While en is high q follows d; when en falls q keeps
// the last value (the keeper loop of the cell). No reset: the latch is
// transparent after a FIFO clear, so its content is defined by its input.
// A latch is inferred on purpose.
module trans_latch #(
  parameter int unsigned W = 32
) (
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_latch begin
    if (en) q = d;
  end
endmodule
