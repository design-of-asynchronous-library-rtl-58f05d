`timescale 1ps/1ps
// ring_divider: the divide-by-256 counter behind the ring oscillator's
// isolation buffer, so that the ring frequency can be measured off chip.
// It is an asynchronous ripple counter of BITS toggle elements: each
// toggle's out_dot changes on every rising edge of its input and is a
// square wave at half that rate, so 'out' runs at f(in) / 2**BITS.
// reset (active high) clears every stage. Building the counter from the
// library's toggle cells is this design's choice; the document names only
// a "256 counter" with a reset input.
module ring_divider #(
  parameter int unsigned BITS = async_pkg::DIV_BITS
) (
  input  logic in,
  input  logic reset,
  output logic out
);
  logic [BITS:0]   tap;
  logic [BITS-1:0] blank;

  assign tap[0] = in;
  for (genvar i = 0; i < BITS; i++) begin : g_bit
    toggle u_t (
      .in       (tap[i]),
      .cdn      (~reset),
      .out_dot  (tap[i+1]),
      .out_blank(blank[i])
    );
  end

  assign out = tap[BITS];
endmodule
