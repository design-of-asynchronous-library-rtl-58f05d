`timescale 1ps/1ps
// select_elem: two-phase Select element. A transition on 'in' is routed to
// out_t when sel is high and to out_f when sel is low; sel must be stable
// before the input transition (bundling rule). Invariant:
// out_t ^ out_f == in. Each output is a latch open while its branch is
// selected, whose data is in ^ (other output); the closed latch holds.
// cdn low clears both outputs. The latch inference is intended, and so is
// the loop lint reports between the two latches (only one is open at a
// time, so it cannot oscillate).
module select_elem (
  input  logic in,
  input  logic sel,
  input  logic cdn,
  output logic out_t,
  output logic out_f
);
  always_latch begin
    if (!cdn)     out_t = 1'b0;
    else if (sel) out_t = in ^ out_f;
  end
  always_latch begin
    if (!cdn)      out_f = 1'b0;
    else if (!sel) out_f = in ^ out_t;
  end
endmodule
