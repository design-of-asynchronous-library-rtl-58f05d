`timescale 1ps/1ps
// mutex: two-way mutual exclusion element.
// g1 follows r1 and g2 follows r2, but never both at once: a request is
// granted only when no grant is out, and a grant is held until its own
// request falls; the other request then gets its grant. The silicon cell
// resolves simultaneous requests with a metastability filter; this model
// resolves an exact tie in favour of r1, a choice of this design.
// Both grants are kept in one latch process so that no tie can grant
// both; a both-granted state, possible only from power-up, is cleared in
// favour of r1. The latch warnings of synthesis are this state holding.
module mutex (
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  always_latch begin
    if (!r1) g1 = 1'b0;
    if (!r2) g2 = 1'b0;
    if (r1 && !g1 && !g2)      g1 = 1'b1;
    else if (r2 && !g1 && !g2) g2 = 1'b1;
    if (g1 && g2) g2 = 1'b0;  // power-up state only: r1 keeps its grant
    assert (!(g1 && g2)) else $error("mutex: both grants high");
  end

endmodule
