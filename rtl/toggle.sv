`timescale 1ps/1ps
// toggle: two-phase toggle element. Successive transitions on 'in' are
// steered alternately to the two outputs: the first (rising) transition
// changes out_dot, the second changes out_blank, and so on, so out_dot is
// a square wave at half the rate of 'in'. cdn low clears both outputs.
// Built from two latches in a loop: out_dot is transparent while in is
// high and takes ~out_blank; out_blank is transparent while in is low and
// takes out_dot. The latch inference is intended, and so is the loop lint
// reports between the two latches (only one is open at a time, so it
// cannot oscillate).
module toggle (
  input  logic in,
  input  logic cdn,
  output logic out_dot,
  output logic out_blank
);
  always_latch begin
    if (!cdn)    out_dot = 1'b0;
    else if (in) out_dot = ~out_blank;
  end
  always_latch begin
    if (!cdn)     out_blank = 1'b0;
    else if (!in) out_blank = out_dot;
  end
endmodule
