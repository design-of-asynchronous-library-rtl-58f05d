`timescale 1ps/1ps
// muller_c: two-input Muller C-element with active-low clear.
// The output copies the inputs when they agree and holds its value while
// they differ; cdn low forces it to 0. This is the library's basic
// rendezvous element and the heart of every pipeline control stage.
// It is written as a level-sensitive latch whose enable is (a == b) and
// whose data is a, which is the state-holding behaviour of the
// transistor-level cell; synthesis therefore reports a latch, as intended.
// Zero delay: the output changes in the same time step as the inputs.
module muller_c (
  input  logic a,
  input  logic b,
  input  logic cdn,
  output logic q
);
  always_latch begin
    if (!cdn)        q = 1'b0;
    else if (a == b) q = a;
  end
endmodule
