`timescale 1ps/1ps
// ring_oscillator: behavioural model (not synthesizable logic) of the
// STAGES-stage ring oscillator used for library characterization and as
// the local clock generator of the pausible clocking port.
// The first stage is a NAND of select, enable and ring_in; STAGES-1 further
// inverting stages follow, each modelled by a delay of STAGE_PS
// picoseconds. ring_out is the last stage. Tying ring_out to ring_in closes
// the ring (STAGES inversions, STAGES odd), which then oscillates with a
// period of 2*STAGES*STAGE_PS; the pausible clock instead closes the loop
// through a mutex. buf_out is ring_out through an isolation buffer of one
// stage delay, which keeps a heavy load (the divider) off the ring.
// With select or enable low the NAND output stays high and the ring stops.
// The stage count, the select/enable inputs and the isolation buffer follow
// the document; making the first stage a NAND and the others inverters,
// and the stage delay (chosen to give about 2.2 GHz), are this design's.
module ring_oscillator #(
  parameter int unsigned STAGES   = async_pkg::RING_STAGES,
  parameter int unsigned STAGE_PS = async_pkg::STAGE_PS
) (
  input  logic select,
  input  logic enable,
  input  logic ring_in,
  output logic ring_out,
  output logic buf_out
);
  logic [STAGES-1:0] node;

  assign #(STAGE_PS) node[0] = ~(select & enable & ring_in);
  for (genvar i = 1; i < STAGES; i++) begin : g_inv
    assign #(STAGE_PS) node[i] = ~node[i-1];
  end

  assign ring_out = node[STAGES-1];
  assign #(STAGE_PS) buf_out = ring_out;
endmodule
