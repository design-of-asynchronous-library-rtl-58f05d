`timescale 1ps/1ps
// async_pkg: constants shared by the asynchronous interface design.
// DATA_W and FIFO_STAGES are the 32-bit word and the 4-stage micropipeline
// of the interface chip; RING_STAGES is the 21-stage ring of the clock
// generator and DIV_BITS the 8 toggle stages of the divide-by-256 counter.
// STAGE_PS is this design's own choice of one ring stage delay: 11 ps gives
// a period of 2*21*11 = 462 ps, close to the 2.2 GHz local clock reported
// for the silicon.
package async_pkg;
  localparam int unsigned DATA_W      = 32;
  localparam int unsigned FIFO_STAGES = 4;
  localparam int unsigned RING_STAGES = 21;
  localparam int unsigned DIV_BITS    = 8;
  localparam int unsigned STAGE_PS    = 11;
endpackage
