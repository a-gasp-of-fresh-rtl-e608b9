// Shared types and default sizes of the GasP distributed FIFO.
//
// Every state conductor of the FIFO carries one bit: low means the stage
// boundary holds a word that still has to move on (FULL), high means it is
// free (EMPTY). Master reset drives every state conductor high.
//
// Delays are in picoseconds. T_INV_PS is the delay of one inverter (or one
// pull transistor charging a node); the control loop of a stage is six such
// delays long, four forward and two backward, which gives the 600 ps cycle
// (1.67 GHz) reported for the 0.25 um implementation. STAGES and WIDTH are the
// 16-stage, 32-bit configuration used for the speed and power comparison.
//
// The 16 x 32 size and the six-delay loop are the original design's; the
// 100 ps gate delay is derived from its 600 ps cycle.
`timescale 1ps / 1ps
package gasp_pkg;

  typedef enum logic {
    ST_FULL  = 1'b0,
    ST_EMPTY = 1'b1
  } state_e;

  parameter int unsigned T_INV_PS   = 100;
  parameter int unsigned DEF_STAGES = 16;
  parameter int unsigned DEF_WIDTH  = 32;

endpackage
