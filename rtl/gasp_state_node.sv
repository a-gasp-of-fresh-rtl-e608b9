// State conductor of the GasP FIFO (behavioural model, not synthesizable
// logic: it carries transistor-level timing).
//
// One node sits on every boundary between two FIFO stages, and one more at
// each end (the sender's write node and the receiver's read node). The node
// is pulled low (FULL) by the upstream side: the N1 transistor of the sender
// or the N4 transistor of the preceding control cell. It is pulled high
// (EMPTY) by the downstream side: the P1 transistor of the following control
// cell or the P3 transistor of the receiver. A pair of weak inverters keeps
// the last level when nothing pulls. When both sides pull at once the model
// keeps the old level; in the circuit that is a short-circuit condition the
// control timing avoids. Master reset forces the node high (EMPTY).
//
// Timing: a pull is seen on `state` T_PULL after it starts.
//
// The keeper is a latch, and synthesis reports it as one; inside the FIFO the
// node also sits in loops with the control cells on each side, which are the
// self-timed handshake and stand as they are.
//
// The level convention, the keeper and the reset level follow the original
// design; keeping the old level when both sides pull is this model's choice.
`timescale 1ps / 1ps
module gasp_state_node
  import gasp_pkg::*;
#(
  parameter int unsigned T_PULL = gasp_pkg::T_INV_PS
) (
  input  logic   rst,        // master reset, active high: node to EMPTY
  input  logic   pull_full,  // upstream pull-down active
  input  logic   pull_empty, // downstream pull-up active
  output state_e state       // level of the node
);

  state_e level;

  always_latch begin
    if (rst) level = ST_EMPTY;
    else if (pull_empty && !pull_full) level = ST_EMPTY;
    else if (pull_full && !pull_empty) level = ST_FULL;
    // neither or both: the keeper holds the level
  end

  assign #(T_PULL) state = level;

endmodule
