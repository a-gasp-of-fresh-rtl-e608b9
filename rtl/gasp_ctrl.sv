// GasP control cell of one FIFO stage (behavioural model, not synthesizable
// logic: the cell is self-timed and its pulse width comes from gate delays).
//
// The cell watches two state conductors: node A on its input side and node C
// on its output side. Node B is a self-resetting NAND: it is pulled low
// through N2 and N3 when the inverted A (A low: a word is waiting) and C
// (C high: the next stage is free) are both high. B low then
//   - drives the stage enable high through inverter R, which opens the
//     column of data latches of this stage (fifo_data_latch);
//   - turns on P1, which pulls A high: the word has been taken;
//   - through the enable, turns on N4, which pulls C low: the next stage now
//     holds a word;
//   - after R and S, turns on P2, which precharges B high again.
// Master reset sets B high; the state nodes A and C are reset in
// gasp_state_node. Every gate and pull transistor is modelled as one delay
// of T_INV.
//
// Timing, taking B falling as time 0: enable is high from T_INV to 4*T_INV
// (a pulse of three gate delays); A rises at T_INV and C falls at 2*T_INV;
// B is back high at 3*T_INV and the precharge releases at 5*T_INV. The next
// cell's B falls at 4*T_INV (four forward delays) and the earliest next firing
// of this cell is at 6*T_INV (two backward delays), the six-delay cycle.
// The transistor structure follows the improved control cell of the source
// design; the one-delay-per-gate timing is this model's simplification.
//
// Node B, its pull-down and the precharge through R, S and P2 form a loop
// that synthesis reports as a combinational loop, and B's charge storage as a
// latch. Both are the self-resetting NAND itself and stand as they are.
`timescale 1ps / 1ps
module gasp_ctrl
  import gasp_pkg::*;
#(
  parameter int unsigned T_INV = gasp_pkg::T_INV_PS
) (
  input  logic   rst,        // master reset, active high: B to 1
  input  state_e pred_state, // node A, between this stage and the previous one
  input  state_e succ_state, // node C, between this stage and the next one
  output logic   enable,     // latch enable pulse of this stage's data column
  output logic   drain_pred, // P1 conducting: pulls node A to EMPTY
  output logic   fill_succ   // N4 conducting: pulls node C to FULL
);

  logic a_bar;    // output of the inverter on node A (gate of N2)
  logic b_level;  // level driven onto node B
  logic b;        // node B
  logic s_out;    // output of inverter S (gate of P2)
  logic pull_down;
  logic pull_up;

  assign #(T_INV) a_bar = (pred_state == ST_FULL);

  assign pull_down = a_bar && (succ_state == ST_EMPTY);  // N2 in series with N3
  assign pull_up   = !s_out;                             // P2

  always_latch begin
    if (rst) b_level = 1'b1;
    else if (pull_down && !pull_up) b_level = 1'b0;
    else if (pull_up && !pull_down) b_level = 1'b1;
    // neither or both: node B keeps its charge
  end

  assign #(T_INV) b      = b_level;
  assign #(T_INV) enable = !b;       // inverter R
  assign #(T_INV) s_out  = !enable;  // inverter S

  assign drain_pred = !b;      // P1 gate is node B
  assign fill_succ  = enable;  // N4 gate is the enable

endmodule
