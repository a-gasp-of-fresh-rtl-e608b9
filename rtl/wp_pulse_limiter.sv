// Edge-to-pulse converter on a wave-pipelined clock (behavioural model, not
// synthesizable logic: the pulse width is set by gate delays).
//
// A held-high write line would let the control cell sample as fast as it can
// reset, so the clock reaches the state node through a pass transistor that a
// chain of three inverters, driven by the same clock, switches off three
// inverter delays after the clock rises. The result is one pulse of
// 3*T_INV per rising edge, however long the clock stays high. The sender uses
// it on its write node (through N1) and the receiver on its read node
// (through P3, whose gate sees the inverse of `pulse`).
//
// Timing: `pulse` rises with `wp_clk` and falls 3*T_INV later, or when the
// clock falls, whichever comes first.
//
// The three-inverter chain and its use at both ends follow the original
// design; one delay per inverter and the active-high pulse seen from the
// receiver side are this model's choices.
//
// Synthesis drops the delays, which reduces the output to wp_clk AND NOT
// wp_clk, a constant 0: the pulse exists only through the delays, so this
// block has to be a custom cell in silicon.
`timescale 1ps / 1ps
module wp_pulse_limiter #(
  parameter int unsigned T_INV = gasp_pkg::T_INV_PS
) (
  input  logic wp_clk,  // wave-pipelined clock of the sending or receiving module
  output logic pulse    // pull request on the state node, active high
);

  logic inv1, inv2, inv3;

  assign #(T_INV) inv1 = !wp_clk;
  assign #(T_INV) inv2 = !inv1;
  assign #(T_INV) inv3 = !inv2;

  assign pulse = wp_clk && inv3;  // series pull transistor and pass transistor

endmodule
