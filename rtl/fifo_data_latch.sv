// One column of FIFO buffer cells: a WIDTH-bit level-sensitive latch.
//
// Each bit is a pass transistor followed by two inverters, with a second pass
// transistor closing the feedback loop from the second inverter back to the
// first. The enable opens the input pass transistor and its inverse opens the
// feedback one, so the cell is transparent while `en` is high and stores while
// `en` is low; a strong feedback path never fights a distant driver.
// The same latch serves as the sender's output latch (enabled by the sender's
// wave-pipelined clock) and as the receiver's input latch.
//
// Timing: q follows the stored value after T_DQ, the delay of the two
// inverters. The delay is what keeps adjacent GasP stages, whose enable
// pulses overlap by one gate delay, from passing a word through two stages in
// one pulse. Synthesis ignores it and sees a plain latch.
//
// Synthesis reports a latch here; that is the intended storage element.
//
// The latch structure (pass transistor, two inverters, pass-transistor
// feedback) follows the original design; the delay of exactly two gate delays
// and the absence of any data reset are this design's choices.
`timescale 1ps / 1ps
module fifo_data_latch #(
  parameter int unsigned WIDTH = gasp_pkg::DEF_WIDTH,
  parameter int unsigned T_DQ  = 2 * gasp_pkg::T_INV_PS
) (
  input  logic             en,  // stage enable, transparent when high
  input  logic [WIDTH-1:0] d,   // column of the previous stage
  output logic [WIDTH-1:0] q    // this stage's column
);

  logic [WIDTH-1:0] stored;

  always_latch begin
    if (en) stored = d;
  end

  assign #(T_DQ) q = stored;

endmodule
