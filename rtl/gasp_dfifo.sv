// Asynchronous distributed FIFO with GasP control, for carrying a data word
// across a long on-chip interconnect between two independently clocked
// modules.
//
// The wire is cut into STAGES segments. Each stage has one GasP control cell
// (gasp_ctrl) and one column of WIDTH data latches (fifo_data_latch). Between
// neighbouring cells sits a state conductor (gasp_state_node) that says
// whether the boundary holds a word (FULL, low) or not (EMPTY, high). A cell
// fires when the node before it is FULL and the node after it is EMPTY: it
// pulses its latch enable, empties the node before it and fills the node
// after it. A word therefore ripples down the wire one stage per four gate
// delays without any clock, and stops wherever the stage ahead is occupied,
// so the chain is also a STAGES-word FIFO.
//
// Node numbering: state[0] is the sender's write node (node A of the first
// cell), state[k] lies between cell k-1 and cell k, state[STAGES] is the
// receiver's read node (node C of the last cell).
//
// Sender side: the sender puts its word on snd_data and raises snd_wp_clk.
// The output latch is transparent while snd_wp_clk is high, so the word must
// stay stable during the high phase. A pulse limiter turns the rising edge
// into a single write pulse that pulls state[0] FULL. The sender may raise
// its clock again once snd_empty (state[0]) has been EMPTY for 2*T_INV; at
// the fastest this is every 6*T_INV. buffer_state is state[1], the line that
// tells the sender whether the first stage is free.
//
// Receiver side: rcv_full is high while the last stage holds a word. The
// last column settles T_INV after rcv_full rises, so the receiver raises
// rcv_wp_clk no sooner than 2*T_INV after rcv_full rises. The receiver raises
// rcv_wp_clk to take the word: its input latch, transparent while the clock
// is low, closes on the rising edge and shows the word on rcv_data 2*T_INV
// later, and a pulse limiter pulls state[STAGES] EMPTY so the last cell can
// deliver the next word.
//
// Everything but the handshake rule for the two clocks follows the source
// design's block diagram; the receiver latch polarity and the exact sender
// and receiver timing rules are this design's own choices.
//
// Assertions check the two clock rules above and that no state node is ever
// pulled FULL and EMPTY at the same time.
//
// Synthesis reports combinational logic loops and latches in this module, and
// they stand: each state node together with the two cells that pull it forms
// a loop closed only through gate delays, which is how the self-timed control
// works, and every data column is a level-sensitive latch by design. Without
// the delays the loops have no meaning, which is why the control parts are
// behavioural models; only the data columns map to real latches.
`timescale 1ps / 1ps
module gasp_dfifo
  import gasp_pkg::*;
#(
  parameter int unsigned STAGES = gasp_pkg::DEF_STAGES,
  parameter int unsigned WIDTH  = gasp_pkg::DEF_WIDTH,
  parameter int unsigned T_INV  = gasp_pkg::T_INV_PS
) (
  input  logic              rst,          // master reset, active high
  // sending module
  input  logic              snd_wp_clk,   // sender's wave-pipelined clock
  input  logic [WIDTH-1:0]  snd_data,     // sender's result word
  output logic              snd_empty,    // write node EMPTY: last word taken
  output logic              buffer_state, // first stage boundary EMPTY
  // receiving module
  input  logic              rcv_wp_clk,   // receiver's wave-pipelined clock
  output logic              rcv_full,     // last stage holds a word
  output logic [WIDTH-1:0]  rcv_data,     // receiver input latch
  // observation of the chain
  output logic [STAGES-1:0] stage_enable, // latch enable of every stage
  output logic [STAGES:0]   state         // every state node, 1 = EMPTY
);

  state_e            node       [STAGES+1];
  logic              pull_full  [STAGES+1];
  logic              pull_empty [STAGES+1];
  logic [WIDTH-1:0]  column     [STAGES+1];  // column[0] is the sender latch
  logic              drain      [STAGES];
  logic              fill       [STAGES];
  logic              wr_pulse;
  logic              rd_pulse;

  wp_pulse_limiter #(.T_INV(T_INV)) u_wr_limiter (.wp_clk(snd_wp_clk), .pulse(wr_pulse));
  wp_pulse_limiter #(.T_INV(T_INV)) u_rd_limiter (.wp_clk(rcv_wp_clk), .pulse(rd_pulse));

  fifo_data_latch #(.WIDTH(WIDTH), .T_DQ(2 * T_INV)) u_snd_latch (
    .en(snd_wp_clk), .d(snd_data), .q(column[0])
  );

  for (genvar k = 0; k <= STAGES; k++) begin : g_node
    if (k == 0) begin : g_wr
      assign pull_full[k] = wr_pulse;
    end else begin : g_fill
      assign pull_full[k] = fill[k-1];
    end
    if (k == STAGES) begin : g_rd
      assign pull_empty[k] = rd_pulse;
    end else begin : g_drain
      assign pull_empty[k] = drain[k];
    end
    gasp_state_node #(.T_PULL(T_INV)) u_node (
      .rst       (rst),
      .pull_full (pull_full[k]),
      .pull_empty(pull_empty[k]),
      .state     (node[k])
    );
    assign state[k] = (node[k] == ST_EMPTY);
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    gasp_ctrl #(.T_INV(T_INV)) u_ctrl (
      .rst       (rst),
      .pred_state(node[k]),
      .succ_state(node[k+1]),
      .enable    (stage_enable[k]),
      .drain_pred(drain[k]),
      .fill_succ (fill[k])
    );
    fifo_data_latch #(.WIDTH(WIDTH), .T_DQ(2 * T_INV)) u_column (
      .en(stage_enable[k]), .d(column[k]), .q(column[k+1])
    );
  end

  fifo_data_latch #(.WIDTH(WIDTH), .T_DQ(2 * T_INV)) u_rcv_latch (
    .en(!rcv_wp_clk), .d(column[STAGES]), .q(rcv_data)
  );

  // Handshake rules, checked in simulation. The sender may only offer a word
  // into an EMPTY write node and the receiver may only take one from a FULL
  // read node; inside the chain no state node is ever pulled both ways.
  always @(posedge snd_wp_clk)
    if (!rst) assert (node[0] == ST_EMPTY)
      else $error("sender clock edge while the write node is FULL");

  always @(posedge rcv_wp_clk)
    if (!rst) assert (node[STAGES] == ST_FULL)
      else $error("receiver clock edge while the read node is EMPTY");

  for (genvar k = 0; k <= STAGES; k++) begin : g_no_fight
    always_comb
      assert final (rst || !(pull_full[k] && pull_empty[k]))
        else $error("state node %0d pulled FULL and EMPTY at once", k);
  end

  assign snd_empty    = (node[0] == ST_EMPTY);
  assign buffer_state = (node[1] == ST_EMPTY);
  assign rcv_full     = (node[STAGES] == ST_FULL);

endmodule
