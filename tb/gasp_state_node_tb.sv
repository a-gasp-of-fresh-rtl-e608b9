// Unit test of the GasP state conductor: reset level, one pull delay from a
// pull to the node, the keeper holding the level between pulls, and the
// level kept when both sides pull at once. A random phase compares the node
// with a reference that applies the same rules one T_PULL later.
`timescale 1ps / 1ps
module gasp_state_node_tb;
  import gasp_pkg::*;

  localparam int unsigned T = T_INV_PS;

  logic   rst, pull_full, pull_empty;
  state_e state;

  gasp_state_node dut (.rst, .pull_full, .pull_empty, .state);

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t ps: %s", $time, what);
    end
  endtask

  state_e model;

  initial begin
    rst = 1'b1; pull_full = 1'b0; pull_empty = 1'b0;
    #(5 * T);
    check(state == ST_EMPTY, "reset gives EMPTY");
    rst = 1'b0;
    #(5 * T);
    check(state == ST_EMPTY, "EMPTY held after reset");

    // fill: seen exactly one pull delay later, then kept
    pull_full = 1'b1;
    #(T - 1);
    check(state == ST_EMPTY, "not yet FULL before one pull delay");
    #1;
    check(state == ST_FULL, "FULL one pull delay after the pull");
    #(T);
    pull_full = 1'b0;
    #(20 * T);
    check(state == ST_FULL, "keeper holds FULL");

    // both pull: keep FULL
    pull_full = 1'b1; pull_empty = 1'b1;
    #(3 * T);
    check(state == ST_FULL, "both pulling keeps FULL");
    pull_full = 1'b0;
    #(T - 1);
    check(state == ST_FULL, "drain not yet seen");
    #1;
    check(state == ST_EMPTY, "drain wins once the fill is released");
    pull_empty = 1'b0;
    #(20 * T);
    check(state == ST_EMPTY, "keeper holds EMPTY");

    // both pull from EMPTY: keep EMPTY
    pull_full = 1'b1; pull_empty = 1'b1;
    #(3 * T);
    check(state == ST_EMPTY, "both pulling keeps EMPTY");
    pull_full = 1'b0; pull_empty = 1'b0;

    // reset from FULL
    #(2 * T);
    pull_full = 1'b1; #(T); pull_full = 1'b0; #(2 * T);
    check(state == ST_FULL, "FULL before reset");
    rst = 1'b1; #(2 * T);
    check(state == ST_EMPTY, "reset empties a FULL node");
    rst = 1'b0; #(2 * T);

    // random pulls against a reference; changes are at least 2*T apart
    model = state;
    repeat (300) begin
      pull_full  = $urandom_range(0, 1) == 1;
      pull_empty = $urandom_range(0, 1) == 1;
      if (pull_full && !pull_empty) model = ST_FULL;
      else if (pull_empty && !pull_full) model = ST_EMPTY;
      #(T + 1);
      check(state == model, "random pull sequence");
      #(T - 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(10_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
