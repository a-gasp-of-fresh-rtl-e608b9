// Unit test of one column of buffer cells: transparent while enable is high
// with a two-gate (2*T_INV) delay to the output, holding its word while
// enable is low whatever the input does.
//
// Expected values come from a reference copy of the word kept by the test.
`timescale 1ps / 1ps
module fifo_data_latch_tb;
  import gasp_pkg::*;

  localparam int unsigned WIDTH = DEF_WIDTH;
  localparam int unsigned TDQ   = 2 * T_INV_PS;

  logic             en;
  logic [WIDTH-1:0] d, q;

  fifo_data_latch dut (.en, .d, .q);

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t ps: %s", $time, what);
    end
  endtask

  logic [WIDTH-1:0] held, w;

  initial begin
    en = 1'b1; d = 32'h1234_5678;
    #(5 * TDQ);
    check(q == 32'h1234_5678, "transparent while enabled");
    held = q;

    // change the input while open: output follows after TDQ
    d = 32'hCAFE_F00D;
    #(TDQ - 1);
    check(q == held, "output still old just before the latch delay");
    #1;
    check(q == 32'hCAFE_F00D, "output new after the latch delay");

    // close and disturb the input
    en = 1'b0;
    #(TDQ);
    held = q;
    repeat (20) begin
      d = $urandom;
      #(TDQ / 2);
      check(q == held, "holds while enable is low");
    end

    // short enable pulses, like a GasP stage: the last input seen is kept
    repeat (200) begin
      w = $urandom;
      d = w;
      #(TDQ);
      en = 1'b1;
      #(3 * TDQ / 2);
      en = 1'b0;
      d = ~w;
      #(3 * TDQ);
      check(q == w, "captures the word present during the enable pulse");
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
