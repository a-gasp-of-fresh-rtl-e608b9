// Unit test of one GasP control cell. The testbench plays the two state
// conductors: it turns node A EMPTY one gate delay after the cell starts
// draining it and node C FULL one gate delay after the cell starts filling
// it. It checks
//   - after reset the cell is quiet;
//   - with A FULL and C EMPTY the cell fires once: enable rises 3*T_INV after
//     A falls (inverter, NAND pull-down, inverter R) and lasts 3*T_INV;
//   - with C FULL the cell waits, and fires 2*T_INV after C turns EMPTY;
//   - with both neighbours answering at once, firings are 6*T_INV apart,
//     the self-reset limit;
//   - the cell never fires while A is EMPTY.
//
// The delays checked are those of the one-delay-per-gate model.
`timescale 1ps / 1ps
module gasp_ctrl_tb;
  import gasp_pkg::*;

  localparam int unsigned T = T_INV_PS;

  logic   rst;
  state_e pred_state, succ_state;
  logic   enable, drain_pred, fill_succ;

  gasp_ctrl dut (.rst, .pred_state, .succ_state, .enable, .drain_pred, .fill_succ);

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t ps: %s", $time, what);
    end
  endtask

  // the state nodes as seen by the cell
  always @(posedge drain_pred) if (!rst) #(T) pred_state = ST_EMPTY;
  always @(posedge fill_succ)  if (!rst) #(T) succ_state = ST_FULL;

  longint      t_en_rise, t_en_fall, prev_rise;
  int unsigned n_fire = 0;
  int unsigned n_bad_width = 0;
  bit          auto_refill = 1'b0;
  longint      min_period = 0;
  always @(posedge enable) if (!rst) begin
    if (n_fire > 0 && (min_period == 0 || $time - t_en_rise < min_period))
      min_period = $time - t_en_rise;
    t_en_rise = $time;
    n_fire++;
  end
  always @(negedge enable) if (!rst) begin
    t_en_fall = $time;
    if (t_en_fall - t_en_rise != 3 * T) n_bad_width++;
  end

  // fast neighbours: refill A and drain C two gate delays after each change
  always @(pred_state) if (auto_refill && pred_state == ST_EMPTY) #(2 * T) pred_state = ST_FULL;
  always @(succ_state) if (auto_refill && succ_state == ST_FULL)  #(2 * T) succ_state = ST_EMPTY;

  longint t0;
  int unsigned n0;

  initial begin
    rst = 1'b1; pred_state = ST_EMPTY; succ_state = ST_EMPTY;
    #(10 * T);
    rst = 1'b0;
    #(10 * T);
    check(!enable && !drain_pred && !fill_succ, "quiet after reset");

    // A FULL, C EMPTY: one firing
    n0 = n_fire;
    pred_state = ST_FULL;
    t0 = $time;
    #(20 * T);
    check(n_fire == n0 + 1, "fires once for one word");
    check(t_en_rise - t0 == 3 * T, $sformatf("enable %0d ps after A falls, expected %0d", t_en_rise - t0, 3 * T));
    check(t_en_fall - t_en_rise == 3 * T, "enable pulse three gate delays wide");
    check(pred_state == ST_EMPTY && succ_state == ST_FULL, "word moved from A to C");

    // A FULL while C FULL: wait
    n0 = n_fire;
    pred_state = ST_FULL;
    #(50 * T);
    check(n_fire == n0, "waits while the next stage is FULL");
    check(!enable, "no enable while waiting");
    succ_state = ST_EMPTY;
    t0 = $time;
    #(20 * T);
    check(n_fire == n0 + 1, "fires once the next stage empties");
    check(t_en_rise - t0 == 2 * T, $sformatf("enable %0d ps after C rises, expected %0d", t_en_rise - t0, 2 * T));

    // A EMPTY: never fires, whatever C does
    n0 = n_fire;
    repeat (10) begin
      succ_state = ST_EMPTY; #(5 * T);
      succ_state = ST_FULL;  #(5 * T);
    end
    succ_state = ST_EMPTY;
    #(10 * T);
    check(n_fire == n0, "no firing while A is EMPTY");

    // fast neighbours: six-gate-delay cycle
    n0 = n_fire;
    min_period = 0;
    auto_refill = 1'b1;
    pred_state = ST_FULL;
    #(200 * T);
    auto_refill = 1'b0;
    #(20 * T);
    check(n_fire - n0 >= 30, $sformatf("%0d firings in 200 gate delays", n_fire - n0));
    check(min_period == 6 * T, $sformatf("shortest cycle %0d ps, expected %0d", min_period, 6 * T));
    check(n_bad_width == 0, $sformatf("%0d enable pulses of the wrong width", n_bad_width));

    // reset in the middle of activity leaves the cell quiet
    rst = 1'b1;
    #(10 * T);
    check(!enable && !drain_pred, "reset stops the cell");

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
