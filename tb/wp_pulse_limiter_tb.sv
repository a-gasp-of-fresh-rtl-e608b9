// Unit test of the edge-to-pulse converter: every rising edge of the clock
// gives exactly one pulse that starts with the edge and lasts three gate
// delays, or less when the clock falls first, however long the clock stays
// high. The clock is kept low for at least three gate delays between edges,
// the time the inverter chain needs to re-arm.
`timescale 1ps / 1ps
module wp_pulse_limiter_tb;
  import gasp_pkg::*;

  localparam int unsigned T = T_INV_PS;

  logic wp_clk, pulse;

  wp_pulse_limiter dut (.wp_clk, .pulse);

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t ps: %s", $time, what);
    end
  endtask

  longint      t_rise, t_fall;
  int unsigned n_pulses = 0;
  always @(posedge pulse) begin t_rise = $time; n_pulses++; end
  always @(negedge pulse) t_fall = $time;

  task automatic edge_test(input int unsigned high_ps, input int unsigned low_ps);
    int unsigned n_before;
    longint      t_edge;
    longint      exp_w;
    n_before = n_pulses;
    wp_clk = 1'b1;
    t_edge = $time;
    #(high_ps);
    wp_clk = 1'b0;
    #(low_ps);
    exp_w = (high_ps < 3 * T) ? high_ps : 3 * T;
    check(n_pulses == n_before + 1, $sformatf("one pulse for a %0d ps high phase", high_ps));
    check(t_rise == t_edge, "pulse starts with the clock edge");
    check(t_fall - t_rise == exp_w,
          $sformatf("pulse width %0d ps, expected %0d", t_fall - t_rise, exp_w));
  endtask

  initial begin
    wp_clk = 1'b0;
    #(10 * T);
    check(!pulse, "no pulse while the clock is low");
    edge_test(3 * T, 3 * T);
    edge_test(50 * T, 5 * T);     // held high: still one pulse
    edge_test(T, 3 * T);          // short high phase
    edge_test(2 * T + 50, 4 * T);
    repeat (100) edge_test($urandom_range(T, 20 * T), $urandom_range(3 * T, 10 * T));
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
