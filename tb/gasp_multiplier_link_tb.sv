// Interfacing workload: a free-running 8x8-bit wave-pipelined multiplier
// (behavioural model) sends its 16-bit products through the FIFO. The
// multiplier issues one product every 450 ps and is never stalled: its output
// wave-pipelined clock drives the FIFO's sender clock directly and the
// FIFO's sender latch holds each product for the first stage. The gate delay
// is set to 70 ps, about the 0.18 um speed (six delays per word, 420 ps).
// The test checks that every product arrives in order and that each
// multiplier edge finds the write node free for the required two gate
// delays, i.e. the FIFO keeps up with the multiplier.
//
// The 450 ps multiplier rate and the sender latch on its output clock follow
// the original experiment; the multiplier latency and the 70 ps gate delay are
// assumed.
`timescale 1ps / 1ps
module gasp_multiplier_link_tb;

  localparam int unsigned T        = 70;
  localparam int unsigned PERIOD   = 450;
  localparam int unsigned STAGES   = 16;
  localparam int unsigned N_PROD   = 120;

  logic        rst, mclk, wp_clk;
  logic [7:0]  x, y;
  logic [15:0] p;
  logic        snd_empty, buffer_state, rcv_wp_clk, rcv_full;
  logic [15:0] rcv_data;
  logic [STAGES-1:0] stage_enable;
  logic [STAGES:0]   state;

  wp_multiplier_model #(.LAT_PS(1300)) u_mult (.clk(mclk), .x, .y, .wp_clk, .p);

  gasp_dfifo #(.STAGES(STAGES), .WIDTH(16), .T_INV(T)) dut (
    .rst, .snd_wp_clk(wp_clk), .snd_data(p), .snd_empty, .buffer_state,
    .rcv_wp_clk, .rcv_full, .rcv_data, .stage_enable, .state
  );

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t ps: %s", $time, what);
    end
  endtask

  logic [15:0] expected [$];
  longint t_full_rise = 0, t_empty_rise = 0;
  int unsigned n_recv = 0, n_edges = 0;
  always @(posedge rcv_full)  t_full_rise  = $time;
  always @(posedge snd_empty) t_empty_rise = $time;

  // the FIFO must be ready at every product edge
  always @(posedge wp_clk) if (!rst) begin
    n_edges++;
    check(snd_empty && ($time - t_empty_rise >= 2 * T),
          "multiplier edge while the write node is not free");
  end

  initial begin : receiver
    rcv_wp_clk = 1'b0;
    #1;  // start once reset is applied
    forever begin
      wait (rcv_full && !rst);
      #1;
      if ($time < t_full_rise + 2 * T) #(t_full_rise + 2 * T - $time);
      rcv_wp_clk = 1'b1;
      #(2 * T + 1);
      check(expected.size() != 0 && rcv_data == expected[0],
            $sformatf("product %h, expected %h", rcv_data, expected.size() != 0 ? expected[0] : 16'h0));
      if (expected.size() != 0) void'(expected.pop_front());
      n_recv++;
      #(T - 1);
      rcv_wp_clk = 1'b0;
      #(3 * T - 1);
    end
  end

  initial begin
    rst = 1'b1; mclk = 1'b0; x = '0; y = '0;
    #(3000);
    rst = 1'b0;
    #(1000);
    for (int i = 0; i < N_PROD; i++) begin
      x = 8'($urandom);
      y = 8'($urandom);
      expected.push_back(16'(x) * 16'(y));
      mclk = 1'b1;
      #(PERIOD / 2);
      mclk = 1'b0;
      #(PERIOD - PERIOD / 2);
    end
    wait (expected.size() == 0);
    #(20 * T);
    check(n_recv == N_PROD, $sformatf("%0d of %0d products received", n_recv, N_PROD));
    check(n_edges == N_PROD, $sformatf("%0d multiplier edges", n_edges));
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
