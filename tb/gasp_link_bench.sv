// Test harness around one GasP FIFO of a given length, used by the
// wire-length test. It plays a sender and a receiver that run as fast as the
// handshake allows and measures:
//   - latency: from the sender's clock edge to rcv_full for a lone word in
//     an empty chain, expected (4*STAGES+1)*T_INV;
//   - throughput: the shortest time between two firings of the first stage
//     while a stream of N_WORDS words passes, expected 6*T_INV whatever the
//     length.
// Every word is checked on arrival. It raises `done` when finished.
`timescale 1ps / 1ps
module gasp_link_bench #(
  parameter int unsigned STAGES  = 4,
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned T_INV   = 100,
  parameter int unsigned N_WORDS = 40
) (
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output longint      latency_ps,
  output longint      period_ps
);

  localparam int unsigned T = T_INV;

  logic              rst, snd_wp_clk, snd_empty, buffer_state;
  logic              rcv_wp_clk, rcv_full;
  logic [WIDTH-1:0]  snd_data, rcv_data;
  logic [STAGES-1:0] stage_enable;
  logic [STAGES:0]   state;

  gasp_dfifo #(.STAGES(STAGES), .WIDTH(WIDTH), .T_INV(T_INV)) dut (
    .rst, .snd_wp_clk, .snd_data, .snd_empty, .buffer_state,
    .rcv_wp_clk, .rcv_full, .rcv_data, .stage_enable, .state
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t ps (%0d stages): %s", $time, STAGES, what);
    end
  endtask

  longint t_full_rise = 0, t_empty_rise = 0, t_edge = 0, t_prev_fire = -1;
  always @(posedge rcv_full)  t_full_rise  = $time;
  always @(posedge snd_empty) t_empty_rise = $time;
  always @(posedge stage_enable[0]) if (!rst) begin
    if (t_prev_fire >= 0 && (period_ps == 0 || $time - t_prev_fire < period_ps))
      period_ps = $time - t_prev_fire;
    t_prev_fire = $time;
  end

  logic [WIDTH-1:0] sent [$];
  bit rcv_on = 1'b0;

  task automatic send_word(input logic [WIDTH-1:0] w);
    wait (snd_empty);
    #1;
    if ($time < t_empty_rise + 2 * T) #(t_empty_rise + 2 * T - $time);
    snd_data   = w;
    snd_wp_clk = 1'b1;
    t_edge     = $time;
    sent.push_back(w);
    #(3 * T);
    snd_wp_clk = 1'b0;
    #(3 * T - 1);
  endtask

  initial begin : receiver
    logic [WIDTH-1:0] exp_w;
    rcv_wp_clk = 1'b0;
    forever begin
      wait (rcv_on && rcv_full);
      #1;
      if ($time < t_full_rise + 2 * T) #(t_full_rise + 2 * T - $time);
      rcv_wp_clk = 1'b1;
      #(2 * T + 1);
      exp_w = (sent.size() != 0) ? sent.pop_front() : '0;
      check(rcv_data == exp_w, $sformatf("received %h, expected %h", rcv_data, exp_w));
      #(T - 1);
      rcv_wp_clk = 1'b0;
      #(3 * T - 1);
    end
  end

  initial begin
    done = 1'b0; checks = 0; failures = 0; latency_ps = 0; period_ps = 0;
    rst = 1'b1; snd_wp_clk = 1'b0; snd_data = '0;
    #(20 * T);
    rst = 1'b0;
    #(10 * T);
    send_word(WIDTH'(16'h1F2E));
    wait (rcv_full);
    #1;  // let the edge monitor record the rise first
    latency_ps = t_full_rise - t_edge;
    check(latency_ps == longint'((4 * STAGES + 1) * T),
          $sformatf("latency %0d ps, expected %0d", latency_ps, (4 * STAGES + 1) * T));
    rcv_on = 1'b1;
    wait (sent.size() == 0);
    #(20 * T);
    t_prev_fire = -1;
    period_ps = 0;
    for (int i = 0; i < N_WORDS; i++) send_word(WIDTH'($urandom));
    wait (sent.size() == 0);
    #(20 * T);
    check(period_ps == longint'(6 * T),
          $sformatf("stage cycle %0d ps, expected %0d", period_ps, 6 * T));
    check(state == '1, "chain empty at the end");
    done = 1'b1;
  end

endmodule
