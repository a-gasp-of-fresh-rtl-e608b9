// End-to-end test of the GasP distributed FIFO at its default size
// (16 stages, 32-bit words, 100 ps gate delay).
//
// A sending and a receiving module are modelled by two processes that each
// drive their own wave-pipelined clock. The sender raises its clock only when
// the write node has been EMPTY for two gate delays; the receiver only when
// the last stage has been FULL for two gate delays. Every word is checked
// against a queue of the words sent. The test runs, in order:
//   1. one lone word through the empty chain: latency (4*STAGES+1)*T_INV from
//      the sender's edge to rcv_full, every stage fires exactly once;
//   2. an idle gap of 20 ns: no enable pulse at all;
//   3. a burst at full speed with a fast receiver: enables of a middle stage
//      spaced by 6*T_INV, the 1.67 GHz rate at 100 ps per gate;
//   4. a sender at 750 MHz: every word arrives with the lone-word latency,
//      which does not depend on the sender's rate;
//   5. a receiver stall: the chain fills, the sender is held off after
//      STAGES+1 words (STAGES columns plus its own output latch), every state
//      node reads FULL, then the receiver drains it in order;
//   6. random sender and receiver timing.
// Throughout it checks that every enable pulse lasts 3*T_INV and that no
// stage fires twice before the next stage has fired. Each mechanism is
// counted and a mechanism that never happened counts as a failure.
//
// The full rate, the 750 MHz rate, the burst after an idle time and the
// stall are the operating cases of the original evaluation; the handshake
// timing of the two test modules is this design's.
`timescale 1ps / 1ps
module gasp_dfifo_tb;
  import gasp_pkg::*;

  localparam int unsigned STAGES = DEF_STAGES;
  localparam int unsigned WIDTH  = DEF_WIDTH;
  localparam int unsigned T      = T_INV_PS;

  logic              rst;
  logic              snd_wp_clk;
  logic [WIDTH-1:0]  snd_data;
  logic              snd_empty;
  logic              buffer_state;
  logic              rcv_wp_clk;
  logic              rcv_full;
  logic [WIDTH-1:0]  rcv_data;
  logic [STAGES-1:0] stage_enable;
  logic [STAGES:0]   state;

  gasp_dfifo dut (
    .rst, .snd_wp_clk, .snd_data, .snd_empty, .buffer_state,
    .rcv_wp_clk, .rcv_full, .rcv_data, .stage_enable, .state
  );

  int unsigned checks   = 0;
  int unsigned failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t ps: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- monitors
  int unsigned fires      [STAGES];
  longint      last_rise  [STAGES];
  bit          ahead      [STAGES];
  int unsigned width_bad  = 0;
  int unsigned order_bad  = 0;

  for (genvar k = 0; k < STAGES; k++) begin : g_mon
    always @(posedge stage_enable[k]) begin
      if (!rst) begin
        fires[k]++;
        last_rise[k] = $time;
        if (k + 1 < STAGES) begin
          if (ahead[k]) begin
            order_bad++;
            $display("FAIL at %0t ps: stage %0d fired twice before stage %0d", $time, k, k + 1);
          end
          ahead[k] = 1'b1;
        end
        if (k > 0) ahead[k-1] = 1'b0;
      end
    end
    always @(negedge stage_enable[k]) begin
      if (!rst && ($time - last_rise[k]) != 3 * T) width_bad++;
    end
  end

  longint t_full_rise  = 0;
  longint t_empty_rise = 0;
  always @(posedge rcv_full)  t_full_rise  = $time;
  always @(posedge snd_empty) t_empty_rise = $time;

  // ------------------------------------------------------ sender / receiver
  logic [WIDTH-1:0] sent [$];
  int unsigned n_sent      = 0;
  int unsigned n_recv      = 0;
  int unsigned n_mismatch  = 0;
  longint      t_last_edge = 0;
  bit          rcv_on      = 1'b0;
  int unsigned rcv_extra   = 0;   // extra receiver delay, in ps

  task automatic send_word(input logic [WIDTH-1:0] w);
    wait (snd_empty);
    #1;  // let the edge monitor record the rise first
    if ($time < t_empty_rise + 2 * T) #(t_empty_rise + 2 * T - $time);
    snd_data   = w;
    snd_wp_clk = 1'b1;
    sent.push_back(w);
    n_sent++;
    t_last_edge = $time;
    #(3 * T);
    snd_wp_clk = 1'b0;
    #(3 * T - 1);  // with the 1 ps above, the clock stays low 3*T_INV
  endtask

  initial begin : receiver
    logic [WIDTH-1:0] exp_w;
    rcv_wp_clk = 1'b0;
    forever begin
      wait (rcv_on && rcv_full && !rst);
      #1;  // let the edge monitor record the rise first
      // the last column settles one gate delay after rcv_full; wait two
      if ($time < t_full_rise + 2 * T) #(t_full_rise + 2 * T - $time);
      if (rcv_extra != 0) #(rcv_extra);
      if (!rcv_on) continue;
      rcv_wp_clk = 1'b1;
      #(2 * T + 1);
      n_recv++;
      exp_w = (sent.size() != 0) ? sent.pop_front() : '0;
      if (rcv_data !== exp_w) begin
        n_mismatch++;
        $display("FAIL at %0t ps: received %h, expected %h", $time, rcv_data, exp_w);
      end
      #(T - 1);
      rcv_wp_clk = 1'b0;
      #(3 * T - 1);  // with the 1 ps below, the clock stays low 3*T_INV
    end
  end

  // ------------------------------------------------------------- sequence
  int unsigned fires0 [STAGES];
  longint      t0, lat, gap, min_gap;
  int unsigned n_gap6, accepted, stalls;
  int unsigned mech_lone = 0, mech_idle = 0, mech_stream = 0, mech_stall = 0,
               mech_full = 0, mech_random = 0, mech_slow = 0;

  initial begin
    rst        = 1'b1;
    snd_wp_clk = 1'b0;
    snd_data   = '0;
    for (int k = 0; k < STAGES; k++) begin
      fires[k] = 0; ahead[k] = 1'b0; last_rise[k] = 0;
    end
    #(20 * T);
    for (int k = 0; k < STAGES; k++) ahead[k] = 1'b0;
    rst = 1'b0;
    #(10 * T);
    check(state == '1, "all state nodes EMPTY after reset");
    check(stage_enable == '0, "no enable after reset");

    // 1. one lone word, receiver off
    fires0 = fires;
    t0 = $time;
    send_word(32'hA5A5_0001);
    wait (rcv_full);
    lat = $time - t_last_edge;
    check(lat == longint'((4 * STAGES + 1) * T),
          $sformatf("lone word latency %0d ps, expected %0d", lat, (4 * STAGES + 1) * T));
    #(10 * T);
    for (int k = 0; k < STAGES; k++)
      check(fires[k] - fires0[k] == 1, $sformatf("stage %0d fired once", k));
    check(state == {1'b0, {STAGES{1'b1}}}, "only the last node FULL while the word waits");
    rcv_on = 1'b1;
    wait (!rcv_full);
    #(20 * T);
    check(n_recv == 1 && n_mismatch == 0, "lone word received intact");
    mech_lone++;

    // 2. idle for 20 ns
    fires0 = fires;
    #20000;
    begin
      int unsigned moved = 0;
      for (int k = 0; k < STAGES; k++) moved += fires[k] - fires0[k];
      check(moved == 0, "no enable pulse while idle");
      check(state == '1, "all nodes EMPTY while idle");
    end
    mech_idle++;

    // 3. full-speed burst
    begin
      longint prev = -1;
      int unsigned mid = STAGES / 2;
      min_gap = 0; n_gap6 = 0;
      fork
        for (int i = 0; i < 48; i++) send_word({16'hB000 + 16'(i), 16'(~i)});
        forever begin
          @(posedge stage_enable[mid]);
          if (prev >= 0) begin
            gap = $time - prev;
            if (min_gap == 0 || gap < min_gap) min_gap = gap;
            if (gap == 6 * T) n_gap6++;
          end
          prev = $time;
        end
      join_any
      disable fork;
      wait (sent.size() == 0);
      #(20 * T);
      check(min_gap == longint'(6 * T), $sformatf("minimum stage cycle %0d ps, expected %0d", min_gap, 6 * T));
      check(n_gap6 >= 40, $sformatf("%0d of 47 stage cycles at full speed", n_gap6));
      if (n_gap6 >= 40) mech_stream++;
    end

    // 4. a slower sender (750 MHz, 1333 ps per word): each word still takes
    //    the lone-word latency, since no word waits for another
    begin
      longint edge_q [$];
      int unsigned n_lat_ok = 0;
      fork
        for (int i = 0; i < 24; i++) begin
          send_word({16'hD000 + 16'(i), 16'h0F0F});
          edge_q.push_back(t_last_edge);
          if ($time < t_last_edge + 1333) #(t_last_edge + 1333 - $time);
        end
        for (int i = 0; i < 24; i++) begin
          @(posedge rcv_full);
          if (edge_q.size() != 0 &&
              $time - edge_q.pop_front() == longint'((4 * STAGES + 1) * T))
            n_lat_ok++;
        end
      join
      wait (sent.size() == 0);
      #(20 * T);
      check(n_lat_ok == 24, $sformatf("%0d of 24 words at 750 MHz with the lone-word latency", n_lat_ok));
      if (n_lat_ok == 24) mech_slow++;
    end

    // 5. receiver stall: the chain fills and holds the sender off
    rcv_on = 1'b0;
    accepted = 0;
    stalls = 0;
    for (int i = 0; i < STAGES + 4; i++) begin
      bit took;
      took = 1'b0;
      fork
        begin send_word({16'hC000 + 16'(i), 16'h5A5A}); took = 1'b1; end
        #(200 * T);
      join_any
      disable fork;
      if (took) accepted++;
      else begin
        // the blocked word was never sent
        stalls++;
        break;
      end
    end
    check(accepted == STAGES + 1,
          $sformatf("chain took %0d words before stalling, expected %0d", accepted, STAGES + 1));
    check(state == '0, "every state node FULL when the chain is full");
    check(!buffer_state && !snd_empty, "sender sees the chain full");
    if (stalls != 0) mech_stall++;
    if (state == '0) mech_full++;
    rcv_on = 1'b1;
    wait (sent.size() == 0);
    #(30 * T);
    check(state == '1, "chain empty again after the stall");

    // 6. random timing on both sides
    fork
      for (int i = 0; i < 200; i++) begin
        send_word($urandom);
        if ($urandom_range(0, 3) == 0) #($urandom_range(0, 40) * T);
      end
      for (int i = 0; i < 400; i++) begin
        rcv_extra = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 30) * T : 0;
        #(7 * T);
      end
    join
    rcv_extra = 0;
    wait (sent.size() == 0);
    #(30 * T);
    mech_random++;

    check(n_mismatch == 0, $sformatf("%0d corrupted words", n_mismatch));
    check(n_recv == n_sent, $sformatf("received %0d of %0d words", n_recv, n_sent));
    check(width_bad == 0, $sformatf("%0d enable pulses not 3 gate delays wide", width_bad));
    check(order_bad == 0, $sformatf("%0d double firings before the next stage", order_bad));
    check(mech_lone > 0,   "mechanism: lone word");
    check(mech_idle > 0,   "mechanism: idle");
    check(mech_stream > 0, "mechanism: full-speed stream");
    check(mech_slow > 0,   "mechanism: slow sender, same latency");
    check(mech_stall > 0,  "mechanism: sender stalled");
    check(mech_full > 0,   "mechanism: chain full");
    check(mech_random > 0, "mechanism: random timing");
    $display("mechanisms: lone=%0d idle=%0d stream=%0d slow=%0d stall=%0d full=%0d random=%0d words=%0d",
             mech_lone, mech_idle, mech_stream, mech_slow, mech_stall, mech_full, mech_random, n_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(50_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
