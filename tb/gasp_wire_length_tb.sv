// Wire-length workload: a 16-bit FIFO over wires of 0 to 5 mm cut into 1 mm
// sections, i.e. 1 to 6 stages (a wire of n mm has n+1 stages). Each length
// runs in its own harness. The test checks that the latency grows by four
// gate delays per stage while the throughput stays at one word per six gate
// delays for every length, and prints the table of both.
//
// The lengths and the 16-bit width are those of the original wire-length
// comparison; the original reports 500 ps per word and 500 ps plus 350 ps
// per mm, while this model at 100 ps per gate gives 600 ps and 500 ps plus
// 400 ps per section.
`timescale 1ps / 1ps
module gasp_wire_length_tb;
  import gasp_pkg::*;

  localparam int unsigned N_LEN = 6;

  logic        done     [N_LEN];
  int unsigned c        [N_LEN];
  int unsigned f        [N_LEN];
  longint      lat      [N_LEN];
  longint      per      [N_LEN];

  for (genvar i = 0; i < N_LEN; i++) begin : g_len
    gasp_link_bench #(.STAGES(i + 1), .WIDTH(16), .T_INV(T_INV_PS), .N_WORDS(40)) u_bench (
      .done(done[i]), .checks(c[i]), .failures(f[i]), .latency_ps(lat[i]), .period_ps(per[i])
    );
  end

  int unsigned checks = 0, failures = 0;

  initial begin
    bit all_done;
    do begin
      #1000;
      all_done = 1'b1;
      for (int i = 0; i < N_LEN; i++) all_done &= done[i];
    end while (!all_done);
    for (int i = 0; i < N_LEN; i++) begin
      checks   += c[i];
      failures += f[i];
      $display("wire %0d mm, %0d stages: latency %0d ps, cycle %0d ps", i, i + 1, lat[i], per[i]);
      checks++;
      if (per[i] != per[0]) begin
        failures++;
        $display("FAIL: cycle depends on the wire length");
      end
      if (i > 0) begin
        checks++;
        if (lat[i] - lat[i-1] != 4 * T_INV_PS) begin
          failures++;
          $display("FAIL: latency step %0d ps, expected %0d", lat[i] - lat[i-1], 4 * T_INV_PS);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(20_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
