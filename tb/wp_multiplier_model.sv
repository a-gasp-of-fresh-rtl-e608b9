// Behavioural model of an 8x8-bit hybrid wave-pipelined multiplier, used
// only as a data source in tests. It is not part of the FIFO design and its
// internal structure is not modelled.
//
// Operands are taken on each rising edge of `clk`. The input clock travels
// with the data, so LAT_PS later the product appears on `p` together with a
// rising edge of `wp_clk`, the output wave-pipelined clock; `wp_clk` is `clk`
// delayed by LAT_PS. Several products can be in flight at once.
//
// The 8x8 operands, the 16-bit result and the output wave-pipelined clock
// follow the original experiment; the latency is assumed.
`timescale 1ps / 1ps
module wp_multiplier_model #(
  parameter int unsigned LAT_PS = 1000
) (
  input  logic        clk,
  input  logic [7:0]  x,
  input  logic [7:0]  y,
  output logic        wp_clk,
  output logic [15:0] p
);

  initial begin
    wp_clk = 1'b0;
    p      = '0;
  end

  always @(posedge clk) begin
    fork
      begin
        automatic logic [15:0] r = 16'(x) * 16'(y);
        #(LAT_PS);
        p      = r;
        wp_clk = 1'b1;
      end
    join_none
  end

  always @(negedge clk) begin
    fork
      begin
        #(LAT_PS);
        wp_clk = 1'b0;
      end
    join_none
  end

endmodule
