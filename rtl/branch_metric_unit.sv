// branch_metric_unit: branch metrics of one received symbol pair.
//
// For each of the four possible code symbols {c0, c1} = 00, 01, 10, 11 it gives
// the distance between the received pair and that symbol, measured as the sum
// of the absolute differences of the two components. A received component is
// a SOFT_BITS-bit quantized value in which 0 stands for a sure 0 and
// 2**SOFT_BITS-1 for a sure 1. With the default SOFT_BITS = 1 (hard decisions)
// the metric is the Hamming distance, 0 to 2. The soft-input option is this
// design's generalisation; the absolute-difference measure follows the
// description of the unit.
//
// Purely combinational. bm[c] is the metric of code symbol c.
module branch_metric_unit #(
  parameter int unsigned SOFT_BITS = 1,
  localparam int unsigned BM_W     = SOFT_BITS + 1
) (
  input  logic [SOFT_BITS-1:0] r0,        // received value of code bit c0
  input  logic [SOFT_BITS-1:0] r1,        // received value of code bit c1
  output logic [BM_W-1:0]      bm [4]
);

  localparam logic [SOFT_BITS-1:0] ONE = '1;

  function automatic logic [SOFT_BITS-1:0] absdiff(input logic [SOFT_BITS-1:0] a,
                                                   input logic [SOFT_BITS-1:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  logic [SOFT_BITS-1:0] d0 [2];   // distance of r0 from a 0 / a 1
  logic [SOFT_BITS-1:0] d1 [2];

  always_comb begin
    d0[0] = absdiff(r0, '0);
    d0[1] = absdiff(r0, ONE);
    d1[0] = absdiff(r1, '0);
    d1[1] = absdiff(r1, ONE);
    for (int c = 0; c < 4; c++)
      bm[c] = BM_W'(d0[c[1]]) + BM_W'(d1[c[0]]);
  end

endmodule
