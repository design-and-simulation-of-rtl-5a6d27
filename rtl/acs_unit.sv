// acs_unit: one add-compare-select cell of the Viterbi decoder.
//
// The two candidates for a new state metric are the metrics of the state's two
// predecessors, each plus the branch metric of its transition. They are
// compared by subtracting one from the other and looking at the sign (MSB) of
// the difference, as the ACS unit is described; the smaller candidate is the
// new metric. dec is 1 when the candidate through predecessor 1 wins; on a tie
// predecessor 0 is kept (this tie rule is this design's choice).
//
// Purely combinational; the state-metric registers are in acs_array.
module acs_unit #(
  parameter int unsigned PM_W = 8,
  parameter int unsigned BM_W = 2
) (
  input  logic [PM_W-1:0] pm0,   // metric of predecessor 0
  input  logic [PM_W-1:0] pm1,   // metric of predecessor 1
  input  logic [BM_W-1:0] bm0,   // branch metric from predecessor 0
  input  logic [BM_W-1:0] bm1,   // branch metric from predecessor 1
  output logic [PM_W-1:0] pm_new,
  output logic            dec
);

  logic [PM_W-1:0] c0, c1;
  logic [PM_W:0]   diff;

  always_comb begin
    c0     = pm0 + PM_W'(bm0);
    c1     = pm1 + PM_W'(bm1);
    diff   = {1'b0, c1} - {1'b0, c0};   // negative (MSB set) when c1 < c0
    dec    = diff[PM_W];
    pm_new = dec ? c1 : c0;
  end

endmodule
