// best_state_finder: index of the state with the smallest path metric.
//
// A binary tree of comparators, log2(NS) levels deep, reduces the NS metrics
// pairwise; on equal metrics the lower state index wins. The traceback starts
// from this state when the trellis end state is not known. The decoder traces
// back from a start state; how that state is chosen is this design's choice.
//
// Purely combinational.
module best_state_finder #(
  parameter int unsigned NS   = 256,        // power of two
  parameter int unsigned PM_W = 8,
  localparam int unsigned S_W = $clog2(NS)
) (
  input  logic [PM_W-1:0] pm [NS],
  output logic [S_W-1:0]  best,
  output logic [PM_W-1:0] best_pm
);

  logic [PM_W-1:0] v  [NS];
  logic [S_W-1:0]  ix [NS];

  // In-place tree: at level l, slot i (a multiple of 2**(l+1)) keeps the
  // winner of itself and slot i + 2**l.
  always_comb begin
    for (int i = 0; i < NS; i++) begin
      v[i]  = pm[i];
      ix[i] = S_W'(i);
    end
    for (int l = 0; l < S_W; l++) begin
      for (int i = 0; i < NS; i += 2 ** (l + 1)) begin
        if (v[i + 2 ** l] < v[i]) begin
          v[i]  = v[i + 2 ** l];
          ix[i] = ix[i + 2 ** l];
        end
      end
    end
    best    = ix[0];
    best_pm = v[0];
  end

endmodule
