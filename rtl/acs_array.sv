// acs_array: the 2**(K-1) = 256 add-compare-select cells and their state-metric
// registers, updated once per trellis step.
//
// New state j = {u, j[K-2:1]} is reached from predecessors p0 = {j[K-3:0], 0}
// and p1 = {j[K-3:0], 1}; the branch from p_d carries the code symbol of the
// encoder register {j, d}. All 256 cells work in parallel, so one received
// symbol is processed per clock; the 256 decision bits of the step form one
// word of the survivor memory.
//
// Normalization: metrics only grow, so when every stored metric has its MSB
// set, 2**(PM_W-1) is subtracted from all new metrics in the same step. The
// spread between metrics is bounded by INIT_METRIC plus (K-1) times the
// largest branch metric B, so no metric overflows and no ordering is lost as
// long as INIT_METRIC + K * B < 2**(PM_W-1). The decoder sets
// PM_W = SOFT_BITS + 7, which meets this for K = 9 (PM_W = 8 for hard
// decisions, where B = 2).
// That normalization is needed is stated for this unit; this particular scheme
// and PM_W are this design's choices.
//
// Timing: when step is high, dec is the combinational decision word of the
// current step and pm[] takes the new metrics at the clock edge. init (which
// wins over step) loads metric 0 into state 0 and INIT_METRIC into all others,
// the start of a frame from the all-zero encoder state.
module acs_array
  import vit_pkg::*;
#(
  parameter int unsigned K           = K_DEFAULT,
  parameter logic [8:0]  G0          = G0_DEFAULT,
  parameter logic [8:0]  G1          = G1_DEFAULT,
  parameter int unsigned PM_W        = 8,
  parameter int unsigned BM_W        = 2,
  parameter int unsigned INIT_METRIC = 2 ** (PM_W - 2),
  localparam int unsigned NS         = 2 ** (K - 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            step,
  input  logic [BM_W-1:0] bm [4],
  output logic [PM_W-1:0] pm [NS],
  output logic [NS-1:0]   dec,
  output logic            norm       // normalization applied in this step
);

  logic [PM_W-1:0] pm_acs [NS];
  logic [NS-1:0]   msb;

  // Code symbol {c0, c1} of the branch into state j from predecessor bit d.
  function automatic logic [1:0] branch_sym(input logic [K-2:0] j, input logic d);
    logic [K-1:0] regv;
    regv = {j, d};
    return {^(regv & G0[K-1:0]), ^(regv & G1[K-1:0])};
  endfunction

  for (genvar j = 0; j < NS; j++) begin : g_acs
    localparam int unsigned P0 = (2 * j) % NS;
    localparam logic [1:0]  S0 = branch_sym((K-1)'(j), 1'b0);
    localparam logic [1:0]  S1 = branch_sym((K-1)'(j), 1'b1);
    acs_unit #(.PM_W(PM_W), .BM_W(BM_W)) u_acs (
      .pm0   (pm[P0]),
      .pm1   (pm[P0 + 1]),
      .bm0   (bm[S0]),
      .bm1   (bm[S1]),
      .pm_new(pm_acs[j]),
      .dec   (dec[j])
    );
    assign msb[j] = pm[j][PM_W-1];
  end

  assign norm = &msb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NS; j++) pm[j] <= (j == 0) ? '0 : PM_W'(INIT_METRIC);
    end else if (init) begin
      for (int j = 0; j < NS; j++) pm[j] <= (j == 0) ? '0 : PM_W'(INIT_METRIC);
    end else if (step) begin
      for (int j = 0; j < NS; j++)
        pm[j] <= norm ? pm_acs[j] - PM_W'(2 ** (PM_W - 1)) : pm_acs[j];
    end
  end

endmodule
