// ACS: add-compare-select unit.
//
// Adds each of two branch metrics to the path metric of its predecessor
// state and selects the smaller sum as the new path metric. ProbablePath
// names the survivor: 0 for predecessor 0 (StateMetric0/BranchMetric0), 1 for
// predecessor 1. Predecessor 0 is always the one whose state identifier ends
// in 0, so ProbablePath is the least significant bit of the surviving
// predecessor, the value traceback needs. On a tie predecessor 0 wins, as in
// the source's ACS simulation. Purely combinational.
//
// This design's own choice: the sums saturate at the largest path metric
// instead of wrapping, so an improbable state never turns into a probable one.
module acs
  import viterbi_pkg::*;
(
  input  pm_t  StateMetric0,
  input  bm_t  BranchMetric0,
  input  pm_t  StateMetric1,
  input  bm_t  BranchMetric1,
  output pm_t  PathMetric,
  output logic ProbablePath
);

  logic [PM_W:0] sum0, sum1;
  pm_t           m0, m1;

  always_comb begin
    sum0 = {1'b0, StateMetric0} + (PM_W+1)'(BranchMetric0);
    sum1 = {1'b0, StateMetric1} + (PM_W+1)'(BranchMetric1);
    m0   = sum0[PM_W] ? '1 : sum0[PM_W-1:0];
    m1   = sum1[PM_W] ? '1 : sum1[PM_W-1:0];
    ProbablePath = (m1 < m0);
    PathMetric   = ProbablePath ? m1 : m0;
  end

endmodule
