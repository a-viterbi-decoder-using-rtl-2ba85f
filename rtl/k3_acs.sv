// K3 ACS: add-compare-select unit of the K=3 rate 1/2 decoder.
//
// Adds each branch metric to the path metric of its predecessor state and
// keeps the smaller sum. ProbablePath is 1 when predecessor 1 (the state
// whose identifier ends in 1) survives; that bit is what traceback stores.
// On a tie predecessor 1 wins, as in the source's ACS simulation for this
// decoder (the reconfigurable decoder's ACS differs: there predecessor 0
// wins). Purely combinational; widths are parameters (5/2 bits for hard
// decision, 14/9 bits for soft decision as in the source).
//
// This design's own choice: the sums saturate at all ones instead of
// wrapping.
module k3_acs #(
  parameter int unsigned PM_W = 5,
  parameter int unsigned BM_W = 2
) (
  input  logic [PM_W-1:0] StateMetric0,
  input  logic [BM_W-1:0] BranchMetric0,
  input  logic [PM_W-1:0] StateMetric1,
  input  logic [BM_W-1:0] BranchMetric1,
  output logic [PM_W-1:0] PathMetric,
  output logic            ProbablePath
);

  logic [PM_W:0]   sum0, sum1;
  logic [PM_W-1:0] m0, m1;

  always_comb begin
    sum0 = {1'b0, StateMetric0} + (PM_W+1)'(BranchMetric0);
    sum1 = {1'b0, StateMetric1} + (PM_W+1)'(BranchMetric1);
    m0   = sum0[PM_W] ? '1 : sum0[PM_W-1:0];
    m1   = sum1[PM_W] ? '1 : sum1[PM_W-1:0];
    ProbablePath = (m1 <= m0);
    PathMetric   = ProbablePath ? m1 : m0;
  end

endmodule
