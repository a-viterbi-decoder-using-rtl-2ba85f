// K3 ACSDPRAM: one trellis stage of the K=3 rate 1/2 decoder.
//
// Four DPRAMs hold the path metrics of states 00..11; state 00's DPRAM
// starts at 0, the others at a large value. A state identifier is the two
// previous inputs, newest in the most significant bit: input u moves
// state {b1, b0} to {u, b1}, and the lost bit b0 tells the two predecessors
// apart. For each next state an ACS adds the branch metrics (from the BMU,
// indexed by the expected encoder output of the transition) to the metrics
// of predecessors {b1, 0} and {b1, 1}. On W_En the new metrics are written
// in place and the surviving b0 is stored in the next state's RAMPath at
// address PresentInstant; PresentInstant = 0 makes the DPRAMs supply start
// metrics instead of stored ones. The BMU and ACS work asynchronously;
// updates take effect on the Clk edge with W_En. Read_Data shows the stored
// metrics and RAMPath the survivor registers (RAMPath[s][t] = bit of state s
// written at cycle t).
//
// Follows the source: the DPRAM/ACS/BMU composition, in-place update, one
// BMU for all transitions, storing the least significant bit of the present
// state. This design's own choice: generator bit 2 taps the newest input
// (G0 = 111, G1 = 101 by default), and the expected output's first bit
// comes from G0.
module k3_acsdpram #(
  parameter bit          SOFT  = 1'b0,
  parameter int unsigned PM_W  = SOFT ? 14 : 5,
  parameter int unsigned BM_W  = SOFT ? 9 : 2,
  parameter int unsigned DW    = SOFT ? 4 : 2,
  parameter int unsigned DEPTH = 8,
  parameter logic [2:0]  G0    = 3'b111,
  parameter logic [2:0]  G1    = 3'b101
) (
  input  logic                     Clk,
  input  logic                     Reset,
  input  logic [DW-1:0]            Demod_Data,
  input  logic [$clog2(DEPTH)-1:0] PresentInstant,
  input  logic                     W_En,
  output logic [PM_W-1:0]          Read_Data [4],
  output logic [DEPTH-1:0]         RAMPath [4]
);

  logic [BM_W-1:0] bm [4];
  logic [PM_W-1:0] r_data [4];
  logic [PM_W-1:0] new_pm [4];
  logic            pp [4];

  k3_bmu #(.SOFT(SOFT), .BM_W(BM_W), .DW(DW)) u_bmu (
    .Demod_Data   (Demod_Data),
    .BranchMetric (bm)
  );

  // Expected encoder output {G0 bit, G1 bit} of the window {next state, b0}.
  function automatic logic [1:0] expected(input logic [1:0] nxt, input logic b0);
    logic [2:0] w;
    w = {nxt, b0};
    expected = {^(w & G0), ^(w & G1)};
  endfunction

  for (genvar s = 0; s < 4; s++) begin : g_state
    localparam logic [1:0] NS = 2'(s);
    localparam int unsigned P0 = 2 * s % 4;  // {b1, 0} with b1 = NS[0]

    k3_acs #(.PM_W(PM_W), .BM_W(BM_W)) u_acs (
      .StateMetric0  (r_data[P0]),
      .BranchMetric0 (bm[expected(NS, 1'b0)]),
      .StateMetric1  (r_data[P0 + 1]),
      .BranchMetric1 (bm[expected(NS, 1'b1)]),
      .PathMetric    (new_pm[s]),
      .ProbablePath  (pp[s])
    );

    k3_dpram #(.PM_W(PM_W), .DEPTH(DEPTH), .ZERO_STATE(s == 0)) u_dpram (
      .Clk       (Clk),
      .Reset     (Reset),
      .W_En      (W_En),
      .W_Addr    (PresentInstant),
      .W_Data    (new_pm[s]),
      .W_Path    (pp[s]),
      .R_Addr    (PresentInstant),
      .R_Data    (r_data[s]),
      .Read_Data (Read_Data[s]),
      .RAMPATH   (RAMPath[s])
    );
  end

endmodule
