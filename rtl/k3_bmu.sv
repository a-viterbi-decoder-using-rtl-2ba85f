// K3 BMU: branch metric unit of the K=3 rate 1/2 decoder.
//
// Gives the branch metric for each of the four expected encoder outputs
// 00, 01, 10, 11 (BranchMetric[e], e = {first bit, second bit}).
// Hard decision (SOFT = 0): Demod_Data[1:0] holds the two received bits,
// first bit in bit 1; the metric is their Hamming distance to e (2 bits).
// Soft decision (SOFT = 1): Demod_Data holds two 2-bit levels, first symbol
// in bits 3:2; level 3 is the strongest 1 and level 0 the strongest 0. Each
// symbol costs the scaled log probability of the source's table
// (19, 60, 113, 160) and the two costs are summed (9 bits). Purely
// combinational.
//
// Follows the source: Hamming distance, the scaled table and the 9-bit sum;
// one BMU serves all transitions as in the soft ACSDPRAM. This design's own
// choice: the level coding of the soft symbols.
module k3_bmu #(
  parameter bit          SOFT = 1'b0,
  parameter int unsigned BM_W = SOFT ? 9 : 2,
  parameter int unsigned DW   = SOFT ? 4 : 2
) (
  input  logic [DW-1:0]   Demod_Data,
  output logic [BM_W-1:0] BranchMetric [4]
);

  // Cost of receiving level lvl when bit b was sent.
  function automatic logic [BM_W-1:0] cost(input logic [1:0] lvl, input logic b);
    logic [1:0] l;
    l = b ? ~lvl : lvl;
    case (l)
      2'd0:    cost = BM_W'(19);
      2'd1:    cost = BM_W'(60);
      2'd2:    cost = BM_W'(113);
      default: cost = BM_W'(160);
    endcase
  endfunction

  always_comb begin
    for (int e = 0; e < 4; e++) begin
      if (SOFT)
        BranchMetric[e] = cost(Demod_Data[DW-1 -: 2], e[1]) + cost(Demod_Data[1:0], e[0]);
      else
        BranchMetric[e] = BM_W'(Demod_Data[DW-1] ^ e[1]) + BM_W'(Demod_Data[0] ^ e[0]);
    end
  end

endmodule
