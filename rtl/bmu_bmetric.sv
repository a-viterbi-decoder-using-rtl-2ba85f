// BMETRIC: branch metrics from expected encoder outputs and symbol costs.
//
// The metric of branch j is the sum over the three symbols r of
// DECODED_DATA[2r] when the branch expects bit 1 on symbol r and of
// DECODED_DATA[2r+1] when it expects bit 0. At code rate 1/2 the third
// generator polynomial is zero, so the third symbol adds the same cost to
// every branch and does not change any decision. Purely combinational.
//
// The sum of the costs follows the source's BMETRIC description; the metric
// width (10 bits) is this design's choice.
module bmu_bmetric
  import viterbi_pkg::*;
(
  input  logic [NSYM-1:0] Expected [2*NMEM],
  input  tbl_t            DECODED_DATA [2*NSYM],
  output bm_t             BMETRIC [2*NMEM]
);

  always_comb begin
    for (int j = 0; j < 2*NMEM; j++) begin
      BMETRIC[j] = '0;
      for (int r = 0; r < NSYM; r++) begin
        BMETRIC[j] = BMETRIC[j] + (Expected[j][r] ? bm_t'(DECODED_DATA[2*r])
                                                 : bm_t'(DECODED_DATA[2*r+1]));
      end
    end
  end

endmodule
