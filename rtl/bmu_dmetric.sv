// DMETRIC: soft-decision costs of the received symbols.
//
// BMUTABLE[v] is the cost of receiving level v (0..7) when the transmitted
// bit was 1; the table is symmetric, so the cost of level v for a transmitted
// 0 is BMUTABLE[~v]. For each of the three received symbols this unit
// provides both costs:
//   DECODED_DATA[2r]   = BMUTABLE[DEMODDATA[r]]     (expected bit 1)
//   DECODED_DATA[2r+1] = BMUTABLE[~DEMODDATA[r]]    (expected bit 0)
// as the source gives them. Purely combinational.
module bmu_dmetric
  import viterbi_pkg::*;
(
  input  sym_t DEMODDATA [NSYM],
  input  tbl_t BMUTABLE [1 << SYM_W],
  output tbl_t DECODED_DATA [2*NSYM]
);

  always_comb begin
    for (int r = 0; r < NSYM; r++) begin
      DECODED_DATA[2*r]   = BMUTABLE[DEMODDATA[r]];
      DECODED_DATA[2*r+1] = BMUTABLE[~DEMODDATA[r]];
    end
  end

endmodule
