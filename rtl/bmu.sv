// BMU: branch metric unit of the folded sub-trellis.
//
// Takes the three received soft symbols, the three generator polynomials,
// the eight-entry soft-decision cost table and the state identifier fields
// of the current iteration, and produces the 16 branch metrics BMETRIC[2*i+b]
// (ACS unit i, predecessor with least significant bit b). As in the source it
// is built from three parts: BMD (expected encoder outputs of each branch),
// DMETRIC (costs of the received symbols for expected 0 and 1) and BMETRIC
// (their sums). Purely combinational.
//
// Departure from the source's symbol: the present-state field PSA is not an
// input, because the branch's register contents follow from the next state
// and the predecessor's least significant bit; only PSY[0] is used.
//
// Because of that, bits 3..1 of the PSY input are unused; the port is kept
// so that the unit has the source's interface.
module bmu
  import viterbi_pkg::*;
(
  input  sym_t DEMODDATA [NSYM],
  input  gen_t Conv_Coder [NSYM],
  input  id_t  PSY,
  input  id_t  NSUY,
  input  id_t  NSDY,
  input  id_t  NSUA,
  input  id_t  NSDA,
  input  tbl_t BMUTABLE [1 << SYM_W],
  output bm_t  BMETRIC [2*NMEM]
);

  logic [NSYM-1:0] expected [2*NMEM];
  tbl_t            decoded_data [2*NSYM];

  bmu_bmd u_bmd (
    .Conv_Coder (Conv_Coder),
    .C0         (PSY[0]),
    .NSUY       (NSUY),
    .NSDY       (NSDY),
    .NSUA       (NSUA),
    .NSDA       (NSDA),
    .Expected   (expected)
  );

  bmu_dmetric u_dmetric (
    .DEMODDATA    (DEMODDATA),
    .BMUTABLE     (BMUTABLE),
    .DECODED_DATA (decoded_data)
  );

  bmu_bmetric u_bmetric (
    .Expected     (expected),
    .DECODED_DATA (decoded_data),
    .BMETRIC      (BMETRIC)
  );

endmodule
