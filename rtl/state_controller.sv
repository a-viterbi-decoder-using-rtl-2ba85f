// STATE CONTROLLER: combinational state decoder of the folded trellis.
//
// For constraint length K and iteration counter C it gives the identifier
// fields (state bits [K-2:2], K-3 bits wide) of the states the sub-trellis
// handles in this iteration:
//   PSY  = C                         present states of memories A..D
//   PSA  = ~C                        present states of memories E..H
//   NSUY = C >> 1                    next states reached with input 0 (upper)
//   NSDY = 2^(K-4) + (C >> 1)        next states reached with input 1 (upper)
//   NSUA = ~NSUY                     complemented next states (input 1)
//   NSDA = ~NSDY                     complemented next states (input 0)
// where ~ complements the K-3 meaningful bits. The two low state bits are
// fixed by the memory position, so they are not part of the fields.
//
// The formulas reproduce the state controller simulation of the source for
// K = 4..7; its printed truth table differs in the complemented columns and
// is not followed (the simulation agrees with the source's state table and
// with its minimum-path conversion table).
module state_controller
  import viterbi_pkg::*;
(
  input  k_t   K,
  input  cnt_t C,
  output id_t  PSY,
  output id_t  PSA,
  output id_t  NSUY,
  output id_t  NSDY,
  output id_t  NSUA,
  output id_t  NSDA
);

  id_t mask, c_id, half;

  always_comb begin
    mask = id_mask(K);
    c_id = id_t'(C) & mask;
    half = id_t'(iterations(K));          // 2^(K-4): top meaningful field bit
    PSY  = c_id;
    PSA  = ~c_id & mask;
    NSUY = c_id >> 1;
    NSDY = half | (c_id >> 1);
    NSUA = ~NSUY & mask;
    NSDA = ~NSDY & mask;
  end

endmodule
