// MIN_PATH_CONV: memory location to state identifier.
//
// Memory M_Location (A..H = 0..7) holds at address M_Iteration the state
// {M_Iteration, M_Location[1:0]} when M_Location < 4 and the complement of
// that value over the K-1 meaningful bits when M_Location >= 4. The output
// Min_Path is that state identifier, the starting state of traceback. This
// reproduces the source's conversion table for K = 7 and extends it to
// K = 4..6 by the same rule. Purely combinational.
module min_path_conv
  import viterbi_pkg::*;
(
  input  k_t         K,
  input  logic [2:0] M_Location,
  input  addr_t      M_Iteration,
  output state_t     Min_Path
);

  state_t plain;

  always_comb begin
    plain    = state_t'({M_Iteration, M_Location[1:0]}) & state_mask(K);
    Min_Path = M_Location[2] ? (~plain & state_mask(K)) : plain;
  end

endmodule
