// STATEMUX: two-position path metric router.
//
// RAMIN[i] is the new path metric from ACS unit i; RAMOUT[m] goes to the
// write port of memory m (A..H = 0..7). Because of the complemented state
// arrangement only two routings exist, selected by Sel = iteration counter
// bit 0. They are the next-state orders the source gives:
//   Sel = 0: RAMIN 0..7 -> memories A,H,B,G,E,D,F,C
//   Sel = 1: RAMIN 0..7 -> memories C,F,D,E,G,B,H,A
// Purely combinational.
module statemux
  import viterbi_pkg::*;
(
  input  pm_t  RAMIN  [NMEM],
  input  logic Sel,
  output pm_t  RAMOUT [NMEM]
);

  // ACS unit whose metric goes to memory m, per Sel value
  localparam int unsigned SRC0 [NMEM] = '{0, 2, 7, 5, 4, 6, 3, 1};
  localparam int unsigned SRC1 [NMEM] = '{7, 5, 0, 2, 3, 1, 4, 6};

  always_comb begin
    for (int m = 0; m < NMEM; m++) begin
      RAMOUT[m] = Sel ? RAMIN[SRC1[m]] : RAMIN[SRC0[m]];
    end
  end

endmodule
