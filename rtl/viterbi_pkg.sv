// Shared constants and types of the reconfigurable Viterbi decoder.
//
// The decoder folds a trellis of up to 64 states (K = 7) onto one fixed
// 8-state sub-trellis that is reused for 2^(K-4) iterations per trellis step.
// The sub-trellis owns eight path-metric memories A..H (index 0..7). Memory
// j < 4 holds, at address c, the state {c, j[1:0]}; memory j >= 4 holds the
// bitwise complement (over the K-1 meaningful bits) of {c, j[1:0]}. With this
// complemented arrangement the read address of every memory equals the
// iteration counter c.
//
// Widths that the source leaves open (metric widths, table entry width,
// traceback depth, FIFO depth) are this design's own choices and are set here.
package viterbi_pkg;

  localparam int unsigned K_MAX      = 7;              // largest constraint length
  localparam int unsigned S_W        = K_MAX - 1;      // state identifier width (6)
  localparam int unsigned ID_W       = K_MAX - 3;      // state identifier field width, state[5:2]
  localparam int unsigned NMEM       = 8;              // memories / ACS units in the sub-trellis
  localparam int unsigned ITER_MAX   = 1 << (K_MAX - 4); // iterations per trellis step at K = 7
  localparam int unsigned ADDR_W     = K_MAX - 4;      // memory address / iteration counter width
  localparam int unsigned C_W        = ADDR_W + 1;     // iteration counter incl. end value
  localparam int unsigned SYM_W      = 3;              // soft-decision symbol width (8 levels)
  localparam int unsigned NSYM       = 3;              // symbols per group (rate 1/3 maximum)
  localparam int unsigned GEN_W      = K_MAX;          // generator polynomial width
  localparam int unsigned TBL_W      = 8;              // BMUTABLE entry width
  localparam int unsigned BM_W       = TBL_W + 2;      // branch metric width (sum of 3 entries)
  localparam int unsigned PM_W       = 16;             // path metric width
  localparam int unsigned DEPTH_MAX  = 16;             // largest traceback depth
  localparam int unsigned DEPTH_W    = $clog2(DEPTH_MAX + 1);
  localparam int unsigned FIFO_DEPTH = 16;             // input FIFO entries

  typedef logic [2:0]        k_t;      // constraint length, 4..7
  typedef logic [SYM_W-1:0]  sym_t;
  typedef logic [GEN_W-1:0]  gen_t;
  typedef logic [TBL_W-1:0]  tbl_t;
  typedef logic [BM_W-1:0]   bm_t;
  typedef logic [PM_W-1:0]   pm_t;
  typedef logic [S_W-1:0]    state_t;
  typedef logic [ID_W-1:0]   id_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [C_W-1:0]    cnt_t;
  typedef logic [DEPTH_W-1:0] depth_t;

  // Path metric loaded into every state except state 0 on initialisation:
  // only the most significant bit set, which makes those states improbable.
  localparam pm_t PM_LARGE = pm_t'(1) << (PM_W - 1);

  // Number of sub-trellis iterations in one trellis step: 2^(K-4).
  function automatic cnt_t iterations(input k_t k);
    return cnt_t'(1) << (k - 3'd4);
  endfunction

  // Mask of the K-1 meaningful state bits.
  function automatic state_t state_mask(input k_t k);
    return state_t'((7'd1 << (k - 3'd1)) - 7'd1);
  endfunction

  // Mask of the K-3 meaningful bits of an identifier field (state >> 2).
  function automatic id_t id_mask(input k_t k);
    return id_t'((5'd1 << (k - 3'd3)) - 5'd1);
  endfunction

endpackage
