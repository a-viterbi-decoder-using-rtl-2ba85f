// SUBTRELLIS: the fixed 8-state sub-trellis that the decoder reuses.
//
// Eight path-metric memories (DRDPRAM A..H), eight ACS units, the two-way
// path metric router (STATEMUX) and the minimum search (MIN_PATH,
// MIN_PATH_CONV). In iteration c (PSY = c) every memory is read at address c;
// memories A..D then supply present states {c,00}..{c,11} and E..H their
// complements. The four butterflies are (A,B), (C,D), (F,E), (H,G), with the
// memory whose state ends in 0 first. ACS units 0/1 take butterfly (A,B),
// 2/3 (C,D), 4/5 (F,E) and 6/7 (H,G); the even unit of each pair produces the
// next state of input 0 for A..D and of input 1 for E..H.
//
// The new metrics go through STATEMUX (Sel = SEL = c[0]) into the I-RAMs. The
// write address is c>>1 or 2^(K-4)-1-(c>>1): for even c memories A,B,E,F take
// the first and C,D,G,H the second, for odd c the other way round. On
// End_Trellis the memories move the new metrics to their O-RAM. ProbablePat[i]
// is the survivor bit of ACS unit i for this iteration (the least significant
// bit of the chosen predecessor). Min_Path is the identifier of the state with
// the smallest metric in the O-RAMs.
//
// Timing: ProbablePat and the next metrics are combinational from PSY,
// BMETRIC and the O-RAMs; metrics are written on a clock edge with W_En.
// The structure follows the source; the ACS-to-memory wiring is derived
// from its state table and next-state orders.
module subtrellis
  import viterbi_pkg::*;
(
  input  logic            Clk,
  input  logic            Reset,
  input  k_t              K,
  input  bm_t             BMETRIC [2*NMEM],
  input  logic            W_En,
  input  logic            Initial,
  input  logic            SEL,
  input  id_t             PSY,
  input  logic            End_Trellis,
  output logic [NMEM-1:0] ProbablePat,
  output state_t          Min_Path
);

  // memories feeding StateMetric0 / StateMetric1 of each ACS unit
  localparam int unsigned PRED0 [NMEM] = '{0, 0, 2, 2, 5, 5, 7, 7};
  localparam int unsigned PRED1 [NMEM] = '{1, 1, 3, 3, 4, 4, 6, 6};

  pm_t   r_data [NMEM];
  pm_t   m_data [NMEM];
  addr_t m_addr [NMEM];
  pm_t   acs_pm [NMEM];
  pm_t   w_data [NMEM];
  addr_t w_addr [NMEM];
  addr_t r_addr, addr_lo, addr_hi;
  logic [2:0] min_loc;
  addr_t      min_iter;

  always_comb begin
    r_addr  = addr_t'(PSY);
    addr_lo = addr_t'(PSY >> 1);
    addr_hi = addr_t'(iterations(K) - cnt_t'(1)) - addr_lo;
    for (int m = 0; m < NMEM; m++) begin
      // A,B,E,F are memories 0,1,4,5: bit 1 of the index is 0
      w_addr[m] = ((m & 2) == 0) ^ SEL ? addr_lo : addr_hi;
    end
  end

  for (genvar i = 0; i < NMEM; i++) begin : g_acs
    acs u_acs (
      .StateMetric0  (r_data[PRED0[i]]),
      .BranchMetric0 (BMETRIC[2*i]),
      .StateMetric1  (r_data[PRED1[i]]),
      .BranchMetric1 (BMETRIC[2*i+1]),
      .PathMetric    (acs_pm[i]),
      .ProbablePath  (ProbablePat[i])
    );
  end

  statemux u_statemux (
    .RAMIN  (acs_pm),
    .Sel    (SEL),
    .RAMOUT (w_data)
  );

  for (genvar m = 0; m < NMEM; m++) begin : g_mem
    drdpram #(.ZERO_STATE(m == 0)) u_drdpram (
      .Clk         (Clk),
      .Reset       (Reset),
      .Initial     (Initial),
      .W_Data      (w_data[m]),
      .W_Addr      (w_addr[m]),
      .W_En        (W_En),
      .R_Addr      (r_addr),
      .End_Trellis (End_Trellis),
      .R_Data      (r_data[m]),
      .M_Data      (m_data[m]),
      .M_Addr      (m_addr[m])
    );
  end

  min_path u_min_path (
    .RAMmemdata (m_data),
    .RAMmemaddr (m_addr),
    .M_Addr     (min_loc),
    .M_Addr_Ram (min_iter)
  );

  min_path_conv u_min_path_conv (
    .K           (K),
    .M_Location  (min_loc),
    .M_Iteration (min_iter),
    .Min_Path    (Min_Path)
  );

endmodule
