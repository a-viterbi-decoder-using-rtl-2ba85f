// Reference helpers for the K=3 decoder testbenches: the encoder, the
// branch metrics and a behavioural Viterbi decoder over one block.
//
// Conventions (same as the design): state = the two previous inputs, newest
// in bit 1; input u moves state s to {u, s[1]}; expected output bits are
// {parity(window & G0), parity(window & G1)} with window {u, s}. Soft
// levels: 3 = strongest 1, 0 = strongest 0; costs 19/60/113/160 from the
// source's table. Ties: predecessor 1 in the ACS, lowest state in the best
// state search. No timing: plain functions.
package tb_k3_pkg;

  function automatic logic [1:0] enc(input logic [1:0] s, input logic u,
                                     input logic [2:0] g0 = 3'b111, input logic [2:0] g1 = 3'b101);
    logic [2:0] w;
    w = {u, s};
    return {^(w & g0), ^(w & g1)};
  endfunction

  function automatic int unsigned cost(input int unsigned lvl, input bit b);
    int unsigned tbl [4] = '{19, 60, 113, 160};
    return tbl[b ? 3 - lvl : lvl];
  endfunction

  // Branch metric of received data d against expected output e.
  function automatic int unsigned bmetric(input bit is_soft, input logic [3:0] d, input logic [1:0] e);
    if (is_soft) return cost(d[3:2], e[1]) + cost(d[1:0], e[0]);
    return int'(d[1] ^ e[1]) + int'(d[0] ^ e[0]);
  endfunction

  // Decodes n pairs (n <= 8) from the all-zero state; returns decoded bits.
  function automatic logic [7:0] decode(input bit is_soft, input logic [3:0] rx [8], input int n,
                                        input int unsigned pm_w);
    int unsigned pm [4], nm [4], sat, big;
    logic [1:0] surv [8][4];
    logic [1:0] s;
    logic [7:0] out;
    int best;
    sat = (1 << pm_w) - 1;
    big = 1 << (pm_w - 1);
    pm = '{0, big, big, big};
    for (int t = 0; t < n; t++) begin
      for (int ns = 0; ns < 4; ns++) begin
        int unsigned m0, m1;
        int p0;
        p0 = (2 * ns) % 4;
        m0 = pm[p0] + bmetric(is_soft, rx[t], enc(2'(p0), ns[1]));
        m1 = pm[p0 + 1] + bmetric(is_soft, rx[t], enc(2'(p0 + 1), ns[1]));
        if (m0 > sat) m0 = sat;
        if (m1 > sat) m1 = sat;
        surv[t][ns] = (m1 <= m0) ? 2'd1 : 2'd0;
        nm[ns] = (m1 <= m0) ? m1 : m0;
      end
      pm = nm;
    end
    best = 0;
    for (int i = 1; i < 4; i++) if (pm[i] < pm[best]) best = i;
    s = 2'(best);
    out = '0;
    for (int t = n - 1; t >= 0; t--) begin
      out[t] = s[1];
      s = {s[0], surv[t][s][0]};
    end
    return out;
  endfunction

endpackage
