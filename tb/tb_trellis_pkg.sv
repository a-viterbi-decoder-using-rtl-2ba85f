// Reference helpers shared by the testbenches: the folded trellis written out
// in terms of full state identifiers.
//
// In iteration c of a trellis step with K-1 state bits, memory m holds the
// present state {c, m[1:0]} (m < 4) or its complement (m >= 4). ACS unit i
// combines the two states of one butterfly, (A,B), (C,D), (F,E) or (H,G), and
// the input bit of its branches is 0 for units 0, 2, 5, 7 and 1 for units
// 1, 3, 4, 6. The next state of a branch is {input, predecessor >> 1}.
//
// The arrangement is the one the source's state table shows; the unit
// numbering is this design's.
package tb_trellis_pkg;

  function automatic int unsigned smask(input int k);
    return (1 << (k - 1)) - 1;
  endfunction

  function automatic int unsigned mem_state(input int k, input int c, input int m);
    int unsigned s = (c << 2) | (m & 3);
    return (m >= 4) ? (~s & smask(k)) : s;
  endfunction

  function automatic int unsigned unit_input(input int i);
    return (i == 1 || i == 3 || i == 4 || i == 6) ? 1 : 0;
  endfunction

  // predecessor of unit i whose least significant bit is b
  function automatic int unsigned unit_pred(input int k, input int c, input int i, input int b);
    int m0, m1;
    case (i / 2)
      0: begin m0 = 0; m1 = 1; end
      1: begin m0 = 2; m1 = 3; end
      2: begin m0 = 5; m1 = 4; end
      default: begin m0 = 7; m1 = 6; end
    endcase
    return mem_state(k, c, b ? m1 : m0);
  endfunction

  function automatic int unsigned unit_next(input int k, input int c, input int i);
    return (unit_input(i) << (k - 2)) | (unit_pred(k, c, i, 0) >> 1);
  endfunction

  function automatic int unsigned parity(input int unsigned x);
    int unsigned p = 0;
    for (int j = 0; j < 32; j++) p ^= (x >> j) & 1;
    return p;
  endfunction

endpackage
