// Testbench of STATEMUX. Checks the two routings against the next-state
// orders of the source (Sel = 0: A,H,B,G,E,D,F,C; Sel = 1: C,F,D,E,G,B,H,A)
// and, for every K and iteration, that each ACS unit's next state is a state
// the receiving memory holds.
//
// Combinational; checked 1 time unit after each input change. The two
// orders are the source's; the Sel encoding is this design's choice.
module tb_statemux;
  import viterbi_pkg::*;
  import tb_trellis_pkg::*;

  pm_t  rin [NMEM], rout [NMEM];
  logic sel;
  int checks = 0, failures = 0;

  statemux dut (.RAMIN(rin), .Sel(sel), .RAMOUT(rout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory (A..H = 0..7) receiving unit i
  localparam int unsigned ORDER0 [NMEM] = '{0, 7, 1, 6, 4, 3, 5, 2};
  localparam int unsigned ORDER1 [NMEM] = '{2, 5, 3, 4, 6, 1, 7, 0};

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int s = 0; s < 2; s++) begin
        sel = s[0];
        foreach (rin[i]) rin[i] = pm_t'($urandom);
        #1;
        for (int i = 0; i < NMEM; i++) begin
          checks++;
          if (rout[s ? ORDER1[i] : ORDER0[i]] !== rin[i]) begin
            failures++;
            $display("Sel=%0d: unit %0d not routed to memory %0d", s, i, s ? ORDER1[i] : ORDER0[i]);
          end
        end
      end
    end
    // the routing matches the state arrangement of the memories
    for (int k = 4; k <= 7; k++) begin
      for (int c = 0; c < (1 << (k - 4)); c++) begin
        sel = c[0];
        for (int i = 0; i < NMEM; i++) rin[i] = pm_t'(i);
        #1;
        for (int m = 0; m < NMEM; m++) begin
          automatic bit found = 0;
          for (int a = 0; a < (1 << (k - 4)); a++)
            if (mem_state(k, a, m) == unit_next(k, c, int'(rout[m]))) found = 1;
          checks++;
          if (!found) begin
            failures++;
            $display("K=%0d c=%0d: memory %0d gets unit %0d", k, c, m, rout[m]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
