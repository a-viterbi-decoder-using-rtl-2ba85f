// Testbench of the BMU. For random K, iteration, generators, cost table and
// received symbols it drives the state identifier fields of the iteration
// and compares all 16 branch metrics with a model that encodes each branch
// from its full predecessor state and input bit and sums the table costs.
//
// Purely combinational; outputs are checked 1 time unit after the inputs
// change. The DMETRIC equations are the source's; the generator bit order
// is this design's choice.
module tb_bmu;
  import viterbi_pkg::*;
  import tb_trellis_pkg::*;

  sym_t dem [NSYM];
  gen_t g [NSYM];
  id_t  psy, nsuy, nsdy, nsua, nsda;
  tbl_t tbl [1 << SYM_W];
  bm_t  bm [2*NMEM];
  int checks = 0, failures = 0;

  bmu dut (.DEMODDATA(dem), .Conv_Coder(g), .PSY(psy), .NSUY(nsuy), .NSDY(nsdy),
           .NSUA(nsua), .NSDA(nsda), .BMUTABLE(tbl), .BMETRIC(bm));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int k, c;
      k = 4 + ($urandom % 4);
      c = $urandom % (1 << (k - 4));
      for (int r = 0; r < NSYM; r++) begin
        dem[r] = sym_t'($urandom);
        g[r]   = gen_t'($urandom & ((1 << k) - 1));
      end
      if (n % 3 == 0) g[2] = '0;          // rate 1/2
      foreach (tbl[v]) tbl[v] = tbl_t'($urandom);
      psy  = id_t'(c);
      nsuy = id_t'(unit_next(k, c, 0) >> 2);
      nsdy = id_t'(unit_next(k, c, 1) >> 2);
      nsua = id_t'(unit_next(k, c, 4) >> 2);
      nsda = id_t'(unit_next(k, c, 5) >> 2);
      #1;
      for (int i = 0; i < NMEM; i++) begin
        for (int b = 0; b < 2; b++) begin
          int unsigned win, cost;
          win  = (unit_input(i) << (k - 1)) | unit_pred(k, c, i, b);
          cost = 0;
          for (int r = 0; r < NSYM; r++)
            cost += parity(win & g[r]) ? tbl[dem[r]] : tbl[~dem[r] & 7];
          checks++;
          if (bm[2*i+b] !== bm_t'(cost)) begin
            failures++;
            $display("K=%0d c=%0d unit %0d b=%0d: got %0d expected %0d", k, c, i, b, bm[2*i+b], cost);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
