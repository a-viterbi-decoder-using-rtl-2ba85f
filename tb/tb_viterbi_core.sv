// Testbench of the VITERBI CORE. Writes encoded symbol groups straight into
// the core's FIFO port at random moments (honouring Fifo_Full), for K = 4..7,
// rates 1/2 and 1/3 and random traceback depths. Symbols are noiseless but of
// random confidence (levels 5..7 for a 1, 0..2 for a 0), so the decoded
// blocks must reproduce the message, each block last bit first.
//
// Inputs change on the falling edge. The generator polynomials of the first
// four are those of the source's simulations; the third polynomials and the
// random traffic are this testbench's own.
module tb_viterbi_core;
  import viterbi_pkg::*;

  logic clk = 1'b0, reset, wen, full, tbd, tben;
  k_t k;
  depth_t depth;
  gen_t gen [NSYM];
  tbl_t tbl [1 << SYM_W];
  logic [NSYM*SYM_W-1:0] wd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  viterbi_core dut (.Clk(clk), .Reset(reset), .K(k), .TracebackDepth(depth), .Conv_Coder(gen),
    .BMUTABLE(tbl), .W_Data(wd), .W_En(wen), .Fifo_Full(full), .TB_data(tbd), .TB_W_En(tben));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit got [$];
  always @(posedge clk) if (tben) got.push_back(tbd);

  function automatic int unsigned parity(input int unsigned x);
    int unsigned p = 0;
    for (int j = 0; j < 32; j++) p ^= (x >> j) & 1;
    return p;
  endfunction

  // generator polynomials per K (two for rate 1/2, a third for rate 1/3)
  task automatic set_gen(input int kk, input bit r3);
    case (kk)
      4:       begin gen[0] = 7'b0001101; gen[1] = 7'b0001111; gen[2] = 7'b0001011; end
      5:       begin gen[0] = 7'b0011011; gen[1] = 7'b0011111; gen[2] = 7'b0010101; end
      6:       begin gen[0] = 7'b0110011; gen[1] = 7'b0111111; gen[2] = 7'b0111011; end
      default: begin gen[0] = 7'b1101011; gen[1] = 7'b1110001; gen[2] = 7'b1011011; end
    endcase
    if (!r3) gen[2] = '0;
  endtask

  initial begin
    localparam int TV [8] = '{160, 135, 113, 85, 60, 40, 25, 19};
    foreach (tbl[v]) tbl[v] = tbl_t'(TV[v]);
    wen = 0; wd = '0; reset = 1;
    for (int n = 0; n < 16; n++) begin
      int kk, d, nblk, nsteps;
      bit r3;
      bit msg [$], expd [$];
      int unsigned regv;
      kk = 4 + n % 4;
      r3 = (n / 4) % 2;
      d  = 1 + $urandom % DEPTH_MAX;
      nblk = 1 + $urandom % 4;
      nsteps = nblk * d;
      k = k_t'(kk); depth = depth_t'(d);
      set_gen(kk, r3);
      reset = 1; repeat (2) @(negedge clk); reset = 0;
      got.delete(); msg.delete(); expd.delete();
      for (int t = 0; t < nsteps; t++) msg.push_back($urandom % 2);
      for (int b = 0; b < nblk; b++)
        for (int i = d - 1; i >= 0; i--) expd.push_back(msg[b*d + i]);
      regv = 0;
      for (int t = 0; t < nsteps; t++) begin
        automatic int unsigned win = (msg[t] << (kk - 1)) | regv;
        automatic logic [NSYM*SYM_W-1:0] grp = '0;
        for (int r = 0; r < NSYM; r++) begin
          automatic int unsigned lvl = parity(win & gen[r]) ? 5 + $urandom % 3 : $urandom % 3;
          if (r == 2 && !r3) lvl = 0;
          grp[r*SYM_W +: SYM_W] = SYM_W'(lvl);
        end
        regv = win >> 1;
        repeat ($urandom % 4) @(negedge clk);
        while (full) @(negedge clk);
        wen = 1; wd = grp;
        @(negedge clk);
        wen = 0;
      end
      for (int w = 0; w < 4000 && got.size() < expd.size(); w++) @(negedge clk);
      repeat (10) @(negedge clk);
      checks++;
      if (got != expd) begin
        failures++;
        $display("K=%0d D=%0d rate 1/%0d: %0d bits decoded, %0d expected or bits differ",
                 kk, d, r3 ? 3 : 2, got.size(), expd.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
