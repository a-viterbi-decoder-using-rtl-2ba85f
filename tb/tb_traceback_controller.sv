// Testbench of the TRACEBACK CONTROLLER. A behavioural survivor memory in the
// testbench holds blocks of random survivor decisions, one bit per full state
// and step, packed into iteration words through the sub-trellis state
// arrangement. For a random start state the decoded bits must equal a plain
// full-state traceback: output the top state bit, then shift in the survivor
// bit of the state, from the block's last step to its first.
//
// Inputs change on the falling edge; the decoded bits are collected on the
// rising edges with TB_W_En. The iteration/unit arrangement is this design's.
module tb_traceback_controller;
  import viterbi_pkg::*;
  import tb_trellis_pkg::*;

  logic clk = 1'b0, reset, start, stop, ren, bit_o, bit_en;
  k_t k;
  state_t minp;
  logic [NMEM-1:0] rdata;
  addr_t ta;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  traceback_controller dut (.Clk(clk), .Reset(reset), .K(k), .Start_Traceback(start),
    .Stop_Traceback(stop), .Minimum_Path(minp), .R_Data(rdata), .R_En(ren), .T_Addr(ta),
    .TB_data(bit_o), .TB_W_En(bit_en));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit dec [DEPTH_MAX][1 << (S_W)];
  int kk, dd, rc;
  bit active;

  // behavioural survivor memory
  always @(posedge clk) begin
    if (reset) begin
      rc <= 0; stop <= 0; rdata <= '0;
    end else if (ren && active) begin
      for (int i = 0; i < NMEM; i++)
        rdata[i] <= dec[dd - 1 - rc][unit_next(kk, int'(ta), i)];
      if (rc == dd - 1) begin active = 0; stop <= 1; end
      rc <= rc + 1;
    end
  end
  assign start = active && rc == 0;

  bit got [$];
  always @(posedge clk) if (bit_en) got.push_back(bit_o);

  initial begin
    reset = 1; active = 0; k = 7; minp = '0;
    @(negedge clk); @(negedge clk); reset = 0;
    for (int n = 0; n < 120; n++) begin
      int unsigned s, mask;
      bit expd [$];
      kk = (n < 8) ? 4 + n % 4 : 4 + $urandom % 4;
      dd = 1 + $urandom % DEPTH_MAX;
      k = k_t'(kk);
      mask = smask(kk);
      expd.delete();
      for (int t = 0; t < dd; t++)
        for (int st = 0; st < (1 << (kk - 1)); st++) dec[t][st] = $urandom % 2;
      s = $urandom & mask;
      minp = state_t'(s);
      for (int t = dd - 1; t >= 0; t--) begin
        expd.push_back((s >> (kk - 2)) & 1);
        s = ((s << 1) | dec[t][s]) & mask;
      end
      got.delete();
      repeat ($urandom % 5) @(negedge clk);
      rc = 0; stop = 0; active = 1;
      while (got.size() < dd) @(negedge clk);
      repeat (4) @(negedge clk);
      checks++;
      if (got != expd) begin
        failures++;
        $display("K=%0d D=%0d: decoded bits differ from the reference traceback", kk, dd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
