// Testbench of the K=3 ACSDPRAM (hard and soft instances).
//
// First the source's hard-decision ACSDPRAM simulation: received pairs
// 01, 00, 01, 00, 00, 01 from the all-zero start must give the path metrics
// printed there after every write (columns 00, 10, 01, 11). Then random
// blocks of 8 pairs for both modes against a behavioural trellis with the
// same tie rule, checking every metric after every write and the survivor
// registers at the end of each block.
//
// Inputs change after the falling edge with a W_En pulse; outputs are
// checked after the next rising edge.
module tb_k3_acsdpram;
  import tb_k3_pkg::*;
  logic        clk = 0, rst = 1, we;
  logic [1:0]  hd;
  logic [3:0]  sd;
  logic [2:0]  inst;
  logic [4:0]  hpm [4];
  logic [13:0] spm [4];
  logic [7:0]  hrp [4], srp [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  k3_acsdpram #(.SOFT(1'b0)) hdut (.Clk(clk), .Reset(rst), .Demod_Data(hd), .PresentInstant(inst), .W_En(we),
                                   .Read_Data(hpm), .RAMPath(hrp));
  k3_acsdpram #(.SOFT(1'b1)) sdut (.Clk(clk), .Reset(rst), .Demod_Data(sd), .PresentInstant(inst), .W_En(we),
                                   .Read_Data(spm), .RAMPath(srp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Source rows: received pair and metrics of states 00, 10, 01, 11.
  localparam int unsigned SRC [6][5] = '{
    '{1, 1, 1, 16, 16}, '{0, 1, 3, 2, 2}, '{1, 2, 2, 2, 3},
    '{0, 2, 2, 3, 3}, '{0, 2, 3, 3, 3}, '{1, 3, 3, 3, 3}
  };

  // Behavioural trellis state.
  int unsigned mh [4], ms [4];
  logic [7:0]  ph [4], ps [4];

  task automatic model_step(input bit is_soft, input logic [3:0] d, input int t,
                            ref int unsigned m [4], ref logic [7:0] p [4], input int unsigned pm_w);
    int unsigned nm [4], sat, big;
    sat = (1 << pm_w) - 1;
    big = 1 << (pm_w - 1);
    if (t == 0) m = '{0, big, big, big};
    for (int ns = 0; ns < 4; ns++) begin
      int unsigned m0, m1;
      int p0;
      p0 = (2 * ns) % 4;
      m0 = m[p0] + bmetric(is_soft, d, enc(2'(p0), ns[1]));
      m1 = m[p0 + 1] + bmetric(is_soft, d, enc(2'(p0 + 1), ns[1]));
      if (m0 > sat) m0 = sat;
      if (m1 > sat) m1 = sat;
      p[ns][t] = (m1 <= m0);
      nm[ns] = (m1 <= m0) ? m1 : m0;
    end
    m = nm;
  endtask

  initial begin
    we = 0; hd = 0; sd = 0; inst = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    foreach (SRC[r]) begin
      @(negedge clk);
      hd = 2'(SRC[r][0]); inst = 3'(r); we = 1;
      @(negedge clk);
      we = 0;
      checks++;
      if (hpm[0] != 5'(SRC[r][1]) || hpm[2] != 5'(SRC[r][2]) || hpm[1] != 5'(SRC[r][3]) ||
          hpm[3] != 5'(SRC[r][4])) begin
        failures++;
        $display("source row %0d: %0d %0d %0d %0d", r, hpm[0], hpm[2], hpm[1], hpm[3]);
      end
    end
    repeat (300) begin
      for (int t = 0; t < 8; t++) begin
        @(negedge clk);
        hd = 2'($urandom); sd = 4'($urandom); inst = 3'(t); we = 1;
        model_step(1'b0, {2'b0, hd}, t, mh, ph, 5);
        model_step(1'b1, sd, t, ms, ps, 14);
        @(negedge clk);
        we = 0;
        // An idle cycle must change nothing.
        if ($urandom_range(0, 3) == 0) @(negedge clk);
        for (int s = 0; s < 4; s++) begin
          checks += 2;
          if (hpm[s] != 5'(mh[s])) begin failures++; $display("hard t=%0d s=%0d %0d/%0d", t, s, hpm[s], mh[s]); end
          if (spm[s] != 14'(ms[s])) begin failures++; $display("soft t=%0d s=%0d %0d/%0d", t, s, spm[s], ms[s]); end
        end
      end
      for (int s = 0; s < 4; s++) begin
        checks += 2;
        if (hrp[s] != ph[s]) begin failures++; $display("hard path s=%0d %b/%b", s, hrp[s], ph[s]); end
        if (srp[s] != ps[s]) begin failures++; $display("soft path s=%0d %b/%b", s, srp[s], ps[s]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
