// Testbench of the K=3 BMU: the source's hard-decision BMU simulation rows
// (all 16 received/expected pairs), the source's soft example (1.5 V and
// -0.5 V give 220 for expected 00 and 132 for 11), and random received data
// against the reference model for both modes.
//
// Combinational; checked 1 time unit after each input change. The level
// coding of soft symbols is this design's choice.
module tb_k3_bmu;
  import tb_k3_pkg::*;
  logic [1:0] hd;
  logic [3:0] sd;
  logic [1:0] hbm [4];
  logic [8:0] sbm [4];
  int checks = 0, failures = 0;

  k3_bmu #(.SOFT(1'b0)) hdut (.Demod_Data(hd), .BranchMetric(hbm));
  k3_bmu #(.SOFT(1'b1)) sdut (.Demod_Data(sd), .BranchMetric(sbm));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Hamming distance rows of the source: [received][expected].
  localparam int unsigned HROWS [4][4] = '{'{0, 1, 1, 2}, '{1, 0, 2, 1}, '{1, 2, 0, 1}, '{2, 1, 1, 0}};

  initial begin
    for (int d = 0; d < 4; d++) begin
      hd = 2'(d);
      #1;
      for (int e = 0; e < 4; e++) begin
        checks++;
        if (hbm[e] != 2'(HROWS[d][e])) begin
          failures++;
          $display("hard d=%0d e=%0d got %0d", d, e, hbm[e]);
        end
      end
    end
    sd = {2'd3, 2'd1};
    #1;
    checks += 2;
    if (sbm[0] != 9'd220 || sbm[3] != 9'd132) begin
      failures++;
      $display("soft example got %0d %0d", sbm[0], sbm[3]);
    end
    repeat (500) begin
      sd = 4'($urandom);
      hd = 2'($urandom);
      #1;
      for (int e = 0; e < 4; e++) begin
        checks += 2;
        if (sbm[e] != 9'(bmetric(1'b1, sd, 2'(e)))) begin
          failures++;
          $display("soft d=%h e=%0d got %0d", sd, e, sbm[e]);
        end
        if (hbm[e] != 2'(bmetric(1'b0, {2'b0, hd}, 2'(e)))) begin
          failures++;
          $display("hard d=%h e=%0d got %0d", hd, e, hbm[e]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
