// Testbench of the K=3 ACS unit: the rows of the source's ACS simulation
// (including its tie row, where ProbablePath is 1), then random metrics near
// and away from the saturation limit against a model:
// PathMetric = min(SM0+BM0, SM1+BM1) saturated, ProbablePath = 1 when the
// second sum is smaller or equal.
//
// Combinational; checked 1 time unit after each input change, for the hard
// widths (5/2) and soft widths (14/9). Table rows are the source's;
// saturation is this design's choice.
module tb_k3_acs;
  logic [4:0]  sm0, sm1, pm;
  logic [1:0]  bm0, bm1;
  logic        pp;
  logic [13:0] ssm0, ssm1, spm;
  logic [8:0]  sbm0, sbm1;
  logic        spp;
  int checks = 0, failures = 0;

  k3_acs #(.PM_W(5), .BM_W(2)) dut (.StateMetric0(sm0), .BranchMetric0(bm0), .StateMetric1(sm1),
                                    .BranchMetric1(bm1), .PathMetric(pm), .ProbablePath(pp));
  k3_acs #(.PM_W(14), .BM_W(9)) sdut (.StateMetric0(ssm0), .BranchMetric0(sbm0), .StateMetric1(ssm1),
                                      .BranchMetric1(sbm1), .PathMetric(spm), .ProbablePath(spp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned ROWS [6][6] = '{
    '{0, 0, 0, 0, 0, 1}, '{3, 1, 4, 2, 4, 0}, '{12, 2, 11, 1, 12, 1},
    '{15, 1, 14, 0, 14, 1}, '{14, 0, 15, 2, 14, 0}, '{24, 0, 25, 1, 24, 0}
  };

  function automatic int unsigned smin(int unsigned a, int unsigned b, int unsigned mx);
    if (a > mx) a = mx;
    if (b > mx) b = mx;
    return (b <= a) ? b : a;
  endfunction

  initial begin
    foreach (ROWS[r]) begin
      sm0 = 5'(ROWS[r][0]); bm0 = 2'(ROWS[r][1]); sm1 = 5'(ROWS[r][2]); bm1 = 2'(ROWS[r][3]);
      #1;
      checks++;
      if (pm != 5'(ROWS[r][4]) || pp != ROWS[r][5][0]) begin
        failures++;
        $display("row %0d: got %0d/%0d", r, pm, pp);
      end
    end
    repeat (3000) begin
      sm0 = 5'($urandom); sm1 = 5'($urandom); bm0 = 2'($urandom); bm1 = 2'($urandom);
      ssm0 = 14'($urandom); ssm1 = ($urandom_range(0, 3) == 0) ? ssm0 : 14'($urandom);
      sbm0 = 9'($urandom); sbm1 = 9'($urandom);
      if ($urandom_range(0, 3) == 0) begin ssm0 = 14'h3f80 | 14'($urandom_range(0, 127)); end
      #1;
      checks += 2;
      if (pm != 5'(smin(sm0 + bm0, sm1 + bm1, 31)) || pp != (smin(sm1 + bm1, 99, 31) <= smin(sm0 + bm0, 99, 31))) begin
        failures++;
        $display("hard %0d+%0d %0d+%0d -> %0d/%0d", sm0, bm0, sm1, bm1, pm, pp);
      end
      if (spm != 14'(smin(ssm0 + sbm0, ssm1 + sbm1, 16383)) ||
          spp != (smin(ssm1 + sbm1, 99999, 16383) <= smin(ssm0 + sbm0, 99999, 16383))) begin
        failures++;
        $display("soft %0d+%0d %0d+%0d -> %0d/%0d", ssm0, sbm0, ssm1, sbm1, spm, spp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
