// Testbench of the ACS unit: the rows of the source's ACS simulation, then
// random metrics (including values near the saturation limit) against a
// model: PathMetric = min(SM0+BM0, SM1+BM1) saturated to all ones, and
// ProbablePath = 1 only when the second sum is strictly smaller.
//
// Combinational; checked 1 time unit after each input change. The table
// rows are the source's; saturation is this design's choice.
module tb_acs;
  import viterbi_pkg::*;

  pm_t sm0, sm1, pm;
  bm_t bm0, bm1;
  logic pp;
  int checks = 0, failures = 0;

  acs dut (.StateMetric0(sm0), .BranchMetric0(bm0), .StateMetric1(sm1), .BranchMetric1(bm1),
           .PathMetric(pm), .ProbablePath(pp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned ROWS [6][6] = '{
    '{0, 0, 0, 0, 0, 0}, '{3, 1, 4, 2, 4, 0}, '{12, 2, 11, 1, 12, 1},
    '{15, 1, 14, 0, 14, 1}, '{14, 0, 15, 2, 14, 0}, '{24, 0, 25, 1, 24, 0}
  };

  task automatic check(input longint unsigned epm, input logic epp);
    #1;
    checks++;
    if (pm !== pm_t'(epm) || pp !== epp) begin
      failures++;
      $display("SM0=%0d BM0=%0d SM1=%0d BM1=%0d: got %0d/%b expected %0d/%b",
               sm0, bm0, sm1, bm1, pm, pp, epm, epp);
    end
  endtask

  initial begin
    longint unsigned a, b, lim;
    lim = (longint'(1) << $bits(pm_t)) - 1;
    for (int n = 0; n < 6; n++) begin
      sm0 = pm_t'(ROWS[n][0]); bm0 = bm_t'(ROWS[n][1]);
      sm1 = pm_t'(ROWS[n][2]); bm1 = bm_t'(ROWS[n][3]);
      check(ROWS[n][4], ROWS[n][5][0]);
    end
    for (int n = 0; n < 5000; n++) begin
      sm0 = pm_t'($urandom); sm1 = pm_t'($urandom);
      bm0 = bm_t'($urandom); bm1 = bm_t'($urandom);
      if (n % 4 == 1) sm1 = sm0;
      if (n % 4 == 2) begin sm0 = pm_t'(lim - ($urandom % 600)); sm1 = pm_t'(lim - ($urandom % 600)); end
      a = longint'(sm0) + longint'(bm0);
      b = longint'(sm1) + longint'(bm1);
      if (a > lim) a = lim;
      if (b > lim) b = lim;
      check((b < a) ? b : a, b < a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
