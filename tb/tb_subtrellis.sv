// Testbench of the SUB-TRELLIS. The testbench plays the controller: for each
// trellis step it runs the iterations c = 0..2^(K-4)-1 with random branch
// metrics, then pulses End_Trellis. A full-state model adds each branch
// metric to the metric of the predecessor state it names, keeps the smaller
// sum per next state (saturating) and records the decision. Every iteration's
// ProbablePat must equal the model's decisions for the eight next states the
// units produce, and after each step Min_Path must name a state whose model
// metric is the smallest.
//
// Inputs change on the falling edge; ProbablePat is checked combinationally
// before each write. The state arrangement is the source's, the saturation
// and tie rules are this design's.
module tb_subtrellis;
  import viterbi_pkg::*;
  import tb_trellis_pkg::*;

  logic clk = 1'b0, reset, wen, init, sel, et;
  k_t k;
  bm_t bm [2*NMEM];
  id_t psy;
  logic [NMEM-1:0] pp;
  state_t minp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  subtrellis dut (.Clk(clk), .Reset(reset), .K(k), .BMETRIC(bm), .W_En(wen), .Initial(init),
    .SEL(sel), .PSY(psy), .End_Trellis(et), .ProbablePat(pp), .Min_Path(minp));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned pm [1 << S_W], nx [1 << S_W];
  localparam longint unsigned LIM = (longint'(1) << $bits(pm_t)) - 1;

  task automatic check_min(input int kk);
    longint unsigned best = LIM + 1;
    for (int s = 0; s < (1 << (kk - 1)); s++) if (pm[s] < best) best = pm[s];
    checks++;
    if (pm[minp] != best) begin
      failures++;
      $display("K=%0d: Min_Path %0d has metric %0d, smallest is %0d", kk, minp, pm[minp], best);
    end
  endtask

  initial begin
    reset = 1; wen = 0; init = 0; sel = 0; et = 0; psy = '0; k = 4;
    foreach (bm[j]) bm[j] = '0;
    @(negedge clk); reset = 0;
    for (int run = 0; run < 12; run++) begin
      automatic int kk = 4 + run % 4;
      k = k_t'(kk);
      init = 1; @(negedge clk); init = 0;
      for (int s = 0; s < (1 << S_W); s++) pm[s] = (s == 0) ? 0 : longint'(PM_LARGE);
      check_min(kk);
      for (int step = 0; step < 40; step++) begin
        for (int c = 0; c < (1 << (kk - 4)); c++) begin
          psy = id_t'(c); sel = c[0];
          foreach (bm[j]) bm[j] = bm_t'((run >= 8) ? $urandom % 4 : $urandom % 64);
          #1;
          for (int i = 0; i < NMEM; i++) begin
            longint unsigned a, b;
            a = pm[unit_pred(kk, c, i, 0)] + bm[2*i];
            b = pm[unit_pred(kk, c, i, 1)] + bm[2*i+1];
            if (a > LIM) a = LIM;
            if (b > LIM) b = LIM;
            nx[unit_next(kk, c, i)] = (b < a) ? b : a;
            checks++;
            if (pp[i] !== (b < a)) begin
              failures++;
              $display("K=%0d step %0d c=%0d unit %0d: decision %b expected %b", kk, step, c, i, pp[i], b < a);
            end
          end
          wen = 1; @(negedge clk); wen = 0;
        end
        et = 1; @(negedge clk); et = 0;
        for (int s = 0; s < (1 << (kk - 1)); s++) pm[s] = nx[s];
        check_min(kk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
