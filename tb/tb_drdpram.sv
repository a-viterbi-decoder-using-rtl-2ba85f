// Testbench of DRDPRAM: two instances (the zero-state memory and an ordinary
// one) under random writes, End_Trellis copies and Initial pulses, compared
// every cycle with a model of the O-RAM/I-RAM pair: asynchronous read at a
// random address, the smallest O-RAM value and its (lowest) address.
//
// Inputs change on the falling edge. The O-RAM/I-RAM behaviour follows the
// source; the start value and the tie rule are this design's choices.
module tb_drdpram;
  import viterbi_pkg::*;

  logic clk = 1'b0, reset, init, we, et;
  pm_t wd;
  addr_t wa, ra;
  pm_t rd [2], md [2];
  addr_t ma [2];
  int checks = 0, failures = 0;
  int n_et = 0;

  always #5 clk = ~clk;

  drdpram #(.ZERO_STATE(1'b1)) dut0 (.Clk(clk), .Reset(reset), .Initial(init), .W_Data(wd),
    .W_Addr(wa), .W_En(we), .R_Addr(ra), .End_Trellis(et), .R_Data(rd[0]), .M_Data(md[0]), .M_Addr(ma[0]));
  drdpram #(.ZERO_STATE(1'b0)) dut1 (.Clk(clk), .Reset(reset), .Initial(init), .W_Data(wd),
    .W_Addr(wa), .W_En(we), .R_Addr(ra), .End_Trellis(et), .R_Data(rd[1]), .M_Data(md[1]), .M_Addr(ma[1]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pm_t o [2][ITER_MAX], in_r [2][ITER_MAX];

  task automatic load();
    for (int u = 0; u < 2; u++)
      for (int a = 0; a < ITER_MAX; a++) begin
        o[u][a] = (u == 0 && a == 0) ? pm_t'(0) : PM_LARGE;
        in_r[u][a] = PM_LARGE;
      end
  endtask

  initial begin
    reset = 1; init = 0; we = 0; et = 0; wd = 0; wa = 0; ra = 0;
    load();
    @(negedge clk); reset = 0;
    for (int n = 0; n < 4000; n++) begin
      // compare outputs
      for (int u = 0; u < 2; u++) begin
        pm_t best; int ba;
        best = o[u][0]; ba = 0;
        for (int a = 1; a < ITER_MAX; a++) if (o[u][a] < best) begin best = o[u][a]; ba = a; end
        checks++;
        if (rd[u] !== o[u][ra] || md[u] !== best || ma[u] !== addr_t'(ba)) begin
          failures++;
          $display("%0t unit %0d: R=%0d M=%0d@%0d expected %0d %0d@%0d", $time, u,
                   rd[u], md[u], ma[u], o[u][ra], best, ba);
        end
      end
      init = ($urandom % 200) == 0;
      we   = $urandom % 2;
      et   = ($urandom % 6) == 0;
      wd   = (n % 2) ? pm_t'($urandom % 8) : pm_t'($urandom);
      wa   = addr_t'($urandom);
      ra   = addr_t'($urandom);
      @(posedge clk);
      if (init) load();
      else begin
        if (et) begin
          n_et++;
          for (int u = 0; u < 2; u++) o[u] = in_r[u];
        end
        if (we) for (int u = 0; u < 2; u++) in_r[u][wa] = wd;
      end
      @(negedge clk);
    end
    checks++; if (n_et == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
