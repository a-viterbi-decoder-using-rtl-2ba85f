// Testbench of the SURVIVOR MEMORY. A random writer offers survivor words
// (one per iteration, 2^(K-4) per step) and a random reader traces complete
// blocks back, reading the steps last-first at random iterations. A model
// keeps the words of every block; each read must return the word written for
// that step and iteration. Full must stall the writer exactly while the next
// slot to write still holds an unread step of the block under traceback,
// Start_Traceback must mark a complete block not yet read and
// Stop_Traceback must follow its last read. Runs K = 4..7 and several depths.
//
// Inputs change on the falling edge; RData is checked one cycle after REn.
// The LIFO principle is the source's; the Full rule checked here is this
// design's slot bookkeeping.
module tb_survivor_memory;
  import viterbi_pkg::*;

  logic clk = 1'b0, reset, wen, ren, start, stop, full;
  k_t k;
  depth_t depth;
  logic [NMEM-1:0] wd, rd;
  addr_t ta;
  int checks = 0, failures = 0;
  int n_full = 0, n_overlap = 0, n_blocks = 0;

  always #5 clk = ~clk;

  survivor_memory dut (.Clk(clk), .Reset(reset), .K(k), .TracebackDepth(depth), .WData(wd),
    .WEn(wen), .REn(ren), .T_Addr(ta), .RData(rd), .Start_Traceback(start),
    .Stop_Traceback(stop), .Full(full));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NMEM-1:0] wblk [DEPTH_MAX][ITER_MAX];   // block being written
  logic [NMEM-1:0] rblk [DEPTH_MAX][ITER_MAX];   // block being traced back
  int  wstep, witer, rcount;
  bit  ractive, rdone;
  logic [NMEM-1:0] exp_rd;
  bit  check_rd;

  task automatic run(input int kk, input int dd, input int cycles);
    int iters = 1 << (kk - 4);
    k = k_t'(kk); depth = depth_t'(dd);
    reset = 1; wen = 0; ren = 0;
    @(negedge clk); reset = 0;
    wstep = 0; witer = 0; rcount = 0; ractive = 0; rdone = 0; check_rd = 0;
    for (int n = 0; n < cycles; n++) begin
      bit e_full;
      e_full = ractive && (wstep >= rcount);
      checks++;
      if (full !== e_full || start !== (ractive && rcount == 0) || stop !== rdone) begin
        failures++;
        $display("%0t K=%0d D=%0d: full=%b start=%b stop=%b expected %b %b %b", $time, kk, dd,
                 full, start, stop, e_full, ractive && rcount == 0, rdone);
      end
      if (check_rd) begin
        checks++;
        if (rd !== exp_rd) begin
          failures++;
          $display("%0t K=%0d D=%0d: read %h expected %h", $time, kk, dd, rd, exp_rd);
        end
      end
      if (e_full) n_full++;
      wen = ($urandom % 100) < 70;
      ren = ractive && (($urandom % 100) < 40);
      wd  = NMEM'($urandom);
      ta  = addr_t'($urandom % iters);
      @(posedge clk);
      check_rd = 0;
      if (ren) begin
        exp_rd = rblk[dd - 1 - rcount][ta];
        check_rd = 1;
        rcount++;
        if (wen && !e_full) n_overlap++;
        if (rcount == dd) begin ractive = 0; rdone = 1; end
      end
      if (wen && !e_full) begin
        wblk[wstep][witer] = wd;
        if (witer == iters - 1) begin
          witer = 0;
          if (wstep == dd - 1) begin
            wstep = 0; rblk = wblk; ractive = 1; rcount = 0; rdone = 0; n_blocks++;
          end else wstep++;
        end else witer++;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    run(4, 7, 600);
    run(5, 16, 1500);
    run(6, 11, 1500);
    run(7, 15, 3000);
    run(7, 1, 300);
    run(4, 2, 300);
    for (int n = 0; n < 6; n++) run(4 + $urandom % 4, 1 + $urandom % DEPTH_MAX, 1500);
    checks++;
    if (n_full == 0 || n_overlap == 0 || n_blocks < 10) begin
      failures++;
      $display("coverage: full=%0d overlap=%0d blocks=%0d", n_full, n_overlap, n_blocks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
