// Testbench of the MAIN CONTROLLER. With random Empty and Full it checks,
// every cycle, against a model of the step sequence: Initial once after
// reset, a FIFO read only when not Empty, one write (Iteration_W_En and W_En
// together) per iteration C = 0..2^(K-4)-1 and only when not Full, then one
// End_Trellis. Without stalls a step must take exactly 2^(K-4)+2 cycles.
//
// Inputs change on the falling edge. The sequence is the source's; the
// separate End_Trellis cycle is this design's choice.
module tb_main_controller;
  import viterbi_pkg::*;

  logic clk = 1'b0, reset, full, empty;
  k_t k;
  logic ren, wen, iwen, init, et;
  cnt_t c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  main_controller dut (.Clk(clk), .Reset(reset), .K(k), .Full(full), .Empty(empty),
    .Input_Fifo_R_En(ren), .W_En(wen), .Iteration_W_En(iwen), .C(c), .Initial(init),
    .End_Trellis(et));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model phase: 0 initial, 1 wait for symbols, 2 iterations, 3 end of step
  int phase, it;

  task automatic expect_cycle();
    logic e_init, e_ren, e_wen, e_et;
    e_init = (phase == 0);
    e_ren  = (phase == 1) && !empty;
    e_wen  = (phase == 2) && !full;
    e_et   = (phase == 3);
    checks++;
    if (init !== e_init || ren !== e_ren || wen !== e_wen || iwen !== e_wen || et !== e_et ||
        (phase == 2 && c !== cnt_t'(it))) begin
      failures++;
      $display("%0t phase %0d: init=%b ren=%b wen=%b iwen=%b et=%b C=%0d (it %0d)", $time,
               phase, init, ren, wen, iwen, et, c, it);
    end
    // advance the model at the clock edge
    case (phase)
      0: phase = 1;
      1: if (!empty) begin phase = 2; it = 0; end
      2: if (!full) begin
           if (it == (1 << (int'(k) - 4)) - 1) phase = 3;
           else it++;
         end
      default: phase = 1;
    endcase
  endtask

  initial begin
    int steps, cyc;
    reset = 1; full = 0; empty = 1; k = 4;
    for (int kk = 4; kk <= 7; kk++) begin
      k = k_t'(kk);
      reset = 1; phase = 0; it = 0;
      @(negedge clk); reset = 0;
      // random stalls
      for (int n = 0; n < 1500; n++) begin
        empty = ($urandom % 3) == 0;
        full  = ($urandom % 4) == 0;
        #1;
        expect_cycle();
        @(negedge clk);
      end
      // no stalls: measure the step period
      empty = 0; full = 0;
      while (!ren) begin #1; expect_cycle(); @(negedge clk); end
      steps = 0; cyc = 0;
      while (steps < 4) begin
        #1; expect_cycle();
        @(negedge clk); cyc++;
        if (ren) begin
          steps++;
          checks++;
          if (cyc != (1 << (kk - 4)) + 2) begin
            failures++;
            $display("K=%0d: step took %0d cycles", kk, cyc);
          end
          cyc = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
