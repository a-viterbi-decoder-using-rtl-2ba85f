// Testbench of the input FIFO: random writes and reads against a queue model,
// checking R_Data after every read and Empty/Full every cycle, including
// filling it to DEPTH-1 words (Full) and emptying it.
//
// Inputs change on the falling edge. The expected values come from the
// source's Full/Empty pointer rule; the depth of 16 is this design's choice.
module tb_input_fifo;
  localparam int W = 9, D = 16;
  logic clk = 1'b0, reset, we, re, empty, full;
  logic [W-1:0] wd, rd;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0;

  always #5 clk = ~clk;

  input_fifo #(.WIDTH(W), .DEPTH(D)) dut (.Clk(clk), .Reset(reset), .W_Data(wd), .W_En(we),
    .R_En(re), .R_Data(rd), .Empty(empty), .Full(full));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] q [$];
  logic [W-1:0] last;

  initial begin
    reset = 1; we = 0; re = 0; wd = 0; last = 0;
    @(negedge clk); @(negedge clk); reset = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int phase = (i / 300) % 2;   // alternately mostly writing, mostly reading
      bit do_w, do_r, was_full;
      do_w = ($urandom % 100) < (phase ? 30 : 80);
      do_r = ($urandom % 100) < (phase ? 80 : 30);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D - 1)) begin
        failures++;
        $display("%0t: empty=%b full=%b with %0d words", $time, empty, full, q.size());
      end
      if (full) n_full++;
      if (empty) n_empty++;
      we = do_w; re = do_r; wd = W'($urandom);
      was_full = (q.size() == D - 1);
      @(posedge clk);
      // the read is accepted when the FIFO was not empty before the edge,
      // the write when it was not full
      if (do_r && q.size() > 0) last = q.pop_front();
      if (do_w && !was_full) q.push_back(wd);
      @(negedge clk);
      checks++;
      if (rd !== last) begin
        failures++;
        $display("%0t: R_Data %h expected %h", $time, rd, last);
      end
    end
    checks++; if (n_full == 0 || n_empty == 0) begin failures++; $display("full/empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
