// Testbench of the COLLECTOR. Replays the input sequences of the source's
// collector simulation (rate 1/2 and rate 1/3) and a random sequence with
// random Rate and Valid, and compares the three registers and we_out every
// cycle with a model of the grouping rule.
//
// Inputs change on the falling edge and are compared after each cycle.
// The grouping rule is the source's; the registered we_out is this design's.
module tb_collector;
  import viterbi_pkg::*;

  logic clk = 1'b0, reset, valid, rate;
  sym_t din, q0, q1, q2;
  logic we;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  collector dut (.Clk(clk), .Reset(reset), .DEMODDATA(din), .Valid(valid), .Rate(rate),
                 .DEMODDATA0(q0), .DEMODDATA1(q1), .DEMODDATA2(q2), .we_out(we));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  sym_t m [3];
  int   ptr;
  logic mwe;
  always @(posedge clk) begin
    if (reset) begin
      m = '{default: '0}; ptr = 0; mwe = 0;
    end else begin
      mwe = 0;
      if (valid) begin
        m[ptr] = din;
        if (ptr == (rate ? 2 : 1)) begin ptr = 0; mwe = 1; end
        else ptr++;
      end
    end
  end

  task automatic cmp();
    @(negedge clk);
    checks++;
    if (q0 !== m[0] || q1 !== m[1] || q2 !== m[2] || we !== mwe) begin
      failures++;
      $display("%0t: got %0d %0d %0d we=%b, expected %0d %0d %0d we=%b", $time,
               q0, q1, q2, we, m[0], m[1], m[2], mwe);
    end
  endtask

  task automatic drive(input logic v, input sym_t d, input logic r);
    valid = v; din = d; rate = r;
    cmp();
  endtask

  int n_we = 0;
  always @(posedge clk) if (we) n_we++;

  initial begin
    reset = 1; valid = 0; din = 0; rate = 0;
    @(negedge clk); @(negedge clk);
    reset = 0;
    // rate 1/2: symbols 1..7 then 0, each followed by an idle cycle
    for (int i = 1; i <= 8; i++) begin
      drive(1, sym_t'(i % 8), 0);
      drive(0, sym_t'(i % 8), 0);
    end
    checks++; if (n_we != 4) begin failures++; $display("rate 1/2: %0d strobes", n_we); end
    checks++; if (q0 !== 3'd7 || q1 !== 3'd0) begin failures++; $display("rate 1/2 last pair wrong"); end
    reset = 1; @(negedge clk); reset = 0; n_we = 0;
    // rate 1/3: symbols 1..7 and 0
    for (int i = 1; i <= 8; i++) begin
      drive(1, sym_t'(i % 8), 1);
      drive(0, sym_t'(i % 8), 1);
    end
    checks++; if (n_we != 2) begin failures++; $display("rate 1/3: %0d strobes", n_we); end
    checks++; if (q0 !== 3'd7 || q1 !== 3'd0 || q2 !== 3'd6) begin failures++; $display("rate 1/3 group wrong"); end
    // random
    reset = 1; @(negedge clk); reset = 0;
    for (int i = 0; i < 400; i++) begin
      drive(1'($urandom % 2), sym_t'($urandom), (i < 200) ? 1'b0 : 1'b1);
      if (i == 199) begin reset = 1; drive(0, 0, 1); reset = 0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
