// Testbench of the K=3 trace-back unit: random survivor registers and best
// states against a behavioural traceback (decoded bit = state bit 1; previous
// state = {state bit 0, survivor bit of the state at that cycle}), plus the
// source's example start state "01" whose cycle-7 survivor bit 0 leads to
// state "10".
//
// Combinational; checked 1 time unit after each input change.
module tb_k3_tbu;
  logic [1:0] best;
  logic [7:0] rp [4];
  logic [7:0] sd;
  int checks = 0, failures = 0;

  k3_tbu dut (.Best_State(best), .RAMPath(rp), .SD(sd));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Source example: best state 01, survivor 0 at cycle 7 -> state 10 at
    // cycle 6, so bit 7 is 0 and bit 6 is 1.
    best = 2'b01;
    rp = '{8'h00, 8'h00, 8'h00, 8'h00};
    #1;
    checks++;
    if (sd[7] != 1'b0 || sd[6] != 1'b1) begin failures++; $display("example %b", sd); end
    repeat (3000) begin
      automatic logic [1:0] s;
      automatic logic [7:0] want;
      best = 2'($urandom);
      foreach (rp[i]) rp[i] = 8'($urandom);
      #1;
      s = best;
      for (int t = 7; t >= 0; t--) begin
        want[t] = s[1];
        s = {s[0], rp[s][t]};
      end
      checks++;
      if (sd != want) begin failures++; $display("got %b want %b", sd, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
