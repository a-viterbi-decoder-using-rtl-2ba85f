// Testbench of the K=3 MINDETECTOR: random metrics (with frequent ties,
// and the 14-bit soft width) against a model returning the lowest index of
// the smallest metric.
//
// Combinational; checked 1 time unit after each input change. The tie rule
// is this design's choice.
module tb_k3_min_detector;
  logic [4:0]  pm [4];
  logic [13:0] spm [4];
  logic [1:0]  ms, sms;
  int checks = 0, failures = 0;

  k3_min_detector #(.PM_W(5))  dut  (.PathMetric(pm), .Min_State(ms));
  k3_min_detector #(.PM_W(14)) sdut (.PathMetric(spm), .Min_State(sms));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) begin
      automatic int b = 0, sb = 0;
      foreach (pm[i]) begin
        pm[i] = 5'($urandom_range(0, 5));
        spm[i] = 14'($urandom);
      end
      #1;
      for (int i = 1; i < 4; i++) begin
        if (pm[i] < pm[b]) b = i;
        if (spm[i] < spm[sb]) sb = i;
      end
      checks += 2;
      if (ms != 2'(b)) begin failures++; $display("hard got %0d want %0d", ms, b); end
      if (sms != 2'(sb)) begin failures++; $display("soft got %0d want %0d", sms, sb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
