// Testbench of the K=3 rate 1/2 decoder, hard and soft instances side by
// side.
//
// Messages of 8 bits are encoded (G0 = 111, G1 = 101, from the all-zero
// state) and sent one pair per W_En, sometimes back to back and sometimes
// with idle cycles. Hard blocks carry 0..3 flipped bits; soft blocks carry
// random strong/weak levels and sometimes flipped levels. Every SD_Valid
// block is compared with a behavioural Viterbi decoder over the same
// received pairs, and with the message itself when the block is noiseless.
// The source's examples come first: the all-zero message with two errors
// (00 00 01 00 01 00 00 00 received) must decode to all zeros. Counts blocks,
// corrected blocks and back-to-back block starts, and fails if any stayed 0.
//
// Inputs change after the falling edge; SD is read when SD_Valid is high at
// a rising edge.
module tb_k3_viterbi_decoder;
  import tb_k3_pkg::*;
  logic       clk = 0, rst = 1, we;
  logic [1:0] hd;
  logic [3:0] sd;
  logic [2:0] hinst, sinst;
  logic [7:0] hsd, ssd;
  logic       hval, sval;
  int checks = 0, failures = 0;
  int n_blocks = 0, n_corrected = 0, n_b2b = 0;

  always #5 clk = ~clk;

  k3_viterbi_decoder #(.SOFT(1'b0)) hdut (.Clk(clk), .Reset(rst), .W_En(we), .Demod_Data(hd),
                                          .PresentInst(hinst), .SD(hsd), .SD_Valid(hval));
  k3_viterbi_decoder #(.SOFT(1'b1)) sdut (.Clk(clk), .Reset(rst), .W_En(we), .Demod_Data(sd),
                                          .PresentInst(sinst), .SD(ssd), .SD_Valid(sval));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results, queued per block.
  logic [7:0] qh [$], qs [$];

  always @(posedge clk) if (!rst) begin
    if (hval) begin
      checks++;
      n_blocks++;
      if (qh.size() == 0 || hsd != qh[0]) begin failures++; $display("hard block got %b at %0t n=%0d q=%0d", hsd, $time, n_blocks, qh.size()); end
      if (qh.size() != 0) void'(qh.pop_front());
    end
    if (sval) begin
      checks++;
      if (qs.size() == 0 || ssd != qs[0]) begin failures++; $display("soft block got %b", ssd); end
      if (qs.size() != 0) void'(qs.pop_front());
    end
    if (hval != sval) begin failures++; $display("valid mismatch"); end
  end

  task automatic send_block(input logic [3:0] hrx [8], input logic [3:0] srx [8], input bit gaps);
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      if (t == 0 && hval) n_b2b++;
      hd = hrx[t][1:0]; sd = srx[t]; we = 1;
      checks += 2;
      if (hinst != 3'(t) || sinst != 3'(t)) begin failures++; $display("PresentInst %0d at %0d", hinst, t); end
      if (gaps && $urandom_range(0, 2) == 0) begin
        @(negedge clk);
        we = 0;
      end
    end
    @(negedge clk);
    we = 0;
  endtask

  initial begin
    logic [3:0] hrx [8], srx [8];
    logic [1:0] st;
    we = 0; hd = 0; sd = 0;
    repeat (2) @(posedge clk);
    rst = 0;

    // Source example: all-zero message, two errors.
    hrx = '{4'b00, 4'b00, 4'b01, 4'b00, 4'b01, 4'b00, 4'b00, 4'b00};
    srx = '{4'h0, 4'h0, 4'h0, 4'h0, 4'h0, 4'h0, 4'h0, 4'h0};
    checks++;
    if (decode(1'b0, hrx, 8, 5) != 8'h00) begin failures++; $display("model fails the source example"); end
    qh.push_back(8'h00); qs.push_back(8'h00);
    n_corrected++;
    send_block(hrx, srx, 1'b0);

    repeat (400) begin
      automatic logic [7:0] msg = 8'($urandom);
      automatic int nerr = $urandom_range(0, 3);
      automatic bit snoisy = $urandom_range(0, 2) == 0;
      automatic logic [7:0] hw, sw;
      st = 2'b00;
      for (int t = 0; t < 8; t++) begin
        automatic logic [1:0] e = enc(st, msg[t]);
        hrx[t] = {2'b00, e};
        srx[t] = {e[1] ? 2'($urandom_range(2, 3)) : 2'($urandom_range(0, 1)),
                  e[0] ? 2'($urandom_range(2, 3)) : 2'($urandom_range(0, 1))};
        if (snoisy && $urandom_range(0, 3) == 0) srx[t] = 4'($urandom);
        st = {msg[t], st[1]};
      end
      for (int i = 0; i < nerr; i++) hrx[$urandom_range(0, 7)][$urandom_range(0, 1)] ^= 1'b1;
      hw = decode(1'b0, hrx, 8, 5);
      sw = decode(1'b1, srx, 8, 14);
      if (nerr == 0) begin
        checks++;
        if (hw != msg) begin failures++; $display("model: noiseless hard block not decoded"); end
      end
      if (!snoisy) begin
        checks++;
        if (sw != msg) begin failures++; $display("model: clean soft block not decoded"); end
      end
      if (nerr > 0 && hw == msg) n_corrected++;
      qh.push_back(hw); qs.push_back(sw);
      send_block(hrx, srx, $urandom_range(0, 1) == 1);
      if ($urandom_range(0, 1) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (qh.size() != 0 || qs.size() != 0) begin failures++; $display("blocks missing: %0d", qh.size()); end
    $display("mechanisms: blocks=%0d corrected=%0d back_to_back=%0d", n_blocks, n_corrected, n_b2b);
    if (n_blocks == 0 || n_corrected == 0 || n_b2b == 0) begin failures++; $display("a mechanism never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
