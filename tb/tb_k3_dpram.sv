// Testbench of the K=3 DPRAM: both kinds (all-zero state and other states)
// against a register model under random writes, write enables and read
// addresses: R_Data must give the start metric (0 or 10000) at R_Addr 0
// and the stored metric elsewhere, Read_Data the stored metric, RAMPATH the
// survivor bits written at each W_Addr.
//
// Inputs change after the falling edge; outputs are checked just before
// each rising edge. Start values and depth follow the source.
module tb_k3_dpram;
  logic       clk = 0, rst = 1, we;
  logic [2:0] wa, ra;
  logic [4:0] wd, rd0, rd1, q0, q1;
  logic       wp;
  logic [7:0] rp0, rp1;
  logic [4:0] m_metric;
  logic [7:0] m_path;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  k3_dpram #(.ZERO_STATE(1'b1)) d0 (.Clk(clk), .Reset(rst), .W_En(we), .W_Addr(wa), .W_Data(wd), .W_Path(wp),
                                    .R_Addr(ra), .R_Data(rd0), .Read_Data(q0), .RAMPATH(rp0));
  k3_dpram #(.ZERO_STATE(1'b0)) d1 (.Clk(clk), .Reset(rst), .W_En(we), .W_Addr(wa), .W_Data(wd), .W_Path(wp),
                                    .R_Addr(ra), .R_Data(rd1), .Read_Data(q1), .RAMPATH(rp1));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; ra = 0; wd = 0; wp = 0;
    m_metric = 0; m_path = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    repeat (3000) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1;
      wa = 3'($urandom); ra = 3'($urandom); wd = 5'($urandom); wp = 1'($urandom);
      #4;
      checks += 4;
      if (rd0 != ((ra == 0) ? 5'd0 : m_metric)) begin failures++; $display("rd0 %0d", rd0); end
      if (rd1 != ((ra == 0) ? 5'b10000 : m_metric)) begin failures++; $display("rd1 %0d", rd1); end
      if (q0 != m_metric || q1 != m_metric) begin failures++; $display("Read_Data"); end
      if (rp0 != m_path || rp1 != m_path) begin failures++; $display("RAMPATH %b %b", rp0, m_path); end
      @(posedge clk);
      if (we) begin
        m_metric = wd;
        m_path[wa] = wp;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
