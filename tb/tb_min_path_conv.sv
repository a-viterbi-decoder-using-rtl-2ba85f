// Testbench of MIN_PATH_CONV: every row of the source's K = 7 conversion
// table (written out here as the rule it shows: locations 0..3 give
// {iteration, location}, locations 4..7 its complement), then K = 4..6
// against a model built from the memory state arrangement.
//
// Combinational; checked 1 time unit after each input change. The table
// rows are the source's; the K = 4..6 cases follow the same rule.
module tb_min_path_conv;
  import viterbi_pkg::*;
  import tb_trellis_pkg::*;

  k_t k;
  logic [2:0] loc;
  addr_t it;
  state_t mp;
  int checks = 0, failures = 0;

  min_path_conv dut (.K(k), .M_Location(loc), .M_Iteration(it), .Min_Path(mp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // a few rows of the table copied as printed
    localparam int unsigned T [8][3] = '{
      '{0, 0, 6'b000000}, '{4, 0, 6'b111111}, '{7, 0, 6'b111100}, '{5, 1, 6'b111010},
      '{3, 3, 6'b001111}, '{6, 4, 6'b101101}, '{1, 6, 6'b011001}, '{7, 7, 6'b100000}
    };
    k = 7;
    for (int n = 0; n < 8; n++) begin
      loc = 3'(T[n][0]); it = addr_t'(T[n][1]);
      #1;
      checks++;
      if (mp !== state_t'(T[n][2])) begin
        failures++;
        $display("table row %0d: got %b", n, mp);
      end
    end
    for (int kk = 4; kk <= 7; kk++) begin
      k = k_t'(kk);
      for (int c = 0; c < (1 << (kk - 4)); c++) begin
        for (int m = 0; m < NMEM; m++) begin
          loc = 3'(m); it = addr_t'(c);
          #1;
          checks++;
          if (mp !== state_t'(mem_state(kk, c, m))) begin
            failures++;
            $display("K=%0d loc=%0d it=%0d: got %b", kk, m, c, mp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
