// Testbench of the STATE CONTROLLER. Checks every (K, C) pair the decoder
// uses (K = 4..7, C = 0..2^(K-4)-1) against the values of the source's state
// controller simulation (PSY, PSA, NSUY, NSDY, NSUA, NSDA).
//
// Combinational; checked 1 time unit after each input change. All
// expected values are the source's simulation rows.
module tb_state_controller;
  import viterbi_pkg::*;

  k_t   k;
  cnt_t c;
  id_t  psy, psa, nsuy, nsdy, nsua, nsda;
  int checks = 0, failures = 0;

  state_controller dut (.K(k), .C(c), .PSY(psy), .PSA(psa), .NSUY(nsuy), .NSDY(nsdy),
                        .NSUA(nsua), .NSDA(nsda));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rows: K, C, PSY, PSA, NSUY, NSDY, NSUA, NSDA
  localparam int unsigned ROWS [15][8] = '{
    '{4, 0, 4'b0000, 4'b0001, 4'b0000, 4'b0001, 4'b0001, 4'b0000},
    '{5, 0, 4'b0000, 4'b0011, 4'b0000, 4'b0010, 4'b0011, 4'b0001},
    '{5, 1, 4'b0001, 4'b0010, 4'b0000, 4'b0010, 4'b0011, 4'b0001},
    '{6, 0, 4'b0000, 4'b0111, 4'b0000, 4'b0100, 4'b0111, 4'b0011},
    '{6, 1, 4'b0001, 4'b0110, 4'b0000, 4'b0100, 4'b0111, 4'b0011},
    '{6, 2, 4'b0010, 4'b0101, 4'b0001, 4'b0101, 4'b0110, 4'b0010},
    '{6, 3, 4'b0011, 4'b0100, 4'b0001, 4'b0101, 4'b0110, 4'b0010},
    '{7, 0, 4'b0000, 4'b1111, 4'b0000, 4'b1000, 4'b1111, 4'b0111},
    '{7, 1, 4'b0001, 4'b1110, 4'b0000, 4'b1000, 4'b1111, 4'b0111},
    '{7, 2, 4'b0010, 4'b1101, 4'b0001, 4'b1001, 4'b1110, 4'b0110},
    '{7, 3, 4'b0011, 4'b1100, 4'b0001, 4'b1001, 4'b1110, 4'b0110},
    '{7, 4, 4'b0100, 4'b1011, 4'b0010, 4'b1010, 4'b1101, 4'b0101},
    '{7, 5, 4'b0101, 4'b1010, 4'b0010, 4'b1010, 4'b1101, 4'b0101},
    '{7, 6, 4'b0110, 4'b1001, 4'b0011, 4'b1011, 4'b1100, 4'b0100},
    '{7, 7, 4'b0111, 4'b1000, 4'b0011, 4'b1011, 4'b1100, 4'b0100}
  };

  initial begin
    for (int n = 0; n < 15; n++) begin
      k = k_t'(ROWS[n][0]);
      c = cnt_t'(ROWS[n][1]);
      #1;
      checks++;
      if (psy !== id_t'(ROWS[n][2]) || psa !== id_t'(ROWS[n][3]) ||
          nsuy !== id_t'(ROWS[n][4]) || nsdy !== id_t'(ROWS[n][5]) ||
          nsua !== id_t'(ROWS[n][6]) || nsda !== id_t'(ROWS[n][7])) begin
        failures++;
        $display("K=%0d C=%0d: got %b %b %b %b %b %b", k, c, psy, psa, nsuy, nsdy, nsua, nsda);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
