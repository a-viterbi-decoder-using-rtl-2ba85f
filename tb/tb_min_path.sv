// Testbench of MIN_PATH: the rows of the source's MIN_PATH simulation, then
// random metrics with frequent ties, against a model that picks the smallest
// metric and, among equal ones, the memory with the highest index.
//
// Combinational; checked 1 time unit after each input change. The table
// rows are the source's.
module tb_min_path;
  import viterbi_pkg::*;

  pm_t   d [NMEM];
  addr_t a [NMEM];
  logic [2:0] loc;
  addr_t      mar;
  int checks = 0, failures = 0;

  min_path dut (.RAMmemdata(d), .RAMmemaddr(a), .M_Addr(loc), .M_Addr_Ram(mar));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rows: 8 metrics, M_Addr, 8 addresses, M_Addr_Ram
  localparam int unsigned ROWS [11][18] = '{
    '{7,6,5,4,3,2,1,0, 7, 7,6,5,4,3,2,1,0, 0},
    '{7,6,5,4,3,2,1,7, 6, 7,6,5,4,3,2,1,0, 1},
    '{7,6,5,4,3,2,1,7, 6, 7,6,5,4,3,2,1,0, 1},
    '{7,6,5,4,3,2,1,7, 6, 7,6,5,1,3,2,4,0, 4},
    '{7,6,5,4,3,2,6,7, 5, 7,6,5,1,3,2,4,0, 2},
    '{7,6,5,4,3,5,6,7, 4, 7,6,5,1,3,2,4,0, 3},
    '{7,6,5,4,4,5,6,7, 4, 7,6,5,1,3,2,4,0, 3},
    '{7,6,5,3,4,5,6,7, 3, 7,6,5,1,3,2,4,0, 1},
    '{7,6,2,3,4,5,6,7, 2, 7,6,5,1,3,2,4,0, 5},
    '{7,1,2,3,4,5,6,7, 1, 7,6,5,1,3,2,4,0, 6},
    '{0,1,2,3,4,5,6,7, 0, 7,6,5,1,3,2,4,0, 7}
  };

  task automatic check(input int eloc);
    #1;
    checks++;
    if (loc !== 3'(eloc) || mar !== a[eloc]) begin
      failures++;
      $display("got %0d/%0d expected %0d/%0d", loc, mar, eloc, a[eloc]);
    end
  endtask

  initial begin
    for (int n = 0; n < 11; n++) begin
      for (int m = 0; m < NMEM; m++) begin
        d[m] = pm_t'(ROWS[n][m]);
        a[m] = addr_t'(ROWS[n][9 + m]);
      end
      checks++;
      #1;
      if (loc !== 3'(ROWS[n][8]) || mar !== addr_t'(ROWS[n][17])) begin
        failures++;
        $display("row %0d: got %0d/%0d", n, loc, mar);
      end
    end
    for (int n = 0; n < 3000; n++) begin
      int best;
      for (int m = 0; m < NMEM; m++) begin
        d[m] = (n % 2) ? pm_t'($urandom % 4) : pm_t'($urandom);
        a[m] = addr_t'($urandom);
      end
      best = 0;
      for (int m = 1; m < NMEM; m++) if (d[m] <= d[best]) best = m;
      check(best);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
