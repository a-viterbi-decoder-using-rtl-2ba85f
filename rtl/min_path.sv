// MIN_PATH: finds the memory that holds the smallest path metric.
//
// RAMmemdata[m] is the smallest path metric stored in memory m and
// RAMmemaddr[m] the address where it is stored. M_Addr is the index of the
// memory with the smallest of the eight values and M_Addr_Ram its address.
// When several memories tie, the highest index wins, which is what the
// source's simulation shows for a tie. Purely combinational.
module min_path
  import viterbi_pkg::*;
(
  input  pm_t                 RAMmemdata [NMEM],
  input  addr_t               RAMmemaddr [NMEM],
  output logic [2:0]          M_Addr,
  output addr_t               M_Addr_Ram
);

  pm_t best;

  always_comb begin
    best   = RAMmemdata[0];
    M_Addr = 3'd0;
    for (int m = 1; m < NMEM; m++) begin
      if (RAMmemdata[m] <= best) begin
        best   = RAMmemdata[m];
        M_Addr = 3'(m);
      end
    end
    M_Addr_Ram = RAMmemaddr[M_Addr];
  end

endmodule
