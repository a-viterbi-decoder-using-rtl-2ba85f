// Input FIFO: decouples the symbol collector from the trellis.
//
// A circular buffer of DEPTH words addressed by a write pointer (W_Addr) and
// a read pointer (R_Addr). A rising clock edge with W_En high stores W_Data at
// W_Addr and advances it; an edge with R_En high copies the word at R_Addr to
// the registered R_Data output and advances R_Addr, so R_Data stays stable
// while the trellis works on it. Empty is high when the pointers are equal;
// Full is high when R_Addr - W_Addr = 1, i.e. one word is always left unused.
// DEPTH must be a power of two. A write while Full or a read while Empty is ignored. Reset (synchronous,
// active high) sets both pointers to 0.
//
// From the source: the ports, the circular pointers and the Full/Empty rule.
// This design's own choice: DEPTH (16), ignoring writes when full and reads
// when empty, and the registered read data.
module input_fifo
  import viterbi_pkg::*;
#(
  parameter int unsigned WIDTH = NSYM * SYM_W,
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic             Clk,
  input  logic             Reset,
  input  logic [WIDTH-1:0] W_Data,
  input  logic             W_En,
  input  logic             R_En,
  output logic [WIDTH-1:0] R_Data,
  output logic             Empty,
  output logic             Full
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    w_addr, r_addr;

  assign Empty = (w_addr == r_addr);
  assign Full  = ((r_addr - w_addr) == AW'(1));

  always_ff @(posedge Clk) begin
    if (W_En && !Full) mem[w_addr] <= W_Data;
  end

  always_ff @(posedge Clk) begin
    if (Reset) begin
      w_addr <= '0;
      r_addr <= '0;
      R_Data <= '0;
    end else begin
      if (W_En && !Full) w_addr <= w_addr + AW'(1);
      if (R_En && !Empty) begin
        R_Data <= mem[r_addr];
        r_addr <= r_addr + AW'(1);
      end
    end
  end

endmodule
