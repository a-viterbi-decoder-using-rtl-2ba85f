// K3 DPRAM: path-metric keeper of one state of the K=3 decoder.
//
// Holds a single path-metric register, overwritten in place by W_Data on
// each W_En, and DEPTH one-bit survivor registers (RAMPATH); W_Path is
// stored in RAMPATH[W_Addr] on the same W_En. Reads are asynchronous: R_Data
// is the stored metric, except when R_Addr is 0 (the first trellis cycle of
// a block), where it is the start metric: 0 for the all-zero state
// (ZERO_STATE = 1) and a large value with only the most significant bit set
// for every other state. Read_Data always shows the stored metric, for the
// best-state search before traceback. Synchronous writes on Clk; Reset
// (synchronous, active high) clears all registers.
//
// Follows the source: one metric register (in-place update), two DPRAM kinds
// differing only in the start metric, asynchronous reads, depth 8. This
// design's own choice: the separate Read_Data output.
module k3_dpram #(
  parameter int unsigned PM_W       = 5,
  parameter int unsigned DEPTH      = 8,
  parameter bit          ZERO_STATE = 1'b0
) (
  input  logic                     Clk,
  input  logic                     Reset,
  input  logic                     W_En,
  input  logic [$clog2(DEPTH)-1:0] W_Addr,
  input  logic [PM_W-1:0]          W_Data,
  input  logic                     W_Path,
  input  logic [$clog2(DEPTH)-1:0] R_Addr,
  output logic [PM_W-1:0]          R_Data,
  output logic [PM_W-1:0]          Read_Data,
  output logic [DEPTH-1:0]         RAMPATH
);

  localparam logic [PM_W-1:0] START = ZERO_STATE ? '0 : {1'b1, {(PM_W-1){1'b0}}};

  logic [PM_W-1:0] metric;

  always_ff @(posedge Clk) begin
    if (Reset) begin
      metric  <= '0;
      RAMPATH <= '0;
    end else if (W_En) begin
      metric          <= W_Data;
      RAMPATH[W_Addr] <= W_Path;
    end
  end

  assign R_Data    = (R_Addr == '0) ? START : metric;
  assign Read_Data = metric;

endmodule
