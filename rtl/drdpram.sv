// DRDPRAM: double-register dual-port RAM of path metrics.
//
// Holds the path metrics of the states that one sub-trellis position takes in
// the successive iterations, one register per iteration (ITER registers).
// Every register exists twice: the O-RAM holds the metrics of the present
// trellis step and is read asynchronously at R_Addr (R_Data); the I-RAM
// collects the metrics of the next step, written at W_Addr on a clock edge
// with W_En. A clock edge with End_Trellis copies the whole I-RAM into the
// O-RAM, so a trellis step can be computed in place without overwriting
// metrics that later iterations of the same step still read.
//
// M_Data and M_Addr give the smallest O-RAM value and its address (lowest
// address on a tie); they let MIN_PATH choose the traceback start state.
// Initial (or Reset, both synchronous and active high) loads every register
// with PM_LARGE, except register 0 of the memory built with ZERO_STATE = 1,
// which gets 0: state 0 is the known start state, all others are improbable.
// Registers that the current K never addresses keep PM_LARGE.
//
// From the source: the O-RAM/I-RAM pair with an update strobe, asynchronous
// read, the two kinds of memory for initialisation and the minimum ports.
module drdpram
  import viterbi_pkg::*;
#(
  parameter bit          ZERO_STATE = 1'b0,
  parameter int unsigned ITER       = ITER_MAX
) (
  input  logic  Clk,
  input  logic  Reset,
  input  logic  Initial,
  input  pm_t   W_Data,
  input  addr_t W_Addr,
  input  logic  W_En,
  input  addr_t R_Addr,
  input  logic  End_Trellis,
  output pm_t   R_Data,
  output pm_t   M_Data,
  output addr_t M_Addr
);

  pm_t o_ram [ITER];
  pm_t i_ram [ITER];

  always_ff @(posedge Clk) begin
    if (Reset || Initial) begin
      for (int a = 0; a < ITER; a++) begin
        o_ram[a] <= (ZERO_STATE && a == 0) ? '0 : PM_LARGE;
        i_ram[a] <= PM_LARGE;
      end
    end else begin
      if (W_En && int'(W_Addr) < ITER) i_ram[W_Addr] <= W_Data;
      if (End_Trellis) o_ram <= i_ram;
    end
  end

  assign R_Data = (int'(R_Addr) < ITER) ? o_ram[R_Addr] : PM_LARGE;

  always_comb begin
    M_Data = o_ram[0];
    M_Addr = '0;
    for (int a = 1; a < ITER; a++) begin
      if (o_ram[a] < M_Data) begin
        M_Data = o_ram[a];
        M_Addr = addr_t'(a);
      end
    end
  end

endmodule
