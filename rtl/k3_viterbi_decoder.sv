// K3 VITERBI DECODER: K=3 rate 1/2 Viterbi decoder, hard or soft decision.
//
// Decodes the code of generators G0, G1 (default 111 and 101) in blocks of
// DEPTH (8) received symbol pairs. Each W_En pulse takes one pair from
// Demod_Data (hard: two bits, first in bit 1; soft: two 2-bit levels, first
// in bits 3:2, level 3 = strongest 1) and performs one trellis cycle; a
// 3-bit counter (PresentInst) numbers the cycles of the block and restarts
// every block from the all-zero state. The clock after the pair that
// completes a block, the minimum detector picks the best state from the
// stored metrics, the trace-back unit walks the survivor registers back to
// cycle 0, and SD (SD[t] = decoded bit of cycle t) is registered with a
// one-cycle SD_Valid pulse. A new pair may follow in that same cycle. Reset
// is synchronous and active high.
//
// Follows the source: the ACSDPRAM / MINDETECTOR / TBU structure, traceback
// depth 8, decoding from the all-zero start state, 5-bit (hard) and 14-bit
// (soft) metrics. This design's own choices: the block-wise output register
// with SD_Valid and the input codings.
module k3_viterbi_decoder #(
  parameter bit          SOFT  = 1'b0,
  parameter int unsigned PM_W  = SOFT ? 14 : 5,
  parameter int unsigned DW    = SOFT ? 4 : 2,
  parameter int unsigned DEPTH = 8,
  parameter logic [2:0]  G0    = 3'b111,
  parameter logic [2:0]  G1    = 3'b101
) (
  input  logic                     Clk,
  input  logic                     Reset,
  input  logic                     W_En,
  input  logic [DW-1:0]            Demod_Data,
  output logic [$clog2(DEPTH)-1:0] PresentInst,
  output logic [DEPTH-1:0]         SD,
  output logic                     SD_Valid
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [PM_W-1:0]  metrics [4];
  logic [DEPTH-1:0] rampath [4];
  logic [1:0]       best;
  logic [DEPTH-1:0] sd_now;
  logic             block_done;

  k3_acsdpram #(.SOFT(SOFT), .PM_W(PM_W), .DW(DW), .DEPTH(DEPTH), .G0(G0), .G1(G1)) u_acsdpram (
    .Clk            (Clk),
    .Reset          (Reset),
    .Demod_Data     (Demod_Data),
    .PresentInstant (PresentInst),
    .W_En           (W_En),
    .Read_Data      (metrics),
    .RAMPath        (rampath)
  );

  k3_min_detector #(.PM_W(PM_W)) u_min (
    .PathMetric (metrics),
    .Min_State  (best)
  );

  k3_tbu #(.DEPTH(DEPTH)) u_tbu (
    .Best_State (best),
    .RAMPath    (rampath),
    .SD         (sd_now)
  );

  always_ff @(posedge Clk) begin
    if (Reset) begin
      PresentInst <= '0;
      block_done  <= 1'b0;
      SD          <= '0;
      SD_Valid    <= 1'b0;
    end else begin
      SD_Valid   <= block_done;
      block_done <= W_En && (PresentInst == AW'(DEPTH - 1));
      if (block_done) SD <= sd_now;
      if (W_En) PresentInst <= (PresentInst == AW'(DEPTH - 1)) ? '0 : PresentInst + AW'(1);
    end
  end

endmodule
