// VITERBI DECODER: reconfigurable soft-decision Viterbi decoder, top level.
//
// Decodes a convolutional code of constraint length K = 4..7 and code rate
// 1/2 (Rate = 0) or 1/3 (Rate = 1) with run-time generator polynomials,
// soft-decision cost table and traceback depth. The trellis of up to 64
// states is computed on one 8-state sub-trellis reused 2^(K-4) times per
// received code word; its states are arranged so that half of them carry
// complemented identifiers, which lets the iteration counter address every
// path-metric memory directly and needs only a two-way metric router.
//
// The COLLECTOR gathers 2 or 3 soft symbols (DEMODDATA, 3 bits, qualified by
// Valid, one symbol per cycle at most) into a code word for the VITERBI
// CORE. Decoded bits come out on TB_data with a TB_W_En pulse each, in blocks
// of TracebackDepth bits, each block last bit first. Fifo_Full high means the
// input FIFO is full: the source of symbols must pause. Configuration inputs
// must be stable while decoding; Reset is synchronous and active high.
//
// Beside it, sharing only Clk and Reset, stand the two fixed K=3 rate 1/2
// decoders that precede the reconfigurable one: a hard-decision decoder
// (K3H_ ports, two received bits per W_En) and a soft-decision decoder (K3S_
// ports, two 2-bit levels per W_En). Each decodes blocks of 8 pairs and
// shows the 8 decoded bits on SD with a one-cycle SD_Valid pulse (see
// k3_viterbi_decoder).
module viterbi_decoder
  import viterbi_pkg::*;
(
  input  logic   Clk,
  input  logic   Reset,
  input  sym_t   DEMODDATA,
  input  logic   Valid,
  input  logic   Rate,
  input  k_t     K,
  input  depth_t TracebackDepth,
  input  gen_t   Conv_Coder [NSYM],
  input  tbl_t   BMUTABLE [1 << SYM_W],
  output logic   Fifo_Full,
  output logic   TB_data,
  output logic   TB_W_En,
  // K=3 hard-decision decoder
  input  logic       K3H_W_En,
  input  logic [1:0] K3H_Demod_Data,
  output logic [2:0] K3H_PresentInst,
  output logic [7:0] K3H_SD,
  output logic       K3H_SD_Valid,
  // K=3 soft-decision decoder
  input  logic       K3S_W_En,
  input  logic [3:0] K3S_Demod_Data,
  output logic [2:0] K3S_PresentInst,
  output logic [7:0] K3S_SD,
  output logic       K3S_SD_Valid
);

  sym_t d0, d1, d2;
  logic we;

  collector u_collector (
    .Clk        (Clk),
    .Reset      (Reset),
    .DEMODDATA  (DEMODDATA),
    .Valid      (Valid),
    .Rate       (Rate),
    .DEMODDATA0 (d0),
    .DEMODDATA1 (d1),
    .DEMODDATA2 (d2),
    .we_out     (we)
  );

  viterbi_core u_viterbi_core (
    .Clk            (Clk),
    .Reset          (Reset),
    .K              (K),
    .TracebackDepth (TracebackDepth),
    .Conv_Coder     (Conv_Coder),
    .BMUTABLE       (BMUTABLE),
    .W_Data         ({d2, d1, d0}),
    .W_En           (we),
    .Fifo_Full      (Fifo_Full),
    .TB_data        (TB_data),
    .TB_W_En        (TB_W_En)
  );

  k3_viterbi_decoder #(.SOFT(1'b0)) u_k3_hard (
    .Clk         (Clk),
    .Reset       (Reset),
    .W_En        (K3H_W_En),
    .Demod_Data  (K3H_Demod_Data),
    .PresentInst (K3H_PresentInst),
    .SD          (K3H_SD),
    .SD_Valid    (K3H_SD_Valid)
  );

  k3_viterbi_decoder #(.SOFT(1'b1)) u_k3_soft (
    .Clk         (Clk),
    .Reset       (Reset),
    .W_En        (K3S_W_En),
    .Demod_Data  (K3S_Demod_Data),
    .PresentInst (K3S_PresentInst),
    .SD          (K3S_SD),
    .SD_Valid    (K3S_SD_Valid)
  );

endmodule
