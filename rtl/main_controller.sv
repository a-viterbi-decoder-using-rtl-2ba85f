// MAIN CONTROLLER: sequences the trellis.
//
// After reset it pulses Initial for one cycle to load the start path metrics.
// Then, for every trellis step: it waits until the input FIFO is not Empty
// and pulses Input_Fifo_R_En (the FIFO's registered output then holds the
// step's symbols); it runs the iteration counter C from 0 to 2^(K-4)-1, and
// for each value, once the survivor memory is not Full, pulses
// Iteration_W_En (path metrics into the DRDPRAM I-RAMs) and W_En (survivor
// bits into the survivor memory) together; after the last iteration it
// pulses End_Trellis so the DRDPRAMs move the new metrics to their O-RAMs.
// A trellis step takes 2^(K-4) + 2 cycles when nothing stalls.
//
// Rising-edge clocked, synchronous active-high Reset. From the source: the
// ports and the sequence. This design's own choice: End_Trellis has a cycle of
// its own, and the symbol's inputs TCC and TracebackDepth are not used (the
// source does not say what TCC carries; the survivor memory handles depth).
module main_controller
  import viterbi_pkg::*;
(
  input  logic Clk,
  input  logic Reset,
  input  k_t   K,
  input  logic Full,
  input  logic Empty,
  output logic Input_Fifo_R_En,
  output logic W_En,
  output logic Iteration_W_En,
  output cnt_t C,
  output logic Initial,
  output logic End_Trellis
);

  typedef enum logic [1:0] {S_INIT, S_FETCH, S_ITER, S_END} state_e;
  state_e state;

  always_ff @(posedge Clk) begin
    if (Reset) begin
      state <= S_INIT;
      C     <= '0;
    end else begin
      unique case (state)
        S_INIT:  state <= S_FETCH;
        S_FETCH: if (!Empty) begin
                   state <= S_ITER;
                   C     <= '0;
                 end
        S_ITER:  if (!Full) begin
                   if (C == iterations(K) - cnt_t'(1)) state <= S_END;
                   else                                C     <= C + cnt_t'(1);
                 end
        S_END:   state <= S_FETCH;
        default: state <= S_INIT;
      endcase
    end
  end

  always_comb begin
    Initial         = (state == S_INIT);
    Input_Fifo_R_En = (state == S_FETCH) && !Empty;
    Iteration_W_En  = (state == S_ITER) && !Full;
    W_En            = Iteration_W_En;
    End_Trellis     = (state == S_END);
  end

endmodule
