// SURVIVOR MEMORY: LIFO between the trellis and the traceback controller.
//
// Stores, for every iteration of every trellis step, the eight survivor bits
// of the sub-trellis (WData). The memory has one slot per trellis step up to
// DEPTH (the largest traceback depth), each slot holding 2^(K-4) iteration
// words. A block of TracebackDepth steps is written slot by slot; when its
// last word is written the block is complete: Start_Traceback rises and
// Full stays high, stalling the main controller. The traceback controller
// then reads one word per step, last step first: REn reads the word of the
// current step at iteration T_Addr into the registered RData and frees the
// step's slot. The next block is written into freed slots only (Full is high
// while the next slot to write has not been read yet), so writing and
// traceback overlap and one set of registers serves both. The write and read
// directions therefore alternate from block to block, as in the source's
// LIFO. Stop_Traceback goes high with the read of the block's first step and
// stays high until the next block is complete.
//
// Clocked on the rising edge; Reset is synchronous and active high.
// TracebackDepth must be 1..DEPTH and K 4..7; both must be stable while
// decoding. From the source: the ports, the LIFO principle, the direction
// changes and the Full/Start_Traceback behaviour. This design's own choice:
// the slot bookkeeping with counters and the Stop_Traceback timing.
module survivor_memory
  import viterbi_pkg::*;
#(
  parameter int unsigned DEPTH = DEPTH_MAX
) (
  input  logic            Clk,
  input  logic            Reset,
  input  k_t              K,
  input  depth_t          TracebackDepth,
  input  logic [NMEM-1:0] WData,
  input  logic            WEn,
  input  logic            REn,
  input  addr_t           T_Addr,
  output logic [NMEM-1:0] RData,
  output logic            Start_Traceback,
  output logic            Stop_Traceback,
  output logic            Full
);

  localparam int unsigned SW = $clog2(DEPTH + 1);
  typedef logic [SW-1:0] step_t;

  logic [NMEM-1:0] mem [DEPTH][ITER_MAX];

  step_t depth;            // steps per block
  addr_t last_iter;        // 2^(K-4) - 1
  addr_t witer;            // iteration of the word being written
  step_t wstep;            // step of the block being written
  logic  wpar;             // direction of the block being written
  logic  tb_active;        // a complete block is waiting for / under traceback
  step_t rd_count;         // steps of that block already read
  logic  rpar;             // direction of that block
  logic  tb_done;
  step_t rstep;
  logic [$clog2(DEPTH)-1:0] wslot, rslot;

  always_comb begin
    depth     = (TracebackDepth == '0) ? step_t'(1)
              : (int'(TracebackDepth) > DEPTH) ? step_t'(DEPTH)
              : step_t'(TracebackDepth);
    last_iter = addr_t'(iterations(K) - cnt_t'(1));
    wslot     = $bits(wslot)'(wpar ? (depth - step_t'(1) - wstep) : wstep);
    rstep     = depth - step_t'(1) - rd_count;        // step read next
    rslot     = $bits(rslot)'(rpar ? (depth - step_t'(1) - rstep) : rstep);
    Full            = tb_active && (wstep >= rd_count);
    Start_Traceback = tb_active && (rd_count == '0);
    Stop_Traceback  = tb_done;
  end

  always_ff @(posedge Clk) begin
    if (WEn && !Full) mem[wslot][witer] <= WData;
  end

  always_ff @(posedge Clk) begin
    if (Reset) begin
      witer     <= '0;
      wstep     <= '0;
      wpar      <= 1'b0;
      tb_active <= 1'b0;
      rd_count  <= '0;
      rpar      <= 1'b0;
      tb_done   <= 1'b0;
      RData     <= '0;
    end else begin
      if (REn && tb_active) begin
        RData    <= mem[rslot][T_Addr];
        rd_count <= rd_count + step_t'(1);
        if (rd_count == depth - step_t'(1)) begin
          tb_active <= 1'b0;
          tb_done   <= 1'b1;
        end
      end
      if (WEn && !Full) begin
        if (witer == last_iter) begin
          witer <= '0;
          if (wstep == depth - step_t'(1)) begin
            // block complete: hand it to traceback, turn the write direction
            wstep     <= '0;
            wpar      <= ~wpar;
            rpar      <= wpar;
            tb_active <= 1'b1;
            rd_count  <= '0;
            tb_done   <= 1'b0;
          end else begin
            wstep <= wstep + step_t'(1);
          end
        end else begin
          witer <= witer + addr_t'(1);
        end
      end
    end
  end

endmodule
