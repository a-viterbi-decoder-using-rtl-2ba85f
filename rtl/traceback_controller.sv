// TRACEBACK CONTROLLER: recovers the message from the survivor memory.
//
// When Start_Traceback is high it loads Minimum_Path, the state with the
// smallest path metric at the end of the block, and walks back one trellis
// step per read. For the current state s (K-1 meaningful bits, m its top
// bit, t the bit below, v the bits below m) it finds the iteration and ACS
// unit that produced s: w = t ? ~v : v, iteration T_Addr = w >> 1 and unit
// {t, w[0], m ^ t}. It pulses R_En to read that iteration's survivor word;
// the selected bit d is the least significant bit of the predecessor, so the
// previous state is {s without m, d}. The decoded bit of the step is m, the
// input bit that led into s; it is presented on TB_data with a one-cycle
// TB_W_En pulse, last message bit of the block first. After the read that
// raises Stop_Traceback the controller waits for the next block.
//
// Timing: two cycles per decoded bit; the state is loaded one cycle after
// Start_Traceback is seen, which is after the main controller's End_Trellis
// for the block's last step. Rising-edge clocked, synchronous active-high
// Reset. The source gives the ports and the function; the state-to-address
// arithmetic is derived from the memory arrangement of the sub-trellis.
module traceback_controller
  import viterbi_pkg::*;
(
  input  logic            Clk,
  input  logic            Reset,
  input  k_t              K,
  input  logic            Start_Traceback,
  input  logic            Stop_Traceback,
  input  state_t          Minimum_Path,
  input  logic [NMEM-1:0] R_Data,
  output logic            R_En,
  output addr_t           T_Addr,
  output logic            TB_data,
  output logic            TB_W_En
);

  typedef enum logic [1:0] {T_IDLE, T_LOAD, T_READ, T_GOT} tstate_e;
  tstate_e state;

  state_t     s, mask, v, w, low_mask;
  logic       m, t;
  logic [2:0] unit, unit_q;
  logic       m_q;

  always_comb begin
    mask     = state_mask(K);
    low_mask = mask >> 1;
    m        = s[K - 3'd2];
    t        = s[K - 3'd3];
    v        = s & low_mask;
    w        = t ? (~v & low_mask) : v;
    T_Addr   = addr_t'(w >> 1);
    unit     = {t, w[0], m ^ t};
    R_En     = (state == T_READ);
  end

  always_ff @(posedge Clk) begin
    if (Reset) begin
      state   <= T_IDLE;
      s       <= '0;
      unit_q  <= '0;
      m_q     <= 1'b0;
      TB_data <= 1'b0;
      TB_W_En <= 1'b0;
    end else begin
      TB_W_En <= 1'b0;
      unique case (state)
        T_IDLE: if (Start_Traceback) state <= T_LOAD;
        T_LOAD: begin
          s     <= Minimum_Path & mask;
          state <= T_READ;
        end
        T_READ: begin
          unit_q <= unit;
          m_q    <= m;
          state  <= T_GOT;
        end
        T_GOT: begin
          TB_data <= m_q;
          TB_W_En <= 1'b1;
          s       <= ((s << 1) | state_t'(R_Data[unit_q])) & mask;
          state   <= Stop_Traceback ? T_IDLE : T_READ;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
