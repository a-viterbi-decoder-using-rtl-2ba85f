// COLLECTOR: groups the soft-decision symbols of one code word.
//
// Each clock edge with Valid high stores DEMODDATA into the register the write
// pointer selects (DEMODDATA0, then DEMODDATA1, then DEMODDATA2) and advances
// the pointer. When the last symbol of a group has been stored (the second at
// Rate = 0, code rate 1/2; the third at Rate = 1, code rate 1/3) the pointer
// returns to DEMODDATA0 and we_out is high for one cycle, in the cycle in
// which the three registers hold the complete group, so the input FIFO can
// take it. Reset (synchronous, active high) clears the registers and points
// to DEMODDATA0.
//
// From the source: the register names, the pointer behaviour, the Rate
// encoding and the we_out strobe. This design's own choice: we_out is
// registered, so it appears one cycle after the edge that stored the last
// symbol; at rate 1/2 DEMODDATA2 keeps its value (the branch metric unit
// sees it as a constant offset on every branch).
module collector
  import viterbi_pkg::*;
(
  input  logic Clk,
  input  logic Reset,
  input  sym_t DEMODDATA,
  input  logic Valid,
  input  logic Rate,          // 0: code rate 1/2, 1: code rate 1/3
  output sym_t DEMODDATA0,
  output sym_t DEMODDATA1,
  output sym_t DEMODDATA2,
  output logic we_out
);

  logic [1:0] ptr;
  logic       last;

  assign last = (ptr == 2'd2) || (ptr == 2'd1 && !Rate);

  always_ff @(posedge Clk) begin
    if (Reset) begin
      ptr        <= 2'd0;
      DEMODDATA0 <= '0;
      DEMODDATA1 <= '0;
      DEMODDATA2 <= '0;
      we_out     <= 1'b0;
    end else begin
      we_out <= 1'b0;
      if (Valid) begin
        unique case (ptr)
          2'd0:    DEMODDATA0 <= DEMODDATA;
          2'd1:    DEMODDATA1 <= DEMODDATA;
          default: DEMODDATA2 <= DEMODDATA;
        endcase
        if (last) begin
          ptr    <= 2'd0;
          we_out <= 1'b1;
        end else begin
          ptr <= ptr + 2'd1;
        end
      end
    end
  end

endmodule
