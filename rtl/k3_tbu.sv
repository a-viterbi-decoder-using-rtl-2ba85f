// K3 TBU: trace-back unit of the K=3 decoder.
//
// Starting from Best_State after the last trellis cycle of a block, walks
// back through the DEPTH cycles. At cycle t the decoded bit is the most
// significant bit of the current state (the input that led into it); a
// four-way multiplexer (MUX2x4, select = current state) picks that state's
// survivor bit RAMPath[state][t], and the previous state is the current one
// shifted left with the survivor bit entering at the right, the top bit
// dropped. SD[t] is the decoded bit of cycle t. Purely combinational: a
// chain of DEPTH multiplexer stages. SD[DEPTH-1] and SD[DEPTH-2] are simply
// the two bits of Best_State (the final state holds the last two inputs).
//
// Follows the source: the shift-left traceback rule, the MUX2x4 selection
// and the depth of 8.
module k3_tbu #(
  parameter int unsigned DEPTH = 8
) (
  input  logic [1:0]       Best_State,
  input  logic [DEPTH-1:0] RAMPath [4],
  output logic [DEPTH-1:0] SD
);

  logic [1:0] st [DEPTH+1];

  assign st[DEPTH] = Best_State;

  for (genvar t = DEPTH - 1; t >= 0; t--) begin : g_step
    logic surv;

    // MUX2x4: O = I[S1 S0].
    always_comb begin
      case (st[t+1])
        2'd0:    surv = RAMPath[0][t];
        2'd1:    surv = RAMPath[1][t];
        2'd2:    surv = RAMPath[2][t];
        default: surv = RAMPath[3][t];
      endcase
    end

    assign SD[t]  = st[t+1][1];
    assign st[t]  = {st[t+1][0], surv};
  end

endmodule
