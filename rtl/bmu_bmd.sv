// BMD: expected encoder outputs of the 16 branches of one sub-trellis iteration.
//
// Branch 2*i+b ends in the next state handled by ACS unit i and starts in the
// present state whose least significant bit is b. The encoder register
// contents for that branch are {next state, b}: the input bit is the next
// state's most significant meaningful bit and the oldest bit is b. Output
// bit r of the encoder is the parity of those K bits masked with generator
// polynomial Conv_Coder[r], whose most significant meaningful bit taps the
// newest input. Generator bits above bit K-1 must be zero.
//
// Next states per ACS unit, from the state controller fields and C0 = PSY[0], bit 0 of the iteration counter:
//   0 {NSUY,C0,0}  1 {NSDY,C0,0}  2 {NSUY,C0,1}  3 {NSDY,C0,1}
//   4 {NSUA,~C0,1} 5 {NSDA,~C0,1} 6 {NSUA,~C0,0} 7 {NSDA,~C0,0}
// The ordering of units follows the source's next-state order A,H,B,G,E,D,F,C
// for an even iteration. Purely combinational.
module bmu_bmd
  import viterbi_pkg::*;
(
  input  gen_t              Conv_Coder [NSYM],
  input  logic              C0,
  input  id_t               NSUY,
  input  id_t               NSDY,
  input  id_t               NSUA,
  input  id_t               NSDA,
  output logic [NSYM-1:0]   Expected [2*NMEM]
);

  state_t next_state [NMEM];

  always_comb begin
    next_state[0] = {NSUY,  C0, 1'b0};
    next_state[1] = {NSDY,  C0, 1'b0};
    next_state[2] = {NSUY,  C0, 1'b1};
    next_state[3] = {NSDY,  C0, 1'b1};
    next_state[4] = {NSUA, ~C0, 1'b1};
    next_state[5] = {NSDA, ~C0, 1'b1};
    next_state[6] = {NSUA, ~C0, 1'b0};
    next_state[7] = {NSDA, ~C0, 1'b0};
    for (int i = 0; i < NMEM; i++) begin
      for (int b = 0; b < 2; b++) begin
        for (int r = 0; r < NSYM; r++) begin
          Expected[2*i+b][r] = ^({next_state[i], b[0]} & Conv_Coder[r]);
        end
      end
    end
  end

endmodule
