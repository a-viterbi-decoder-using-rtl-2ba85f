// VITERBI CORE: decodes groups of soft symbols with a folded trellis.
//
// Three processes run concurrently. The input FIFO buffers symbol groups
// coming from the collector. The main controller takes one group per trellis
// step and runs the 8-state SUBTRELLIS 2^(K-4) times (iteration counter C),
// with the STATE CONTROLLER naming the states of each iteration and the BMU
// computing their 16 branch metrics; path metrics go into the sub-trellis
// memories, survivor bits into the SURVIVOR MEMORY. Whenever TracebackDepth
// steps have been stored, the TRACEBACK CONTROLLER starts from the state with
// the smallest path metric and emits the block's decoded bits on
// TB_data/TB_W_En, last bit first, while the trellis already fills the
// survivor slots it has freed.
//
// Interface: W_Data/W_En write a group {symbol2, symbol1, symbol0} (3-bit
// soft values, 7 = surest 1) into the FIFO; Fifo_Full must be respected by
// the writer. K (4..7), TracebackDepth (1..16), Conv_Coder (generator
// polynomials, bit K-1 taps the newest input) and BMUTABLE (cost of each
// received level given a transmitted 1) are configuration inputs that must
// be stable while decoding; change them only under Reset. Reset is
// synchronous and active high; path metrics start with state 0 known.
//
// The state controller's PSA output is left unconnected on purpose: the BMU
// works from the next-state fields and needs no present-state field.
//
// The partition into these blocks and their signal names follow the source;
// the handshakes between them are this design's.
module viterbi_core
  import viterbi_pkg::*;
(
  input  logic                  Clk,
  input  logic                  Reset,
  input  k_t                    K,
  input  depth_t                TracebackDepth,
  input  gen_t                  Conv_Coder [NSYM],
  input  tbl_t                  BMUTABLE [1 << SYM_W],
  input  logic [NSYM*SYM_W-1:0] W_Data,
  input  logic                  W_En,
  output logic                  Fifo_Full,
  output logic                  TB_data,
  output logic                  TB_W_En
);

  logic [NSYM*SYM_W-1:0] fifo_data;
  logic   fifo_empty, fifo_r_en;
  logic   sm_full, sm_w_en, it_w_en, initial_pm, end_trellis;
  cnt_t   c;
  id_t    psy, nsuy, nsdy, nsua, nsda;
  sym_t   demod [NSYM];
  bm_t    bmetric [2*NMEM];
  logic [NMEM-1:0] probable, sm_rdata;
  state_t min_state;
  logic   tb_r_en, start_tb, stop_tb;
  addr_t  t_addr;

  input_fifo u_input_fifo (
    .Clk    (Clk),
    .Reset  (Reset),
    .W_Data (W_Data),
    .W_En   (W_En),
    .R_En   (fifo_r_en),
    .R_Data (fifo_data),
    .Empty  (fifo_empty),
    .Full   (Fifo_Full)
  );

  main_controller u_main_controller (
    .Clk             (Clk),
    .Reset           (Reset),
    .K               (K),
    .Full            (sm_full),
    .Empty           (fifo_empty),
    .Input_Fifo_R_En (fifo_r_en),
    .W_En            (sm_w_en),
    .Iteration_W_En  (it_w_en),
    .C               (c),
    .Initial         (initial_pm),
    .End_Trellis     (end_trellis)
  );

  state_controller u_state_controller (
    .K    (K),
    .C    (c),
    .PSY  (psy),
    .PSA  (),
    .NSUY (nsuy),
    .NSDY (nsdy),
    .NSUA (nsua),
    .NSDA (nsda)
  );

  always_comb begin
    for (int r = 0; r < NSYM; r++) demod[r] = fifo_data[r*SYM_W +: SYM_W];
  end

  bmu u_bmu (
    .DEMODDATA  (demod),
    .Conv_Coder (Conv_Coder),
    .PSY        (psy),
    .NSUY       (nsuy),
    .NSDY       (nsdy),
    .NSUA       (nsua),
    .NSDA       (nsda),
    .BMUTABLE   (BMUTABLE),
    .BMETRIC    (bmetric)
  );

  subtrellis u_subtrellis (
    .Clk         (Clk),
    .Reset       (Reset),
    .K           (K),
    .BMETRIC     (bmetric),
    .W_En        (it_w_en),
    .Initial     (initial_pm),
    .SEL         (c[0]),
    .PSY         (psy),
    .End_Trellis (end_trellis),
    .ProbablePat (probable),
    .Min_Path    (min_state)
  );

  survivor_memory u_survivor_memory (
    .Clk             (Clk),
    .Reset           (Reset),
    .K               (K),
    .TracebackDepth  (TracebackDepth),
    .WData           (probable),
    .WEn             (sm_w_en),
    .REn             (tb_r_en),
    .T_Addr          (t_addr),
    .RData           (sm_rdata),
    .Start_Traceback (start_tb),
    .Stop_Traceback  (stop_tb),
    .Full            (sm_full)
  );

  traceback_controller u_traceback_controller (
    .Clk             (Clk),
    .Reset           (Reset),
    .K               (K),
    .Start_Traceback (start_tb),
    .Stop_Traceback  (stop_tb),
    .Minimum_Path    (min_state),
    .R_Data          (sm_rdata),
    .R_En            (tb_r_en),
    .T_Addr          (t_addr),
    .TB_data         (TB_data),
    .TB_W_En         (TB_W_En)
  );

endmodule
