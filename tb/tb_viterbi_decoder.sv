// End-to-end testbench of the reconfigurable Viterbi decoder at its default
// sizes.
//
// A convolutional encoder in the testbench encodes messages with the
// configured K, rate and generator polynomials; the code bits become 3-bit
// soft symbols (7 for a 1, 0 for a 0), optionally with some symbols replaced
// by random levels, and are fed through the collector one symbol per cycle,
// pausing while the input FIFO is full. Every decoded bit is compared with a
// behavioural Viterbi decoder written over the full state space (no folding,
// no memory arrangement): same cost table, saturating 16-bit metrics, blocks
// of TracebackDepth steps traced back from the best final state, the same
// tie rules (a tie between predecessors keeps the one ending in 0; a tie for
// the best final state keeps the state the decoder's memory order puts last).
// For noiseless input the decoded bits must also equal the message.
//
// The cases are the decoder configurations of the source's simulations
// (K = 4..7, traceback depths 7, 11 and 15, rates 1/2 and 1/3, several K = 7
// messages, and its three received words with corrupted soft symbols), followed by
// random configurations with several blocks and noise. The testbench counts
// how often each mechanism occurred: input FIFO full, survivor memory full
// stall, traceback in both LIFO directions, both router settings, both
// rates, every K, and a corrected channel error. Inputs change on the
// falling edge.
//
// Before those cases, the two K=3 decoders beside it in the top get 60 blocks of
// 8 pairs each (hard: 0..2 flipped bits; soft: random strong/weak levels),
// checked against the K=3 behavioural decoder and, when noiseless, against
// the message; their blocks and corrections are counted too. The
// reference's tie rules and saturation are this design's
// choices; the cost table values are this testbench's own.
module tb_viterbi_decoder;
  import viterbi_pkg::*;
  import tb_k3_pkg::*;

  logic   clk = 1'b0;
  logic   reset;
  sym_t   demod;
  logic   valid;
  logic   rate;
  k_t     k;
  depth_t depth;
  gen_t   gen [NSYM];
  tbl_t   table_v [1 << SYM_W];
  logic   fifo_full, tb_data, tb_w_en;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_fifo_full = 0, n_sm_stall = 0, n_dir0 = 0, n_dir1 = 0, n_sel1 = 0;
  int n_rate2 = 0, n_rate3 = 0, n_corrected = 0;
  int n_k [8];
  int n_k3_blocks = 0, n_k3_corrected = 0;

  logic       k3h_we, k3s_we, k3h_val, k3s_val;
  logic [1:0] k3h_d;
  logic [3:0] k3s_d;
  logic [2:0] k3h_inst, k3s_inst;
  logic [7:0] k3h_sd, k3s_sd;
  logic [7:0] k3h_q [$], k3s_q [$];

  always #5 clk = ~clk;

  viterbi_decoder dut (
    .Clk            (clk),
    .Reset          (reset),
    .DEMODDATA      (demod),
    .Valid          (valid),
    .Rate           (rate),
    .K              (k),
    .TracebackDepth (depth),
    .Conv_Coder     (gen),
    .BMUTABLE       (table_v),
    .Fifo_Full      (fifo_full),
    .TB_data        (tb_data),
    .TB_W_En        (tb_w_en),
    .K3H_W_En        (k3h_we),
    .K3H_Demod_Data  (k3h_d),
    .K3H_PresentInst (k3h_inst),
    .K3H_SD          (k3h_sd),
    .K3H_SD_Valid    (k3h_val),
    .K3S_W_En        (k3s_we),
    .K3S_Demod_Data  (k3s_d),
    .K3S_PresentInst (k3s_inst),
    .K3S_SD          (k3s_sd),
    .K3S_SD_Valid    (k3s_val)
  );

  // K=3 decoders: compare each decoded block with the queued expectation.
  always @(posedge clk) begin
    if (!reset && k3h_val) begin
      checks++;
      n_k3_blocks++;
      if (k3h_q.size() == 0 || k3h_sd != k3h_q[0]) begin failures++; $display("K3 hard block %b", k3h_sd); end
      if (k3h_q.size() != 0) void'(k3h_q.pop_front());
    end
    if (!reset && k3s_val) begin
      checks++;
      if (k3s_q.size() == 0 || k3s_sd != k3s_q[0]) begin failures++; $display("K3 soft block %b", k3s_sd); end
      if (k3s_q.size() != 0) void'(k3s_q.pop_front());
    end
  end

  initial begin
    k3h_we = 0; k3s_we = 0; k3h_d = 0; k3s_d = 0;
  end

  // Runs before the reconfigurable decoder's cases (which reset the design).
  task automatic run_k3();
    logic [3:0] hrx [8], srx [8];
    @(negedge clk);
    repeat (60) begin
      automatic logic [7:0] msg = 8'($urandom);
      automatic int nerr = $urandom_range(0, 2);
      automatic logic [1:0] st = 2'b00;
      automatic logic [7:0] hw, sw;
      for (int t = 0; t < 8; t++) begin
        automatic logic [1:0] e = enc(st, msg[t]);
        hrx[t] = {2'b00, e};
        srx[t] = {e[1] ? 2'($urandom_range(2, 3)) : 2'($urandom_range(0, 1)),
                  e[0] ? 2'($urandom_range(2, 3)) : 2'($urandom_range(0, 1))};
        st = {msg[t], st[1]};
      end
      for (int i = 0; i < nerr; i++) hrx[$urandom_range(0, 7)][$urandom_range(0, 1)] ^= 1'b1;
      hw = decode(1'b0, hrx, 8, 5);
      sw = decode(1'b1, srx, 8, 14);
      checks++;
      if (sw != msg || (nerr == 0 && hw != msg)) begin failures++; $display("K3 model mismatch"); end
      if (nerr > 0 && hw == msg) n_k3_corrected++;
      k3h_q.push_back(hw); k3s_q.push_back(sw);
      for (int t = 0; t < 8; t++) begin
        k3h_d = hrx[t][1:0]; k3s_d = srx[t]; k3h_we = 1; k3s_we = 1;
        @(negedge clk);
        if ($urandom_range(0, 2) == 0) begin
          k3h_we = 0; k3s_we = 0;
          @(negedge clk);
        end
      end
      k3h_we = 0; k3s_we = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
  endtask

  // collected decoder output
  logic out_q [$];
  always @(posedge clk) begin
    if (!reset && tb_w_en) out_q.push_back(tb_data);
    if (!reset && fifo_full) n_fifo_full++;
    if (!reset && dut.u_viterbi_core.sm_full &&
        dut.u_viterbi_core.u_main_controller.state == dut.u_viterbi_core.u_main_controller.S_ITER)
      n_sm_stall++;
    if (!reset && dut.u_viterbi_core.it_w_en && dut.u_viterbi_core.c[0]) n_sel1++;
    if (!reset && dut.u_viterbi_core.start_tb && dut.u_viterbi_core.tb_r_en) begin
      if (dut.u_viterbi_core.u_survivor_memory.rpar) n_dir1++;
      else n_dir0++;
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  function automatic int unsigned parity(input int unsigned x);
    int unsigned p = 0;
    for (int i = 0; i < 32; i++) p ^= (x >> i) & 1;
    return p;
  endfunction

  function automatic int unsigned cost(input int unsigned bitv, input int unsigned lvl);
    return bitv ? table_v[lvl] : table_v[7 - lvl];
  endfunction

  // symbols: 3 per step; returns decoded bits in output order
  function automatic void ref_decode(input int kk, input int d, input int nsteps,
                                     input int unsigned sy [$], ref logic res [$]);
    int n = kk - 1;
    int ns = 1 << n;
    int unsigned mask = ns - 1;
    int unsigned pm [64];
    int unsigned npm [64];
    bit surv [$][64];
    bit row [64];
    res.delete();
    for (int s = 0; s < ns; s++) pm[s] = (s == 0) ? 0 : 32768;
    for (int t = 0; t < nsteps; t++) begin
      for (int nx = 0; nx < ns; nx++) begin
        int unsigned m [2];
        for (int b = 0; b < 2; b++) begin
          int unsigned p = ((nx << 1) & mask) | b;
          int unsigned win = (nx << 1) | b;
          int unsigned bm = 0;
          for (int r = 0; r < 3; r++) bm += cost(parity(win & gen[r]), sy[3*t + r]);
          m[b] = pm[p] + bm;
          if (m[b] > 65535) m[b] = 65535;
        end
        row[nx] = (m[1] < m[0]);
        npm[nx] = row[nx] ? m[1] : m[0];
      end
      surv.push_back(row);
      pm = npm;
      if ((t + 1) % d == 0) begin
        // best final state, in the decoder's memory order
        int unsigned best = 0, bests = 0;
        bit first = 1;
        int iters = 1 << (kk - 4);
        for (int loc = 0; loc < 8; loc++) begin
          int unsigned lbest = 0, lstate = 0;
          for (int a = 0; a < iters; a++) begin
            int unsigned st = (a << 2) | (loc & 3);
            if (loc >= 4) st = ~st & mask;
            if (a == 0 || pm[st] < lbest) begin
              lbest = pm[st];
              lstate = st;
            end
          end
          if (first || lbest <= best) begin
            best = lbest;
            bests = lstate;
            first = 0;
          end
        end
        for (int tt = t; tt > t - d; tt--) begin
          res.push_back(bests[n-1]);
          bests = ((bests << 1) | surv[tt][bests]) & mask;
        end
      end
    end
  endfunction

  // ---------------- stimulus ----------------
  task automatic do_reset();
    reset = 1'b1;
    valid = 1'b0;
    demod = '0;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    @(posedge clk);
  endtask

  // one symbol per cycle (or one every gap+1 cycles); inputs change on the
  // falling edge, and the last symbol of a group waits while the FIFO is full
  task automatic send(input int unsigned sy [$], input int nsteps, input int nsym,
                      input int gap);
    for (int t = 0; t < nsteps; t++) begin
      for (int r = 0; r < nsym; r++) begin
        @(negedge clk);
        if (r == nsym - 1) begin
          valid = 1'b0;
          while (fifo_full) @(negedge clk);
        end
        valid = 1'b1;
        demod = sym_t'(sy[3*t + r]);
        for (int g = 0; g < gap; g++) begin
          @(negedge clk);
          valid = 1'b0;
        end
      end
    end
    @(negedge clk);
    valid = 1'b0;
  endtask

  // encode, optionally corrupt, run DUT and reference, compare
  task automatic run_case(input string name, input int kk, input int d, input bit r3,
                          input gen_t g0, input gen_t g1, input gen_t g2,
                          input bit msg [$], input int noise_pct, input int gap,
                          input bit use_rx, input int unsigned rx [$]);
    int n = kk - 1;
    int unsigned regv = 0;
    int unsigned sy [$];
    bit code_err = 0;
    logic ref_out [$];
    logic exp_msg [$];
    int nsteps = msg.size();
    int nblocks = nsteps / d;
    int timeout;
    k = k_t'(kk);
    depth = depth_t'(d);
    rate = r3;
    gen[0] = g0; gen[1] = g1; gen[2] = r3 ? g2 : '0;
    do_reset();
    out_q.delete();
    for (int t = 0; t < nsteps; t++) begin
      int unsigned win = (msg[t] << n) | regv;
      for (int r = 0; r < 3; r++) begin
        int unsigned lvl = parity(win & gen[r]) ? 7 : 0;
        if (r == 2 && !r3) lvl = 0;  // third collector register stays 0 at rate 1/2
        else if (use_rx) lvl = rx[3*t + r];
        else if (($urandom % 100) < noise_pct) lvl = $urandom % 8;
        if (lvl != (parity(win & gen[r]) ? 7 : 0)) code_err = 1;
        sy.push_back(lvl);
      end
      regv = win >> 1;
    end
    ref_decode(kk, d, nsteps, sy, ref_out);
    for (int b = 0; b < nblocks; b++)
      for (int i = d - 1; i >= 0; i--) exp_msg.push_back(msg[b*d + i]);
    send(sy, nsteps, r3 ? 3 : 2, gap);
    timeout = 0;
    while (out_q.size() < ref_out.size() && timeout < 5000) begin
      @(posedge clk);
      timeout++;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (out_q.size() != ref_out.size()) begin
      failures++;
      $display("%s: %0d decoded bits, expected %0d", name, out_q.size(), ref_out.size());
    end else begin
      bit match_msg = 1;
      for (int i = 0; i < ref_out.size(); i++) begin
        checks++;
        if (out_q[i] !== ref_out[i]) begin
          failures++;
          $display("%s: bit %0d decoded %0b, reference %0b", name, i, out_q[i], ref_out[i]);
        end
        if (out_q[i] !== exp_msg[i]) match_msg = 0;
      end
      if (!code_err || use_rx) begin
        checks++;
        if (!match_msg) begin
          failures++;
          $display("%s: decoded bits differ from the message", name);
        end
      end
      if (code_err && match_msg) n_corrected++;
    end
    n_k[kk]++;
    if (r3) n_rate3++; else n_rate2++;
  endtask

  function automatic void bits_of(input string s, ref bit q [$]);
    q.delete();
    foreach (s[i]) q.push_back(s[i] == "1");
  endfunction

  initial begin
    bit msg [$];
    int unsigned none [$];
    int unsigned rx [$];
    string m7 [5];
    m7 = '{"0101010", "1010101", "1100101", "0000000", "1111111"};
    table_v = '{8'd160, 8'd135, 8'd113, 8'd85, 8'd60, 8'd40, 8'd25, 8'd19};
    foreach (n_k[i]) n_k[i] = 0;
    k = 3'd4; depth = 5'd7; rate = 1'b0;
    gen[0] = '0; gen[1] = '0; gen[2] = '0;

    do_reset();
    run_k3();

    // configurations of the source's simulations
    bits_of("1101111", msg);
    run_case("K4", 4, 7, 0, 7'b0001101, 7'b0001111, 7'b0, msg, 0, 0, 0, none);
    run_case("K5", 5, 7, 0, 7'b0011011, 7'b0011111, 7'b0, msg, 0, 0, 0, none);
    run_case("K6", 6, 7, 0, 7'b0110011, 7'b0111111, 7'b0, msg, 0, 0, 0, none);
    run_case("K7", 7, 7, 0, 7'b1101011, 7'b1110001, 7'b0, msg, 0, 0, 0, none);
    bits_of("10100011010", msg);
    run_case("TB11", 6, 11, 0, 7'b0110011, 7'b0111111, 7'b0, msg, 0, 0, 0, none);
    bits_of("101000110101111", msg);
    run_case("TB15", 6, 15, 0, 7'b0110011, 7'b0111111, 7'b0, msg, 0, 0, 0, none);
    bits_of("1010001", msg);
    run_case("R12", 6, 7, 0, 7'b0110011, 7'b0111111, 7'b0, msg, 0, 0, 0, none);
    run_case("R13", 6, 7, 1, 7'b0110011, 7'b0111111, 7'b0111011, msg, 0, 0, 0, none);
    foreach (m7[i]) begin
      bits_of(m7[i], msg);
      run_case({"K7msg", m7[i]}, 7, 7, 0, 7'b1101011, 7'b1110001, 7'b0, msg, 0, 0, 0, none);
    end
    // received word with corrupted symbols, decoded back to 1111111
    bits_of("1111111", msg);
    rx = '{7,4,0, 0,0,0, 0,5,0, 7,6,0, 7,3,0, 0,7,0, 6,0,0};
    run_case("ERR", 7, 7, 0, 7'b1101011, 7'b1110001, 7'b0, msg, 0, 0, 1, rx);
    // two further received words with soft errors in most symbols
    bits_of("1010101", msg);
    rx = '{7,4,0, 4,5,0, 3,1,0, 2,7,0, 7,0,0, 6,4,0, 1,5,0};
    run_case("ERR2", 7, 7, 0, 7'b1101011, 7'b1110001, 7'b0, msg, 0, 0, 1, rx);
    bits_of("1110100", msg);
    rx = '{7,4,0, 4,1,0, 3,5,0, 2,1,0, 3,3,0, 6,4,0, 1,3,0};
    run_case("ERR3", 7, 7, 0, 7'b1101011, 7'b1110001, 7'b0, msg, 0, 0, 1, rx);

    // random configurations, several blocks, with and without noise
    for (int c = 0; c < 24; c++) begin
      int kk, d, nb;
      bit r3;
      gen_t g0, g1, g2;
      kk = 4 + (c % 4);
      d = 1 + ($urandom % 16);
      r3 = 1'($urandom % 2);
      nb = 2 + ($urandom % 3);
      g0 = gen_t'(($urandom % (1 << kk)) | (1 << (kk - 1)) | 1);
      g1 = gen_t'(($urandom % (1 << kk)) | (1 << (kk - 1)) | 1);
      g2 = gen_t'(($urandom % (1 << kk)) | (1 << (kk - 1)) | 1);
      msg.delete();
      for (int i = 0; i < nb * d; i++) msg.push_back($urandom % 2);
      run_case($sformatf("rand%0d", c), kk, d, r3, g0, g1, g2, msg,
               (c % 3 == 0) ? 0 : 4, (c % 5 == 4) ? 3 : 0, 0, none);
    end

    // every mechanism must have happened
    checks++; if (n_fifo_full == 0) begin failures++; $display("input FIFO never full"); end
    checks++; if (n_sm_stall == 0) begin failures++; $display("survivor memory never stalled the trellis"); end
    checks++; if (n_dir0 == 0 || n_dir1 == 0) begin failures++; $display("LIFO direction not both used"); end
    checks++; if (n_sel1 == 0) begin failures++; $display("router never in odd-iteration setting"); end
    checks++; if (n_rate2 == 0 || n_rate3 == 0) begin failures++; $display("rate not both used"); end
    checks++; if (n_corrected == 0) begin failures++; $display("no channel error corrected"); end
    checks++; if (n_k3_blocks != 60 || k3h_q.size() != 0 || k3s_q.size() != 0) begin
      failures++; $display("K=3 decoders: %0d of 60 blocks", n_k3_blocks);
    end
    checks++; if (n_k3_corrected == 0) begin failures++; $display("K=3 hard decoder corrected no error"); end
    for (int kk = 4; kk <= 7; kk++) begin
      checks++; if (n_k[kk] == 0) begin failures++; $display("K=%0d never run", kk); end
    end
    $display("mechanisms: fifo_full=%0d sm_stall=%0d lifo_up=%0d lifo_down=%0d sel1=%0d rate1/2=%0d rate1/3=%0d corrected=%0d k3_blocks=%0d k3_corrected=%0d",
             n_fifo_full, n_sm_stall, n_dir0, n_dir1, n_sel1, n_rate2, n_rate3, n_corrected,
             n_k3_blocks, n_k3_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
