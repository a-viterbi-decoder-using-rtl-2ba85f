# Reconfigurable soft-decision Viterbi decoder on a folded 8-state trellis

This is a Viterbi decoder for convolutional codes. Four things are set at run
time:

- the constraint length, K = 4 to 7;
- the code rate, 1/2 or 1/3;
- the generator polynomials and the soft-decision cost table;
- the traceback depth, 1 to 16.

A K = 7 code has 64 trellis states. The decoder does not build 64
add-compare-select (ACS) units. It has a single 8-state slice of the
trellis, called the sub-trellis, and runs it 2^(K-4) times per received
symbol group: once at K = 4 and eight times at K = 7. The area therefore
stays roughly that of an 8-state decoder, and the number of cycles per
decoded bit grows with K.

The hard part of folding a trellis is the routing of path metrics between
iterations. This design solves it with one idea:

- The eight path-metric memories do not store plain state numbers.
- Half of them store states whose number is complemented.
- With that arrangement, every memory is read at the address equal to the
  iteration counter.
- The write side needs only a two-way router between the ACS outputs and the
  memories.

Beside it, the same top level carries two small fixed decoders for the
K = 3, rate 1/2 code: one for hard-decision and one for soft-decision input.
They are the simpler decoders from which the reconfigurable one grew (see
"The fixed K = 3 decoders" below).

The architecture follows a thesis on area-efficient Viterbi decoders written
in SystemC. This RTL is an independent SystemVerilog implementation of it.

## Data flow

```
DEMODDATA/Valid -> collector -> input_fifo -> [main_controller drives C]
                                   |
                 state_controller -> bmu -> subtrellis (8 ACS, statemux,
                                               8 drdpram, min_path, min_path_conv)
                                                  | survivor bits   | best state
                                           survivor_memory (LIFO) -> traceback_controller
                                                                      -> TB_data / TB_W_En
```

- **collector**
  - Receives one 3-bit soft symbol per `Valid`. Level 7 is the surest 1 and
    level 0 the surest 0.
  - Groups 2 symbols (rate 1/2, `Rate = 0`) or 3 symbols (rate 1/3,
    `Rate = 1`).
  - Pulses `we_out` in the cycle after a group is complete.
- **input_fifo**
  - A circular buffer of 9-bit groups `{s2, s1, s0}` with 16 entries, 15 of
    them usable.
  - `Full` is raised when R_Addr − W_Addr = 1.
- **main_controller**: runs one trellis step per group.
  1. Pulses `Initial` once after reset.
  2. Reads one group from the FIFO.
  3. Counts C = 0 to 2^(K-4)−1. Each count writes path metrics and survivor
     bits. A count waits while the survivor memory is `Full`.
  4. Pulses `End_Trellis`.
  5. A step takes 2^(K-4)+2 cycles when nothing stalls.
- **state_controller**: combinational. It turns K and C into the state
  fields of the current iteration.
- **bmu**: the branch metric unit. Its parts are:
  - `bmu_bmd`: the expected encoder bits of the 16 branches.
  - `bmu_dmetric`: the table costs of each received symbol.
  - `bmu_bmetric`: the sums of those costs.
- **subtrellis**: eight ACS units, the router (`statemux`), eight path-metric
  memories (`drdpram`) and the best-state search (`min_path`,
  `min_path_conv`).
- **survivor_memory**: the LIFO that connects the trellis to the traceback.
- **traceback_controller**
  - Starts from the state with the smallest metric.
  - Walks back through one block of `TracebackDepth` steps.
  - Emits the decoded bits.

`viterbi_core` holds everything after the collector. `viterbi_decoder` is
the top level.

## The folded trellis

The state s has K−1 bits. The input bit enters at the top:
next = {input, s >> 1}. The encoder register for a branch is {input, s}. The
expected output bit r is `^({input, s} & Conv_Coder[r])`. Bit K−1 of a
generator taps the newest input, and generator bits above K−1 must be 0.

### Memory arrangement

There are eight memories, named A to H and numbered 0 to 7. Each holds
2^(K-4) path metrics. In iteration c, every memory is read at address c.
That address holds the following state:

| memory | state at address c |
|---|---|
| A, B, C, D (j = 0..3) | {c, j[1:0]} |
| E, F, G, H (j = 4..7) | ~{c, j[1:0]}, complemented over K−1 bits |

The four butterflies of an iteration are (A,B), (C,D), (F,E) and (H,G).

- The two states of a butterfly differ only in bit 0.
- Both states lead to the same two next states.
- The first memory of each pair holds the state that ends in 0.

### ACS units and router

ACS unit i takes the butterfly i/2. Its `StateMetric0` is the predecessor
with bit 0 = 0, and `BMETRIC[2i+b]` is the branch from the predecessor with
bit 0 = b. The units produce these next states (N = K−1, ~ over N bits):

| unit | next state | predecessors | memory, c even | memory, c odd |
|---|---|---|---|---|
| 0 | 2c | A / B | A | C |
| 1 | 2^(N-1) + 2c | A / B | H | F |
| 2 | 2c+1 | C / D | B | D |
| 3 | 2^(N-1) + 2c+1 | C / D | G | E |
| 4 | ~2c | F / E | E | G |
| 5 | ~(2^(N-1) + 2c) | F / E | D | B |
| 6 | ~(2c+1) | H / G | F | H |
| 7 | ~(2^(N-1) + 2c+1) | H / G | C | A |

So the router (`statemux`) has only two settings, chosen by bit 0 of c:

- c even: unit 0..7 → memories A,H,B,G,E,D,F,C.
- c odd: unit 0..7 → memories C,F,D,E,G,B,H,A.

The write address is one of two values:

- lo = c >> 1
- hi = 2^(K-4) − 1 − lo

For even c, memories A, B, E and F take lo, and C, D, G and H take hi. For
odd c the two groups swap.

Every memory has two register sets:

- The O-RAM holds the metrics of the current step and is read
  asynchronously.
- The I-RAM collects the metrics of the next step.

`End_Trellis` copies I to O. A step can therefore overwrite metrics that
later iterations of the same step still need to read.

The state controller gives the state fields (state bits K−2..2) as
PSY = C, PSA = ~C, NSUY = C>>1, NSDY = 2^(K-4) + (C>>1), NSUA = ~NSUY and
NSDA = ~NSDY. The BMU builds the next states of the eight units from
NSUY/NSDY/NSUA/NSDA and bit 0 of C. It then forms the 16 encoder registers
as {next state, b}.

### Path metrics

- ACS sums saturate at 2^16−1.
- On a tie, the predecessor with bit 0 = 0 survives.
- After reset, state 0 starts at metric 0 and every other state at 2^15.
  Memory A, address 0, is the one built to start at zero.
- Metrics carry on from one traceback block to the next.

### Best-state search

- Each memory reports its smallest O-RAM metric and that metric's address.
  On a tie within a memory, the lowest address wins.
- `min_path` picks the memory with the smallest value. On a tie between
  memories, the highest index wins.
- `min_path_conv` turns the pair (memory j, address c) back into a state:
  - memory j < 4: the state is {c, j[1:0]};
  - memory j ≥ 4: the state is the complement of {c, j[1:0]}.

## Survivor LIFO and traceback

Each iteration writes one 8-bit survivor word. Bit i is unit i's decision,
which is bit 0 of the predecessor it kept. The survivor memory holds 16
step slots, and each slot holds 2^(K-4) such words.

Writing a block:

1. The trellis writes a block of `TracebackDepth` steps.
2. When the block's last word is written, the block is handed over to the
   traceback.
3. `Start_Traceback` stays high until the traceback's first read.

Reading a block:

1. The traceback reads the block last step first, one word per step.
2. Each read frees a slot.
3. The trellis writes the next block into the freed slots. `Full` holds the
   trellis back only while the next slot to write has not been read yet.
4. Writing and traceback therefore overlap on a single set of registers.
5. Because of this, the slot order alternates from block to block: up, then
   down.

The traceback controller loads the best state s at the end of the block.
For each step back:

1. Let m be the top state bit and t the bit below it. Let v be s without m,
   and w = t ? ~v : v.
2. The state was produced in iteration T_Addr = w >> 1, by ACS unit
   {t, w[0], m ^ t}.
3. One read (`R_En`) of that word gives the survivor bit d.
4. The decoded bit of the step is m.
5. The previous state is ((s << 1) | d), masked to K−1 bits.

`TB_data` is valid during a one-cycle `TB_W_En` pulse. It takes two cycles
per bit.

**Output order:** bits come out block by block, and within a block the last
message bit comes first. Each block is traced from the best state at its own
end, with no overlap into the following block. The last few bits of a block
are therefore decided with less look-ahead than a sliding-window decoder
would use.

## Interface of `viterbi_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| Clk | in | 1 | clock, rising edge |
| Reset | in | 1 | synchronous, active high |
| DEMODDATA | in | 3 | soft symbol, 7 = surest 1 |
| Valid | in | 1 | DEMODDATA is a new symbol |
| Rate | in | 1 | 0: rate 1/2, 1: rate 1/3 |
| K | in | 3 | constraint length 4..7 |
| TracebackDepth | in | 5 | steps per traceback block, 1..16 |
| Conv_Coder | in | 3 × 7 | generator polynomials. Set the third to 0 at rate 1/2 |
| BMUTABLE | in | 8 × 8 | cost of receiving level v when a 1 was sent. The cost for a 0 is BMUTABLE[7−v] |
| Fifo_Full | out | 1 | hold back the last symbol of a group while high |
| TB_data, TB_W_En | out | 1, 1 | decoded bit and its strobe |
| K3H_W_En, K3S_W_En | in | 1 | K = 3 hard / soft decoder: take one received pair |
| K3H_Demod_Data | in | 2 | hard pair, first bit in bit 1 |
| K3S_Demod_Data | in | 4 | soft pair, two 2-bit levels, first in bits 3:2, 3 = strongest 1 |
| K3H_PresentInst, K3S_PresentInst | out | 3 | trellis cycle the next pair will fill |
| K3H_SD, K3S_SD | out | 8 | decoded block, bit t = message bit of cycle t |
| K3H_SD_Valid, K3S_SD_Valid | out | 1 | SD was just updated |

Usage rules:

- Keep all configuration inputs stable while decoding, and change them only
  during Reset.
- The cost table must give small costs to likely levels. The tests use
  {160, 135, 113, 85, 60, 40, 25, 19}.
- At rate 1/2 the third symbol register stays 0, so it adds the same cost to
  every branch.

Widths and sizes are set in `viterbi_pkg`:

- 3-bit symbols;
- 8-bit table entries;
- 10-bit branch metrics;
- 16-bit path metrics;
- traceback depth up to 16;
- a 16-entry FIFO.

## The fixed K = 3 decoders

`k3_viterbi_decoder` decodes the K = 3, rate 1/2 code with generators 111
and 101. It has a `SOFT` parameter. The top level holds one instance of
each kind, sharing only Clk and Reset with the main decoder.

- **Trellis (`k3_acsdpram`).** Four states, named by the two previous
  inputs with the newest in the high bit. Each state has:
  - a `k3_dpram` with one path-metric register, updated in place;
  - eight one-bit survivor registers, one per trellis cycle;
  - a `k3_acs` that chooses between the predecessors {b1, 0} and {b1, 1}.
  One `k3_bmu` gives the branch metric of each expected output 00..11.
  - Hard decision: Hamming distance, 2 bits.
  - Soft decision: each 2-bit level costs 19, 60, 113 or 160 (scaled
    −log probabilities); the pair's costs are summed into 9 bits.
  Path metrics are 5 bits (hard) and 14 bits (soft) and saturate.
- **Start of a block.** At cycle 0 each DPRAM hands the ACS a start metric
  instead of its register: 0 for state 00 and a value with only the top bit
  set for the others.
- **Traceback (`k3_tbu`).** After the 8th pair of a block,
  `k3_min_detector` picks the state with the smallest stored metric. The
  traceback is combinational. At each cycle, from 7 down to 0:
  - the decoded bit is the state's high bit;
  - a 4-way multiplexer picks that state's survivor bit;
  - the previous state is the state shifted left with the survivor bit
    entering at the right.
  The 8 bits are registered on SD with a one-cycle SD_Valid, one clock
  after the block's last W_En. A new block may start in that same cycle.
- **Ties.** In the ACS the tie goes to predecessor 1, as in the original's
  simulation of this ACS. The main decoder's ACS breaks ties the other way.
  The minimum detector keeps the lowest state.

## Design choices and limits

- **No metric normalisation.** Path metrics grow without bound and saturate.
  With the test table, the smallest metric grows by at least 57 per step. It
  reaches the 16-bit limit after about 1100 steps. Reset the decoder before
  that, or widen `PM_W`. The original design uses 14-bit state metrics for
  its fixed-K decoder. 16 bits is this design's choice.
- **State controller fields.** PSA, NSUA and NSDA are plain complements of
  PSY, NSUY and NSDY over K−3 bits. These match the original's state
  controller simulation and its state table, but they differ from its
  printed truth table.
  - The PSA output is left unconnected in the core, because the BMU needs
    only the next-state fields and C[0]. This is why lint reports an unused
    pin and unused PSY bits.
- **Survivor memory pointers.** The original describes moving the read
  pointer by whole groups of iteration words. Here a read selects one step
  slot plus the word `T_Addr`, and Full/Start/Stop come from step counters.
  The behaviour is the same: a LIFO per block, alternating direction, and
  Full while unread data would be overwritten.
- **Main controller.** Each step spends one extra cycle on `End_Trellis`.
  The original controller symbol has a TCC input that is not described, and
  this design does not have it.
- **Own choices, with no counterpart in the original:**
  - synchronous active-high reset;
  - FIFO depth;
  - table entry width;
  - saturation;
  - all tie rules except the ACS tie (which matches the original's ACS
    simulation) and the memory tie in `min_path`.
- **K = 3 decoders.** They decode separate blocks of 8 pairs, each
  starting from state 00. Not taken from the original, so this design's own:
  - the output register with SD_Valid;
  - the coding of the soft levels;
  - the generator polynomials, which the original does not print for this
    decoder. 111/101 reproduce its printed path metrics.
- **Not implemented:** the thesis's first, alternative reconfigurable
  architecture. Metric normalisation is also not implemented.

## Verification

Every block has a self-checking testbench in `tb/`, and
`tb_trellis_pkg.sv` holds shared reference helpers. Each testbench ends with
a line `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- `tb_viterbi_decoder` runs the top level with its default parameters.
  - **Cases:**
    - K = 4, 5, 6, 7 at depth 7;
    - depths 11 and 15;
    - rates 1/2 and 1/3;
    - five K = 7 messages;
    - three received words with soft errors that must decode to the sent
      message;
    - 24 random configurations, with and without noise.
  - **Reference model:** a straightforward full-state Viterbi decoder with
    the same tie rules.
  - **Mechanism counts:** the test fails if any of these never happens:
    - a full FIFO;
    - a survivor-memory stall;
    - both LIFO directions;
    - the odd-iteration router setting;
    - both rates;
    - every K;
    - corrected errors.
- The unit testbenches check each block against models written in terms of
  full state numbers. Several also use the original's tables:
  - the state controller and ACS simulations;
  - the MIN_PATH rows and the MIN_PATH_CONV table.
- `tb_main_controller` also checks the 2^(K-4)+2-cycle step.
- The K = 3 blocks have their own testbenches (`tb_k3_*`), with reference
  helpers in `tb_k3_pkg.sv`.
  - `tb_k3_acsdpram` reproduces the original's printed path metrics for the
    received pairs 01 00 01 00 00 01.
  - `tb_k3_viterbi_decoder` starts with the original's two-error example,
    which must decode to all zeros.
  - `tb_viterbi_decoder` also sends 60 blocks through each K = 3 decoder in
    the top level, and fails unless every block arrives and some errors are
    corrected.

To simulate with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_viterbi_decoder \
    -y rtl -y tb +libext+.sv rtl/viterbi_pkg.sv tb/tb_viterbi_decoder.sv
./obj_dir/Vtb_viterbi_decoder
```

Use the same command for any other `tb_<block>`. Testbenches that import
`tb_trellis_pkg` find it through `-y tb`.
