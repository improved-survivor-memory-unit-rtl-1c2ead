# Viterbi decoder with state-label survivor memories

A Viterbi decoder spends most of its area, power and latency in the survivor
memory unit (SMU). The SMU remembers the add-compare-select (ACS) decisions
until the survivor paths have merged, then reads the decoded bits back out.
The classic options each have a weakness:

* Traceback memory (TBM) is small but slow. It stores one decision bit per
  state per stage and walks back one stage per clock.
* Register exchange (REA) is fast but big. It needs N x D registers and
  N x D multiplexers, all switching every clock.
* Hybrid schemes mix the two and inherit some of both costs.

This design rests on a single fact about feedforward convolutional codes.
**A trellis state is the encoder's shift register, so a state label *is*
the last V decoded input bits.** If the survivor memory stores state labels
instead of decision bits, three things follow:

* One label read gives V decoded bits at once.
* A traceback can jump V stages per step instead of one.
* No decision unit (no "which input led here" lookup) is needed.

The RTL builds three survivor memories on this idea, all fed from one
decision stream:

| unit | idea | storage | multiplexers | output |
|---|---|---|---|---|
| `frea_smu` (facilitated register exchange) | register exchange of labels, one multiplexer column per BS stages | N·D bits of registers | N·D/BS (V-bit 2:1) | BS bits every BS stages, latency D |
| `shtbm_smu` (stage-hopping traceback) | traceback memory holding one label row per BS stages; each traceback step hops BS stages | (D+H)/BS + (D+H)/BS² + 2 rows × N·V bits | one column (the row builder) | H bits per traceback |
| `ihy_smu` (improved hybrid) | register exchange of labels over DP stages; the segments are stored and traced back DP stages per clock | (D+H)/DP + (D+H)/DP² + 2 rows × N·(DP/BS)·V bits | N·DP/BS | H bits per traceback |

BS (block size) is the number of stages one label covers. For a rate-1/n
code with one shift register, BS = V = K−1.

## Code and state numbering

The default code is the rate-1/2, K = 7 code of DVB-T, with generators
171 and 133 octal and 64 states. These constants are in `rtl/vit_pkg.sv`;
every module takes them as parameters.

* **State.** State `i` is the encoder register after an input. Its MSB is
  the newest input and its LSB the oldest.
* **Transitions.** Input `u` moves state `p` to `{u, p[V-1:1]}`. So the
  predecessors of `i` are `p = ((i << 1) mod N) | d`.
* **Decision bit.** `d = 0` picks the upper predecessor and `d = 1` the
  lower one. This is the numbering of the four-state example used below.
* **Decoded bits.** The top BS bits of a label at stage t are the inputs of
  stages t−BS+1 … t. Every output word puts the oldest bit in bit 0.
* **Encoder outputs.** With the register contents `{u, p}` (MSB = tap on
  the current input), `c0 = ^(G0 & {u,p})` and `c1 = ^(G1 & {u,p})`.

## The facilitated register-exchange column (`frea_column`)

This component is the key to all three units. A column holds one V-bit
label per state and has one 2:1 multiplexer per state:

    sel[i]  = regs[((i<<1) mod N) | dec[i]]        (combinational)
    regs[i] <= set_initial ? load[i] : sel[i]      (each stage)

Each stage, every label moves one step along the survivor path. The
decisions only steer the multiplexers and are never stored.

Suppose the column is loaded with the identity (0 … N−1) at a block
boundary b, and then runs for BS stages. Register `i` then holds the state
that the survivor ending in `i` passed at stage b. That one label stands
for BS decoded bits. A plain register exchange would need BS multiplexer
columns to get the same result.

Four-state example, starting from (0,1,2,3):

* decisions (0,0,0,1) give (0,2,0,3);
* decisions (0,1,1,0) then give (0,3,2,0).

`tb_frea_column` checks exactly this sequence.

### Chaining columns (`frea_smu`)

`frea_smu` chains C = D/BS columns. `set_initial` is high on every stage
that ends a block (stage number a multiple of BS). At that stage:

* column 0 loads the identity;
* column c loads the *exchanged* labels `sel` of column c−1.

The shift and the exchange for that stage therefore happen in the same
clock, and no stage is lost at the boundary. Column c then holds, for each
state, the label BS·c stages before the last boundary.

At a boundary stage b, the label leaving the last column on the best
state's row is the state at stage b−D. Its top BS bits are output the next
clock as the inputs of stages b−D−BS+1 … b−D. The first block comes at
stage D+BS.

## Stage-hopping traceback (`shtbm_smu`)

One `frea_column`, loaded with the identity at each boundary, builds a
*row*. At the end of the block, the row gives for every state the state its
survivor passed BS stages earlier. That row is written into `smu_ram`, so
the memory holds one row per BS stages.

Every H stages (at a boundary T, once D+H stages have arrived), a traceback
starts from the ACS's best state at T:

| clock after T | action |
|---|---|
| 1 | prime: read row T |
| 2 … | hop h: next state = `row[state]`, and read the row BS stages further back |
| hops 0 … D/BS−1 | acquisition: walk back to the state at T−D |
| hops D/BS … (D+H)/BS−1 | decode: put the top BS bits of each state into the output word |
| (D+H)/BS + 2 | `out_valid`: `out_bits[j]` is the input of stage T−D−H+1+j |

At the defaults (D = 36, H = 12, BS = 6) a traceback takes 9 clocks. That
is under the 12 stages between tracebacks, so one traceback engine keeps up
with one stage per clock. An elaboration-time assertion requires
(D+H)/BS + 1 ≤ H.

Of those clocks, (D+H)/BS − 1 read a row; the last state needs no read.
The memory has 11 rows of 384 bits: the 8 rows a traceback spans, plus
room for the rows written while it runs (one every BS clocks at full
rate). The RAM reads a whole row with a registered output, and the label
of the current state is picked after the read. That gives one hop per clock with a synchronous-read memory.

## Improved hybrid (`ihy_smu`)

Here the partial register exchange is itself facilitated: CP = DP/BS
chained columns, exactly as in `frea_smu`. Every DP stages, all columns'
exchanged labels are stored as one segment row. For state i the segment is
{state at T−BS, …, state at T−DP}.

* **Pointer.** The oldest label of a segment points to the segment before.
* **Decoded bits.** The state itself plus the other labels are the segment's
  DP decoded bits.

Tracing back and decoding are therefore one multiplexer operation. A
traceback reads (D+H)/DP rows, one per clock, and releases the same H-bit
word as `shtbm_smu`, (D+H)/DP + 2 clocks after its start (6 clocks at the
defaults). Its memory has 6 rows of 768 bits. DP must be a multiple of
BS, and D and H multiples of DP. The default DP = 2·BS gives a
two-column exchange.

## Front end

* **`branch_metric`.** 3-bit soft samples (0 = sure '0', 7 = sure '1'). The
  metric of a code pair is its distance to the received pair. The output is
  registered.
* **`acs_unit`.** Adds and compares for all states in one clock. Path
  metrics are 10-bit and compared modulo 2^10, so no normalisation is
  needed. The smaller candidate wins, and a tie goes to the upper branch.
  The unit also outputs the best state (smallest metric, lowest index on a
  tie). At reset state 0 has metric 0 and all other states 128, matching an
  encoder that starts from zero.
* **`conv_encoder`.** The matching encoder. It stands beside the decoder in
  `viterbi_top` with its own ports.

A received symbol becomes a decision vector two clocks later. The decoder
accepts at most one symbol per clock, and `rx_valid` may drop at any time.

## Parameters

| parameter | default | meaning / constraint |
|---|---|---|
| `V` | 6 | encoder memory; N = 2^V states; V ≥ 2 |
| `G0`, `G1` | 171, 133 (octal) | generators, MSB = tap on the current input |
| `SW` | 3 | soft sample width |
| `PM_W` | 10 | path metric width; the metric spread must stay below 2^(PM_W−1) |
| `BS` | 6 (= V) | stages per label, 1 ≤ BS ≤ V |
| `D` | 36 | survivor depth (about 5·K), multiple of BS (and of DP) |
| `H` | 12 | bits per traceback, multiple of DP; (D+H)/BS + 1 ≤ H |
| `DP` | 12 | partial exchange length of `ihy_smu`, multiple of BS |

## Departures and limits

* **Choices of this design.** The following are not fixed by the method and
  were chosen here:
  * the generators;
  * the soft sample width and the metric form;
  * the metric width, the tie rules and the start state;
  * D = 36 and H = 12;
  * DP = 2·BS;
  * traceback starting from the best state;
  * release of the H bits as one word.
* **Row builder.** The stage-hopping method describes the in-block update
  as copying between two alternating memory rows (the order depends on
  whether BS is odd or even). Here one register column does the same
  update, so the two-row ping-pong and its parity rule do not appear.
* **Supported codes.** Only rate-1/n codes with one shift register (k = 1)
  are built. For codes with several registers of different lengths, BS
  would be the length of the shortest register; that case is not
  implemented. Recursive (feedback) codes cannot use this method, because
  their states are not input bits.
* **Not built.** The conventional TBM, REA and hybrid units are the
  references the method is compared against, and are not part of this RTL.
  Power was not estimated.
* **Traceback rate.** One traceback engine per unit overlaps the ACS and
  keeps one stage per clock, so a traceback must finish within H stages:
  (D+H)/BS + 1 ≤ H for `shtbm_smu` and (D+H)/DP + 1 ≤ H for `ihy_smu`.
  Small-H settings such as H = D/2 with BS = 2 are rejected at
  elaboration. They would need a source that slows down during
  tracebacks, and no such input-ready path is built.
* **Decoding performance.** Over a simulated AWGN channel all three units
  come within a factor of about 2 of the published BER of the
  stage-hopping decoder. At D = 36: 5.9e-4 at 3 dB and 3.0e-5 at 4 dB. At
  D = 54, H = 18: 5.3e-4 and 3.1e-5. The published values are 3.6e-4 and
  1.6e-5. The longer survivor barely helps, so the gap comes from the
  3-bit quantisation of the channel samples rather than from the survivor
  memories. (`ber_awgn_run` holds the experiment; the two `tb_ber_awgn`
  testbenches set its parameters.)

## Verification

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_conv_encoder` | code pairs and register against a convolution of the input history |
| `tb_branch_metric` | all four metrics for random samples |
| `tb_acs_unit` | decisions and best state of all 64 states against an unbounded-integer model |
| `tb_frea_column` | the four-state worked example, then 64 states with random decisions and loads |
| `tb_smu_ram` | random reads and writes, including same-address and read-enable-low cycles |
| `tb_frea_smu`, `tb_shtbm_smu`, `tb_ihy_smu` | random decision vectors and best states; every output against a one-stage-at-a-time reference traceback, and the exact clock of every output |
| `tb_viterbi_top` | end to end at the default parameters (see below) |
| `tb_viterbi_k3` | the same end-to-end test on the four-state code (7, 5 octal) with BS = 2, DP = 4, D = 8, H = 12, where rows arrive every 2 clocks during a traceback |
| `tb_ber_awgn` | BER at 1–4 dB Eb/N0 over an AWGN channel, for each unit, at the defaults, against the published figures for a 35-stage survivor |
| `tb_ber_awgn_case3` | the same at D = 54, H = 18, DP = 18 (72 stages), against the published figures for a 70-stage stage-hopping survivor |

`tb_viterbi_top` runs at the default parameters: 4000 message bits, about
300 channel bit errors, and random input stalls. It requires that all three
units reproduce the message exactly, with the right timing. It also
requires that every mechanism occurs: column shifts, row writes, segment
writes, tracebacks, hop reads and corrected errors.

To simulate with Verilator (the package goes first):

    verilator --binary --timing -Wno-fatal --top-module tb_viterbi_top \
        -y rtl -y tb +libext+.sv rtl/vit_pkg.sv tb/tb_viterbi_top.sv
    ./obj_dir/Vtb_viterbi_top

Any other testbench runs the same way with its name. Lint with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/vit_pkg.sv rtl/<module>.sv`.
