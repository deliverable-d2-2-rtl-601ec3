# Shuffled BICM-ID receiver for rotated QPSK (DVB-T2 LDPC, 64800 bits, rate 4/5)

This is a complete, synthesizable test chain for an **iterative BICM receiver
(BICM-ID) with signal space diversity**. A pseudo-random source feeds an IRA LDPC
encoder, a block bit interleaver and a rotated-QPSK mapper whose Q component is
sent D cells later than its I component. A channel emulator adds Rayleigh
fading, erasures and Gaussian noise. The receiver is the interesting part:

* a **main demapper** computes, for every received cell, the four scaled
  squared Euclidean distances (ECD) to the constellation points and the two
  max-log LLRs;
* a **decoder core** runs a vertically shuffled, normalized min-sum LDPC
  decoder that keeps three minima per check (MS3) on 90 variable nodes per
  clock cycle;
* **90 feedback demappers** run inside the decoding loop. Each variable node
  update produces an extrinsic value. Combined with the stored ECDs of its
  cell, it immediately recomputes the LLR of the other bit of that cell. The
  decoder therefore sees refined channel information within the same
  iteration, not one frame later.

Demapping and decoding are interleaved at the granularity of one 90-column
layer instead of whole frames. That is what makes the receiver iterative
without multiplying its latency.

The structure, the word widths and the sizes (64800-bit frames, rate 4/5,
360-column periodicity, 90 lanes, 15 iterations, QPSK) follow a published
FPGA prototype of such a receiver. The LDPC address table, the interleaver
depth, the rotation delay, the normalization factor and all control are this
design's own. They are listed under "Departures" below.

## The chain

```
prg -> ldpc_encoder -> bit_interleaver -> rotated_mapper (Q delayed D cells)
    -> channel_emulator (fading, erasure, noise per component)
    -> equalizer -> symbol_delay (I delayed D cells) -> rotated_demapper
    -> bicmid_core [ llr_ecd_ram, pi_table x P, demapper_feedback x P,
                     ldpc_vss_decoder (vss_node_unit x P) ]
    -> ber_counter
```

`bicmid_testbed` is the top. It has one clock domain and one synchronous
active-low reset. Its inputs are `run`, `snr` (Es/N0 in 0.25 dB steps),
`erasure` (probability in 1/2048 per component) and `llr_scale`
(2/sigma^2 with 4 fraction bits, to be set to match `snr`). Its outputs are
running counters: frames, bit errors, frame errors, bits compared, dropped
frames, converged frames, total iterations, erased components, feedback
updates, bank swaps and frames sent, plus an interleaver overrun flag.

The transmitter produces one coded bit per cycle, so a frame takes N cycles
to send. Decoding a frame takes at most `ITER * N/P + K/P + 1` cycles
(11377 cycles at the defaults), far less than N. The receiver is therefore
never overrun in this chain.

## Signal space diversity and cell pairing

A cell carries two bits, `b0` and `b1`. Before rotation, `b0` selects the
sign of I and `b1` the sign of Q. The point is rotated by 29 degrees, so that
each component alone still separates all four points. Q is then transmitted
D cells after I (`symbol_delay` inside `rotated_mapper`). Each component
fades and is erased independently. A deep fade or an erasure on one
component leaves the other component to carry the cell.

The receiver equalizes each component (`yeq = y/rho`, `csi = rho`). It then
delays I together with its CSI by the same D cells, so that both halves of a
cell meet again in `rotated_demapper`. The first D received components have
no partner and are skipped. An erased component has `csi = 0` and therefore
contributes nothing to the distances.

## Distances instead of samples

`rotated_demapper` stores, per cell, the four distances

    ECD_p = (csi_i*(yeq_i - a_p))^2 + (csi_q*(yeq_q - b_p))^2  scaled by 2/sigma^2

as 9-bit unsigned words, together with the max-log LLRs of both bits. The
decoding loop therefore never needs the samples, the CSI or the noise
variance again. For bit `t`, a feedback update is only

    LLR_t = max_{p: b_t(p)=0}(-ECD_p + [b_o(p)=0]*ext_o)
          - max_{p: b_t(p)=1}(-ECD_p + [b_o(p)=0]*ext_o)

where `o` is the other bit of the cell and `ext_o` its latest extrinsic
value from the decoder (`demapper_feedback`, combinational). With `ext = 0`,
the same unit gives the plain LLR, and the main demapper uses it that way.

## The shuffled MS3 decoder

### Code and layers

The code is an IRA code with 360-column periodicity. Every information
column has three checks, and parity column `i` sits on checks `i` and `i+1`
(staircase). The check of edge `e` of information bit `j` in column group `g`
is

    q = (N-K)/360,   x(g,e) = ((97g + 131e + 53ge + 7) mod 360)*q + ((g+e) mod q)
    check(g, j, e) = (x(g,e) + j*q) mod (N-K)

This formula lives in `bicm_pkg::info_check`. The three offsets of a column
group lie in different residue classes mod `q`. As a result, the columns of
one layer never touch the same check twice. The formula gives no repeated
columns and no 4-cycles among information columns at the default size and at
the reduced test size. The encoder and the decoder share it, so a different
address table can be used by changing this one function.

The decoder visits one **layer** of P variable nodes per cycle, so one
iteration takes N/P cycles (720 at the defaults):

* information layers are P consecutive columns of one 360-column group;
* parity layers take columns `r + k*(N-K)/P`, k = 0..P-1, so that two
  staircase neighbours are never in the same layer.

No check is written twice in the same cycle. Every variable node therefore
sees the check states left by all earlier layers of the same iteration.
This is the vertical shuffled schedule.

### What is stored per check

For the MS3 rule, each check node `m` holds:

* the three smallest `|T_mn|` seen (`m0 <= m1 <= m2`);
* the indices `p0..p2` of the variable nodes they came from;
* the sign product `alpha`;
* a syndrome bit `par`.

Each edge also stores the sign of its last `T_mn`, and each variable node
its hard decision.

### One variable node update (`vss_node_unit`)

1. Check node processing. `E_mn = 0` in iteration 1. Otherwise
   `E_mn = (alpha xor s_mn) * 3/4 * (n == p0 ? m1 : m0)`.
2. Variable node processing. `T_n = LLR_n + sum E_mn`, and
   `T_mn = T_n - E_mn`.
3. Extrinsic value. `ext_n = T_n - LLR_n`, saturated to 6 bits. This value
   goes to the feedback demapper.
4. Check node update:
   * `alpha ^= s_mn_old ^ s_mn_new`;
   * the entries of `n` are removed from the minimum list, `|T_mn|` is
     inserted, and the three smallest are kept, in order;
   * `par` flips when the hard decision of `n` flips.

### Early stop

The decoder adds up how many `par` bits flip to 1 or 0 in each cycle, which
keeps a running count of unsatisfied checks. At the end of each iteration,
decoding stops if the count is zero, or after ITER iterations. `done`
pulses `iters * N/P + 1` cycles after `start`.

## The feedback loop inside the core (`bicmid_core`)

For each lane in each cycle:

1. `pi_table` maps the lane's variable node `n` to its cell and to the
   codeword index of the other bit of that cell. The interleaver
   `pi(n) = (n mod NR)*NC + n div NR` is computed, not stored.
2. The cell's ECDs are read from the decoding bank.
3. The lane's extrinsic value passes through `demapper_feedback`.
4. The new LLR of the partner bit is written back into the LLR memory at
   the clock edge.

This is "schedule B": one LLR is updated per extrinsic value. When the
decoder later reaches the partner bit, it reads the refined LLR. Feedback
starts in iteration 2, because iteration 1 has no extrinsic values.

`llr_ecd_ram` has two banks: one receives the next frame while the other is
decoded. A bank swap happens when the last cell of a frame arrives and the
core is idle. A frame that completes while the previous one is still being
decoded is dropped (`dropped` pulse). After decoding, the K information bits
leave as K/P groups of P bits on consecutive cycles, with the iteration count
and the convergence flag.

## Fixed-point formats

| quantity | bits | scale |
|---|---|---|
| mapper output x | 10 signed | 1.0 = 256 |
| channel output y, equalized y | 9 signed | 1.0 = 64 |
| rho, CSI | 8 unsigned | 1.0 = 64, 0 = erased |
| snr | 7 | Es/N0 in 0.25 dB |
| erasure | 11 | probability * 2048 |
| llr_scale | 12 | 2/sigma^2, 4 fraction bits |
| ECD | 9 unsigned | same unit as LLR |
| LLR | 8 signed | 1 unit = 1/4 natural LLR, positive = bit 0 |
| extrinsic | 6 signed | LLR units |
| check magnitudes | 7 unsigned | LLR units |

## The channel emulator

Each component gets:

* a Rayleigh amplitude `rho = sqrt((g1^2 + g2^2)/2)` from two Gaussian
  samples;
* an erasure (`rho = 0`) with probability `erasure/2048`;
* noise of standard deviation `sigma = sqrt(1/2) * 10^(-snr/80)`. This value
  is built as a product of one Q16 constant per set bit of `snr`.

The Gaussian samples come from a central-limit generator: the sum of four
bytes of a xorshift32 state, which gives 11-bit samples. An erased component
carries only noise. The emulator has no time correlation, and every
component fades independently.

## Departures from the reference prototype

* **QPSK only.** Higher-order rotated QAM (the prototype's simulations also
  cover 256-QAM) would need wider ECD vectors and label logic.
* **LDPC addresses** come from the formula above, not from the DVB-T2 table.
  There is no BCH outer code.
* **Interleaver.** Plain column-write / row-read with 8 columns. There is no
  parity or column twist.
* **Rotation** is 29 degrees. The Q delay is D = 1 cell.
* **eta = 3/4** is the min-sum normalization.
* **Wallace generator** replaced by the central-limit generator.
* **Feedback latency.** The prototype's feedback demappers take two cycles;
  here they are combinational and the updated LLR is written at the next
  edge.
* **Processing rate.** All three edges of a variable node are processed in
  one cycle. An iteration therefore takes N/P = 720 cycles, against
  2520 + Delta cycles for the edge-serial organisation of the prototype
  (quoted there for 256-QAM).
* **Memories.** Check states, LLR and ECD banks are register arrays with
  P read and P write ports. An FPGA or ASIC version would map them to banked
  RAMs. No resource comparison is therefore given.

## Simulation

Every block has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=<n> failures=<n>`. Block testbenches use reduced sizes
where that matters (N = 1440, K = 1152, 96-column groups, 24 lanes for the
decoder, core and end-to-end tests). Example with plain Verilator:

```
cd tb
verilator --binary --timing --assert -y ../rtl ../rtl/bicm_pkg.sv \
    ../rtl/bicmid_testbed.sv bicmid_testbed_tb.sv --top-module bicmid_testbed_tb
./obj_dir/Vbicmid_testbed_tb
```

What each testbench checks:

* `bicmid_testbed_tb` runs three operating points:
  * 20 dB without erasures: no errors, early stop;
  * 20 dB with 15 % erasures: the measured erasure rate is 13-17 %, and the
    frames are still decoded;
  * 0 dB with erasures: frames hit the iteration limit and carry errors.

  It also counts early stops, iteration-limit stops, erasures, feedback
  updates, bank swaps and the filling of the rotation delay. A mechanism
  that never occurs is a failure.
* `bicmid_testbed_full_tb` runs the top with every parameter at its default
  (64800-bit frames, 90 lanes) at 20 dB with 15 % erasures. Two frames are
  decoded without errors in a few seconds of simulation.
* `bicmid_core_tb` checks the decoded bits against codewords built in the
  testbench. It also checks that the output groups come back to back, that
  the decode time is `iters * N/P` plus a constant, that the feedback path is
  used, that a frame is stopped at the iteration limit, and that a frame
  arriving during decoding is dropped.
* `ldpc_vss_decoder_tb` and `vss_node_unit_tb` compare against independent
  reference computations. This includes the MS3 list update, the sign
  products and the syndrome bits.

To change the size, override N, K, GRP (the column-group period), P and NC
on `bicmid_testbed`. The following must hold:

* `(N-K)` is a multiple of GRP;
* GRP is a multiple of P;
* `(N-K)/P` is an integer;
* N/2 is a multiple of NC.

D sets the rotation delay and ITER the iteration limit.
