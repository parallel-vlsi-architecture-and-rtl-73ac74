# Parallel low-latency turbo decoder

A turbo decoder normally runs one soft-in/soft-out (SISO) MAP unit over the whole
block, twice per iteration, so its latency grows with the block length N. This
design cuts one block into m sub-blocks of k = N/m symbols and decodes them at the
same time with m SISOs. The sub-blocks are tied together in two ways: each SISO
starts its forward recursion from a short stretch at the end of the previous
sub-block, and its backward recursion from state metrics handed over by the SISO of
the next sub-block. The extrinsic values of all m SISOs leave in the same cycle and
have to be interleaved in parallel. A two-stage parallel interleaver does this
without memory conflicts. A half-iteration then takes about k + 5·WL cycles instead
of N + 5·WL, where WL is the sliding-window length.

Default configuration (parameters of `turbo_dec_par`):

| parameter | default | meaning |
|---|---|---|
| `N` | 4096 | block length (information bits) |
| `M` | 16 | SISOs = sub-blocks = memory lanes |
| `D` | 2 | delay of the first interleaving stage |
| `WL` | 32 | sliding-window length |
| `NI` | 10 | full iterations |
| `LLR_W` | 8 | width of channel values, extrinsic values and memories |
| `MET_W` | 12 | width of state metrics |

The constituent code is the 8-state recursive systematic code with octal generators
13 (feedback, 1+D²+D³) and 17 (parity, 1+D+D²+D³), rate 1/3 overall, with
tailbiting (the encoder starts and ends in the same state, so there is no
termination tail). At these defaults one decoding takes 8702 clock cycles:
256 cycles for a pre-pass plus 20 half-iterations of 421 cycles, against
k + 5·WL = 416 in the ideal count.

## Number format

All soft values are two's complement. A positive LLR means bit 1. One LSB is 1/4
nat. The E-function (max*) is `max(a,b)` plus a correction of 3, 2, 1 or 0 LSB for
|a−b| = 0, 1..3, 4..8, ≥9, which is ln(1+e^−|a−b|) rounded to quarter nats. State
metrics are 12 bits and are normalised every step by subtracting the metric of
state 0, then saturated. Extrinsic and a-posteriori values are saturated to 8 bits.

## Data flow of one decoding

```
          ld_*                         am_*
           |                            |
   +-------v--------+          +--------v---------+
   | U (2 banks)    |          | addressing memory |
   | C1, C2         |          | set 0: interleave |
   | 16 x 256 each  |          | set 1: deinterleave
   +---+-------+----+          +--------+---------+
       | u     | c1/c2 (by stage)       |
   +---v---+   |                 +------v------------------+
   | adder |<--+-- a-priori -----| interleaver memory      |
   +---+---+   |                 | 16 x 256, 2 banks       |
       |       |                 +------^------------------+
   +---v-------v---+  16 values/cycle   |
   | 16 SISOs      |---------> FIS ---> SIS (addressed write)
   +---------------+        parallel interleaver
```

One iteration has two stages that do the same thing: add the a-priori value to the
systematic value, run the SISOs, and (de)interleave their output into the
interleaver memory.

* Interleaving stage (`stage` = 0): SISOs see U and C1 in natural order, and the
  output is written interleaved, using address set 0.
* De-interleaving stage (`stage` = 1): SISOs see U and C2 in interleaved order, and
  the output is written back in natural order, using address set 1.

The interleaver memory has two banks. Each pass reads the a-priori values from one
bank and writes the new extrinsic values into the other, because read and write
addresses differ. In the very first pass the a-priori values are forced to zero.

The de-interleaving stage needs the systematic values in interleaved order. Before
the first iteration a pre-pass streams U through the same parallel interleaver
(with set 0) into the second bank of the U memory. C2 is loaded already in
interleaved order, as the second encoder produces it.

In the last pass (the de-interleaving stage of iteration NI) the SISOs' a-posteriori
values are written instead of the extrinsic values. They land in natural order in the
interleaver memory, where `res_addr`/`res_llr` read them. The sign is the decision.

`dec_ctrl` sequences all of this: the pre-pass, then 2·NI passes separated by one
clear cycle. It also drives the shared read address, the tail-window flag, the
stage, the zero-a-priori and last-pass flags, and the bank select.

## Sub-blocks, tail window and boundary metrics

Lane j of every memory holds positions j·k .. j·k+k−1 of the block (in the order of
the current stage). SISO j decodes that sub-block. The recursions of a SISO need
starting values at both ends of its sub-block:

* **Forward (α) start: tail window.** Before its own k symbols, SISO j receives the
  last WL symbols of sub-block j−1 (for j = 0, the last WL symbols of sub-block
  m−1, which is valid because the code is tailbiting). It runs a dummy α recursion
  over them from all-zero metrics. The result is a good estimate of the α metrics
  at the start of its sub-block. All SISOs read the same address of their lane
  memories each cycle. The tail is obtained by routing lane j−1's value to SISO j
  during the first WL cycles of a pass, with addresses k−WL..k−1.
* **Backward (β) start: boundary β.** The backward recursion of the last window of
  sub-block j needs β metrics at position (j+1)·k. SISO j+1 computes exactly those
  as a by-product: its valid β recursion over its own first window ends at the
  start of its sub-block. It latches that vector on `bnd_beta_out`. SISO j latches
  it on `bnd_beta_in` when it starts its last window. SISO m−1 takes it from
  SISO 0 (tailbiting again). The SISOs run in lock step, so the vector is ready a
  long time before it is used: it is produced in the 5th window slot and used in the
  (K+3)th, where K = k/WL.

No other signal passes between SISOs. Wrong starting values only cost some accuracy
at the sub-block edges, so the dummy/boundary approach keeps the decoder exact where
it matters and fully parallel.

## SISO window schedule (`siso`)

The SISO is a sliding-window log-MAP unit with three recursion units: dummy β,
valid β and α with output. It processes K+1 windows per pass: the tail window, then
the K windows of its sub-block. Time is counted in slots of WL cycles. Input window
v (0 = tail, 1..K = sub-block windows) arrives in slot v.

| slot | work |
|---|---|
| 0 | dummy α over the tail window, from zero metrics |
| v+2 (v = 1..K−1) | dummy β over sub-block window v, backwards, from zero metrics; its end value starts the valid β of window v−1 |
| w+4 (w = 0..K−1) | valid β over sub-block window w (which arrived in slot w+1), backwards; every β vector stored |
| w+5 | α over window w forwards, combined with the stored β to produce the output |

So the first output appears 5·WL+1 cycles after the first input (c = 5 windows of
delay), and a pass lasts (K+5)·WL cycles. The valid β of window K−1 (the last one)
starts from `bnd_beta_in` instead of a dummy β. An 8-window circular symbol buffer
holds the input until the three units have used it. The β storage is two banks of WL
vectors: one being written by the valid β unit, one being read by the α unit.

Branch metrics: for edge (s,u) with parity p the metric is
`(u ? Lu : 0) + (p ? Lc : 0)`. Here Lu is the systematic value plus the a-priori
value, and Lc is the parity value. This is the usual ±L/2 form shifted by a constant
per step. The output for bit t is

```
Le(t) = E over (s,u=1) of [α(s) + γp(s,1) + β(next)]  −  E over (s,u=0) of [α(s) + γp(s,0) + β(next)]
```

where γp is the parity part of the branch metric only. Leaving out the systematic
part makes Le the extrinsic value directly. The
a-posteriori value `out_lapp` is Le + Lu. The E over 8 edges is a chain of 7 `emax_unit`
operators in state order.

Helpers: `metric_step` does one α or β step for all 8 states (16 E-operators,
normalisation, saturation). `llr_out_unit` forms the output. `emax_unit` is one
E-operator.

## Parallel interleaver (`parallel_interleaver`, `fis`, `pi_addr_mem`)

Each cycle the m SISOs produce m values with positions t, k+t, 2k+t, ... An
arbitrary interleaver would send them to arbitrary lanes, and several could target
the same lane memory in the same cycle. The interleaver therefore works in two
stages and assumes an interleaver designed for it:

1. **First interleaving stage (FIS), `fis`.** A finite permutation network. D
   consecutive input sets (a *delay packet*, m·D values) are written row by row
   into one of two m·D register arrays. A row counter mod D picks the row: set r of
   the packet goes to elements r·m .. r·m+m−1. When the array is full, it is read
   during the next D cycles while the other array fills. In each read cycle, output
   lane j takes the element named by its select address (0..m·D−1). Any
   permutation of a packet's m·D values into D output sets of m is possible. The
   only constraint is that each output set puts exactly one value on each lane.
   Delay: D+1 cycles from the packet's first set to its first output (one output
   register).
2. **Second interleaving stage (SIS).** Lane j of the FIS output is written into
   lane memory j at an address taken from the addressing memory. Within a lane any
   order is possible.

With D = 1 the FIS is a plain m×m crossbar. A larger D gives the interleaver more
freedom (better spread) for D more cycles of latency.

Example with m = 4, D = 2 (positions numbered 1..8 in the packet, i.e. two input
sets 1..4 and 5..8). Select addresses per output lane are written as element
numbers 1..8:

| output cycle | lane 0 | lane 1 | lane 2 | lane 3 |
|---|---|---|---|---|
| 1 | 1 | 6 | 8 | 3 |
| 2 | 5 | 7 | 2 | 4 |

`pi_addr_mem` stores, for each output cycle 0..k−1 and lane, the FIS select address
and the SIS write address. It holds two complete sets: set 0 for the
interleaving stage and set 1 for the de-interleaving stage. `parallel_interleaver`
looks up both with the FIS read cycle. It registers the memory write port and raises
`done` with the write of cycle k−1.

**What the interleaver must satisfy.** Both permutations, interleaving and
de-interleaving, run on this same hardware. So the interleaver has to be realizable
as FIS+SIS in both directions. The address tables are loaded by the user; the
decoder does not compute them. Interleavers of the following shape are realizable in
both directions, and the testbenches generate them:

* positions are grouped into packets of D consecutive time steps (all m lanes);
* packets are permuted as a whole (the same packet order for all lanes);
* inside a packet the m·D values are permuted arbitrarily, as long as each output
  time step gets one value per lane.

The tables for a given interleaver π follow directly. For output cycle t and lane j,
let the value written there come from input position p, at input time step tp and
input lane jp. Then the FIS select is `(tp mod D)·m + jp`, and the SIS address is
the position inside lane j at which π places it. Set 1 is the same for π⁻¹.

## Memories (`lane_mem`)

U, C1, C2 and the interleaver memory are each m memories of depth k with individual
addresses per lane (the SIS writes a different address in each lane). U and the
interleaver memory have two banks. Reads are combinational. All memories are
plain arrays without reset, so synthesis can map them to RAM. The a-priori adder
(`apriori_adder`) adds u and the a-priori value with 8-bit saturation.

## Interface and timing of `turbo_dec_par`

| port | dir | use |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `ld_valid`, `ld_addr`, `ld_u`, `ld_c1`, `ld_c2` | in | one load per cycle: address a of all M lanes. Lane j holds positions j·k+a. `ld_c2[j]` is the second parity of the j·k+a-th bit in interleaved order. |
| `am_we`, `am_set`, `am_cycle`, `am_lane`, `am_fis`, `am_sis` | in | load one entry of the addressing memory (set, output cycle, lane) |
| `start` | in | one-cycle pulse, starts a decoding (when not busy) |
| `busy`, `done` | out | busy during decoding; `done` pulses at the end |
| `res_addr`, `res_llr` | in/out | after `done`: the a-posteriori LLRs of positions j·k+`res_addr`, combinational |

Load U, C1, C2 and both address sets before `start`. Do not load while `busy`. The
address tables can stay loaded for any number of blocks. Decoding time is
about k + 2·NI·(k + 5·WL + D + 3) cycles, plus one clear cycle per pass and a few
cycles at start and end. The measured value at the defaults is 8702 cycles.

Limits on parameters: WL a power of two, k = N/M a multiple of WL with k/WL ≥ 2,
and M·D ≤ k.

## Testbenches

Each testbench checks its block against a reference model computed in the
testbench and ends with a line `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it runs |
|---|---|
| `tb_siso` | WL=8, K=4: random input against a bit-true model of the windowed log-MAP with tail and boundary β; a noiseless codeword; a codeword with errors; latency 5·WL+1 |
| `tb_fis` | M=4, D=2: the packet above, 40 random packets, an input gap |
| `tb_pi_addr_mem`, `tb_lane_mem`, `tb_apriori_adder` | random writes/reads against models |
| `tb_parallel_interleaver` | M=4, D=2, k=16: random realizable interleavers in both modes |
| `tb_dec_ctrl` | pass order, addresses, tail flags, bank and flag sequence, two runs |
| `tb_turbo_dec_par` | N=128, M=4, D=2, WL=8, NI=4, 3 blocks with growing noise |
| `tb_turbo_dec_par_full` | default top (N=4096, M=16, D=2, WL=32, NI=10), blocks with and without noise |

The two decoder benches share `turbo_dec_bench`. It builds a random realizable
interleaver and its tables, encodes a random tailbiting block with both encoders,
adds noise (sum of four uniform values), loads the decoder, and decodes. It then
checks the interleaved U copy, every decoded bit, and the pass length. It also
counts the mechanisms in use: tail-window feeds, FIS buffer switches, passes without
a-priori values, a-posteriori writes, boundary-β hand-overs, and corrected channel
errors.

Simulate with Verilator, e.g.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/turbo_pkg.sv rtl/*.sv tb/turbo_dec_bench.sv tb/tb_turbo_dec_par_full.sv \
  --top-module tb_turbo_dec_par_full
./obj_dir/Vtb_turbo_dec_par_full
```

The full-size bench builds in a few seconds and runs in under a second.

## Departures and open points

* Block size and configuration are elaboration parameters. One build decodes blocks
  of exactly N bits. Other N, m or D (e.g. N = 512..2048, m = 1..32, D = 1 or 4)
  need a new elaboration within the limits above.
* Only rate 1/3 is decoded. Punctured rates (2/3, 3/4) could be handled by loading
  0 for punctured parity values, but no puncturing pattern is defined here.
* The interleaver tables are inputs; no algorithm for designing the interleaver
  (spread, realizability) is included. The de-interleaving stage reuses the same
  FIS+SIS hardware, which restricts the interleavers to those realizable in both
  directions (see above).
* Metric width, normalisation, the E-function table, the extra bank of U for
  interleaved systematic values, the ping-pong interleaver memory, the pre-pass,
  and the host load/result ports are this design's choices.
* The pass is 5 cycles longer than k + 5·WL: D+1 cycles of FIS delay, the
  registered memory write and the clear cycle.
* Circuit warnings that remain: `rst_n` also feeds the `disable iff` of
  simulation assertions, and a few status outputs (`iter`, SISO `busy`, FIS
  `rd_en`) are left unconnected at the top.
