# Voltage-overscaled trellis decoders with unequal error tolerance

Running a circuit below its critical supply voltage (voltage overscaling,
VOS) saves energy: dynamic power goes with Vdd², so scaling the supply by a
factor Kv saves about 1 - Kv² of it. The price is timing errors on
the slowest paths and read/write errors in the memories. In a trellis decoder
these errors do not all cost the same. An error in a state metric LSB,
or in the early part of a trace-back, hardly changes the bit error rate. An
error in a metric MSB, a decision bit, or a bit read during decoding does.
The design therefore gives each signal an error immunity in proportion to its
importance ("unequal error tolerance"):

* **ACS datapath.** Each flip-flop of an add-compare-select (ACS) unit gets
  its own clock delay. The delays shift timing slack towards the important
  bits, so that when the supply is lowered, the unimportant bits fail first.
* **Viterbi survivor memory.** Each memory bank's supply follows the phase it
  is in. Banks being written or decoded run at full voltage. A bank in the
  second half of a trace-back runs mildly overscaled. All other banks run
  deeply overscaled.
* **Max-Log-MAP state-metric memory.** Each 9-bit metric is cut into three
  3-bit groups, stored in three banks that can run at three different
  supplies.

This repository holds synthesizable SystemVerilog for two such decoders:

| decoder | code | datapath | memory |
|---|---|---|---|
| `vit_decoder` | rate-1/2 convolutional, 128 states (constraint length 8) | 128 gate-level ACS units, 8-bit metrics, 3-bit branch metrics | 3-pointer even trace-back, L = 56, 6 banks with per-bank supply level |
| `map_decoder` | 8-state recursive systematic constituent code of a rate-1/3 Turbo code | two arrays of 8 gate-level ACS units (forward, backward), 9-bit metrics | forward metrics in three 3-bit banks (MSB / middle / LSB) |

`trellis_vos_top` puts them side by side. It also holds behavioural delay
elements that produce the scheduled clock of every ACS flip-flop position.
The supply levels are outputs of type `vos_pkg::vos_level_e`:

* `VOS_NOM`: Kv = 1;
* `VOS_H`: mild overscaling, Kv^H;
* `VOS_L`: deep overscaling, Kv^L.

The regulators or power switches that act on these levels are outside this
RTL.

## The ACS unit (`acs_unit`)

The ACS unit is built from the five cell types of the original gate-level
design: full adder, half adder, carry-only adder, 2:1 mux and D flip-flop.

```
 sm0 + bm0 :  FA FA FA HA HA HA HA HA      (bit 0 .. bit 7, carry-in 0)
 sm1 + bm1 :  FA FA FA HA HA HA HA HA
 compare   :  CA CA CA CA CA CA CA FA      carry-in "1": path0 + ~path1 + 1
                                   \___ sum = sign(path0 - path1) = decision
 select    :  2:1 mux (sel = decision) -> 8 D-FF (metric) + 1 D-FF (decision)
```

The branch metric feeds full adders in its low `BM_W` bits. Half adders
carry the rest of the word, and the carry out of the top bit is dropped.
So metrics are **modulo 2^SM_W**: no normaliser is needed. The
comparator does not compute the whole difference. Carry-only cells ripple the
carry of path0 + ~path1 + 1, and one full adder on the MSB produces only the
sign bit. A sign bit of 1 means path1 is larger in the modulo sense. The unit
keeps the larger metric, and that same sign bit is the decision bit that goes
to the survivor memory.

The modulo comparison is correct as long as all metrics of one trellis step
stay within 2^(SM_W-1) of each other. For the Viterbi code the spread stays
below 7 × 6 = 42 (< 128). For the Max-Log-MAP code it stays below
3 × 32 = 96 (< 256).

Parameters:

* `SM_W = 8`, `BM_W = 3`, `STORE_DEC = 1`: Viterbi.
* `SM_W = 9`, `BM_W = 6`, `STORE_DEC = 0`: Max-Log-MAP, which keeps no
  decision flip-flop.

`init` loads `init_val` and `en` takes one step. The results are registered,
so they appear one cycle after the inputs.

## Clock skew schedule (`vos_pkg`, `clk_skew_buf`)

Each ACS flip-flop i gets a clock delay. The delays come from a linear
program that maximises a common safety margin M. Each path's margin is
weighted by two factors:

* the importance γ of its destination bit;
* the standard deviation of the path's delay.

In formulas: s_ij ≤ T − Dmax_ij − γ_j σmax_ij M and
s_ij ≥ −Dmin_ij + γ_j σmin_ij M. The resulting delays are quantized to
3 bits: 2 integer bits and 1 fraction bit, in units of one half-adder delay.
The codes below are those delays, rounded to the nearest half unit. Bit 8 is
the decision bit (Viterbi) or the metric MSB (Max-Log-MAP).

| code (× 0.5 HA delay) | b0 | b1 | b2 | b3 | b4 | b5 | b6 | b7 | b8 |
|---|---|---|---|---|---|---|---|---|---|
| Viterbi σ=0.05 | 0 | 1 | 3 | 3 | 4 | 6 | 7 | 7 | 5 |
| Viterbi σ=0.10 | 0 | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 2 |
| Viterbi σ=0.15 | 0 | 0 | 1 | 2 | 3 | 4 | 5 | 5 | 1 |
| Max-Log-MAP σ=0.05 | 0 | 1 | 3 | 4 | 3 | 6 | 6 | 7 | 7 |
| Max-Log-MAP σ=0.10 | 0 | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 6 |
| Max-Log-MAP σ=0.15 | 0 | 0 | 1 | 2 | 2 | 3 | 4 | 4 | 5 |

`clk_skew_buf` is a **behavioural model**: a transport delay of
`code × HA_PS/2` time units, with `HA_PS = 100` by default. In silicon it
would be a trimmed delay cell in the clock tree. `trellis_vos_top` picks a
row with `SKEW_SIGMA` (0, 1 or 2) and brings out nine skewed clocks per
decoder on `vit_acs_clk` and `map_acs_clk`. The synthesizable RTL itself is
single-clock: the schedule is meant for a clock-tree implementation to apply
to every ACS unit of an array.

## Viterbi survivor memory and dynamic VOS (`vit_survivor_mem`)

Each trellis step produces one **column** of 128 decision bits. The memory
has three jobs:

* **write** each new column;
* **trace back** L = 56 steps from an arbitrary state (state 0 here) until
  the path has converged;
* **decode**, which keeps tracing and emits one bit per column.

A trace-back step at state s reads decision d and moves to `{d, s[6:1]}`. The
bit it emits is `s[0]`, the input bit of that step.

**Organisation (3-pointer even).** The memory has six banks of
D = L/2 = 28 columns. The write pointer fills one bank per *period* of 28
enabled cycles. Three read pointers each do one read per cycle. Their roles
rotate at each period boundary. With b the bank being written in a period:

| bank | role in this period | supply level |
|---|---|---|
| b   | write | `VOS_NOM` |
| b-1 | trace-back, first half (new pointer, starts at its newest column in state 0) | `VOS_L` |
| b-2 | idle | `VOS_L` |
| b-3 | trace-back, second half (the pointer that had b-1 last period, i.e. the bank just older than the one it finished) | `VOS_H` |
| b-4 | idle | `VOS_L` |
| b-5 | decode (the pointer that had b-3 last period) | `VOS_NOM` |

So every pointer traces 28 + 28 = 56 columns before it decodes the next
28. Each bank is touched by at most one pointer per cycle, so single-ported
banks suffice. A bank sees the whole supply sequence across six periods:

* `NOM` while it is written;
* `L` for the first half of the trace-back;
* `L` while idle;
* `H` for the second half of the trace-back;
* `L` while idle;
* `NOM` while it is decoded.

The supply is lowest where a read error is harmless: the early part of a
trace-back, which has not yet converged. It is highest where an error goes
straight into the output.

The decode pointer emits bits newest first. Two 28-bit buffers reverse them:
bits decoded in one period are output in order during the next. A decision
column leaves as an output bit exactly **6 × 28 = 168 enabled cycles** after
it was written. `out_valid` rises after six periods. `wr_en` low freezes
everything.

`vit_decoder` adds the branch metric unit and the ACS array in front of the
memory:

* **Inputs.** Each code bit arrives as a 2-bit soft value: 0 = confident '0',
  3 = confident '1'.
* **Branch metric.** The correlation `Σ c ? r : 3 − r`, range 0..6.
* **Latency.** The bit of the symbol accepted at enabled cycle n leaves at
  enabled cycle n + 169.
* **Stalls.** A cycle with `in_valid` low stalls the whole decoder.

## Max-Log-MAP decoder (`map_decoder`)

The code is the 3GPP recursive systematic code: feedback 1 + D² + D³,
parity 1 + D + D³. Inputs per step:

* systematic soft value `ys` (3-bit two's complement, positive favours '1');
* parity soft value `yp` (3-bit);
* a-priori LLR `la` (4-bit).

`map_bmu` forms `(u ? + : −)(ys + la) + (p ? + : −) yp + 16`. This is twice
the usual Max-Log-MAP branch metric, shifted to 0..32, so that the unsigned
adders of the ACS unit can take it. As a consequence, **`llr` is twice the
usual Max-Log-MAP LLR**, as a 9-bit two's-complement value.

A block of N = 64 symbols goes through two passes:

1. **LOAD** (N accepted symbols, `in_ready` high). Symbols are buffered. The
   forward ACS array steps once per symbol, and the forward metrics α_k that
   each step started from are written to `map_metric_mem` at address k.
2. **Backward** (exactly N cycles, `in_ready` low). For k = N−1 down to 0,
   the backward array steps from β_{k+1} to β_k. Meanwhile `map_llr`
   combines α_k, γ_k and β_{k+1}. It takes the largest
   α + γ + β over the u = 1 branches and over the u = 0 branches, with
   modulo comparisons, and outputs their difference. `llr_idx` tags each LLR.
   LLRs come out in reverse order, one per cycle.

Start metrics:

* forward: state 0 gets 0, the other states −64 (the encoder starts in
  state 0);
* backward: 0 for every state (the block is not terminated).

`map_metric_mem` stores bits 8..6, 5..3 and 2..0 of every metric in three
separate arrays. By default their levels are `VOS_NOM`, `VOS_H` and `VOS_L`:
the MSB group is the most important and gets the least overscaling. The
levels are module parameters.

## Overscaling experiments in simulation

Two further testbenches run bit-error-rate workloads with BPSK over AWGN.
Gaussian noise comes from a Box-Muller transform of `$urandom` values.
Memory read errors at the rates a lowered supply would cause are emulated by
flipping a stored bit just before it is read and restoring it just after.

**`tb_vit_ber_vos`** sends 30,000 bits per setting through `vit_decoder`.
The first-half trace-back pointer sees errors with rate Pe^L, and the
second-half pointer with rate Pe^H. One run gave:

| Eb/N0 | Pe^L | Pe^H | BER |
|---|---|---|---|
| 4 dB | 0 | 0 | ~1e-4 |
| 4 dB | 0.5 % | 0 | ~1e-4 |
| 4 dB | 1 % | 0 | ~0 |
| 4 dB | 5 % | 0 | ~3e-5 |
| 4 dB | 0 | 0.1 % | ~2.6e-3 |
| 3 dB | 0 | 0 | ~1e-3 |

The early trace-back tolerates percent-level read errors. A
tenth-of-a-percent error rate in the second half of the trace-back is
already clearly visible. That is why the second half gets the higher supply.

**`tb_map_ber_vos`** runs 250 blocks of 64 bits through `map_decoder`, as one
constituent decoding without a-priori input. The noise matches the rate-1/3
Turbo code at 2 dB and 1 dB. Each bit read from the LSB bank flips with rate
Pe^L, and each bit read from the middle bank with rate Pe^M. At 2 dB, the BER
is about 9e-2 with or without 0.5-5 % LSB errors or 0.1 % middle-bank errors.
Hard decisions on the channel values alone give about 1.6e-1. Errors in the
low-order bits of stored metrics barely matter. The absolute figures are
those of one constituent decoder, not of an iterated Turbo decoder.

**`tb_acs_vos_timing`** is a gate-level timing experiment on the ACS units
themselves, for both decoders. It rebuilds the ACS unit from timed cells:
the same adders, comparator chain, multiplexer and flip-flops, each gate with
its own transport delay. Each gate delay is drawn once from the normalized
Gaussian model:

* half-adder outputs, full-adder carries, carry-only cells and multiplexers:
  mean 1, deviation σ;
* full-adder sums and flip-flop clock-to-Q: mean 2, deviation √2·σ;
* σ = 0.05 throughout.

One unit delay is 100 time units. The clock period is fixed at 1650: the
longer nominal path is 14 units (Max-Log-MAP; Viterbi has 13), plus about
three σ. Lowering the supply by Kv multiplies every gate delay by
g(Kv·V)/g(V), with g(v) = v/(v − 0.3)^1.2. The clock network keeps its
nominal delays.

The two arrays are wired differently:

* The 8-bit Viterbi units form a 32-state trellis rather than 128 states,
  which keeps the event-driven simulation short.
* The eight 9-bit Max-Log-MAP units form the forward recursion of the
  8-state code.

Every cycle, each register is compared with an ideal ACS step taken from the
previous cycle's register contents. One run of 400 steps gave these error
counts, out of 12,800 samples per Viterbi position and 3,200 per Max-Log-MAP
position:

| Setting | b0 | b1 | b2 | b3 | b4 | b5 | b6 | b7 | b8 / decision |
|---|---|---|---|---|---|---|---|---|---|
| Viterbi, Kv = 1, either clock | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 |
| Viterbi, Kv = 0.71, no skew | 643 | 441 | 234 | 136 | 72 | 42 | 22 | 10 | 485 |
| Viterbi, Kv = 0.71, schedule | 837 | 573 | 42 | 0 | 0 | 0 | 0 | 0 | 0 |
| Max-Log-MAP, Kv = 1, either clock | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 |
| Max-Log-MAP, Kv = 0.71, no skew | 0 | 211 | 207 | 155 | 92 | 51 | 15 | 6 | 2 |
| Max-Log-MAP, Kv = 0.71, schedule | 0 | 260 | 190 | 67 | 60 | 1 | 0 | 0 | 0 |

Kv = 0.71 saves about half of the ACS switching energy. The schedule gives
its extra slack to the high-order bits and to the Viterbi decision. Timing
errors then stay in the low-order bits, which a trellis decoder tolerates
best.

## What follows the original design and what is this implementation's own

Taken from the original design:

* the ACS cell structure and widths (8-bit metric + 3-bit branch metric for
  Viterbi, 9-bit metric for Max-Log-MAP);
* the 128-state rate-1/2 and 8-state rate-1/3 Turbo settings;
* trace-back length 56 with the 3-pointer even scheme;
* the three-level dynamic VOS rule for the survivor memory;
* the 3 × 3-bit metric partition;
* the skew values and their 3-bit quantization.

This implementation's own choices:

* generator polynomials: 247/371 octal for Viterbi, 13/15 octal for the RSC
  code;
* keeping the larger metric, and reading the comparator as path0 + ~path1 + 1;
* soft-input formats and branch-metric formulas;
* start metrics;
* bank count and size of the survivor memory, starting trace-backs in
  state 0, and the output reversal buffers;
* the whole-block MAP schedule and N = 64;
* the default supply level of each MAP bank;
* rounding of the skew values;
* stall and valid handshakes, synchronous reset, and asynchronous
  (register-file style) memory reads.

## Not in the RTL

* **Turbo iteration.** There is no interleaver, second constituent decoder
  or extrinsic exchange around `map_decoder`. Its a-priori input and LLR
  output are ports, ready for an iteration wrapper.
* **Supply circuitry.** Only the level selects exist.
* **Skewed clocks on the synthesizable ACS registers.** They are generated
  but the decoders' registers run on the common clock. Applying them is
  meaningful only in a netlist with real gate delays, which is what
  `tb_acs_vos_timing` models.
* **The effects of overscaling in the decoders.** Timing errors and memory
  bit errors at a given Kv are physical, so this RTL behaves like a circuit
  at nominal voltage. The testbenches above emulate them.
* **Design-time methods.** The random-perturbation search for importance
  factors and the skew linear program are not part of the RTL.

## Simulating

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. `tb_trellis_vos_top` runs both decoders at
the default parameters:

* Viterbi: 2500 bits with channel errors and stalls;
* Max-Log-MAP: three 64-symbol blocks with back-pressure;
* all 18 skewed clocks.

It counts every mechanism: stall, corrected error, each supply level, input
gap, back-pressure and skew. To build it with Verilator:

```
verilator --binary --timing --assert --top-module tb_trellis_vos_top \
  -y rtl -y tb +libext+.sv rtl/vos_pkg.sv tb/tb_trellis_vos_top.sv
./obj_dir/Vtb_trellis_vos_top
```

Replace the top module and testbench file to run a unit test, for example
`tb_vit_survivor_mem`.

The unit tests compare each block with references written independently
in the testbench:

* bit-exact integer recursions for the ACS arrays;
* a full integer Max-Log-MAP for `map_decoder`, whose LLRs must match
  exactly;
* an encoder plus noisy channel for `vit_decoder`.

They also check the latencies: 168 and 169 cycles for the Viterbi path, and
N + N cycles per MAP block.
