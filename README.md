# Tyche: a single-core p-bit accelerator in SystemVerilog

A *p-circuit* is a network of stochastic binary units, *p-bits*, each taking the
value -1 or +1. The p-bits are coupled by a symmetric matrix **J** and biased by a
vector **h**, and they are updated one at a time:

    I_i = I0 * (h_i + sum_j J(i,j) * m_j)
    m_i = sgn( rand(-1,+1) + tanh(I_i) )

Repeated sweeps of this rule (Gibbs sampling) visit states m with probability
proportional to exp(sum_i h_i m_i + sum_{i<j} J(i,j) m_i m_j) when I0 = 1.
Choosing J and h makes the likely states the solutions of a problem: the
truth table of a logic gate that can be run backwards ("invertible logic"), a
maximum cut of a graph, a short travelling-salesman tour, the factors of an
integer.

This RTL implements the Tyche accelerator architecture for such p-circuits. Its
main idea is that, because p-bits are updated one after another, an array of
p-bit processors would leave all but one idle. Tyche therefore has **one p-bit
core**, and keeps J, h and the p-bit states in memories. The hardware is
built for at most `NM_MAX` p-bits (64 by default). Any circuit with
`N_m <= NM_MAX` p-bits runs on it by setting `nm` at run time. One p-bit update
takes 3 clock cycles.

```
            +-------------------- tyche_top ------------------------------+
 j_* ------>| tyche_input_config --> tyche_j_mem  (NM_MAX banks of         |
 h_* ------>|   (address decode)      tyche_sp_ram, bank j = column j)     |
            |                    --> tyche_sp_ram (h_Mem)                  |
 nm,ns ---->| tyche_ctrl_regs (N_m, N_s, tyche_seq_reg)                    |
 pattern -->|        | p_idx                                               |
 start ---->| tyche_fsm (S0..S5)                                           |
 seed ----->| tyche_pbit_core: tyche_addsub_tree, +h, x I0, clamp, I_i reg, |
            |                  tyche_tanh_lut, tyche_lfsr, comparator       |
            | tyche_m_reg  ------------------------------------------------>| m_final, done
            +--------------------------------------------------------------+
```

## One p-bit update, cycle by cycle

Everything hard about this design happens in the three cycles of a p-bit update.
The controller walks the states S1, S2 and S3 for each p-bit. `p_idx` is the
index of the p-bit being updated, looked up from the current update order.

**S1: fetch.** `p_idx` addresses all J banks and h_Mem at once. Word `i` of bank
`j` holds J(i,j), so one read returns the whole row J(i,·) plus h_i. The RAMs
have a registered read, as block RAMs do, so the data is there in S2.

**S2: weight logic.** This step is combinational, and its result is stored in the
I_i register at the end of the cycle.
- `tyche_addsub_tree` forms sum_j J(i,j)·m_j without multipliers. Each leaf is
  +J(i,j) when m_j = +1, -J(i,j) when m_j = -1, and 0 for columns j >= N_m. A
  balanced tree adds the leaves, so its depth is ceil(log2 NM_MAX) adders, not
  the NM_MAX-1 of an adder chain. Every adder is 24 bits wide and wraps on
  overflow.
- A 24-bit adder adds h_i.
- The sum is multiplied by the constant `I0`, a parameter (1.0 by default).
  The full 48-bit product is kept, shifted back to Q11.12, and clamped to
  [-4, +4] before it is narrowed.

**S3: activation and decision.** This step is combinational and ends with a write
into `m_Reg`.
- |I_i| bits [13:4] address the 1024 x 32-bit tanh table, which covers
  [0, 4) in steps of 1/256.
- If |I_i| >= 4 the table is bypassed and the value is forced to +1.
- For negative I_i the value is negated. This gives tanh(I_i) as a signed
  32-bit number, with +1.0 = 2^31-1.
- The 32-bit LFSR word, read as a signed number, is uniform on [-1, +1). The new
  p-bit is 1 (+1) when tanh(I_i) is greater than that word, so
  P(+1) = (1 + tanh I_i)/2. That is the distribution of
  sgn(rand + tanh I_i).
- The LFSR then advances by 32 shifts in one clock (leap-forward), so the next
  update sees 32 fresh bits.

## Number formats

| quantity | width | format |
|---|---|---|
| J(i,j), h_i, I_i | 24 bits | signed Q11.12: sign, 11 integer bits, 12 fraction bits |
| tanh(I_i), LFSR word | 32 bits | signed Q0.31; +1 and -1 are ±(2^31-1) |
| p-bit m_j | 1 bit | 0 = -1, 1 = +1 |

Integer weights such as J = 2 are written as `2 << 12`.

## Memories and configuration

- `tyche_j_mem`: `NM_MAX` single-port RAMs of `NM_MAX` x 24 bits. They share one
  address, and a whole row of J is read per access.
- `tyche_sp_ram` (h_Mem): `NM_MAX` x 24 bits.
- `tyche_input_config`: decodes the column address into a one-hot bank write
  enable, and the row address into the word address. While a run is in progress
  it gives the RAM address port to `p_idx` and ignores writes.
- Memory needed: NM_MAX·(NM_MAX+1)·24 bits. At the default size that is 99,840
  bits, plus 32,768 bits of tanh table.

To load a circuit, write J one element per cycle (`j_wr_en`, `j_row_addr`,
`j_col_addr`, `j_val`) and h one element per cycle (`h_wr_en`, `h_addr`,
`h_val`). Do this after reset, or while `done` is high. Only the N_m x N_m block
and the first N_m entries of h are used. Columns at or beyond `nm` are masked
out of the sum, so stale values there do no harm.

## Controller and update order

`tyche_fsm` has six states:

| state | does | next |
|---|---|---|
| S0 configure | waits for `start`; latches N_m, N_s and the pattern; loads the seed; clears m_Reg to all -1 | S1 |
| S1 get sequence | looks up the i-th p-bit of the current order, reads J row and h | S2 |
| S2 weight logic | loads I_i | S3 |
| S3 update | writes the p-bit | S1 (i+1) while i < N_m, else S4 |
| S4 sample complete | moves the sequence register to the next order | S1 (i = 1) while fewer than N_s samples are done, else S5 |
| S5 done | `done` = 1 | S0 when `start` is 0 |

A sample takes **3·N_m + 1 cycles**. A run takes N_s·(3·N_m + 1) cycles, counted
from the clock edge that accepts `start` to the one that raises `done`. The one
extra cycle per sample is the S4 state. The published architecture quotes
3·N_m·N_s, which leaves this cycle out. For the 52-p-bit factorization circuit
a sample therefore takes 157 cycles instead of 156.

Consecutive samples must not use the same update order, or consecutive states
become correlated. `tyche_seq_reg` holds `NM_MAX` indices of
ceil(log2 NM_MAX) bits each. At start it is loaded with the `pattern` input, a
permutation P. After every sample each entry s is replaced by P[s], so sample n
uses the order P^n. The entries 0..nm-1 of `pattern` must be a permutation of
0..nm-1. An identity pattern keeps one fixed order. A pattern such as
k -> (a·k + b) mod N_m, with a coprime to N_m, changes the order every sample.

## Interface of `tyche_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (the RAMs are not reset) |
| `nm` | in | R+1 | number of p-bits N_m, 1..NM_MAX (R = ceil(log2 NM_MAX)) |
| `ns` | in | `NS_W` (32) | number of samples N_s (0 runs one) |
| `seed` | in | 32 | LFSR seed, loaded at start (0 is replaced by 1) |
| `pattern` | in | NM_MAX x R | update-order permutation |
| `j_wr_en`, `j_row_addr`, `j_col_addr`, `j_val` | in | 1, R, R, 24 | J write port |
| `h_wr_en`, `h_addr`, `h_val` | in | 1, R, 24 | h write port |
| `start` | in | 1 | level: raise to run, keep high until `done`, then drop |
| `m_final` | out | NM_MAX | p-bit states, live (bit j = 1 means m_j = +1) |
| `done` | out | 1 | N_s samples completed |

`m_final` changes during a run. To build a histogram of states, as the test
benches do, read it in the cycle the controller is in S4 (`u_fsm.state`). At
that point a sample has just been completed.

## Parameters and size

| parameter | default | meaning |
|---|---|---|
| `NM_MAX` | 64 | maximum number of p-bits (the published evaluation covers 8 to 256) |
| `NS_W` | 32 | width of the sample counter |
| `I0` | 1.0 (4096) | interconnection strength, Q11.12 constant |
| `tyche_pkg::D`, `FRAC` | 24, 12 | J/h word format |

The default of 64 is the smallest power of two that holds every circuit listed
below, the largest being 52 p-bits. At the default size, a coarse synthesis
(yosys) gives:
- about 920 word-level cells;
- 587 flip-flops, 384 of them in the sequence register;
- 132,608 memory bits.

The adder tree needs no multipliers, and `I0` = 1 removes the multiplier.

The design is not tied to 64. The end-to-end testbench, with its sizes changed
to `NM_MAX = 256`, also passes. That is the largest size of the published
evaluation, and the run includes a deterministic 256-p-bit run.

## Departures from the published architecture

The published description leaves several points open. These are the choices
made here:
- **Write strobes.** The published block diagram has address and data inputs
  but no write enables. `j_wr_en` and `h_wr_en` were added. Writes are blocked
  while a run is in progress.
- **Sample count.** The state diagram's guards, taken literally, stop after
  N_s-1 samples. The S4 test here counts completed samples, so exactly N_s run.
  S5 returns to S0 when `start` falls.
- **Per-sample cycle count.** The cycle count is 3·N_m+1 per sample, not 3·N_m
  (see above).
- **Update order.** The rule for the sequence register (P^n) is this design's
  own. Only the register's size and the fact that the pattern is an external
  input are given.
- **LFSR.** The polynomial x^32+x^22+x^2+x+1 is this design's choice, and so is
  advancing 32 shifts per update. With one shift per update, consecutive random
  words are shifted copies of each other. In simulation that moved the
  AND-gate and full-adder distributions measurably away from the Boltzmann
  distribution (total variation 0.03 and 0.06, against 0.005 and 0.017 with 32
  shifts).
- **Formats.** The tanh format (Q0.31) is this design's own, and so is the way
  the table is indexed (|I| in 1/256 steps). The comparator's sense was chosen
  so that P(+1) = (1+tanh I)/2.
- **Adder tree.** The add/subtract choice sits at the leaves of the tree, as a
  conditional negation of each J(i,j), with plain adders above. The published
  tree uses NM_MAX-1 adder-subtractors, with the sign handled inside them. The
  depth and the 24-bit width are the same.
- **Column masking.** Columns j >= N_m are masked in the adder tree. The
  published sum runs over all NM_MAX columns and leaves unused entries to the
  user.
- **Clearing m_Reg.** m_Reg is cleared to all -1 at start.
- **Clamp precision.** The clamp is applied to the full-precision I0 product.
- **tanh table contents.** The table is a constant computed at elaboration:
  exp by a Taylor series in 192-bit fixed point, then (e-1)/(e+1). It matches
  the correctly rounded tanh in all 1024 entries.

Not modelled: the FPGA board, the host that writes J and h and reads
`m_final`, and timing closure. The published design reaches about 60 MHz at 52
p-bits.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it shows |
|---|---|
| `tb_tyche_sp_ram`, `tb_tyche_j_mem` | writes and whole-row reads against a model; one-cycle latency; read-first |
| `tb_tyche_input_config` | bank decode and address switching, random inputs |
| `tb_tyche_m_reg` | single-bit writes and clear against a model |
| `tb_tyche_addsub_tree` | sums against integer arithmetic incl. wrap-around and masking, NM_MAX = 64 and 5 |
| `tb_tyche_tanh_lut` | all 1024 entries against real `$tanh` |
| `tb_tyche_lfsr` | recurrence, 32 shifts per step, seeding, no short period |
| `tb_tyche_seq_reg`, `tb_tyche_ctrl_regs` | P^n orders, latching of N_m and N_s |
| `tb_tyche_fsm` | state trace, i order, run length N_s·(3N_m+1) |
| `tb_tyche_pbit_core` | I_i against integer model (I0 = 1 and 2), decision bit against `$tanh` and an LFSR model, P(+1) statistics |
| `tb_tyche_top` | default build; see below |
| `tb_tyche_apps` | default build; see below |

`tb_tyche_top` runs, on one default-size accelerator:
- a 1-p-bit random number generator;
- the NOT, AND and full-adder p-circuits;
- a 64-p-bit deterministic check, described after the results.

It checks every run length. Measured results:
- RNG: P(+1) = 0.506.
- NOT: distance to the exact Boltzmann distribution 0.003; the gate's valid
  states take 88% of the samples.
- AND: distance 0.005; valid states 98.7%.
- Full adder: distance 0.017; valid states 81%.

The 64-p-bit check uses a random tree of strong couplings, which drives every
|I_i| past the clamp, so the final state is known and is compared exactly. The
testbench also counts how often each mechanism occurs, and fails if one never
does:
- the clamp;
- the ±1 bypass;
- both table branches;
- order changes;
- the sample loop;
- ignored writes;
- runs with N_m < NM_MAX and with N_m = NM_MAX.

`tb_tyche_apps` runs three larger problems:
- **Integer factorization.** 143 is factored with a 52-p-bit 4x4 array
  multiplier. It is built from 16 AND and 12 full-adder p-circuits; 4 of the
  adders act as half adders with a pinned-zero carry input. That gives
  4 + 4 + 8 p-bits for the factors and the product, plus 36 internal p-bits. The
  product is pinned to 143, and (13, 11) and (11, 13) are the two most sampled
  (A, B) pairs. The gate couplings are scaled by 1.25. At 1.0 a near-solution
  with one violated adder (9 x 15) is sampled as often as the factors; at 2.0
  the sampler freezes in it. The couplings of the published 52-p-bit circuit
  come from elsewhere, and this circuit is not claimed to be the same.
- **Max-cut.** A weighted 6-node graph of this design's own (J = -w). The most
  sampled partition is a maximum cut.
- **Travelling salesman.** 4 cities on a square, 16 p-bits, with the usual
  one-hot penalty form. The shortest tour is the most sampled state.

Simulate any testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/tyche_pkg.sv tb/tb_tyche_top.sv \
          --top-module tb_tyche_top -Mdir obj_top && ./obj_top/Vtb_tyche_top
```

`tb_tyche_top` runs in about a second and `tb_tyche_apps` in a few seconds.
Verilator is two-state. Everything that is read is reset, except the RAM
contents, which must be written before use.

## Files

- `rtl/tyche_pkg.sv`: formats, constants and the state type.
- `rtl/tyche_top.sv`: the accelerator.
- `rtl/tyche_fsm.sv`, `rtl/tyche_ctrl_regs.sv`, `rtl/tyche_seq_reg.sv`:
  control.
- `rtl/tyche_input_config.sv`, `rtl/tyche_j_mem.sv`, `rtl/tyche_sp_ram.sv`,
  `rtl/tyche_m_reg.sv`: storage.
- `rtl/tyche_pbit_core.sv`, `rtl/tyche_addsub_tree.sv`,
  `rtl/tyche_tanh_lut.sv`, `rtl/tyche_lfsr.sv`: the p-bit core.
- `tb/`: one testbench per module, plus `tb_tyche_apps.sv`.
