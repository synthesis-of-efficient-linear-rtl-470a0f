# SLING: block-structured linear test pattern generators

Built-in self-test needs a pseudo-random pattern source that is small, fast
and, when every flip-flop of the source feeds its own scan chain ("2D mode"),
produces chain sequences that are not copies of one another shifted by a few
clocks. A plain LFSR fails the last point: neighbouring stages carry the same
m-sequence one clock apart, so a phase-shift network of XOR trees has to be
added between the LFSR and the chains. Cellular automata mix better but cost
more gates.

A SLING generator gets good mixing from the generator itself. Its k-bit state
is cut into eight blocks of m bits, and the next state is formed from the
blocks through a fixed sparse template of cheap block transformations: shifts,
rotations and XORs of a block with a shifted copy of itself. Every
transformation costs at most one level of two-input XORs and the template
keeps most block positions empty, so the generator stays small and fast. With
a suitable choice of transformations, found by an offline search, the state
transition matrix has a primitive characteristic polynomial. Any non-zero seed
then runs through all 2^k - 1 non-zero states, and every scan chain carries a
maximal-length sequence at a large phase distance from its neighbours.

This repository holds the generator in synthesizable SystemVerilog. It
includes configurations for 16-, 32-, 64- and 128-bit generators, and
testbenches that check the generators cycle by cycle. The testbenches also
check the period, the linear complexity of every output, and the
randomness figures used to judge such generators.

## Structure

```
sling_tpg      state register, seed load, enable, outputs      (top)
  sling_stm    next-state network: the block template
    sling_xform  x25, one m-bit transformation each
sling_pkg      types, template tables, stored configurations
```

Default size: M = 8, so k = 64 flip-flops and 64 scan-chain outputs.

## The state transition template

The state is X = (W0, ..., W7). Block Wj occupies state bits `[j*m +: m]`,
and bit 0 of the state is bit 0 of W0. One clock computes X' = A·X over
GF(2), and A always has this block shape:

```
        W0   W1   W2   W3   W4   W5   W6   W7
 W0' [  M0   0    M1   0    M2   0    M3   M4 ]
 W1' [  M5   0    M6   0    M7   0    M8   0  ]
 W2' [  0    I    M9   M10  M11  M12  M13  0  ]
 W3' [  0    0    I    M14  M15  M16  M17  0  ]
 W4' [  0    0    0    I    M18  M19  M20  0  ]
 W5' [  0    0    0    0    I    M21  M22  0  ]
 W6' [  0    0    0    0    0    I    M23  0  ]
 W7' [  0    0    0    0    0    0    M24  0  ]
```

Read row by row: for example, W6' = W5 ^ M23(W6), and W0' = M0(W0) ^ M1(W2) ^
M2(W4) ^ M3(W6) ^ M4(W7). `I` is a plain copy and `0` is no connection. The
blocks W1..W6 form a chain of copies, each modified by transformations of
the later blocks. Row 0 and row 1 close the loop.

Why M4, M5 and M24 matter: if every other Mi were zero, A would send W7 to
W0 through M4, W0 to W1 through M5, W6 to W7 through M24, and copy the rest
down the identity chain. This is a block permutation, so A is invertible
whenever those three sub-matrices are. An invertible A is necessary, though
not sufficient, for a primitive polynomial. The RTL therefore refuses, at
elaboration, a configuration whose M4, M5 or M24 is not a full-rank
transformation (T1, T3 with a non-zero shift, or T6). The other 22 positions
take any transformation, including T0, which leaves the position empty.

`sling_stm` builds the template literally: 25 `sling_xform` instances, each
reading its source block. Each next block is then the XOR of its row's
transformation outputs plus the identity term. The row and column of every
Mi come from the tables `XF_ROW`/`XF_COL` in `sling_pkg`.

## The block transformations

Each Mi is one of eight maps of an m-bit block x. Shift amounts are signed:
a positive t shifts towards the MSB (left), a negative t towards the LSB.
Bits shifted in are zero.

| kind | meaning | two-input XORs |
|---|---|---|
| T0 | 0 | 0 |
| T1 | x | 0 |
| T2(t) | x shifted by t | 0 |
| T3(t) | x ^ (x shifted by t) | m − \|t\| |
| T4 | x << 1 | 0 |
| T5(t) | x >> t | 0 |
| T6(t) | (x >> t) ^ (x << (m−t)), i.e. rotate right by t | 0 (the halves do not overlap) |
| T7(t1,t2) | (x shifted by t1) ^ (x shifted by t2) | m − max(\|t1\|,\|t2\|) at most |

A transformation is a `sling_pkg::xform_t` struct: `kind`, `t1` and `t2`,
with the shift amounts as signed 8-bit fields. A configuration, `stm_cfg_t`,
is a packed array of 25 of them, with index i holding Mi.

The gate cost of the whole generator is a property of the matrix A, not of
the individual transformations, because several transformations XOR into the
same next-state bit:

* two-input XORs = Σ over rows of (ones in the row − 1)
* XOR depth = ⌈log2(most ones in any row)⌉, with the row's XOR tree balanced
* internal fan-out = most ones in any column, i.e. how many next-state bits
  one flip-flop feeds

These three figures are the method's design constraints. `sling_stm`
computes them from `CFG` at elaboration and publishes them as the localparams
`N_XOR`, `DEPTH` and `FANOUT`. If they exceed the parameters `MAX_XOR`,
`MAX_DEPTH` or `MAX_FANOUT`, elaboration stops with an error. The bounds
default to the values met by the published generators of the same size:
depth 2, fan-out 4 up to m = 4 and 5 above, and 60 / 162 / 302 XORs for
m = 4 / 8 / 16. `sling_tpg` passes the three bounds through.

## Stored configurations

The method selects transformations by random search. A candidate is kept only
if its characteristic polynomial is primitive and it meets the bounds on
XOR count, depth and fan-out. The published SLING generators reach depth 2,
fan-out 4 (32 bits) or 5 (64 and 128 bits), and 60 / 162 / 302 XORs at
32 / 64 / 128 bits. The configurations in `sling_pkg` were found by such a
search under exactly these bounds. Among the candidates, the search first
preferred the fewest scan-chain bits that only repeat another bit a few clocks
later (see *Shift-induced copies* below). After that it preferred the most
XORs, which means the most mixing.

| constant | k | m | XORs | depth | fan-out | characteristic polynomial (bit i = coeff. of u^i) |
|---|---|---|---|---|---|---|
| `CFG_M2`  | 16  | 2  | 21  | 2 | 4 | `17'h16719` |
| `CFG_M4`  | 32  | 4  | 44  | 2 | 4 | `33'h130d6baa5` |
| `CFG_M8`  | 64  | 8  | 93  | 2 | 5 | `65'h1157e71526927883f` (default) |
| `CFG_M16` | 128 | 16 | 140 | 2 | 5 | `129'h1007c5846145bd8e8c83677489687a1d1` |

`default_cfg(M)` picks the constant for a block width. The parameter `CFG` of
`sling_tpg`/`sling_stm` defaults to it, so setting only `M` to 2, 4, 8 or 16
gives a working generator.

The transformations chosen for the published SLING generators have not
been published. These four configurations are therefore independent results
of the same kind of search, not copies of the published ones. They are sparser than
the published generators (fewer XORs), yet they reach comparable
correlation figures (see below).

### Shift-induced copies

If a row of A has a single one, that state bit is next clock's copy of
another bit. The scan chain it drives then carries the other chain's
sequence delayed by one clock, and the two are perfectly correlated at that
shift. The same happens at delay d when a row of A^d has a single one. The
template cannot avoid this entirely. M24 must be full-rank, and each of T1,
T6 and T3(t) leaves at least one output bit that is a plain copy of an input
bit. So at least one bit of W7 always repeats a bit of W6. The stored
configurations keep the number of such copy chains, counted over delays
1..1000, at 2, 3, 4 and 21 for 16, 32, 64 and 128 bits. `tb_sling_workloads`
counts them by simulation. Pick a different chain from `xf_chains`, or leave
a copy chain unused, where this matters.

### Writing your own configuration

The RTL cannot tell whether a configuration is primitive. It only checks
the full-rank positions, the shift ranges and the design bounds. A
non-primitive A still gives a linear generator, but with a shorter period that depends on the seed. To
check a candidate offline:

1. Compute the characteristic polynomial p(u) = det(A − uI). An equivalent
   way: run the generator for 2k clocks and apply Berlekamp–Massey to one
   output bit. If the linear complexity is k, the connection polynomial found
   is p.
2. p is primitive iff p(0) = 1, u^(2^k−1) ≡ 1 (mod p), and
   u^((2^k−1)/q) ≢ 1 (mod p) for every prime q dividing 2^k − 1. The prime
   factors are:
   * 2^16−1 = 3·5·17·257
   * 2^32−1 = 3·5·17·257·65537
   * 2^64−1 = 3·5·17·257·641·65537·6700417
   * 2^128−1 = 3·5·17·257·641·65537·274177·6700417·67280421310721

The testbench package `tb/sling_ref_pkg.sv` contains Berlekamp–Massey and
the XOR/depth/fan-out count, so step 1 and the design figures can be checked
in simulation.

## Interface and timing of `sling_tpg`

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | |
| `rst_n` | in | 1 | asynchronous, active low; state ← `SEED` |
| `en` | in | 1 | advance one state per clock; low = hold |
| `load` | in | 1 | synchronous seed load, wins over `en` |
| `seed_in` | in | k | seed for `load` |
| `chains` | out | k | the state register; bit j feeds scan chain j |
| `xf_chains` | out | 25·m | output of transformation Mi at `[i*m +: m]` |

Parameters: `M` (block width, default 8), `CFG` (default `default_cfg(M)`),
`SEED` (reset state, default a single one in bit 0), and `MAX_XOR`,
`MAX_DEPTH`, `MAX_FANOUT` (design bounds checked at elaboration).

Timing: `chains` changes one clock after `en` or `load` is sampled high.
`xf_chains` is combinational from the state register.
The next-state path is at most two XOR levels deep for every stored
configuration. Each flip-flop drives at most five next-state XOR inputs,
plus its own output.

The all-zero state is a fixed point of any linear generator. Loading zero
is allowed but flagged by an assertion (`a_seed_nonzero`).

`xf_chains` exists because the transformed blocks are linear sequences in
their own right, and the source method suggests taking some of them as extra
scan-chain sources. Which of them are worth using depends on the
configuration:
* T0 positions are constant zero.
* Shifts have constant zero edge bits.
* T1 outputs duplicate a state block.
Synthesis removes whatever is left unconnected.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=F`.

| testbench | what it checks |
|---|---|
| `tb_sling_xform` | every kind T0..T7, with positive and negative shifts, at m = 8 and m = 5, against a bit-by-bit reference (output bit i of a shift by t is input bit i−t) |
| `tb_sling_stm` | the next state and all 25 transformation outputs, for 16-, 32-, 64- and 128-bit generators, on walking-one and random states, against an independent model holding the template as an 8×8 table; also the XOR count, depth and fan-out that the RTL computes at elaboration |
| `tb_sling_tpg` | the default 64-bit generator end to end: reset value; cycle-by-cycle match with the model over about 1300 clocks; hold with `en` low; seed loads, including load and enable together; asynchronous reset mid-run; every one of the 64 chains having linear complexity 64 and the expected primitive polynomial after four random seeds; mean Hamming distance between successive states. It also counts how often each control mechanism occurred and fails if any never did. |
| `tb_sling_workloads` | 16/32/64/128-bit generators side by side: XOR count, depth and fan-out against the bounds above; dispersion over 500 clocks from a single-one state; cross-correlation of every chain pair; auto-correlation and balance of ones of every chain; linear complexity of every chain; chains that are delayed copies of another, which must be at most a quarter of them; and, for k = 16, the full period of 65535 clocks and the phase of every chain |

Cross-correlation is measured as (agreements − disagreements)/length over
10000 bits. It is taken between every pair of chains, with the second chain
delayed by a random amount in 0..k, and separately in 0..1000. The
testbench reports the mean |correlation| and the number of pairs above 0.04.
Measured with the stored configurations:

| k | XORs | mean Hamming distance | shift 0..k: mean, pairs > 0.04 | shift 0..1000: mean, pairs > 0.04 |
|---|---|---|---|---|
| 32 | 44 | 15.8 of 32 | 0.0073, 0 of 496 | 0.0076, 0 |
| 64 | 93 | 31.4 of 64 | 0.0079, 0 of 2016 | 0.0078, 0 |
| 128 | 140 | 62.9 of 128 | 0.0079, 0 of 8128 | 0.0079, 0 |

Auto-correlation at a random shift in 1..1000 averages 0.006 to 0.008.
Every chain holds 48..52 % ones. The 16-bit generator has a period of
exactly 65535.

For comparison, the published SLING generators report means of about 0.008
and a few to a few tens of pairs above 0.04. The published measurement also
averages 100 random trials, where this one takes one draw per pair. A pair
that is a delayed copy exceeds 0.04 only if the random shift happens to hit
its delay, so one draw rarely catches it. The copy count above is the
direct measure. The sequence length behind the published averages is not stated. The 10000 bits
used here give an expected |correlation| near 0.008 for an ideal random pair.

Running a testbench with plain Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/sling_pkg.sv tb/sling_ref_pkg.sv tb/tb_sling_tpg.sv \
    --top-module tb_sling_tpg -o sim
./obj_dir/sim
```

Replace `tb_sling_tpg` with any other testbench name. Each one runs in well
under a second of wall time. The full-size test is `tb_sling_tpg`, which
uses every parameter at its default.

## Departures and choices not fixed by the method

* **Shift polarity.** The method says only that the sign of an argument
  selects the direction. Here, positive means towards the MSB.
* **T6** is read as the XOR of two shifted copies of the same state, x >> t
  and x << (m − t), which is a rotation. This is the reading that matches
  its description as a shuffle.
* **Block numbering.** W0 sits in the low bits, rows of the template are
  next-state blocks and columns are current-state blocks.
* **Configurations** are this design's own search results (see above). The
  selection used the design bounds, the count of delayed-copy chains and the
  XOR count. It did not use
  the method's full weighted cost function over equidistribution,
  uniformity, phase shift and auto-/cross-correlation; those figures are
  measured afterwards by the testbenches instead.
* **Control.** Seed load, enable, the reset value and the priority of load
  over enable are added for use as a BIST pattern source. The method
  describes only the autonomous generator.
* **Extra chain outputs.** All 25 transformation outputs are brought out,
  because the method does not say which intermediate values to use.
* **Not included.** The search procedure itself is software and not part of
  the hardware. The LFSRs, cellular automata and phase-shift networks that
  SLING is compared against are not part of this design, and neither are the
  scan chains that the generator feeds.
