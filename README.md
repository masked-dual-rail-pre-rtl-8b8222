# MDPL AES-128: an AES core in Masked Dual-Rail Pre-Charge Logic

Differential power analysis (DPA) recovers a secret key from the way a chip's
power draw depends on the data it processes. Masked Dual-Rail Pre-Charge Logic
(MDPL) is a gate-level countermeasure. It combines two older ideas:

* **Masking.** Every signal `d` is carried as `d_m = d XOR m`. A single random
  mask bit `m` serves the whole circuit and changes every clock cycle, so the
  value on any wire does not depend on `d` alone.
* **Dual rail with pre-charge.** Every signal is a pair of wires, `(d_m, NOT d_m)`.
  Both wires are 0 during a *pre-charge* phase. During an *evaluation* phase
  exactly one of them rises. The circuit makes the same number of 0-to-1
  transitions every cycle, and no gate glitches.

Pure dual-rail logic only hides data if the two wires of each pair are routed
with equal capacitance. MDPL drops that routing constraint. An unbalanced pair
now leaks only `d XOR m`, which is independent of `d`. Masking alone, on the
other hand, is weakened by glitches, and the pre-charged dual-rail form removes
them. Every MDPL gate is built from ordinary 3-input majority (MAJ) standard
cells, so a normal semi-custom flow can produce it.

This repository holds the MDPL cell set in synthesizable SystemVerilog. It also
holds a complete AES-128 encryption core whose entire datapath is made of those
cells.

## Signal encoding

`mdpl_pkg::mdpl_t` is a packed struct `{t, f}`:

| phase       | `t` (true rail) | `f` (false rail) |
|-------------|-----------------|------------------|
| pre-charge  | 0               | 0                |
| evaluation  | `d XOR m`       | `NOT (d XOR m)`  |

Gates receive the mask as a pre-charged pair as well (`mr` from `mdpl_ctrl`).
A constant is masked like any other value: logic 0 is the mask pair itself,
because `0 XOR m = m`, and logic 1 is the swapped pair. Constants therefore
pre-charge too.

## The cells

MAJ is self-dual: `NOT MAJ(a,b,c) = MAJ(NOT a, NOT b, NOT c)`. It is also monotonic.
These two properties give every cell below:

| cell (module)  | true rail                         | false rail                        | MAJ gates |
|----------------|-----------------------------------|-----------------------------------|-----------|
| AND `mdpl_and` | `MAJ(a.t, b.t, m.t)`              | `MAJ(a.f, b.f, m.f)`              | 2 |
| OR `mdpl_or`   | `MAJ(a.t, b.t, m.f)`              | `MAJ(a.f, b.f, m.t)`              | 2 |
| NAND / NOR     | AND / OR with the output rails swapped |                              | 2 |
| inverter `mdpl_inv` | `a.f`                        | `a.t`                             | 0 |
| XOR `mdpl_xor` | `(a AND NOT b) OR (NOT a AND b)`, built from three MDPL gates |       | 6 |
| XNOR `mdpl_xnor` | `(a AND b) OR (NOT a AND NOT b)` |                                   | 6 |

With all inputs at 00, every MAJ output is 0, so the pre-charge wave travels
through the logic. During evaluation, inputs only rise, so each output rises at
most once. The MAJ gate counts match the published cost of the MDPL cells. The
XOR/XNOR decompositions are this design's own choice; only their cost of 6 MAJ
gates is given.

`mdpl_maj` is a sum of products. In silicon it must be a library MAJ3 cell that
synthesis does not restructure; otherwise monotonicity, and with it freedom from
glitches, is lost. Use a `dont_touch` attribute or a cell-mapping step in your
flow.

A plain MDPL buffer is one CMOS buffer per rail. It has no RTL: it is a
drive-strength matter for physical design.

## Flip-flop and mask switching (`mdpl_dff`)

Because the mask changes every cycle, a register cannot simply keep its input.
At the end of evaluation, `mdpl_dff` stores `d.t XOR m XOR m_nxt = d XOR m_nxt`
in one D flip-flop. At the same edge, the mask register in `mdpl_ctrl` loads
`m_nxt`, so the stored bit is correctly masked for the next cycle. The cell's
outputs are ANDed with `NOT prch`. They are therefore 00 during pre-charge, and the
flip-flops launch the pre-charge wave into the logic behind them.

The published cell uses 2 AND, 2 OR, 2 MAJ and one D flip-flop, but its internal
arrangement is not reproduced here. This version re-masks with a CMOS XOR at the
flip-flop input and uses the two output ANDs. Only the true input rail is
stored; the false rail is redundant when the input has evaluated.

## Timing: two clk periods per MDPL cycle (`mdpl_ctrl`)

`mdpl_ctrl` divides time into MDPL cycles of two `clk` periods:

```
clk period :   P    E    P    E    P    E
prch       :   1    0    1    0    1    0
cap        :   0    1    0    1    0    1
                     ^         ^         ^  rising edges that end E:
                     flip-flops capture, m <= m_nxt, LFSR steps
```

In the MDPL description, pre-charge and evaluation are the two halves of one
clock period. Here they are whole `clk` periods, so `prch`, `cap` and the mask
are all register outputs. This keeps the RTL free of clock-as-data races and
simulates deterministically. The next mask comes from bit 0 of a 32-bit Galois
LFSR (x^32 + x^22 + x^2 + x + 1, parameter `SEED`). The LFSR stands in for a
true random number generator, and a secure chip needs a real one. After reset,
the first period is a pre-charge period and `m = 0`.

Every combinational MDPL net in this design is a function of register outputs
that change only at `clk` edges. A net therefore goes 00 at the start of P and
resolves once during E.

## CMOS boundary (`cmos_to_mdpl`, `mdpl_to_cmos`)

`cmos_to_mdpl` turns plain bits into masked pairs:
`y = (x XOR m, NOT(x XOR m))` during E and 00 during P. Drive it from
registers.

`mdpl_to_cmos` stores `a.t XOR m` at the end of E when `en = 1`. It also
raises a sticky `err` if any pair is not 00 during P, or is not complementary at
the end of E. The monitor is this design's addition, for test and debug.

## S-box (`mdpl_sbox`)

The AES S-box is built the way a table-driven synthesis would build it, using
only MDPL cells. Each output bit is a Shannon tree:

* **64 leaves.** Each leaf is a function of input bits 1..0. The leaf's
  4-entry truth table selects one of the 16 two-input functions. The result is
  a constant (a mask pair), a wire, a rail swap, or a single MDPL
  AND/OR/NAND/NOR/XOR/XNOR, with inputs inverted by rail swaps where needed.
* **63 multiplexers.** These sit in 6 levels that select on bits 2 (at the
  leaves) through 7 (at the root). Each multiplexer (`mdpl_mux2`) is
  NAND(NAND(s,hi),NAND(NOT s,lo)) on even levels and the NOR dual on odd levels.

The S-box table comes from `mdpl_pkg::aes_sbox_table()`, which computes it at
elaboration time: the multiplicative inverse `x^254` in GF(2^8) modulo
x^8+x^4+x^3+x+1, followed by the affine map with constant 0x63. The S-box stores
no data table.

## The AES core (`mdpl_aes`, top)

The core computes one full AES round per MDPL cycle:

```
           plaintext,key (CMOS regs) --cmos_to_mdpl--> AddRoundKey(0) --+
                                                                        | load
 st_q --> 16x S-box --> ShiftRows --> 4x MixColumns --+--> XOR rk' --> mux --> 128 mdpl_dff (state)
                                       (skipped in round 10: mux)           |
 rk_q --> key expansion (4x S-box, rcon) --> rk' -------------------------> mux --> 128 mdpl_dff (key)
                                                                           |
                       state --> mdpl_to_cmos --> ciphertext (after round 10)
```

* The state and the round key are 256 MDPL flip-flops, re-masked every cycle.
* Helper modules: `mdpl_xor_vec` (W XORs), `mdpl_xtime` (multiply by 2 in
  GF(2^8)), `mdpl_mixcolumn` (`y_i = a_i ^ t ^ xtime(a_i ^ a_i+1)`, with `t` the
  XOR of the column) and `mdpl_keyexp` (one AES-128 key-schedule step).
* The control FSM is plain CMOS. Its two datapath controls enter through
  `cmos_to_mdpl`, so every multiplexer in the datapath is an MDPL gate: `load`
  selects the round-0 input, and `last` bypasses MixColumns. The public round
  constant enters the same way.
* The byte order is FIPS-197: byte 0 is bits 127:120, and the state is filled
  column by column.

Interface:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | when `busy = 0`, take `plaintext` and `key` at this edge |
| `plaintext`, `key` | in | 128 | block and AES-128 key |
| `busy` | out | 1 | encryption in progress |
| `done` | out | 1 | one-`clk` pulse; `ciphertext` is valid from then on and holds until the next `done` |
| `ciphertext` | out | 128 | result |
| `rail_err` | out | 1 | sticky: a state-register pair broke the pre-charge/evaluation rule |

Each `mdpl_dff` also carries an assertion that its input pair has evaluated
(01 or 10) when it is captured.

The latency is 12 MDPL cycles: one load cycle, ten rounds and one output cycle.
From the edge that takes `start` to the edge that raises `done`, this is 24
`clk` periods if `start` lands at the end of an evaluation period. If it lands
at the end of a pre-charge period, it is 23, because the load cycle's
pre-charge has already passed. Throughput is one block per 12 MDPL cycles.
Parameter `MASK_SEED` seeds the mask LFSR.

The AES architecture (round per cycle, handshake, latency) is this design's
own. A full MDPL AES module is known to cost about 4.5x the area of its CMOS
counterpart, to run at about 0.6x its speed, and to draw 4x to 6x its power.
The RTL does not model area, speed or power.

## What to trust, and the limits

* **Verified functionally.** Every gate is checked exhaustively over data and
  mask. The S-box is checked over all 256 inputs with both masks, against an
  independently computed table. The AES core is checked against the FIPS-197
  vectors and a behavioural reference on random data. The AES test also
  checks the pre-charge rules: all 512 register rails are 0 in pre-charge, and exactly
  256 are 1 in every evaluation.
* **DPA experiment.** `tb_mdpl_aes_dpa` runs 256 encryptions under one key,
  sweeping plaintext byte 0. It observes the first SubBytes output of byte 0.
  Exactly 8 of its 16 rails rise in every encryption. The true rail alone, which
  stands for an unbalanced wire, is decorrelated from the unmasked bit by the
  mask. These are logic-level statements. Real resistance depends on the MAJ
  cells' timing ("early evaluation") and on internal nodes that are not
  pre-charged, which RTL cannot show.
* **Unbalanced wires.** `tb_mdpl_nand_dpa` loads the false output rail of an
  MDPL NAND with 1.5 times the capacitance of the true rail. Over 4000 random
  evaluations, the energy difference of means between output 1 and output 0
  stays near 0. The same model applied to an unmasked dual-rail NAND gives the
  full 0.5 imbalance.
* **Single mask bit.** One mask bit for the whole circuit is the MDPL
  principle. As a result, each register word is stored either true or
  complemented.
* **Not included.** There is no physical random source (the LFSR stands in for
  it). There is no buffer cell, and no flow step that maps `mdpl_maj` onto
  library MAJ3 cells with `dont_touch`.
* **Synthesis size.** Flattened, the core has about 84k AND and 82k OR
  two-input cells, i.e. roughly 28,000 MAJ gates, most of them in the 20
  S-boxes. It also has 256 MDPL flip-flops, 384 CMOS register bits for
  the plaintext, key and ciphertext, and a few dozen control bits.

## Files and simulation

`rtl/` holds one module or package per file. `mdpl_pkg.sv` must be read first.
`tb/` holds one self-checking testbench per module (`tb_<module>.sv`), plus the
AES reference package `aes_ref_pkg.sv` and the two DPA testbenches
`tb_mdpl_aes_dpa.sv` and `tb_mdpl_nand_dpa.sv`.
Each testbench prints `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mdpl_pkg.sv tb/aes_ref_pkg.sv tb/tb_mdpl_aes.sv --top-module tb_mdpl_aes
./obj_dir/Vtb_mdpl_aes
```

The cell testbenches need only `rtl/mdpl_pkg.sv` and their own file (for
example `tb/tb_mdpl_sbox.sv --top-module tb_mdpl_sbox`). The AES testbenches
take about 1.5 minutes to compile and well under a second to run.
