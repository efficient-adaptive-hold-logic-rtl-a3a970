# Aging-aware variable-latency NR4SD multiplier

A signed multiplier runs with a clock period shorter than its worst-case
path. Most operand pairs never use that path. This design gives such pairs one
cycle and gives the rest two. The decision is made per operation from a cheap
property of the operands: how many zero bits the multiplicand has. Many zeros
mean few non-zero partial products and short carry chains, so the result
settles early.

Transistor aging (NBTI in pMOS and PBTI in nMOS devices) slowly raises
threshold voltages, so a prediction that was safe when the chip was new
eventually fails. The design handles this in two ways:

* **Razor flip-flops** on the product catch every result that missed the
  clock edge. The result is restored from a shadow element sampled on a
  delayed clock, so no wrong product ever leaves the block.
* An **adaptive hold logic (AHL)** counts those errors. When they become
  frequent, it switches to a stricter one-cycle rule that requires one more
  zero in the multiplicand. The circuit keeps working after aging, with a
  smaller share of one-cycle operations, instead of needing a guard-banded
  clock.

The arithmetic core is a **pre-encoded NR4SD multiplier**. NR4SD stands for
non-redundant radix-4 signed digit. The multiplier operand is recoded into
radix-4 digits that need only two bits each, rather than the three bits of
Modified Booth (MB). Those bits drive simple partial product generators feeding
a carry-save tree and a fast adder.

Everything is synthesizable SystemVerilog. The default is a 16 x 16 multiplier.

## Block map

```
                 md ──►[md_q]──────────────┬───────────────────────────►┐
 in_valid ──►[v_q]                          │                            │
                 mr ──►[mr_q]─► nr4sd_recoder ─(N+1 bits)─► nr4sd_multiplier ─(2M)─► razor_ff ─► product
                          ▲ load enable = in_ready              ▲                      │   │
                          │                                     │ clk_del ─────────────┘   ├─► product_valid
                          └──── not_gating & ~reexecute ◄─ ahl ◄── opnd = md_q (or mr_q)   └─► reexecute (error)
                                                            ▲ error, op_done
```

| file | what it is |
|---|---|
| `rtl/ahl_mult_pkg.sv` | shared types: NR4SD flavour enum, stored-digit struct, one-hot encodings |
| `rtl/aging_aware_multiplier.sv` | top: input registers, recoder, multiplier, Razor register, AHL |
| `rtl/nr4sd_recoder.sv` | two's complement → pre-encoded NR4SD (N+1 bits) |
| `rtl/nr4sd_multiplier.sv` | encoders, partial products, correction row, CSA tree, CLA |
| `rtl/nr4sd_encoder.sv` | stored digit (2 bits) → one+, one-, two± |
| `rtl/nr4sd_ppg.sv` | partial product of one NR4SD digit |
| `rtl/mb_ppg.sv` | partial product of the Booth-coded top digit |
| `rtl/csa_tree.sv` | Wallace-style 3:2 carry-save tree |
| `rtl/cla_adder.sv` | carry-lookahead adder (Kogge-Stone prefix) |
| `rtl/razor_ff.sv` | 2M Razor flip-flops with restore and OR-ed error |
| `rtl/ahl.sv` | adaptive hold logic |
| `rtl/judging_block.sv` | "more than n zeros" detector |
| `rtl/aging_indicator.sv` | windowed error counter |

## The NR4SD arithmetic

### Recoding (`nr4sd_recoder`)

An N-bit two's complement operand B (N even, K = N/2 digits) is rewritten as
K radix-4 digits. The lower K-1 digits take only four values, so two bits hold
each one:

* **NR4SD-**: digits {-2, -1, 0, +1}, stored as (n-, n+) with value -2·n- + n+
* **NR4SD+**: digits {-1, 0, +1, +2}, stored as (n+, n-) with value 2·n+ - n-

The recoder is a ripple chain of half adders that starts with carry c0 = 0.
Each digit j adds its two bits and the incoming carry, and emits a digit and a
carry into digit j+1:

| flavour | low bit | middle carry | high bit | carry out |
|---|---|---|---|---|
| NR4SD- | n+ = b2j ⊕ c | b2j · c | n- = b2j+1 ⊕ m | b2j+1 + m |
| NR4SD+ | n- = b2j ⊕ c | b2j + c | n+ = b2j+1 ⊕ m | b2j+1 · m |

Here m is the middle carry. The upper cell of NR4SD- is a half adder whose sum
has negative weight, so its carry is an OR. The top digit has to cover the full
two's complement range. It is therefore kept in Modified Booth form
{-2..+2}, with the chain carry taking the place of the usual b2j-1 bit:
s = bN-1, one = bN-2 ⊕ c, two = (bN-1 ⊕ bN-2)·¬one.

The stored word has **N+1 bits**: 2(K-1) digit bits plus three Booth bits.
Bits [2j+1:2j] hold digit j as {hi, lo}, and bits [N:N-2] hold {s, one, two}.
In a coefficient-multiplier setting this word would sit in a ROM. Here the
recoder computes it from the registered multiplier operand.

### Partial products (`nr4sd_encoder`, `nr4sd_ppg`, `mb_ppg`)

Three AND gates turn a stored pair into one-hot digit signals:

* NR4SD-: one+ = ¬n-·n+, one- = n-·n+, two- = n-·¬n+
* NR4SD+: one+ = n+·n-, one- = ¬n+·n-, two+ = n+·¬n-

Each partial product has N+1 bits, with A sign-extended by one bit and a-1 = 0.
Each bit is an AND-OR:

* NR4SD-: p_i = a_i·one+ ∨ ¬a_i-1·two- ∨ ¬a_i·one-
* NR4SD+: p_i = a_i·one+ ∨ a_i-1·two+ ∨ ¬a_i·one-
* MB top digit: p_i = (a_i·one ∨ a_i-1·two) ⊕ s

A negative digit thus gives the one's complement of |d|·A. The missing +1
comes out as `cin`:

* NR4SD-: cin = one- ∨ two-
* NR4SD+: cin = one-
* MB: cin = s

### Summation (`nr4sd_multiplier`)

Before weighting by 2^2j, the top (sign) bit of each partial product is
inverted. A single correction row then adds two things:

* the `cin` bits at positions 2j;
* the constant 2^N·(1 + Σ_j 2^(2j+1)), which is binary `1010…1011` shifted to
  bit N. Modulo 2^2N it equals -Σ_j 2^(N+2j), which undoes the inverted sign
  bits.

The K partial product rows and the correction row (K+1 rows of 2N bits) go
through `csa_tree`. This is a Wallace-style tree of full-adder rows that takes
rows three at a time. `cla_adder` then adds the resulting sum and carry rows.
The result is exact for every signed N x N product.

## Variable latency: the AHL and the cycle timing

### Adaptive hold logic (`ahl`)

Two `judging_block`s watch the registered multiplicand:

* block 1 outputs 1 if it has more than `N_ZEROS` zeros;
* block 2 outputs 1 if it has more than `N_ZEROS+1` zeros.

A mux picks block 1 while `aged` = 0 and block 2 afterwards. The mux output is
OR-ed with Q̄ of a flip-flop clocked on the **falling** edge. Q is
`not_gating`:

```
D = sel_one_cycle | ~Q
```

* For a one-cycle pattern, D = 1 and the input registers load at the next
  rising edge.
* For a two-cycle pattern, Q drops at the falling edge, so the next rising
  edge does not load.
* Q̄ is then 1, so Q is back to 1 at the following falling edge. At most one
  load edge is ever skipped.

The falling-edge flip-flop gives the judging blocks half a cycle after the
input registers change.

The original architecture ANDs CLK with `not_gating` to gate the input
registers' clock. This RTL uses `not_gating` as a synchronous load enable
instead. The registers load on the same edges, and there is no gated clock
net.

### Razor register (`razor_ff`)

For every one of the 2M product bits:

* a main flip-flop on `clk`;
* a shadow register on `clk_del`, which samples only after a capture edge;
* an XOR comparator. The comparator outputs are OR-ed into `error`.

The sequence after a capture edge:

1. At a capture edge (`en` = 1) the main flip-flops take the multiplier output.
2. At the next `clk_del` edge the shadow register samples the same output
   again.
3. If the two differ, the path was late. `error` (the top's `reexecute`) is 1
   for the rest of that cycle.
4. At the next `clk` edge the main flip-flops reload from the shadow register.

`product_valid` marks the cycle in which `product` holds a finished result:

* the cycle after a clean capture; or
* the cycle after a restore.

### Timing of the top (`aging_aware_multiplier`)

An operand pair is accepted at a rising edge where `in_ready` = 1.
`in_valid` = 0 loads a bubble. The Razor register never reports a bubble.

| case | input registers held | `product_valid` after acceptance |
|---|---|---|
| one-cycle pattern, on time | 1 cycle | 2nd cycle |
| two-cycle pattern | 2 cycles | 3rd cycle |
| one-cycle pattern that missed the edge (Razor error) | 1 cycle | 3rd cycle (restored) |
| any pattern accepted while the previous one is being restored | 2 cycles | as above, one cycle later |

`in_ready = not_gating & ~reexecute`:

* it drops in the second cycle of a two-cycle pattern;
* it drops in the cycle after a Razor error. That cycle is the restore edge,
  where the Razor register is busy, so the pair already in the registers gets
  a second cycle.

The AHL re-judges whatever pair is in the registers, every cycle. There is
one rare consequence. Say a one-cycle pattern is held by a Razor stall exactly
when the aging indicator switches, and it has exactly `N_ZEROS+1` zeros. It
then gets a third cycle.

`clk_del` must be `clk` delayed by less than half a period. Two timing rules
apply, as for any Razor design:

* the longest path must settle before the `clk_del` edge;
* the shortest path from the input registers to the Razor inputs must be
  longer than the `clk`→`clk_del` skew.

Paths slower than the `clk_del` edge cannot be detected. The clock must still
cover them.

### Aging indicator (`aging_indicator`)

It counts completed operations and Razor errors.

* Every `WINDOW` operations both counts return to zero.
* As soon as a window holds more than `ERR_LIMIT` errors, `aged` goes to 1.
* `aged` stays 1 until reset. Aging does not reverse, and the stricter block
  lowers the error rate, which would otherwise switch it straight back.

## Parameters

| parameter | default | meaning | origin |
|---|---|---|---|
| `M` | 16 | operand width (even, ≥ 4) | evaluated widths are 4, 8, 16, 32; 16 chosen |
| `KIND` | `NR4SD_MINUS` | NR4SD flavour | either works; NR4SD- chosen |
| `N_ZEROS` | 7 | n in "more than n zeros" | not specified; 7 is one of the 16-bit settings evaluated |
| `JUDGE_MR` | 0 | judge the multiplicand (0) or the multiplier (1) | both are allowed; the multiplicand was used in the evaluation |
| `WINDOW` | 128 | aging indicator window, in operations | not specified |
| `ERR_LIMIT` | 8 | errors per window that mean "aged" | not specified |

The arithmetic core has been simulated at 4, 8, 16 and 32 bits in both
flavours. The whole design has been simulated at 4, 8, 16 and 32 bits with
`NR4SD_MINUS`. It has also been simulated at 16 bits with every combination
of `KIND` and `JUDGE_MR`. Widths above 32 are legal, but the testbenches' integer
reference models stop at 64-bit products, so they are untested.

## Where this RTL departs from, or adds to, the source design

* The clock gate (CLK AND not_gating) is a load enable on the input registers.
* The Razor shadow element is an edge-triggered register on `clk_del`. The
  source calls it a latch. A transparent latch would also see the next
  operation's result in zero-delay simulation.
* Recovery from a Razor error uses the shadow value, which is the restore mux
  of the Razor cell. It also holds the next operand pair for one cycle. The
  source says only that a failed operation is "re-executed with two cycles".
* For NR4SD-, the carry of a negative digit is one- OR two-. The source's
  formula reads as an AND, which would always be 0.
* The handshake (`in_valid`, `in_ready`, `product_valid`) has been added.
  `in_valid` marks bubbles.
* The NR4SD+ recoding equations are derived from its truth table. Only the
  NR4SD- chain is drawn in the source.
* The tree arrangement of the CSA stage and the lookahead structure of the CLA
  are this design's choice.
* Not built: the coefficient ROM of the stand-alone pre-encoded multiplier.
  Its size and contents belong to an application that is not described, and
  the aging-aware architecture feeds both operands from registers. Its word
  format is exactly the output of `nr4sd_recoder`.
* Not reproduced: the gate-level area, delay, power and error-count figures
  of the original evaluation. Those depend on an FPGA implementation and its
  real path delays.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F` and has a watchdog.

* `tb_nr4sd_recoder`, `tb_nr4sd_encoder`, `tb_nr4sd_ppg`, `tb_mb_ppg`: check
  exhaustively (8-bit) or randomly (16/32-bit) that digit values and partial
  products are correct, from the meaning of the bits alone.
* `tb_csa_tree`, `tb_cla_adder`, `tb_nr4sd_multiplier`: compare against
  integer sums and products. The multiplier test is exhaustive for 4x4 and 8x8
  in both flavours and random for 16x16 and 32x32.
* `tb_razor_ff`: drives `d` with explicit delays covering three cases: an
  on-time capture, a late arrival (error, restore, valid one cycle later), and
  no capture.
* `tb_judging_block`, `tb_aging_indicator`, `tb_ahl`: check threshold,
  window and aging behaviour. They also check the one/two-cycle hold of every
  operand.
* `tb_aging_aware_multiplier`: the full design at its default parameters,
  with 13000 random operand pairs and some bubbles.
* `tb_workload_sizes` (using `tb/ahl_mult_workload.sv`): the same scheme at
  4, 8, 16 and 32 bits, with 13000 pairs each.
* `tb_workload_variants`: the same scheme at 16 bits for the other three
  combinations of `KIND` and `JUDGE_MR`.

**How the system tests create timing errors.** Zero-delay simulation never
misses a clock edge, so the two system testbenches emulate path delay. They
write values onto the Razor register's input with `force`:

* An operation is "slow" if its multiplicand has at most `slow_z` zeros.
* When a slow operation gets only one cycle, the testbench presents a wrong
  value at the clock edge and the right one just after it.
* After every capture edge, the testbench holds the captured result until the
  delayed clock has passed, to model the short-path rule.

The testbenches run three phases:

1. `slow_z = N_ZEROS`: the AHL's prediction is exact and no errors may occur.
2. `slow_z = N_ZEROS+1`: errors must appear and be corrected, and must trip the
   aging indicator. After the switch they must stop.
3. `slow_z = N_ZEROS+2` (full-size test only): errors continue and every
   product must still be right.

Checked in every phase:

* every product;
* that the number of Razor errors equals the number of late arrivals
  injected;
* how many cycles each operand pair stays in the input registers.

The full-size run needs about 1.6 cycles per operation. It shows one-cycle and
two-cycle patterns, errors, stalls, bubbles and the aging switch.

What the testbenches cannot show is real silicon timing. Whether a given
operand pattern really finishes in one cycle depends on the netlist and the
clock. The zero-count threshold has to be calibrated against static timing of
the synthesized multiplier, and `WINDOW`/`ERR_LIMIT` against the error rate
you can tolerate.

## Simulating

With Verilator 5 (the testbenches use timing controls):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/ahl_mult_pkg.sv tb/tb_aging_aware_multiplier.sv \
    --top-module tb_aging_aware_multiplier
./obj_dir/Vtb_aging_aware_multiplier
```

Replace the testbench name to run any other test. Every test finishes in well
under a second. For lint only, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/ahl_mult_pkg.sv rtl/<module>.sv`.
The only warning left is the unused carry-out of the final adder, which is
left unconnected on purpose.
