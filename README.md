# SPST adder/subtractor on a double-carry-chain domino CLA adder

This design combines two ideas for binary addition in DSP datapaths.

1. **Speed: an 8-bit Manchester-carry-chain (MCC) module with two carry
   chains.** A domino Manchester chain is limited to about four stages, because
   each stage adds a transistor in series. A conventional MCC adder is therefore
   built from 4-bit blocks. Here the carries of an 8-bit slice are split by
   parity: the even carries come from one 4-stage chain and the odd carries
   from another, and the two chains run in parallel. Each chain is no longer
   than a conventional 4-bit chain, but one slice now covers 8 bits. A wide
   adder thus has half as many slices for the block carry to ripple through.
2. **Power: spurious-power suppression (SPST).** An N-bit adder/subtractor is
   cut into a most significant part (MSP) and a least significant part (LSP).
   In DSP data most values are small, so the MSP of both operands is often just
   a sign extension: all zeros or all ones. The MSP sum then follows from the
   operand classes and the LSP carry alone. A detection unit spots these cases
   and forces the MSP adder's inputs to zero, so it does not switch. A
   sign-extension unit rebuilds the MSP sum and bypass gates rebuild the
   carry-out.

The top module `spst_addsub` is a 16-bit adder/subtractor split 8/8. Its LSP
and MSP adders are both built from the double-chain module.

## The double-carry-chain 8-bit adder (`mcc_adder8`)

Per bit there are three domino signals (`mcc_pgt_cell`):

| signal | function  | role |
|--------|-----------|------|
| `g_i`  | a_i & b_i | generate |
| `p_i`  | a_i ^ b_i | exclusive propagate, also used for the sum |
| `t_i`  | a_i \| b_i | inclusive propagate |

The ordinary carry recursion is `c_i = g_i | p_i c_{i-1}`. The module does not
compute the `c_i` in a chain. It computes *pseudo-carries* `h_i`, from which
`c_i = t_i & h_i`. Two identities make the `h_i` split by parity: `g_i = g_i t_i`
and `g_i | p_i g_{i-1} = g_i | t_i g_{i-1}`. With

    G_i = g_i | g_{i-1}          P_i = p_i & p_{i-1} & t_{i-2}

each pseudo-carry depends only on the one two positions below it:

    h_i = G_i | P_i & h_{i-2}

| chain | positions | start | recursion |
|-------|-----------|-------|-----------|
| even  | 0, 2, 4, 6 | `h_0 = g_0 \| cin` | `h_2 = (g_2\|g_1) \| p_2 p_1 t_0 h_0`, ... |
| odd   | 1, 3, 5, 7 | `h_1 = (g_1\|g_0) \| p_1 p_0 cin` | `h_3 = (g_3\|g_2) \| p_3 p_2 t_1 h_1`, ... |

Each chain is one `mcc_chain4` instance. That is a multi-output domino gate
that gives all four `h` values from one shared pull-down chain. Both chains
start from the slice carry-in. Both the even and the odd position use
`c_i = t_i h_i`, and the sum is `s_i = p_i ^ c_{i-1}` (with `c_{-1} = cin`).
Note that the odd position 7 uses `t_5` in `P_7`. A form that uses `t_4`
instead is wrong; the exhaustive test of `mcc_adder8` catches it.

**Domino behaviour.** Every generate, propagate and chain gate is modelled as a
footed domino gate at logic level. While `eval` is 0 the gate is precharged and
its output is 0. While `eval` is 1 the output shows its function. The sum XOR
is static. During precharge `s` is therefore not a sum: bit 0 shows `cin` and
the other bits are 0. The transistor-level details are not modelled: keepers,
charge sharing, and the dual-rail inputs of the XOR gate. Like any domino
logic, the inputs must not change while `eval` is high if the circuit is to
work as silicon. The RTL model itself does not depend on this.

## Wider adders (`mcc_adder`)

`mcc_adder #(W)` chains `ceil(W/8)` 8-bit modules. The carry-out of each slice
is the carry-in of the next. Every carry `c[W-1:0]` is brought out, so `c[7]`,
`c[15]`, `c[23]` and `c[31]` of a 32-bit adder can be watched. The default is
W = 64. The design is meant for 8, 16, 32 and 64 bits. Other widths also work:
the top slice is padded with zeros and the carry-out is taken at bit W-1. The
SPST splits with a 7- or 9-bit LSP rely on this.

## Spurious-power suppression (`spst_addsub`)

### When the MSP can be skipped

Let `A_and`/`A_nor` mean that every MSP bit of A is 1 or 0 (likewise for B,
after the subtract inversion). Let `C_LSP` be the carry out of the LSP. If
both MSP operands are all zeros or all ones, only these MSP results are
possible:

| A_MSP | B_MSP | C_LSP | MSP sum   | carry-out |
|-------|-------|-------|-----------|-----------|
| 0...0 | 0...0 | 0     | 0...00    | 0 |
| 0...0 | 0...0 | 1     | 0...01    | 0 |
| 1...1 | 0...0 | 0     | 1...11    | 0 |
| 1...1 | 0...0 | 1     | 0...00    | 1 |
| 1...1 | 1...1 | 0     | 1...10    | 1 |
| 1...1 | 1...1 | 1     | 1...11    | 1 |

(The rows with A and B swapped behave the same.) The MSP sum is always
`{sign, sign, ..., sign, carr_ctrl}`. The detection unit (`spst_detect`) computes

    close     = (A_and | A_nor) & (B_and | B_nor)
    carr_ctrl, sign : Karnaugh maps over (C_LSP, A_and, A_nor, B_and, B_nor)

The maps are the standard ones for this scheme, entered cell by cell. Outside
the closed cases both bits are 0.

### Glitch filtering with a delayed clock

`close`, `sign` and `carr_ctrl` do not drive the datapath directly from the
gates. Three 1-bit registers hold them, clocked by `close_clk`. That is a copy
of the system clock, delayed so that its edge comes after the operands and
`C_LSP` have settled. Gate transients in the detection unit therefore never
reach the MSP. The MSP operands change at most once per cycle, at the
`close_clk` edge. `rst_n` clears the registers asynchronously, which leaves the
MSP switched on (always a correct state).

### Shutting off the MSP and rebuilding its outputs

* `spst_latch` (Latch-A, Latch-B) is a bank of AND gates: `q = d & ~close`.
  While the MSP is off, its adder sees zeros. Its carry-in `C_LSP & ~close` is
  gated in the same way.
* `spst_sign_ext` selects the MSP adder's pseudo-sum while the MSP runs. While
  it is off, it outputs `{(MSP_W-1){sign}, carr_ctrl}`.
* Carry-out: `cout = cout_MSP | A_and & B_and | (A_and | B_and) & C_LSP`.
  While the MSP is off, `cout_MSP` is 0 and the other two terms give the
  table's carry-out column. While the MSP runs, the extra terms never assert
  a wrong carry. This is because an all-ones operand plus anything nonzero
  always carries out. The bypass uses the ungated `C_LSP`; with the gated one,
  the row `1...1 + 0...0 + 1` would lose its carry.

### Subtraction

`sub = 1` inverts `b` before the split, so the detection unit classifies the
operand that is actually added. It also inverts the LSP carry-in.
The result is `a - b - cin`, with `cin` acting as a borrow-in, and `cout` is
the inverted borrow-out, as usual for two's-complement subtraction.

## Clocks and timing

The top has three timing inputs and no internal clock generation:

| input       | role |
|-------------|------|
| `close_clk` | rising edge latches the MSP decision; must follow the operand change and the settling of the LSP carry |
| `eval`      | domino clock of both adders: 0 precharge, 1 evaluate |
| `rst_n`     | asynchronous reset of the three decision registers |

One cycle, as the end-to-end testbench drives it (time units):

    t=0   system clock rises, operands change (the test applies a glitch value first)
    t=1   eval = 1: adders evaluate; the final operands are applied
    t=3   close_clk rises: close/sign/carr_ctrl registered, MSP operands gated
    t=7   sum, cout, msp_off read - the result belongs to this cycle
    t=9   eval = 0: precharge

`eval` must already be high at the `close_clk` edge, because the decision needs
`C_LSP` from the (domino) LSP adder. After that edge the MSP operands can
change once more, while the MSP adder is evaluating. A transistor design would
give the MSP adder its own, later evaluate phase. That split is not modelled.

A slower path appears only when the decision turns the MSP on: the MSP adder
must then wait for the `close_clk` edge. When the MSP stays off, its sum is
ready as soon as the decision is.

## Files

| file | contents |
|------|----------|
| `rtl/spst_addsub.sv`   | top: split adder/subtractor, bypass carry-out |
| `rtl/spst_detect.sv`   | detection logic and the three decision registers |
| `rtl/spst_latch.sv`    | AND-gate operand latch |
| `rtl/spst_sign_ext.sv` | sign-extension unit |
| `rtl/spst_pkg.sv`      | `spst_ctrl_t` {close, sign, carr_ctrl} |
| `rtl/mcc_adder.sv`     | W-bit adder from 8-bit modules |
| `rtl/mcc_adder8.sv`    | double-carry-chain 8-bit module |
| `rtl/mcc_chain4.sv`    | 4-output domino carry chain |
| `rtl/mcc_pgt_cell.sv`  | domino g/p/t cell |
| `tb/tb_<module>.sv`    | one self-checking testbench per module |
| `tb/mcc_adder_chk.sv`, `tb/spst_addsub_chk.sv` | per-width DUT + checker helpers |

Parameters: `spst_addsub #(MSP_W = 8, LSP_W = 8)`, with `MSP_W` at least 2;
`mcc_adder #(W = 64)`. The transform engine in which this adder/subtractor was
originally applied uses 8/7 (15-bit) and 8/9 (17-bit) splits. Both are
simulated by the top-level testbench.

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. From the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/spst_pkg.sv \
        --top-module tb_spst_addsub tb/tb_spst_addsub.sv
    ./obj_dir/Vtb_spst_addsub

Replace `tb_spst_addsub` with any other testbench name. Every one runs in well
under a second. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/spst_pkg.sv rtl/<module>.sv`.

What the tests establish:

* `tb_mcc_pgt_cell`, `tb_mcc_chain4`: exhaustive, both clock phases. The chain
  is compared with the expanded (non-recursive) carry sum.
* `tb_mcc_adder8`: all 2^17 operand/carry combinations. Sum, all eight
  carries and carry-out are compared with integer addition. Some cases are also
  checked in precharge.
* `tb_mcc_adder`: widths 64 (default), 32, 16, 8, 9 and 7, with 20,000 random
  cases each. Half of them have `b = ~a`, so every position propagates. Half of
  those also have carry-in 1, which ripples a carry through every slice.
* `tb_spst_detect`: the decision is compared with the true MSP sum. The test
  also checks that operand changes between `close_clk` edges do not reach the
  outputs, and that reset clears them.
* `tb_spst_addsub`: 30,000 cycles each of the 16-, 15- and 17-bit
  configurations, add and subtract. The result is checked every cycle. The test
  fails if any mechanism never occurs: MSP off, MSP on, turn-off, turn-on,
  each of the eight closed operand/carry combinations, bypass carry-out,
  subtraction, glitches, reset, or precharge.

## Choices made in this RTL beyond the original description

* The subtract mechanism (`sub` inverts `b`; `cin` acts as a borrow).
* The polarity of `close` (1 = MSP off) and the gating of the MSP carry-in.
* The exact carry-out bypass expression. The signals it uses follow the
  original block diagram; the formula is derived here.
* Reset values and the asynchronous reset of the decision registers.
* Joining 8-bit modules by simple slice-to-slice carry, and zero-padding
  widths that are not multiples of 8.
* The `msp_off` status output.
* The single `eval` domino clock shared by the LSP and MSP adders.

## Not modelled

* **Power and delay.** Glitch power, the speed advantage of the double chain
  and the timing window for the `close_clk` delay are circuit properties. The
  RTL reproduces only the logic.
* **The delay generator** that derives `close_clk` from the system clock
  (a DLL-style delay line). `close_clk` is a top-level input.
* **The carry-skip extension** of the odd chain. It is an optional improvement
  and is not included.
* **The transform engine** that the 15- and 17-bit units belong to. Only its
  adder/subtractor sizes are reproduced.
