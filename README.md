# Reversible combinational units: multiplier, adder/subtractor, multiplexer and friends

A reversible circuit maps its inputs to its outputs one-to-one, so no
information is erased as it computes; in principle such logic can avoid the
energy cost of erasing bits. The price is bookkeeping. Every gate has as many
outputs as inputs. Results that need fewer lines than the inputs give leave
**garbage outputs** behind. Functions that need more lines take **constant
inputs** (ancillas). Designs in this style are judged by gate count, constant
inputs and garbage outputs as much as by speed.

This RTL builds a small library of reversible combinational units from a
handful of 3x3 gates. They are meant as the arithmetic and steering blocks of
a brain-computer-interface control path:

| unit | module | built from | inputs + constants = outputs + garbage |
|---|---|---|---|
| 5x5 signed multiplier | `rm` | 25 Toffoli, 16 double Peres, 4 Peres | 10 + 46 = 10 + 46 |
| 4-bit adder/subtractor | `ras` | 4 Feynman, 4 double Peres | 9 + 4 = 5 + 8 |
| 4x1 multiplexer | `rmux` | 3 R gates | 6 + 0 = 1 + 5 |
| 1x4 demultiplexer | `rdemux` | 3 R gates | 3 + 3 = 4 + 2 |
| 3-to-8 decoder | `rdecoder` | 1 Feynman, 6 R gates | 3 + 7 = 8 + 2 |
| 8-to-3 one-hot encoder | `rencoder` | 12 Feynman | 8 + 3 = 3 + 8 |

Everything is purely combinational. There are no clocks, resets or state.
The SystemVerilog models each reversible gate as a module, and each unit as a
netlist of those gates. Synthesis therefore sees ordinary AND/XOR/MUX logic,
but the structure, the constant inputs and the garbage lines of the
reversible circuit are kept in the hierarchy and on the ports.

## The gates

| gate | module | outputs |
|---|---|---|
| Feynman (CNOT) | `feynman_gate` | p = a, q = a ^ b |
| Toffoli (TG) | `toffoli_gate` | p = a, q = b, r = ab ^ c |
| Peres (PG) | `peres_gate` | p = a, q = a ^ b, r = ab ^ c |
| double Peres (DPG) | `dpg` | two PGs, see below |
| R gate | `r_gate` | p = s, q = s ? i0 : i1, r = s ? i1 : i0 |

A **Peres gate with c = 0 is a half adder**: q is the sum and r the carry.

The **double Peres gate** is two Peres gates in series. The first takes
(a, b, k) and gives (a, a^b, ab^k). The second takes (c, a^b, ab^k) and gives

    p = c               garbage
    sum = a ^ b ^ c
    cy  = c(a^b) ^ ab ^ k

With k = 0 this is a full adder with two garbage lines (a and c). With k = 1
the carry comes out inverted. The multiplier uses that in one place (below).

The **R gate** is a controlled swap with the select on its first line. Its
last output is the selected input, which makes it a 2:1 multiplexer with no
constant input. Tying `i1` to 0 makes it a 1:2 demultiplexer:
q = s & i0 and r = ~s & i0. The published description names the R gate but
gives no equations for it. These equations are this design's choice: they
are the simplest reversible gate that makes the 4x1 multiplexer work as drawn,
with no constants and five garbage lines. If your R gate is a different 3x3
gate, only `r_gate.sv` changes. The multiplexer, demultiplexer and decoder
depend only on its selecting behaviour.

## The multiplier (`rm`)

This is the largest and least obvious unit. It multiplies two 5-bit
two's-complement numbers into a 10-bit two's-complement product, in two
stages.

**Partial products (`rm_pp`).** A 5x5 grid of Toffoli gates. Row i carries
x[i], which enters at the y[0] end and passes from gate to gate. Column j
carries y[j] downward from the x[4] row. The gate at (i, j) writes
x[i]&y[j] ^ k onto a constant line k. The product is signed, so the
Baugh-Wooley scheme is used:

* the sign-row and sign-column terms x[4]y[j] and x[i]y[4] (i, j < 4) use
  k = 1 and come out complemented;
* x[4]y[4] and all other terms use k = 0.

Then

    x*y = sum(pp[i][j] * 2^(i+j)) + 2^5 + 2^9     (mod 2^10)

The five X lines and five Y lines that leave the grid are garbage.

**Multi-operand addition (`rm_moa`).** The 25 terms sit in columns 0..8
(1, 2, 3, 4, 5, 4, 3, 2, 1 bits). They are reduced in four rows of adders.
In each row, a full adder is a DPG with k = 0 and a half adder is a PG with
c = 0:

| row | half adder | full adders | role |
|---|---|---|---|
| 1 | col 1 | cols 2, 3, 4, 5, 6 | 3:2 compression, gives P1 |
| 2 | col 2 | cols 3, 4, 5, 7 | 3:2 compression, gives P2 |
| 3 | col 3 | cols 4, 5, 6 | 3:2 compression, gives P3 |
| 4 | col 4 | cols 5, 6, 7, 8 | ripple-carry, gives P4..P9 |

A carry made in one row is added in the next row. Rows 1-3 are therefore
carry-save and row 4 is a ripple. P0 is x[0]y[0] straight through. The two
Baugh-Wooley constants enter like this:

* **2^5** is a constant 1 on the third input of the row-2 column-5 DPG.
* **2^9** comes from the row-4 column-8 DPG, whose constant input k is 1.
  That DPG's carry output becomes ~carry, which is exactly bit 9 after adding
  1 at weight 2^9, modulo 2^10.

The counts follow the published multiplier: 45 gates, 46 constant inputs and
46 garbage outputs. The gate count of each row also follows it. Which term
goes into which adder input is this design's own assignment, checked
exhaustively. The published drawing shows no input for the 2^5 constant.
Here it is an explicit constant operand, without which signed products would
be wrong.

`rm.garbage` is ordered as: [35:0] adder garbage, [40:36] X lines, [45:41]
Y lines.

## The adder/subtractor (`ras`, `dpg_adder`)

`dpg_adder` is an N-bit ripple adder of N DPGs (N = 4). Stage 0 takes
(a[0], b[0], cin). Each later stage takes the previous carry on its first
input, b[i] on its second and a[i] on its third.

`ras` adds the subtract mode. A chain of four Feynman gates turns b[i] into
b[i] ^ sub. The mode line that leaves the chain is then the carry-in. So:

* sub = 0 gives a + b;
* sub = 1 gives a + ~b + 1 = a - b, with cout = 1 meaning "no borrow".

The published description only names an adder/subtractor, so this
complementing scheme is this design's choice. It uses 4 constant inputs and
leaves 8 garbage lines. The published figures are 5 and 10.

## Steering units

* **`rmux`**: gate 1 picks between i[0] and i[1] under s[0], and passes s[0]
  on to gate 2. Gate 2 picks between i[2] and i[3]. Gate 3 picks between the
  two results under s[1]. The garbage lines g[0..4] are, in order: the
  unchosen input of gate 1, s[0], the unchosen input of gate 2, s[1], and the
  unchosen input of gate 3. The whole 6-to-6 mapping is a bijection, and the
  testbench checks this.
* **`rdemux`**: gate 1 splits d on s[0]. Gates 2 and 3 split both halves on
  s[1]. It has three constant zeros, and the garbage is s[0] and s[1].
* **`rdecoder`**: a Feynman gate with a constant 1 makes s[0] and ~s[0].
  Two R gates split them on s[1], and four more split those on s[2].
* **`rencoder`**: each output bit is a constant-0 line. It collects, through
  Feynman gates, the XOR of the inputs whose index has that bit set. This is
  correct only for a one-hot input. An input that is not one-hot gives the
  XOR of the set indices, not a priority code.

Only the names and cost figures of the demultiplexer, decoder and encoder
are published. Their sizes (1x4, 3-to-8, 8-to-3) are inferred from those
figures: for each, data inputs plus constants equal outputs plus garbage.
Their structures are this design's own. The decoder uses one constant and one
garbage line more than the published figures. The encoder uses one constant
and one garbage line fewer.

## Top level (`rev_hci_top`)

The six units sit side by side and share no signals. Port prefixes are
`mux_`, `dmx_`, `dec_`, `enc_`, `mul_` and `as_`. Every `*_g` port carries
that unit's garbage lines. Many garbage lines are plain copies of inputs,
such as the select lines and the multiplier's X/Y lines. Synthesis will show
them as outputs wired straight to inputs. Leave them open if you do not need
them.

Widths are shared through `rev_pkg`: `ADD_W = 4`, `MUL_W = 5`, and the
garbage widths. `dpg_adder`, `ras` and `rm_pp` take a width parameter.
`rm_moa` is a fixed netlist for 5x5, so changing `MUL_W` means rewriting the
adder array.

## Files

* `rtl/rev_pkg.sv`: shared widths
* `rtl/feynman_gate.sv`, `toffoli_gate.sv`, `peres_gate.sv`, `dpg.sv`,
  `r_gate.sv`: the gates
* `rtl/rm_pp.sv`, `rm_moa.sv`, `rm.sv`: the multiplier
* `rtl/dpg_adder.sv`, `ras.sv`: the adder/subtractor
* `rtl/rmux.sv`, `rdemux.sv`, `rdecoder.sv`, `rencoder.sv`: the steering
  units
* `rtl/rev_hci_top.sv`: the top level
* `tb/tb_<module>.sv`: one self-checking testbench per module

## Simulating

Every testbench is self-checking. Each compares outputs against integer
arithmetic computed independently in the testbench, and ends by printing
`TB_RESULT checks=N failures=M`. Each also has a watchdog that fails the run
if it hangs. The gate, adder, multiplier and steering testbenches are
exhaustive over their inputs. The gate and multiplexer testbenches also check
that the mapping is one-to-one. `tb_rm_moa` drives random partial-product
patterns into the adder array on its own.

`tb_rev_hci_top` runs the whole top level at its default sizes. It checks
every unit over 1024 vectors and counts each mechanism: add mode, subtract
mode, carry, borrow, every select value and output line, and negative, zero
and positive products. It fails if any of these never occurred.

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/rev_pkg.sv tb/tb_rev_hci_top.sv --top-module tb_rev_hci_top \
        --Mdir obj_top -o sim
    ./obj_top/sim

Replace `tb_rev_hci_top` with any other `tb_<module>` to test one unit. The
package file must come first on the command line. Every run takes well under
a second.

## How far to trust it

* **Published structure:** the arithmetic behaviour of every unit, the gate
  equations of the Peres and double Peres gates, and the structures of the
  partial-product grid, the DPG ripple adder and the 4x1 multiplexer. The
  gate and constant counts of the multiplier, and the constant and garbage
  counts of the multiplexer and demultiplexer, also match.
* **This design's choices:** the R gate equations, the multiplier's
  term-to-adder assignment, the 2^5 constant, the subtract scheme, and the
  sizes and structures of the demultiplexer, decoder and encoder.
* **Not modelled:** the published quantum cost, power and delay figures,
  which describe a physical reversible implementation. The feature-selection
  and classification stage of the interface also has no hardware
  description, so none is given here.
