# Mixed-logic 2-4 and 4-16 line decoders

A line decoder turns an n-bit code into 2^n output lines and selects exactly
one of them: the selected line is 1 and the others 0 (non-inverting), or the
selected line is 0 and the others 1 (inverting). Decoders sit in every memory
periphery, so their transistor count and switching activity matter.

A plain static CMOS 2-4 decoder needs 20 transistors: two input inverters and
four 2-input NOR (or NAND) gates. The designs here mix three circuit styles to
do the same job with 14 or 15:

- **TGL** (transmission-gate logic) 3-transistor AND/OR gates,
- **DVL** (dual-value logic) 3-transistor pass-transistor AND/OR gates,
- **static CMOS** gates where full restoring drive is wanted.

The 4-16 decoders use two mixed-logic 2-4 decoders as predecoders and a static
CMOS post-decoder of sixteen 2-input gates, which restores full logic levels at
every output.

This RTL models the logic of each transistor network: which conduction path
is on and what level it drives. It is a gate-accurate, two-state, zero-delay
model. It describes the structure (which gate type makes which output, fed by
which signals) and carries each block's transistor count as a `localparam`.
Power, delay, full swing and area are electrical properties. They are outside
what RTL can show.

## The 3-transistor gates and why one inverter disappears

Each 3-transistor gate has two inputs with different roles. The **control**
signal X drives transistor gate terminals. The **propagate** signal Y travels
through a pass device to the output.

| gate | function | rails it needs | behaviour in the model |
|---|---|---|---|
| `tgl_and` | X·Y | X, X̄, Y | transmission gate passes Y while X=1; otherwise out=0 |
| `tgl_or`  | X+Y | X, X̄, Y | transmission gate passes Y while X=0; otherwise out=1 |
| `dvl_and` | X·Y | X̄, Y, Ȳ | pass transistor forwards Y while X̄=0; X̄=1 or Ȳ=1 forces 0 |
| `dvl_or`  | X+Y | X̄, Y, Ȳ | pass transistor forwards Y while X̄=1; X̄=0 or Ȳ=0 forces 1 |

The last column is the key point. A TGL gate needs both rails of its control
but only the true rail of its propagate input. A DVL gate needs only the
complement of its control. So for the input B:

- use B itself as the propagate input of the TGL gates;
- use B̄ as the control of the DVL gates, which only need B̄'s complement, B.

Then B̄ is never needed and the B inverter can be removed. A still needs its
inverter. That gives 4 gates × 3 + 1 inverter × 2 = **14 transistors**.

Which input is control and which is propagate also affects speed. If a gate
propagates a complemented input, its signal path runs through the inverter.
That is slow, so a complemented input is used as control wherever the function
allows. Only the NOR minterm A̅B̅ and the NAND maxterm A̅+B̅ have no such
choice: one of their complemented inputs has to propagate.

## The four 2-4 topologies

Outputs are numbered with A as the most significant bit: line k is selected for
k = 2A + B.

**2-4LP** (`dec2to4_lp`, 14 T, one-hot, 9 nMOS + 5 pMOS)

| out | minterm | gate | control | propagate |
|---|---|---|---|---|
| D0 | A̅B̅ | DVL AND | B̄ (needs B) | Ā |
| D1 | A̅B | TGL AND | Ā | B |
| D2 | AB̄ | DVL AND | B̄ (needs B) | A |
| D3 | AB  | TGL AND | A | B |

**2-4LPI** (`dec2to4_lpi`, 14 T, one-cold, 5 nMOS + 9 pMOS): the dual circuit,
built from OR gates.

| out | maxterm | gate | control | propagate |
|---|---|---|---|---|
| I0 | A+B   | TGL OR | A | B |
| I1 | A+B̄  | DVL OR | B̄ (needs B) | A |
| I2 | Ā+B  | TGL OR | Ā | B |
| I3 | Ā+B̄ | DVL OR | B̄ (needs B) | Ā |

**2-4HP / 2-4HPI** (`dec2to4_hp`, `dec2to4_hpi`, 15 T). These are the
high-performance versions. The one gate that must propagate a complemented
input (D0 in 2-4LP, I3 in 2-4LPI) is replaced by a 4-transistor static CMOS
NOR or NAND of A and B. This takes the inverter out of that output's path,
at a cost of one extra transistor: 14 − 3 + 4 = 15. The other three gates are
the same as in the LP versions. The published description of these two
topologies gives their transistor count and purpose but not their gate
netlist. The arrangement above is this design's reading of them: it is the
one that matches the count and the rule for choosing which input propagates.

## The four 4-16 decoders

The input is `sel = {A,B,C,D}`, with A as the MSB. One predecoder decodes (A,B)
into four lines `pre_hi[j]`. The other decodes (C,D) into `pre_lo[k]`. Output
4j + k combines `pre_hi[j]` and `pre_lo[k]`.

| module | predecoders | post-decoder | outputs | transistors |
|---|---|---|---|---|
| `dec4to16_lp`  | 2 × 2-4LPI | 16 NOR2 (`nor_postdecoder`)  | one-hot  | 2×14+64 = 92 |
| `dec4to16_hp`  | 2 × 2-4HPI | 16 NOR2 (`nor_postdecoder`)  | one-hot  | 2×15+64 = 94 |
| `dec4to16_lpi` | 2 × 2-4LP  | 16 NAND2 (`nand_postdecoder`) | one-cold | 92 |
| `dec4to16_hpi` | 2 × 2-4HP  | 16 NAND2 (`nand_postdecoder`) | one-cold | 94 |

An inverting predecoder gives one-cold lines. A NOR of two one-cold lines is 1
only when both are selected. So the non-inverting 4-16 decoders use inverting
predecoders, and the other way round.

## Files

`rtl/`

- `mixed_logic_pkg.sv`: transistor counts of each gate style and of each 2-4
  topology.
- `tgl_and.sv`, `tgl_or.sv`, `dvl_and.sv`, `dvl_or.sv`: the 3-transistor gates.
  Each has the explicit complement ports its transistors use.
- `dec2to4_lp.sv`, `dec2to4_lpi.sv`, `dec2to4_hp.sv`, `dec2to4_hpi.sv`: the 2-4
  decoders, with ports `a`, `b` and `d[3:0]` or `i[3:0]`.
- `nor_postdecoder.sv`, `nand_postdecoder.sv`: the post-decoders.
- `dec4to16_lp.sv`, `dec4to16_hp.sv`, `dec4to16_lpi.sv`, `dec4to16_hpi.sv`: the
  4-16 decoders, with ports `sel[3:0]` and `d[15:0]` or `i[15:0]`.
- `mixed_logic_decoders.sv`: the top. It holds all eight decoders side by
  side, each with its own ports (`lp2_sel`/`lp2_d` … `hpi_sel`/`hpi_i`). They
  are alternatives, not stages of one circuit.

Every module is purely combinational. None has a clock or a reset.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
testbench applies every input code, and then random codes. It compares the
outputs with the one-hot or one-cold pattern it computes on its own by shifting.
It also checks the transistor counts: 3 per gate, 14/15 for the 2-4 decoders
(and the 9n/5p and 5n/9p splits of the LP/LPI versions), 64 per post-decoder,
and 92/94 for the 4-16 decoders. The 4-16 and top testbenches fail if any
output line is never selected. `tb_mixed_logic_decoders` also drives all eight
decoders with independent random codes, so that a wiring mix-up between them
would be caught. Each testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

From the project root, for example:

```
verilator --binary --timing --assert -Wall -Wno-UNUSEDPARAM -Irtl \
    rtl/mixed_logic_pkg.sv tb/tb_mixed_logic_decoders.sv \
    --top-module tb_mixed_logic_decoders -Mdir obj
./obj/Vtb_mixed_logic_decoders
```

Replace the testbench name to run another block. Every run takes well under a
second. The `TRANSISTOR_*` localparams are only read by the testbenches, which
is why lint reports them as unused inside the modules.

## How far to trust it, and where it departs from the source design

- **Logic, not electrics.** Each gate is modelled by its conduction paths with
  consistent complementary inputs. The real TGL/DVL gates are full swing but do
  not restore levels for every input combination. That is why the 4-16 designs
  end in static CMOS, but the model cannot show it. With two-state values, a
  weak level or a contention cannot appear either.
- **Output numbering of 2-4LP.** The descriptions of the 14-transistor
  non-inverting topology disagree on which of the middle outputs is A̅B and
  which is AB̄. This RTL numbers outputs by the truth table (A is the MSB), and
  takes each output's gate type and signal roles from the published topology:
  D1 is a TGL AND that propagates B, and D2 is a DVL AND that propagates A.
  With that reading, B̄ is unused, as the 14-transistor count requires.
- **15-transistor topologies.** The gate arrangement of 2-4HP/2-4HPI is an
  inference (see above). Function and transistor count are as published.
- **Naming of the 4-16 variants.** The names follow the topology definitions:
  4-16HP is the non-inverting decoder built from 2-4HPI predecoders and a NOR
  post-decoder. Some published result labels attach "HPI" to that same
  circuit.
- **Bit order.** A is the MSB of `sel`, (A,B) feed the first predecoder, and
  output 4j+k pairs line j of (A,B) with line k of (C,D). This matches the
  truth tables and the published input sweeps, but it is a choice.
- **Not built.** The all-CMOS 20-transistor 2-4 decoders and 104-transistor
  4-16 decoders are only the reference designs these circuits are compared
  with. The power, area and delay figures are layout-simulation results that a
  logic model cannot reproduce.
