# REPOMOX: an 8 x 8 reconfigurable polymorphic gate array

REPOMOX is a small reconfigurable chip meant for evolvable hardware: an
evolutionary algorithm writes random or mutated configuration bitstreams
into it and evaluates the circuits that result. Its logic blocks contain, besides
ordinary gates, a *polymorphic* gate. That gate is a NAND at one level of the
supply voltage and a NOR at another. One configuration can therefore realise two
different circuits, chosen by the supply level.

The structure is Cartesian Genetic Programming (CGP) cast in hardware: a grid of
two-input configurable blocks, without feedback, whose connections and functions are
all set by multiplexers. The sizes and reconfiguration options here are the recommended
ones that came out of a CGP study of success rates over a set of benchmark circuits:

| property | value |
|---|---|
| array | 8 columns x 8 rows of configurable blocks |
| primary inputs / outputs | 6 / 6 |
| block functions | AND, OR, XOR, polymorphic NAND/NOR |
| L-back (how far back a block input may reach) | 2 columns |
| i-forward (columns that see the primary inputs) | first 2 columns |
| o-back (output reconfigurability) | 0: outputs hard-wired to the last column |
| configuration | 624-bit serial shift register |

The data path from `pi` to `po` is purely combinational. The only clocked logic
is the configuration register.

## The configurable block

```
 sources of the column ──┬─► MUXA ─ A ─┬─► F0 = A & B ─┐
                         │             ├─► F1 = A | B ─┤
                         └─► MUXB ─ B ─┼─► F2 = A ^ B ─┼─► MUXY ─► Y
                                       └─► F3 = NAND/NOR(A,B) ┘
```

Each block has two input multiplexers and a 4:1 function multiplexer.
`cb_function_unit` builds the four functions from a function-set parameter
(`FUNC_SET`, default `FS6`). `FS1` selects the function set of the earlier 4 x 4 chip:
a plain wire, AND, XOR and NAND/NOR. The NAND/NOR position uses
`polymorphic_nandnor`, whose behaviour follows the global `mode` input:

| `mode` | polymorphic gate | meaning on silicon |
|---|---|---|
| 0 | NAND | first supply level |
| 1 | NOR  | second supply level |

On the real chip `mode` is not a pin: it is the Vdd level. Here it is a digital
input so that both behaviours can be simulated. All polymorphic gates switch together.

## Interconnect: what each column can see

The sources of a column's multiplexers are listed in a fixed order:

1. the 6 primary inputs, only in columns 0 and 1 (i-forward = 2);
2. rows 0..7 of the previous column;
3. rows 0..7 of the column two back (L-back = 2).

| column | sources | mux size | select bits | bits per block |
|---|---|---|---|---|
| 0 | I0..I5 | 8-input | 3 | 2 + 3 + 3 = 8 |
| 1 | I0..I5, column 0 | 16-input | 4 | 10 |
| 2..7 | column c-1, column c-2 | 16-input | 4 | 10 |

The 8-input and 16-input multiplexer sizes are those the source study names. Its
rule is that *every* bitstream must be a valid configuration. Select codes that
point past the real sources are therefore wrapped: code `s >= N` selects source
`s - N`. In column 0, codes 6 and 7 select I0 and I1. In column 1, codes 14 and 15
also select I0 and I1. The wrapping rule, like the source order above, is this
design's own choice.

Primary output `O k` is hard-wired to row `k` of column 7 (rows 0..5). The source
only says "selected blocks of the last column", so the choice of rows is ours.
Configurable outputs (o-back > 0) were studied and rejected, and are not built.

## Configuration bitstream

The 624 bits are laid out column by column, and row by row within a column,
starting at bit 0. Within one block's field, starting from the least significant
bit:

```
[1:0]              MUXY select (0 AND, 1 OR, 2 XOR, 3 NAND/NOR)
[2 +: SEL_W]       MUXA select
[2+SEL_W +: SEL_W] MUXB select
```

Block (column c, row r) therefore starts at bit `64 + 80*(c-1) + 10*r` for `c >= 1`,
and at bit `8*r` for `c = 0`. `repomo_pkg::col_offset()` computes this for any
geometry. The source gives no bit layout. One check on this one: with the original
chip's geometry (4 x 4 blocks, 4 inputs) it gives exactly 120 bits, which is the
length of that chip's shift register. The MUXY order follows the order in which
the function set is listed. All four functions are symmetric, so which of the two
input multiplexers is "A" does not matter.

### Loading it

`config_shift_register` shifts one bit per rising clock edge while `conf_en` is
high. The new bit enters at the top (bit 623) and everything moves down one
place, so the **first bit sent ends in bit 0**. A full load takes exactly 624
clocks. Its bits drive the multiplexers directly, with no shadow register, so
`po` is meaningless while a load is under way. The bit leaving bit 0 appears on
`conf_out`, so the old configuration can be read back while a new one is shifted
in. `rst_n` clears everything asynchronously. The all-zero configuration makes every
block `AND(source0, source0)`, so `I0` appears on all six outputs. `conf_out`,
the enable and the reset are additions of this design.

## Ports of `repomox_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | configuration clock |
| `rst_n` | in | 1 | asynchronous reset of the configuration |
| `conf_en` | in | 1 | shift enable |
| `conf_data` | in | 1 | serial configuration data, bit 0 first |
| `conf_out` | out | 1 | serial read-back |
| `mode` | in | 1 | polymorphic mode (supply level) |
| `pi` | in | 6 | primary inputs I0..I5 |
| `po` | out | 6 | primary outputs O0..O5 |

## Source files

Everything shared is in `rtl/repomo_pkg.sv`: the function codes, the `FS6`/`FS1`
sets, the default geometry and the layout functions. The hierarchy, from the bottom
up:

| module | role |
|---|---|
| `polymorphic_nandnor` | NAND/NOR switched by `mode` |
| `cb_function_unit` | F0..F3 and MUXY |
| `cb_input_mux` | MUXA/MUXB with wrap-around of unused codes |
| `config_block` | one configurable block |
| `cb_column` | one column of blocks sharing the same sources |
| `repomo_array` | all columns, the L-back / i-forward wiring, fixed outputs |
| `config_shift_register` | serial configuration register |
| `repomox_top` | register + array |

`repomo_array` takes the parameters `ROWS`, `COLS`, `NI`, `NO`, `L_BACK`, `I_FWD`
and `FUNC_SET`. It builds the interconnect and the mux widths for any of these values,
so the other L-back and i-forward settings from the study can also be built. The
configuration length follows from them. The top uses the recommended values.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/repomo_ref_pkg.sv` is an
independent CGP-style reference model. It evaluates a bitstream node by node,
working only from the layout rules above, and has helpers to build
configurations by hand.

* Leaf modules are checked exhaustively: gate, function unit (both `FS6` and
  `FS1`), the three mux sizes including wrapped codes, and all 1024 field values of
  a block.
* `tb_repomo_array`: 300 random 624-bit configurations x 64 inputs x 2 modes
  against the model. It also builds the 4 x 4 / `FS1` geometry and checks that its
  bitstream is 120 bits and its behaviour matches the model.
* `tb_repomox_top` (default parameters, end to end): every configuration goes in
  serially, with read-back of the previous one. The configurations are the reset
  configuration, a 6-input sorting network, a polymorphic majority/parity circuit,
  a 3 x 3-bit multiplier and 40 random bitstreams. It counts and requires
  configuration loads, read-backs, mode switches, wrapped select codes, links two
  columns back and primary inputs used by column 1.

The three hand-mapped benchmark circuits show how a real function is placed:

* **Sorting network**: 12 compare-exchange elements in 5 layers, in columns
  0..4, rows 0..5. Each element is `min = AND`, `max = OR`. Unused positions pass
  their value on as `AND(x, x)`. Columns 5..7 pass the result to the outputs. Output
  2 of the sorted vector is the 6-input majority (at least four ones).
* **Majority / parity**: the sorting network plus an XOR tree for parity on rows
  6..7. A mode detector is built from the gates themselves: `XOR(x, x)` gives 0,
  `P(0,0)` gives 1, and `P(0,1)` is 1 in NAND mode and 0 in NOR mode (`P` is the
  polymorphic gate). `O0 = s & majority | ~s & parity` is then majority in mode 0 and
  parity in mode 1.
* **3 x 3-bit multiplier** (`a = I2..I0`, `b = I5..I3`, product on `O5..O0`):
  column 0 forms eight partial products. Column 1 forms the ninth, `a2b2`, straight
  from the inputs, since it still sees them. A Wallace-style reduction follows.
  Bit 5 is computed directly as `a2b2 & (a1b1 | (a1|b1) & a0b0)`, which keeps the
  deepest output inside the eight columns. It uses 61 of the 64 blocks, most of the
  rest being pass-throughs.

Two constraints shape every mapping. Only columns 0 and 1 see the inputs, and a
value can jump at most two columns. A signal needed far to the right must
therefore be re-copied, as `AND(x, x)`, in at least every second column.

Run a testbench with plain Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/repomo_pkg.sv tb/repomo_ref_pkg.sv tb/tb_repomox_top.sv \
    --top-module tb_repomox_top -o sim
./obj_dir/sim
```

Leaf testbenches that do not use the reference model need only `rtl/repomo_pkg.sv`
and their own file. The full-size top test runs in about a second.

## Limits and departures

* The polymorphic gate is modelled by its logic function only. The real cell is
  a transistor-level circuit, and its supply-voltage control is analog and not part
  of the RTL.
* The evolutionary algorithm that generates bitstreams is host software and not
  included.
* These are this design's choices, not the source's: the bitstream layout, the source
  order in the multiplexers, wrap-around of unused select codes, which output rows
  are used, the shift direction, `conf_out` and the reset.
* Timing and area of the intended 0.7 um CMOS implementation are not modelled.
  The RTL is technology-independent.
