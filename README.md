# Quaternary arithmetic unit

In quaternary (four-valued) logic one wire carries a whole base-4 digit as one
of four voltage levels, so a value needs half the wires it needs in binary.
This design is a small arithmetic unit on such digits. Two quaternary voltage
inputs, X and Y, are each decoded into a two-bit binary code by a converter
built from *down literal circuits*: CMOS inverters whose switching thresholds
have been moved. Six small gate networks then compute, in parallel:

| result    | operation                 | gates (binary code `x1x2`, `y1y2`)            |
|-----------|---------------------------|-----------------------------------------------|
| `mod_add` | X + Y mod 4               | `A1 = x1^y1^(x2&y2)`, `A2 = x2^y2`            |
| `mod_sub` | X − Y mod 4               | `S1 = x1^y1^(~x2&y2)`, `S2 = x2^y2`           |
| `mod_mul` | X · Y mod 4               | `M1 = (x1&y2)^(x2&y1)`, `M2 = x2&y2`          |
| `gf_add`  | X + Y in GF(4)            | `A1 = x1^y1`, `A2 = x2^y2`                    |
| `gf_sub`  | X − Y in GF(4)            | one half-subtractor cell per bit              |
| `gf_mul`  | X · Y in GF(4)            | three 4:1 multiplexers                        |

Each result is then turned back into a quaternary voltage, by a
binary-to-quaternary converter or, for the GF(4) product, by a multiplexer
network that switches the input voltages directly. The unit is purely combinational. It has no
clock, no registers and no reset.

The arithmetic cells are synthesizable SystemVerilog. The three analog cells
(down literal circuit and the two converters) are behavioural models with
`real` voltage ports. So are the mixed-signal top, `qau_top`, and every module
that contains one of them.

## Signal levels and digit code

- A quaternary digit is carried digitally as `qau_pkg::qdigit_t`, two bits
  `{x1, x2}`. Bit 1 is the MSB `x1` and bit 0 the LSB `x2`. Digits 0, 1, 2 and 3
  are codes 00, 01, 10 and 11.
- On a wire the digit is a voltage. The supply is 3 V. The levels are taken as
  0, 1, 2 and 3 V, one step of VDD/3 apart (`VDD` parameter, default
  `qau_pkg::VDD_DEFAULT = 3.0`). The original work gives the supply but not the
  level voltages. These levels are the ones its converter thresholds sit
  midway between (next section).

## Down literal circuit and thresholds (`dlc`)

A down literal circuit is a single CMOS inverter whose nMOS and pMOS threshold
voltages have been shifted. Its output is high while the input is below its
switching point and low above it. So it cuts a multi-level signal into a
binary one at a chosen voltage.

The model keeps only that switching point. It is taken as the midpoint of the
input window in which both transistors conduct:

    VTH = (VTN + VDD − |VTP|) / 2

| cell | VTP     | VTN    | VTH (VDD = 3 V) |
|------|---------|--------|-----------------|
| D1   | −2.2 V  | 0.2 V  | 0.5 V           |
| D2   | −1.2 V  | 1.2 V  | 1.5 V           |
| D3   | −0.2 V  | 2.2 V  | 2.5 V           |

The threshold pairs come from the original design. The midpoint rule is this
model's own. D3's pMOS threshold is taken as −0.2 V, which follows the
symmetric pattern of the other two cells. The model has no transfer-curve
slope and no delay.

## Converters

**Quaternary to binary (`q2b`).** D1, D2 and D3 all look at the input. D2's
output is the inverted MSB. A 2:1 multiplexer gives the inverted LSB: it
passes D1 while D2 is high (input below 1.5 V) and D3 otherwise. Two inverters
then give `b[1] = B1` and `b[0] = B0`. Every level decodes correctly within
±0.5 V of its nominal value. The original drawing does not say which mux input
each select value picks. The polarity used here is the only one that decodes
correctly.

**Binary to quaternary (`b2q`).** In the circuit, MSB and LSB each pass a
D1-type cell. Each cell drives one of two inverters whose outputs are tied
together, and the output settles at one of four voltages. The device sizes
that set this ratio are not available. So the model outputs the ideal level
`(2·MSB + LSB)·VDD/3`, while keeping the two D1 cells in the path.

## The arithmetic cells

**Modulo-4 add and multiply** (`mod4_add`, `mod4_mul`). These are the
equations in the table above. Each uses four gates with a logic depth of two.
In the adder, the carry out of bit 0 is folded into bit 1. The carry out of
bit 1 is dropped, and that drop is the modulo-4 wrap.

**Modulo-4 subtract** (`mod4_sub`). The function is X − Y when X ≥ Y and
X + 4 − Y when X < Y. The original design states its MSB equation with the
adder's carry term `x2&y2`. Its subtraction table, however, needs the borrow
out of bit 0, `~x2&y2`. For example, 0 − 1 must give 3. This design follows
the table. This is the one place where the gates differ from the printed
equations.

**GF(4) add and subtract** (`gf4_add`, `gf4_sub`). GF(4) has characteristic 2,
so addition and subtraction are both a bitwise XOR of the codes. The
subtractor is built as drawn in the original: one half-subtractor cell per
bit (`half_sub`: XOR for the difference, `~A & B` for the borrow). Using one
cell per bit is this design's reading of the single drawn cell. The two
borrows do not take part in the GF(4) result. They are brought out on
`gf_borrow` only.

**GF(4) multiply** (`gf4_mul`). Three 4:1 multiplexers with quaternary
selects (`qmux4`) do the work:

- one mux selected by Y, with constant inputs 0, 2, 3, 1, gives 2·Y;
- one mux selected by Y, with constant inputs 0, 3, 1, 2, gives 3·Y;
- the output mux, selected by X, picks 0, Y, 2·Y or 3·Y.

In this field 2 and 3 are the roots α and α² = α + 1 of x² + x + 1. So
2·2 = 3, 2·3 = 1 and 3·3 = 2. The mux constants are the original's. Reading
mux input *k* as the one chosen by select value *k* is this design's
assumption. It reproduces the GF(4) multiplication table exactly.

The network exists in two forms:

- `gf4_mul` (synthesizable) switches two-bit codes.
- `gf4_mul_q` (behavioural) switches quaternary voltages directly, with no
  conversion, as the original circuit does. Its constant inputs are the level
  voltages 0–3 V.

Each of its muxes (`qmux4_v`) decodes its select voltage with the D1/D2/D3
thresholds and passes the chosen voltage on unchanged. How the original
decodes a quaternary select is not described, so this decoding is this
design's choice. One effect to note: when X = 1, the output is the Y input
voltage itself, including any offset from its nominal level. Nothing restores
it to the nominal level.

## How the unit is put together

`qau_core` (synthesizable) places the six cells side by side behind one pair
of digit inputs. It returns a packed struct, `qau_pkg::qau_result_t`, with
fields `mod_add`, `mod_sub`, `mod_mul`, `gf_add`, `gf_sub` and `gf_mul`.

`qau_top` (behavioural, mixed-signal) has these parts:

- one `q2b` on each input voltage, `x_v` and `y_v`;
- `qau_core`;
- five `b2q` converters, one per result, driving `mod_add_v` … `gf_sub_v`;
- `gf4_mul_q`, driving `gf_mul_v` from the two input voltages directly;
- the binary results `res` and `gf_borrow`, also brought out.

## Where this departs from the original circuits

- **Drawn separately, built as one unit.** The original draws each operation
  as its own circuit, with its own converters, and has no operation select.
  Here one `q2b` per input is shared by all six cells, and all results come
  out at once.
- **GF(4) multiplier, two copies.** The voltage output comes from the
  conversion-free `gf4_mul_q`, as in the original. The binary product in
  `res.gf_mul` comes from the digital copy in `qau_core`.
- **Modulo-4 subtractor.** It uses the borrow term the subtraction table
  requires (see above).
- **Analog models.** The analog cells are threshold and level models. They do
  not reproduce transfer curves, switching delays, power, current or
  transistor counts. The original reports 3 V operation, 8 to 108 MOSFETs per
  circuit and power from 9 pW to about 1.09 µW. None of that is modelled.

## Trust

Every module has an exhaustive self-checking testbench. Its references come
from integer arithmetic, XOR, or polynomial multiplication reduced by
x² + x + 1, never from the design's own equations. The converter benches
sweep the input in 10 mV steps.

`tb_qau_top` runs the whole unit at default parameters. It applies all 16
pairs at nominal levels, then 400 random pairs with each input moved up to
±0.4 V off level. It checks all binary and voltage outputs. For the GF(4)
product with X = 1, the expected voltage is the passed-through Y voltage. It also counts
and requires each mechanism at least once:

- adder carry;
- sum wrap;
- subtractor wrap;
- product fold;
- GF(4) reduction;
- GF borrow;
- off-level decode.

## Files

| file | contents |
|------|----------|
| `rtl/qau_pkg.sv` | digit type, result struct, default supply |
| `rtl/mod4_add.sv`, `mod4_sub.sv`, `mod4_mul.sv` | modulo-4 cells |
| `rtl/gf4_add.sv`, `gf4_sub.sv`, `half_sub.sv` | GF(4) add / subtract |
| `rtl/gf4_mul.sv`, `qmux4.sv` | GF(4) multiplier and its quaternary mux |
| `rtl/gf4_mul_q.sv`, `qmux4_v.sv` | the same multiplier on voltages (behavioural) |
| `rtl/qau_core.sv` | the six cells side by side (synthesizable) |
| `rtl/dlc.sv`, `q2b.sv`, `b2q.sv` | behavioural analog cells |
| `rtl/qau_top.sv` | mixed-signal top |
| `tb/tb_<module>.sv` | one self-checking testbench per module above (not the helpers) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. With
Verilator 5, run from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/qau_pkg.sv \
        tb/tb_qau_top.sv --top-module tb_qau_top -o sim
    ./obj_dir/sim

Replace `qau_top` with any other module name to run its bench. Lint a module
on its own with:

    verilator --lint-only -Wall -Irtl rtl/qau_pkg.sv rtl/qau_core.sv --top-module qau_core

In a `-Wall` lint of the purely digital modules, Verilator reports
`VDD_DEFAULT` in `qau_pkg` as unused. Only the analog models use it, and the
warning is harmless. `qau_core` and the cells below it synthesize to a couple
of dozen gates. The behavioural modules do not synthesize, because their
ports are `real`.
