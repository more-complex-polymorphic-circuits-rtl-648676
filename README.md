# Polymorphic FIR filter and the REPOMO32 polymorphic module

A *polymorphic* circuit changes what it computes when its environment changes. Its structure and
configuration stay the same. The environment here is the supply voltage. The basic cell is a
two-input gate that acts as **NAND in the high supply range (3.9–5 V)** and as **NOR in the low
range (3.0–3.8 V)**. A circuit built partly from such gates has two functions, and moving the
supply from one range to the other switches between them. This takes no configuration step, no
control wire and no multiplexing of two separate circuits.

This RTL uses that idea for a dependable signal-processing block: an FIR filter that falls back to
a cheaper approximation when the supply drops.

* **Standard mode** (high supply): an ordinary N-tap filter,
  `y(n) = Σ_{i<N} B[i]·x(n−i)`.
* **Backup mode** (low supply): only the first M taps work, with different coefficients chosen to
  approximate the full response. The other taps are disconnected to save power:
  `y(n) = Σ_{i<M} BSTAR[i]·x(n−i)`.

The repository also contains a model of REPOMO32. This is a small reconfigurable chip made of 32
configurable logic elements (CLEs), some of which can be set to the supply-controlled NAND/NOR
function. Pieces of the filter, such as slices of its polymorphic multipliers, are meant to be
mapped onto it.

## How the supply level appears in the RTL

The real gate's function depends on an analog voltage. In the synthesizable RTL that voltage is
reduced to one bit, `vdd_high`:

| `vdd_high` | supply range | polymorphic gate | filter mode |
|---|---|---|---|
| 1 | 3.9–5.0 V | NAND | standard (N taps, `B`) |
| 0 | 3.0–3.8 V | NOR  | backup (M taps, `BSTAR`) |

`vdd_high` goes only to `poly_nand_nor` gates. None of the other logic reads it. Every
mode-dependent behaviour comes from a gate whose function the supply changes. Two wirings of the
gate recur throughout the design:

* **Inverter:** both inputs on the same signal. The output is `~a` in both modes.
* **Supply sensor:** inputs `0` and `1`. The output is NAND(0,1) = 1 in the high range and
  NOR(0,1) = 0 in the low range. This gives the supply range as a logic level without a separate
  detector. The filter, the multipliers and the output multiplexer each contain one.

`tb/poly_nand_nor_analog.sv` is a behavioural (simulation-only) model of the same gate. It takes the
supply as a `real` in volts. The output is NAND from 3.9 to 5.0 V and NOR from 3.0 to 3.8 V. In the
3.8–3.9 V gap and outside 3.0–5.0 V the function is unspecified, so the model drives 0 and lowers
its `defined` output. `tb_poly_nand_nor` checks the RTL gate against it at 5.0 V and 3.3 V. Use it for mixed-level testbenches.

## The filter (`poly_fir`)

```
x(n) ─┬─[R]─┬─ … ─[R]─┬──╱ switch ─[R]─┬─ … ─[R]─┐
      │     │         │                │         │
   B0/B0*  B1/B1*  B(M-1)/B*(M-1)     B(M)     B(N-1)      constant multipliers
      └──── sub-adder 1 ──┘           └─ sub-adder 2 ─┘
                 │ └────────── adder 3 ──────┘
                 │                 │
                 └──(b)  poly_mux (a)──┘ ──► y(n)
```

| part | module | what it does |
|---|---|---|
| delay line and switch | `fir_delay_line` | N−1 registers. While the switch is open (backup mode), the registers of taps M..N−1 hold their contents. |
| taps 0..M−1 | `poly_const_mult` | `B[i]·x` in NAND mode, `BSTAR[i]·x` in NOR mode |
| taps M..N−1 | `poly_const_mult` with `BSTAR = B` | fixed `B[i]·x` |
| sub-adders, third adder | `multi_operand_adder` | sum of taps 0..M−1, sum of taps M..N−1, total of the two |
| output multiplexer | `poly_mux` | passes the total in NAND mode and sub-adder 1 in NOR mode |

The switch in the delay line is driven by the filter's own supply sensor. The filter therefore
needs no mode input. `backup_mode` is an output that reports what the sensor sees. As an
alternative, setting the parameter `USE_C = 1` feeds a logic signal `c` (1 = standard) to every
polymorphic gate of the filter in place of the supply level.

**Polymorphic constant multiplier.** A constant multiplier adds shifted copies of `x`, one copy for
each set bit of the constant. Here both constants share one shift-add structure, with one enable
per bit position k:

| `B[k]` | `BSTAR[k]` | enable |
|---|---|---|
| 1 | 1 | always on |
| 0 | 0 | always off (the tools remove the term) |
| 1 | 0 | sensor output |
| 0 | 1 | inverted sensor output |

The wiring does not change between modes. Only the gate functions do.

**Timing.** The output is combinational from the present sample `x` and the delay-line registers.
There is no output register. Apply `x` and `vdd_high`, let them settle, and sample `y` before the
next rising edge. The edge then shifts the delay line. In backup mode the M-tap result appears in
the same cycle as the supply change. On the return to standard mode, taps M..N−1 still hold the
samples they froze with. `y` therefore equals the true N-tap sum again only after N−M clock edges.
Anything downstream that needs exact results should ignore those cycles.

**Sizes.** `N=8`, `M=4`, 8-bit unsigned samples (`XW`) and 8-bit unsigned coefficients (`CW`). The
output width is `YW = XW+CW+clog2(N)` = 19 bits, which cannot overflow. The default coefficients
are `B = {240,192,128,96,64,32,16,8}` and `BSTAR = {32,224,160,96}`. Only the 240/32 pair at tap 0
is a known polymorphic multiplier pair. The other values are placeholders chosen to exercise the
logic, not a designed filter response. In a real filter, `BSTAR` would be chosen so that the M-tap
response is as close as possible to the N-tap response. All of these numbers are parameters.
Coefficients must be non-negative.

## REPOMO32 (`repomo32`)

The array has 4 rows and 8 columns of CLEs. Chip inputs `x[0..3]` enter on the left, and outputs
`z[0..3]` are the four CLEs of the last column. The data path has no registers: `z` is a
combinational function of `x`, the configuration and the supply level.

**CLE (`repomo_cle`).** Each CLE has two 8:1 multiplexers that choose its inputs A and B, and a
function multiplexer. The configuration byte is laid out as follows:

| bits | field | meaning |
|---|---|---|
| 7:5 | `sel_a` | source of A: 0–3 = rows 0–3 of column c−1, 4–7 = rows 0–3 of column c−2 |
| 4:2 | `sel_b` | source of B, same coding |
| 1:0 | `func`  | 0 AND, 1 OR, 2 XOR, 3 polymorphic NAND/NOR |

For column 0, both halves of the source list are the chip inputs. For column 1, the "c−2" half is
the chip inputs. Because a CLE sees only the two columns to its left, a signal that is needed
further right has to be relayed: a CLE set to `AND(s,s)` passes `s` on.

**Configuration (`repomo_cfg_regs`).** The configuration is held in 32 8-bit latches, one per CLE.
CLE number `4·column + row` is also its address. To write one latch:

1. Put the address on `addr` and the byte on `data`.
2. Raise `we`. The addressed latch is transparent while `we` is high.
3. Lower `we`. The latch holds its value.

A full reconfiguration takes 32 such steps. There is no reset, so configure the chip before use.
The latches are intentional, and the lint tools will report them as latches.

**Example mapping (`tb/repomo_mult_map_pkg.sv`).** This package configures the chip as a slice of
the 240x/32x polymorphic multiplier for a 4-bit `x`:

* Bits 3:0 of both products are always zero.
* The chip computes bits 7:4 on `z[0..3]`.
* With the high supply, bits 7:4 of 240·x equal (−x) mod 16.
* With the low supply, bits 7:4 of 32·x equal `{x[2:0],0}`.

The mapping builds its own supply sensor `m = NAND/NOR(x0, ~x0)` and then computes, for example,
`y5 = x0 ^ (x1 & m)` and `y7 = (x3 & m) ^ (x2 | (x1 & m) | (x0 & m))`. It uses all 32 CLEs: 12 do
logic and 20 relay signals. The package comments list the mapping column by column.

## Top level (`poly_fir_system`)

The top level places the filter and one REPOMO32 module side by side on a shared `vdd_high`, so one
supply change switches both at once. The REPOMO32 inputs, outputs and configuration port are
brought out as `rp_*`. The filter ports are `fir_x`, `fir_y`, `fir_backup` and `fir_c` (used only when `USE_C = 1`). The filter itself
is written directly in RTL. It is not assembled from several REPOMO32 modules.

## Where this RTL makes its own choices

The following points are design decisions of this implementation, not properties taken from the
source design:

* **Filter sizes.** N, M, the data and coefficient widths, and every coefficient except 240/32.
* **Filter timing.** Unsigned arithmetic, a combinational output, and a synchronous active-low
  reset of the delay line to zero.
* **Delay-line freeze.** All registers behind the switch freeze, not just the first one.
* **Mode control.** By default the mode comes only from the supply level, and the input `c` is
  ignored. With `USE_C = 1` the filter's polymorphic gates are steered by the logic signal `c`
  instead (1 = standard, 0 = backup; the polarity is this design's choice), and `vdd_high` is
  ignored. The source design offers both ways of controlling the mode.
* **Internal structures.** The polymorphic multiplier (shared shift-add with sensor-driven
  enables) and the polymorphic multiplexer (sensor plus AND-OR selector). Only their behaviour is
  specified.
* **CLE encoding.** The function codes, and the binary reading of the select fields.
* **Inverters.** CLEs drawn as inverters in the reference mapping are read as NAND/NOR CLEs with
  both inputs tied together.
* **Chip wiring.** How chip inputs feed the first two columns, and outputs taken only from the last
  column. The reference multiplier mapping also takes outputs (including auxiliary signals for
  chaining chips) from inner CLEs, which this model does not allow. The example mapping above is
  this design's own, not a copy of the reference one.
* **Supply abstraction.** The supply is modelled as one bit. The transistor-level gate is not
  modelled. Its voltage ranges appear only in `poly_nand_nor_analog`.

## Files

`rtl/`:

* `poly_pkg.sv`: array geometry, the CLE function enum and the configuration-byte struct.
* `poly_nand_nor.sv`: the polymorphic gate.
* `poly_const_mult.sv`, `poly_mux.sv`, `multi_operand_adder.sv`, `fir_delay_line.sv`,
  `poly_fir.sv`: the filter.
* `repomo_cle.sv`, `repomo_cfg_regs.sv`, `repomo32.sv`: the REPOMO32 module.
* `poly_fir_system.sv`: the top level.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`repomo_mult_map_pkg.sv` and the voltage model `poly_nand_nor_analog.sv` with its own testbench. Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog if it hangs.

* `tb_poly_fir` and `tb_poly_fir_system` compare the filter output every cycle against the filter
  equations, including the frozen taps and the refill after a return to standard mode.
  `tb_poly_fir` also runs a second filter built with `USE_C = 1`.
* `tb_poly_fir_system` runs at the default parameters. It loads the multiplier slice into
  REPOMO32, streams random samples while switching the supply back and forth, and checks the
  REPOMO32 outputs against 240·x and 32·x. It counts each mechanism (configuration writes, switches
  in both directions, disconnected cycles, refill cycles, NAND-mode and NOR-mode evaluations) and
  fails if any of them never happened.
* `tb_repomo32` also checks random configurations against an independent model of the array.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/poly_pkg.sv tb/repomo_mult_map_pkg.sv tb/tb_poly_fir_system.sv \
    --top-module tb_poly_fir_system -y rtl -y tb +libext+.sv -o sim
./obj_dir/sim
```

Any other testbench builds the same way with its own name. To change the filter, override `N`,
`M`, `XW`, `CW`, `B` and `BSTAR` on `poly_fir` or `poly_fir_system`. The arrays `B` and `BSTAR`
must have N and M entries. The testbenches' reference models read their own copies of these
values, so update both together.
