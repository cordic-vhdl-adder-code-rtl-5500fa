# Ripple carry and carry chain adders for a CORDIC datapath

A CORDIC engine spends almost all of its logic on wide additions and
subtractions of x, y and z. This RTL provides that adder in two forms behind
one interface, `{co, cn} = an + bn + ci` over `WD` bits:

* **ripple carry** (`ARCH_RCA`): `WD` full adders in a row; the carry walks
  through every bit;
* **carry chain** (`ARCH_CCA`, the default): the word is cut into `WD/BD`
  blocks of `BD` bits. Each block decides from its operand slices alone
  whether it *generates* a carry or *propagates* the one it receives, and a
  chain of 2:1 multiplexers turns those decisions into the carry into every
  block. Only inside a block does the carry ripple.

Both are purely combinational: no clock, no reset, no pipeline registers. The
result is valid once the carry path has settled.

## Number format

The surrounding CORDIC datapath uses 32-bit two's complement fixed point with
29 fractional bits: bit 31 is the sign, bits 30..29 the integer part, bits
28..0 the fraction, so a value `v` is stored as `round(v * 2^29)` and the range
is [-4, 4). The adders are ordinary binary adders and do not care where the
point is; subtraction `a - b` is done as `a + ~b` with `ci = 1`. The format
constants are in `rtl/cordic_pkg.sv`, and `tb/fixpt_pkg.sv` converts between
reals and this format for the tests.

## The carry chain adder

For block `i` (bits `(i+1)*BD-1 .. i*BD`, block 0 least significant), let `A`
and `B` be the unsigned values of its operand slices and `M = 2^BD - 1`:

| condition   | meaning                                   | signal |
|-------------|-------------------------------------------|--------|
| `A + B > M` | block overflows whatever its carry in     | `g = 1` |
| `A + B = M` | all sum bits one: a carry in passes through | `p = 1` |
| `A + B < M` | block absorbs any carry in                | both 0 |

`g` and `p` can never both be 1.

`gprom` looks both bits up in two tables of `2^(2*BD)` one-bit entries,
addressed by `{A, B}` (entry `A*2^BD + B`). The tables are filled at
elaboration by constant functions that apply the two conditions above, so
changing `BD` needs no new data. For `BD = 4` that is 2 x 256 bits per block,
which is one small LUT-style lookup per block. Its `en` input is a read
enable; with `en` low both outputs are 0. The adder ties it high.

`carry_chain` has one cell per block:

```
qi[0]   = ci
qo[i]   = p[i] ? qi[i] : g[i]     // one 2:1 mux per block
qi[i+1] = qo[i]
co      = qo[ND-1]
```

`cca_adder` puts it together: per block a `BD`-bit `rca_adder` (the block
subadder) takes its slices and `qi[i]` and produces that block's sum bits, and
a `gprom` produces `g[i]`, `p[i]`. Since `g` and `p` depend on the operands
only, all blocks compute them in parallel; the critical path is one block's
`g/p` lookup, `ND` multiplexers, and one block's internal ripple. The
subadders' own carry outs are not used (each equals `qo[i]`); the adder's `co`
comes from the chain. This maps naturally onto FPGA fabrics whose dedicated
carry chains are exactly such multiplexer chains.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/cordic_pkg.sv` | package | fixed-point format, default sizes, `adder_arch_e` |
| `rtl/adder.sv` | `adder` | top: selects the architecture with `ARCH` |
| `rtl/rca_adder.sv` | `rca_adder` | `WD`-bit ripple carry adder, also the block subadder |
| `rtl/cca_adder.sv` | `cca_adder` | carry chain adder |
| `rtl/gprom.sv` | `gprom` | block generate/propagate tables |
| `rtl/carry_chain.sv` | `carry_chain` | multiplexer carry chain |

Top parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `WD` | 32 | operand and sum width |
| `BD` | 4 | block width of the carry chain adder; must divide `WD` (checked at elaboration) |
| `ARCH` | `ARCH_CCA` | `ARCH_CCA` carry chain, `ARCH_RCA` ripple carry |

Ports: `an`, `bn` (`WD` bits), `ci` in; `cn` (`WD` bits), `co` out.

## Where this RTL makes its own choices

* The architecture is chosen by a parameter instead of a VHDL-style
  configuration, and the carry chain adder is the default.
* `gprom` with `en` low drives `g = p = 0`. A literal reading of the original
  behaviour would hold the previous value, which is a latch; the adder never
  lowers `en`, so the adder's behaviour is unaffected.
* The chain cells are wired as `qi[i] = qo[i-1]`, `qi[0] = ci`,
  `co = qo[ND-1]`.
* `WD` not divisible by `BD` is rejected rather than truncated.
* A LUT-specific mapping of the generate/propagate tables is not provided.
  The tables are generic logic that synthesis maps as it sees fit.

## Verification

Each module has a self-checking testbench in `tb/` that compares every output
with integer (or real) arithmetic done in the testbench and ends with a line
`TB_RESULT checks=N failures=M`:

* `tb_rca_adder`: 32-bit corner and random cases, 4-bit exhaustive;
* `tb_gprom`: all slice pairs for `BD = 4` and `BD = 2`, enable high and low;
* `tb_carry_chain`: every kill/generate/propagate pattern over 8 blocks, both
  carry-in values;
* `tb_cca_adder`: 32/4 corner and random cases, 8/2 exhaustive, 16/8 random;
* `tb_adder`: the top at its defaults. It runs the sweep `bn = 0x000000FF`,
  `an = 0..31`, then fixed-point additions and subtractions of CORDIC
  constants (pi/4, atan(1/2), 1/K), then random operands. It also counts
  generate, propagate, full-length chain, carry-in and carry-out events inside
  the carry chain, and fails if any of them never occurred;
* `tb_adder_rca`: the top with `ARCH = ARCH_RCA`.

All pass with Verilator 5. Each testbench has also been shown to fail
against a deliberately broken copy of its module. No timing analysis has been
done: the claims about the critical path above are structural.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/cordic_pkg.sv \
    tb/fixpt_pkg.sv tb/tb_adder.sv --top-module tb_adder -o sim
./obj_dir/sim
```

Swap `tb_adder` for any other testbench name. To change the width or block
size, override `WD`/`BD` on `adder` (or `cca_adder`).
