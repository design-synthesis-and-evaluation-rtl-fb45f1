# Heterogeneous FPGA logic block: a LUT-6 next to a 6-input macro-gate

A 6-input LUT costs 64 configuration bits and a 63-mux tree, and most of the
functions a mapped design puts into LUTs are simple. This logic block pairs
one LUT-6 with one **macro-gate**. The macro-gate is a small fixed circuit
with four wide gates, g1..g4. Each of its six inputs and its output has a
programmable inverter, and a 4:1 mux picks one gate. Nine configuration bits,
together with the block's pin muxes that permute its inputs, let it implement
the NPN class of each gate. NPN class means every function
you get from a gate by negating inputs, permuting inputs and negating the
output. Inputs can also be tied to constants, so it covers every cofactor of
those classes too. That is a large share of what real designs need. A
technology mapper balances the two element types 1:1, and the two are packed
into one block. The result needs less area than a pair of LUT-6s and has a
shorter logic delay.

This repository has synthesizable SystemVerilog for the logic block and its
parts, with a self-checking testbench for each. It does not include the
routing fabric between blocks or the CAD flow (mapping, area recovery,
packing) that targets the block.

## The macro-gate

```
 in[0..5] ──► prog. inverter (L0..L5) ──► 6-bit bus ──► g1 g2 g3 g4 ──► 4:1 mux (L7,L6) ──► prog. inverter (L8) ──► out
```

The gates, with pin 0..5 named a..f:

| gate | function | what it is |
|------|----------|------------|
| g1 | a·b·c·d·e·f | 6-input AND |
| g2 | a·b'·c' + b·c·f + b·c'·d + b'·c·e | 4:1 mux: (b,c) = 00→a, 10→d, 01→e, 11→f |
| g3 | a·b'·c·d'·e + b·c·e·f + d·e·f | a 5-literal product OR'd with e·f·(b·c + d) |
| g4 | a·b' + a'·c·d' + b'·c' + e' + f' | wide OR-type function |

Over all 64 input values the gates have 1, 32, 12 and 56 true minterms.
`tb_mg_functions` checks these counts.

How to configure it (`plb_pkg::mg_cfg_t`):

- `in_inv[i]` (L0..L5): complement pin i before the gates.
- `gate_sel` (L7:L6): 0 = g1, 1 = g2, 2 = g3, 3 = g4.
- `out_inv` (L8): complement the result.

Some uses that are easy to miss:

- **Narrower functions come from constant pins.** A pin driven by the block's
  constant-0 source reads 0, or 1 if its inverter is on. This fixes that
  input of the gate. For example, g1 with three pins tied to 1 is a 3-input
  AND.
- **g2 is a general 4:1 multiplexer.** Put two signals on b and c and
  constants on a, d, e and f, and you get any function of two inputs
  (0,1,1,0 gives XOR). The LUT itself is not needed for that.
- **Output inversion turns AND into NAND/OR.** g1 with output inversion is
  a 6-input NAND. With all inputs inverted as well it is a 6-input OR.

The gates are written as sum-of-products (`rtl/mg_functions.sv`). A
standard-cell version would use complex cells: NOR4B for g1, OAI222 for g2,
OAI21 for g3 and OR3 for g4. The equation for g3 was cross-checked against
such a netlist. There the OAI21 combines NAND4(a·b', c, d', e), NAND2(e, f)
and AND2(d', NAND2(b, c)), which reduces to a·b'·c·d'·e + e·f·(b·c + d).

## The logic block

```
             ┌─────────────────────────── hetero_plb ───────────────────────────┐
 plb_in[9:0]─┤ 6 input-select muxes ─► LUT-6 ─► FF/bypass ─┬─────────────────────├─ plb_out[0]
             │ 6 input-select muxes ─► macro-gate ─► FF/bypass ─┬───────────────├─ plb_out[1]
             │   ▲ sources: 10 pins, LUT FF, MG FF, constant 0   │  │            │
             │   └───────────── registered feedback ─────────────┘──┘            │
 cfg_in ─────┤ configuration chain (123 bits) ───────────────────────────────────├─ cfg_out
             └──────────────────────────────────────────────────────────────────┘
```

- **Input selection.** The cluster is fully populated: each of the 12
  element pins has its own 13-way mux. The sources are the 10 block inputs,
  the registered outputs of both elements and constant 0. Full population
  matters because the macro-gate's pins are *not* interchangeable, as a
  LUT's are. A signal must reach a specific pin, so the pin muxes do the
  permuting that NPN equivalence needs.
- **Elements.** `lut` is a K-input mux tree (K = 6). `macro_gate` is
  described above.
- **Output stage.** Each element has a flip-flop with a bypass mux
  (`ble_output`). Only the registered value is fed back inside the block, so
  no combinational loop can be configured. A combinational path between the
  two elements goes out through `plb_out` and back in through the routing.
- **Configuration.** All 123 bits are in one serial chain (`config_chain`):
  64 LUT bits, 12 × 4 pin selects, 9 macro-gate bits and 2 register enables.
  Raise `cfg_en`, then send `plb_cfg_t` MSB first, one bit per clock, for
  123 clocks. `cfg_out` is the chain's last bit, so blocks can be
  daisy-chained. To load N chained blocks, send the word of the farthest
  block first. In silicon these bits would be SRAM cells. Here they are
  flip-flops with an asynchronous active-low reset that clears them.

Timing: with the register bypassed, an output is combinational from
`plb_in` through one select mux and one element. With the register on, it
changes on the clock after the inputs. Configuring takes `PLB_CFG_W` = 123
clocks per block, and the elements keep running while the chain shifts.

## Sizes and costs

The sizes follow the main architecture: LUT-6 + macro-gate, 10 block inputs
(`rtl/plb_pkg.sv`). `lut` takes `K = 4` as well. The block itself is fixed
at 6 inputs because the configuration struct is built from the package
constants.

The reference implementation in a 90 nm library gives these cost figures.
They are not modelled in the RTL:

| element | area (µm²) | delay incl. input mux (ps) |
|---------|-----------:|---------------------------:|
| macro-gate (4 gates, 4:1 mux, 7 programmable inverters, 9 SRAM bits) | 190.71 | 431.82 |
| LUT-4 | 170.64 | 471.66 |
| LUT-6 | 699.56 | 646.82 |

Across the 21 IWLS'05 benchmarks the reported results are as follows.
Compared with two LUT-6s per block, LUT-6 + macro-gate cuts logic delay by
15% and overall delay by 7%. Logic area falls by 29%, and overall area
(logic plus routing) by 15%. The trade-off is logic depth: it is about 1.5×
that of LUT-6 alone, because a macro-gate covers fewer functions than a
LUT-6. The benchmarks need between 48 and 16,561 blocks. One block of this
RTL holds one LUT node and one macro-gate node.

## Where this RTL makes its own choices

These points are not fixed by the architecture description and were chosen
here:

- which pin is gate input a..f (pin 0 = a), and the gate-select and
  inverter bit polarities;
- how the select muxes are built: binary selects, the constant-0 source,
  and feedback of registered outputs only;
- a flip-flop with bypass after each element, two block outputs (one per
  element), and reset to 0;
- serial loading of the configuration, and the field order of `plb_cfg_t`.

The configuration bits are flip-flops, not SRAM cells. No routing fabric
(channels, switch boxes, connection boxes) is included: `plb_in`, `plb_out`
and the configuration chain are ports. Nothing in the RTL models area or
delay.

## Files

| file | contents |
|------|----------|
| `rtl/plb_pkg.sv` | sizes, source numbering, `mg_cfg_t`, `plb_cfg_t` |
| `rtl/mg_functions.sv` | g1..g4 |
| `rtl/prog_inverter.sv` | inverter + 2:1 mux under one bit |
| `rtl/macro_gate.sv` | the macro-gate |
| `rtl/lut.sv` | K-input LUT as a mux tree |
| `rtl/input_select_mux.sv` | per-pin source mux |
| `rtl/ble_output.sv` | flip-flop with bypass |
| `rtl/config_chain.sv` | serial configuration memory |
| `rtl/hetero_plb.sv` | the logic block (top) |
| `tb/tb_ref_pkg.sv` | reference models of g1..g4 and the macro-gate, written differently from the RTL |
| `tb/tb_<block>.sv` | one self-checking testbench per module |
| `tb/tb_hetero_plb.sv` | end-to-end test of the block at full size |
| `tb/tb_area_recovery_example.sv` | a 7-node mapped circuit (3 LUT-6, 4 macro-gates) on four daisy-chained blocks |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own,
and each has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/plb_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_hetero_plb.sv --top-module tb_hetero_plb
./obj_dir/Vtb_hetero_plb
```

Change the testbench file and `--top-module` to run another testbench. For
blocks that do not use the reference package, leave out
`tb/tb_ref_pkg.sv`.

What the tests cover:

- **`tb_macro_gate`** tries all 512 settings of the macro-gate on all 64
  inputs.
- **`tb_hetero_plb`** runs at full size. It loads 303 configurations through
  the chain: directed ones (AND3 from g1 with tied pins, registered XOR from
  g2, a LUT toggle flip-flop through feedback) and random ones. It compares
  both outputs every clock with a cycle model. It also counts each mechanism:
  each gate, input and output inversion, registered and bypassed outputs,
  both feedbacks, the constant source and the daisy chain. A mechanism that
  never happens counts as a failure.
- **`tb_area_recovery_example`** maps a small circuit onto four blocks. It
  has the 7-node shape used to show LUT/macro-gate balancing: after
  balancing there are three LUT-6s and four macro-gates, which pack into four
  blocks. The node functions are invented. Verilator reports circular logic
  (UNOPTFLAT) in this testbench because the blocks feed each other whole pin
  vectors. No node depends on itself.
