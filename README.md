# 32-bit dual-rail self-timed carry look-ahead adder (MODCVS organisation)

This is a 32-bit adder for delay-insensitive self-timed circuits. It has no
clock. Every operand, carry and sum bit travels on two wires (dual rail), so a
receiver can tell from the wires alone when a value has arrived. The adder
reports when it has finished with a single global completion signal, GCo.
The carry logic is a carry look-ahead (CLA) tree built from 2-bit and 8-bit
groups.

The circuit style is differential cascode voltage switch logic (DCVS): a
dynamic gate with two complementary NMOS trees. The multiple-output variant
(MODCVS) takes several results from the internal nodes of one tree. Because
of this, one gate produces a whole chain of carries, or a 4-bit and an 8-bit
group term together. The RTL here describes the logic function of each gate
and keeps the gate partition, the signal names and the precharge/evaluate
behaviour of the original circuit. The carry-in to the top sum bit passes
through five gate levels: CI.1, CI.3, CII, CI.5 and CIII. The carry-out
passes through three: CI.1, CI.3 and CII.

## Dual-rail values and the handshake

Each value is a `dr_t` pair `{t, f}` (package `modcvs_pkg`):

| t f | meaning |
|-----|---------|
| 0 0 | spacer: not yet valid (precharge) |
| 1 0 | logic 1 |
| 0 1 | logic 0 |
| 1 1 | never occurs in a working circuit |

One input, `r` (the signal R), sequences everything in a four-phase,
return-to-zero handshake:

1. **Precharge (`r = 0`).** Every gate output is low. Every sum and carry is
   a spacer, and all `comp`, `comp33` and `gco` are 0.
2. The environment applies valid `a`, `b` and `c0`, then raises `r`.
3. **Evaluate (`r = 1`).** Each gate raises exactly one rail of each output,
   but only once the inputs it needs are valid. `comp[i]` rises when sum bit
   i is valid. `comp33` rises when the carry-out is valid. `gco` rises when
   all 33 completion signals are high.
4. The environment takes the result and lowers `r`. Everything returns to
   the spacer state and `gco` falls.

Rails only rise during evaluation. This makes the adder delay-insensitive:
an input that is still a spacer holds back exactly the outputs that depend on
it. For example, if `c0` arrives late, C32 is already valid as long as some
bit generates or kills a carry. If all 32 bits propagate, C32, `comp33` and
`gco` wait for `c0`. The testbench checks both cases.

## Carry look-ahead organisation

For each bit there are three mutually exclusive bit terms:

- generate: G = A·B
- kill: N = ¬(A+B)
- propagate: P = A⊕B

P-bar = G + N is the complement rail of P.

Each carry is itself a dual-rail pair, with one recurrence per rail:

    C(i)     = G(i) + P(i)·C(i-1)
    C-bar(i) = N(i) + P(i)·C-bar(i-1)

The same recurrence is applied to groups of bits:

- **2-bit terms:** GG, NN and PP.
- **4-bit and 8-bit terms:** GGG, NNN and PPP.

    GG(n+1)  = G(n+1) + P(n+1)·G(n)       PP(n+1) = P(n+1)·P(n)
    GGG(n+3) = GG(n+3) + PP(n+3)·GG(n+1)  PPP(n+3) = PP(n+3)·PP(n+1)
    GGG(n+7) = GG(n+7) + PP(n+7)·(GG(n+5) + PP(n+5)·GGG(n+3))
    PPP(n+7) = PP(n+7)·PP(n+5)·PPP(n+3)

NN and NNN follow the GG and GGG formulas, with N in place of G. The group
propagate has only a true rail. "Not propagate" is never needed, because the
generate and kill terms cover it.

The 32 bits form four 8-bit groups, each handled by one **CI** cell. In the
document's numbering, group n covers bits n..n+7, with n = 1, 9, 17 or 25.
Here vector index i holds the document's bit i+1.

| cell | module | level | function |
|------|--------|-------|----------|
| CI.1 (×16) | `modcvs_ci1` | 1 | for one bit pair: G, N, P and P-bar of both bits, plus GG, NN and PP |
| CI.2 (×4) | `modcvs_ci2` | 2 | PPP(n+3) and PPP(n+7), taken from one series chain |
| CI.3 (×4) | `modcvs_ci3` | 2 | GGG and NNN at n+3 and n+7, from one gate with a shared node |
| CI.4 (×4) | `modcvs_ci4` | 3 | C(n), C(n+1), C(n+2), from the group carry-in and the bit terms |
| CI.5 (×4) | `modcvs_ci5` | 3 | C(n+3), which skips 4 bits via GGG/NNN/PPP(n+3), then C(n+4)..C(n+6) from the bit terms |
| CI | `modcvs_ci` | – | one 8-bit group: four CI.1, one CI.2, one CI.3, one CI.4, one CI.5 |
| CII | `modcvs_cii` | – | C8, C16, C24 and C32 from C0 and the four groups' 8-bit terms; also `comp33` |
| CIII (×32) | `modcvs_ciii` | – | dual-rail XOR S(i) = C(i-1)⊕P(i), plus `comp[i]` |
| GCo | `modcvs_gco` | – | AND of the 32 `comp` bits and `comp33` |
| top | `modcvs_adder32` | – | wires the cells together |

Two details of the wiring:

- **Group carries go out and come back.** CI does not compute its own group
  carry-out. Its 8-bit terms go to CII, and CII returns C8, C16 and C24 as the
  carry-ins of the next groups.
- **The group carry-in bypasses CI.** The sum cell of a group's lowest bit
  takes the group carry-in (C0, C8, C16 or C24) directly.

## How the dynamic circuit maps to RTL

Each module is combinational. Every output is ANDed with `r`, which plays
the role of the evaluate transistor at the foot of a dynamic gate. Static
gates that read precharged nodes need no `r` term of their own, because
their inputs are already low in precharge. This applies to P-bar = G + N in
CI.1 and to the completion gates.

The completion of a pair is the OR of its rails. In the circuit, a NAND on
the two precharged nodes computes this.

There are no flip-flops and no reset. The precharge phase is the only
initialisation. All gates settle in zero simulation time, so the RTL
reproduces:

- what the adder computes;
- when each output may complete, relative to which inputs have arrived;
- the logic depth of each path.

It does not reproduce the delays of the circuit, given below.

## Delays of the transistor-level circuit

These figures come from electrical simulation of the transistor-level
circuit in a 1.0 µm CMOS process. They include about 1.1 ns of buffering on
R (typical corner). The RTL does not model them.

| | fast | typical | slow |
|--|--|--|--|
| average addition time (R rises → GCo rises) | 9.3 ns | 10.6 ns | 12.6 ns |
| worst-case addition time | 11.1 ns | 13.7 ns | 15.6 ns |
| 64-bit, two adders in ripple: average | 10.4 ns | 11.7 ns | 13.7 ns |
| 64-bit, two adders in ripple: worst case | 13.2 ns | 16.9 ns | 19.6 ns |

The same work gives the layout as about 2100 transistors in
530 × 2200 µm², and shows that the addition time depends only
weakly on how far a carry propagates.

## Where this RTL departs from the source or fills gaps

- **CI.4 and CI.5.** The source gives their inputs, outputs and function but
  no netlist. They are written as the carry recurrence above.
- **Global completion.** The source takes this circuit from earlier work and
  does not describe its inside. Here it is a 33-input AND, which is the
  simplest circuit that rises when all 33 completions are high and falls
  when any of them falls.
- **Sum complement rail.** S-bar is the inverse of the true sum,
  S-bar = ¬(C⊕P), as dual-rail coding requires.
- **Not built:**
  - the R distribution buffers, which have no logic function;
  - the online checker that the source suggests could be added to the
    outputs.
- **Bit indexing.** Bits are numbered from 0. The dual-rail bundling into
  `dr_t` is this design's own choice.

## Interface of `modcvs_adder32`

| port | dir | type | meaning |
|------|-----|------|---------|
| `r` | in | `logic` | precharge (0) / evaluate (1) |
| `a`, `b` | in | `dr_t [31:0]` | operands |
| `c0` | in | `dr_t` | carry-in |
| `s` | out | `dr_t [31:0]` | sum |
| `c32` | out | `dr_t` | carry-out |
| `comp` | out | `logic [31:0]` | per-bit sum completion |
| `comp33` | out | `logic` | carry-out completion |
| `gco` | out | `logic` | global completion |

The adder has no parameters. Its width (32) and group size (8) are constants
in `modcvs_pkg`, and the CII cell is written for exactly four groups.

To build a 64-bit adder, connect the `c32` of the low adder to the `c0` of
the high adder and drive both with the same `r`. The addition is done when
both `gco` outputs are high. `tb_modcvs_adder64_ripple` does exactly this.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module's outputs with values computed from integer addition, independently
of the module's equations. Each ends by printing
`TB_RESULT checks=N failures=M`.

- **CI.1, CI.2, CI.3, CI.4, CI.5, CIII:** every valid input value. CI.4,
  CI.5 and CIII also get spacer inputs.
- **CII:** every combination of generate, kill and propagate over the four
  groups, with carry-in 0, 1 and spacer.
- **CI:** directed and random operands, with carry-in 0, 1 and spacer.
- **`tb_modcvs_adder32`:** the whole adder over complete handshakes:
  - every carry-propagate length from 0 to 32;
  - generate-then-propagate patterns;
  - 5000 random additions;
  - late carry-in;
  - a late operand bit.

  It counts how often each mechanism occurs and fails if any never does:
  precharge, completion, carry-out, a 32-bit carry chain, an early carry-out,
  a withheld completion, and a withheld operand.
- **`tb_modcvs_stage_depth`:** rebuilds the adder from the same cells, with
  wiring identical to `modcvs_ci` and `modcvs_adder32`, but gives each of the
  five gate levels its own evaluate signal. It raises the levels one at a
  time and checks that C8 to C32 and `comp33` complete at level 3, all
  internal carries at level 4, and all sums and `gco` at level 5. This holds
  for every carry-propagate length from 0 to 32 and for 2000 random
  additions: the depth does not depend on the data.
- **`tb_modcvs_adder64_ripple`:** two adders in a ripple chain, checked
  against 64-bit addition.

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        --top-module tb_modcvs_adder32 rtl/modcvs_pkg.sv tb/tb_modcvs_adder32.sv
    ./obj_dir/Vtb_modcvs_adder32

Pass `rtl/modcvs_pkg.sv` first. The simulator finds the other modules by
file name.
