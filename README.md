# Reversible 3-to-8 decoder from an HL gate and four R gates

A decoder turns an n-bit code into 2^n lines, exactly one of which is high.
In reversible logic every gate must map its inputs to its outputs one to one,
so a decoder cannot simply fan its select bits out to a tree of AND gates:
each copy of a signal and each unused result costs an extra constant input or a
garbage output. This design builds a 3-to-8 decoder with few of either:

* a single 4x4 **HL gate** decodes the two high select bits A and B into the
  four minterms A'B', A'B, AB', AB;
* four 3x3 **R gates** each take one of those minterms and split it by the
  third select bit C into two of the eight outputs;
* C does not fan out. It enters the first R gate and each R gate passes it on
  unchanged to the next, so the only leftover signal is C leaving the last gate.

The totals are 5 gates, 6 constant inputs and 1 garbage output. The published
quantum cost is 23, against 27 for the same structure built with Fredkin gates
instead of R gates. This RTL describes the circuit's logic function and
structure, not a quantum-level realisation: quantum cost, logical depth,
area and power do not appear in it.

The design follows the circuit published as "Design of 3:8 Reversible Decoder
Using R-Gate" (S. Mann, R. Jain). The decoders it is compared against, and the
other reversible gates they use (Feynman, Fredkin, Toffoli, Peres, TR), are not
part of this RTL.

## The R gate and why it splits a minterm

The R gate has inputs (A, B, C) and outputs

    P = A
    Q = A & B
    R = (~A & B) | (A & C)

R is a multiplexer: it shows B when A = 0 and C when A = 1. The decoder ties
the gate's C input to 0 and drives its A input with the select bit C and its
B input with a minterm m of A and B (careful: gate pins and decoder signals
share letters). Then

    P = C          (handed to the next gate)
    Q = m & C      (the minterm with C = 1)
    R = m & ~C     (the minterm with C = 0)

With its third input held at 0, the gate maps the four (A, B) patterns to four
distinct (P, Q, R) vectors, so it loses nothing in the way the decoder uses it.
The equations as given do not define a one-to-one mapping over all eight
input patterns: when A = 0, the value on C is lost. The module `r_gate`
implements the equations exactly and makes no attempt to repair that. Only
the constant-0 case matters to the decoder.

## The HL gate 2-to-4 decoder

The HL gate has inputs A, B and two constant inputs, 0 and 1, and four
outputs, which are the four minterms of A and B. None is garbage. Only this
function is specified. The gate's mapping for other values on its constant
inputs is not, so `hl_decoder_2to4` fixes the constants inside and has just
`a`, `b` and `m[3:0]` as ports, where `m[i]` is high when `{a,b} = i`. It is
written as four two-input AND terms, the simplest logic with that function.
If you need the true 4x4 reversible HL mapping, replace this module. Its
ports would then gain the two constant inputs.

## Wiring of the 3-to-8 decoder

`rev_decoder_3to8` wires the gates in this order, with C chained from gate 1 to
gate 4:

| R gate | B input (minterm) | A input      | Q output     | R output      | P output        |
|--------|-------------------|--------------|--------------|---------------|-----------------|
| 1      | AB'  (`m[2]`)     | C (port `c`) | AB'C  `y[5]` | AB'C' `y[4]`  | C to gate 2     |
| 2      | A'B  (`m[1]`)     | C from 1     | A'BC  `y[3]` | A'BC' `y[2]`  | C to gate 3     |
| 3      | AB   (`m[3]`)     | C from 2     | ABC   `y[7]` | ABC'  `y[6]`  | C to gate 4     |
| 4      | A'B' (`m[0]`)     | C from 3     | A'B'C `y[1]` | A'B'C' `y[0]` | `garbage`       |

Every R gate's third input is tied to 0. Output `y[i]` is high exactly when
`{a, b, c} = i`, with A the most significant bit. The minterm names and gate
order are those of the published circuit. The numeric indexing is this
design's choice.

The `garbage` output is the P output of the last R gate. The published circuit
leaves it unused, but it is brought out here so that the full reversible
output vector (eight one-hot lines plus C) can be observed. From that vector,
the input code can be recovered. Because P = A, `garbage` is logically just
`c` passed through four gates, and a synthesis tool will reduce it to a wire.
That is expected.

## Cost accounting

| quantity            | 2-to-4 (HL gate) | 3-to-8 (this top)                 |
|---------------------|------------------|-----------------------------------|
| gates               | 1                | 5 (1 HL + 4 R)                    |
| constant inputs     | 2 (0 and 1)      | 6 (2 on HL + one 0 per R gate)    |
| garbage outputs     | 0                | 1 (last R gate's P)               |
| quantum cost (published) | 7           | 23                                |

The quantum cost of a single R gate is not given. 23 − 7 = 16 over four gates
implies 4 each. These numbers describe a quantum or reversible-technology
implementation. In CMOS synthesis the design is 12 two-input ANDs and a few
inverters.

## Interfaces and timing

All three modules are purely combinational: no clock, no reset, no state.

| module             | inputs          | outputs                    |
|--------------------|-----------------|----------------------------|
| `r_gate`           | `a`, `b`, `c`   | `p`, `q`, `r`              |
| `hl_decoder_2to4`  | `a`, `b`        | `m[3:0]`                   |
| `rev_decoder_3to8` | `a`, `b`, `c`   | `y[7:0]`, `garbage`        |

There are no parameters. The published design is a fixed 3-to-8 decoder.
Extending it to 4-to-16 and beyond is suggested but not drawn, so it is not
provided.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog:

* `tb_r_gate` checks all 8 input patterns against a hand-written truth table.
  It also checks that the four patterns with the third input at 0 give
  distinct outputs.
* `tb_hl_decoder_2to4` checks all 4 codes and one-hotness.
* `tb_rev_decoder_3to8` checks all 8 codes, then 400 random codes. For each,
  it checks that `y` is the expected one-hot word and that `garbage` equals
  `c`. It also checks that the input code can be recovered from the outputs.
  It counts how often each R gate routed its minterm to Q and to R, and how
  often C left the chain as 0 and as 1, and fails if any of these never
  happened.

To run one with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        --top-module tb_rev_decoder_3to8 tb/tb_rev_decoder_3to8.sv
    ./obj_dir/Vtb_rev_decoder_3to8

Substitute `tb_r_gate` or `tb_hl_decoder_2to4` for the other two. Each run
takes well under a second.

## Choices made here, not in the published design

* The output bit order `y[{a,b,c}]` and the minterm vector order
  `m[{a,b}]` were chosen here.
* The HL gate is modelled by its decoder function only, with its constant
  inputs folded in.
* The garbage output is made a port.
* The design is built as plain combinational logic.
