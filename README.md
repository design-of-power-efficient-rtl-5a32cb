# Reversible-logic 8x8 Vedic multiplier

This is an unsigned 8-bit by 8-bit multiplier with a 16-bit product. It is
built entirely from *reversible* gates. A reversible gate has as many outputs
as inputs, and its input-to-output mapping is one-to-one. So no information
is erased inside it, which in principle removes the kT·ln2 of heat that
erasing a bit costs. The multiplier follows the Vedic *Urdhva Tiryagbhyam*
("vertically and crosswise") method. All partial products are formed at once,
and each output column is summed as soon as the carries from the column below
are known.

The RTL is plain combinational SystemVerilog. It has no clock, registers or
reset. The reversible gates are kept as separate modules, so the netlist shows
the gate structure. Any synthesis tool will still flatten it into ordinary
logic. The RTL only models the reversible circuit's logic. It does not make an
FPGA or CMOS implementation physically reversible.

## The four reversible gates

| Module         | Gate         | Outputs                                                        | Used for                              |
|----------------|--------------|----------------------------------------------------------------|---------------------------------------|
| `feynman_gate` | Feynman (FG) | P = A, Q = A⊕B                                                 | copying a line (B = 0)                |
| `toffoli_gate` | Toffoli (TG) | P = A, Q = B, R = AB⊕C                                         | partial products (C = 0 gives AND)    |
| `peres_gate`   | Peres (PG)   | P = A, Q = A⊕B, R = AB⊕C                                       | half adder (C = 0); two make a full adder |
| `hng_gate`     | HNG          | P = A, Q = B, R = A⊕B⊕C, S = (A⊕B)C ⊕ AB ⊕ D                   | full adder in one gate (D = 0)        |

With C = 0, a Peres gate gives the sum (Q) and carry (R) of A + B. The helper
`pg_full_adder` chains two Peres gates as PG(x, y, 0) followed by
PG(x⊕y, cin, xy). The second gate's Q output is the sum bit and its R output
is the carry. With D = 0, the HNG gate gives {S, R} = A + B + C. Outputs that
carry no result are called *garbage*. They exist only to keep each gate
one-to-one, and the RTL leaves them unused, except on the adder's `garbage`
port.

## Ripple-carry adder of HNG gates (`rca_hng`)

Each bit is one HNG gate with A = a[i], B = b[i], C = the carry from below
and D = 0. R is the sum bit and S is the carry up. `cin` enters at bit 0 and
`cout` leaves the top bit. The P and Q outputs of each gate are the adder's
2·WIDTH garbage bits: 16 of them at the default `WIDTH = 8`. They come out
bit-interleaved, with `garbage[2i] = a[i]` and `garbage[2i+1] = b[i]`.
Setting `WIDTH = 4` gives the 4-bit version of the same adder.

## The 4x4 Vedic multiplier (`vedic4`)

Vertically and crosswise for 4 bits takes seven steps. Step k adds every
product a[i]·b[j] with i + j = k, plus the carries left over from step k−1.
The lowest bit of that sum is product bit k, and the rest moves on to
step k+1. Steps 0 and 6 are the vertical pairs a0b0 and a3b3. Steps 1 to 5
are the crosswise pairs. The carry left after step 6 is bit 7.

In gates:

* 16 Toffoli gates with C = 0 form all partial products in parallel.
* Each column is reduced to one bit by half adders (one Peres gate each) and
  full adders (`pg_full_adder`). Every carry goes to the next column, so no
  final carry-propagate adder is needed. The column loads (partial products +
  incoming carries) are:

  | column | 0 | 1 | 2   | 3   | 4   | 5   | 6   | 7   |
  |--------|---|---|-----|-----|-----|-----|-----|-----|
  | bits   | 1 | 2 | 3+1 | 4+2 | 3+3 | 2+3 | 1+2 | 0+1 |

  This uses 8 full adders and 4 half adders, 20 Peres gates in all.

Which bits share an adder within a column is a choice of this design. Any
grouping gives the same product. The operand bits drive their four Toffoli
gates directly. A strictly fan-out-free netlist would first copy them with
Feynman gates, but the logic is the same.

## The 8x8 multiplier (`vedic8`, the top)

With a = {aH, aL} and b = {bH, bL} split into nibbles:

    a·b = aH·bH·2^8 + (aH·bL + aL·bH)·2^4 + aL·bL

Four `vedic4` instances form the four cross products at once: qHH, qHL, qLH
and qLL. Three 8-bit HNG adders then assemble the product:

| adder | operands                                          | result                      |
|-------|---------------------------------------------------|-----------------------------|
| `u_fa1` | qHL + qLH                                       | mid1, carry **ca1**          |
| `u_fa2` | mid1 + {0000, qLL[7:4]}                         | mid2, carry **ca2**; s[7:4] = mid2[3:0] |
| `u_fa3` | qHH + {00, ca1·ca2, ca1⊕ca2, mid2[7:4]}         | s[15:8], carry ca3           |

The low nibble is direct: s[3:0] = qLL[3:0].

**The carry merge is the subtle part.** Both ca1 and ca2 have weight 2^12.
So both must reach bit 4 of the last adder's second operand. A Peres gate
used as a half adder (`u_pg_carry`) merges them. Its XOR output goes to
bit 4 and its AND output to bit 5. The middle sum is at most 2·225 + 14 = 464,
which is below 512, so ca1 and ca2 are never both 1. That means the AND
output and ca3 are always 0. Both are still wired, so the circuit stays an
exact adder tree. Feeding only ca1 to the last adder, and dropping ca2, looks
natural but is wrong. It corrupts 524 of the 65,536 operand pairs: exactly
those where ca2 = 1.

Each operand nibble feeds two multipliers. Reversible logic forbids fan-out,
so 16 Feynman gates with B = 0 make the two copies of every operand bit.

### Size

This netlist uses 16 FG, 64 TG, 81 PG and 24 HNG gates. With the usual
quantum costs (FG 1, TG 5, PG 4, HNG 6), that is a quantum cost of 804. Each
8-bit adder alone costs 48. A quantum cost of 720 has been reported for this
architecture with a different, unspecified 4x4 gate netlist. Most of the cost
here (4 × 160) is in the 4x4 multipliers.

### Timing

The design is fully combinational, so `s` follows `a` and `b` after one
propagation delay. The critical path runs through a 4x4 multiplier's column
chain, then the three ripple adders (adder 2 waits for adder 1, and adder 3
for adder 2). There is no pipelining, clock enable or registered output. To
use the multiplier in a clocked design, register its inputs and outputs
outside it.

## How this RTL relates to its source design

It follows the published architecture in these points:

* the gate equations of FG, TG, PG and HNG;
* HNG gates with D = 0 as full adders, in an 8-bit ripple adder with 16
  garbage outputs;
* the 4x4 multiplier working by the seven-step vertically-and-crosswise
  method, built from Toffoli and Peres gates;
* four 4x4 multipliers plus three 8-bit ripple adders making the 8x8
  multiplier;
* an XOR and an AND in the top level, which merge the two carries.

The following are choices of this design:

* the gate-level insides of the 4x4 multiplier;
* where Feynman gates are used (operand copying);
* the merge of ca1 and ca2 through a single Peres gate;
* unsigned operands;
* no clock, enable or registers;
* the garbage port of the adder and its bit order.

The published characterisation gives delay, power and LUT counts for a
Spartan-6 FPGA. It does not apply to this RTL and was not reproduced.

## Files

| File | Contents |
|------|----------|
| `rtl/feynman_gate.sv`, `rtl/toffoli_gate.sv`, `rtl/peres_gate.sv`, `rtl/hng_gate.sv` | the reversible gates |
| `rtl/pg_full_adder.sv` | full adder from two Peres gates |
| `rtl/rca_hng.sv` | ripple-carry adder of HNG gates, `WIDTH` = 8 |
| `rtl/vedic4.sv` | 4x4 vertically-and-crosswise multiplier |
| `rtl/vedic8.sv` | 8x8 multiplier, the top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench is self-checking. It compares the block's outputs with values
computed by integer arithmetic and ends with a line
`TB_RESULT checks=N failures=M`.

* Gate testbenches: every input pattern against the gate equations. They also
  check that no two inputs give the same output, which proves the gate is
  reversible.
* `tb_rca_hng`: every (a, b, cin) for the 8-bit adder, and every pattern for
  a 4-bit instance. It also checks the garbage outputs.
* `tb_vedic4`: all 256 operand pairs.
* `tb_vedic8`: first 16 × 3 = 48, then all 65,536 operand pairs at the
  default configuration. It also counts how often ca1 is set (2,994 times),
  ca2 is set (524) and ca2 is set without ca1 (524). It fails if any of these
  never happens, or if ca1 and ca2 are ever set together.

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -y rtl -y tb +libext+.sv --top-module tb_vedic8 tb/tb_vedic8.sv
    ./obj_dir/Vtb_vedic8

Each testbench finishes in well under a second.
