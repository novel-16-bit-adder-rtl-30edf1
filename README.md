# 16-bit carry-select adder with binary-to-excess-1 converters

A carry-select adder splits its operands into groups. All groups add at the
same time, and once a group's real carry-in is known, a multiplexer picks the
right precomputed result. The classic version computes each upper group twice,
with two ripple-carry adders: one assumes carry-in 0, the other carry-in 1.
That doubles the adder hardware, which is where most of its area and power go.

This adder keeps only the carry-in-0 ripple-carry adder in each upper group.
The carry-in-1 result is always the carry-in-0 result plus one. So it is
produced by a *binary-to-excess-1 converter* (BEC), a small incrementer that
needs fewer gates than a second adder. The multiplexer then chooses between
the adder's result and its increment.

## Structure

```
      a[15:12] b[15:12]   a[11:8] b[11:8]     a[7:4] b[7:4]      a[3:0] b[3:0]
           |                   |                  |                  |
   +-------v-------+   +-------v-------+  +-------v-------+  +-------v-------+
   | RCA, cin = 0  |   | RCA, cin = 0  |  | RCA, cin = 0  |  |  RCA          |<- cin
   | 5-bit BEC     |   | 5-bit BEC     |  | 5-bit BEC     |  |               |
   | 10:5 MUX      |<--| 10:5 MUX      |<-| 10:5 MUX      |<-|               |
   +-------+-------+   +-------+-------+  +-------+-------+  +-------+-------+
   cout    |   sum[15:12]      | sum[11:8]        | sum[7:4]         | sum[3:0]
```

The structure has four 4-bit groups:

* **Group 0 (bits 3:0)** is a plain 4-bit ripple-carry adder that takes the
  adder's `cin`. Its carry-in is known from the start, so it needs no select.
* **Groups 1 to 3** are each a `bec_select_stage`:
  1. A 4-bit ripple-carry adder with carry-in 0 produces the 5-bit result
     `r0 = {cout0, sum0}`.
  2. A 5-bit BEC computes `r1 = r0 + 1`. This is the result the group would
     give with carry-in 1.
  3. A multiplexer passes `r0` if the carry out of the group below is 0, and
     `r1` if it is 1.
  4. The selected carry becomes the select of the next group, and the top
     group's carry is `cout`.

### Why the converter is N+1 bits wide

A group of N bits produces N sum bits and a carry, so it needs an N+1-bit
increment. The increment must cover the carry for this reason: with carry-in
0 the group can produce `sum0 = 1111, cout0 = 0` (for example 0111 + 1000).
With carry-in 1 that becomes `0000` with carry 1. The carry of the increment
is therefore not `cout0`.

Incrementing the five bits `{cout0, sum0}` handles this case. The increment
can never overflow, because `r0` is at most 11110 (15 + 15). The multiplexer
is also five bits wide, so the sum and the carry are selected together. In a
4-bit-only view it would be an "8:4 mux" with the carry selected beside it.

### The converter's logic

```
x[0] = ~b[0]
x[i] =  b[i] ^ (b[0] & b[1] & ... & b[i-1])      i = 1 .. N
```

The AND terms form a prefix chain. A 5-bit BEC therefore costs 4 AND gates,
4 XOR gates and one inverter, 9 gates in total. A 4-bit ripple-carry adder
built from these full adders costs 20 gates (4 × (2 XOR + 2 AND + 1 OR)).
The 5-bit AND-OR multiplexer adds about 15 gates (two ANDs and one OR per
bit). Each upper group thus costs about 44 gates (20 + 9 + 15), against about
55 for two adders and the same multiplexer. After synthesis the numbers
depend on the target.

### Timing

No clock is involved: the adder is a single combinational path with zero
cycles of latency. The ripple adders and converters of all groups work in
parallel. The carry chain is then:

1. It ripples through group 0: four full-adder carries.
2. It passes through one multiplexer in each of groups 1 to 3.

Each upper group's own result (ripple adder, then converter) must be ready by
the time its select arrives. That is the "small speed penalty" a BEC adds
compared with a second ripple adder: the increment sits in series after the
adder.

## Modules

| Module | Role | Default parameters |
|---|---|---|
| `novel_adder_pkg` | shared sizes `ADDER_WIDTH` = 16, `GROUP_WIDTH` = 4 | – |
| `novel_adder16` | top: group 0 ripple adder + `WIDTH/GROUP - 1` select stages | `WIDTH` = 16, `GROUP` = 4 |
| `bec_select_stage` | one upper group: RCA (cin 0) + (N+1)-bit BEC + (N+1)-bit mux | `WIDTH` = 4 |
| `ripple_carry_adder` | `WIDTH` full adders chained carry to carry | `WIDTH` = 4 |
| `binary_to_excess1` | `x = b + 1` with an AND prefix chain and XORs | `WIDTH` = 5 |
| `mux2` | two-to-one word multiplexer, `y = sel ? d1 : d0` | `WIDTH` = 4 |
| `full_adder` | one-bit full adder | – |

Ports of the top:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `a`, `b` | in | 16 | operands |
| `cin` | in | 1 | carry into bit 0 |
| `sum` | out | 16 | sum bits |
| `cout` | out | 1 | carry out of bit 15 |

`sum + 65536 * cout = a + b + cin`.

The top's `WIDTH` must be a multiple of `GROUP`; elaboration stops with an
error otherwise. Other sizes work (for example 32 bits in 4-bit groups), but
only the 16-bit, 4-bit-group adder is the design as specified.

## What is specified and what is chosen here

Taken from the specification:

* 16-bit width and four 4-bit groups.
* Ripple-carry adders built from chained full adders.
* A single carry-in-0 adder per upper group, with a BEC replacing the
  carry-in-1 adder.
* The N+1-bit size of the BEC.
* The multiplexer's orientation: input 1 is the BEC result, input 0 is the
  direct result, and the incoming carry is the select.

Choices made in this RTL:

* **Group 0 has no BEC.** It is a single ripple adder on `cin`, as in the
  classic carry-select layout it derives from.
* **The group carry is selected with the sum** through a five-bit
  multiplexer. The specification draws a 4-bit (8:4) multiplexer for the
  sum bits.
* **Gate-level forms of the cells** (the full adder, the BEC equations and
  the AND-OR multiplexer). Only the function of each cell is specified.
* **No registers or reset.** The adder is purely combinational.

The published evaluation compares this adder with a classic dual-RCA
carry-select adder on an FPGA:

| | Classic CSLA | This adder |
|---|---|---|
| Gates | 512 | 304 |
| Longest path | 13.2–13.5 ns, 11 logic levels | 8.56 ns, 6 logic levels |
| Power | 0.201 mW | 0.173 mW |

The classic adder is only a point of comparison and is not included here.
The RTL carries no timing, and these figures depend on that FPGA flow. They
have not been reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog that ends the run with a
failure if it hangs.

| Testbench | What it does |
|---|---|
| `tb_full_adder` | all 8 input combinations |
| `tb_ripple_carry_adder` | all 512 inputs; counts full-length carry ripples |
| `tb_binary_to_excess1` | all 32 inputs, including the wrap of 11111 to 0 |
| `tb_mux2` | all 512 inputs |
| `tb_bec_select_stage` | all 512 inputs; counts how often the BEC path is selected and how often its increment carries out of the group |
| `tb_novel_adder16` | the top at its default parameters (below) |

`tb_novel_adder16` applies three sets of operands:

* corner cases;
* every arrangement of kill / generate / propagate / random patterns across
  the four groups, each with `cin` = 0 and 1;
* 200,000 random operand pairs.

Every result is compared with the integer `a + b + cin`. The testbench also
checks that each mechanism was actually exercised:

* in each upper group, the carry-in-0 path, the BEC path, and a BEC increment
  that produces the group carry;
* `cin` set;
* `cout` set;
* a carry that travels from `cin` to `cout`.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/novel_adder_pkg.sv \
    tb/tb_novel_adder16.sv --top-module tb_novel_adder16 -Mdir obj_tb
./obj_tb/Vtb_novel_adder16
```

Use the same command with another testbench name for the other blocks. The
full top-level test finishes in well under a second.
