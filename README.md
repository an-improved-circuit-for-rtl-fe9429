# Signed radix-4 modified Booth multiplier

This is a signed W x W multiplier (W = 32 by default) built around the radix-4
modified Booth recoding. It follows the circuit published as "An Improved Circuit
for Signed Number Modified Booth Multiplier". That design keeps the hardware per
partial product small:

* each partial product row comes from a short chain of gates: a shift-left
  register, an XOR array and two NAND arrays, steered by three tiny selectors;
* the rows are summed by a plain linear chain of carry-lookahead adders, one per
  row, with no Wallace or Dadda tree. Each stage retires two final product bits,
  and the "+1" of every negated row rides in as that stage's carry-in.

The RTL gives that structure at gate-like granularity, with parameters, a small
sequencer and self-checking testbenches. The original work is a transistor-level
design (0.18 um, 1.8 V, 250 MHz). Its power and delay figures, its pulsed
dual-edge flip-flops and its transmission-gate XOR cells have no counterpart here.

## Booth recoding

Append a 0 below the multiplier's LSB (b[-1] = 0). Then cut the multiplier into
W/2 overlapping three-bit windows, one per bit pair:

    window i:  XA = b[2i+1]   XB = b[2i]   XC = b[2i-1]

| {XA,XB,XC} | operation        | digit | row produced by the generator | carry-in (XA) |
|------------|------------------|-------|-------------------------------|---------------|
| 000        | add zero         |  0    | 0                             | 0             |
| 001, 010   | add M            | +1    | M                             | 0             |
| 011        | add 2M           | +2    | 2M                            | 0             |
| 100        | subtract 2M      | -2    | ~2M                           | 1             |
| 101, 110   | subtract M       | -1    | ~M                            | 1             |
| 111        | subtract zero    |  0    | all ones (= ~0)               | 1             |

The product is the sum over i of (row_i + XA_i) * 4^i. Each row is W+1 bits
wide, which is enough for 2M at any W-bit multiplicand M. XA acts in two places.
It inverts the row, and it is added at the row's LSB, which completes the two's
complement. Code 111 therefore yields all ones plus one, which is zero.

## Partial product generator (`ppg`)

```
 mc --> [shift-left register, W+1] --XOR XA--> NAND(add_zero_n) --> NAND(sub_zero_n) --> pp
               ^ shift                                  (first array)          (second array)
               | (registered)
   sel -> [shift register selector: NAND-NAND + D flip-flop]
   sel -> [add-zero selector: NAND(~XA,~XB,~XC)]     0 only for code 000
   sel -> [subtract-zero selector: NAND(XA,XB,XC)]   0 only for code 111
```

* `mc_shift_reg` loads the multiplicand sign-extended to W+1 bits. It shifts it
  left once (doubling it) when the registered decision of `shift_reg_sel` is 1,
  which is for codes 011 and 100 only.
* With both selectors at 1, the two NAND arrays pass the XOR output unchanged.
  If add_zero_n = 0, the first array gives all ones and the second array turns
  them into zeros. If sub_zero_n = 0, the second array gives all ones.
* The shift decision goes through a flip-flop, so the doubling is a clocked
  event. This is why a multiplication takes several clock cycles (see Timing).

## The adder chain

The running sum after row i has bits 2i+2 and up still open, while everything
below is final. Stage i (`pp_adder`, i = 1 .. W/2-1) works as follows:

```
  a   = running_sum[W+1:2], extended by one copy of its sign bit   (W+1 bits)
  b   = row_i                                                       (W+1 bits)
  cin = XA_i
  running_sum' = a + b + cin                                        (W+2 bits)
  product bits [2i+1:2i] = running_sum'[1:0]     (except the last stage)
```

The last stage supplies product bits [2W-1 : W-2]. Bits [1:0] come from the
first running sum. That sum is row 0 plus XA0, formed by `xa0_adder`, a half-adder
incrementer. Row 0 has no adder of its own, so that block adds its +1.

### Why each stage outputs W+2 bits

In the original description the stage adders are W+1 bits wide ("17-bit
adders" for W = 16). The MSB of each sum is copied into the sign-extension bits
of the next stage. That fails when the multiplicand is -2^(W-1). The running
sum can then reach +2^(W+2i): for example, -2^(W-1) times a multiplier prefix of
-2^(2i+1). That value does not fit in W+1 signed bits. With W = 16,
-32768 x 2 comes out as 0xfffd0000 instead of 0xffff0000. Here the stage returns
a true sign bit, sum[W+1] = a[W] xor b[W] xor carry-out, which costs two XOR
gates per stage. The next stage sign-extends from that bit.

### Carry-lookahead adder (`cla_adder`, `cla_group3`)

Each bit forms G = A.B and P = A + B. The bits are taken in groups of three, and
within a group all three carries are two-level sums of products of the group
carry-in:

    c1 = G0 + P0.c0
    c2 = G1 + P1.G0 + P1.P0.c0
    c3 = G2 + P2.G1 + P2.P1.G0 + P2.P1.P0.c0

c3 is the next group's carry-in. A 33-bit stage is 11 groups. A sum bit is
(A xor B) xor C. Do not write it as P xor C with the OR-form P: that is wrong
when A = B = 1. The OR-form P is used only in the carries.

## Interface and timing (`booth_multiplier`)

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| clk       | in  | 1     | clock, rising edge |
| rst_n     | in  | 1     | asynchronous active-low reset |
| start     | in  | 1     | take `mc` and `mp` (ignored while `busy`) |
| mc        | in  | W     | signed multiplicand |
| mp        | in  | W     | signed multiplier |
| busy      | out | 1     | operation in progress |
| done      | out | 1     | one-cycle pulse: `product` has just been updated |
| product   | out | 2W    | signed product, held until the next result |

`booth_seq` steps each operation through four clock edges:

```
edge 1  start accepted: multiplier register and all shift-left registers load
edge 2  shift-selector flip-flops sample the Booth windows
edge 3  rows with digit +/-2 double their multiplicand
edge 4  adder chain has settled; product register loads; done = 1 next cycle
```

`mc` and `mp` need to be valid only on the start cycle. A new `start` is accepted
in the cycle in which `done` is 1, so back-to-back operations take four cycles
each. The whole row-generation and adder chain is combinational between edges 3
and 4. That path is the design's critical path, and it grows linearly with W/2
stages.

## Parameters

`W` (default 32) is the operand width. It must be even and at least 4, which is
checked at elaboration. The chain has W/2 generators and W/2-1 adder stages. At
W = 32 that is 16 rows of 33 bits and 15 stages of 33-bit adders. Yosys counts
643 flip-flop bits at W = 32, mostly the 16 x 33-bit multiplicand registers:
every generator keeps its own copy, as in the original circuit.

## Where this RTL departs from the original description

* **Stage sign bit**: W+2 bit stage results instead of copying the MSB
  (explained above).
* **Sum formula**: the published sum S = P xor C with P = A + B is replaced
  by (A xor B) xor C. The carries keep the OR-form propagate.
* **XA0**: the original adds XA0 with a small low-order adder merged into
  the first stage. Here the first row is incremented by a separate half-adder
  chain (`xa0_adder`), which gives the same sum with a longer carry path.
* **Sequencing**: the original shows only an enable and a clock per generator.
  The four-step sequence, `busy`/`done` and the reset are choices made for this
  RTL.
* **Flip-flops**: the original uses explicit-pulsed dual-edge flip-flops
  driven by a shared pulse generator. Here all registers are ordinary
  rising-edge flip-flops.
* **Product register width**: 2W bits (the 16-bit drawing labels it 31 bits,
  which reads as its top bit index).
* Transistor-level parts (transmission-gate XNOR, pulsed latch cell) and the
  power/delay results are not modelled.

## Files

| file | content |
|------|---------|
| `rtl/booth_pkg.sv` | `booth_sel_t` window type, sequencer states, `DEFAULT_W`, digit helper |
| `rtl/booth_multiplier.sv` | top: recoding windows, generators, adder chain, registers |
| `rtl/booth_seq.sv` | four-step sequencer |
| `rtl/ppg.sv` | partial product generator |
| `rtl/mc_shift_reg.sv` | multiplicand shift-left register |
| `rtl/shift_reg_sel.sv` | registered x2 decision |
| `rtl/add_zero_sel.sv`, `rtl/sub_zero_sel.sv` | zero selectors |
| `rtl/xa0_adder.sv` | first-row incrementer |
| `rtl/pp_adder.sv` | adder stage with true sign bit |
| `rtl/cla_adder.sv`, `rtl/cla_group3.sv` | 3-bit-group carry-lookahead adder |
| `rtl/load_reg.sv` | multiplier and product registers |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/booth_mul_exerciser.sv` | stimulus and checking shared by the end-to-end tests |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs.

* `tb_booth_multiplier`: W = 8, all 65 536 operand pairs. W = 16: extreme
  values, the multiplicand -2^15 against every most-negative Booth prefix, and
  20 000 random pairs. Besides the product, it checks the four-cycle latency,
  `busy`, and that a start is ignored while busy and taken in the done cycle.
  It also counts how often every Booth code, the doubling, the XA0 carry out of
  the two LSBs and a running sum needing the extra sign bit occurred, and fails
  if any never did. A separate W = 8 instance runs the worked example
  78 x (-38) and checks the internal rows (row + XA = -156, -78, +156, -78,
  that is -2M, -M, +2M, -M) and the running sums after each stage (-156, -468,
  2028, -2964).
* `tb_booth_multiplier_full`: the same checks at the default W = 32 with
  1 000 000 random pairs, the top left at its default parameters (about
  10 s of simulation).
* Unit testbenches: the selectors exhaustively, the CLA against integer
  addition (exhaustive at 7 bits, random at 33), the stage adder and the
  incrementer including the overflow corner cases, the generator for every code
  and the register timing of the doubling, the sequencer cycle by cycle.

To run one with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/booth_pkg.sv tb/tb_booth_multiplier.sv --top-module tb_booth_multiplier
./obj_dir/Vtb_booth_multiplier
```

Replace the testbench name to run any other. Each end-to-end run takes about a
second.
