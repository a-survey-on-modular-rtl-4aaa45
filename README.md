# Vedic 16x16 multiplier and multiply-accumulate unit

This is a combinational 16x16-bit unsigned multiplier built by the "vertically
and crosswise" method of Vedic arithmetic (the Urdhva Tiryakbhyam sutra),
together with a multiply-accumulate (MAC) unit that uses it. An N-bit
multiplication is split into four N/2-bit multiplications. Each of those is
split again, down to 2x2-bit multipliers made of plain gates. At every level
three adders put the four partial products back together. All partial products
are formed at the same time and then summed. No clock is involved, so the
multiplier's delay does not depend on the clock rate of whatever uses it.

The hierarchy is:

```
vedic_mac                 16-bit a, b -> 32-bit product, 40-bit accumulator
 ├─ vedic_mul16x16        four 8x8 blocks + three adders
 │   └─ vedic_mul8x8      four 4x4 blocks + three adders
 │       └─ vedic_mul4x4  four 2x2 blocks + three adders
 │           └─ vedic_mul2x2   4 AND gates, 2 half adders
 └─ rca_adder             accumulator adder (also every adder in the tree)
```

## The 2x2 leaf: vertical and crosswise

For a = a1a0 and b = b1b0, the product is formed column by column:

| product bit | step       | logic                                   |
|-------------|------------|-----------------------------------------|
| q0          | vertical   | a0·b0                                   |
| q1          | crosswise  | a1·b0 ⊕ a0·b1, carry c1 = a1·b0 · a0·b1 |
| q2          | vertical   | a1·b1 ⊕ c1                              |
| q3          | carry      | a1·b1 · c1                              |

The same rule generalises to wider operands: each column sums the crosswise
bit products plus the carry from the column below. A column sum can be more
than one bit wide, so the carry can be multi-bit. Carries then ripple upward.
This design applies the rule directly only at the 2x2 level. Wider sizes are
built by the divide-into-quarters composition below.

## Combining four quarter products (the part to read carefully)

Every multiplier above 2x2 (`vedic_mul4x4`, `vedic_mul8x8`, `vedic_mul16x16`)
has the same structure. Let the operands be split into halves of H bits,
a = aH:aL and b = bH:bL. The four sub-blocks give:

```
q0 = aL*bL    q1 = aH*bL    q2 = aL*bH    q3 = aH*bH      (each 2H bits)
```

The full product is q3·2^(2H) + (q1 + q2)·2^H + q0. Three adders compute it
without any adder wider than 3H bits:

```
s1 = {q3, H zeros} + {H zeros, q2}          3H bits   = q3·2^H + q2
s2 = q1 + {H zeros, q0[2H-1:H]}             2H bits   = q1 + (q0 >> H)
Q[4H-1:H] = s1 + {H zeros, s2}              3H bits
Q[H-1:0]  = q0[H-1:0]                       no adder
```

The low H bits of q0 are already final, because nothing else reaches those
weights, so they bypass the adders. The upper half of q0 is folded into q1's
adder, which leaves the last adder only two operands. For 16x16 (H = 8) this
gives adders of 24, 16 and 24 bits. None of them can overflow:
s1 ≤ 65025·257 < 2^24 and s2 ≤ 65025 + 255 < 2^16. The sub-block order,
operand halves, zero padding and output split follow the published block
diagram of the 16x16 multiplier. The 4x4 and 8x8 blocks use the same
arrangement at their own width; that scaling is this design's choice.

Every adder is an `rca_adder`: a ripple-carry chain of full adders with no
carry-out. Ripple-carry is chosen because the method's carries are described as
propagating that way. The adder type is not otherwise specified.

## The MAC unit

`vedic_mac` puts the 16x16 multiplier in front of a 40-bit ripple-carry adder
and an accumulator register. Control is by two inputs, sampled on the rising
clock edge:

| clr | en | next acc        | use                                  |
|-----|----|-----------------|--------------------------------------|
| 0   | 1  | acc + a·b       | accumulate                           |
| 0   | 0  | acc             | hold                                 |
| 1   | 1  | a·b             | start a new sum with this product    |
| 1   | 0  | 0               | clear                                |

`rst_n` is an asynchronous, active-low reset that clears the accumulator.
`product` is the combinational a·b, valid in the same cycle as the operands.
`acc` shows an operation's result one clock after the operation is presented.
One multiply-accumulate completes per clock. The accumulator wraps modulo
2^ACC_W. With the default ACC_W = 40, at least 256 full-scale products
(0xFFFF·0xFFFF) fit before it wraps. There is no overflow flag.

The MAC's role (multiplier feeding an accumulator) is as described for this
design. The control encoding, the synchronous clear, the 40-bit width and the
reset are this implementation's own choices.

## Parameters

| module           | parameter | default | notes                                  |
|------------------|-----------|---------|----------------------------------------|
| `vedic_mac`      | `ACC_W`   | 40      | accumulator width, must be ≥ 32        |
| `rca_adder`      | `W`       | 8       | set by every instance                  |

The multiplier widths (2, 4, 8, 16) are fixed by the module, one module per
size, as in the hierarchy above. Operands are unsigned.

## What is not here

- The arithmetic unit (ALU) that should sit on top of the multiplier and
  the MAC. Only its existence is known, not its operations or interface. The MAC's
  `product` and `acc` outputs are where it would connect.
- Signed operands and pipelining. Neither is part of the design.
- The Montgomery modular multiplier, which this design is meant to be
  compared against, is not included.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench            | what it does                                                  |
|----------------------|---------------------------------------------------------------|
| `tb_vedic_mul2x2`    | all 16 operand pairs                                          |
| `tb_vedic_mul4x4`    | all 256 operand pairs                                         |
| `tb_vedic_mul8x8`    | all 65,536 operand pairs                                      |
| `tb_vedic_mul16x16`  | corner values, all 256 single-bit pairs, 20,000 random pairs  |
| `tb_vedic_mac`       | end to end at default parameters, described below             |

`tb_vedic_mac` compares against an integer reference model every cycle. It
runs directed operations, 20 sixteen-term dot products, 3,000 cycles with random
control, 300 full-scale products in a row that drive the accumulator past
2^40 (wrap), and an asynchronous reset in mid-sum. It counts how often each
mechanism happens (accumulate, hold, clear, clear-and-load, wrap, reset) and
fails if any count is zero. It also checks that `acc` stays unchanged until the
clock edge and is updated right after it, which is the one-cycle latency.

Each testbench was also run against a deliberately broken copy of its module
and caught the fault. Examples: OR instead of XOR in the 2x2 crosswise bit, a
wrong slice of q0 in an adder, a clear that does not clear.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl tb/tb_vedic_mac.sv --top-module tb_vedic_mac
./obj_dir/Vtb_vedic_mac
```

Replace the testbench name to run another. `verilator --lint-only -Wall -Irtl
rtl/vedic_mac.sv` lints the whole design. All code is synthesizable
SystemVerilog-2017. The testbenches use only two-state values and `$urandom`.
