# Pipelined 32-bit multiplier: radix-4 Booth recoding and a 4:2-compressor Wallace tree

This is a multiplication unit for a 32-bit RISC-V style pipeline. It multiplies two
signed 32-bit operands into their full 64-bit product. It accepts a new operation every
clock cycle and returns each result exactly six cycles later. The unit uses three
standard techniques:

1. **Radix-4 Booth recoding.** This cuts the number of partial products from 32 to 16.
2. **A Wallace tree.** Each level sums blocks of four partial products with a row of
   **exact 4:2 compressors**, halving the operand count: 16 → 8 → 4 → 2.
3. **One carry-propagate adder** at the end, for the last two operands.

A register follows every step. The unit is therefore a six-rank pipeline. A sequential
shift-and-add multiplier needs at least 32 cycles per product and cannot overlap them.
This unit finishes x back-to-back multiplications in x + 5 cycles.

## Pipeline at a glance

```
            rank 1        rank 2            rank 3        rank 4       rank 5       rank 6
 a,b ──► [operand reg] ─► Booth ─► [16 PP] ─► level 1 ─► [8] ─► level 2 ─► [4] ─► level 3 ─► [2] ─► adder ─► [product]
valid ─► [ v ] ────────────────► [ v ] ─────────────► [ v ] ──────────► [ v ] ──────────► [ v ] ───────► [ v ] ─► valid_o
```

| rank | module | what is registered |
|------|--------|--------------------|
| 1 | `mul32_top` | the two operands |
| 2 | `booth_radix4` | 16 partial products of 64 bits each |
| 3 | `wallace_tree`, level 1 (4 `wallace_block`s) | 8 operands |
| 4 | `wallace_tree`, level 2 (2 blocks) | 4 operands |
| 5 | `wallace_tree`, level 3 (1 block) | 2 operands |
| 6 | `final_adder` | the 64-bit product |

## Interface and timing (`mul32_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous, active high; clears every valid bit |
| `valid_i` | in | 1 | an operation is presented this cycle |
| `multiplicand_i`, `multiplier_i` | in | 32 | signed operands |
| `valid_o` | out | 1 | `product_o` holds a result this cycle |
| `product_o` | out | 64 | signed product |

- Set up the operands and `valid_i` before a rising edge. That edge samples them.
  The product appears on `product_o`, with `valid_o` high, right after the sixth rising
  edge counted from the sampling edge.
- Operations can follow each other on every cycle, so up to six can be in flight at once.
  Results come out in issue order, one per cycle.
- There is no stall and no back-pressure. Whatever consumes the results must take each
  one in the cycle that `valid_o` is high.
- Reset clears only the valid bits. Any operation in flight is dropped. The data
  registers are not reset, because nothing reads them while their valid bit is low.
- The unit always computes signed × signed. It does not select a half of the product or
  handle unsigned operands (RISC-V `MUL`, `MULH`, `MULHSU`, `MULHU`); the surrounding
  logic must do that. The unsigned forms need a 17th partial product (or a correction
  term), which this 16-partial-product array does not have. No instruction tag travels
  with the operation. An out-of-order core would pipe its tag alongside `valid`, six
  ranks deep.

## Booth recoding (`booth_radix4`)

A zero is appended below bit 0 of the multiplier `b`. The multiplier is then read as 16
overlapping three-bit groups `{b[2i+1], b[2i], b[2i-1]}`. Each group is a signed digit
`d_i = -2·b[2i+1] + b[2i] + b[2i-1]`:

| group | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|-------|-----|-----|-----|-----|-----|-----|-----|-----|
| digit | 0 | +1 | +1 | +2 | −2 | −1 | −1 | 0 |

Partial product `i` is `d_i · a · 4^i`. It is a complete 64-bit two's-complement number:
the multiplicand is sign-extended to 64 bits, doubled by a shift when needed, negated in
full when needed, and then shifted left by `2i`. The sum of the 16 partial products,
modulo 2^64, is the signed product.

This design chooses simplicity over area here. It uses no sign-extension compression and
no separate "negate" bit fed into the tree. As a result, each partial product's low `2i`
bits are constant zeros, which synthesis removes. The digit is encoded as three select
lines `{neg, two, one}` (`mul_pkg::booth_sel_t`, `mul_pkg::booth_encode`).

## The 4:2 compressor (`compressor42`)

The compressor takes five bits of equal weight and returns one bit of the same weight and
two bits of double weight:

```
a + b + c + d + cin = s + 2·(carry + cout)

cout  = (a^b) ? c   : a        -- majority(a,b,c): first full adder
s     = a ^ b ^ c ^ d ^ cin
carry = (a^b^c^d) ? cin : d    -- second full adder on (a^b^c, d, cin)
```

It is made of two full adders in a chain. `cout` depends only on `a`, `b` and `c`. This
matters for the next section.

## How a tree block adds four operands (`wallace_block`)

This is the least familiar part of the design. Each block takes four 64-bit operands,
`op[0]` (the top row) to `op[3]`, and uses one compressor per bit column j:

- `a, b, c` take bit j of the bottom three rows, `op[1]`, `op[2]` and `op[3]`.
- `d` takes `cout` from column j−1, and `cin` takes `carry` from column j−1. In column 0
  both are zero.
- The `s` bits form the first output operand. The top row `op[0]` is not compressed at
  all; it goes to the next level unchanged as the second output operand.
- The carries out of column 63 are dropped, which is correct modulo 2^64.

So `sum_o + pass_o == op[0] + op[1] + op[2] + op[3] (mod 2^64)`.

In effect, each block is a 3-input adder built from compressors, plus a fourth operand
that waits one level. Note one consequence for timing: `carry` depends on `cin`, so
within a block the `carry` → `cin` path ripples across all 64 columns. This is unlike a
textbook carry-save 4:2 row, where only `cout` moves sideways. This chaining of the compressors
is the defining feature of this design and is kept as it is; a faster variant would need
a different reduction scheme.

In a textbook Wallace tree, a column holding fewer than three significant bits is simply
copied to the next level. Here every operand is a full 64-bit number, so every column
has four bits and gets a compressor. Where the extra bits are zero, the result is the
same.

## The tree and the final adder (`wallace_tree`, `final_adder`)

`wallace_tree` has three compressor levels built with generate loops. Each level has
`NOP >> l` inputs and `(NOP >> l) / 4` blocks, and ends in a register. The two operands
that remain count as the tree's fourth level. Since a block of four is no longer
possible there, `final_adder` adds them with a plain 64-bit `+`, which synthesis maps
to a fast adder. `NOP` must be a power of two of at least 4, and elaboration stops with
an error otherwise.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `mul32_top` | `XLEN` | 32 (`mul_pkg::XLEN`) | operand width; product is `2*XLEN`, partial products `XLEN/2` |
| `booth_radix4` | `XLEN` | 32 | |
| `wallace_tree` | `NOP`, `W` | 16, 64 | |
| `wallace_block`, `final_adder` | `W` | 64 | |

The latency of `mul32_top` is `3 + log2(XLEN/2) − 1` rising edges, which is 6 for
XLEN = 32. Only XLEN = 32 is verified. Other powers of two that give at least four
partial products should elaborate, but they change the latency.

## Where this design makes its own choices

- Six register ranks, with an operand register in front of the Booth stage. This gives
  the six-cycle latency. With six ranks, six operations can be in flight, and x
  operations finish x + 5 cycles after the first is sampled. A five-rank variant would
  drop the operand register.
- The valid-bit handshake, the reset behaviour, and the lack of a stall.
- Full-width partial products and a plain `+` for the final adder.
- Signed operands only, and no selection of RISC-V instruction variants (see above).

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `compressor42_tb` | all 32 input combinations: the sum identity, and `cout` = majority(a,b,c) |
| `booth_radix4_tb` | every partial product against `d_i·a·4^i`, and their sum against the signed product; corner operands plus 2000 random pairs; all eight groups occur |
| `wallace_block_tb` | `sum_o + pass_o` against the sum of the four operands, and `pass_o` against `op[0]`; 5000 random sets |
| `wallace_tree_tb` | latency of exactly 3, result sums, bubbles, reset flush; 3000 cycles |
| `final_adder_tb` | carries across the word and across bit 32, and random operands |
| `mul32_top_tb` | the whole unit at default size: 64 corner-case pairs issued back to back (completion within x + 5 cycles), 10,000 random multiplications in bursts with bubbles, a reset with operations in flight. Every cycle it checks `valid_o` and `product_o` against a six-rank reference delay line. It counts full-pipeline cycles, bubbles, flushes, every Booth group, negative × negative and the most negative operand, and fails if any never occurs. |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/mul_pkg.sv tb/mul32_top_tb.sv \
          --top-module mul32_top_tb -Mdir obj_mul
./obj_mul/Vmul32_top_tb
```

Replace `mul32_top_tb` with any other testbench name. Each run takes well under a second.
