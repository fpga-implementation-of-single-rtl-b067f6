# Single-cycle signed/unsigned 32 x 32 multiplier with radix-4 Booth recoding

This is a combinational 32 x 32 → 64 multiplier. A separate flag for each operand says
whether it is signed (two's complement) or unsigned, so one circuit does signed × signed,
signed × unsigned, unsigned × signed and unsigned × unsigned products. Radix-4 Booth
recoding cuts the number of partial products roughly in half: a plain array multiplier
would add 32 rows, and this one adds 17. The rows are summed by a linear array of
carry-save stages, and a single ripple-carry adder finishes the sum. There is no clock: the
product follows the inputs after one propagation delay ("single cycle" means it fits in
one clock period of whatever surrounds it).

The structure follows a published FPGA design of the same name. It targeted a Virtex-7 and
reported 130 I/O pins and about 1300 LUTs. Where this RTL departs from that description or
fills a gap in it, the sections below say so.

## Top level: `booth_mult`

| port           | dir | width | meaning                                   |
|----------------|-----|-------|-------------------------------------------|
| `mplier`       | in  | N     | multiplier (the operand that is recoded)  |
| `mplier_s_u`   | in  | 1     | 1 = `mplier` is signed, 0 = unsigned      |
| `mplicand`     | in  | N     | multiplicand                              |
| `mplicand_s_u` | in  | 1     | 1 = `mplicand` is signed, 0 = unsigned    |
| `prod`         | out | 2N    | product                                   |

Parameter `N` (an `int unsigned`) defaults to 32. It must be even and at least 4, and an
elaboration-time `$error` enforces this. Read `prod` as signed when either operand is
signed, and as unsigned otherwise. It is exact in all four cases (see "Why 2N bits are
enough").

## Step 1: one extra bit makes every operand a signed number (`bit33_ext`)

The core multiplies two's-complement numbers only. To cover unsigned operands, each N-bit
operand is widened to N+1 bits. The new top bit is a copy of bit N−1 when the operand is
signed, and 0 when it is unsigned. Either way, the (N+1)-bit result is the operand's true
value in two's complement. An unsigned 0xFFFFFFFF becomes the positive 33-bit
0_FFFFFFFF, not −1. The widened multiplier is called `a` and the widened multiplicand `b`.
Each is formed by a single 2:1 select per operand.

## Step 2: F blocks and Booth digits (`booth_encoder`, `booth_recoder`)

`a` has N+1 = 33 bits, which is an odd width. To cut it into whole radix-4 groups it is
rewired (no logic) into the N+3-bit string

    {a[N], a[N:0], 0}

That means a 0 is appended below the LSB, and the top bit is repeated once more. Block
F(2i), for i = 0 … N/2, is bits [2i+2 : 2i] of this string:

    F0  = {a1, a0, 0}
    F2  = {a3, a2, a1}
    ...
    F30 = {a31, a30, a29}
    F32 = {a32, a32, a31}

Each block {x(2i+1), x(2i), x(2i−1)} stands for the digit f = −2·x(2i+1) + x(2i) + x(2i−1),
and a = Σ f(2i)·4^i. The digit is never built as a number. `booth_recoder` turns each block
into three select lines, packed in `booth_pkg::booth_sel_t`:

| block | digit | `neg` (negative) | `one` (non-zero) | `two` (±2) |
|-------|-------|------------------|------------------|------------|
| 000   |  0    | 0                | 0                | 0          |
| 001   | +1    | 0                | 1                | 0          |
| 010   | +1    | 0                | 1                | 0          |
| 011   | +2    | 0                | 1                | 1          |
| 100   | −2    | 1                | 1                | 1          |
| 101   | −1    | 1                | 1                | 0          |
| 110   | −1    | 1                | 1                | 0          |
| 111   |  0    | 0                | 0                | 0          |

The 17th digit, from F32, matters only for unsigned multipliers. When the multiplier is
signed, a32 = a31, so F32 is 000 or 111, and the digit is 0. When it is unsigned, a32 = 0,
and the digit is +1 whenever a31 is set. This is the extra row that makes unsigned operands
work.

## Step 3: partial-product rows (`pp_row_gen`)

There is one row per digit, 17 in all. For each bit of a row:

1. `two` selects b (sign-extended to N+2 bits) or 2b (b shifted left, with 0 entering bit 0).
2. The result is ANDed with `one`, so a zero digit gives a zero row.
3. The result is XORed with `neg`, which takes the one's complement for a negative digit.

The N+2 = 34-bit result is sign-extended to 2N = 64 bits. A row therefore holds d·b for
d ≥ 0, and d·b − 1 for d < 0. The missing +1 is not added inside the row, which would need
a carry chain per row. It is collected instead in one extra operand, **ROW#−1**. Bit 2i of
ROW#−1 is the `neg` flag of row i, and all its other bits are 0. Rows leave `pp_row_gen`
unshifted. The adder applies the 2i alignment.

## Step 4: the adder array (`pp_adder`, `csa_stage`, `final_adder`)

This is the part that decides the speed. It is a linear chain, not a tree:

```
stage 1 : csa_stage( ROW#0 , ROW#-1      , ROW#2  << 2  )  -> S#2 , C#2
stage 2 : csa_stage( S#2   , C#2   << 1  , ROW#4  << 4  )  -> S#4 , C#4
   ...
stage 16: csa_stage( S#30  , C#30  << 1  , ROW#32 << 32 )  -> S#32, C#32
final   : final_adder( S#32 , C#32 )  = S#32 + (C#32 << 1)  -> prod
```

* A `csa_stage` is a row of 2N independent full adders. Column j produces sum bit `s[j]`
  and carry bit `c[j]`, and `c[j]` has weight 2^(j+1). No carry moves sideways inside a
  stage. Instead, each carry goes one column left *and* one stage down. These are the
  "diagonal" carries, and they keep each stage at one full-adder delay.
* Each stage absorbs one new row, so after the row from F32 there is nothing left to absorb
  the carries. `final_adder` then propagates them horizontally with a 2N-bit ripple-carry
  chain. Column 0 adds `s[0]` and a constant 0. Column j adds `s[j]`, `c[j−1]` and the
  ripple carry.
* The worst path is therefore about N/2 full adders down the array plus 2N full adders along
  the ripple chain. Nothing is pipelined.
* Carries out of column 2N−1 are dropped throughout, so all arithmetic is modulo 2^(2N).
* Where an operand bit is a known 0 (the low columns, and ROW#−1 almost everywhere), a half
  adder is enough. The RTL uses a full adder everywhere with the input tied to 0, and
  synthesis removes the unused logic.

`full_adder` is the one-bit cell used by both stage types.

### Why 2N bits are enough

The sum of all rows, with row i weighted 4^i, plus ROW#−1, equals a·b modulo 2^(2N). For
32-bit operands the true product always fits in 64 bits, in the type the flags imply:

* signed × signed: |p| ≤ 2^62;
* unsigned × unsigned: p ≤ (2^32−1)^2 < 2^64;
* mixed: −2^31·(2^32−1) ≤ p < 2^63.

So dropping carries beyond bit 63, and sign-extending each row only up to bit 63, gives the
exact product.

## Departures and open points

* **No registers.** The source design calls itself single cycle and shows no flip-flops.
  The RTL is purely combinational. For a clocked interface, register the inputs and/or
  `prod` outside `booth_mult`.
* **Width is a parameter.** The source fixes 32 bits. The RTL generalises every index to N,
  with N/2+1 rows and N/2 carry-save stages. Only N = 32 (random and corner tests) and
  N = 8 and N = 4 (exhaustive tests) have been simulated.
* **Row count.** In one place the source speaks of 16 rows, elsewhere of 17 rows and of
  blocks F0 … F32. Seventeen rows are required for a 33-bit operand, and 17 are built.
* **Width of the pre-processed multiplier.** The source calls it 34 bits. Its own layout,
  {a[32], a[32:0], 0}, has 35 bits, and the last block {a32, a32, a31} needs all of them.
  The RTL follows the layout.
* **Half adders.** The source uses half adders where an input is absent. The RTL uses full
  adders with a constant 0 input, which is the same function.
* **Recoder gates.** The recoder's select lines are written as Boolean equations that match
  the truth table above, not as a transcription of a particular gate netlist.
* **Implementation results are not reproduced.** The source's LUT count (1305 slice LUTs),
  slice usage and power figures come from a vendor FPGA flow. Generic synthesis of this RTL
  gives about 4500 bit-level gate cells, which is not comparable with 6-input LUTs. The
  pin count does match: 32+1+32+1+64 = 130.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against values
computed independently (integer arithmetic or the truth table), has a watchdog, and ends
with `TB_RESULT checks=<n> failures=<n>`.

| testbench              | what it checks |
|------------------------|----------------|
| `booth_mult_tb`        | default 32-bit top: the four waveform vectors 26·29 = 754, 29·(−26) = −754, (−26)·29 = −754, (−29)·(−26) = 754; corner values in all four sign mixes; 1,000,000 random pairs. Each product is checked one clock period after the inputs change. It counts every sign mix, every digit −2…+2, a non-zero top digit, a negated row 0 (ROW#−1 used) and negative products, and counts a failure if any of them never occurred. |
| `booth_mult_small_tb`  | N = 8 and N = 4 instances, exhaustive over all operands and sign mixes |
| `bit33_ext_tb`         | widened operands equal the operand values |
| `booth_recoder_tb`     | all 8 blocks against the table and the arithmetic digit |
| `booth_encoder_tb`     | each digit against the multiplier bits; Σ digit·4^i equals a |
| `pp_row_gen_tb`        | row = d·b (d ≥ 0) or d·b − 1 (d < 0) for all five digits |
| `csa_stage_tb`         | s = x⊕y⊕z, c = majority, s + 2c = x + y + z |
| `final_adder_tb`       | m = s + 2c, including all-ones carry chains |
| `pp_adder_tb`          | random rows: Σ (row_i + neg_i)·4^i |

Run one with plain Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/booth_pkg.sv \
          tb/booth_mult_tb.sv --top-module booth_mult_tb
./obj_dir/Vbooth_mult_tb
```

Replace `booth_mult_tb` with any other testbench name. The top-level test takes a few
seconds.

## Files

| file                  | content |
|-----------------------|---------|
| `rtl/booth_pkg.sv`    | `booth_sel_t` select-line struct, `num_groups(N)` = N/2+1 |
| `rtl/booth_mult.sv`   | top level |
| `rtl/bit33_ext.sv`    | operand widening by one bit (signed/unsigned) |
| `rtl/booth_encoder.sv`| F-block rewiring and the bank of recoders |
| `rtl/booth_recoder.sv`| one recoding cell |
| `rtl/pp_row_gen.sv`   | one partial-product row |
| `rtl/pp_adder.sv`     | ROW#−1, the carry-save chain and the final adder |
| `rtl/csa_stage.sv`    | one carry-save stage (row of full adders) |
| `rtl/final_adder.sv`  | ripple-carry final stage |
| `rtl/full_adder.sv`   | one-bit full adder |
