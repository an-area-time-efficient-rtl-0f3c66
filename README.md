# A small motion-estimation core with one adder, and a four-core unit for ME and MAC

Block-matching motion estimation needs, for every candidate position, the sum
of absolute differences (SAD) between a 16x16 block of the current frame and a
16x16 block of the reference frame. That is 256 `|x - y|` terms per candidate,
hundreds of candidates per block, so the cost is dominated by a subtract, an
absolute value and an accumulate repeated over and over.

A direct implementation uses two adders per pixel: one for `x - y` and one (or
a second, parallel subtractor plus a selector) for the absolute value. Then a
third adder accumulates. This design needs only **one carry-propagate adder**
per core. Everything after it is carry-save or bit-serial:

* The only carry-propagate adder (`ADD`) is bit-skewed and fully pipelined. Its
  clock period is one full-adder delay.
* The absolute value is never formed. If `x - y` is negative, the accumulator
  is handed the bit-inverted difference. The missing `+1` of the two's
  complement goes into the one free bit that a carry-save adder always has:
  the least significant bit of its left-shifted carry vector.
* The accumulator is a carry-save adder with no carry propagation. After 256
  pixels its sum/carry pair is turned into binary by a single full adder over
  16 clocks. A second single full adder compares the result with the best one
  so far.

Four such cores form a larger unit. The unit either runs four block matches at
once, or it gangs the cores into one 16x16 (or 24x24) multiply-accumulate unit with 64-bit
accumulation, for DCT, quantisation and filtering. The MAC unit forms each
product by radix-4 Booth shift-and-add.

## 1. One core (`me_core`)

```
 x_i ------------------------------> X reg --\
 y_i --> 1's comp (op != ADD) -----> Y reg ---> ADD (8 bit, pipelined) --+--> add_sum/add_ovr  (DFD port)
                                       cin = (op != ADD) ---^            |
                                                                         v
                              OVR = carry out of ADD ------> 1's comp (enabled when SAD and OVR = 0)
                                         |                               |
                                         +-- not OVR --> LSB carry -->  CS ACC (16 bit sum/carry)
                                                                         |  every 256 pixels
                                                      CSACC2 (as latch) + CS/binary converter (1 FA, 16 clocks)
                                                                         |  serial, LSB first
                                                                        MMD (1 FA, running minimum + tag)
```

Operations (`core_op_e`):

| op       | ADD computes           | result used for                           |
|----------|------------------------|-------------------------------------------|
| `OP_ADD` | `x + y`, carry in 0    | motion compensation, `add_sum`/`add_ovr`  |
| `OP_SUB` | `x + ~y + 1 = x - y`   | displaced frame difference                |
| `OP_SAD` | `x - y`, then |·| is accumulated | block matching                    |

**Why the absolute value comes for free.** With 8-bit pixels, `x + ~y + 1`
has a carry out `OVR = 1` exactly when `x >= y`. In that case the low 8 bits
are `x - y` and go to the accumulator unchanged. When `OVR = 0` the low 8 bits
are `d = 256 + (x - y)`. Then `~d = 255 - d = (y - x) - 1`, so
`|x - y| = ~d + 1`. The second complementer does the inversion. `not OVR` is
fed into bit 0 of the accumulator's new carry vector. That bit is always empty,
because the carries of a carry-save row are shifted left by one place. No extra
adder or selector is needed.

**Block framing.** Pixels with `op_i = OP_SAD` are counted. Pixel 0 of a block
clears the accumulator, so that pixel becomes the first term. After pixel 255
the sum/carry pair is passed unchanged through CSACC2, which acts as a latch
here, into the converter, and the accumulator goes straight on with the next
candidate. Conversion takes 16 clocks and the next
block takes 256, so one converter and one minimum detector keep up. Each block
error then flows into the minimum detector as a serial stream, LSB first.
Candidates are numbered from 0 after `search_init`. The number of the best
block comes out as `best_tag`: this is the motion vector index.

**Timing.** The input registers add 1 clock and the adder 8. `add_sum` appears
9 clocks after a pixel is applied. The block error `sad` (with `sad_vld`)
comes 19 clocks after the block's last ADD result: 1 clock to accumulate,
1 through CSACC2, 1 to load the converter and 16 to convert. `sad_tag` gives
the candidate number of that block. `min_sad`/`best_tag` are updated in the
same clock, marked by `mmd_done` and `new_min`. When pixels stream continuously,
one block error comes out every 256 clocks.

## 2. The bit-skewed pipelined adder (`pipe_adder`)

This is the piece that sets the clock rate, and it is the least obvious one.
The adder is a ripple-carry adder with a register after every full adder.
Bit *k* is added *k* clocks after bit 0, using the carry that bit *k-1* left in
a register. To make this work with whole words:

* operand bit *k* is delayed by *k* registers before its full adder;
* sum bit *k* is delayed by `WIDTH-1-k` registers plus one output register;
* the carry out (OVR) is registered once after the top full adder.

All bits of a result therefore leave the adder `WIDTH` clocks after the
operands went in, and a new operand pair can enter every clock. For 5-bit
operands (6-bit result) the registers form this diagonal:

```
 a0b0  a1b1  a2b2  a3b3  a4b4          (o = register)
  |     o     o     o     o
 FA0 -o FA1   o     o     o
  o     |  -o FA2   o     o
  o     o     |  -o FA3   o
  o     o     o     |  -o FA4 --+ carry
 [      output register, 6 bits   ]
```

`DIGIT` sets how many bits share one pipeline stage. With `DIGIT = m` each
stage is an m-bit ripple adder. This gives fewer registers at a longer clock
period, so the stage can be matched to what a process can clock safely. The
latency is `WIDTH/DIGIT`. The default is `DIGIT = 1`.

Two skewed adders can be chained into a wider one by feeding one's carry out
to the other's carry in. The upper adder's operands must then arrive `WIDTH`
clocks later, and the lower adder's sum must wait `WIDTH` clocks. The
four-core unit does exactly this in MAC mode.

## 3. Carry-save accumulation and bit-serial resolution

* `csacc` holds a running total as two vectors. Each clock one row of full
  adders merges them with the addend. The new carry vector is shifted left,
  and its bit 0 takes `cin`. `clr` makes the current addend the first term.
  `shift2` multiplies the stored total by 4 before adding (used by the
  multiplier). All arithmetic is modulo 2^WIDTH.
* `csacc2` does the same for an addend that is itself a sum/carry pair (two
  full-adder rows). With `clr` held it just re-codes its input pair, which is
  how it serves as the latch in front of the converter.
* `cs_binary_conv` latches a pair (`load`) and, on `start`, produces one
  result bit per clock, LSB first, with one full adder and a carry flip-flop.
  It has a `cin`/`cout` so that 16-bit slices can be chained: all slices load
  at once, and each one starts when the slice below is done and takes over
  its final carry.
* `csacc` and `csacc2` are 16-bit slices with cascade ports. `csacc` passes
  the two bits that a x4 shift moves out of each vector, plus its top carry,
  to the slice above. `csacc2` passes its two row carries. Four slices of
  each therefore act as one 64-bit accumulator.
* `mmd` keeps the current minimum in a register that rotates past one full
  adder in step with the incoming serial error. The full adder works out the
  borrow of `new - min`. If the final borrow is set, the new error (collected
  in a shift register meanwhile) replaces the minimum. The first error after
  `init` is always taken. On a tie the earlier candidate is kept.

## 4. The four-core unit (`me_vsp`, top)

Four 16-bit words enter per clock. Words 0 and 2 carry current-frame pixels
(X) and words 1 and 3 reference pixels (Y), two pixels per word:

| core | X            | Y            | role in MAC mode            |
|------|--------------|--------------|-----------------------------|
| 0    | word0[7:0]   | word1[7:0]   | low byte of A = w0 +/- w1   |
| 1    | word0[15:8]  | word1[15:8]  | high byte of A (carry from core 0) |
| 2    | word2[7:0]   | word3[7:0]   | low byte of B = w2 +/- w3   |
| 3    | word2[15:8]  | word3[15:8]  | high byte of B (carry from core 2) |

**`MODE_ME`.** The four cores work independently on their byte lanes. Each
runs its own block match with its own converter and minimum detector. All
four take the same `op_i`, and `dfd_*` shows their x+y / x-y results.

**`MODE_MAC`.** One multiply-accumulate runs at a time:

1. *Pre-add.* Cores 0+1 and cores 2+3 become two 16-bit skewed adders through
   their carry inputs. They form `A = w0 + w1` and `B = w2 + w3`, or the
   differences when `mac_sub` is set. The sums wrap to 16 bits. Data must be
   scaled so they do not overflow (see section 5). A and B are ready
   `1 + 2 x 8/DIGIT` clocks after the words enter: 17 with one bit per adder
   stage.
2. *Multiply* (`booth_ctrl` and the cores' accumulators). B is recoded into
   radix-4 Booth digits in {-2, -1, 0, +1, +2}, one digit per clock, most
   significant first. The digit selects 0, A or 2A (2A comes from a shifter).
   A negative digit inverts the multiple and puts `+1` into the accumulator's
   free carry bit. That is the same trick as for `|x - y|`. The four cores'
   16-bit CSACC1 slices are cascaded into one 64-bit carry-save accumulator
   (core 0 holds bits 15:0, core 3 bits 63:48). It adds the multiple to 4x
   its previous contents. A 16x16 product takes 8 clocks.
3. *Accumulate.* In the clock after the last digit, CSACC1's two vectors are
   added into the cores' cascaded CSACC2 slices, which hold the sum of
   products. CSACC1 already starts the next product in that same clock.
4. *Convert.* After the product marked `mac_last`, all four cores'
   converters load their CSACC2 slice. Core 0's converter runs first, and
   each following one starts with the carry that the one below leaves.
   `mac_result` (64 bits) is valid with `mac_result_vld`, which comes
   1 + 4 x 17 = 69 clocks after `mac_prod_done` of that product.

Handshake rules (checked by assertions): operand sets enter at most once per
8 clocks (12 for a 24x24 product, below), and a sum may not close again before the previous sum's conversion
has finished. Change `mode` only while the unit is idle.

**24x24 products.** With `mac_wide` set, an operand set is one 24x24
product: `a = {word1[7:0], word0}` and `b = {word3[7:0], word2}`, both two's
complement. The 16-bit pre-adders cannot form 24-bit operands, so these go
past them to the multiplier, delayed by the same number of clocks. A 24x24
product takes 12 digits, so such operand sets may enter once every 12 clocks.

A mode input on each core switches its CSACC1, CSACC2 and converter between
its own block match and its slice of the MAC datapath.

## 5. DCT on the MAC unit

The 1-D DCT of an 8-sample row is `y(l) = sum_m x(m) c(m,l)`. By symmetry
this folds to four terms: `y(l) = sum_{m=1..4} w(m) c(m,l)`, with
`w(m) = x(m) + x(9-m)` for odd `l` and `x(m) - x(9-m)` for even `l`. Pairing
the terms gives

```
y(l) = sum_{p=1,2} (w(2p-1) + c(2p,l)) (w(2p) + c(2p-1,l))
     - sum_{p=1,2} w(2p) w(2p-1)  -  sum_{p=1,2} c(2p-1,l) c(2p,l)
```

This halves the data-dependent multiplications and needs no butterfly
routing: each product is exactly what the pre-adders followed by the
multiplier compute. The correction terms use the subtracting pre-adders with
one zero operand (`(0 - w2) * (w1 - 0)`). The data `w` are integers and the
constants are fractions, so both must be in the same fixed-point scale before
they are added. `tb/tb_dct_8x8.sv` therefore uses 2^12 for the constants and
multiplies the data by 2^3, i.e. divides them by 2^9 into that same scale.
Each row-pass output is then `y * 2^15`.

That testbench computes the full 2-D DCT of an 8x8 block, `Z = C^T X C`: a
row pass, then a column pass over the transposed row results. Between the
passes each `y` is rounded to a quarter (`y * 2^2`), which keeps the column
pass's pre-added operands below about 7800, well inside 16 bits. The column
outputs are `z * 2^14`. Every result matches an exact integer model of the
scaled arithmetic, and every coefficient is within 1.0 of the real DCT (0.26
in practice). The testbench recomputes the correction sums for each output
(6 products per output, 768 products per block). A scheduler that reuses them
per row and stores the constant sums would need fewer.

## 6. Parameters

| module        | parameter | default | meaning |
|---------------|-----------|---------|---------|
| `me_pkg`      | `PIX_W`, `ACC_W`, `BLOCK_PIXELS`, `WORD_W`, `NUM_CORES`, `MAC_W` | 8, 16, 256, 16, 4, 64 | shared sizes |
| `pipe_adder`  | `WIDTH`, `DIGIT` | 8, 1 | operand width, bits per pipeline stage |
| `csacc`, `csacc2`, `cs_binary_conv` | `WIDTH` | 16 | slice width |
| `mmd`         | `WIDTH`, `TAG_W` | 16, 8 | error width, tag width (the cores set `TAG_W` = 10) |
| `me_core`     | `PW`, `BLOCK`, `DIGIT`, `TAG_W` | 8, 256, 1, 10 | pixel, block size, adder stage, candidate-number width (accumulator width is `ACC_W`) |
| `booth_ctrl`  | `OPW`, `MW` | 24, 64 | widest operand, accumulator |
| `me_vsp`      | `BLOCK`, `DIGIT`, `TAG_W` | 256, 1, 10 | as in `me_core` |

The sizes follow the published design, except `TAG_W`, which is this design's
own. A 10-bit tag allows up to 1024 candidates, i.e. a search range of up to
+-15 pixels. The largest block error, 256 x 255, fits the 16-bit accumulator.
In `me_vsp`, `DIGIT` also sets the length of the delay lines that align the
two chained byte adders in MAC mode (`8 / DIGIT` clocks).

## 7. Where this RTL departs from the published architecture, and what it assumes

* **Multiplexers folded.** In the original unit, the multiply mode reuses the
  cores' 16-bit CSACC1, shifters, CSACC2 and converters through a set of
  numbered multiplexers. Here the reuse is the same, but the multiplexers are
  folded into one mode input per core. The Booth multiple is formed once, 64
  bits wide, in `booth_ctrl` and split over the four slices. The original's
  block diagram has complementers and shifters on this path in every core.
* **Shift direction.** The original accumulates with the vectors shifted
  *right* by 2 bits per clock. Here Booth digits are taken most significant
  first and the vectors shift *left*. The product is the same, and it avoids
  sign-extension corrections on carry-save vectors.
* **24-bit operand entry.** The original supports 24x24 products but does not
  say how the operands arrive. Here they come from the input words past the
  pre-adders (`mac_wide`), as described in section 4.
* **Not built:** the input multiplexer of the first minimum detector, which
  would let it watch other converters' outputs in multiply mode. Its use is
  not described.
* **This design's own choices.** The byte-to-core mapping, the 24-bit operand
  layout, the block framing by a pixel counter, candidate numbering and
  `search_init`, the tie rule of the minimum detector, the handshakes, all
  reset behaviour, and the delay lines that align two chained skewed adders. Only control and valid
  registers are reset; datapath registers are not.
* **DFD port.** In the original it leaves the unit wider. Here each core
  reports its 8-bit sum and carry.

## 8. Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/me_pkg.sv \
          tb/tb_me_vsp.sv --top-module tb_me_vsp
./obj_dir/Vtb_me_vsp
```

| testbench            | what it checks |
|----------------------|----------------|
| `tb_pipe_adder`      | random sums every clock for 8-bit/1-bit-stage, 5-bit and 8-bit/4-bit-stage adders; exact latency |
| `tb_ones_comp`       | all 512 input cases |
| `tb_csacc`           | running total vs model, with clears, stalls, x4 shifts, and the |x-y| encoding; four slices cascaded to 64 bits |
| `tb_csacc2`          | carry-save sums vs model, one 16-bit slice and four cascaded to 64 bits |
| `tb_cs_binary_conv`  | serial bits, parallel result, carry in/out, separate load and start, 16-clock conversion |
| `tb_mmd`             | minimum and tag vs model, ties, init, one-clock result |
| `tb_me_core`         | 17 full-size blocks: every ADD result and latency, every block error, a result every 256 clocks, minimum and best candidate |
| `tb_booth_ctrl`      | sums of 16x16 and 24x24 products with extreme operands, through a reference model of the carry-save datapath; product rate 8/12 clocks; conversion hand-off |
| `tb_me_vsp`          | whole unit at default sizes: four parallel searches with block errors and their tags, DFD, MAC sums with carry chaining and subtraction, 24x24 sums, 69-clock MAC conversion, two mode switches; counts that each mechanism occurred |
| `tb_me_vsp_cpa`      | the unit with 4-bit carry-ripple adder stages and 16-pixel blocks: DFD, block errors, 16x16 and 24x24 MAC sums with chained byte carries |
| `tb_dct_8x8`         | full 8x8 2-D DCT on the unit (row and column pass): exact integer match at every output, within 0.5 (rows) and 1.0 (final coefficients) of the real DCT |

All run in well under a second.
