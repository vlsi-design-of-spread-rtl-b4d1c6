# Spread-spectrum image watermarking in the Walsh domain

This RTL hides a 4-bit watermark in every 8x8 block of a grey-scale image and
recovers it again without the original image. Each watermark bit has its own
64-element pseudo-noise (PN) pattern. The pattern is added to, or subtracted
from, the block's Walsh coefficients: added for a 0 bit, subtracted for a 1
bit. The decoder correlates the received block's Walsh coefficients with the
same four patterns and compares each correlation with their mean.

The Walsh transform is used instead of a DCT or a wavelet because its kernel
contains only +1 and -1. The whole algorithm therefore needs only adders,
shifters, counters and one small RAM per transform. There are no multipliers.

The chip (`ssw_watermark_top`) contains two independent halves:

| half | module | in | out | cycles per 8x8 block |
|---|---|---|---|---|
| transmitter (embedder) | `ssw_transmitter` | 64 pixels + 4 watermark bits | 64 watermarked pixels | 1344 latency, a new block every 704 |
| receiver (decoder) | `ssw_receiver` | 64 received pixels | 4 bits + threshold | 704 latency, a new block every 704 |

## The algorithm in numbers

For one block of pixels `x[0..63]` (row-major), watermark bits `b[0..3]`,
patterns `P_i[n]` in {0,1}, and modulation index `k`:

```
X[m]  = floor( W(x)[m] / 64 )                        forward transform, m = 0..63
c[m]  = k * sum_i s_i * P_i[m],  s_i = +1 if b_i = 0, -1 if b_i = 1
y     = W(X + c)                                     inverse transform = watermarked block
-------------------------------------------------------------------------------
Z[m]  = floor( W(y')[m] / 64 )                       receiver, y' = received block
mu_i  = sum over m with P_i[m] = 1 of Z[m]           i = 0..3
T     = floor( (mu_0 + mu_1 + mu_2 + mu_3) / 4 )
b'_i  = 0 if mu_i >= T, else 1
```

`W` is the 64-point Walsh-Hadamard transform
`W(x)[m] = sum_n x[n] * (-1)^popcount(bitrev6(m) & n)`.
This kernel is the Kronecker product of two 8-point kernels, so it is the 2-D
transform of the 8x8 block. Its outputs come in the order produced by the
in-place algorithm, with `bitrev6` applied to the coefficient index. The
kernel times itself is 64 times the identity. Hence `floor(W(W(X))/64) = X`
exactly: on a clean channel the receiver sees exactly the coefficients the
transmitter produced.

## The Walsh transform unit (`walsh_transform`)

Both transmitter transforms and the receiver transform are instances of one
unit. It is the only part with a real schedule. It runs the classic in-place
fast algorithm on a single 16-bit RAM of 96 words, of which it uses 64.

1. **Load, 64 cycles.** A binary counter numbers the incoming samples. The
   bit-reversal unit turns sample number `n` into the write address
   `bitrev6(n)`. After 64 cycles the RAM holds the block in bit-reversed
   order.
2. **Butterflies, 6 stages x 32 x 3 cycles = 576 cycles.** The address
   generator (`wt1_index_gen`) produces the pairs `(I, IP = I + 2^L)` in the
   nested-loop order of the textbook algorithm: stage `L`, then group
   `J < 2^L`, then `I = J, J + 2^(L+1), ...`. The RAM has one write port and
   one asynchronous read port, so each butterfly takes three cycles:

   | phase | read | write | registers |
   |---|---|---|---|
   | 0 | `F(I)` | – | reg1 <= F(I) |
   | 1 | `F(IP)` | `F(I) <= reg1 + F(IP)` | reg2 <= reg1 - F(IP) |
   | 2 | – | `F(IP) <= reg2` | – |

3. **Read-out, 64 cycles.** The counter reads the RAM in natural order
   through the right shifter: an arithmetic shift by `SHIFT`, which is 6 for
   the forward transform (divide by 64) and 0 for the inverse. `out_index`
   gives the coefficient number. `out_last` marks the 64th output.

With sample 0 in cycle 1, outputs appear in cycles 641..704. The unit is idle
(`ready_o`) again in cycle 705. A block must arrive as 64 back-to-back
samples. An assertion checks this.

In the transmitter, the forward unit's read-out feeds, through the embedding
adder, directly into the inverse unit's load phase. The two 704-cycle
transforms therefore chain into 640 + 704 = 1344 cycles per block. A second
block may enter the forward unit as soon as that unit is idle (cycle 705). Its
coefficients then reach the inverse unit in the very cycle the inverse unit
becomes idle, so consecutive blocks overlap. An assertion in the transmitter
checks that the inverse unit is always free when coefficients arrive.

## Spreading codes (`lfsr`, `pn_gen`, `code_gen`)

Each PN pattern is 64 consecutive output bits of an 8-bit maximal-length
Fibonacci LFSR, x^8 + x^6 + x^5 + x^4 + 1, with period 255. The LFSR is
reloaded with its seed at the start of every block. The transmitter and the
receiver therefore produce the same four patterns in step with the
coefficient index.

The seeds are F8, 5A, CE and AC (hex), for P1..P4. They were picked so that
every pattern has a 0 at element 0, the DC coefficient. The block's average
brightness then adds the same amount (nothing) to every correlation. The
patterns have 33 to 36 ones each, and any two share 16 to 18 ones.

Two PN blocks each hold two LFSRs:

- **PN1** carries P1 and P2 (bits 0 and 1).
- **PN2** carries P3 and P4 (bits 2 and 3).

Inside a block, the two patterns are added with signs set by their bits:

- PN1 counts a pattern as +p for a 0 bit and -p for a 1 bit.
- PN2 uses the opposite sign, because the code generator then subtracts PN2
  from PN1.

The result lies in -4..+4. A padding unit sign-extends it to 16 bits and
appends `K_SHIFT` zero bits below, so `k = 2^K_SHIFT`. For the watermark 0011
this is just `P1 + P2 - (P3 + P4)`.

## Decoder (`correlator`, `mean_threshold`)

The correlator has its own PN1 and PN2 blocks and four accumulators. For each
coefficient, an accumulator adds the coefficient if its pattern element is 1,
and its `a_in` input if the element is 0. `a_in` is tied to zero in the
receiver. `done_o` pulses one cycle after the 64th coefficient.

The threshold unit adds the four sums with three adders (`(Q+R)+(S+T)`),
shifts the result right by 2, and compares each sum with this mean. All
comparisons are signed, and all arithmetic is 16-bit wrap-around.

Because the threshold is the mean of the four correlations, it carries no
absolute reference:

- **0000 and 1111 cannot be decoded.** When all four bits are equal, all four
  correlations move together.
- **Other watermarks decode reliably on smooth image content.** In a model of
  200 shaded 8x8 blocks with small texture, 95 to 100% of blocks decoded
  correctly for each of the watermarks 0001..1110.
- **Texture hurts.** On blocks of uniform random noise, the host image itself
  disturbs the correlations, and at `k = 1` only about one block in five
  decodes correctly. Raise `K_SHIFT` to trade image fidelity for robustness.

## Numerical behaviour to be aware of

- **Output range.** Watermarked pixels leave the chip as 16-bit signed
  values. They are not clipped to 0..255.
- **Truncation.** The forward right shifter truncates (floor). Every
  coefficient therefore loses a fraction in [0,1), and the inverse sums 64
  such errors into each pixel.
  - For pixel 0 of each block (the all-ones kernel row) the errors add up, to
    about -32 grey levels.
  - For the other 63 pixels they mostly cancel: about +-2.3 levels (standard
    deviation).
  - The receiver is unaffected: it gets the truncated coefficients back
    exactly.
- **Watermark strength.** With k = 1, the watermark changes pixels by about
  8 levels (standard deviation), at most about 22.
- **Word width.** 16 bits is enough for 8-bit pixels, whose transform sums
  reach at most 64 * 255. Larger inputs wrap.

## What follows the source design and what was filled in

The architecture follows a published FPGA design. This RTL keeps from it:

- the block structure of both halves: forward transform -> embedding adder
  fed by a PN1 - PN2 code generator with padding -> inverse transform; and
  forward transform -> MUX/adder/register correlators -> three-adder mean,
  shift and four comparators;
- the RAM-based transform with a bit-reversal unit, a butterfly address
  generator, a binary counter and a right shifter;
- the 96-word 16-bit RAM, 8-bit pixels, 16-bit data, 4 watermark bits and
  64-element patterns;
- the decision rule;
- 1344 cycles per embedded block. This figure is reproduced exactly.

These choices are this design's own:

- an internal state machine in place of the externally driven multiplexer
  selects;
- the 3-cycle butterfly on a RAM with separate read and write addresses and
  an asynchronous read;
- two data registers instead of three;
- LFSR width, polynomial and seeds;
- the way watermark bits set the signs in PN1/PN2;
- k = 1;
- the division by 64 placed in the forward transform only;
- the streaming handshake (`in_valid`/`ready_o`, 64 back-to-back words);
- asynchronous active-low reset.

The source describes a scale-up to 256x256 or 512x512 images with many copies
of the unit working in parallel. This RTL has one transmitter and one
receiver, which process any number of blocks one after another: 1024 blocks
(256x256) take 720,896 cycles, about 9 ms at 80 MHz. Nothing was synthesised
for an FPGA here. Resource counts and clock rates are not verified.

## Files

| file | contents |
|---|---|
| `rtl/ssw_pkg.sv` | widths, block size, state type, LFSR polynomial and seeds |
| `rtl/ssw_watermark_top.sv` | chip top, both halves |
| `rtl/ssw_transmitter.sv` | forward transform, code generator, embedder, inverse transform |
| `rtl/ssw_receiver.sv` | forward transform, correlator, threshold |
| `rtl/walsh_transform.sv` | transform controller and butterfly datapath |
| `rtl/wt1_index_gen.sv` | butterfly address pairs |
| `rtl/wt2_ram.sv` | 96 x 16 RAM |
| `rtl/bitrev_counter.sv` | address counter with bit-reversed output |
| `rtl/code_gen.sv`, `rtl/pn_gen.sv`, `rtl/lfsr.sv` | spreading codes |
| `rtl/embedder.sv` | coefficient + code adder |
| `rtl/correlator.sv`, `rtl/mean_threshold.sv` | decision path |
| `tb/tb_ref_pkg.sv` | reference model: direct matrix transform, LFSR recurrence, embed, correlate, decide |
| `tb/tb_<module>.sv` | one self-checking testbench per module; `tb_inverse_walsh.sv` covers the unit with SHIFT = 0 |
| `tb/tb_image_stream.sv` | a full 512x512 image streamed through the chip |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if a testbench hangs. For example, the end-to-end
run:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ssw_watermark_top \
  rtl/ssw_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_ssw_watermark_top.sv
./obj_dir/Vtb_ssw_watermark_top
```

(`rtl/ssw_pkg.sv` appears twice in that list. Verilator only warns about the
duplicate.) For another testbench, swap the last file and the top-module name.
Lint a single module with
`verilator --lint-only -Wall rtl/ssw_pkg.sv rtl/*.sv --top-module <module>`.

What the testbenches establish:

- **Transform.** Every output of the transform unit matches the matrix
  definition. This holds for constant, alternating and random blocks, with
  and without the shift, and with blocks sent back to back. The exact cycles
  641..704 and the 704-cycle block interval are checked.
- **Transmitter.** Every watermarked pixel matches the reference embedder,
  and the last pixel leaves in cycle 1344.
- **Receiver.** Bits and mean match the reference decoder, on clean blocks
  and on blocks with +-1 noise, and arrive 704 cycles after the first word.
- **End to end.** `tb_ssw_watermark_top` runs at the default parameters: 12
  blocks embedded back to back, passed through a clean or noisy channel, then
  decoded. It requires the embedded watermark to be recovered. It also counts
  events that must each occur at least once: 0 and 1 bits embedded, overlapping
  transforms, 0 and 1 bits decoded, noisy blocks.
- **Whole image.** `tb_image_stream` watermarks and decodes a 512x512
  synthetic image: 4096 blocks at one block per 704 cycles, with the
  transmitter output wired straight into the receiver. It checks every
  decoded word against the reference decoder. The watermark is recovered in
  4081 of the 4096 blocks, and the average squared pixel change is about 111.
  Set `IMG` to 256 for a 256x256 image.
- **Sub-blocks.** Each is checked on its own against independent arithmetic:
  the LFSR against its recurrence and period, the address generator against
  the loop nest, and so on.

## Changing it

- `K_SHIFT` (top, transmitter, code generator) sets the modulation index
  `k = 2^K_SHIFT`. The decoder does not depend on it.
- The seeds in `ssw_pkg` select other patterns. Keep element 0 at 0, and
  keep the patterns roughly balanced.
- The RAM depth (`DEPTH`) may shrink to 64. The transform size is fixed at
  64 by `ssw_pkg::N`/`LOGN`. The butterfly counter and the bit reversal
  follow `LOGN`, but the 3-bit stage counter limits `LOGN` to 8.
