# Four-parallel H.264/AVC luma intra prediction engine

An H.264/AVC encoder that wants the best intra coding of a 16x16 luma
macroblock has to try 13 prediction modes: 9 modes on each of the sixteen
4x4 blocks (the *I4MB* category) and 4 modes on the whole macroblock (the
*I16MB* category). It then has to pick the cheapest. Doing all of them in
hardware is awkward for three reasons:

* **A feedback loop.** A 4x4 block is predicted from the *reconstructed*
  pixels of the blocks to its left and above. So block n+1 cannot start
  until block n's best mode is known and block n has gone through the
  transform/quantise/reconstruct path. While that happens the predictor has
  nothing to do.
* **Uneven work.** Vertical and horizontal modes copy pixels. Most 4x4 modes
  need a 3-tap filter per pixel. 16x16 DC needs a 32-input sum. 16x16 plane
  needs its three constants a, b, c, computed with multiplications.
* **Plane prediction** does not fit the same datapath as the other modes.

This engine handles all 13 modes with four identical processing elements
(PEs). Each PE produces one predicted pixel per cycle, so the engine
produces one 4-pixel row of a 4x4 prediction per cycle. Four scheduling
ideas keep the PEs busy:

| Scheme | Idea | Effect here |
|---|---|---|
| Category-level interleaving (CLIS) | Split the I16MB modes into sixteen 4x4 pieces and compute the piece for block n while block n is being reconstructed. | The 20-cycle reconstruction bubble is filled. |
| Mode-level scheduling (MLS) | Compute the 4x4 vertical mode first. It needs no left neighbours, so block n+1's vertical mode can run before block n is reconstructed. | 4 more cycles per block are hidden in the bubble. |
| Early data preparation (EDPS) | Prepare the 16x16 DC value and the plane constants while the 16x16 vertical and horizontal outputs run. | DC and plane take 4 cycles per 4x4 block, like every other mode. |
| Stage-level partial distortion elimination (SLPDE) | Compare the running intra costs with the best inter cost of the macroblock. Stop once neither I4MB nor I16MB can win. | Macroblocks that will be coded as inter finish early. |

The result is **896 cycles per macroblock** for the full mode search
(16 x 56), in a stream of macroblocks. With SLPDE a terminated macroblock
takes 56·k cycles, where k is the number of blocks done before termination.
At 120 MHz that is 134,000 macroblocks per second: 37 frames/s of 1280x720
or 99 frames/s of 720x480.

## The per-block schedule

`intra_ctrl` issues one request per cycle. A request names a category, a
mode, a row, a block, and whether it is a regeneration for reconstruction.
For each 4x4 block b in zig-zag order (0-3 in the top-left 8x8 quadrant,
4-7 top-right, 8-11 bottom-left, 12-15 bottom-right):

```
cycles  0..31   I4    modes 1..8 of block b (4 rows each)   -- costs to mode decision
cycles 32..35   BEST  best mode of block b again            -- rows to reconstruction
cycles 36..51   I16   16x16 modes V, H, DC, plane, restricted to block b's 4x4 area
cycles 52..55   VNEXT 4x4 vertical mode of block b+1        -- MLS
(cycles 56..)   WAIT  only if reconstruction is later than 20 cycles
```

Cycles 36..55 are the 20-cycle reconstruction window of block b. At the
end of the window the reconstructed rows of block b are in `nb_buffer`, and
block b+1 starts with mode 1.

Block 15 has no block 16, so its VNEXT slot would be idle. Instead it
computes the vertical mode of block 0 of the *next* macroblock (the
look-ahead). This needs only that block's four top neighbours and its
original pixels, which arrive on the `nxt_*` ports. The next macroblock then
starts directly at mode 1 and takes 16 x 56 = 896 cycles. Without a
look-ahead, for the first macroblock of a stream, block 0's vertical mode
runs first and the macroblock takes 900 cycles. The vertical-mode cost
restarts `mode_decision`'s running minimum, so the new macroblock's `start`
clears the cost accumulators but leaves the running minimum alone.

The best mode of a block is known on the cycle its mode-8 cost arrives.
`mode_decision` provides it combinationally, so BEST follows I4 with no gap.
If `rec_done` has not come by the end of the window, the controller waits
in the WAIT phase, issuing no requests. The block after is delayed by
exactly the lateness.

After block 15's window, the 16x16 DC-coefficient Hadamard runs (4 cycles,
one per mode). Then the final decision is made and `mb_done` pulses.

## The processing element and its four configurations

Each `intra_pe` has:

* an adder tree: (op0 + op1) + (op2 + op3), three adders, a 4-to-1 sum;
* a register `Reg_i` that can load the sum;
* rounding and scaling: add 2^(s-1), then shift right by s;
* a clip to 0..255;
* an output multiplexer that picks one of:
  * the raw operand 0 (bypass);
  * the PE's own clipped result;
  * PE 0's clipped result (`Clip_0`);
  * PE 2's clipped result (`Clip_2`).

`intra_pred_gen` holds the operand multiplexer and sets the four PEs into
one of four configurations:

* **Bypass** (4x4 and 16x16 vertical and horizontal): operand 0 is the
  neighbour pixel and goes straight to the output.
* **Normal** (the six directional 4x4 modes): every predicted pixel is
  either a 2-tap filter (a+b+1)>>1, written as a+a+b+b with shift 2, or a
  3-tap filter (a+2b+c+2)>>2, written as a+b+b+c with shift 2. A small
  table function maps (mode, row, column) to the four operand indices.
* **Cascading** (4x4 DC): PE 1 sums the four pixels above, and PE 3 sums
  the four on the left. PE 0 adds the two sums, then rounds and shifts by 3.
  All four outputs take PE 0's clipped value.
* **Recursive** (16x16 plane): on a block's first row each PE is seeded with
  a + b(x-7) + c(y-7) for its column, then rounded (+16), shifted by 5 and
  clipped. The unrounded value goes into `Reg_i`. On rows 1..3 the PE adds c
  to its own `Reg_i`.

16x16 DC and plane use values from `i16_prep` (the EDPS unit): the DC value
and the plane constants a, b, c. `i16_prep` starts on the first 16x16 cycle
of block 0. It takes 8 cycles to accumulate the boundary sums. The DC value
is ready on cycle 8, when the DC output begins. The plane constants are
ready on cycle 9, well before the plane output on cycle 12. After that they
are held for the rest of the macroblock.

## Costs and decisions

* `satd4x4` gets the four rows of a predicted block together with the
  original pixels. One cycle after the last row it reports three values:
  * the SATD, (sum of |4x4 Hadamard of the residual| + 1) >> 1, at most
    8160, so it fits in 13 bits;
  * the sum of the |AC coefficients|;
  * the DC coefficient.
* **4x4 modes.** A 13-bit running minimum selects each block's best mode. On
  a tie the earlier mode wins. The best cost is added to a saturating 17-bit
  I4MB total.
* **16x16 modes.** For each of the four modes:
  * the AC sums of the 16 blocks are accumulated;
  * the 16 DC coefficients are stored in `i16_dc_hadamard` (64 registers);
  * at the end the DC values are scaled by 1/4 and put through a second
    4x4 Hadamard;
  * cost = (AC total + sum of |transformed DC|) / 2.

  The lowest cost wins, and a tie keeps the lower mode number.
* **Macroblock type.** The macroblock is I4MB when its total is strictly
  below the best I16MB cost.
* **SLPDE.** After each block's window, `slpde_unit` runs two 17-bit
  comparisons:
  * the I4MB total against `inter_cost`;
  * the smallest partial 16x16 AC total (halved) against `inter_cost`.

  Both totals only grow, so they are lower bounds of the final costs. If
  both exceed `inter_cost`, neither intra type can win. The macroblock then
  ends with `mb_skipped`, meaning it is coded as inter.

Costs contain no mode-signalling (lambda x bits) term.

## Interfaces and timing (`intra_top`)

| Port | Dir | Meaning |
|---|---|---|
| `start` | in | one-cycle pulse. Boundary pixels are latched on this cycle. |
| `cur_mb[16][16]` | in | original pixels [y][x]. Must stay stable until `mb_done`. |
| `top_row[20]`, `left_col[16]`, `corner` | in | reconstructed neighbours: 16 pixels above, 4 above-right, 16 left, 1 corner |
| `slpde_en`, `inter_cost` | in | early termination enable and threshold (17 bits) |
| `nxt_valid`, `nxt_top[4]`, `nxt_blk0[4][4]` | in | look-ahead. The next macroblock's 4 pixels above block 0 and its block-0 original pixels. Sampled at the end of block 15's 16x16 part and used in the last 4 cycles of its window. Must match what the next `start` brings. |
| `rec_pred_valid/blk/row`, `rec_pred[4]` | out | rows of the chosen 4x4 prediction for the reconstruction engine, cycles 32..35 of the block |
| `rec_wr_valid/blk/row`, `rec_wr_pix[4]` | in | reconstructed rows written back |
| `rec_done` | in | block reconstructed. Expected within 20 cycles after the last predicted row; later means a stall. |
| `busy`, `phase` | out | status (phase encoding in `intra_pkg::phase_e`) |
| `mb_done` | out | one-cycle pulse. Results below are valid from then until the next `start`. After a termination (`mb_skipped`) only `mb_skipped` and `i4_cost` mean anything. |
| `mb_skipped`, `mb_is_i4`, `i4_modes[16]`, `i16_mode`, `i4_cost`, `i16_cost` | out | decisions and costs |

The reconstructed rows must be written before `rec_done`. The upper-right
pixels of blocks 3, 7, 11, 13 and 15 are never reconstructed in time, so
they are replaced by pixel D, as in H.264/AVC. The macroblock is assumed to
be inside the picture, with all neighbours available. `nb_buffer` stores
only the bottom pixel row and right pixel column of each reconstructed
block, because nothing else is read again.

All state uses an asynchronous active-low reset. Everything is
single-clock.

## Files

| File | Contents |
|---|---|
| `rtl/intra_pkg.sv` | widths, enums (modes, phases, PE output select), request and PE-config structs, zig-zag helpers |
| `rtl/intra_top.sv` | the engine |
| `rtl/intra_ctrl.sv` | schedule controller (CLIS, MLS, look-ahead, EDPS start, stall, SLPDE exit) |
| `rtl/intra_pred_gen.sv`, `rtl/intra_pe.sv` | operand multiplexer and the four PEs |
| `rtl/i16_prep.sv` | 16x16 DC and plane constants (EDPS) |
| `rtl/nb_buffer.sv` | boundary and reconstructed-neighbour storage |
| `rtl/satd4x4.sv`, `rtl/i16_dc_hadamard.sv` | cost units |
| `rtl/mode_decision.sv`, `rtl/slpde_unit.sv` | decisions and early termination |
| `tb/intra_ref_pkg.sv` | reference model: the standard prediction equations, a matrix-product Hadamard |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_intra_frame.sv` | a whole 176x144 frame through the engine, with and without early termination |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has
a watchdog. With Verilator 5, for example for the whole engine:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/intra_pkg.sv tb/intra_ref_pkg.sv tb/tb_intra_top.sv \
  --top-module tb_intra_top -o sim
./obj_dir/sim
```

For another block, replace `tb_intra_top` with that block's testbench.

`tb_intra_top` runs the engine at its default sizes on 12 macroblocks:
random texture, smooth gradients, flat areas and blocky edges. A behavioural
reconstruction model returns the original pixels. This makes the coder
lossless, so the reference can derive every neighbour from the picture. For
every macroblock the test checks:

* each 4x4 mode;
* the prediction rows sent to reconstruction;
* the 16x16 mode;
* both costs;
* the macroblock type;
* the cycle count: 896 after a look-ahead, 900 otherwise.

Every macroblock but two offers the look-ahead. Two macroblocks get late reconstruction (+3 cycles per block). Four run
with early termination against an `inter_cost` that three of them exceed
after a few blocks; the fourth is flat, with zero intra cost, and runs to
the end. The test counts CLIS, MLS and EDPS
cycles, look-ahead cycles, stalls, terminations and both macroblock types,
and fails if any count is zero.

`tb_intra_frame` runs a whole 176x144 frame (99 macroblocks) twice, with
neighbours taken from the frame and the look-ahead always offered. The
first pass is a full search, and every result is checked against the
reference. It takes 88,708 cycles, 896.04 per macroblock. The
second pass uses early termination. Its inter cost stands in for a motion
search that found the true motion: the SATD of a noise-only residual. In
this pass every termination point, and the results of every macroblock that
was not terminated, are checked against the first pass. On this synthetic
frame, 12 of the 99 macroblocks terminate early. That gives 805 cycles per
macroblock, 11% fewer. The saving depends entirely on how good the inter
prediction is.

## Where this design departs from, or adds to, the original engine

* **EDPS uses a separate unit.** The original design prepares DC and plane
  on the PE adders, which are idle during the vertical and horizontal
  outputs, so EDPS costs no area there. Here `i16_prep` is a small separate
  unit active in the same cycles. The timing matches; the area saving does
  not.
* **Plane seeding.** The recursive plane configuration seeds each block's
  first row with small constant multiplications (x-7 and y-7 take only four
  values each) in the operand multiplexer.
* **Combinational cascade.** The 4x4 DC cascade is combinational within one
  cycle. It does not go through the PE registers.
* **Look-ahead.** The look-ahead ports and their handshake are this
  design's own way to reach 896 cycles. The original count simply assumes
  that block 0's vertical mode is hidden.
* **Cost definitions.** SATD, the DC scaling, the tie rules and the absence
  of a rate term are this design's choices.
* **Comparator widths.** The engine is described with one 13-bit and one
  17-bit comparator for SLPDE. Here block costs are compared at 13 bits, and
  both SLPDE comparisons are 17 bits.
* **Unused `Clip_2` path.** `Clip_2` is wired into every PE's output
  multiplexer as in the original structure, but no mode used here selects
  it.
* **Not included:**
  * chroma prediction;
  * the reconstruction engine (transform, quantisation, inverse);
  * the inter prediction that supplies `inter_cost`;
  * frame-edge neighbour availability.
* **No timing or area data.** No timing analysis or standard-cell synthesis
  has been done, so neither the 120 MHz clock nor the gate count is shown.
