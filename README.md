# SAD-reuse motion estimation accelerator for an H.264 encoder on a soft-CPU SoC

H.264 motion estimation has to find a motion vector for every partition of
every block mode. The modes are 16x16, 16x8, 8x16, 8x8, 8x4, 4x8 and 4x4,
which gives 41 partitions per macroblock. Searching each partition on its
own would compute the same pixel differences up to seven times. This design
computes the sum of absolute differences (SAD) of each 4x4 block of the
macroblock once per candidate vector. Every partition is a rectangle of
whole 4x4 blocks, so its SAD is obtained by adding the stored 4x4 SADs:

    SAD_mxn(d) = sum over the (m/4) x (n/4) 4x4 blocks (i,j) inside the partition of SAD4x4(i,j)(d)

For each partition the hardware then keeps the vector with the least
Lagrangian cost `J = SAD + lambda * R(d - p)`. At the end it picks the block
mode whose partitions cost least in total.

The accelerator is a loosely coupled peripheral of a system-on-programmable-chip.
A soft CPU configures and starts it through Avalon-MM registers. A memory
controller streams the current macroblock and the reference search window
from external SDRAM through FIFOs into the SAD-reuse engine.

```
             Avalon-MM slave (CPU)                    read master (SDRAM side)
                     |                                         |
              avalon_sad_regs ---start/params---> mem_fetch_ctrl
                     ^                                  |           |
                     |                          sync_fifo (cur)  sync_fifo (ref)
                     |                                  |           |
                     +-------- results ------------ sad_reuse_engine
                                                  (sad_4x4_pe -> SAD4x4 store ->
                                                   sad_reuse_combiner -> mv_mode_decision)
```

## Block modes, 4x4 indices and partition numbers

The macroblock is a 4x4 grid of 4x4 blocks. Block `(i,j)` has row index `i`
and column index `j`, and its top-left sample is at `x = 4j, y = 4i`. In
the RTL a block is addressed as `b = 4*i + j`.

**Mode naming is height x width.** A mode "m x n" is `m` samples high and
`n` samples wide. This design's "16x8" is therefore the pair of 8-wide
*vertical* halves, and "4x8" is a 4-high, 8-wide strip. That is the reverse
of the usual H.264 naming (width x height). The orientation only affects
labels, since all seven shapes are searched either way.

The 41 partitions are numbered mode by mode. Inside a mode they go in
raster order over the macroblock, left to right and then top to bottom:

| mode (`sad_pkg::mode_e`) | value | size in 4x4 blocks (h x w) | partitions | numbers |
|---|---|---|---|---|
| `MODE_16X16` | 0 | 4 x 4 | 1  | 0 |
| `MODE_16X8`  | 1 | 4 x 2 | 2  | 1-2 (left, right) |
| `MODE_8X16`  | 2 | 2 x 4 | 2  | 3-4 (top, bottom) |
| `MODE_8X8`   | 3 | 2 x 2 | 4  | 5-8 |
| `MODE_8X4`   | 4 | 2 x 1 | 8  | 9-16 |
| `MODE_4X8`   | 5 | 1 x 2 | 8  | 17-24 |
| `MODE_4X4`   | 6 | 1 x 1 | 16 | 25-40 |

For example, partition 17 (the first 4x8) is `SAD4x4(0,0) + SAD4x4(0,1)`.
Because the raster order runs over the whole macroblock, the sub-partitions
of one 8x8 quadrant do not get consecutive numbers. For instance, the 8x4
partitions 9 and 10 are the two halves of the top-left quadrant, while 11
and 12 belong to the top-right one. `sad_pkg::part_has_blk(p, b)` is the
single definition of which 4x4 block belongs to which partition. The
combiner evaluates it at elaboration time.

## The search: one 4x4 block per clock

`sad_reuse_engine` works in three phases.

1. **Load.** Two valid/ready word streams deliver the data: the current
   macroblock (16 rows of 4 words) and the search window ((16+2·SR) rows of
   (16+2·SR)/4 words, which is 24 x 6 for SR = 4). Both streams are
   accepted at the same time. Each 32-bit word holds four 8-bit samples,
   with the leftmost sample in bits 7..0. The samples go into two register
   buffers.
2. **Search.** There are (2·SR+1)² = 81 candidate vectors, visited in
   raster order: `dy` from -SR to +SR, and `dx` from -SR to +SR inside each
   `dy`. For each candidate, the 16 blocks of the macroblock go through
   `sad_4x4_pe`, one per clock, in block order 0..15. The PE holds four
   `sad_1x4` row units in parallel, which sum 16 absolute differences per
   clock. Its result is registered and tagged with the block number and
   the vector. The 16 results go into a SAD4x4 store. When block 15
   arrives, the completed store is handed to `sad_reuse_combiner`. That
   unit forms all 41 partition SADs in parallel and registers them.
   `mv_mode_decision` then updates its 41 best-so-far entries. The store
   is overwritten by the next candidate in the same clock it is read, so
   the search never stalls.
3. **Decision.** After a 4-clock drain, the mode totals are formed and
   the least one is registered. `done` pulses for one clock.

Timing for SR = 4: exactly 81 × 16 = 1296 search clocks. From the last
loaded word to `done` takes 16·(2SR+1)² + 7 = 1303 clocks. Loading takes at
least 144 clocks (the window stream), or longer if the memory is slower.
Results stay valid until the next `start`. `lambda` and `pred` are sampled
at `start`. A `start` that arrives while the engine is busy is ignored.

The buffers are plain register arrays that the PE reads through
multiplexers. This is simple and correct. It is not the
shift-register-fed array that a row-wise data transfer would suggest, and
it costs about 6.6 kbit of flip-flops plus wide multiplexers.

## Cost and decision rules

- `R(d - p)` is the number of bits of the motion-vector difference. It is
  modelled as the length of the signed Exp-Golomb code of each component
  (`2*floor(log2(k+1)) + 1` for code number `k`), summed over x and y.
  Vectors are in whole samples. There is no sub-sample refinement.
- There is one predictor `p` per macroblock, written by the CPU. The
  hardware does not derive a per-partition predictor from neighbours.
- A partition keeps the first candidate of least cost, so on a tie the
  earlier vector in scan order wins.
- A mode's cost is the sum of the kept costs of its partitions. The least
  mode cost wins, and on a tie the lower mode number wins. All four 8x8
  quadrants use the same sub-mode: there is no per-quadrant choice of
  8x8/8x4/4x8/4x4. P-skip and the intra modes are not evaluated.
- One search covers one reference frame. For several reference frames,
  software runs one search per frame and compares the read-back costs.
- Widths: SAD4x4 is 12 bits, partition SAD is 16 bits, cost is 20 bits,
  mode cost is 24 bits, lambda is 8 bits and each MV component is 8 bits
  signed.

## System side

### Register map (`avalon_sad_regs`, 32-bit word addresses, read latency 1)

| address | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL/STATUS | W | bit0 start, bit1 clear done/irq, bit2 irq enable |
|      |             | R | bit0 busy, bit1 done, bit2 irq enable |
| 0x01 | CUR_BASE | RW | word address of the macroblock's first word |
| 0x02 | REF_BASE | RW | word address of the search window's first word (macroblock position - SR in x and y) |
| 0x03 | STRIDE | RW | words per frame row |
| 0x04 | LAMBDA | RW | bits 7..0 |
| 0x05 | PRED | RW | x in bits 7..0, y in bits 15..8, signed |
| 0x06 | MODE | R | best mode (table above) |
| 0x08-0x0E | MODE_COST[0..6] | R | total cost per mode |
| 0x40-0x68 | MV[0..40] | R | best vector per partition (x bits 7..0, y bits 15..8) |
| 0x80-0xA8 | COST[0..40] | R | its cost |

`irq` is `done && irq_enable`. Writing bit1 of CTRL clears it, and so does
starting a new search. Unmapped addresses read as 0.

### Memory controller and FIFOs

`mem_fetch_ctrl` samples the base addresses and stride at `start`. It then
reads 64 words of the current block and 144 words of the window through a
pipelined read port. The port follows Avalon-MM conventions:
`m_read`/`m_address` are held while `m_waitrequest` is high, and data
return in order with `m_readdatavalid` at any later clock. A read is issued
only while its FIFO has room for it and for all earlier reads of that
stream still in flight. Returned data therefore never overflow a FIFO. An
assertion checks this.

The window must start on a 4-sample boundary. This holds for macroblocks at
multiples of 16 and SR = 4. The two `sync_fifo`s (16 words each by default)
decouple memory latency from the engine. The engine accepts a word per
clock on each stream, which is faster than one memory port can supply, so
in the full system the FIFOs stay nearly empty. The fill-limited path
matters only if the memory side is faster or the FIFOs are made shallower.

SDRAM command sequencing (activate, precharge, refresh, CAS latency) is not
part of this RTL. `m_*` is meant to connect to an SDRAM controller or
memory interconnect that provides that read port.

## How far it follows the original scheme, and what is added

These parts come from the published SAD-reuse proposal:

- the ±4 search range with 81 locations;
- the seven block modes and 41 vectors;
- the SAD4x4 decomposition and the reuse sum;
- the 4x4 PE built from four parallel 1x4 row units whose SAD4x4 results
  are stored for reuse;
- the Lagrangian cost form;
- the system arrangement of soft CPU, bus, SDRAM controller, FIFOs and
  accelerator.

These are this design's own choices:

- the data buffering and scan order;
- the exact pipeline and its latency;
- the bit-count model for `R`;
- the single predictor;
- the tie rules;
- the way mode costs are combined;
- all widths;
- the stream and word formats;
- the register map and interrupt;
- the memory read protocol and credit scheme;
- FIFO depth and count.

The proposal describes the PE's 1x4 SADs as formed "as data is shifted
in". The register-buffer-plus-multiplexer form used here computes the same
values but is not that structure.

Not included: the soft CPU, the standard peripherals and the system
interconnect, the SDRAM, and the other encoder stages (transform and
quantisation, entropy coding, motion compensation, intra prediction,
deblocking filter).

## Files

`rtl/`
- `sad_pkg.sv` — widths, `mode_e`, partition geometry functions,
  Exp-Golomb length.
- `sad_1x4.sv`, `sad_4x4_pe.sv` — SAD of a row and of a 4x4 block.
- `sad_reuse_combiner.sv` — 16 SAD4x4 terms to 41 partition SADs.
- `mv_mode_decision.sv` — cost, best vector per partition, best mode.
- `sad_reuse_engine.sv` — buffers, search control, pipeline.
- `sync_fifo.sv`, `mem_fetch_ctrl.sv`, `avalon_sad_regs.sv` — system side.
- `sopc_sad_coder.sv` — top: registers + fetch + two FIFOs + engine.

`tb/` — one self-checking testbench per module (`tb_<module>.sv`), plus:
- `tb_me_ref_pkg.sv` — an independent pixel-level software full search
  used as the reference.
- `tb_sdram_model.sv` — a behavioural memory with random wait states and
  latencies.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sopc_sad_coder \
  -y rtl -y tb +libext+.sv rtl/sad_pkg.sv tb/tb_me_ref_pkg.sv tb/tb_sopc_sad_coder.sv
./obj_dir/Vtb_sopc_sad_coder
```

Replace `tb_sopc_sad_coder` with any other testbench name to run it.

The end-to-end test runs the top at its default parameters and needs
well under a second. It puts a 64x48 reference frame and a current frame
in the memory model and searches three macroblocks: noise, and a smooth
picture moved by (-2,+3). It checks all 41 vectors and costs, the seven
mode totals and the chosen mode against the software search. It also
checks that these mechanisms occur:

- memory wait states;
- the engine waiting on an empty FIFO;
- a start ignored while busy;
- parameter writes during a search without effect;
- the interrupt;
- two different winning modes.

The engine test also checks the exact 1303-clock latency. All modules use
an asynchronous active-low reset, which the testbenches assert at time 0.

## Trust and limits

Each module's testbench compares against values computed independently in
software, not against the RTL's own functions. Each testbench has also been
shown to fail against a deliberately broken copy of its module.

Things that were not done:

- No timing closure or FPGA fitting was attempted.
- The wide window multiplexer and the 41-way parallel cost and compare
  logic are the parts most likely to limit clock rate.
- Changing `SR` changes the window size. `(16 + 2·SR)` must be a multiple
  of 4, and `MV_W` must hold ±SR plus the predictor range. Besides the
  default SR = 4, the engine testbench has also been run with SR = 2
  (its `SR` localparam changed), with all checks passing.
