# Smith-Waterman block kernel for long DNA sequences

This RTL computes the optimal local alignment score of two DNA sequences
that may be millions of bases long. It does not need a chip large enough for the
whole problem. The alignment matrix is cut into vertical strips ("blocks")
BW columns wide. A fixed array of BW cells sweeps each strip from top to
bottom, taking one matrix row per clock. Only a single column of
values goes from one strip to the next, through external (global) memory. The
on-chip state is therefore independent of the sequence lengths: BW cells,
each holding a few scores.

The design is the hardware form of a published OpenCL kernel for Intel/Altera
FPGAs (Stratix V). That kernel was built by fully unrolling the inner loop over the
BW columns of a block, and it was run as one kernel invocation per block
under a host program. The block decomposition, the data each invocation reads
and writes, the per-row memory traffic, the one-row H/F buffers and the
scoring all follow that description. The cycle-level structure is this
design's own. That structure covers the cell wavefront, the load/store units,
the handshakes and the stall rule, and the OpenCL compiler would have generated it.

## The recurrence

For S1 (m residues, rows i) and S2 (n residues, columns j), with affine gap
penalties:

    E(i,j) = max( H(i,j-1) - Goe , E(i,j-1) - Ge )          horizontal gap
    F(i,j) = max( H(i-1,j) - Goe , F(i-1,j) - Ge )          vertical gap
    H(i,j) = max( 0 , H(i-1,j-1) + SM(S1[i],S2[j]) , E(i,j) , F(i,j) )

H, E and F are 0 on row 0 and column 0. The score is the largest H anywhere
in the matrix. `Goe` is the gap-open plus gap-extension penalty and `Ge` the
extension penalty. Both are passed as positive numbers and subtracted. `SM` is
`match_sc` when the two bases are equal and `mismatch_sc` otherwise. The
reference scoring is +1 / -3 with gap open 5 and extension 2, which gives
`match_sc=1, mismatch_sc=-3, goe=7, ge=2`.

Every cell needs its left, upper and upper-left neighbours. E flows along a
row, F flows down a column, and H flows both ways.

## Blocks and the host loop

S2 is padded to NB*BW residues, where NB = ceil(n/BW). The padding uses a
residue code that never matches, not even itself. The host then runs the
kernel NB times, with b = 0 .. NB-1:

```
zero prevH[0..m-1], prevE[0..m-1], maxScore
for b in 0 .. NB-1:
    run sw_kernel(b, prev = (prevH, prevE), cur = (curH, curE))
    swap(prevH, curH); swap(prevE, curE)
read maxScore
```

Invocation b reads row i's H and E from the last column of block b-1, which
is `prevH[i]` and `prevE[i]`. It writes row i's H and E from its own last column
to `curH[i]` and `curE[i]`. Separate read and write buffers mean an invocation
never reads what it is writing. For block 0 the zeroed buffers are column 0 of
the matrix.

A padded column can never hold the best score. Its diagonal term is below
the H it came from, and its E and F are below some real H, so the padding
changes nothing.

At the end of a block the kernel reads `maxScore` and compares it with the
best H of the block. It writes the block's value back only if that value is
larger.

## The cell array (`sw_array`, `sw_pe`)

This is the part that sets the throughput. It is also the least obvious part.

**One cell per column.** Cell j of the array holds residue S2[b*BW+j], which
is loaded once per block. It also holds three scores that carry over from one
row to the next:

| register | meaning for the next row i |
|----------|----------------------------|
| `h_up`   | H(i-1, j): this column's entry of the one-row H buffer |
| `f_up`   | F(i-1, j): this column's entry of the one-row F buffer |
| `h_diag` | H(i-1, j-1): the H that arrived from the left with the previous row |

The kernel's "one row of H and one row of F" buffers are therefore spread
over the cells, one entry each.

**Rows as a wavefront.** A row enters cell 0 as a token carrying
S1[i], prevH[i] and prevE[i]. A cell computes E, F and H for its column and
registers the result. On the next clock it hands H, E and S1[i] to its right
neighbour. Row i is in cell j at clock t0 + i + j, so row i+1 is one cell
behind row i:

```
clock:      t0   t0+1  t0+2  t0+3  ...
cell 0:     r0   r1    r2    r3
cell 1:          r0    r1    r2
cell 2:                r0    r1
```

When cell j works on row i, its `h_up` and `f_up` were written by row i-1 one
clock earlier. The horizontal values H(i,j-1) and E(i,j-1) arrive with the
token. All three dependences are therefore met with one register per cell.
The array holds BW rows in flight and performs BW cell updates per clock in
steady state. Row i leaves the last cell BW clocks after it entered. Its H and
E at that point are the block's last column.

**Best score.** Each cell keeps the largest H it has produced since the
block started (`clear`). `sw_max_reduce` folds the BW values with a binary
tree once the last row has left.

**Stalls and bubbles.** A token carries a valid bit. A missing token, for example
when a load has not returned yet, is a bubble: cells that see it change nothing.
If the two last-column store units cannot both take the result waiting at the
array's output, `en` drops and every cell holds for that clock. Rows never
overtake each other, so the results leave in row order.

## Kernel sequencing and memory ports (`sw_kernel`)

A `start` pulse samples all arguments and starts five load units and two
store units together. The S1, prevH, prevE and maxScore loads prefetch into
their FIFOs while S2 is loading. States:

1. `K_LOAD_S2` loads BW residues from `s2_base + b*BW` into the cells.
2. `K_ROWS` issues a row token whenever S1[i], prevH[i] and prevE[i] are all
   available. Results stream to `cur_h_base + i` and `cur_e_base + i`. The
   state ends when m results have been accepted.
3. `K_MAX` and `K_MAX_WR` compare the block maximum with the loaded maxScore
   and write it back if it is larger.
4. `K_FINISH` waits until memory has accepted every store, then pulses `done`.

Each array has its own memory port, as independent load/store units do. All
addresses count elements, not bytes. The ports are listed below.

| port index | direction | element | array |
|---|---|---|---|
| `rr_*[0]` | read  | 8-bit residue | S1 |
| `rr_*[1]` | read  | 8-bit residue | S2 (the block's BW residues) |
| `sr_*[0]` | read  | W-bit score | prevH |
| `sr_*[1]` | read  | W-bit score | prevE |
| `sr_*[2]` | read  | W-bit score | maxScore (one word) |
| `sw_wr_*[0]` | write | W-bit score | curH |
| `sw_wr_*[1]` | write | W-bit score | curE |
| `sw_wr_*[2]` | write | W-bit score | maxScore (only when improved) |

Rules of the ports:

- A read request is `req_valid`/`req_addr`, and it is taken when `req_ready`.
- Responses (`rsp_valid`/`rsp_data`) come back in request order, after any latency, and cannot be stalled.
- A load unit has at most DEPTH (default 8) requests plus buffered words outstanding. Full rate therefore needs the memory round trip to stay below DEPTH clocks.
- Writes are posted: a write is done once `wr_ready` has taken it.

Residues use codes 0..3 for A, C, G and T. Any other byte (4..255) is
treated as padding or an unknown base and never matches.

## Timing and throughput

If memory never pushes back, one block takes about BW + m + BW clocks plus a few clocks of memory latency:
the S2 load, the rows, and the array drain. That gives

    cell updates per clock = BW * m / (m + 2*BW + c)

which approaches BW for long S1. At BW = 256 and m = 10 000 the efficiency is
about 95 %. This is why throughput grows with sequence length. For scale:
the 32-bit, BW = 256 OpenCL kernel reached about 37.7 GCUPS, which is
256 updates per clock at roughly 147 MHz.

## Configurations

| parameter | default | meaning |
|---|---|---|
| `BW` | 256 | block width = number of cells |
| `W`  | 32  | score width (32 = int, 16 = short, 8 = char) |
| `ADDR_W` | 32 | element address / length width |
| `DEPTH` | 8 | per-load-unit FIFO depth and request credits |

The evaluated kernels were int_bw32/64/128/256, short_bw256/512 and
char_bw512/768. Each is a setting of `BW` and `W`. Narrow scores use fewer
resources, but a score larger than 2^(W-1)-1 wraps around and the result is
wrong. Nothing detects this. Pick W for the largest score you expect. Of the
ten evaluation pairs, three had scores too large for 16 bits, and only three
could be run with 8 bits.

The ten evaluation pairs run from 10K x 10K up to 23M x 25M. All of them fit
the default configuration: 32-bit scores, lengths below 2^32, and about
0.4 GB of global memory for the largest pair.

## Files

Files in `rtl/`:

- `sw_pkg.sv`: residue codes, the match rule, and the kernel state enum.
- `sw_pe.sv`: one cell.
- `sw_array.sv`: BW cells, the S2 registers, and the max tree.
- `sw_max_reduce.sv`: the maximum tree.
- `sw_fifo.sv`: a small FIFO.
- `sw_rd_stream.sv` and `sw_wr_stream.sv`: the load and store units.
- `sw_kernel.sv`: the top.

Testbenches in `tb/`:

| testbench | what it covers |
|---|---|
| `tb_sw_pe` | one cell against the recurrences. Covers stalls, bubbles, padding and a change of scoring. |
| `tb_sw_array` | BW=8 array against a direct block evaluation. Covers the BW-clock latency, random bubbles and stalls. |
| `tb_sw_max_reduce` | power-of-two and odd input counts. |
| `tb_sw_rd_stream` and `tb_sw_wr_stream` | data, addresses, counts and done, with random back-pressure and full rate. |
| `tb_sw_kernel` | BW=16, eight alignments block by block, clean and back-pressured memory. Every mechanism is counted: multi-block alignments, buffer swaps, padding, best-score update and keep, stalls, load back-pressure. |
| `tb_sw_kernel_full` | the default configuration (BW=256, W=32) on a 1000 x 1000 alignment, with the per-block cycle count checked. |
| `tb_sw_workload_10k` | default configuration, 10K x 10K (40 blocks), about 10 s in Verilator. |
| `tb_sw_kernel_short512` and `tb_sw_kernel_char768` | the 16-bit/BW=512 and 8-bit/BW=768 settings. |

`tb_sw_host` is not a testbench on its own. It holds the host loop, a fixed-latency
memory model per port, and a plain row-by-row Smith-Waterman reference. The
sequences are synthetic: S1 is random, and S2 is partly a mutated copy of S1.
The reference checks the final score and every block-boundary column.

To run one testbench:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/sw_pkg.sv \
          tb/tb_sw_kernel.sv --top-module tb_sw_kernel
./obj_dir/Vtb_sw_kernel
```

Each testbench ends with a line `TB_RESULT checks=N failures=F`.

## How far to trust it, and where it departs from the OpenCL kernel

- The scores are exact for all tested sizes and settings. The end-to-end
  tests compare every block-boundary column and the final score with an
  independent reference. The real NCBI sequence pairs are not included, so
  the scores printed for them have not been reproduced.
- Any real board memory differs from the memory model. A real memory needs an adapter from
  these simple element-addressed ports to its own interface, and possibly
  wider bursts. The PCIe/DMA path and the host software are not part of
  the RTL.
- Timing has not been closed on any device. The critical path is one cell:
  two subtract-and-compare stages, then a four-way maximum on W bits. The
  stall enable fans out to all BW cells. Pipeline it if that limits the clock.
- The result-store back-pressure freezes the whole array. A design that
  must tolerate a slow write path without losing throughput would add an
  output FIFO instead.
- `sw_max_reduce` is combinational over BW inputs. It is read only after
  the last row has drained, so it could take several clocks and be made a
  multicycle path, but that is not done here.
