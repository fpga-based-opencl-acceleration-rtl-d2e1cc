# Smith-Waterman alignment on a linear systolic array

This is the RTL of an FPGA accelerator for Smith-Waterman local alignment of
nucleotide sequences. Genome pipelines (GATK, BWA and similar) first place
short reads with a fast heuristic. They then re-align the doubtful ones with
the exact, and expensive, Smith-Waterman dynamic program: a read of 50-150
bases against a reference window of 250-500 bases. The accelerator takes a
batch of such read/reference pairs from the card's DDR3 memory and aligns 16
of them at once, one per kernel. Each kernel is a linear systolic array of 32
processing elements (PEs). It returns the best local-alignment score of each
pair and the cell where that score is reached.

The architecture follows a published OpenCL design for a Virtex-7 card,
which reported 77 GCUPS (billions of cell updates per second) with
16 kernels × 32 PEs at 200 MHz. That design was written in OpenCL; this is a
plain SystemVerilog rendering of it. Where the original description is
silent, on widths, encodings, handshakes and layouts, the choices made here
are listed in [Departures and choices](#departures-and-choices).

## The cell

For a sample (query) `q` and a reference `r`, the score matrix is

```
H(i,j) = max( H(i-1,j-1) + s(q_i, r_j),
              H(i-1,j)   - GAP,
              H(i,j-1)   - GAP,
              0 )
s = +MATCH if q_i == r_j else -MISMATCH,   H(0,*) = H(*,0) = 0
```

The result is the maximum of `H` and the position of one cell that holds it.
There is no traceback. The defaults are `MATCH=2`, `MISMATCH=1` and `GAP=1`,
a linear gap whose penalty equals the mismatch penalty. All three are module
parameters. Scores are 16-bit unsigned, since a local score is never
negative. Bases are coded in 2 bits: A=0, C=1, G=2, T=3.

`sw_pe` computes one cell per cycle. The west score `H(i,j-1)` arrives from
the previous PE in the same cycle. The north score `H(i-1,j)` is the PE's own
previous result. The northwest score `H(i-1,j-1)` is the west score it
received one row earlier. Both are held in the PE's flip-flops. On the first
row, north and northwest are forced to the zero boundary.

## The wavefront, and how a long reference is swept

This is the part to understand before changing anything.

**One strip.** PE `k` owns one reference column and holds its base. Sample
rows enter PE 0 one per cycle. Every PE hands the row (its sample base, its
row index and the score just computed) to the next PE one cycle later. So at
cycle `t`, PE `k` computes cell `(t-k, col_base+k)`. The cells computed in one
cycle lie on one anti-diagonal of the matrix. Each of the 32 PEs does useful
work on every cycle except during fill and drain.

```
cycle:    0    1    2    3    4   ...
PE 0:   r0   r1   r2   r3   r4
PE 1:        r0   r1   r2   r3
PE 2:             r0   r1   r2
PE 3:                  r0   r1         (rN = sample row N)
```

**Many strips.** A reference longer than the array is swept in strips of
`N_PE` columns: strip `s` covers columns `s*N_PE … s*N_PE+N_PE-1`. The only
data that crosses a strip boundary is the last column of the previous strip,
one score per row. While a strip runs, the score leaving the last PE for row
`i` is written to the *temporary cell array* at row `i`. During the next
strip, PE 0 reads row `i` back as its west input. Within a strip, row `i` is
read when it enters PE 0 and overwritten `N_PE` cycles later, so one array of
`MAX_SAMPLE_LEN` 16-bit entries serves every strip in place. In strip 0 the
west input is the zero boundary. Columns past the end of the reference in
the last, partial strip are computed but never counted as hits.

**The best cell rides along.** Each PE keeps the best cell of its own column
so far. With every row it forwards `max(best arriving from the west, own
column best)`. The row that leaves the last PE as the last sample row
therefore carries the best cell of the whole strip. The kernel folds each
strip's best into the running result. Ties keep the cell already held, so the
reported position is one of possibly several maximal cells.

**Strips overlap.** PE 0 does not wait for the old strip to drain. A new
strip starts every `P = max(M, N_PE)` cycles for a sample of `M` bases. When
`M >= N_PE`, the first row of strip `s+1` enters PE 0 in the cycle after the
last row of strip `s` did, while PEs further down are still finishing strip
`s`. Each PE therefore takes its reference base, column index and
column-valid flag at the moment the first row of a strip reaches it, and
keeps them for that strip. The kernel changes the strip inputs once per
period, and PE `k` latches them `k` cycles after PE 0 does. The inputs must
be stable for `N_PE` cycles, which `P >= N_PE` guarantees.

The same bound keeps the boundary column correct. Row `i` of strip `s`
leaves the last PE `N_PE` cycles after it entered PE 0. Row `i` of strip
`s+1` enters PE 0 `P` cycles after that, so it never arrives before its west
score exists. When the two coincide (`P = N_PE`, samples no longer than the
array), the score has not yet been written into the temporary cell array.
It is then forwarded straight from the last PE's output (the *bypass* in
`sw_kernel`). With a sample shorter than the array, PE 0 idles for
`N_PE - M` cycles per strip. This idle time of PEs is what makes very long
arrays lose efficiency on short reads.

**Timing.** A whole pair takes

```
SLOT_WORDS + 2 + (strips - 1) * max(M, N_PE) + M + N_PE   cycles, start to done
```

with `strips = ceil(R / N_PE)` for a reference of `R` bases. For
`M >= N_PE`, the only loss is one fill and drain of `N_PE` cycles per pair.

## Memory path

Data moves through four storage levels, each faster and smaller than the one
before:

| level | here | holds |
|---|---|---|
| global memory (card DDR3) | outside the RTL | packed pair records, result words |
| block RAM, `ramb_bank` | one bank of `SLOT_WORDS` × 64 bit per kernel | one pair record |
| distributed RAM, `seq_lutram` | two per kernel | sample and reference, 2 bits per base |
| flip-flops, `sw_pe` | per PE | scores of the cell being computed |

A **pair record** is `SLOT_WORDS = 1 + MAX_SAMPLE_LEN/32 + MAX_REF_LEN/32`
words of 64 bits (25 at the defaults). The records of a batch lie back to
back, pair `p` at word `src_base + p*SLOT_WORDS`:

| word | contents |
|---|---|
| 0 | `[15:0]` sample length, `[31:16]` reference length, rest 0 |
| 1 … MAX_SAMPLE_LEN/32 | sample, 32 bases per word, base `k` in bits `[2k+1:2k]` |
| then MAX_REF_LEN/32 words | reference, same packing |

Lengths above the maxima are clamped. A zero length gives score 0.

A **result word** is written for pair `p` at `dst_base + p`: score in
`[15:0]`, sample position in `[31:16]`, reference position in `[47:32]`
(both 0-based: the cell where the best local alignment ends), and zero in
`[63:48]`.

The sample store is read one base per cycle, the row entering PE 0. The
reference store is read `N_PE` bases at a time, one strip, and drives the
PEs' reference inputs directly. Both reads are asynchronous, as
distributed-RAM reads are.

## Batch sequencing (`sw_compute_unit`)

A batch runs in three phases, one after the other:

1. **Load.** `gmem_burst_reader` requests the `num_pairs × SLOT_WORDS` words
   in bursts of up to `BURST_LEN` words, with several bursts in flight. It
   writes each returned word into the bank of its pair, using counters, with
   no divider.
2. **Compute.** Kernels `0 … num_pairs-1` start in the same cycle. Each one
   copies its record from RAMB into its LUTRAMs (`SLOT_WORDS + 1` cycles) and
   sweeps its strips. The unit waits for the slowest kernel.
3. **Write.** `result_writer` writes one result word per pair.

`done` pulses when the last result write is accepted. `num_pairs` above
`NUM_KERNELS` is clamped. `num_pairs = 0` gets `done` in the next cycle.

### Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous reset, active low |
| `start` | in | 1 | one-cycle pulse, accepted while `busy` is low |
| `src_base`, `dst_base` | in | 32 | word addresses of the records and of the results |
| `num_pairs` | in | `$clog2(NUM_KERNELS+1)` | pairs in this batch |
| `busy`, `done` | out | 1 | batch running; end-of-batch pulse |
| `rd_req_valid/ready/addr/len` | out/in/out/out | 1/1/32/8 | burst read request; `len` in words; held until `ready` |
| `rd_data_valid`, `rd_data` | in | 1/64 | read data in request order, always accepted |
| `wr_valid/ready/addr/data` | out/in/out/out | 1/1/32/64 | single-word write; held until `ready` |

The memory channels are deliberately minimal valid/ready signals. To use the
design on a real card, put a bridge to the platform's memory controller
between them and it, for example an AXI master.

### Parameters

| parameter | default | origin |
|---|---|---|
| `NUM_KERNELS` | 16 | original design |
| `N_PE` | 32 | original design (the best of 8 to 128 PEs per kernel) |
| `MAX_SAMPLE_LEN` | 256 | chosen here, covers reads of 50-150 bases |
| `MAX_REF_LEN` | 512 | chosen here, covers windows of 250-500 bases; must be a multiple of `N_PE` |
| `BURST_LEN` | 16 | chosen here |
| `MATCH`, `MISMATCH`, `GAP` | 2, 1, 1 | chosen here |

Both maximum lengths must be multiples of 32, the number of bases in a word.

## Performance

At 200 MHz, 16 × 32 PEs give a peak of 102.4 GCUPS. In simulation at the
default size:

* 16 pairs of 256 × 512 bases: 2,097,152 cells in 4593 cycles, load and
  write-back included. That is 91.3 GCUPS at 200 MHz, against the 77 GCUPS
  the original design reports for its whole system.
* 16 pairs of random typical sizes (50-150 × 250-500): 39 GCUPS. All kernels
  of a batch wait for the longest pair. A host that groups pairs of similar
  size into a batch recovers most of the difference.

One kernel on one typical pair (150 × 500 bases), by array size:

| PEs per kernel | 8 | 16 | 32 | 64 | 128 |
|---|---|---|---|---|---|
| cycles | 9485 | 4843 | 2459 | 1291 | 755 |
| GCUPS at 200 MHz | 1.58 | 3.10 | 6.10 | 11.62 | 19.87 |

The original reports 3.2 GCUPS for one 32-PE kernel, about half the rate
here. The per-kernel rate keeps growing with the array. The original picked
32 PEs as the best trade-off for the whole device, between PEs left idle and
the area each kernel costs. This RTL does not model area, so that choice
cannot be re-derived from it.

The 200 MHz clock comes from the original design. It has not been checked
here by place and route.

## Departures and choices

These follow the original design: the recurrence with a linear gap; 16
kernels of 32 PEs; rows streamed through a linear PE array so that an
anti-diagonal is computed per cycle; strips with a one-short-per-row
temporary cell array; 2-bit bases in LUTRAM; RAMB staging filled by a burst
read of the whole batch; scores and positions returned per pair.

These are choices of this RTL:

* Score values, the base coding, the 64-bit word, the record and result
  layouts, and the memory handshakes.
* One RAMB bank per kernel, so that kernels never compete for a read port.
* The reference bases of a strip come from a wide LUTRAM read that drives
  all PEs. Each PE latches its base when the strip's first row reaches it.
  The bypass of the boundary score for short samples is this design's way
  of letting strips follow each other with no gap.
* Load, compute and write are not overlapped, and all kernels of a batch
  start together. A host that sorts pairs by length gets closer to peak.
* No traceback, no affine gaps, no score saturation. 16 bits hold the
  largest possible score, `2 × 256`.
* The original system also has a PCIe/DMA platform, host-side packing and
  unpacking software, and the DDR3 with its controller. They are not part of
  this RTL.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=F`. With Verilator 5, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/sw_pkg.sv tb/sw_tb_pkg.sv tb/tb_sw_compute_unit.sv \
  --top-module tb_sw_compute_unit -o sim && ./obj_dir/sim
```

Replace the testbench for another one. Verilator builds in two-state
logic, so the testbenches reset or initialise everything they read.

| testbench | what it checks |
|---|---|
| `tb_sw_pe` | each cell against the recurrence, the forwarded fields, the best cell, idle cycles, reference base and column held from the first row |
| `tb_sw_systolic_array` | one 8-PE strip: last-column scores, a latency of exactly `N_PE`, the strip best, columns past the reference end |
| `tb_sw_kernel` | whole pairs on 8 PEs: a worked example (ACTAGCAC vs ATCAGCAC scores 12, ending at (7,7)), random pairs, several and partial strips, both strip periods (long samples, and short ones using the bypass), maximum, clamped and zero lengths, exact cycle counts |
| `tb_seq_lutram`, `tb_temp_cell_array`, `tb_ramb_bank` | the memories against shadow copies |
| `tb_gmem_burst_reader` | words reach the right bank and address under request stalls, bursts in flight |
| `tb_result_writer` | result words under write back-pressure |
| `tb_sw_compute_unit` | 4 kernels × 4 PEs end to end with random memory stalls; exact compute-phase length; counts each mechanism (several strips, overlapped strips with and without the bypass, partial strip, several bursts, read and write stalls, idle kernels, full and empty batches, length clamping) and fails if one never happened |
| `tb_sw_compute_unit_full` | the default 16 × 32 configuration on two full batches, with GCUPS reported |
| `tb_pe_sweep` | one kernel at 8, 16, 32, 64 and 128 PEs on the same 150 × 500 pair: score, position, exact cycles, GCUPS |

`tb/sw_tb_pkg.sv` holds the reference model, a plain double loop over the
full matrix, and the record packer. `tb/gmem_model.sv` is a behavioural
global memory with a fixed latency and random `ready` stalls.

## Files

`rtl/sw_pkg.sv` (types, widths, record structs) · `rtl/sw_pe.sv` ·
`rtl/sw_systolic_array.sv` · `rtl/seq_lutram.sv` · `rtl/temp_cell_array.sv` ·
`rtl/sw_kernel.sv` · `rtl/ramb_bank.sv` · `rtl/gmem_burst_reader.sv` ·
`rtl/result_writer.sv` · `rtl/sw_compute_unit.sv` (top).
