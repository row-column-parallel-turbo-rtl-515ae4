# Row-column parallel turbo decoder for product codes

A block turbo code (a product code) arranges its bits in an n × n matrix in which
every row and every column is a codeword of a short component code. It is decoded
iteratively. A soft-input soft-output (SISO) decoder works through the rows, then
through the columns, and so on. Each pass hands "extrinsic" reliability values W
to the next pass. A conventional high-speed decoder uses one SISO decoder per
half-iteration. Between two of them it needs a memory block that rebuilds the
matrix, because rows come out row by row while column decoding needs whole
columns.

This design decodes the rows and the columns at the same time. A row decoder and
a column decoder share one matrix W of extrinsic values. Each writes its results
back as soon as it has decoded a codeword. Every row and every column is an
independent codeword, and the order in which a codeword's symbols are visited is
free. So the two decoders can work on the same matrix as long as they never
touch the same symbol in the same cycle. Each decoder then always reads the
latest extrinsic values. No memory is needed to rebuild the matrix between row
and column decoding.

The architecture is the one published by C. Jégo and P. Adde in "Row-column
parallel turbo decoding of product codes". The published work gives the block
diagram, the access rule and the memory organisation. The SISO algorithm, the
fixed-point formats, the timing and the interfaces here are this design's own
choices. They are marked as such below.

## The code

- Component code: the extended BCH code of length n = 2^m with single-error
  correction, i.e. a cyclic Hamming code of length 2^m − 1 plus an overall parity
  bit. Its minimum distance is 4, and for n = 32 it is the (32,26) code.
- Position p < n−1 has the parity-check column α^p in GF(2^m). The primitive
  polynomials are x^5+x^2+1, x^6+x+1 and x^7+x^3+1 for n = 32, 64 and 128
  (`pc_pkg::prim_poly`). Position n−1 is the parity bit.
- The testbenches encode systematically. Positions 0..m−1 (unit-vector columns)
  and n−1 are check bits, and the others carry information.
- Modulation: bit 0 is sent as +1 and bit 1 as −1, so a sample's sign bit is its
  hard decision.

## How the two decoders share the matrix

`rc_scheduler` steps both decoders in lock step through codeword slots
t = 0..n−1, and repeats this for `NUM_ITER` iterations. In slot t:

| step i = 0..n−1 | row decoder         | column decoder              |
|-----------------|---------------------|-----------------------------|
| symbol visited  | (row t, column i)   | (row n−1−i, column t)       |
| position in its codeword | i          | n−1−i                       |

The row decoder starts at the first symbol of its row, and the column decoder
starts at the last symbol of its column. This is the published rule j = n − i,
written with 0-based indices. The two would address the same symbol only if
2t = n−1, which is impossible for even n. An assertion in `rc_turbo_decoder`
checks this every cycle.

Things to know about this schedule:

- **Freshness.** When row t is decoded, columns 0..t−1 have already been decoded
  in this iteration, so their W values are new. The same holds the other way
  round for the column decoder. The end-to-end testbench counts these reads
  (11 904 per three blocks at n = 32).
- **The diagonal.** Symbol (t, t) is written by both decoders in slot t, in
  different cycles: by the row decoder at step t and by the column decoder at
  step n−1−t. The later write wins. For t < n/2 that is the column decoder,
  otherwise the row decoder.
- **One codeword at a time.** Each decoder holds a single codeword, as the
  published architecture requires. A slot therefore runs four phases in turn:
  - a start pulse (1 cycle);
  - n read cycles, where each decoder reads R and W of one symbol per cycle;
  - a wait while the decoders search, 2^P + 2 cycles;
  - n write cycles, where each decoder writes the new W of one symbol and emits
    its decision.

A block therefore takes `NUM_ITER · n · (2n + 2^P + 3) + 1` cycles, from
`blk_start` to `blk_done`. At the defaults (n = 32, P = 4, 8 iterations) that is
21 249 cycles. The first decisions appear n + 2^P + 4 cycles after `blk_start`. The published latency of
k·(n² + n) symbol periods assumes one symbol per cycle per decoder. This design
does not reach it, because it does not overlap the write-back of one codeword
with the reading of the next. Overlapping would give each decoder a second
access per cycle, i.e. four ports on W.

## The elementary decoder (`elementary_siso`)

It follows the published elementary decoder diagram:

    R'_k    = R + α_k · W_k
    W_{k+1} = F_k − R'_k        (R'_k kept in a delay line)
    D_k     = decision

The delay line for R'_k is the symbol store inside `siso_core`. The published
diagram also delays R itself towards the next stage. That delay is not needed
here, because both decoders read R again from the R memory.

Fixed point (own choice):

| quantity    | format                                                             |
|-------------|--------------------------------------------------------------------|
| R and W     | q = 5-bit signed, saturated symmetrically to ±15                   |
| R'          | 6 bits, ±31                                                        |
| α           | unsigned, 4 fractional bits (16 = 1.0); the product is rounded down |
| β           | unsigned, in units of one W LSB                                    |

α and β are inputs of the top level, one pair per half-iteration: rows use index
2·iter and columns use 2·iter+1.

## The SISO decoder (`siso_core`), the hardest part

The published work treats the SISO decoder as a box. This implementation uses
the Chase-Pyndiah algorithm in a plain serial form.

1. **Load, n cycles.** Each symbol r'_p is stored, and its sign is the hard
   decision y_p. The syndrome and overall parity of y accumulate on the fly. An
   insertion network keeps the P least reliable positions, sorted by |r'|; on
   equal magnitudes the earlier arrival ranks first.
2. **Search, 2^P cycles, one test pattern per cycle.**
   - Pattern e flips the least reliable positions chosen by its bits. Its
     syndrome and parity are updated from the flipped columns.
   - A nonzero syndrome equals the column of exactly one position, which is
     then flipped. The parity bit is set last.
   - Each candidate is stored as a difference mask against y, with its metric:
     the sum of |r'_p| over the positions where it differs from y. This is the
     squared Euclidean distance up to a constant and a factor of 4.
   - The smallest metric gives the decision D. On ties the lowest pattern index
     wins.
3. **Output, combinational per queried position p.**
   - The best candidate that differs from D at p is the competitor C. If it
     exists, F_p = (M_C − M_D)·s(d_p), with s(0) = +1 and s(1) = −1.
   - Otherwise F_p = r'_p + β·s(d_p), so the extrinsic value is W = β·s(d_p).
   - F is saturated to 7 bits. That is exact for W, which is saturated to 5 bits.

The storage is n·(q+1) bits of symbols plus 2^P masks of n bits and their
metrics: at n = 32, 110 flip-flops and 1712 bits of small arrays. The metric sum
is an n-input adder evaluated once per search cycle. It is probably the longest
combinational path of the design; no timing analysis has been run.

## Memories (`memory_block`, `tdp_ram`)

There are three n × n matrices, each with two ports, as in the published memory
block (q·n² bits each):

- **W** (extrinsic): port A belongs to the row decoder and port B to the column
  decoder.
  - Each word has one extra tag bit. A word whose tag differs from the current
    block's tag reads as zero, so W starts every block at zero without a
    clearing pass.
  - W is cleared once after reset, through both ports, in n²/2 cycles.
- **R0 and R1** (channel samples): they work as a ping-pong pair.
  - The matrix being decoded is read by the row decoder on port A and the column
    decoder on port B.
  - The other matrix is filled from the channel on port A, so loading the next
    block overlaps decoding.

Compared with a cascaded decoder, whose memory block has four such matrices
(two for W, two for R) and which needs two memory blocks per iteration, this is
three matrices instead of eight per iteration.

`tdp_ram` is a plain array with synchronous, read-before-write ports. It is meant
to be replaced by a true dual-port SRAM macro. An assertion forbids two writes to
one address in the same cycle.

## Top level (`rc_turbo_decoder`)

Parameters: `N` (code length, 32), `P` (least reliable positions, 4),
`NUM_ITER` (8).

| port | direction | meaning |
|------|-----------|---------|
| `in_valid`, `in_ready`, `in_r[4:0]` | in / out / in | channel samples of one block, row by row, N² per block; `in_ready` is low while both R matrices are full or W is being cleared after reset |
| `alpha_tab[2*NUM_ITER]`, `beta_tab[2*NUM_ITER]` | in | α (5 bits, 4 fractional) and β per half-iteration; keep static during a block |
| `row_d_valid`, `row_d`, `row_d_row`, `row_d_col` | out | decisions of the row decoder with their matrix coordinates |
| `col_d_valid`, `col_d`, `col_d_row`, `col_d_col` | out | decisions of the column decoder |
| `d_iter`, `d_last` | out | iteration of those decisions; `d_last` marks the final one |
| `blk_start`, `blk_done` | out | one-cycle pulses at the start and end of a block |

Both decisions of the last iteration form the decoded block. Each symbol appears
once in the row stream and once in the column stream. Reset is asynchronous and
active low. The same hardware is reused for all iterations of a block. The
published diagram shows the hardware of one iteration, and it could instead be
replicated NUM_ITER times for throughput.

## Sizes

Codes of length 32, 64 and 128 were evaluated for this architecture. The default
build is n = 32. n = 64 and n = 128 are a change of the `N` parameter:

- the matrices grow to 4096 and 16384 words;
- the SISO stores grow linearly in n;
- the primitive polynomials for m = 3..8 are built in.

Changing `P` trades decoding quality for search cycles (2^P per codeword).

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. `tb/tb_ref_pkg.sv` holds the reference models.
They are written separately from the RTL: whole candidate codewords, a selection
sort, and a shift-register Galois field.

| testbench | what it checks |
|-----------|----------------|
| `tb_siso_core` | 300 words (noise, noisy codewords, single strong error), natural and reversed feed order: every d, F and stored r' against the model; every decision is a codeword; a single error is corrected; `done` 2^P cycles after the last symbol |
| `tb_elementary_siso` | 200 words with random α, β and W: new W and D against the model, done timing |
| `tb_tdp_ram` | random two-port traffic against a shadow array, read-before-write |
| `tb_memory_block` | clearing time, W tag clearing, ping-pong loading while W is written |
| `tb_rc_scheduler` | order, addresses, no clash, feed delay, phase lengths, pass length |
| `tb_rc_turbo_decoder` | default parameters, three blocks back to back |
| `tb_rc_workloads` | one block each at n = 64 and n = 128, same checks as the end-to-end test |

`tb_rc_turbo_decoder` compares every decision of every half-iteration of both
decoders with a bit-exact model of the schedule. It checks that the final
decisions equal the sent bits: all 93 channel errors are corrected at an SNR of
about 5 dB Eb/N0. It also checks the block time and the time to the first
decision. It counts and requires:

- input back-pressure;
- loading during decoding;
- R swaps;
- same-iteration extrinsic reuse;
- both soft-output cases.

The α and β schedules in the testbenches are own choices in the style of
published turbo product code decoders. They are not tuned. The bit-error-rate
curves of the original work were not reproduced.

Running a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/pc_pkg.sv tb/tb_ref_pkg.sv tb/tb_rc_turbo_decoder.sv \
        --top-module tb_rc_turbo_decoder
    ./obj_dir/Vtb_rc_turbo_decoder

Replace the testbench name for the others. The end-to-end test takes well under a
second and n = 128 takes a few seconds.

## Where this design departs from, or goes beyond, the published architecture

- SISO algorithm, number of test patterns (P = 4), metric and soft-output rule:
  own choice. The published work uses a SISO decoder without describing it.
- Quantisation q = 5 and every fixed-point format: own choice. No value is
  published.
- Timing: serial read / search / write per codeword, so the block time is about
  twice the published k·(n² + n).
- Which row pairs with which column (row t with column t), and the handling of
  the diagonal symbol: own choice.
- W cleared by block tags, R used as a ping-pong pair, valid/ready input: own
  choice.
- Iterations reuse one stage instead of cascading one stage per iteration.
- The conventional cascaded decoder used for comparison is not part of this RTL.
