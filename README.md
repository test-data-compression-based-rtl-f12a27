# Variable-to-variable reusable Huffman test-data decompressor

An IP core with `N_SC` parallel scan chains is tested with a fixed, pre-computed
test set. The test set is stored compressed on the tester (ATE) and is
decompressed on chip. This RTL is that on-chip decompressor.

The compression is Huffman coding used variable-to-variable. Every scan slice
(the `N_SC` bits that enter the chains in one shift) is cut into pieces of
several sizes. Each Huffman codeword stands for one fully specified *distinct
block* of a given size. There are four sizes in the default configuration: a
whole slice, a half, a quarter and an eighth (one 8-bit *primitive part*).

The key idea is that codewords are **reusable**. A codeword of a long block
may also encode a shorter piece. It then stands for the leading bits of that
block. The stream does not say how much of a block to use. The decoder works
it out from where in the slice it is. A primitive part that matches no block
is sent raw, after a reserved "failed" codeword. Two optional transformations
invert whole scan chains (T1) or single scan cells (T2) before compression.
They make zeros more common, and the decoder undoes them on the fly.

Default configuration: 64 scan chains, 8-bit primitive parts, 24 distinct
blocks plus the failed codeword (25 codewords), 5 ATE channels, T1 plus 50
T2 cells, and 4 slices per test vector.

## How much of a block a codeword produces

The decoder keeps `s`, a `MAX`-bit counter of the primitive parts of the
current slice that are already filled (`2^MAX` parts per slice; `MAX = 3`
with 64 chains). A block of level `r` (a "P_r-block") covers
`2^(MAX-r)` primitive parts: level 0 is a whole slice and level `MAX` is one
primitive part.

A piece that starts at `s` may be at most as large as the largest power of
two that divides `s`. With `q` trailing zero bits in `s` (`q = MAX` for
`s = 0`), the largest piece has level `MAX-q`. A codeword of a level-`r`
block therefore fills

    j      = max(r, MAX - q)          level of the piece actually decoded
    parts  = 2^(MAX - j)              primitive parts written, s .. s+parts-1
    bits   = first parts*PSIZE bits of the block

Parts decoded for each `s` and block level, with 8 parts per slice:

| s (binary) | P_0 block | P_1 block | P_2 block | P_3 block |
|-----------:|:---------:|:---------:|:---------:|:---------:|
| 000        | 8         | 4         | 2         | 1         |
| 001        | 1         | 1         | 1         | 1         |
| 010        | 2         | 2         | 2         | 1         |
| 011        | 1         | 1         | 1         | 1         |
| 100        | 4         | 4         | 2         | 1         |
| 101        | 1         | 1         | 1         | 1         |
| 110        | 2         | 2         | 2         | 1         |
| 111        | 1         | 1         | 1         | 1         |

The encoder must respect the same rule. A codeword may stand for a shorter
piece only where no larger piece can start. Each codeword always means "as
much of this block as fits here".

The write is cheap because a piece of `2^k` parts always starts at a multiple
of `2^k`. The Distinct Block unit drives `2^(MAX-k)` copies of the block's
first `2^k` parts across the full slice width. The Block Size/Enable unit then
enables only the register parts `s .. s+2^k-1`. No shifter is needed. A raw
(failed) part is copied `2^MAX` times in the same way.

## Slices that do not split evenly

When `N_SC` is not a multiple of `2^MAX`, every halving gives the extra bit
to the first half. For example, 50 chains split into 25+25, then 13+12+13+12,
then primitive parts of 7,6,6,6,7,6,6,6 bits. A piece of level `i` therefore
has `ceil(N_SC/2^i)` or `floor(N_SC/2^i)` bits. A block is stored at full
length and a piece uses as many of its leading bits as it is wide.

The replication idea carries over unchanged. Each output bit of the Distinct
Block unit reads, for each piece size, a fixed block bit: its distance from
the first chain of its aligned group. It is still a wire pattern and a
`MAX+1`-way multiplexer per bit. A failed part carries as many raw bits as
the primitive part at `s` is wide. `raw_short` tells the input buffer to take
`PSIZE-1` bits instead of `PSIZE`.

## Compressed stream format

This is what an encoder has to produce for this RTL:

* The stream is a sequence of codewords, sent slice by slice, with slices in
  order 0, 1, ... of each test vector. Each slice's pieces are in ascending
  order of `s`.
* A codeword is sent most significant bit first: its first bit is the branch
  taken at the root of the code tree.
* The code is the **canonical** Huffman code for a table of codeword lengths
  (`CODE_LEN`). Codewords are sorted by length and, within one length, by
  index. Each gets the previous value plus one, shifted left whenever the
  length grows. Any Huffman tree can be re-expressed this way without changing
  compression.
* Codeword index `k < M` is distinct block `k`. Index `M` is the failed
  codeword. It is followed by the part's raw bits (`PSIZE`, or `PSIZE-1` for
  a short part), the first one for the lowest-numbered chain of the part.
* Block bit 0 is the block's first bit. It lands on the lowest-numbered scan
  chain of the piece it is decoded to. Slice bit `c` feeds scan chain `c`.
* The stream is the transformed test set: it holds data after T1/T2
  inversion, and the decoder inverts back.
* The stream is packed into `ATE_W`-bit words. Word bit 0 is sent first.

## Units

| Unit | File | Role |
|------|------|------|
| Input buffer | `rtl/input_buffer.sv` | `PSIZE+ATE_W`-bit queue. It takes ATE words, hands one bit per cycle to the FSM unless `stop`, and gives the oldest `PSIZE` bits in parallel for a failed part. `ate_sync` asks the tester for data. |
| Huffman FSM | `rtl/huffman_fsm.sv` | Walks the code tree one bit per cycle. It has one state per internal tree node (`NCODE-1` states, 5 state bits for 25 codewords), with the next-state table built from `CODE_LEN` at elaboration. At a leaf it raises `code_valid` (which is also `stop`) with `code_index` and `failed`, and holds them until acknowledged. |
| Block Size/Enable | `rtl/block_size_enable.sv` | Holds `s`, applies the size rule above, and drives `size_q` and the per-part enables. It acknowledges the codeword. It flags the load that completes a slice. A failed codeword waits until its raw bits are in the buffer. |
| Distinct Block | `rtl/distinct_block.sv` | Block ROM (`M x N_SC` bits) plus the replication network. |
| Slice counter | `rtl/slice_counter.sv` | Index of the slice being built inside the test vector (0 .. `W_SC-1`). The T2 decoder needs it. |
| Invert unit | `rtl/invert_unit.sv` | XOR with the constant T1 chain mask and with the T2 cells that belong to the current slice. |
| Register | `rtl/slice_register.sv` | `N_SC` flip-flops loaded part by part. It gives a one-cycle `scan_shift` when a slice is complete. |
| Top | `rtl/vrh_decompressor.sv` | Wires the above. |
| Package | `rtl/vrh_pkg.sv` | Default sizes and the example code tables. |

## Interface and timing of `vrh_decompressor`

* `clk`, `rst_n`: one clock; asynchronous active-low reset.
* `ate_data[ATE_W-1:0]`, `ate_valid`, `ate_sync`: a word is taken at a rising
  edge where `ate_valid` and `ate_sync` are both high. A tester slower than
  the system clock (`f_SYS/f_ATE = r`) simply leaves `ate_valid` low between
  words.
* `scan_data[N_SC-1:0]`, `scan_shift`: while `scan_shift` is high (one cycle
  per slice), `scan_data` holds a complete slice. Shift it into the chains at
  the edge that ends that cycle. `last_slice` accompanies the last slice of
  each test vector.

Throughput: a codeword of `L` bits takes `L` cycles to recognise plus one
cycle to load. The raw bits of a failed part are taken in parallel in that
load cycle. The decoder never takes more than one stream bit per cycle. A
tester that delivers more than that (5 channels with `f_SYS/f_ATE` below 5)
is throttled through `ate_sync`. A slower tester sets the pace itself.

## Configuring it for a test set

All test-set-specific content is a parameter of `vrh_decompressor`, in flat
packed vectors (entry `k` at `[k*W +: W]`):

| Parameter | Entry width | Meaning |
|-----------|-------------|---------|
| `CODE_LEN` | `LW` | Huffman codeword length of codeword `k` (0..M), at most `LMAX`; must form a complete code, as every Huffman code does. |
| `BLOCK_LEVEL` | `LVW` | Level `r` of distinct block `k`. |
| `BLOCKS` | `N_SC` | Bits of distinct block `k`; only the first `PSIZE*2^(MAX-r)` are used. |
| `T1_MASK` | 1 | Chain `c` inverted by T1. |
| `T2_CELLS` | `CW` | `slice*N_SC + chain` of each T2 cell (`T2_NUM` entries). |

The defaults in `vrh_pkg` are an example code of the right shape, not a real
test set. The code lengths are 3 bits for blocks 0, 1 and the failed
codeword, 4 for blocks 2-5, 5 for 6-13, 6 for 14-19 and 7 for 20-23. Blocks
0-3 are whole slices, 4-9 halves, 10-15 quarters and 16-23 primitive parts.
Block contents come from a xorshift sequence. T1 inverts chains with
`c mod 7 = 3`. T2 cell `k` is number `(37k+11) mod (W_SC*N_SC)`.

Sizes: the top is sized by `N_SC` and `MAX`. The largest primitive part has
`PSIZE = ceil(N_SC / 2^MAX)` bits. With 8-bit parts this gives 16, 64 and 128
chains for `MAX` = 1, 3 and 4. `W_SC` is the scan length in slices. It is only
used to place T2 cells. Setting `T2_NUM = 0` and `T1_MASK = 0` gives the
variant without transformations.

Scan lengths of common benchmark cores, from their published scan-cell
counts: s5378 214 cells, s9234 247, s13207 700, s15850 611, s38417 1664,
s38584 1464. With 64 chains, only s5378 and s9234 fit the default
`W_SC = 4`. The others need `W_SC` = 11, 10, 26 and 23. The compressed stream
itself has no size limit, since nothing stores it on chip.

## Departures and choices beyond the method

* The codeword-to-tree assignment is canonical. Any Huffman code with the
  same lengths compresses equally well, so this costs nothing. An encoder must
  emit this assignment.
* The handshakes are this design's own, as is the queue depth and the
  one-cycle `scan_shift` pulse. The handshakes are `ate_valid`/`ate_sync`,
  `code_valid`/ack, and a failed codeword waiting for its raw bits.
* The slice counter's role is this design's reading. It gives the T2 decoder
  the slice position and marks the end of a test vector. The scan capture
  cycle between vectors is left to the test controller, through `last_slice`.
* The failed codeword is given index `M`.
* The method says that half of the parts are one bit shorter, but not which
  half. Here it is the second part of every split.
* The register drives the scan chains directly. A new piece cannot be
  written in the cycle `scan_shift` is high, because the next codeword needs
  at least one more cycle. An assertion in `slice_register` guards this.

## How far it has been checked

* Every unit and both end-to-end testbenches pass in Verilator. The RTL
  elaborates and synthesises at word level in Yosys. At the default size
  the decompressor has 100 flip-flops; the rest is the block ROM, the
  replication multiplexers and the small FSM.
* The example code tables are not taken from any real test set.
  Compression ratios and gate counts depend on the real tables and were
  not reproduced.
* No encoder is included. The testbenches generate legal streams
  themselves, and that generation is the reference for the stream format
  above.

## Simulating

Each unit has a self-checking testbench `tb/<unit>_tb.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. For example:

    verilator --binary --timing --assert -Irtl -Itb rtl/vrh_pkg.sv \
        tb/vrh_decompressor_tb.sv --top-module vrh_decompressor_tb -o sim
    ./obj_dir/sim

`vrh_decompressor_tb` runs the whole decompressor at its default size. The
testbench plays encoder and tester: it invents 159 test vectors of 4 slices,
the size of the s9234 test set. For each part it randomly chooses a failed
part or a random block. It computes the expected slices, including T1/T2,
and the canonical codewords independently of the RTL. It then feeds the
stream with random tester idle cycles. It checks every slice shifted out and
`last_slice`. It also checks the cycle count against the rate of one cycle
per codeword bit plus one per codeword. It requires each of these to have
occurred at least once: a whole-block decode, a reused (truncated) decode, a
failed part, a T2 inversion, a vector wrap, tester back-pressure and a failed
codeword waiting for its raw bits.

`vrh_configs_tb` runs the same kind of end-to-end test on four other sizes,
side by side:

* 16 chains, no transformation, 14 slices per vector.
* 128 chains, T1 plus 100 T2 cells, 13 slices per vector.
* 64 chains, T1 plus 100 T2 cells, 23 slices per vector.
* 50 chains, uneven parts of 7 and 6 bits.

It also runs two 64-chain cases with a tester clocked 2 and 10 times slower
than the decoder (5 ATE channels). Each checks the run time against the
slower of the two rates. With the example code a slice takes about 22 cycles
at r = 2, where the decoder sets the pace. It takes about 45 cycles at
r = 10, where the tester does.

`block_size_enable_tb` checks the table above cell by cell. It also checks
the short parts of the 50-chain slice.

The testbenches need only Verilator 5 (`--timing`) and a two-state
simulation. All state that is read is reset or initialised.
