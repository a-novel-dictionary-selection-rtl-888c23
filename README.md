# CLCBCC/MBSDS instruction decompression engine

Embedded programs can be stored compressed and expanded on the way from
memory to the processor. The scheme used here is dictionary compression
with bitmasks:

- The most frequent instructions get a short index into a **small LUT**.
- Other common instructions get a longer index into a **big LUT**.
- An instruction that differs from a big-LUT entry in only one aligned
  2-bit group is stored as that index plus a **bitmask** that repairs the
  group.
- Everything else stays **uncompressed**.

The dictionaries are chosen offline. A mixed bit-saving dictionary
selection (MBSDS) ranks candidate instructions by the bits they would save,
counting the near-matches they could cover with a mask. The hardware only
needs the dictionaries and the stream.

This RTL is the decompression engine. It sits between code storage and the
processor or cache. It takes the compressed stream in 32-bit words and
returns one 32-bit instruction per clock cycle.

## Codeword format

A codeword starts with a 2-bit tag. The codeword is followed directly by the
next one: there is no byte or word alignment.

| tag  | meaning            | fields after the tag                                 | length at defaults |
|------|--------------------|------------------------------------------------------|--------------------|
| `00` | uncompressed       | instruction (32)                                     | 34 bits |
| `01` | small-LUT hit      | small index (4)                                      | 6 bits  |
| `10` | big-LUT hit        | big index (11)                                       | 13 bits |
| `11` | bitmask match      | mask position (4), mask value (2), big index (11)    | 19 bits |

Mask positions count aligned 2-bit groups from the most significant end:
position 0 is bits 31:30 and position 15 is bits 1:0. The instruction is
`big_lut[index] XOR (mask_value << (30 - 2*position))`.

Here is a small example with 8-bit instructions. The small LUT has one entry
(`00000000`), so its codeword is the bare tag `01`. The big LUT holds
`0: 01011101` and `1: 11000000`.

| instruction | codeword      | why |
|-------------|---------------|-----|
| `00000000`  | `01`          | small LUT |
| `01011101`  | `10 0`        | big entry 0 |
| `11000000`  | `10 1`        | big entry 1 |
| `11000100`  | `11 10 01 1`  | entry 1 with mask `01` at position 2 (bits 3:2) |
| `00001100`  | `00 00001100` | no single-group match |

The bits of the stream are packed MSB first into the input words. The first
bit of a program is bit 31 of its first word. The last word is padded with
zeros. A zero padding cannot form a complete codeword, because a `00` tag
needs 34 bits, so the engine simply stays idle on it. Assert `clear` before
starting a new stream, so that the padding of the old one is dropped.

## Datapath

```
 storage ──► input queue ──► control + demultiplexer ──► stage register
            (shift buffer)   (tag, length, fields,           │
                              shift out codeword)            ▼
                                 ┌────────── small LUT ──────────────┐
                                 ├────────── big LUT (2 banks) ──┬───┤
                                 │   mask shift ──► XOR ◄────────┘   │
                                 └────────── uncompressed ───────────┤
                                                                     ▼
                                                   output queue ──► processor/cache
```

**Stage 1, decode (`cw_control`, `cw_demux`).**
- The control unit reads the tag at the head of the input queue and looks
  up the codeword length.
- It fires when the whole codeword is in the queue and the output side has
  room.
- On a fire, the demultiplexer splits out the fields and the input queue
  shifts the codeword out on the same edge.

**Stage 2, lookup (`small_lut`, `big_lut`, `bitmask_unit`).**
- Both LUTs are flip-flop tables with combinational reads.
- The big LUT is split into two banks: the top index bit selects the bank
  for a write and picks that bank's output on a read.
- The mask is shifted into place while the big LUT is read. The XOR then
  follows.
- A 4-way select on the registered tag picks one of four words: the
  small-LUT word, the big-LUT word, the masked word or the raw instruction.
  That word is pushed into the output queue.

**Timing.**
- Throughput: one codeword per cycle, so 32 bits/cycle of output, as long
  as the input keeps up.
- Dictionary codewords are at most 19 bits, below the 32 bits that arrive
  per cycle. A stream of them therefore runs at exactly one instruction per
  cycle.
- Uncompressed codewords are 34 bits, more than one input word. A long run
  of them is input-bound: about 32/34 of full rate.
- Latency: the first instruction is valid at the output 3 clock edges after
  the first input word is accepted. The word is taken on the first edge, the
  codeword is decoded on the second, and the result is pushed into the
  output queue on the third.

**Input queue sizing.** The buffer is `2*IN_W + WIN_W` = 98 bits, where
`WIN_W` = 34 is the longest codeword. The queue accepts a word while at
least `IN_W` bits are free. With this size, a cycle in which it refuses a
word still leaves at least one full codeword of up to 19 bits for the next
cycle. With only `IN_W + WIN_W` bits the queue could run dry on bitmask
codewords and lose about 1% of throughput.

**Back-pressure.** The control unit fires only if `count + (stage 2 busy)`
is below the output queue depth. The instruction in flight is then always
sure of a slot, so the output queue needs no write handshake.
`out_ready` low stalls decode, and a stalled decode fills the input queue,
which drops `in_ready`.

## Interface of `clcbcc_mbsds`

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of all control state |
| `clear` | in | 1 | one cycle: empty both queues and the pipeline |
| `dict_we`, `dict_big`, `dict_addr`, `dict_wdata` | in | 1, 1, 11, 32 | write one LUT entry (`dict_big`=1: big LUT, else small LUT, low 4 address bits) |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1, 1, 32 | compressed words, valid-ready |
| `out_valid`, `out_ready`, `out_instr` | out/in/out | 1, 1, 32 | instructions in program order, valid-ready |

The LUTs are not reset. Load them through the `dict_*` port before feeding a
stream, and do not write them while a stream that uses them is being
decoded.

### Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `INSTR_W` | 32 | source design (32-bit instructions, 32 bits/cycle) |
| `BIG_DEPTH` | 2048 | source design (large LUT of 2048 entries) |
| `MASK_W` | 2 | source design (one 2-bit mask) |
| `SMALL_DEPTH` | 16 | chosen here |
| `BIG_BANKS` | 2 | chosen here (the source shows banked big LUTs, not how many) |
| `IN_W` | 32 | chosen here |
| `OQ_DEPTH` | 4 | chosen here |

The table sizes must be powers of two, and `INSTR_W/MASK_W` must be a power
of two. A one-entry small LUT is allowed: its codeword is then only the tag.
Index and position widths follow from the sizes, and so does the codeword
format.

Synthesised with the defaults, the engine is about 66 kbit of LUT storage
(64 kbit big LUT, 512 bit small LUT, 128 bit output queue). Beyond that it
has about 170 flip-flops and about 110 word-level cells.

## What follows the source design and what does not

These parts follow the source design:
- The tag values and the four codeword types.
- The order of the bitmask fields (position, value, index) and the aligned
  positions counted from the MSB.
- One 2-bit mask on 32-bit instructions.
- The 2048-entry big LUT behind a demultiplexer and multiplexer.
- Flip-flop LUTs.
- The input queue that shifts after each decode, the output queue and the
  32 bits/cycle bandwidth.

These are this implementation's own choices:
- The two-stage pipeline.
- The queue sizes, the 16-entry small LUT and the two big-LUT banks.
- The valid-ready handshakes.
- The dictionary write port and `clear`.
- The MSB-first packing of the stream and the padding rule.

Not included:
- **Codewords with more than one mask.** The encoding is said to allow a
  variable number of masks per instruction, with some instructions matched
  using two. No field that says how many masks follow is defined, so only
  the one-mask format above is decoded. Adding it means a count field in
  the `11` codeword and a second shift/XOR in `bitmask_unit`.
- **Run-length encoding** of repeated patterns, which is mentioned as a
  companion technique without a codeword format. All four tags are already
  used.
- **The compressor and dictionary selection.** They are offline software.
  The testbenches contain a minimal encoder that writes streams for given
  dictionaries. It does not choose the dictionaries.

## Files

| file | contents |
|------|----------|
| `rtl/clcbcc_pkg.sv` | tag enum, width helpers |
| `rtl/cw_input_queue.sv` | input shift buffer |
| `rtl/cw_control.sv` | control unit: codeword length and fire |
| `rtl/cw_demux.sv` | field demultiplexer |
| `rtl/small_lut.sv`, `rtl/big_lut.sv` | dictionaries |
| `rtl/bitmask_unit.sv` | mask shift and XOR |
| `rtl/out_queue.sv` | output FIFO |
| `rtl/clcbcc_mbsds.sv` | top: the engine |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_clcbcc_mbsds.sv` | end-to-end test at the default sizes |
| `tb/tb_fig6_example.sv` | the 8-bit example above through an 8-bit engine |
| `tb/tb_large_benchmark.sv` | a 40,000-instruction synthetic program at the default sizes |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/clcbcc_pkg.sv \
    tb/tb_clcbcc_mbsds.sv --top-module tb_clcbcc_mbsds
./obj_dir/Vtb_clcbcc_mbsds
```

The end-to-end test runs at the default sizes and needs well under a second.
It loads random dictionaries and encodes random programs itself. It then
checks every instruction that comes out, in three phases:
1. About 4,000 instructions of all four types, with random gaps on the
   input and random back-pressure on the output.
2. 2,000 dictionary and bitmask codewords at full speed. It checks one
   instruction per cycle and the 3-edge latency.
3. 500 uncompressed instructions, which must be input-bound.

It also counts each codeword type, full-input and full-output stalls,
consumer back-pressure and `clear`, and fails if any of them never
occurred.

The large-benchmark test feeds a 40,000-instruction program at the default
sizes. The instruction values are random. The codeword mix is 4%
uncompressed, 6% bitmask, 30% small LUT and 60% big LUT. It takes 40,002
cycles from the first instruction out to the last, and the stream is 38% of
the original size. That ratio belongs to this random mix: a real program's
ratio depends on how well its dictionaries fit.

The module tests check their blocks against models written independently
of the RTL:
- a bit-queue model for the input queue;
- every tag and fill level for the control unit;
- randomly assembled codewords for the demultiplexer;
- every position and mask value for the bitmask unit;
- full load and read-back for both LUTs;
- a reference queue for the output FIFO.
