# Branch-block LZW code decompression

Embedded programs are cheaper to store compressed, but a processor needs to
jump into the middle of its code, and most dictionary compressors only work
well on long runs of text and cannot restart anywhere. The way out used here is
to compress the program in **branch blocks**: the code between two consecutive
places that a branch or jump may land on. Those places are fixed once the
program is compiled, and the blocks they cut are long (hundreds of bytes on
typical VLIW DSP code), so each can be compressed with LZW on its own. The LZW
table is never stored: the decompressor rebuilds it while it decodes, and
clears it at every branch target, so decoding can start at any of them.

This repository holds the decompression side as synthesizable SystemVerilog:
an engine that sits between the compressed code memory and the instruction
cache or fetch unit, reads the compressed stream, and returns original code
bytes. One LZW codeword is a table lookup that returns up to 8 bytes, and the
engine decodes one codeword per clock, so it delivers several bytes per cycle
where Huffman-style decoders deliver one. Compression is done off-line in
software; a model of that compressor lives in the testbench package.

## The compressed program

Each branch block is stored byte-aligned and on its own:

```
| method (3 bits) | codewords ... | all-ones indicator | zero pad to byte |   LZW block
| method (3 bits) | 32, 64 or 96 original bytes        | zero pad to byte |   uncompressed block
```

Bits are packed MSB first, bytes in increasing address order.

| method | block contents                                 |
|--------|------------------------------------------------|
| 0..3   | LZW with 9, 10, 11 or 12-bit codewords         |
| 4..6   | uncompressed, 32, 64 or 96 bytes               |
| 7      | not used; the engine reports `err`             |

The compressor picks, per block, whichever of these gives the fewest bits
(minimum code-size selection). Small blocks rarely fill even a 9-bit table, so
they get short codewords. Blocks of exactly 32, 64 or 96 bytes that do not
compress are stored as they are.

**LZW rules, shared by compressor and decompressor.**

- The elements are bytes. Codes 0..255 are the single bytes and are not
  stored; the decoder makes them from the code itself.
- Every codeword after the first creates one table entry: the previous phrase
  plus the first byte of the current one. New entries start at code 256.
- A table of width w has codes 0..2^w−2. The all-ones code 2^w−1 is the
  **branch indicator**. It ends the block and tells the decoder that a branch
  target follows.
- Once the table is full, it is used unchanged for the rest of the block.
- The table is 8 bytes wide, so a phrase has at most 8 bytes. When the previous
  phrase already has 8 bytes, no entry is made. The compressor skips the entry
  in the same way, so both sides keep the same numbering.
- A codeword may name the entry that its own iteration is about to create.
  The decoder does not have that entry yet. It decodes the codeword as the
  previous phrase plus that phrase's first byte.

**Dynamic codeword width.** Each codeword creates at most one entry. So the
first 256 codewords of a block can only name codes below 512, the next 512
only codes below 1024, and so on. With dynamic width on (`dyn_en`), codeword
k of a block, counted from 0, is:

- 9 bits for k < 256;
- 10 bits for k < 768;
- 11 bits for k < 1792;
- 12 bits after that.

The width is never more than the block's own width. The indicator uses the
width that applies at its position. `dyn_en` is a single setting for the whole
program and must match how the program was compressed.

## Engine structure

```
 br_valid/br_addr ──► lzw_lat ──(compressed byte address)──┐
                                                           ▼
 compressed memory ◄──mem_req/addr── lzw_bit_buffer ──peek/avail──► lzw_dispatch ──tokens──► lzw_decomp_core ──► out_*
                    ──rvalid/rdata──►                ◄──consume───                          (or lzw_par_core)
```

| module                | role |
|-----------------------|------|
| `lzw_pkg`             | Shared constants, the phrase and token types, the method encoding, and the dynamic-width rule. |
| `lzw_lat`             | Table of branch targets. Maps an original address to a compressed byte address. |
| `lzw_bit_buffer`      | Fetches 32-bit memory words and presents the next 32 stream bits. |
| `lzw_dispatch`        | Reads method fields and cuts codewords. Drops indicators and padding, and bypasses uncompressed instructions. |
| `lzw_decomp_core`     | Pipelined 12-bit LZW decoder with the 8-byte-wide table. |
| `lzw_code_table`      | Table memory: 3840 stored entries of 8 bytes plus a length. Codes below 256 are generated by logic. |
| `lzw_par_core`        | Optional look-ahead decoder for 2 or more codewords per iteration (`LANES` > 1). |
| `lzw_code_table_mp`   | Multi-port table used by `lzw_par_core`. |
| `lzw_decompressor`    | Top level. |

### The decoding pipeline (`lzw_decomp_core`)

This is the part that sets the speed and the part with the subtle hazards.

A codeword travels through two stages, after the dispatch stage that cut it
from the stream.

- **Stage A** accepts the token. For a codeword, it checks that the code can
  be valid at this point and starts the synchronous table read.
- **Stage B** does the rest one cycle later:
  1. It forms the phrase.
  2. It writes the new entry (the previous phrase plus the phrase's first
     byte).
  3. It puts the phrase into the output register.
  4. The phrase becomes the "previous phrase" for the next codeword.

Both stages work on every cycle. With dispatch in front, this gives the
three-stage engine. It decodes one codeword per cycle while memory and the
consumer keep up.

Two things can break back-to-back decoding. Both are resolved without a stall.

1. **Read-after-write on the table.** Suppose the codeword in stage A names
   the entry that stage B is writing in this same cycle. The synchronous read
   would return the old contents. Stage A detects this case
   (`code == next && stage B makes an entry`) and sets a forwarding flag. In
   the following cycle, stage B takes the phrase from a register that holds
   the entry just written, not from the memory.
2. **The not-yet-defined codeword.** A codeword may name the entry that its
   own iteration creates. Stage A cannot see this from the table pointer alone,
   because the pointer moves when stage B makes its entry. So stage A
   compares the code with an *effective* next index:
   - It takes `next`.
   - It adds one if stage B is busy and will make an entry in this cycle.
   - It also uses stage B's phrase length to decide whether the iteration in
     stage A makes an entry at all, because no entry is made after an 8-byte
     phrase.

   On a match, stage B builds the phrase itself: the previous phrase with its
   own first byte appended. It does not read the table.

The same effective values drive the validity check. A code is accepted if one
of these holds:

- it is a literal;
- it is below the effective next index;
- it equals that index and an entry will be made.

Anything else raises `err`, because the stream is corrupt.

Other rules of the core:

- Reset tokens (a new LZW block) and raw tokens (uncompressed instructions)
  wait until stage B is empty, so they never overtake a codeword.
- The output register follows a valid/ready handshake. Both stages hold while
  it is full.
- A branch flushes the core in one cycle.

### Dispatching logic (`lzw_dispatch`)

The dispatcher is the only part that knows codeword widths. It runs a small
state machine:

| state  | what it does |
|--------|--------------|
| header | Reads the 3-bit method. Emits a reset token (which carries the table size) for LZW, or switches to bypass mode. |
| LZW    | Cuts one codeword per cycle at the current width. Zero-extends it to 12 bits and sends it to the core as a code token. Counts codewords for the dynamic width. On the all-ones value of the current width, it consumes the indicator and its padding together: `8 − ((bitpos + w) mod 8)` more bits, modulo 8. |
| raw    | Passes the block's 32, 64 or 96 bytes on, 4 bytes (one instruction) per token. |
| pad    | Drops the bits up to the next byte boundary after an uncompressed block. |
| error  | Entered on method 7. Holds `err` until the next branch. |

The codeword counter saturates. That does no harm: past 1792 codewords every
block already uses its full width.

Because every block ends at a known point, falling through from one block into
the next needs neither the branch-target table nor any comparator. The next
method field follows directly.

### Bit buffer and memory port (`lzw_bit_buffer`)

- A 64-bit shift register holds unread bits, the oldest at the top.
- `peek` always shows the next 32 bits, and `avail` says how many of them are
  valid.
- The consumer removes 0..32 bits per cycle.
- The buffer requests a new 32-bit word whenever it can accept one. Only one
  request is outstanding, and memory latency can be anything.
- On `restart` the buffer empties and fetches the word that holds the start
  byte. It drops the bits that come before the start byte.
- A response that belongs to a request from before the restart is discarded.
- `bitpos`, the bit count modulo 8 since the restart, lets the dispatcher find
  byte boundaries.
- Byte `a` of the compressed image is `mem_rdata[31-8*(a%4) -: 8]` of word
  `a/4`.

With single-cycle memory, the buffer takes in one word every two cycles. That
is 16 bits per cycle, enough for one 12-bit codeword per cycle.

### Branches and the LAT (`lzw_lat`)

Compressed blocks are not at their original addresses, so the engine needs a
map from branch targets to compressed locations. Only branch targets need an
entry, not every cache line. The LAT is a fully associative table of 512
entries. Each entry holds an original address and a compressed byte address.
It is loaded through a write port (`lat_wr_*`) and emptied by `lat_clear`.

`br_valid` with `br_addr` starts a branch:

1. The whole engine is flushed.
2. The LAT answers one cycle later.
3. On a hit, the bit buffer restarts at the block's compressed byte address,
   and the output address counter is set to `br_addr`.
4. On a miss, `lat_miss` is raised and the engine stays idle until the next
   branch.

A branch may arrive at any time, including in the middle of a block. Output
still in flight is discarded.

### Look-ahead parallel decoding (`lzw_par_core`, `LANES` > 1)

Codewords have a fixed length, so the codewords that follow the current one
are already known. They can be decoded together, as long as none of them
names an entry created in the same iteration.

`lzw_par_core` queues up to `LANES` codewords. Each iteration works like this:

- It starts with the oldest codeword, lane 0. Lane 0 is decoded exactly like
  the single core, including the not-yet-defined case.
- It adds each following codeword while that codeword is below the first
  entry this iteration creates.
- All chosen lanes read a multi-port table in one cycle.
- In the next cycle, the lanes' phrases are concatenated into an output of up
  to 8·`LANES` bytes. One entry per lane is written, under the same
  8-byte-limit and full-table rules.

The iteration takes two cycles and is not pipelined. The dispatcher in front
cuts one codeword per cycle. As a result, this core is slower than the
pipelined single core with 2, 4 or 8 lanes (see Results). It is correct and
tested, but a real speed-up needs a front end that cuts several codewords per
cycle. That front end is not part of this design.

## Top-level interface (`lzw_decompressor`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | Clock. Synchronous active-low reset. |
| `dyn_en` | in | Dynamic codeword width for the whole program. |
| `lat_clear`, `lat_wr_en`, `lat_wr_idx`, `lat_wr_orig`, `lat_wr_comp` | in | LAT load port. |
| `br_valid`, `br_addr` | in | Branch to original byte address `br_addr`. |
| `lat_miss` | out | The last branch target was not in the LAT. |
| `mem_req`, `mem_addr` | out | Word read request. `mem_addr` is a word address. |
| `mem_rvalid`, `mem_rdata` | in | Read data, any number of cycles after the request. |
| `out_valid`, `out_ready` | out/in | Handshake for decoded code. |
| `out_data`, `out_len` | out | 1..8 bytes (1..8·`LANES` with the parallel core). Byte 0 is in bits 7:0. |
| `out_addr` | out | Original address of the first byte of `out_data`. |
| `blk_pulse`, `blk_method` | out | A method field was read, and its value. |
| `err` | out | Method 7 or an impossible codeword. Cleared by the next branch. |

**Timing.**

- The first memory request leaves 2 cycles after `br_valid`.
- With single-cycle memory, the first phrase appears a few cycles after that.
- After that the engine decodes one codeword per cycle. Each cycle gives one
  phrase of up to 8 bytes.
- Uncompressed blocks run at 4 bytes per 2 cycles, which is the memory word
  rate.
- An indicator costs one cycle.

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_W` | 32 | Byte address width. |
| `LAT_ENTRIES` | 512 | Branch targets the LAT can hold. |
| `LANES` | 1 | 1: pipelined single core. 2, 4, 8: look-ahead core. |

The table size is fixed by the format: 12-bit codes and 8-byte entries.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:

- compares the module's outputs with an independent model;
- has a watchdog;
- prints `TB_RESULT checks=N failures=M`.

`tb/lzw_ref_pkg.sv` is that model. It builds synthetic programs from several
kinds of blocks: repeated instruction words, random bytes, one repeated word,
and one repeated byte. It compresses them with the rules above and chooses the
method per block.

| testbench | what it exercises |
|-----------|-------------------|
| `tb_lzw_code_table` | Literal generation, write and read-back, and read-data hold, over all widths. |
| `tb_lzw_lat` | Hits, misses, overwrite, and clear. |
| `tb_lzw_bit_buffer` | Random restarts at any byte, random consumption, random memory latency, and stale responses. |
| `tb_lzw_dispatch` | Every method, dynamic and fixed widths, indicator padding, bypass, and method 7. |
| `tb_lzw_decomp_core` | Random token streams with back-pressure. Forwarding and not-yet-defined hazards. Checks one codeword per cycle. |
| `tb_lzw_par_core` | The look-ahead core with 4 lanes. Counts iterations with several lanes and held codewords. |
| `tb_lzw_decompressor` | End to end at default parameters. Random memory latency, output stalls, and branches in the middle of a block. |
| `tb_lzw_workloads` | Two program sizes, decoded with 1, 2, 4 and 8 lanes. Reports cycle counts. |

The end-to-end test counts every mechanism and fails if any of them never
happens:

- indicators;
- uncompressed blocks;
- a full table;
- not-yet-defined codewords;
- forwarded entries;
- skipped entries at 8 bytes;
- width changes;
- stalls;
- branches in the middle of a block;
- LAT misses;
- every method value.

It also checks the decode rate: 200 codewords in no more than 250 cycles.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lzw_pkg.sv tb/lzw_ref_pkg.sv tb/tb_lzw_decompressor.sv \
    --top-module tb_lzw_decompressor -Mdir obj
./obj/Vtb_lzw_decompressor
```

Substitute any other `tb_*` name. The testbenches use only two-state values
and `$urandom`.

**Results** (synthetic code, single-cycle memory, default parameters):

| program size | blocks | compressed | 1 lane | 2 lanes | 4 lanes | 8 lanes |
|--------------|--------|-----------|--------|---------|---------|---------|
| 9344 B (ADPCM decoder size) | 20 | 47% | 3995 cycles (2.33 B/cycle) | 5978 | 5005 | 4547 |
| 186368 B (182 kB MPEG-2 encoder size) | 436 | 49% | 81690 cycles (2.28 B/cycle) | 122014 | 102358 | 92901 |

The program sizes are those of the two benchmark programs usually quoted for
this scheme. A three-stage engine was reported to need 5508 and about 90k
cycles on the real programs. The synthetic content compresses better than
real code, so the bytes per cycle here are an optimistic figure. The cycle
counts show that the pipeline sustains one codeword per cycle.

## Departures and open points

- **Branch-target detection.** Block ends are marked with the all-ones
  indicator. The alternative is a list of branch-target addresses compared
  against the PC on every instruction. It is not built.
- **Bypass by fetch packet.** Uncompressed blocks are passed on 4 bytes (one
  instruction) at a time, not 32 bytes (a fetch packet) at a time.
- **Look-ahead decoding** is present but not faster than the single pipelined
  core (see above).
- **State machine.** The dispatcher has five states (header, LZW, raw, pad,
  error). The original engine is said to use a four-state machine, but its
  states are not given.
- **Not built, being outside the engine:**
  - the off-line compressor and its profile-driven method choice (a
    behavioural model is in the testbench package);
  - the compressed code memory;
  - the instruction cache and processor;
  - power gating of unused table parts.
- **Own choices**, none of them fixed by the scheme:
  - the exact method numbers;
  - the 3-bit field coming first in each block;
  - MSB-first packing;
  - 32-bit memory words with a single outstanding request;
  - the valid/ready output;
  - the `err` reporting;
  - synchronous reset;
  - skipping the entry after an 8-byte phrase;
  - the dynamic width boundaries at codeword counts 256/768/1792;
  - a 12-bit zero-extended code bus between the dispatcher and the core.
- Table memory is written as a plain array. Its read is synchronous, so a
  synthesis tool can map it to block RAM.
