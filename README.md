# On-chip memories for video signal processing

Video algorithms such as motion estimation, the DCT and line delays touch
their data in regular, largely order-free patterns. This RTL includes two
memory organisations that use that freedom. Each one accepts a restriction
on *when* or *where* it can be accessed, and gets cheaper or faster hardware
in return.

* **Concurrent line access (CLA).** Every port of the memory must use the
  same row in a given cycle. In exchange, a single-port cell array with one
  row decoder behaves like a multi-port memory. Each port only adds its own
  column decoder and data path.
* **Block-access mode.** Accesses follow a programmed block pattern: start
  address, end address, step, and the distance to the next block. In
  exchange, the word lines come directly from a shift-register chain that
  holds the current location. No address has to be generated and decoded for
  each access.

The top level, `video_memory_top`, holds one instance of each design
described below. The instances sit side by side and share only the clock and
reset:

| prefix | module                | what it is                                   | default size          |
|--------|-----------------------|----------------------------------------------|-----------------------|
| `cla_` | `cla_memory`          | general two-port CLA memory                  | 2K x 8 bit (512 x 4 x 8) |
| `pp_`  | `cla_pingpong_buffer` | one-read-one-write buffer, column halves swap | 16 x 8 bit (4 rows, mux 4) |
| `tr_`  | `transpose_ram`       | transposition memory of a row-column 2-D DCT | 8 x 8 x 16 bit        |
| `dl_`  | `fixed_delay_line`    | fixed delay line                             | 1920 x 8 bit          |
| `ba_`  | `ba_memory`           | memory with block-access mode                | 256 x 32 bit          |

## Concurrent line access

A conventional SRAM strobes a whole row and then uses its column decoder to
keep only one word of it. `cla_memory` keeps that single row decode but gives
each of its `PORTS` ports its own column decoder. So in one clock, each port
can read or write a different word of the strobed row: two reads, two writes,
or one of each. Port 0 supplies the row, and the other ports supply only a
column. With column multiplexing `MUX`, up to `MUX` ports make sense. The
cells stay single-port, so area stays close to that of a single-port memory.

Two timing rules apply:

* Read data is registered and appears one clock after the access.
* If one port reads a word that another port writes in the same clock, the
  read returns the old contents. The transposition memory below relies on
  this.

Two writes to the same word in one clock are illegal. An assertion reports
them.

The other three CLA modules arrange their accesses so that the shared row
is never a restriction.

### One-read-one-write buffer (`cla_pingpong_buffer`)

The columns are split into two halves. Incoming words are written into one
half while the other half is read out. Both ports step through their half in
the same order, so they always sit on the same row. When the read half is
exhausted, which is also when the write half is full, the halves swap roles.
The output is the input delayed by `ROWS*MUX/2` accepted words.

### Transposition memory (`transpose_ram`)

A row-column 2-D transform writes an 8x8 intermediate block row by row and
has to read it back column by column. This module needs only one 8x8 array
for that. It scans the array in row order for one block and in column order
for the next, alternating. At each step the read port fetches the previous
block's word at the current location, and the write port stores the new
word in the same place in the same clock. The output stream is therefore
the previous block transposed, with one word out per word in.

### Fixed delay line (`fixed_delay_line`)

A pointer walks row by row through a `ROWS x COLS` array. The array size is
the delay. In each step the read port takes word (r, c), and the write port
stores the new word into the location read one step earlier, which is (r, c-1).

At the first word of a row, that earlier location is the last word of the
*previous* row, whose word line is no longer selected. The last word of every
row is therefore a two-port cell. Its second word line is the word line of
the following row. The final row's last word wraps to row 0 through its own
copy of the row-0 decode. In the RTL:

* the last column is a separate array (`last`), written through a second
  write path;
* `row0_hit` is the duplicated row-0 decode.

With a continuous input stream, a word that enters in cycle n leaves in
cycle n + `ROWS*COLS`. The default is 1920 cycles, one HDTV line.

## Block-access mode (`ba_memory`)

This is the hardest part of the design. It has three cooperating pieces.

**Block parameters and serial adder (`ba_address_calc`).** The host loads the
following parameters:

* `start` and `end`: the first and last location of a block;
* `dist`: the block distance, from the end of one block to the start of the
  next;
* `step`: the signed distance between two consecutive accesses;
* `count`: the number of blocks.

The block size (`end - start`) and the next block's addresses are all formed
by one bit-serial adder, one bit per clock:

* `size = end - start`, once after configuration (AW clocks);
* `start <= end + dist`, then `end <= start + size`, while a block is being
  scanned (2*AW = 16 clocks).

The adder writes each sum bit into its destination register. It only does so
once the old value of that register is no longer needed:

* The start register is free once the chain has been loaded from it.
* The end register is free once its decode has been kept for end detection.

A multiplexer puts the start register, the end register or the random
address on the decoder input.

**Two-level shift-register chain (`sr_chain_2level`).** One token marks the
selected word line. For W = 256 word lines:

* Level two is a ring of S = 4 registers that give the select lines
  `Sel0..Sel3`.
* Level one is 64 registers, each serving 4 word lines.
* Word line `(j*4 + s)` is the AND of level-one register j and select line s.
* The level-one registers are grouped into C = 4 clusters of R1 = 16. Each
  cluster keeps a copy of the level-two ring, so the level-two shift signal
  loads 16 registers.

A step of +1 rotates level two. When level two wraps, the level-one chain
moves by one through a cluster-local shift enable, `shift1[k]`. That enable
fires only in the cluster that holds the token or receives it, which keeps
each local shift net small. A step of any size moves level two by
`step mod 4` and level one by `step div 4` plus the carry, in a single clock.
A negative step moves backwards.

**Sequencing.** In default mode (`BA_IDLE`, `BA_DONE`) the address is
predecoded into a level-one index and a level-two select. These are ANDed
exactly like the chain's outputs, so the memory behaves as a plain RAM.
`ba_go` runs a block scan:

1. The start address is decoded and loaded into the chain. That same clock
   starts the serial adder on the next block.
2. In the next cycle the multiplexer shows the end address, and its decode is
   kept. Accesses already run in this cycle, and the end compare uses the
   decoder output directly.
3. Every accepted access (`acc_en` while `ready`) reads or writes the word
   line the chain selects, then moves the chain by `step`.
4. The access whose word line matches the kept end decode is the block's
   last. `block_end` pulses, and at the same clock edge the chain is loaded
   with the next block's start. Block changes cost no cycle.
5. If the serial adder has not finished by then, the memory waits in
   `BA_WAIT` (`stall` high). This happens for blocks of 16 accesses or fewer.
   Larger blocks never stall.
6. After `count` blocks the memory enters `BA_DONE` and is a RAM again.
   `ba_stop` leaves block mode at any time.

Typical parameter sets, for an image stored row-major with width X:

| scan | start | end | step | dist |
|------|-------|-----|------|------|
| contiguous 64-word blocks | 0 | 63 | 1 | 1 |
| rows of an 8-wide block | (r, c) | (r, c+7) | 1 | X - 7 |
| columns of the image (one block per column) | c | c + (H-1)X | X | 1 - (H-1)X |
| backward | high | low | -1 | -1 |

Motion-estimation searches (full search, three-step search) are built from
such parameter sets. Each candidate block position is one configuration of
row runs. A 2-D block of a row-major image is read one row at a time, and
8-pixel rows are shorter than the 16 clocks of serial addition. So with
8x8 blocks, about half of the clocks are stalls (roughly 129 clocks per
candidate for 64 pixels). Blocks stored as contiguous runs of 17 words or
more never stall.

## Where this RTL is the design's own

These points are choices made for this RTL, not fixed by the organisation
described above:

* **Sizes.**
  * The 2K-word CLA memory is split as 512 rows x 4 columns.
  * The delay length of 1920 is one HDTV line.
  * The transposition memory uses 16-bit words.
  * The buffer uses 8-bit words.
* **Same-word read and write.** A read and a write of the same word in one
  clock gives read-before-write, in every CLA module. Physical CLA cells
  should not read and write one location at the same time. Here the RTL
  relies on the synchronous timing instead.
* **Block-access parameters.**
  * The next end address is formed as the next start plus the block size.
  * The block count, the step register, the stall rule and the
    `ready`/`stall`/`block_end` handshake are added.
  * In the chain, a step of several positions completes in one clock.
* **Circuit-level parts are modelled functionally.**
  * The dynamic circuits of the chain (precharge, end-detect pull-downs,
    word-line pull-downs) are static registers and gates.
  * Sense amplifiers and write drivers are array reads and writes.
* **Not included.**
  * The 1-D DCT that surrounds the transposition memory.
  * Any timing or area behaviour. Access-time and area advantages belong to
    the circuit level and cannot be seen in RTL.
* **Reset.** All control registers reset asynchronously on `rst_n` low. The
  arrays are not reset.

## Files

`rtl/`
* `vmem_pkg.sv`: sequencer states and serial-adder passes
* `addr_decoder.sv`: one-hot decoder, used as column decoder and as predecoder
* `cla_memory.sv`, `cla_pingpong_buffer.sv`, `transpose_ram.sv`,
  `fixed_delay_line.sv`: concurrent line access
* `ba_address_calc.sv`, `sr_chain_2level.sv`, `ba_memory.sv`: block access
* `video_memory_top.sv`: top

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`.

`tb_video_memory_top` runs all five designs at their default sizes. It counts
every mechanism and fails if any of them never happens:

* two reads, two writes, and a read and a write on one row;
* a same-word read and write;
* buffer swaps;
* scan-order flips;
* delay-line wrap;
* row, column and backward scans;
* block ends;
* stalls;
* every cluster's local shift.

`tb_ba_motion_search` runs block matching on a 16x16 search window held in
the block-access memory. Full search over all 81 positions must find the
planted 8x8 block. Three-step search must choose the same vector as a direct
model. Every SAD formed from the memory's read data is checked.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_video_memory_top rtl/vmem_pkg.sv tb/tb_video_memory_top.sv
./obj_dir/Vtb_video_memory_top
```

To run a single block, replace the testbench name, for example
`tb_ba_memory`. `vmem_pkg.sv` must be given first because several modules
import it.

Every testbench finishes in well under a second. The simulator is two-state,
so testbenches initialise all the state they read.
