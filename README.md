# Data reorganization engine

A hardware block for a system-on-chip FPGA that copies arrays from one memory
module to another and changes their layout on the way, so that no processor core
has to do it. While it copies, it can transpose a matrix, interleave several
narrow streams into one word stream, split one word stream across several
memories, split an array across memories by rows or by columns and merge it
back, replicate a stream into several memories, and pack or unpack narrow
elements into 32-bit words.

The engine is built around one idea. Every data movement is described as a
set of **finite affine streams**: address sequences of the form
`base + count * stride`, with `count` running from zero. Each memory
controller walks such streams and queues the data. A small **switching
network** chooses how the streams meet: one to one, one to many, many to one
or one split into many. Reorganizations that are neither a pure copy nor a
pure interleave, such as a transpose, come from letting one stream hop between
several address sequences in turn.

```
                 +------------------------------------------+
  reg port  ---> |  de_engine_ctrl  (registers, start/done) |
                 +------------------------------------------+
                        |  per-controller register access   | NET pattern
         +--------------+-------------+                      v
 mem 0 <-> de_mem_ctrl 0 | ch0 ch1 ch2 | <-> ports 0..2  +---------------+
 mem 1 <-> de_mem_ctrl 1 | ch0 ch1 ch2 | <-> ports 3..5  | de_switch_net |
 mem 2 <-> de_mem_ctrl 2 | ch0 ch1 ch2 | <-> ports 6..8  |  replicate /  |
 mem 3 <-> de_mem_ctrl 3 | ch0 ch1 ch2 | <-> ports 9..11 |  merge/stripe |
                                                         +---------------+
 inside de_mem_ctrl:  de_chan_ctrl (arbiter, memory port)
                      de_agu       (address entries)
                      de_conv_fifo x NUM_CH (queue + pack/unpack)
```

## Streams, channels and address entries

A **channel** is one data port of a memory controller. For one operation it
either reads a stream out of its memory toward the network, or writes a
stream arriving from the network into its memory. Each memory controller has
`NUM_CH = 3` channels, and they share the controller's single memory port.

The **address generation unit** (`de_agu`) of a memory controller holds
`NUM_ENTRIES = 8` entries. An entry is a pair `<base, elem_size>` and a
running count. Its next address is `base + count * elem_size`, and the count
steps by one each time the entry is used. The hardware keeps
`count * elem_size` in a register that grows by `elem_size` on each use, so
no multiplier is needed. A start clears every count.

A channel owns a contiguous group of entries: `first_entry` up to
`first_entry + num_entries - 1`. It uses them in turn, one entry per memory
access. The layout changes come from this rotation:

* **One entry.** The channel walks a plain strided stream. Stride 1 gives a
  row, stride N gives a column of an N-wide matrix, and stride K spaces
  elements K words apart, which pads them for alignment. To fill the pad
  words too, replicate the stream to K write channels of the same memory
  (K at most NUM_CH). Channel c uses base `dst + c` and stride K, so every
  element becomes K consecutive copies.
* **C entries on the write side.** Take a row-major R x C matrix arriving in
  order. Set entry j to `base = dst + j*R` with stride 1. Element (i, j) is
  the j-th access of its row, so it uses entry j. That entry has already
  been used i times, so the element lands at `dst + j*R + i`. That address
  is the transpose.
* **R entries on the read side.** Entry i has `base = src + i*C` and stride 1.
  The matrix is then read column by column. That read order also lets the
  write side pack the elements of one column into words.

A transpose therefore needs `min(R, C)` entries on one side. Larger matrices
are transposed in bands of 8 rows.

### Stream length and completion

`CH_LEN` gives the number of **memory accesses** of a channel, not the number
of elements. A channel with 8-bit elements that reads 16 words delivers 64
elements to the network. A read channel is finished when it has made all its
accesses, all its data has come back, and the network has drained its FIFO.
A write channel is finished when it has made all its writes. The engine
finishes when every enabled channel has finished.

## Conversion FIFOs: queues that pack and unpack

Each channel has a `de_conv_fifo`. It is an 8-word queue that absorbs memory
latency, plus a packer/unpacker. Data in the queue is always in whole
32-bit memory words. The channel's element width (`EW8`, `EW16` or `EW32`)
decides how words meet the network:

* **Read channel.** Each word leaves as 4, 2 or 1 elements. Element 0 comes
  from the least significant bits. The element is zero-extended to 32 bits.
* **Write channel.** Elements are collected until a word is full. Element 0
  goes to the least significant bits. The full word is then queued for the
  memory.

Packing is a copy from a 32-bit read channel to an 8-bit write channel. The
write channel keeps the low 8 bits of each element and puts four of them in
each word. Unpacking is the reverse copy.

## Channel controller

`de_chan_ctrl` decides which channel uses the memory port in each cycle. A
channel may issue when:

* it is enabled and has accesses left, and
* for a read: its FIFO has room for this word plus every read it already has
  in flight. Returned data therefore never overflows a FIFO.
* for a write: its FIFO holds at least one complete word.

Channels that may issue are served round-robin, one access per cycle. The
chosen channel's current entry drives the AGU select, and that entry advances
when the memory takes the access. Reads return in order. A queue of channel
numbers sends each returning word to the FIFO of the channel that asked for
it.

When one memory serves both the read and the write stream of a
reorganization, the two streams take turns on its port, and the rate halves.
An in-memory transpose is an example.

## Switching network

The network does not have a general crossbar. It merges a few fixed
patterns, and a register selects one of them. Port `m*3 + c` is channel `c`
of memory controller `m`. A pattern has one **primary** port (the side with
a single stream) and a set of **lane** ports from a bit mask. Lane 0 is the
lane with the lowest port number.

| pattern      | moves                                                      | used for |
|--------------|------------------------------------------------------------|----------|
| `REPLICATE`  | primary read stream -> every lane's write stream            | copy (1 lane), transpose, pack/unpack, replication to many memories |
| `MERGE`      | K lane read streams -> primary write stream; lane i fills bits `[i*32/K +: 32/K]` | interleaving 4 x 8-bit or 2 x 16-bit streams |
| `STRIPE`     | primary read word split; bits `[i*32/K +: 32/K]` -> lane i  | spreading a word stream over 4 x 8-bit or 2 x 16-bit streams |

With the **deal** bit set, merge and stripe move whole 32-bit words instead
of narrow lanes:

* **Stripe with deal.** The primary's words go to the lanes in turn, `GRAN`
  words per turn.
* **Merge with deal.** The reverse: the primary takes `GRAN` words from each
  lane in turn.

`GRAN = 1` splits a row-major array across memories by columns (column j
goes to lane `j mod K` when the row length is a multiple of K). `GRAN` equal
to the row length splits it by rows. The same settings on a merge rebuild
the array. The deal position restarts at lane 0 on every start.

The lane width is 32/K: 8 bits for K = 4, 16 bits for K = 2, otherwise
32 bits. For merge and stripe, give the lane channels the matching element
width so that their FIFOs pack or unpack. A word moves only in a cycle in
which the primary and all lanes can take part, so all streams advance
together. In deal mode, only the primary and the lane whose turn it is take
part. If one destination is slow, all the others wait, which is
back-pressure through the network. Apart from the deal position, the network
is combinational.

## Programming

The register port is word-addressed: `reg_addr[11:8]` selects a region and
`reg_addr[7:0]` an offset. Writes take effect at the clock edge. Reads are
combinational.

| region | offset        | register   | content |
|--------|---------------|------------|---------|
| 0      | 0x00          | CTRL       | write bit 0 = 1 to start (ignored while busy) |
| 0      | 0x01          | STATUS     | bit 0 busy, bit 1 done (cleared by the next start) |
| 0      | 0x02          | NET        | [1:0] pattern (0 idle, 1 replicate, 2 merge, 3 stripe), [2] deal, [7:4] primary port, [27:16] lane mask |
| 0      | 0x03          | CYCLES     | clock cycles of the last operation |
| 0      | 0x04          | XFERS      | network transfers in the last operation |
| 0      | 0x05          | GRAN       | [15:0] words per lane turn in deal mode (0 counts as 1) |
| 1+m    | 4c            | CH_CFG     | [0] enable, [1] direction (0 read, 1 write), [3:2] element width (0: 8, 1: 16, 2: 32 bits), [7:4] first entry, [11:8] number of entries |
| 1+m    | 4c+1          | CH_LEN     | memory accesses of the stream |
| 1+m    | 0x80+2e       | BASE       | base word address of entry e |
| 1+m    | 0x80+2e+1     | ELEM_SIZE  | stride of entry e, in words |

Example: transpose a 16 x 8 matrix from memory 0 at 0x100 to memory 1 at
0x800.

1. Program memory 0:
   * channel 0: read, 32-bit elements, entry 0, one entry, 128 accesses;
   * entry 0: base 0x100, stride 1.
2. Program memory 1:
   * channel 0: write, 32-bit elements, entries 0..7, 128 accesses;
   * entry j: base `0x800 + 16*j`, stride 1.
3. Set NET to replicate, with primary port 0 and lane mask `1 << 3`.
4. Write CTRL = 1 and poll STATUS until done.

Disable any channel of an earlier operation (CH_CFG = 0) that takes no part.

## Memory port and timing

Each of the four memory ports uses a simple request/grant protocol:

* The memory takes an access in a cycle where `mem_req` and `mem_gnt` are
  both high.
* Read data returns in request order on `mem_rvalid`/`mem_rdata`, one or
  more cycles later.
* The grant may be held low to model a slower or shared memory bus.

If the memories grant every cycle, a copy or transpose moves one 32-bit word
per cycle once the stream is running: 128 words took 133 cycles from start
to done in simulation. At a 40 MHz clock that is 160 MB/s. If the memories
grant one access in two cycles, the sustained rate is one word per two
cycles, or 2 bytes per cycle (80 MB/s at 40 MHz): 64 words took 132 cycles.

## Parameters (`data_engine`)

| parameter     | default | meaning |
|---------------|---------|---------|
| `NUM_MC`      | 4       | memory controllers (memory ports) |
| `NUM_CH`      | 3       | channels (network ports) per memory controller |
| `NUM_ENTRIES` | 8       | AGU entries per memory controller (at most 16 are addressable by CH_CFG) |
| `ADDR_W`      | 20      | word-address width |
| `LEN_W`       | 20      | stream-length width |
| `FIFO_DEPTH`  | 8       | words per conversion FIFO |

The word width is fixed at 32 bits (`de_pkg::WORD_W`). The network port
number must fit the 4-bit primary field, so `NUM_MC * NUM_CH <= 16`.
Besides the defaults, the engine is simulated with `NUM_MC = 2`,
`NUM_CH = 2`, `NUM_ENTRIES = 4`, `ADDR_W = LEN_W = 12` and `FIFO_DEPTH = 4`
(`tb_data_engine_params`).

## What follows the source design and what is this design's own

These parts follow the source design:

* the split into a controller with registers, four memory controllers and a
  programmable switching network;
* a memory controller made of a channel controller, conversion FIFOs and an
  address unit with several entries;
* the affine address formula;
* the merge, stripe, replicate and transpose kernels with their 8-, 16- and
  32-bit widths;
* splitting by rows or columns and merging as basic operations;
* one network in which several patterns are merged and selected by a
  register.

These choices are this design's own:

* the register map and the memory port protocol;
* the handshakes, the channel count, the entry count, the FIFO depth and the
  address width;
* round-robin arbitration and the read-credit rule;
* rotating through an entry group, which is how transposes are made here;
* the deal option, which is how splitting and merging of whole elements are
  made here;
* the element order inside a word;
* the cycle and transfer counters.

The source generated a separate engine for each kernel, with only the
patterns that kernel needed. This RTL is one engine that holds all of the
evaluated patterns at once.

Not built:

* **Gather/scatter through an index array.** No design exists for it.
* **A dedicated padding mode.** Padding is done by a write stride, which
  leaves the pad words untouched. Alternatively, replication to several
  write channels fills them with copies. There is no mode that writes a
  constant fill value.
* **Element widths other than 8, 16 and 32 bits.** A 13-bit packing, for
  example, is not supported.
* **Several independent patterns active at once in the network.** One
  operation uses one pattern.
* **The memories, the surrounding processor and DSP cores, and the FPGA
  fabric.** They are outside the engine.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_de_agu`: addresses against `base + count*stride`; clear; read-back.
* `tb_de_conv_fifo`: unpacking and packing at all three widths under random
  stalls; fill level.
* `tb_de_chan_ctrl`: entry rotation; read credit; steering of read data;
  write order; completion.
* `tb_de_mem_ctrl`: an in-memory transpose looped back through the
  testbench; a packed byte stream; restart.
* `tb_de_switch_net`: every pattern with random handshakes against a
  reference, including dealing.
* `tb_de_engine_ctrl`: register decode; start/busy/done; counters.
* `tb_data_engine`: the whole engine at its default sizes, with four
  behavioural memories (`tb/de_mem_model.sv`). It runs:
  * TP-32, including the rate checks above;
  * MG-4/8, MG-2/16, ST-4/8 and ST-2/16;
  * RP-8/32, RP-2/32, and replication into the source memory;
  * pack and unpack;
  * an in-memory transpose;
  * padding by stride, and padding filled by replication to three channels;
  * splitting by rows and by columns over two and three memories, and merging
    back;
  * the packed transpose of a matrix of 8-bit values.

  It counts memory stalls, network back-pressure and shared memory ports, and
  fails if one of them never occurred. It also fails if any access falls
  outside the memories.
* `tb_data_engine_params`: the whole engine built smaller. It has two memory
  controllers, two channels each, four entries, 12-bit addresses and 4-word
  FIFOs. It runs a transpose at both grant rates, an MG-2/16 merge, and a
  replication that fills two words per element.

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_data_engine \
    -y rtl -y tb +libext+.sv -Irtl rtl/de_pkg.sv tb/tb_data_engine.sv
./obj_dir/Vtb_data_engine
```

Replace `tb_data_engine` with any other testbench name. The package
`rtl/de_pkg.sv` must come first on the command line. The end-to-end
testbench finishes in a few seconds.
