# Streaming z-buffer compositing accelerator

In sort-last parallel rendering, each rendering node draws part of the scene
and sends a full-screen colour buffer and depth buffer to one master node. The
master must merge all of them into one picture, keeping for every pixel the
colour of the fragment nearest to the viewer. Per pixel this is one integer
compare and two selects, so the real cost is moving data: each frame is 8
bytes per pixel (a 32-bit colour and a 32-bit depth), and at 1280×1024 with 8
nodes that is over 80 MB per displayed image.

This RTL implements an FPGA accelerator for that merge. It sits on a
HyperTransport (HT) link next to the host CPU, and it has its own DDR SDRAM
bank. The design follows one rule: keep every memory streaming. The
accelerator reads each new frame straight from host memory over HT and reads
the running result from its DDR bank at the same time. It compares two pixels
per clock and writes the result back. The HT link is the slowest path, so the
datapath only needs to keep up with it: two 32-bit pixels per 200 MHz cycle on
64-bit links.

The design is built from small cores joined by a generic on-chip interconnect:
point-to-point links with asynchronous FIFOs, width converters and
slave-side arbiters. The README calls these *IMORC links*, after the
architecture template the cores follow.

## How one compositing run works

The host stores `NODES` frames in its memory. Each frame is a colour buffer of
`W*H` 32-bit pixels followed directly by a depth buffer of the same size, so
depth starts at `base + 4*W*H`. Frame *k* starts at
`FRAME_BASE + k*FRAME_STRIDE`. The host writes the registers and sets
`CONTROL.start`. The controller then runs one *pass* per frame:

| pass | reads | writes | mode |
|---|---|---|---|
| 0 | frame 0 from host memory | colour and depth to DDR (`MEM_BASE`) | load |
| 1 … N-2 | frame *k* from host, stored image from DDR | colour and depth to DDR | compose |
| N-1 | last frame from host, stored image from DDR | colour only, to host memory (`OUT_BASE`) | final |

With `NODES = 1`, pass 0 copies the colour buffer straight to `OUT_BASE`.
A new pixel replaces the stored one only if its depth is *strictly* smaller,
compared as a signed 32-bit integer. On a tie the earlier frame keeps the
pixel. Compose passes always write back both colour and depth, changed or
not, so the data flow stays regular.

A pass ends only when three things are true:

- the request core has issued every request;
- the composer has produced every word;
- every write buffer and its link is empty.

So the next pass can never read a location before the previous pass's write
to it has reached the memory side.

## Data path

```
             host memory (over HT)                    DDR bank
                    |                                    |
                 host_if  <-- page table            ddr_ctrl (burst + RMW)
                    |                                    |
           imorc_arbiter (3 ports)              imorc_arbiter (4 ports, 256 bit)
            /       |       \                  /      |       |       \
        link     link     link             link    link    link    link   (64 -> 256 bit,
         |        |        |                |       |       |       |      clk -> mem_clk)
        Z1 S2M  F1 S2M  FH M2S            Z0 S2M  F0 S2M  ZC M2S  FC M2S
          \        \       ^                  \      /       ^       ^
           +--------+------+------ composer ---+----+--------+-------+
                          request_core -> all seven stream buffers (REQ ports)
```

- **Stream buffers.** Seven stream buffers each serve one sequential access
  stream:
  - Z0/F0 read the stored depth and colour from DDR;
  - Z1/F1 read the new frame's depth and colour from the host;
  - ZC/FC write the result to DDR;
  - FH writes the final colour to the host.

  A read buffer (`stream_buffer_s2m`) issues a read only when its FIFO is sure
  to have room for the whole answer. It counts data already requested against
  the free space, so the link's read data never has to wait and several
  requests stay in flight. A write buffer (`stream_buffer_m2s`) waits until a
  whole request's data is buffered before it asks for the memory. An arbiter
  is therefore never held by a writer that has nothing to send.
- **`request_core`** cuts each buffer into 128-byte requests, with one
  address counter per stream. 128 bytes matches one 8-cycle burst of the
  128-bit DDR.
- **`composer`** moves one 64-bit word (two pixels) per cycle. A word moves
  when the inputs that mode needs are valid and the outputs it needs are
  ready.
- **`host_if`** has three CPU-visible regions:
  - region 0 goes to the register link;
  - region 1 goes to a bulk-data link, which is brought out of the top
    unused;
  - region 2 reads and writes the page table.

  Cores address host memory through a linear space. The upper bits index the
  page table (4 KiB pages, 32768 entries) and the lower bits are the offset.
  Each request is cut into HT packets of at most 64 bytes that never cross a
  64-byte boundary.
- **`ddr_ctrl`** turns requests of any length into whole 8-beat bursts. The
  memory has no byte masks, so a write covering only part of a burst becomes a
  read-modify-write (RMW): read the burst, merge the new words, write it back.
  Buffers and addresses that are multiples of 128 bytes never need an RMW.
- **`load_sensor`** watches the seven stream buffers during a run. For each
  one it counts how often the buffer became full or empty, and for how many
  cycles it stayed so. This is what you look at to find the bottleneck link.
  - Read buffers count as full when they refuse link data, and empty when they
    have nothing for the composer.
  - Write buffers count as full when they refuse composer data, and empty when
    idle.

## Bandwidth micro-benchmark

Beside the compositor sit three copies of a small measurement core,
`micro_bench`, one per memory a core can reach:

- host memory, through a fourth port on the host-interface arbiter (64 bit);
- the DDR bank, through a fifth port on the memory arbiter (256 bit);
- on-chip block RAM, through `imorc_int_mem`, a 1 MB RAM behind the same
  request/data interface as the DDR bank.

Each copy is set up through `bench_cfg` and started with `bench_start`. The
configuration gives the test type (read or write), the base address, the total
bytes and the bytes per request. The core issues one request at a time:

- For writes it sends a data pattern in which every 64-bit lane holds its own
  byte address.
- For reads it takes every word at once and folds it into an XOR checksum.

For each request it counts the cycles from the request handshake to the last
data word, and reports the count on `bench_res_valid`/`bench_res_cycles`.
`bench_stat` keeps the last, smallest, largest and summed counts and the total
run time.

A write run reports done only once its link has delivered everything to the
memory side. The benchmark and the compositor share the host interface and
the memory controller, so run them one at a time. Request sizes must be whole
link words: multiples of 8 bytes on the host link and 32 bytes on the memory
links.

The per-request count of a write stops when the last word enters the link,
not when it reaches memory. Writes are posted into the link FIFOs, so small
write requests look faster than the memory really is. For write bandwidth,
divide the bytes moved by `bench_stat.total_cycles` instead; that count
includes draining the link.

`tb_compositing_bench_sweep` sweeps the request size up to 256 bytes on all
three memories and prints a bandwidth table. With the simple memory models
in the testbench, host reads rise from about 80 MB/s at 8-byte requests to
about 550 MB/s at 256 bytes. Host writes rise from about 370 MB/s to about
1 GB/s. The numbers describe the models, not real hardware.

## Interconnect

Every connection between cores is an `imorc_link` with three valid/ready
channels:

- request `{write, addr[39:0], len[15:0]}`, with len in bytes;
- write data;
- read data.

Each channel passes through an `imorc_async_fifo`, which is a Gray-pointer
dual-clock FIFO. The link also inserts an `imorc_width_conv` on the master
clock side. So a 64-bit core at 200 MHz talks to the 256-bit memory port on
the memory clock without knowing either.

Request lengths and addresses must be multiples of the wider of the two link
widths. The converters have no flush; this design's requests always satisfy
the rule, because 128-byte requests and W·H a multiple of 8 pixels give
whole 256-bit words.

Shared slaves sit behind an `imorc_arbiter` (round-robin):

- A write keeps the grant until its data has passed, so write data stays in
  request order.
- A read only leaves {port, word count} in a route FIFO and frees the
  arbiter. Reads from several masters can be outstanding, and the slave
  answers them in order.

## Registers

The registers sit on host region 0. All are 64 bits wide; the offsets are in
bytes.

| offset | name | |
|---|---|---|
| 0x00 | CONTROL | write bit 0 = 1 to start (ignored while busy) |
| 0x08 | STATUS | bit 0 busy, bit 1 done, bits 47:16 passes completed |
| 0x10 / 0x18 | WIDTH / HEIGHT | 16 bit each; W·H must be a multiple of 8 |
| 0x20 | NODES | number of frames |
| 0x28 | MEM_BASE | stored image in DDR (128-byte aligned recommended) |
| 0x30 / 0x38 | FRAME_BASE / FRAME_STRIDE | frames in the linear host space |
| 0x40 | OUT_BASE | final image in the linear host space |
| 0x48 | CYCLES | clock cycles of the last run |
| 0x100 + 8·(4s+k) | load sensor | stream s (Z0 F0 Z1 F1 ZC FC FH); k = 0 full events, 1 full cycles, 2 empty events, 3 empty cycles; cleared when a run starts |

Page-table entry *i* is at region-2 byte offset `8*i`. It holds the physical
byte address of the host page that backs linear page *i*.

## Top-level ports

`compositing_accel` has two clocks, each with its own active-low reset:

- `clk` is the 200 MHz HT/core clock;
- `mem_clk` is the DDR controller's clock.

The HT cave and the DDR SDRAM controller are outside the design. They connect
through simple interfaces:

- `cpu_*`: one 64-bit CPU access at a time, with `cpu_rsp_*` carrying read
  answers.
- `ht_cmd_*`, `ht_wd_*`, `ht_rd_*`: the packet command (length in bytes),
  write data and in-order read data going to host memory.
- `mem_cmd_*`, `mem_wd_*`, `mem_rd_*`:
  - each command is a burst address;
  - each write command is followed by 8 words of 128 bits;
  - each read returns 8 words, in order.
- `bulk_*`: host master link 1, unused by the compositor.
- `bench_*`: configuration, start and results of the three benchmark cores
  (index 0 host, 1 DDR, 2 on-chip).

`busy`, `done`, `rmw_count` and `taken_new` are status outputs for
observation.

## Where this design departs from, or adds to, its source description

The block structure comes from the published accelerator:

- seven stream buffers (four read, three write);
- a request core, a compositing controller and a two-pixel composer;
- an HT interface with three regions and a page table;
- a DDR wrapper with RMW, set to 8-cycle bursts and 128-byte requests;
- 64-bit composer links and a 256-bit memory link.

So do the phase sequence and the frame layout. The following are this
design's own choices:

- **Inside the cores.** Credits in the read buffers, whole-block writes, the
  arbitration policy, FIFO depths, the link channel format and the register
  map.
- **Simplified edge interfaces.** The HT cave and the DDR controller are
  reached through the simplified interfaces above, not their real signalling.
  ECC on the RMW path is left to the vendor controller.
- **New frames come straight from host memory.** Each new frame is read
  directly from host memory in every pass; it is not copied to DDR first.
- **Unspecified sizes.** 4 KiB pages and a 32768-entry page table, which maps
  128 MiB (enough for 8 frames of 1280×1024). Also a 40-bit address space,
  and cutting HT packets at 64-byte address boundaries as well as at the
  64-byte packet size.
- **Single node.** One rendering node is handled by a direct copy.
- **How the benchmark attaches.** The benchmark cores are attached through
  extra arbiter ports, next to the accelerator.
- **Benchmark request sizes.** The benchmark can only issue request sizes that
  are whole link words. A sweep of request sizes in 4-byte steps is therefore
  possible only at those multiples.
- **Not built.** User-defined load sensors and the farming (load-balancing)
  cores.

Circuit notes:

- `disable iff` on reset in the assertions gives a sync/async-net lint note.
  It stands.
- `ddr_ctrl` handles one burst at a time. It does not overlap bursts, so it
  reaches less than the memory's peak rate. That still exceeds what the HT
  side can feed.

## Verification

Every core has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M` and has a cycle watchdog. They use
random traffic and random back-pressure, and compare against models written
independently in the testbench. The composer test also checks the rate: 100
words in 101 cycles.

The system tests use `tb/accel_env.sv`, which wraps the top with two
behavioural models:

- `host_mem_model`: the HT cave plus host memory, with read latency and random
  back-pressure;
- `ddr_mem_model`: the DDR controller plus memory.

The environment does the following:

1. Fills the page table with a scrambled mapping.
2. Writes random frames, with some depth ties.
3. Runs the accelerator.
4. Compares the final image in host memory and the intermediate image in DDR
   pixel by pixel against a reference merge.
5. Compares all 28 load-sensor counters with its own counts.
6. Runs a write and a read test on each of the three benchmark cores. It
   checks the memory contents, checksums, request counts and statistics. The
   DDR test region is deliberately misaligned, so it needs read-modify-write.
7. Requires every mechanism to have occurred: load, compose and final passes,
   64-byte packet splitting, page crossings, arbiter contention, host
   back-pressure, composer stalls, full and empty buffers, pixels won by both
   frames, and read-modify-write exactly when the sizes call for it.

- `tb_compositing_accel`: 40×13 pixels, 4 nodes. The size is not a multiple of
  128 bytes, so it forces RMW.
- `tb_compositing_accel_full`: 800×600, 4 nodes, with the top at its default
  parameters. It runs 4.75 M cycles (≈24 ms of accelerator time with the
  model's latencies), and about 15 s in the simulator.
- `tb_compositing_bench_sweep`: a small compositing run, then the request-size
  sweep of the three benchmark cores, with data checked for every size and read
  bandwidth required to grow with the request size.
- `tb_compositing_accel_large`: 1280×1024, 8 nodes, the largest case the
  design targets, also at default parameters. It runs 28.5 M cycles (143 ms of
  accelerator time with the host model used) and takes about 1.5 min in the
  simulator.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/imorc_pkg.sv \
    tb/tb_compositing_accel.sv --top-module tb_compositing_accel -Mdir obj -o sim
obj/sim
```

Replace the testbench name to run any other test. The package must come
first; the other modules are found through `-Irtl -Itb`. Width and
timescale warnings are expected (`-Wno-fatal`).

`tb_ddr_ctrl` takes a `BURST` parameter. Add `-GBURST=2` or `-GBURST=4` to
check the memory wrapper with 2- or 4-cycle bursts as well as the default 8.
With 2-cycle bursts one burst is a single link word, so read-modify-write
never occurs.
