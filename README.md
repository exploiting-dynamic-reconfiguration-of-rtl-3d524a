# Docking a run-time reconfigurable region to an embedded CPU

An FPGA with an embedded processor can time-share part of its fabric: one region (the
*dynamic area*) is rewritten at run time with whichever accelerator the software needs next,
while the rest of the chip keeps running. For this to work the accelerators must all see the
same, fixed connection to the processor. The hardware that provides that connection is a small
bus peripheral, the *dock*, placed next to the region. The dock gives the region an address
range on a processor bus, a data register, a write strobe and a read channel. Each accelerator
is written only against that connection.

This RTL follows the two systems described in *Exploiting dynamic reconfiguration of platform
FPGAs: Implementation issues* (Virtex-II Pro with a PowerPC 405). Both are built, side by side,
in one top level:

| | 32-bit system | 64-bit system |
|---|---|---|
| dock | `opb_dock`, slave on the 32-bit peripheral bus | `plb_dock`, master/slave on the 64-bit local bus |
| data channel | 32 bits | 64 bits |
| transfers | CPU loads and stores only | CPU loads/stores, or DMA |
| extras | none | DMA engine, 2047-entry output FIFO, interrupt |
| accelerators | pattern matcher, brightness, blending, fade, key hash | the same, plus SHA-1 |

The 64-bit system exists because the CPU cannot move 64 bits per instruction. A wider bus only
helps the accelerators if a DMA engine does the transfers. DMA in turn needs a buffer for the
results while input is still streaming in. Most of the complexity is there, and so is most of
this document.

## The connection between a dock and its dynamic area

Every accelerator has the same ports:

| signal | direction (seen from the accelerator) | meaning |
|---|---|---|
| `din[W-1:0]` | in | the dock's data register. It holds the last word written until the next write |
| `wr` | in | high for one cycle after each write into the data register |
| `dout[W-1:0]` | out | the read channel. A CPU read of the dock's data address returns it |
| `dout_valid` | out | one-cycle flag: a new result is on `dout` (used by the 64-bit dock's FIFO) |

In the original system, `wr` is the signal that may serve as a clock enable for the region's
flip-flops. All accelerators here use it that way: nothing in an accelerator changes except on
`wr` or in the pipeline steps that follow it. On the FPGA these wires cross the region boundary
through "bus macros". A bus macro is a LUT at a fixed location per bit, so that separately built
configurations line up. Logically each one is a wire, so no RTL stands for it.

The channel has **no address**. So an accelerator cannot tell a constant, a command or a data
word apart by where it was written. Every accelerator here therefore uses an in-band
convention, described with each one below. `dout_valid` is an addition of this design: the
64-bit dock has to know when to push a result into its FIFO, and the published description does
not say how.

## The 32-bit dock (`opb_dock`)

A plain bus slave on a 256-byte window at `BASE`:

* write to offset 0: store the word in the data register and pulse `da_wr` in the following cycle.
* read of offset 0: the accelerator's read channel `da_dout`.
* read of offset 4: the stored data word.

Every transfer is one CPU load or store, so a result is read back with a separate load.

## The 64-bit dock (`plb_dock`)

### Registers

Byte offsets within the 256-byte window at `BASE`. All registers are 64 bits.

| offset | write | read |
|---|---|---|
| `0x00` DATA | data register, per byte enable, + one `da_wr` pulse | read channel `da_dout` |
| `0x08` FIFO | — | head of the output FIFO, and pops it |
| `0x10` SRC | DMA source byte address | SRC |
| `0x18` DST | DMA destination byte address | DST |
| `0x20` LEN | DMA length in 64-bit words | LEN |
| `0x28` CTRL | bit0 start, bit1 capture, bit2 chain | `{full, empty, count[10:0], 1'b0, chain, capture, busy}` |
| `0x30` IRQ | bits[2:0] clear pending (write 1), bits[10:8] enable | `{enable[2:0], 5'b0, pending[2:0]}` |

The register layout is this design's own. The original lists only the dock's capabilities.

A 32-bit CPU store reaches the dock with byte enables `8'hF0` (offset 0) or `8'h0F`
(offset 4). It updates that half of the data register and still strobes `da_wr`. The pattern
matcher, the key hash and the SHA-1 engine use bits [31:0]. They are 32-bit designs carried
over unchanged from the smaller system, so on the 64-bit dock they are fed by stores to
offset 4.

### Capture and the output FIFO (`out_fifo`)

When the capture bit is set, every cycle in which the dynamic area raises `dout_valid` pushes
`dout` into the output FIFO. The FIFO is a 2048-entry circular buffer that keeps one slot empty,
so it holds **2047** 64-bit words: the capacity of the original, and eight 18-kbit block RAMs.
It reads first-word-fall-through. A push while full is dropped and pulses `overflow`.

### Block-interleaved DMA (`dock_dma`)

The DMA engine streams a block of words from memory into the accelerator and, with capture on,
returns the results to memory. An accelerator produces results while input is still arriving,
and the DMA can only do one thing at a time. So the engine alternates in rounds:

```
IDLE --start--> FETCH (read a word from SRC) -> PUSH (write it to the data register, strobe)
                  ^                               |
                  |      more words, FIFO below   |
                  +------ the high mark ----------+
                                                  | all sent, or FIFO >= 2047 - SLACK
                                                  v
                   SETTLE (wait SETTLE_CYC cycles for results still in the pipeline)
                                                  |
                                                  v
                   DRAIN (write FIFO words to DST until empty) --words left--> FETCH
                                                  |
                                                  +--none left--> DONE (interrupt) -> IDLE
```

The original stops writing "when the FIFO becomes full". Here the engine stops `SLACK` (16)
entries early, because results of words already written are still in the accelerator's
pipeline. It then waits `SETTLE_CYC` (16) cycles before draining. This is safe as long as an
accelerator returns at most one result per word and lags by fewer than `SLACK` words. All
accelerators here meet that.

Special cases:

* Capture off: the engine only writes words (no rounds).
* Length 0 with capture on: the engine only drains the FIFO, a pure read transfer.

### Descriptor chains (scatter-gather)

With CTRL bit 2 set at start, SRC holds the address of a chain of descriptors instead of the
data. Each descriptor is four 64-bit words in memory:

| word | content |
|---|---|
| 0 | source byte address |
| 1 | destination byte address |
| 2 | length in 64-bit words |
| 3 | byte address of the next descriptor; 0 ends the chain |

A fourth state, DESC, reads these four words. The block then runs as shown above. With capture
on, the FIFO is drained to that block's destination before the next descriptor is read, so
each block's results land at its own destination. DMA-done is raised once, at the end of the
chain. LEN and DST are not used in this mode.

The original engine was generated by the FPGA vendor's tools. It is known only to be a
scatter-gather controller, so this descriptor layout is this design's own.

The memory port uses the same handshake as the bus slave ports (see below). An assertion checks
that a request and its address stay stable until acknowledged.

### Interrupts (`irq_gen`)

The interrupt lets the CPU do other work during a DMA transfer instead of polling. Three
sources set sticky pending bits:

* bit 0: DMA done
* bit 1: FIFO became full
* bit 2: FIFO overflow

The interrupt line is the registered OR of the pending bits that are enabled. Write-one-to-clear
clears them. If an event and its clear come in the same cycle, the event wins.

### Bus handshake

The original docks sit on IBM CoreConnect buses (PLB/OPB), whose protocols are outside the scope
of this RTL. Every bus port here uses one simple handshake instead:

* the master raises `req` (with `we`, `addr`, data, byte enables) and holds it until `ack`;
* the slave answers with a one-cycle `ack` one cycle later;
* read data is valid with `ack`.

Back-to-back requests from a master that keeps `req` high take two cycles each. A bridge to
the real bus protocol would replace these ports.

## The accelerators

The software loads one of these at a time into a dynamic area.

### Pattern matcher (`pattern_match`, 32-bit)

This accelerator counts how many pixels of an 8x8 bilevel pattern equal the pixels under a
window that slides along an image. The image is sent as one 8-pixel column per word: bit *i*
is window row *i*, and the CPU walks the image band by band, 8 rows at a time. Eight row stages
each shift the new bit into their row of the window. Each stage then counts the matching
positions of its row (XNOR, then population count), and the eight counts are summed.

* `din[31]=1`: load pattern row `din[26:24]` with `din[7:0]`.
* `din[31]=0`: shift in column `din[7:0]`.
* Bit 0 of a pattern row matches the most recent column.
* The result (0..64, in `dout[6:0]`) appears on the third clock edge after the edge that takes
  the column.
* The first seven results of a band cover a partly filled window.

### Brightness (`pix_brightness`, W/8 pixels per word)

Each 8-bit unsigned pixel plus a signed 8-bit constant, clamped to 0..255. The constant is
`din[7:0]` of the first word after the configuration is loaded. One result word per input word
follows one cycle later.

### Additive blending (`pix_blend`)

Each word holds image A in its lower half and image B in its upper half: 2+2 pixels on 32 bits,
4+4 on 64 bits. The outputs are the saturating sums. To halve the number of reads, the results
of two consecutive words are packed into one output word (first word in the lower half).
`dout` changes only after every second word.

### Fade (`pix_fade`)

`(A - B) * f + B` per pixel, with the same word layout and packing as blending. Here `f` is the
fraction F/256 with F in 0..256, loaded from `din[8:0]` of the first word; larger values are
clamped to 256. The product is rounded toward minus infinity, so the result always lies between
A and B and cannot overflow. The number format of `f` is this design's choice.

### SHA-1 (`sha1_core`, 32-bit)

This is the standard SHA-1 compression function, one round per clock: 80 cycles per 512-bit
block, plus one cycle to add into the chaining value. The message schedule is a 16-word shift
register. At each round the engine uses `w[0]` and shifts in `rotl1(w[13]^w[8]^w[2]^w[0])`, so
W(t+16) is formed while W(t) is consumed. Software pads the message. Since the channel has no
address, each block starts with a command word:

| `din[31:28]` | action |
|---|---|
| 1 | reset H0..H4 to the initial values, then take 16 message words |
| 2 | keep H (next block of the same message), then take 16 message words |
| 3 | read channel shows H`din[2:0]` (0..4), or `{31'b0, busy}` for 5 |

Words that arrive while the engine is busy are ignored. The CPU must wait 81 cycles after a
block's last word, or poll the status word. In the original, SHA-1 only fits the larger system's
dynamic area, so only that area has it (`HAS_SHA1`).

### Key hash (`key_hash`, 32-bit)

The original also accelerates a public-domain hash that maps a variable-length key to 32 bits,
with the whole function in hardware. The function is known only through a citation. This RTL
takes it to be Bob Jenkins' lookup2 hash. That hash describes itself in exactly those words and
works on 12-byte blocks, and all the benchmark key lengths (36 to 360000 bytes) are multiples
of 12. Treat this identification as the weakest point of the design.

Three accumulators a, b, c start at the golden-ratio constant (a, b) and at an initial value
(c). Each 12-byte block adds three little-endian words into a, b, c and mixes them: nine steps
of the form `a = a - b - c; a ^= c >> 13`, with rotating roles and fixed shift amounts. The
last 0..11 bytes are added the same way. Their c part is shifted up one byte, because c's low
byte receives the key length. One final mix leaves the hash in c.

In-band protocol (this design's own): a length word in bytes, an initial-value word, then
ceil(length/4) key words. Bytes past the length are ignored. A block is mixed in the edge that
takes its third word, so words may arrive every cycle. The hash appears on `dout`, with
`dout_valid`, in the cycle after the last word, so a read issued right after the last write
sees it.

## Reconfiguration in this RTL (`dyn_area`)

On the FPGA a dynamic area holds exactly one accelerator, written through the internal
configuration port by a configuration controller. `dyn_area` instead instantiates all of them.
Its `cfg` input says which one is "loaded":

| `cfg` | accelerator |
|---|---|
| 0 | empty area (reads 0) |
| 1 | pattern matcher |
| 2 | brightness |
| 3 | blending |
| 4 | fade |
| 5 | SHA-1 (64-bit system only) |
| 6 | key hash |

Only the selected accelerator sees `wr` and drives the read channel. When `cfg` changes, the
newly selected accelerator is reset, as a freshly loaded configuration starts from its initial
flip-flop values. So constants such as the brightness offset must be sent again after every
reconfiguration. At the top level, `cfg32` and `cfg64` stand for the configuration controller.

## The top level (`dynreconf_top`)

The top holds both systems, each with its own clock and reset: the original buses ran at
50 MHz (32-bit) and 100 MHz (64-bit). Everything that is vendor IP or off-chip in the original
stays outside, and its side of the connection is a port:

| original part | here |
|---|---|
| CPU and bus arbiters | drive `opb_*` and `plb_*` |
| memory controller and external memory | answer the `dma_*` master port |
| interrupt controller | receives `irq64` |
| configuration controller | drives `cfg32` / `cfg64` |
| reset block | drives `rst32` / `rst64` |

The bridge, UART, GPIO, JTAG link and block-RAM controller have no connection to the docks and
are not represented.

Parameters and their defaults:

| module | parameter | default | origin |
|---|---|---|---|
| `plb_dock`, `dock_dma` | `DW` | 64 | published channel width |
| `plb_dock`, `dock_dma`, `out_fifo` | `FAW` / `AW` | 11 → 2047 entries | published FIFO capacity |
| `plb_dock`, `dock_dma` | `SLACK`, `SETTLE_CYC` | 16, 16 | own choice |
| `plb_dock`, `dock_dma` | `LW` | 24 (length up to 16M words) | own choice |
| `opb_dock`, `plb_dock`, top | `BASE`, `DOCK32_BASE`, `DOCK64_BASE` | `32'h8000_0000` | own choice |
| pixel accelerators | `W` | 32 (64 in the 64-bit area) | published |

## Where this RTL departs from the original

* The bus protocols are replaced by the req/ack handshake above.
* The DMA descriptor layout is this design's own.
* The DMA stops `SLACK` entries before the FIFO is full and waits `SETTLE_CYC` cycles before
  draining.
* `dout_valid` is added to the dock–area connection.
* Register map, in-band command encodings and data layouts are this design's own: column-serial
  image feed, A/B halves, the number format of f, the SHA-1 command words, the key hash's
  length and initial-value words.
* The pattern matcher's "pipeline of eight stages" is read as eight parallel row stages feeding
  one adder. The stages are not chained.
* Reconfiguration is a select input over all accelerators, not a partial bitstream.
* The key hash is taken to be lookup2 (see above); the original only cites it.
* Nothing here has been placed on an FPGA. Whether each accelerator fits its region's published
  size (1232 slices and 6 block RAMs in the 32-bit system, 3072 slices and 22 block RAMs in the
  64-bit one) is unknown.

## Files

* `rtl/dock_pkg.sv`: register offsets, interrupt numbers, configuration and DMA-state enums,
  the saturation helper.
* `rtl/*.sv`: one module per file, as named above.
* `tb/tb_<module>.sv`: a self-checking testbench per module; `tb/tb_workload_*.sv`: benchmark runs
  on the whole design.
* `tb/mem_model.sv`: behavioural memory with random 1..3-cycle latency, used by the DMA tests.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each has a
watchdog. With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dynreconf_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/dock_pkg.sv tb/tb_dynreconf_top.sv
./obj_dir/Vtb_dynreconf_top
```

Replace the top module name to run another testbench. Lint one module with
`verilator --lint-only -Wall -Wno-fatal -y rtl rtl/dock_pkg.sv rtl/<module>.sv`.

### What the testbenches cover

* Pixel accelerators, pattern matcher, key hash and SHA-1: compared against reference
  computations written in the testbench. SHA-1 uses the standard "abc" and two-block test
  vectors, plus the 81-cycle block time. The key hash is also pinned to four results of its
  reference C code. The pixel accelerators are run at both widths.
* `out_fifo`: random traffic against a queue model at its full 2047-entry size.
* `dock_dma` and `plb_dock`: use small FIFOs so that a transfer needs several fill/drain rounds.
* `tb_dynreconf_top`: runs the whole design at its default sizes:
  * a pattern scan, the three pixel tasks and a key hash on the 32-bit system;
  * SHA-1 through 32-bit stores on the 64-bit system;
  * a 3000-word DMA brightness pass that needs two fill/drain rounds of the 2047-word FIFO;
  * CPU-driven capture until the FIFO overflows, then a drain-only DMA;
  * a chained DMA over two descriptors.

  It counts each mechanism: strobes, reconfigurations, drain rounds, stops at the high mark,
  FIFO full, overflow, interrupts, packed results, SHA-1 blocks, DMA descriptors read and key hashes.
  A mechanism that never happens counts as a failure.

Five more testbenches run the published benchmarks on the full top and print bus cycles, so
that the hardware's share of the published times can be compared:

* `tb_workload_transfers`: write, read and write/read sequences of 1 to 100000 operations.
  They run with CPU transfers on the 32-bit system and with DMA on the 64-bit one, behind a
  one-cycle memory. At large counts the DMA needs 3.0 cycles per write, 2.0 per drained read
  and 5.0 per interleaved write/read. The original system reports 5, 4 and 9 cycles including
  software, and the testbench checks against those limits.
* `tb_workload_pattern`: an 8x8 pattern over a 256 x 256 binary image. All 62001 window
  positions are checked.
* `tb_workload_hash`: keys of 36 to 360000 bytes on both systems, with 32-bit CPU stores.
  A key costs 2 bus cycles per word.
* `tb_workload_sha1`: messages of 64 to 640000 bytes. The CPU pads each message, sends it block
  by block and polls `busy`. Digests are compared with a behavioural SHA-1. A block costs 118
  bus cycles.
* `tb_workload_images`: brightness, blending and fade on 256 x 256 images.
  * 64-bit system, DMA: 0.63 cycles per pixel for brightness and 1.0 for the two-image tasks.
    The CPU merges the two images beforehand.
  * 32-bit system, CPU transfers: 1.0 and 1.5 cycles per pixel.

The included `.sv` files lint without errors and synthesise without latches. The synthesised
64-bit dock holds the 2048 x 64 FIFO array as memory (131072 bits).
