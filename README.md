# JPEG2000 block-coding accelerator

JPEG2000 spends most of its encoding time in the entropy coder: every
code-block of wavelet coefficients is coded bit-plane by bit-plane in three
passes, and every decision in those passes is a binary symbol that goes
through an adaptive arithmetic coder (the MQ coder). That work is a lot of
bit-level control flow, and a small embedded processor does it slowly. This
RTL moves it into hardware. A processor writes a few registers. The
accelerator then fetches a code-block from memory, codes it, and writes the
finished codeword back. The same coders also run the other way: they fetch
a codeword, decode it and write the code-block back. Several coders work in
parallel.

The design follows a published accelerator for low-power embedded systems,
built as a prototype on an FPGA with an on-chip ARM processor. That design
uses the block-coder organisation of Taubman and Marcellin: two data
memories, two state memories, a stripe-column controller and an MQ coder
with its context state file. The system around the coders here (register
map, DMA details, bus protocol, arbitration) is this design's own, because
the source only names those parts. Where the RTL departs from the source is
listed in [What is not here](#what-is-not-here).

Everything is SystemVerilog-2017 and synthesizable. It is tested with
Verilator. Every codeword is compared bit for bit against an independent
software model of the JPEG2000 coder, and every codeword is decoded again
and compared with the original samples.

## Block diagram

```
            host port (registers)                memory port (DMA)
                   |                                    ^
             register_file                              |
                   |                              bus_arbiter (round robin)
     +-------------+-------------+                 ^    ^    ^    ^
     |             |             |                 |    |    |    |
 coder_channel  coder_channel  ...   (NUM_CODERS, each with two bus masters)

 coder_channel:
   encode:  block_dma --load--> block_coder --bytes--> codeword_dma
   decode:  codeword_fetch --bytes--> block_coder --read-out--> sample_store
            (block port: block_dma / sample_store,
             codeword port: codeword_dma / codeword_fetch)

 block_coder:
   data_mem (sign)   data_mem (magnitude)   state_mem1   state_mem2
            \              |                  |            /
             +------ stripe_column_logic -----+-----------+
                  |  symbols (context, bit)         ^ decoded bit
              sync_fifo                             |
                  |                                 |
              mq_encoder --> mq_context_file <-- mq_decoder
```

## How one code-block is coded

A code-block is a `BLK_W` x `BLK_H` array of sign-magnitude integers. With the
defaults it is 32x32 samples, each a sign and 8 magnitude bits. The coder
works from the most significant non-zero magnitude plane down to plane 0.
Skipped all-zero planes are reported as `zero_planes`. The first coded plane
gets only a **cleanup** pass. Every later plane gets three passes, in this
order:

* **Significance propagation (SP)** codes samples that are still
  insignificant but have at least one significant neighbour among their
  eight.
* **Magnitude refinement (MR)** codes the current bit of samples that became
  significant in an earlier plane.
* **Cleanup (CU)** codes every sample not yet coded in this plane.

A sample becomes *significant* when its first 1 bit is coded. Its sign is
coded right after that bit.

Every pass visits the block in **stripe order**. Stripes are four rows high.
Within a stripe the columns go left to right, and each column is scanned top
to bottom. The hardware is built around that order: all memories deliver a
whole four-sample stripe column at once.

Each symbol carries a **context label** (0-18). The label selects the
probability estimate the MQ coder uses for it:

| labels | use | selected by |
|---|---|---|
| 0-8 | zero coding (is the sample significant now?) | counts of significant horizontal, vertical and diagonal neighbours; the table depends on the subband orientation (LL/LH, HL with H and V swapped, HH by diagonals) |
| 9-13 | sign coding | signs of the significant horizontal and vertical neighbours, with an XOR bit that mirrors the symmetric cases |
| 14-16 | refinement | first refinement with or without significant neighbours, or a later refinement |
| 17 | cleanup run | see below |
| 18 | uniform | non-adaptive, for the run position |

**Run mode.** In the cleanup pass, a column whose four samples and entire
6x3 neighbourhood are insignificant is coded with a single run symbol. A 0
means all four samples stay zero. A 1 is followed by two uniform symbols
giving the row of the first 1, then that sample's sign, and normal coding
continues below that row. Sparse blocks spend most of their cleanup time in
this mode.

## Stripe column logic and the state memories

`stripe_column_logic` is the pass controller. Each cycle it looks at the
current column through three inputs:

* The current plane bit and the sign of the column's four samples, from the
  two `data_mem` instances. The magnitude memory holds all planes of a
  sample, and the block coder selects the current one.
* A **6x3 window** of significance and sign bits from `state_mem1`: rows -1
  to 4 around the stripe, and columns -1 to +1. That is exactly the union of
  the four samples' 3x3 neighbourhoods. Positions outside the block read as
  insignificant.
* Two per-sample bits from `state_mem2`. *Visited* means the sample was
  coded in this plane's SP pass, so MR and CU skip it. *Refined* means the
  sample has had a refinement bit before, which selects context 16.

From these the controller works out, combinationally, which of the four
rows belong to the current pass. It then codes the first member at or below
its row pointer. When a zero-coding symbol is a 1, the next cycle codes the
sign and sets the sample's significance. A column with no members left
costs one cycle, so a column takes a variable number of cycles. State
updates are written in the cycle the symbol is issued, so the next row
already sees them. This matters within a column: a sample that becomes
significant pulls the sample below it into the SP pass.

At the end of each cleanup pass the visited bits are cleared in one cycle. A
new block clears both state memories and returns every context to its start
state.

`max_passes` (0 means all passes) stops coding early. The codeword is then
terminated after that pass. This is the truncation that JPEG2000 uses for
rate control.

## The MQ encoder

`mq_encoder` holds the interval length **A** (16 bits) and the interval base
**C** (28 bits: a carry bit, 8 output bits, spacer bits and the fraction). For
a symbol in context *cx* the context file gives a state index and the MPS
value. The index addresses the 47-entry table in `jp2k_pkg`, which gives the
LPS probability Qe, the next state after an MPS, the next state after an
LPS, and whether an LPS swaps the MPS sense.

* MPS: `A -= Qe`, `C += Qe`. If that leaves A below 0x8000 and smaller than
  Qe, the sub-intervals are exchanged (`A = Qe`, C unchanged).
* LPS: `A = Qe`. Or, if `A - Qe < Qe`, the exchange happens: A keeps
  `A - Qe` and C advances.
* The probability state changes only when A has to be renormalised. That
  happens always after an LPS, and after an MPS that drops A below 0x8000.

**Renormalisation** shifts A and C left until A's MSB is set. A counter CT
counts the bits left before the next byte is due. When it reaches zero,
*byte-out* moves the top of C into the one-byte buffer B and releases the
previous B. The previous B is held back because a later carry out of C can
still increment it. After a 0xFF byte only 7 bits are taken (bit stuffing),
so a carry can never run through a 0xFF. The first byte-out only fills B.
The end of a codeword (*flush*) sets C to the value with the most trailing
ones that is still inside the interval. It then pushes out two bytes and
drops a final 0xFF.

**Timing.** The shift amount is A's leading-zero count. The hardware shifts
by that amount in one step, up to the next byte boundary, and does the
byte-out in the same cycle. So a symbol takes one cycle, plus one cycle for
each byte boundary its shift crosses (at most two). In practice this is one
cycle per symbol plus about one per output byte. A 4-entry FIFO between the
controller and the encoder absorbs those extra cycles. The encoder stalls
when its byte sink (the codeword DMA's FIFO) is full.

## Decoding

Decoding reuses everything above except the encoder. The pass controller
runs the same scan with the same state memories, so it produces the same
context labels in the same order. The difference is where each symbol's
value comes from. When encoding, the controller reads it from the data
memories. When decoding, it sends only the context label to `mq_decoder`,
and the decoded bit comes back in the same cycle. The controller's next step
depends on that bit (a 1 in zero coding is followed by a sign, a broken run
by its position), so the symbol FIFO is bypassed and the two run in lock
step.

The decoder writes what it learns into the data memories:

* A sample that becomes significant in plane p gets magnitude 2^p and its
  decoded sign.
* A refinement 1 bit in plane p is OR-ed into the magnitude.

Samples that never became significant read out as zero. The data memories
do not have to be cleared first, because the read-out is gated by the
significance bits. Bits below the last decoded pass stay zero; no
reconstruction offset is added.

`mq_decoder` mirrors the encoder. A (16 bits) is the interval length. C
(32 bits) holds the codeword bits still to be matched. For a context with
LPS probability Qe:

* If the top half of C is below Qe, the symbol lies in the lower
  sub-interval. This is the LPS, or the MPS when the sub-intervals are
  exchanged (`A - Qe < Qe`). A becomes Qe.
* Otherwise Qe is taken off C and A. If A is still at least 0x8000, the
  symbol is the MPS with no state change. If not, it is the MPS or (when
  exchanged) the LPS.
* Renormalisation shifts A and C together and updates the probability state
  as in the encoder. Each time CT runs out, *byte-in* adds the next codeword
  byte to C. After a 0xFF byte the next byte enters 7 bits lower, which
  undoes the bit stuffing. A 0xFF followed by a byte above 0x8F is a marker
  or the end of data. It is not consumed, and 1 bits are fed instead.

The decoder needs to see the byte after the current one, and it expects
0xFF bytes once the codeword has run out. `codeword_fetch` supplies both.
A decision takes one cycle plus one per byte boundary, as in the encoder,
so decoding runs at about the same rate as encoding. The combinational path
from context label through the state file and the comparison back into the
controller is longer than any encode path. A decoding coder would therefore
clock lower than an encode-only one.

A decode must be told how many zero planes were skipped and how many passes
the codeword holds. In a JPEG2000 stream those numbers travel in the packet
headers, outside the block coder.

## The accelerator around the coders

**Host port.** `host_sel` / `host_we` / `host_addr` (word index) /
`host_wdata`. Read data and `host_ack` come one cycle later. Each channel c
owns eight words starting at word index `8*c`:

| word | name | contents |
|---|---|---|
| +0 | CTRL | write bit 0 = start (ignored while busy); bits 2:1 orientation (0 LL, 1 HL, 2 LH, 3 HH); bit 3 decode; bits 15:8 pass limit (0 = all), or when decoding the passes in the codeword; bits 20:16 zero planes (decoding) |
| +1 | SRC | byte address of the samples (decoding: of the codeword) |
| +2 | DST | byte address for the codeword (decoding: for the samples) |
| +3 | STATUS | bit 0 busy, bit 1 done (sticky, cleared by the next start), bits 7:4 zero planes, bits 15:8 passes coded |
| +4 | LENGTH | codeword length in bytes; written before a decode |

A start takes the other CTRL fields written in the same word, so one write
configures and starts a channel.

**Sample format.** One 32-bit two's complement word per sample, row-major
and contiguous. `block_dma` converts each sample to sign-magnitude and
saturates magnitudes that need more than `MAG_BITS` bits. It loads one sample
per acknowledged bus read.

**Codeword format.** `codeword_dma` packs bytes little-endian (first byte in
bits 7:0) into 32-bit words. The last word is zero-padded, and the byte count
goes to LENGTH.

**Memory port.** `mem_req` / `mem_rsp` use the `bus_req_t` / `bus_rsp_t`
structs in `jp2k_pkg`. The master holds `valid`, `we`, `addr` and `wdata`
until the slave raises `ack`. Read data comes with the `ack`. In the
original system this port would sit behind the FPGA-to-processor bus
bridge; here any memory or bus adapter can answer it. `bus_arbiter` shares
the port among the 2 x `NUM_CODERS` DMA masters in round-robin order. It
keeps a grant until that master's request is acknowledged.

A channel (`coder_channel`) runs three phases when encoding: load, then
code (the codeword DMA drains bytes as they come), then write the last
partial word. The coder is idle while its block loads, which is why the
source design uses several coders at once. Decoding has two phases: decode
(`codeword_fetch` reads one word at a time and hands out its bytes), then
`sample_store` writes the block back. The samples use the same 32-bit
two's complement format that `block_dma` reads. The channel's two bus ports
serve whichever pair of units matches the current direction.

## Measured behaviour

With a memory that always answers, the block DMA moves 1 sample per cycle and
the codeword DMA 1 word per cycle. With the sink always ready, the MQ
encoder's rate is 1 cycle per symbol plus at most 1 per output byte. On
32x32 blocks with 8 magnitude planes, all passes coded, the block coder
reaches:

| block | samples / cycle |
|---|---|
| sparse (3 % non-zero, mostly run mode) | 0.12 |
| dense, full range | 0.08 |
| 4 planes (small magnitudes) | 0.17 |
| truncated after 7 passes | 0.23 |

That is the same order as the source design's estimate of 0.13 samples per
cycle for lossless coding. Decoding the same codewords takes within a few
percent of the same cycle counts (for example 12783 cycles against 13304 for
the dense block). This holds even with gaps in the codeword byte stream,
because the decoder needs a new byte only about every eight symbols.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NUM_CODERS` | 4 | `jp2k_accel` | parallel coder channels (the source estimates four saturate a shared bus, and up to 20 fit its FPGA) |
| `BLK_W`, `BLK_H` | 32, 32 | top and coder | code-block size; `BLK_H` must be a multiple of 4; JPEG2000 profile-0 also allows 64x64 |
| `MAG_BITS` | 8 | top and coder | magnitude bits per sample (sign is separate); lossless 5/3 coding of 8-bit images needs up to 11 |
| `SYM_FIFO_DEPTH` | 4 | `block_coder` | symbol buffer in front of the MQ encoder |
| `FIFO_DEPTH` | 8 | `codeword_dma` | byte buffer in front of the bus |

The state memories and context file are flip-flop arrays with combinational
reads. The data memories are plain arrays with combinational read, which
maps to distributed RAM. Moving them to synchronous block RAM would need one
cycle of read-ahead in the stripe-column logic.

## What is not here

* **Reconstruction.** A decoded sample holds exactly the decoded bits.
  Adding a rounding offset for truncated planes is left to the software that
  follows.
* **Encode-only coders.** The source suggests that some coders could be
  built without decoding to save area. Here every coder can do both.
* **Direct sample path from the on-chip dual-port SRAM.** The source offers
  this as an option (two 16-bit samples per cycle). Only the bus DMA is
  built.
* **Separate clocks.** The source lets the MQ coder and the DMA units run on
  clocks of their own. It also raises the coder clock while encoding,
  because decoding limits the clock rate. Here everything runs on one `clk`.
* **AHB.** The host and memory ports are the simple request/acknowledge
  buses described above, not AHB.
* **Power management.** There is no low-power standby mode and no clock
  gating. There are also no interrupts: software polls STATUS.
* **Coding options.** No per-pass termination or per-pass length reporting.
  One codeword is produced per block, terminated after the last coded pass.
  There is no vertically-causal mode, bypass mode or segmentation symbols.
* The processor, SDRAM, UART, on-chip SRAM and bus bridges of the original
  system are outside this RTL.

## Files

`rtl/`:

* `jp2k_pkg.sv`: types, the MQ probability table, the context functions and
  the bus structs.
* `mq_context_file.sv`, `mq_encoder.sv`, `mq_decoder.sv`: the MQ coder.
* `data_mem.sv`, `state_mem1.sv`, `state_mem2.sv`, `stripe_column_logic.sv`:
  the block coder's parts.
* `sync_fifo.sv`, `block_coder.sv`: the FIFO and the block coder that ties
  the parts together.
* `block_dma.sv`, `codeword_dma.sv` (encoding), `codeword_fetch.sv`,
  `sample_store.sv` (decoding), `coder_channel.sv`, `bus_arbiter.sv`,
  `register_file.sv`: the system around the coders.
* `jp2k_accel.sv`: the top.

`tb/`: one self-checking testbench per module (`<module>_tb.sv`), plus
`jp2k_ref_pkg.sv`. That package is a software reference of the three passes
and the MQ encoder, written as plain loops over padded arrays and sharing no
code with the RTL. The block-coder and top-level tests compare every
codeword byte against it. The block-coder and top-level tests also decode
every codeword they produce and compare the result with the original
samples.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`, and a watchdog
ends it if it hangs. For example, the end-to-end test runs four channels
at default size, with random bus wait states and a slowed memory that backs
codeword bytes up into the coders:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/jp2k_pkg.sv $(ls rtl/*.sv | grep -v jp2k_pkg) \
    tb/jp2k_ref_pkg.sv tb/jp2k_accel_tb.sv \
    --top-module jp2k_accel_tb -o sim && ./obj_dir/sim
```

`-Wno-fatal` is needed because the software reference in `tb/` uses `int`
values as conditions, which Verilator reports as width warnings. The other
testbenches build the same way: the package first, the other modules, then
`tb/jp2k_ref_pkg.sv` and the testbench. The end-to-end test counts bus contention,
wait states, symbol-FIFO and codeword back-pressure, run-mode columns,
broken runs, SP and MR symbols, truncated codewords, and decoding stalled
for lack of codeword bytes. It fails if any of these never happened. After
each encoding round it decodes the four codewords on all four channels at
once and checks the decoded blocks in memory.
