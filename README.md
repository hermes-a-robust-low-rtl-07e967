# Hermes optical link: SystemVerilog RTL

Hermes is a point-to-point link protocol for trigger electronics. The data are
produced in a clock locked to the accelerator (here 360 MHz). The optical links run
at a standard commercial line rate (25.78125 Gb/s) that has no relation to that clock.
The protocol bridges the two clocks and keeps latency low. Its error protection
covers exactly the information whose loss would make a receiver lose
alignment. It does not use a heavy block FEC over the whole stream.

The idea in one paragraph: the link can carry a little more than the algorithm
produces. In every slot where the algorithm has nothing waiting, the transmitter
inserts a *filler* word. The receiver strips the fillers again, so the words
leave the receive memory at the algorithm rate in the order they went in. The
fillers are not wasted. They carry each packet's CRC, link metadata and
alignment markers, so none of these costs algorithm bandwidth. Every word
carries a 3-bit header that tells Data words from Control words. If a filler
were mistaken for data, or data for a filler, the receiver would slip by one
word. The header and the control-word type are therefore each protected by a
single-error-correcting code.

This repository holds RTL for a multi-channel endpoint, `hermes_top`. It has
NCH transmit and NCH receive channels plus channel bonding. The multi-gigabit
transceivers (MGTs) are not included. The top exchanges 64-bit parallel words
with them on `tx_mgt_data` / `rx_mgt_data`.

## Data path at a glance

```
algo_clk                 | tx_link_clk                                   
user word -> Tx CRC -> Tx FIFO -> packet builder -> scrambler -> 64b/67b gearbox -> MGT
                                   ^ filler generator
rx_link_clk[i]                                                      | algo_clk
MGT -> 64b/67b gearbox -> descrambler -> decoder -> filler detection -> Rx BRAM -> user
        ^ link init (word lock, bit slip)                                ^ channel bonding
                                                                      Rx CRC
```

| Module | Clock | Role |
|---|---|---|
| `hermes_tx_crc` | algo | 16-bit CRC per packet; forms the 72-bit FIFO word |
| `hermes_async_fifo` | algo -> tx link | Tx FIFO, Gray-pointer dual-clock FIFO |
| `hermes_filler_gen` | tx link | reassembles the CRC, builds Padding/CRC/Align fillers |
| `hermes_packet_builder` | tx link | chooses what goes in each slot; toggling header |
| `hermes_scrambler` / `hermes_descrambler` | link | self-synchronous x^58+x^39+1 scrambler on the 64-bit payload |
| `hermes_tx_gearbox` / `hermes_rx_gearbox` | link | 67-bit words <-> 64-bit transceiver words; bit slip |
| `hermes_link_init` | rx link | word lock, lock loss, link up, header error count |
| `hermes_decoder` | rx link | header majority vote, Data/Control recovery, Hamming(7,4) CWT |
| `hermes_filler_detect` | rx link | removes fillers, makes alignment markers, extracts CRC and metadata |
| `hermes_rx_bram` | rx link -> algo | receive memory with read-pointer control and CRC side table |
| `hermes_rx_crc` | algo | recomputes and compares each packet's CRC |
| `hermes_link_align` | algo | channel bonding across all receivers |
| `hermes_pkg` | - | types, code points, Hamming and CRC functions |
| `hermes_sync_bit` | - | two-flop synchronizer |

## The line code: 64b/67b with a toggling header

Each 64-bit word is sent as 67 bits: a 3-bit header first (bit 0 first), then the
scrambled payload. There are two header patterns:

* polarity A = `011` (two ones)
* polarity B = `100` (two zeros)

The polarity alternates from word to word, which keeps the header DC-balanced.
To mark a change of word tag (Data -> Control or Control -> Data), the
transmitter repeats the previous polarity instead of toggling. The receiver
therefore sees a *relative* tag: "same kind as the previous word" or "the
other kind".

The receiver decides the polarity by a majority of bit 0, bit 1 and the
inverted bit 2. One flipped header bit is outvoted, and the word is still
classified correctly. Such corrections are counted (`hdr_err_cnt`).

**Finding the absolute tag.** The relative scheme leaves one question open:
after word lock, is the first word Data or Control? The decoder answers it with
a training window of `TRAIN` = 16 words, which it does not pass on. It follows
the relative tags through the window and tests both answers. For each, it counts
the words that would then be Control words but do not carry an exact, known
control-word codeword in byte 7. Real Control words always carry one; scrambled
data almost never does. The answer with fewer misses wins. The window falls in
the first `UP_CNT` words after lock, before `link_up` lets anything into the
receive memory, so training costs no data.

**Control Word Type (CWT).** Control words carry a 4-bit type in byte 7
(bits 62:56, bit 63 zero), coded Hamming(7,4). A single flipped bit is corrected;
an unknown type is flagged and the word dropped.

| CWT | Word |
|---|---|
| 1 | Idle (user word with Valid low, bytes 6:0 carried) |
| 2 | Padding filler |
| 3 | CRC filler |
| 4 | Align Marker filler |

Filler layout (all three kinds):

| Byte 7 | Byte 6 | Bytes 5:4 | Bytes 3:1 | Byte 0 |
|---|---|---|---|---|
| CWT | CRC distance (CRC filler only) | CRC (CRC filler only) | user info | link id |

Only the 64-bit payload is scrambled (IEEE 802.3 self-synchronous scrambler,
64 bits per cycle, x^58 + x^39 + 1). The header is sent in clear.

## Two clocks, and why fillers are enough

The algorithm writes one word per `algo_clk` into the Tx FIFO. The transmit
link side reads the FIFO head in every slot the gearbox accepts. With a 64-bit
transceiver interface at 402.83 MHz, 64 of every 67 clocks carry a word. That
gives 384.8 M slots/s against 360 M words/s. The FIFO therefore never fills,
and about 6.45 % of slots find it empty. Those slots carry fillers: 24.8 M
words/s, or 1.66 Gb/s of line bits. The line rate minus the algorithm payload
rate is 2.74 Gb/s; that figure also counts the 3-bit headers.

On the receive side, the filler detection writes only Data and Idle words into
the Rx BRAM. The algorithm side then reads one word per `algo_clk`. The read
pointer starts `RD_OFFSET` = 32 words behind the synchronized write pointer.
Words arrive at the same average rate as they are read, so this distance only
jitters by a few words around its start value. `bram_ptr_err` reports it
leaving the memory.

Idle words (Valid low) are user words, not fillers. They travel through the
BRAM like data, keep the algorithm's timing, and separate packets.

## CRC: crossing clock domains with the data

Both ends compute the CRC in the algorithm clock, over the words with Valid high.
The CRC is CRC-16-CCITT, polynomial 0x1021, initial value 0xFFFF, bit 63 of each
word first. Because both ends work in the algorithm clock, the FIFO, the link and
the BRAM all lie inside the check.

Getting the transmit checksum to the filler generator is the subtle part.

1. **Packet end.** In packet mode a packet ends at the falling edge of Valid, so
   the *packet-end word* is the first Idle after it. In streaming mode it is the
   word carrying the End of Packet bit.
2. **Crossing.** The checksum crosses the Tx FIFO in four 4-bit chunks. The
   spare FIFO bits 70:67 carry them. Chunk 0 rides on the packet-end word, which
   is flagged with bit 66 (`crc_trig`). Chunks 1-3 ride on the next three
   words.
3. **Pending.** Once all four chunks have been read in the link domain, the
   checksum is *pending*. It goes out in the next empty slot as a CRC filler.
4. **Distance field.** Between the packet-end word and that filler, some
   number *d* of further words may have been sent. The filler carries *d* in
   byte 6.
5. **Receive side.** The receiver stores the checksum in a side table beside
   the BRAM, at address `wr_ptr - 1 - d`: exactly the packet-end word. When the
   read side reaches that word, the Rx CRC compares its own result with the
   stored one.

**Early CRC filler.** If a streaming packet is short, the next packet-end word
can reach the FIFO head while the previous checksum is still pending. In that
case the builder sends the CRC filler at once, in a slot borrowed from the
FIFO, rather than lose the checksum. The FIFO absorbs the borrowed slot as long
as packets are, on average, at least about 15 words long. Filler slots make up
0.069 per algorithm word, and each packet needs one. Shorter packets
overwrite checksums; `crc_overrun` reports that.

Rx CRC results come out as `crc_ok_cnt` / `crc_err_cnt`. In packet mode, a
packet that ends without a stored checksum counts as an error.

## Packet and streaming mode

`mode` selects how packets are framed:

* **Packet mode.** Valid high marks a packet; at least one Idle separates two
  packets. The receiver makes a Data Start marker at each rising edge of Valid;
  this is the alignment marker.
* **Streaming mode.** Valid stays high and `tx_eop` marks each packet's last
  word. The user raises `tx_align` on a word to mark it. The transmitter then
  sends an Align Marker filler in the slot just before that word, and the
  receiver flags the word that follows the filler as the marker.

The mode must be the same at both ends. It may be changed while Idles are being
sent.

## Channel bonding

All transmitters send their markers on the same `algo_clk` cycle. The links'
delays differ, so the markers leave the receive BRAMs in different cycles. After
`align_start`, `hermes_link_align` works in four steps:

1. It waits until no channel has shown a marker for `MAX_SKEW`+1 = 32 cycles.
   It is then between two marker groups.
2. For each channel, it counts algorithm cycles from that channel's marker to
   the last channel's marker.
3. It pulses `adj_valid` with the counts. Each Rx BRAM moves its read pointer
   back by its count, so every channel is delayed to match the slowest.
4. `aligned` rises. If the markers spread over more than `MAX_SKEW` cycles,
   `align_err` rises instead.

Markers must be more than 2*MAX_SKEW+1 cycles apart, or markers from two
different transmit cycles could be paired. Moving a read pointer back repeats
some words, so the Rx CRC of a corrected channel restarts at the next packet
boundary.

## Word lock and link status

`hermes_link_init` finds the 67-bit boundary in the received 64-bit stream.
While it is unlocked, each illegal header (not `011` or `100`) makes the receive
gearbox drop one bit. Two words later, counting starts again.

* `block_lock` rises after 64 legal headers in a row.
* 16 or more illegal headers in a 64-word window drop the lock. Single header
  errors are corrected downstream, so they do not cost lock.
* `link_up` rises 64 words after lock and opens the receive path.

**Losing and regaining a link.** A receiver can lose its link in two ways:
its reset is asserted, or it loses lock. Either way, `link_up` falls and the
Rx BRAM stops delivering words on that channel (`rx_en` low). When the link
comes back, reading restarts with a fresh read pointer, `RD_OFFSET` words
behind the new write pointer. The Rx CRC ignores the packet it joins in the
middle. `aligned` falls as soon as any channel stops delivering, and the
channels must be bonded again with `align_start`. The restarted channel usually
comes back with a different latency.

The transmit side has no such restart. `tx_link_rst` and `algo_rst` reset the
two halves of the Tx FIFO and must be asserted together.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `NCH` | 4 | top, link align: number of channels |
| `FIFO_DEPTH` | 16 | Tx FIFO depth (power of two) |
| `BRAM_DEPTH` | 512 | Rx BRAM depth (one 36 kb block RAM at 72 bits) |
| `RD_OFFSET` | 32 | initial read distance in the Rx BRAM |
| `MAX_SKEW` | 31 | largest tolerated marker spread (algorithm cycles) |
| `TRAIN` | 16 | decoder training window |
| `LOCK_CNT`, `BAD_MAX`, `UP_CNT` | 64, 16, 64 | word-lock thresholds |

`RD_OFFSET` must exceed two things taken together: the largest distance between
a packet-end word and its CRC filler, and the pointer jitter. If it did not, the
checksum would arrive after the reader had passed the word.

## What is the protocol and what is this design's choice

These parts follow the protocol:

* 64b/67b framing, the toggling header and its majority decision
* Hamming(7,4) on the CWT
* the IEEE 802.3 scrambler
* a Tx FIFO and an Rx BRAM across the clock domains
* fillers in empty FIFO slots (Padding, CRC and Align Marker), with the byte
  layout above
* link id and 3 bytes of user info in fillers
* a 16-bit CRC in the algorithm domain crossing in four 4-bit chunks
* the two modes and their packet-end and marker rules
* channel bonding by subtracting the marker-to-last-marker count from each read
  pointer

These are this design's own choices:

* the header bit patterns and the CWT code points
* the CRC polynomial and initial value
* bit positions in the 72-bit FIFO word
* the use of byte 6 of the CRC filler for the distance field
* the side table for received checksums
* the early CRC filler
* decoder training
* the word-lock thresholds
* the quiet-gap rule in channel bonding and `MAX_SKEW`
* all depths and NCH
* the receive memory being written only while `link_up` is high
* where the 67-to-64-bit packing sits: after the scrambler, pacing the packet
  builder with `ready`
* the receive gearbox and its bit-slip word lock (the protocol leaves these to
  the transceiver)
* restarting a receive channel after a loss of link, and dropping `aligned`
  when that happens

Not included: the MGT transceivers and their reference clocks (vendor hard IP).
The top's parallel ports stand in for them.

Known limits:

* Two packet-end words must be at least four words apart, in either mode,
  because chunks 1-3 of a checksum ride on the three words after its packet-end
  word. In packet mode, a packet plus the Idles after it must therefore span at
  least four words. On average, packets need about 15 words or more (see above).
* Markers (`tx_align`, or packet starts in packet mode) must come more than 63
  algorithm cycles apart while bonding runs.
* Only one bonding attempt runs at a time.

## Simulating

Every block has a self-checking testbench in `tb/` named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M` and stops on its own watchdog. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
          rtl/hermes_pkg.sv tb/tb_hermes_top.sv --top-module tb_hermes_top
./obj_dir/Vtb_hermes_top
```

Use the same command with any other testbench name. `hermes_rx_bram` and the
top also need `rtl/hermes_sync_bit.sv`; `-Irtl` lets Verilator find it. The
RTL files carry no timescale, so `--timescale` gives them the default one.

`tb_hermes_top` runs the whole four-channel endpoint at its default parameters.
It uses the real clock ratio: a 360 MHz algorithm clock and a 402.83 MHz link
clock. Each receiver has its own delay (0-11 words) and its own bit offset in
the 64-bit stream. The run goes through these phases in order:

1. word lock and decoder training on all channels
2. packet mode with variable-length packets, and a first channel bonding
3. a switch to streaming mode with back-to-back 16-word packets, and a second
   bonding
4. single-bit header errors on every channel
5. payload errors on one channel, which the CRC must catch

It checks every received word against the sent sequence, the alignment of all
channels, the CRC counts, the header error counts and the filler share. It also
counts each mechanism (fillers of each kind, markers, corrections, bonding,
mode switch) and fails if any of them never happened. It runs in well under a
second after the build.

`tb_hermes_link_reset` uses the same setup to test robustness. While traffic
runs in both modes, it resets receivers five times. Each reset also gives that
channel's fibre a new random delay and bit offset. After each reset the test
checks four things:

* every channel relocks;
* the test bonds all channels again;
* every word delivered is one the transmitter sent;
* no checksum fails.
