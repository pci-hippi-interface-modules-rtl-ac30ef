# PCI – HIPPI interface boards

HIPPI is a simplex, 25 MHz, 32-bit point-to-point channel that moves up to
100 MByte/s from a *source* to a *destination*. This RTL models two PCI
boards that connect workstations to such a link:

* a **Destination** board. It receives HIPPI connections and writes them
  into a host memory buffer by DMA. The buffer may be scattered over many
  memory pages. The host CPU is interrupted only when the connection has
  ended.
* a **Source** board. It reads a scattered host buffer by DMA and sends it
  as one HIPPI connection of one or more packets.

The main idea is that a large block (hundreds of megabytes) moves between
the wire and the scattered host pages without the CPU. This rests on three
parts:

* a **scatter-gather table memory (SGTM)** on each board;
* a **1k × 36 FIFO** that absorbs the mismatch between the HIPPI and PCI
  clocks;
* on the Destination, a **history memory**. It records the protocol events
  and data errors of the connection. Software reads them after the
  connection ends, so errors need no interrupt of their own.

The top module `hippi_pci_link` joins one Source and one Destination by a
HIPPI cable. This gives the whole path from one host's memory to another's.

```
 host A memory                                                     host B memory
      ^ rq/rs                                                            ^ pm
      |                         HIPPI-32 cable                           |
 +----+-------------- hippi_source --+   REQUEST,DATA,PARITY,  +-- hippi_destination ----------+----+
 | dma_read_engine -> FIFO 1k x 36 ->|   PACKET,BURST  ------> |-> FIFO 1k x 36 -> dma_write_engine |
 |   |     \-> event FIFO (16) ----->| src_hippi_ctrl          dst_hippi_ctrl -> event FIFO -/  |   |
 |  SGTM (64k x 32)                  |   <------ CONNECT,READY |               SGTM   history memory|
 +-----------------------------------+                         +-----------------------------------+
   PCI clock        |  HIPPI clock                                HIPPI clock  |  PCI clock
```

## HIPPI framing as built

A **connection** starts when the source raises REQUEST. At the same time it
drives the 32-bit **I-Field** (routing information) on the data lines. The
destination answers with CONNECT. A connection carries **packets**, which
are framed by PACKET. A packet is made of **bursts**, which are framed by
BURST:

* A full burst is 256 words.
* Only the last burst of a packet may be shorter.
* Each word carries four byte-parity bits. Parity is odd.
* The clock after each burst carries an **LLRC** check word. It is the XOR
  of the burst's words, XORed with the burst length.

**Flow control** is by look-ahead credits. Each one-clock READY pulse from
the destination allows the source exactly one burst. The Destination sends
a pulse only when its FIFO has room for every burst already granted plus
this one:

    (granted + 1) * 256 + fifo_count <= 1024

So an empty 1k FIFO has four bursts in flight, and a source that obeys the
protocol can never overrun the FIFO. The granted count goes down as each
burst arrives.

The Source starts a burst only when it holds a credit and the whole burst
is already in its FIFO, because a HIPPI burst cannot pause. Bursts follow
each other every 259 clocks: 256 words, the LLRC word, one idle clock and
one decision clock. That is 25 MHz × 1024 B / 259 = **98.8 MByte/s**.

## Crossing clock domains: data and events

The data FIFO (`async_fifo`) has these features:

* Two clocks, with Gray-coded pointers and two-flop synchronisers.
* First-word fall-through reads.
* A fill count on each side.

Each entry is `{parity[3:0], data[31:0]}`. On the Destination the FIFO is
written on the HIPPI clock and read on the PCI clock; on the Source it is
the other way round.

Protocol information travels in a second, 16-entry **event FIFO** beside the
data FIFO. This is the part that is easiest to get wrong. Each event is a
`hippi_event_t {kind, index, payload}` (see `hippi_pkg`). Its `index` is the
number of data words of the connection that come before it. The side that
consumes events acts on an event only when it has moved exactly `index`
words. That keeps the events lined up with the data, even though the two
FIFOs cross the clock boundary separately.

| kind | produced by | index / payload |
|---|---|---|
| CONN_START (1) | REQUEST seen / host start | 0 / I-Field |
| PKT_START (2), PKT_END (3) | PACKET edges / SGTM packet end | words so far / words so far |
| LLRC_ERR (4) | Destination LLRC compare | words so far / received LLRC |
| CONN_END (5) | REQUEST falls / SGTM connection end | total words / total words |
| OVERFLOW (6) | word arrived with FIFO full (dropped) | words so far / words so far |
| PARITY_ERR (7), BUF_OVERRUN (8) | Destination DMA engine (history only) | — |

## Destination board

`dst_hippi_ctrl` runs on the HIPPI clock:

* It accepts a connection only while the host has armed the board.
* It stores every burst word with its parity. Nothing is rejected at this
  point.
* It checks the LLRC.
* It turns the PACKET edges and the end of REQUEST into events.

`dma_write_engine` runs on the PCI clock and does the following:

* It keeps a logical byte offset into the receive buffer. SGTM entry *i*
  holds the physical address of logical page *i*. `PAGE_BYTES` is 8192 by
  default. When the offset crosses a page boundary, the engine fetches the
  next address by itself.
* It writes one word per PCI clock while the host bus accepts it. A write
  is `pm_valid` held until `pm_ready`.
* It checks each word's parity as the word is written. A bad word is
  written anyway, and a PARITY_ERR record holds its host address. Software
  finds the damaged data in place after the connection ends.
* It writes each event into the history memory as a two-word record:
  `{kind[3:0], byte offset[27:0]}`, then the payload.
* It raises `irq` at connection end, and then disarms itself.
* It also raises `irq` on a serious error: FIFO overflow, or a connection
  longer than the table. In the second case one BUF_OVERRUN record is
  written and the rest of the connection is drained and discarded.

Host access goes through one word-addressed pass-through port, `ht_addr[17:0]`:

| `ht_addr[17:16]` | region | contents |
|---|---|---|
| 0 | registers | 0 CTRL (w: bit0 arm, bit1 clear irq), 1 STATUS `{hist_full, buf_overrun, overflow, llrc_err, parity_err, conn_done, connected}`, 2 SGT_COUNT, 3 WORDS received, 4 HIST_PTR (words written) |
| 1 | SGTM | 65536 words (256 kB) |
| 2 | history | 65536 words (256 kB), read only |

Reads return `ht_rdata` one clock after the address.

A typical use: write the page addresses to the SGTM, write SGT_COUNT, write
CTRL=1, wait for `irq`, then read STATUS, WORDS and HIST_PTR words of
history, and write CTRL=2.

## Source board

The SGTM of the Source holds segments rather than pages, and also the
size of the memory buffer:

    word 0    : memory buffer size in words (word 1 is unused)
    word 2e+2 : host byte address of segment e
    word 2e+3 : {conn_end[31], pkt_end[30], 0[29:20], word count[19:0]}

A packet end or a connection end is therefore marked at the end of a
segment.

The host fills the SGTM and writes these registers (region 0): 4 IFIELD and
2 SGT_COUNT. Then it sets CTRL bit 0. Register 5 BUF_WORDS reads back the
buffer size the engine loaded.

`dma_read_engine` then does the following:

* It queues CONN_START with the I-Field.
* It walks the table and issues one read request per word. Any number of
  requests may be outstanding, and data returns in order. A request goes
  out only while the FIFO has room for it and for every read still in
  flight, so returning data never meets a full FIFO.
* It adds byte parity to each word.
* It queues PKT_END and CONN_END events with word counts.

The transfer stops at the first of these:

* the SGTM connection end;
* the buffer size (SGTM word 0) is reached;
* the end of the table;
* an abort from the host (CTRL bit 1).

Every stop closes the open packet and the connection properly.

`src_hippi_ctrl` turns the FIFOs into REQUEST, PACKET, BURST and LLRC. A
burst is shorter than 256 words only when the next packet end is closer
than that. When the connection has closed on the wire, `irq` is raised.
STATUS reads `{aborted, done, busy}`; CTRL bit 2 clears the interrupt.

## External parts and interfaces

The original boards use commercial chips at both edges:

* a general-purpose PCI controller, which gives bus-master DMA and
  pass-through register access;
* HIPPI line-interface chips.

These are not modelled. Their place is taken by simple ports:

* **HIPPI side:** the HIPPI-PH signals themselves. These are REQUEST,
  CONNECT, READY, PACKET, BURST, DATA[31:0] and PARITY[3:0]. All are
  single-ended and synchronous to `hippi_clk`. The INTERCONNECT signals and
  the 64-bit HIPPI variant are not built.
* **PCI side:** the pass-through port described above, and one master port
  per board:
  * Destination writes: `pm_valid/pm_addr/pm_data/pm_ready`.
  * Source reads: a request handshake `rq_valid/rq_addr/rq_ready`, with data
    returned in order on `rs_valid/rs_data`.

Addresses are byte addresses of 32-bit words.

A HIPPI switch, which would route connections by I-Field in a network, is
not part of the model. Neither is the board power supply.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `FIFO_DEPTH` | 1024 | all | data FIFO words (36 bits each) |
| `SGT_WORDS` | 65536 | boards, engines | SGTM size (256 kB) |
| `HIST_WORDS` | 65536 | Destination | history memory size (256 kB) |
| `PAGE_BYTES` | 8192 | Destination | host page size |
| `EV_DEPTH` | 16 | boards | event FIFO entries |

The FIFO and memory sizes, the 256-word burst, the 32-bit data and the four
parity bits are those of the original boards. The page size, the event
FIFO, the parity sense, the LLRC formula, the table layouts, the history
record format, the register maps and the host-side handshakes are this
design's own choices. The original gives only the function of these parts.

At the defaults the Destination can take one connection of up to 512 MB
(65536 pages of 8 kB). The Source's table holds 32767 segments of up to
4 MB each. Blocks of about 180 MB, the size the boards were meant to move,
fit both; `tb_na48_block` sends one.

## Where this departs from the original, and limits

* The original description says the Destination FIFO takes its input on the
  PCI clock and its output on the HIPPI clock. That is the reverse of its
  data flow, from HIPPI into host memory. Here the Destination FIFO is
  written on the HIPPI clock.
* The boards share one `hippi_clk` in the top. On a real cable the
  destination receives the source's clock.
* The throughputs measured on the original boards were 91, 72 and 65 MB/s
  into three different hosts, and 20 MB/s out of them. They depend on each
  host's PCI bridge, which is not modelled. With a host bus that keeps up,
  the RTL reaches the link limit of about 98.8 MB/s. With a host bus held
  to one of the measured rates, the link settles at that rate without loss
  (`tb_host_rates`).
* The Destination assumes that the event FIFO never fills. The DMA engine
  drains it far faster than HIPPI can create events.
* The Destination assumes that a source separates burst end, packet end and
  connection end by at least one clock.
* Only single connections are supported. After each connection the
  Destination must be re-armed by the host.

## Files

`rtl/`:

* `hippi_pkg` – types, constants and helpers.
* `async_fifo` – the dual-clock FIFO.
* `sync2` – a two-flop synchroniser.
* `sgtm` – the scatter-gather table memory.
* `history_memory` – the history memory.
* `dst_hippi_ctrl` and `dma_write_engine` – the Destination's control and
  DMA engine.
* `src_hippi_ctrl` and `dma_read_engine` – the Source's control and DMA
  engine.
* `hippi_destination` and `hippi_source` – the two boards.
* `hippi_pci_link` – the top.

`tb/`:

* `hippi_tx_model`, `hippi_rx_model` – behavioural HIPPI source and
  destination. They obey the credits, and they can inject parity and LLRC
  errors.
* `host_mem_model` – host memory behind the PCI master ports. It has a
  read latency and random stalls.
* One self-checking `tb_<module>` per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_async_fifo` | order, full/empty, counts, unrelated clocks |
| `tb_sgtm`, `tb_history_memory` | both ports, read latency |
| `tb_dst_hippi_ctrl` | arming, four READYs in flight, READY held back and resumed, parity passed through, LLRC error, overflow, events |
| `tb_src_hippi_ctrl` | I-Field, no burst before a whole burst is buffered, 256/short bursts, LLRC, credit obedience, 259-clock burst spacing |
| `tb_dma_write_engine` | scattered pages, history records, parity-error address, one word per clock, buffer overrun, host stalls |
| `tb_dma_read_engine` | segments, packet/connection ends, FIFO never overfilled, buffer-size stop, abort |
| `tb_hippi_destination`, `tb_hippi_source` | each board through its host port, at full size |
| `tb_hippi_pci_link` | the whole link at default parameters. There are three connections: multi-packet with stalls and reversed pages, a buffer-size stop, and an 8192-word throughput run (checked at 95–100 MB/s, 98.9 measured). It counts full and short bursts, page switches, READY held back, write stalls and buffer stops, and fails if any of them never happened. |
| `tb_host_rates` | host buses held to 91, 72 and 65 MB/s (Destination) and 20 MB/s (Source), one 1 MB connection each. The link rate must settle within 3 % of the host rate, with every word delivered, no error status, and READY held back by the slow host. Measured: 91.2, 72.2, 65.2 and 20.1 MB/s. |
| `tb_na48_block` | one 180 MB block (47,185,920 words) in one connection, the block size the boards were built for. The Source reads 90 segments, and the Destination scatters the block over 23040 permuted 8 kB pages. Every word is checked on the fly against its address and value. The test also checks the burst count, one table lookup per page, the history and the sustained rate (98.84 MB/s measured, at least 98 required). |

To run a testbench with Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/hippi_pkg.sv tb/tb_hippi_pci_link.sv \
              --top-module tb_hippi_pci_link
    ./obj_dir/Vtb_hippi_pci_link

Replace the name to run any other testbench. All of them finish within
seconds, except `tb_na48_block`, which needs about two minutes.
