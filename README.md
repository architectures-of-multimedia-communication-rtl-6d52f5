# Multimedia Protocol Adapter: header parsing and per-byte work in hardware

A network adapter for a 622 Mb/s network that separates isochronous
multimedia streams from ordinary data traffic **in hardware, at line speed**,
before any processor touches a packet.

Every received frame is classified by a CAM-based protocol filter into a
*connection number* (CN). The CN then drives everything downstream:
- which check sequence is computed;
- whether the packet is a stream packet (header dropped, payload straight into
  a per-connection multimedia FIFO) or a data packet (header and payload
  split into two memories, with a receipt for the protocol processors);
- where its header ends.

The transmit side mirrors this. It gathers a header from header memory and a
payload from data memory or a multimedia FIFO, and inserts the check
sequence as the frame leaves.

The per-byte work stays in hardware: copying, check sequences and header
parsing. The protocol processors, which run e.g. TCP, only ever see headers
and receipts, and stream data never passes through them.

The same RTL also contains the hardware of a second, cheaper adapter for
100–155 Mb/s networks (the *light-weight adapter*): its protocol filter and
its host-interface buffer queues. They stand beside the main design in the
top module.

```
            +-----------------+   +-----------+   +-------------+--> multimedia FIFOs (iso, per connection)
 rx frames->| protocol filter |-->| check gen |-->| receive DMA |--> header memory + data memory
            |  mask gen + CAM |   | (by CN)   |   |  (by CN)    |--> receive queue (slot numbers)
            |  + CN builder   |   +-----------+   +-------------+<-- free slot queue
            +-----------------+         ^               ^
                                        |  connection table (indexed by CN)
            +---------------------+     v               v
 tx frames<-| tx check insertion  |<---------------| transmit DMA |<-- send queue (commands)
            | (store and forward) |                |   gather     |<-- header mem, data mem,
            +---------------------+                +--------------+    transmit multimedia FIFOs
```

Everything runs on one clock, one byte per clock on each pipeline, with an
active-low asynchronous reset.

## 1. From header bytes to a connection number

This is the least obvious part of the design.

### Protocol address tree

Connections are organised as a tree. Each level adds one header field, and
the CAM holds one row per known tree node:

| level | node means             | key address field                                    | key type field     |
|-------|------------------------|------------------------------------------------------|--------------------|
| 0     | network protocol       | 0                                                    | IP version (4 = IPv4, 5 = ST-II) |
| 1     | host / stream          | IPv4: source address; ST-II: 16-bit stream id (HID, bytes 4–5) | IP protocol number (6, 17) or 5 for ST-II |
| 2     | transport port pair    | `{source port, destination port}` at offset IHL·4     | IP protocol number |

A CAM key is `{level[1:0], type[7:0], address[31:0]}` (42 bits).

### How the mask generator walks the tree

`pf_mask_gen` follows the header as it streams past. As soon as the field of
a level is complete, it issues that level's key:
- the version at byte 0;
- the source address at byte 15 (IPv4) or the HID at byte 5 (ST-II);
- the ports at byte IHL·4+3.

The CAM (`cam`) compares the key with every row in one clock. One clock later
it returns the address of the lowest matching row.

### Building the CN

`pf_cn_builder` concatenates the matched row addresses:

```
CN = { row(level 2), row(level 1), row(level 0) }     3 x 4 bits = 12 bits
```

A level that is not on the packet's path contributes 0, as the port level
does for ST-II. If any level on the path misses, the packet belongs to an
*unknown* connection: the CN is 0, `known` = 0 and the protocol is
"unknown". A packet that ends before its path is complete is also unknown.

Because CAM rows are shared, a host row can sit under several port rows.
The CAM therefore holds tree nodes, not whole connections, and 16 rows
describe many connections.

Example from the end-to-end test:

| row | key                       |
|-----|---------------------------|
| 0   | level 0, IPv4             |
| 2   | level 1, TCP from 10.0.0.1 |
| 3   | level 2, ports 1234→80    |

A TCP segment 10.0.0.1:1234→80 gets CN `0x320`.

### Holding the packet until its CN is known

`protocol_filter` holds each packet in a 128-byte buffer until its tag (CN,
known, protocol) is ready. The packet then leaves with the tag beside it.
Input is accepted one byte per clock while the buffer has room. The tag
arrives two clocks after the last key, which is at most byte 63 of an IPv4
header with options. The buffer therefore never holds a packet back for
long, and the filter runs at line rate.

## 2. The connection table

`conn_table` is indexed directly by the CN (4096 entries). The protocol
processor writes it when it opens a connection. Each entry (`conn_info_t`)
holds:

| field       | use                                                           |
|-------------|---------------------------------------------------------------|
| `valid`     | entry in use                                                  |
| `iso`       | isochronous stream (to a multimedia FIFO) or asynchronous     |
| `alg`       | `CHK_NONE`, `CHK_INET16` (Internet checksum) or `CHK_CRC32`   |
| `hdr_len`   | bytes of header: split point between header and data         |
| `chk_start` | first byte covered by the check sequence                      |
| `chk_off`   | transmit only: where the check sequence is inserted           |
| `mmf`       | which multimedia FIFO the stream uses                         |

It has three combinational read ports: receive check generator, receive DMA,
and transmit check insertion.

Packets of unknown connections, and of CNs without a valid entry, are
treated as asynchronous data:
- header length 112 bytes (a full header slot);
- no check;
- the receipt has `known` = 0.

The protocol processor can then look at the header itself.

## 3. Check sequences

| algorithm    | receive (`check_gen`)                                        | transmit (`tx_check_insert`)                        |
|--------------|--------------------------------------------------------------|-----------------------------------------------------|
| `CHK_INET16` | 16-bit one's-complement sum from `chk_start` to the end; ok when the folded sum is `FFFF` | sum over `chk_start`..end with the field zero; `~sum` inserted at `chk_off`, MSB first |
| `CHK_CRC32`  | CRC-32 (poly `04C11DB7`, MSB first, init all ones) from `chk_start` to the end, check field included; ok when the remainder is `C704DD7B` | CRC over `chk_start`..`chk_off`-1; its complement inserted as 4 bytes at `chk_off` |

The computed value is reported too: the folded sum, or the CRC register
before complement.

The Internet checksum covers only packet bytes. A TCP/UDP pseudo-header is
not included. Either the processor folds it into the checksum field before
sending, or it corrects the received sum in software; one's-complement
arithmetic allows both.

The receive check generator is one register stage. The result is valid with
the last byte of the packet.

## 4. Receive DMA: streams versus data

`rx_dma` looks up the CN at the first byte and chooses one of two paths.

**Isochronous connection.**
- The first `hdr_len` bytes are discarded.
- Every following byte goes into multimedia FIFO `mmf`.
- If that FIFO is full, the byte is **dropped and counted** (`cnt_mm_drop`).
  A stream tolerates loss better than delay, so the pipeline never stops for
  a stream.

**Asynchronous (or unknown) connection.**
- The DMA takes a slot number from the free queue. Slot *s* owns 128 bytes
  of header memory at `s·128` and 2048 bytes of data memory at `s·2048`.
- The first `hdr_len` bytes go to header memory at `s·128+16`.
- The rest goes to data memory.
- After the last byte, 16 clocks write the receipt into the first 16 bytes
  of the header slot. The slot number is then pushed into the receive queue.
- If **no slot is free, the pipeline stalls** at the first byte of the packet.
  Back-pressure then reaches the network side (`rx_ready` low). Reliable
  data are never dropped by the adapter. `cnt_rx_stall` counts the stalled
  clocks.
- Bytes beyond a slot's header or data capacity are dropped, and the packet
  is marked truncated.

Receipt layout. Words are 32 bits, byte lanes little-endian, as seen on the
processor's word port:

| word | contents                                                              |
|------|-----------------------------------------------------------------------|
| 0    | `[11:0]` CN, `[13:12]` protocol, `[14]` known, `[15]` truncated, `[31:16]` packet length |
| 1    | `[15:0]` header bytes stored, `[31:16]` data bytes stored              |
| 2    | check value computed by the check generator                           |
| 3    | `[0]` check ok, `[2:1]` algorithm                                     |

The processor reads the receive queue (`rxq_*`) and the memories (`rxh_*`,
`rxd_*`). It returns the slot with `rx_release` when done. The memories are
dual-ported (`dpram`):
- a byte port for the DMA;
- a 32-bit word port with byte enables for the processor.

Both ports have one clock of read latency. If both ports write the same byte
in the same clock, the DMA wins.

## 5. Transmit path

The protocol processor does three things:
1. It writes a header into a slot of the transmit header memory (`txh_*`).
2. It writes the payload into that slot's data buffer (`txd_*`), or lets a
   multimedia device fill transmit multimedia FIFO *f* (`mmt_*`).
3. It pushes a `send_cmd_t` into the send queue (`sq_*`):
   `{slot, cn, hdr_len, data_len, from_mmf, mmf}`.

`tx_dma` takes one command at a time. It reads `hdr_len` bytes from header
memory at `slot·128`, then `data_len` bytes from data memory at
`slot·2048` or from multimedia FIFO `mmf`. It keeps a small output queue
full, so the read latency of the memories does not cost throughput. When
the last byte has left, `tx_done`/`tx_done_slot` pulse so the processor can
reuse the slot.

`tx_check_insert` writes the whole frame into a 4096-byte frame buffer
while computing the connection's check sequence. It then sends the frame
with the check bytes substituted at `chk_off`.

Because of this store-and-forward step, a check field may lie anywhere,
including after the covered bytes (a CRC trailer). The cost is that a frame
of *n* bytes occupies the inserter for 2*n* clocks. A design whose check
fields always follow the covered bytes could instead stream with
substitution on the fly.

## 6. Light-weight adapter: host queues and protocol filter

`lwma_host_queues` is the hardware queue set of the cheaper adapter's host
interface. Instantiate it once per memory; the top has one for transmit
memory (`lwt_*`) and one for receive memory (`lwr_*`). Each instance has:
- a free-buffer queue, pre-filled with buffer numbers 0..15 during the
  16 clocks after reset;
- one buffer-number queue per active multimedia connection (4).

Sending works like this:
1. The application takes a free buffer.
2. It fills it.
3. It pushes the buffer number on its connection's queue.
4. The consumer pops it and later returns the number to the free queue.

Receiving works the same way, with the decoder as producer.

The light-weight adapter's receive side also has its own `protocol_filter`
instance. Frames enter on `lw_rx_*` and leave on `lw_dec_*`, each with its
connection tag, towards the decoder. Its CAM is loaded through `lw_cam_*`.
The decoder (a DSP that also computes the check sequences in that adapter),
the DMA and the network interface of that adapter are outside this RTL.

## 7. Sizes

The numbers below are this design's choices, except where marked. All are
in `rtl/mpa_pkg.sv`.

| constant            | value | meaning                                              |
|---------------------|-------|------------------------------------------------------|
| `CAM_DEPTH`         | 16    | CAM rows (tree nodes)                                |
| `LEVELS`            | 3     | tree levels: network, host/stream, ports             |
| `CN_W`              | 12    | connection number width (= 3 × 4-bit row address)    |
| `NUM_SLOTS`         | 16    | receive (and transmit) header slots = data buffers   |
| `HDR_SLOT`          | 128   | bytes per header slot, 16 of them receipt            |
| `DATA_BUF`          | 2048  | bytes per data buffer                                |
| `NUM_MMF`           | 4     | multimedia FIFOs per direction                       |
| `MMF_DEPTH`         | 2048  | bytes per multimedia FIFO                            |
| `FRAME_BUF`         | 4096  | transmit frame buffer                                |
| `PKT_DEPTH`         | 128   | protocol filter packet buffer (module parameter)     |
| `LEN_W`             | 16    | packet byte counters: received packets up to 65535 bytes |
| line rate (target)  | 622 Mb/s | from the original architecture                    |

Storage at these sizes:
- receive memories: 2 KiB header + 32 KiB data;
- transmit memories: the same;
- multimedia FIFOs: 8 × 2 KiB;
- frame buffer: 4 KiB;
- connection table: 4096 × 38 bits.

## 8. Rates and what they mean for the clock

The receive side (filter, check generator and DMA) takes one byte per
clock. Each data packet adds 16 clocks for its receipt.
- 622 Mb/s is 77.75 M bytes/s, so the receive side needs a clock of about
  78 MHz.
- The transmit inserter needs 2 clocks per byte, so about 156 MHz for
  back-to-back frames at line rate.

At the adapter's expected TCP load of about 35 700 segments/s of 1 KiB
(~300 Mb/s), the needed clock is lower. Segments of 1 KiB plus a 40-byte
header fit a slot. `tb_mpa_workload` measures the rates with back-to-back
1 KiB segments received and sent at the same time:
- receive: 1081 clocks per segment (1064 bytes + 16 receipt clocks + 1);
- transmit: 2128 clocks per segment (2 × 1064).

At 78 MHz that is about 72 000 segments/s received.

Segments of 4 KiB do not fit:
- A received 4 KiB segment is counted in full (length, check sequence).
  Only its first 2048 data bytes are stored, and the receipt marks it
  truncated.
- A transmitted frame longer than `FRAME_BUF` is sent cut to 4096 bytes.

Holding them would take `DATA_BUF` ≥ 4096 and `FRAME_BUF` ≥ 8192.

## 9. Where this RTL departs from, or goes beyond, the architecture

- **Not built, by design:** the network access unit, the protocol
  processors, the asynchronous host interface and bus controller, the
  multimedia bus, and the light-weight adapter's DSP coder/decoder. Their
  signals are ports of `mpa_top`.
- **Reliable data into a multimedia FIFO.** A multimedia connection that
  uses a reliable transport is processed as data traffic. The processor then
  writes its payload into a receive multimedia FIFO through the `pmm_*`
  port. The receive DMA has priority on a FIFO: a processor byte waits
  (`pmm_ready` low) instead of being dropped, and the two byte streams
  interleave without reordering.
- **Packet formats:** IPv4 (with options), TCP, UDP and ST-II data packets.
  The exact header field positions, key layout and tree depth are this
  design's.
- **Policies:** drop-on-full for streams, stall-on-no-slot for data, and
  store-and-forward check insertion are this design's choices. The receipt
  format, slot layout and command format are too.
- **Pseudo-header:** the Internet checksum does not include the TCP/UDP
  pseudo-header (section 3).

## 10. Verification

Each block has a self-checking testbench in `tb/`. Every testbench:
- ends by printing `TB_RESULT checks=N failures=M`;
- has a watchdog;
- computes expected values with independent models from `tb/tb_pkt_pkg.sv`:
  packet builders, a bitwise CRC-32 and a word-wise Internet checksum.

Where a rate matters, cycle counts are checked:
- the receive DMA takes one byte per clock;
- the inserter takes 2*n* clocks per frame;
- the free-buffer queue hands out one buffer per clock.

`tb_mpa_top` runs the whole adapter at its default sizes:
- It loads a CAM tree and the connection table.
- It receives TCP, UDP-with-CRC, two interleaved ST-II streams, corrupted
  packets and unknown connections. It checks every receipt, header byte,
  data byte and FIFO byte.
- It withholds slot releases until the DMA stalls, and overfills a
  multimedia FIFO until it drops.
- It transmits TCP (checksum insertion), UDP (CRC insertion) and an ST-II
  packet from a multimedia FIFO under random back-pressure.
- It loops the transmitted frames back into the receiver, which must find
  their check sequences correct.
- It has the processor write into a multimedia FIFO while a stream fills the
  same FIFO.
- It passes buffers through the light-weight adapter queues, and has that
  adapter's protocol filter tag a known and an unknown frame.

Each of these mechanisms is counted. The test fails if any of them never
happened.

Running a testbench with Verilator 5, from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_mpa_top rtl/mpa_pkg.sv tb/tb_pkt_pkg.sv tb/tb_mpa_top.sv
./obj_dir/Vtb_mpa_top
```

`tb_mpa_workload` runs the TCP load of section 8 and checks its cycle counts
and the handling of a 4 KiB segment.

Replace `tb_mpa_top` with any other `tb_<block>` or with `tb_mpa_workload`. The simulator is
two-state, so every register that is read is reset. Memories are not reset;
nothing reads them before writing.

Assertions are immediate assertions inside clocked blocks. They cover FIFO
overflow and underflow and handshake rules.

## 11. Files

| file                       | block                                                 |
|----------------------------|-------------------------------------------------------|
| `rtl/mpa_pkg.sv`           | sizes, types, CRC/checksum step functions             |
| `rtl/mpa_top.sv`           | the adapter: both pipelines, memories, queues; light-weight adapter filter and queues beside it |
| `rtl/protocol_filter.sv`   | packet buffer + tag queue around the three below      |
| `rtl/pf_mask_gen.sv`       | header walk, CAM keys per tree level                  |
| `rtl/cam.sv`               | 16-row content addressable memory                     |
| `rtl/pf_cn_builder.sv`     | CN from matched rows, known/unknown                   |
| `rtl/conn_table.sv`        | per-CN connection entries                             |
| `rtl/check_gen.sv`         | receive check sequence                                |
| `rtl/rx_dma.sv`            | receive DMA: iso/async split, receipts, drop, stall   |
| `rtl/tx_dma.sv`            | transmit DMA: gather from memories or FIFO            |
| `rtl/tx_check_insert.sv`   | transmit check sequence insertion                     |
| `rtl/dpram.sv`             | byte/word dual-port memory                            |
| `rtl/mm_fifo_bank.sv`      | multimedia FIFOs                                      |
| `rtl/free_queue.sv`        | self-filling free buffer queue                        |
| `rtl/sync_fifo.sv`         | show-ahead FIFO used throughout                       |
| `rtl/lwma_host_queues.sv`  | light-weight adapter free/send/receive buffer queues  |
