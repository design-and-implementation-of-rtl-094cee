# Modular PCI-E carrier: FPGA logic for a front-end-to-host data link

A digital front end (a radar receiver, an aerial camera) produces far more data
than a host computer can take through its disk, and every front end has its own
interface. The carrier card solves both with one board: a PCI-E 2.0 x8 card with
two FPGAs and two FMC (VITA 57) mezzanine sites. The front-end-specific part
lives on a small mezzanine card, so a new front end needs a new mezzanine and
only small changes to the FPGA logic. Between the two sides, DDR3 memory on the
card buffers the data, and the card paces the front end so that this buffer
never overflows when the host slows down.

This RTL implements the card's FPGA logic:

* **FPGA-I, PCI-E user logic.** A receive unit, a transmit unit and a control
  unit sit between the PCI-E core and the rest of the card. Together they carry
  two kinds of traffic. Register transfers configure the card and the front end.
  DMA stream transfers move bulk data in both directions.
* **Stream speed balancing.** The request line to the front end is dropped when
  the uplink cache reaches a high mark. It is raised again only after the cache
  has been read empty.
* **FPGA-II, high-speed serial module.** One 8b/10b-coded lane runs each way
  to each of the two FMC sites. A register picks the site that carries the
  stream.

```
              +-------------------- pcie_carrier_top ---------------------+
 host  rx_* ->| receive_unit --reg--> control_unit --fe_cfg------------->| front-end parameters
 (PCI-E core) |      |                    | rd reply / DMA job            |
              |      | DMA data           v                               |
              |      +---------> dlc_w*   transmit_unit <----- ulc_r* <---|-- uplink DDR3 cache
       tx_* <-|-----------------------------+                             |
              |  dlc_r* --> serial_lane_tx[site] --> fmc_tx_sym[site] ---->| FMC lanes out
              |  fmc_rx_sym[site] --> serial_lane_rx[site] --> ulc_w* --->| uplink DDR3 cache
              |                 ulc_w*/ulc_r* strobes --> stream_flow_ctrl --> fe_req[site]
              +-----------------------------------------------------------+
```

The user logic has two outward ports. The control port is `fe_cfg` plus the
status inputs. The stream (DMA) port is the `dlc_*` and `ulc_*` cache
interfaces. In this RTL the DMA words pass from the receive unit to the downlink
cache, and from the uplink cache to the transmit unit, without going through the
control unit. The control unit only sets up and watches each transfer.

The DDR3 memories and their controller stay outside the RTL, and so do the
PCI-E core and the GTX transceivers. Each of them is met at a port of
`pcie_carrier_top`. All the logic runs on one clock.

## Packets on the host link

The host link is a stream of 128-bit words with `valid`, `ready` and `last`. A
packet ends on the word flagged `last`. Header packets are a single word. Their
type sits in bits [127:124]: this is the "data flag" that routes a packet. Their
payload sits in bits [63:0].

| type | value | payload | direction |
|---|---|---|---|
| `PKT_ORD_REQ`  | 1 | bit 0: 1 = write, 0 = read (from the host); 0 in a reply | both |
| `PKT_ORD_DATA` | 2 | [47:32] register offset, [31:0] contents | both |
| `PKT_DMA_REQ`  | 3 | [31:0] word count; card to host also [63:32] packet number | both |
| `PKT_DMA_ADDR` | 4 | [63:0] destination byte address | card to host |

**Host to card (`receive_unit`).** Every transfer opens with a request packet.
* `ORD_REQ` is followed by one `ORD_DATA` word. That word becomes a register
  write or read in the control unit.
* `DMA_REQ` announces N raw data words. They are passed on as pure data to the
  downlink cache, with `dlc_wlast` on the Nth. The words are counted, so they
  may arrive spread over several host packets.

Anything malformed is dropped up to its `last` and counted. That covers an
unknown type, a header longer than one word, and a missing `ORD_DATA` word.

**Card to host (`transmit_unit`).**
* A register read is answered with an `ORD_REQ` packet and then an `ORD_DATA`
  packet carrying the offset and the value.
* Each DMA data packet is announced by a `DMA_REQ` packet (size and sequence
  number) and a `DMA_ADDR` packet. Then come `size` words from the uplink
  cache.
* The destination address advances by 16 bytes per word from packet to packet.
* A waiting register reply goes out at the next packet boundary, so status
  polls are answered during long transfers.
* While `link_up` is low the unit presents nothing. It continues where it
  stopped when the link returns.

Each DMA packet costs two header cycles. With the default 128-byte packets
(8 words), data fills 8 of every 10 cycles.

## Registers and starting a DMA transfer

`control_unit` holds the registers. The offsets are bytes.

| offset | name | access |
|---|---|---|
| 0x00 | `REG_RESET` | write bit 0: reset the DMA engine and arm it for one start |
| 0x04 | `REG_DMA_CSR` | write bit 0: start. Read: [0] busy, [1] done, [2] armed, [3] start refused, [31:16] packets sent |
| 0x08 | `REG_DMA_SIZE` | packet size in 16-byte words, reset value 8 (128 bytes) |
| 0x0C | `REG_DMA_NUM` | number of packets |
| 0x10 / 0x14 | `REG_DMA_ADRL` / `ADRH` | destination address |
| 0x18 | `REG_ORD_CTRL` | ordinary control: drives `fe_cfg`, the front end's parameters |
| 0x1C | `REG_ORD_STAT` | ordinary status: {request, overflow, link_up, 0, selected lane's errors[7:0], bad host packets[15:0]} |
| 0x20 | `REG_FMC_SEL` | [3:0] FMC site that carries the stream, reset 0 |

The start sequence is fixed, in this order:
1. Reset the engine.
2. Set size, number and address.
3. Write the start bit.

A start is refused if there was no reset since the last start, if a transfer
is running, or if size or number is zero. A refused start sets bit 3 and sends
nothing. An unknown offset reads `0xDEADBEEF`.

## Keeping the uplink cache from overflowing

The host takes uplink data at PCI-E speed while it has buffer memory. It slows
to disk speed once it spills to disk. `stream_flow_ctrl` counts the words in the
uplink cache: one up per `ulc_wvalid`, one down per accepted read. It drives
`fe_req`, the front end's transfer request:
* `fe_req` drops when the fill reaches `HIGH_MARK`.
* It stays low until the cache has been read completely empty. Only then does
  it rise again.

The hysteresis is deliberate. The front end sends long bursts instead of
toggling around the mark.

Words that the front end has already sent when the request drops must still fit.
For that reason `HIGH_MARK` sits below `CACHE_WORDS`: 16384 words below it by
default. A write into a full cache sets the sticky `overflow` status bit.
`ulc_wvalid` is a strobe with no back-pressure. The cache must take every word,
and the flow controller is what guarantees that it can.

## The FMC lane: 8b/10b coding and framing

`enc8b10b` and `dec8b10b` are combinational coders of the standard 8b/10b code.
* 5b/6b and 3b/4b sub-blocks with running disparity.
* The alternate D.x.A7 code where it is needed.
* The twelve control characters.

The bit order is `{a,b,c,d,e,i,f,g,h,j}`, with `a` in bit 9. The decoder flags
codes outside the tables and codes received at the wrong running disparity. It
does not check run lengths across sub-blocks.

The lanes send one symbol per clock. `serial_lane_tx` sends each 128-bit word as
16 data characters, lowest byte first, and sends K28.5 whenever no word waits.
`serial_lane_rx` skips control characters. Each control character also restarts
packing at a word boundary, so the sender must not put an idle inside a word.
On a bad symbol, the receiver counts an error, drops the partial word, and waits
for the next control character before accepting data again. Comma alignment of
the 10-bit symbols is expected from the transceiver.

There is a lane pair for each of the `FMC_SITES` mezzanine sites (default 2). The
`REG_FMC_SEL` register picks the selected site, and only that site is used:
* Its received words go to the uplink cache.
* Downlink words go out on its lane.
* Its `fe_req` bit carries the transfer request.

The other sites' transmitters send idles, and their received words are ignored.
Switch sites only while no word is on the lanes, because a word that is cut by
a switch is lost.

## Sizes and rates

| quantity | value | from |
|---|---|---|
| host word | 128 bits | own choice for a x8 Gen2 core |
| DMA packet | 8 words = 128 bytes (register) | the source design's burst size |
| largest transfer | 2^32 packets | register width |
| uplink cache | 2^25 words = 512 MiB (`CACHE_WORDS`) | own assumption |
| stop mark | `CACHE_WORDS` - 16384 (`HIGH_MARK`) | own assumption |
| lane payload | 8 bits per symbol | 8b/10b |

At a 250 MHz user clock, 128-byte packets carry 25.6 Gbps. Larger packets carry
up to 32 Gbps. The 34 Gbps quoted for the card would need a faster clock or
fewer header cycles. At the fibre card's 2.125 Gbps line rate a lane carries
1.7 Gbps, which covers its 1.5 Gbps. A 6.8 Gbps Camera Link front end would
need four lanes. Each site has one lane, and only one site carries the stream
at a time.

## Departures and own choices

The following follow the source design:
* The block structure.
* The packet sequences.
* The set of registers and the start sequence.
* The stop-at-threshold, resume-when-empty flow control.
* The use of 8b/10b on the FMC lane.

The following are choices of this implementation:
* Word width.
* Header layouts and type codes.
* Register offsets and bit positions.
* Announcing every DMA packet (rather than every transfer) with its own request
  and address.
* Treating a missing reset before a start as an error.
* Lane framing.
* Cache size and stop mark.
* The single clock.
* The site register. How the two FMC sites share the stream is not specified,
  so one site carries it at a time.
* The direct connection between the two FPGAs. On the board they talk over a
  chip bus with a custom packet format, which is not modelled.

Not built:
* The PCI-E core and its configuration interface, including the computer
  interface block that serves it.
* The GTX transceivers and the Aurora protocol layer.
* The DDR3 controllers. That includes FPGA-II's own DDR3 rate-matching buffer,
  which is not modelled.
* The flash.
* The mezzanine cards.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Example, the end-to-end test with a small cache:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/carrier_pkg.sv tb/tb_pcie_carrier_top.sv --top-module tb_pcie_carrier_top
./obj_dir/Vtb_pcie_carrier_top
```

| testbench | what it shows |
|---|---|
| `tb_pcie_carrier_top` | The whole card with a 64-word cache, mark at 48. Covers register writes and reads, an unknown packet, a refused start, two downlink transfers, and a 24-packet uplink transfer with link drops, a corrupted lane symbol and replies between DMA packets. A slow host forces the front-end request to drop and rise again. The test then switches to FMC site 1 and repeats a downlink and an uplink transfer there. Each of these mechanisms is counted and must occur. |
| `tb_pcie_carrier_full` | The same scenario with every parameter at its default, and a host that never slows down. |
| `tb_transfer_sweep` | Uplink transfers of 1 B, 40 B, 1600 B, 64 kB and 2.56 MB through the whole card. Checks every word, and checks that each transfer runs at the lane's rate of 17 cycles per 16-byte word. Prints the rate: 200 MB/s at a 212.5 MHz symbol clock. |
| `tb_transmit_unit` | Exact packet sequence and rate (4 x 8 words in 40 cycles), random stalls and link drops, reset mid-transfer. |
| `tb_receive_unit` | Directed and random host packets against expected register accesses and DMA words. |
| `tb_control_unit` | All registers and the start rules. |
| `tb_stream_flow_ctrl` | Fill count and request against a reference, and overflow. |
| `tb_enc8b10b`, `tb_dec8b10b` | Published code words, every byte at both disparities, run length and digital sum of a random stream, error flags. |
| `tb_serial_lane_tx`, `tb_serial_lane_rx` | Word framing over the lane, and recovery after corrupted symbols. |

`tb/carrier_env.sv` models the host, both caches and the front end for the two
whole-card tests.
