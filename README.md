# ZeroNIC-style zero-copy NIC datapath (SystemVerilog)

RTL for the packet datapath of a NIC that separates payload placement from
protocol processing. Payload bytes of known flows are written straight into
application buffers (CPU or GPU memory) while headers go to the host control
stack through a header ring. The design follows "High-throughput and Flexible
Host Networking for Accelerated Computing".

## Structure

| Module | Function |
|---|---|
| `zn_pkg` | Shared types: 5-tuple, Memory Segment (MS), actions, RX metadata, sequence compare |
| `zn_flow_table` | CAM keyed by 5-tuple; entry index = flow ID; holds the flow cursor |
| `zn_mr_table` | Memory Region table: MR ID -> base address and length (two search ports) |
| `zn_iommu` | Cache of 4 KiB page translations, filled by the host on a miss |
| `zn_ms_list` | Per-flow linked lists of MSs in one shared backing store, committed/peak admission |
| `zn_cursor_logic` | Per-packet decision: accept, drop, trim, accept ahead of the cursor, defer |
| `zn_rx_split` | RX split unit: parse, look up, decide, place payload, forward header entry |
| `zn_pay_dma_wr` | Payload write engine: cuts byte stream into writes of up to 64 bytes per chunk |
| `zn_hdr_dma` | Writes RX header entries into a ring of fixed-size slots, truncating oversize entries |
| `zn_tx_merge` | TX merge unit: reads payload from MSs, prepends the header, segments (TSO) |
| `zn_fifo`, `zn_byte_fifo` | Generic FIFO and a 64-byte gearbox |
| `zn_nic` | Top level connecting the above |

Datapath: 512-bit beats, byte 0 in bits [7:0], one clock domain, valid/ready
handshakes everywhere.

## RX operation

A frame is buffered whole; its first 128 bytes are parsed (Ethernet II, IPv4,
TCP or UDP). The 5-tuple is searched in the Flow Table. The cursor logic
compares the payload range with the flow cursor and the end of the posted MS
space:

* all bytes before the cursor: drop;
* starts at the cursor: accept and advance the cursor;
* overlaps the cursor: trim the old part, accept the rest, advance;
* starts beyond the cursor: walk the MS list to the right MS and accept,
  cursor unchanged;
* no flow, no payload, unknown format, or data beyond the posted buffers:
  defer the whole frame to the host.

Accepted payload is cut at MS ends and 4 KiB page ends, translated through
the MR Table and the IOMMU, and written. MSs the cursor has passed are
retired. Once the payload writes are done, a header entry (64-byte metadata
beat, then the header bytes, or the whole frame for a deferred frame) goes to
the header ring. Host commands (add/remove flow, acknowledged-byte update)
and MS postings are served between frames. Frames and host work alternate when
both wait. A posting refused by the MS List (peak allocation reached) stays
queued and is retried.

## TX operation

A TX request carries a header and a list of MSs. The merge unit reads the
payload through the MR Table and IOMMU, cuts it into MSS-sized frames, and
rewrites the IPv4 total length, ID and header checksum and the TCP sequence
number per frame. FIN/PSH are cleared on all but the last frame. The TCP
checksum is not recomputed.

## Sizes

Taken from the document: 8 zero-copy flows, 1M-entry MS backing store (8-byte
records), 128 committed and 8K peak MS entries per list. Own choices: 16 MR
entries, 64 IOMMU entries, 512-beat (32 KiB) packet buffer, so frames up to
32 KiB fit; a frame larger than the packet buffer would stall the input.

## Verification status

Self-checking testbenches pass for the Flow Table, MR Table, IOMMU, MS List,
cursor logic, payload write engine, header ring engine and the RX split unit.
The RX split testbench uses the real tables, a host memory model and an IOMMU
fill responder. Its traffic mixes in-order, swapped, retransmitted and
overlapping TCP segments, UDP, unknown flows, non-IPv4 frames, a posting
burst beyond the peak allocation, an MS naming an unregistered MR and an IOMMU
invalidation. It checks every decision and header entry, and every payload
byte in memory.

The TX merge unit and the top level compile and synthesize but have no
finished testbench, so they are unverified.

Not built: message sequence numbers for multi-flow ordering, LRO/GRO, TCP
checksum update on TX, the PCIe DMA and Ethernet MAC IP, and the software
control stack.
