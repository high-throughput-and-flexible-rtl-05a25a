// zn_pkg: types and constants shared by the split data/control path NIC.
//
// The NIC keeps three per-flow bookkeeping structures (Flow Table, MR Table,
// MS Lists) and uses them to place received payloads directly into
// application buffers. This package defines the records those structures
// hold, the 5-tuple key, the five packet actions of the flow-cursor logic and
// the command/entry formats exchanged with the host-side queues.
//
// The record contents (tuple fields, cursor, flow ID, MR address/length, MS =
// MR ID + offset + length) follow the document. Field widths, the byte layout
// of queue entries and the command encoding are this design's own choices.
package zn_pkg;

  // Data path: 512-bit beats, byte 0 of the stream in bits [7:0].
  localparam int unsigned DW        = 512;
  localparam int unsigned DBYTES    = DW / 8;
  localparam int unsigned NB_W      = $clog2(DBYTES) + 1;   // byte count 0..64
  localparam int unsigned ADDR_W    = 64;
  localparam int unsigned SEQ_W     = 32;                   // TCP sequence space
  localparam int unsigned HDR_MAX   = 128;                  // header bytes kept
  localparam int unsigned PAGE_BITS = 12;                   // 4 KiB IOMMU pages

  // An MS record is 8 bytes: MR ID (8) + offset (32) + length (24).
  localparam int unsigned MRID_W    = 8;
  localparam int unsigned MSOFF_W   = 32;
  localparam int unsigned MSLEN_W   = 24;

  typedef logic [DW-1:0]     beat_t;
  typedef logic [NB_W-1:0]   nbytes_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [SEQ_W-1:0]  seq_t;

  // Flow key: source and destination addresses and ports, protocol ID.
  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [7:0]  proto;
  } tuple_t;

  typedef struct packed {
    logic [MRID_W-1:0]  mr_id;
    logic [MSOFF_W-1:0] offset;
    logic [MSLEN_W-1:0] len;
  } ms_t;

  localparam logic [7:0] PROTO_TCP = 8'd6;
  localparam logic [7:0] PROTO_UDP = 8'd17;

  // Fig. 8 cases.
  typedef enum logic [2:0] {
    ACT_ACCEPT   = 3'd0,   // (a) in order: accept, advance cursor
    ACT_DROP     = 3'd1,   // (b) all bytes already acknowledged
    ACT_TRIM     = 3'd2,   // (c) trim the old part, accept, advance cursor
    ACT_ACCEPT_F = 3'd3,   // (d) beyond the cursor: walk the MS List, accept
    ACT_DEFER    = 3'd4    // (e) no MS / no flow: non-zero-copy path
  } action_e;

  // Host commands that configure the RX side (posted through the NIC queues).
  typedef enum logic [1:0] {
    CMD_ADD_FLOW = 2'd0,   // write a Flow Table entry, reset its MS List
    CMD_DEL_FLOW = 2'd1,   // invalidate the entry, free its MS List
    CMD_POST_MS  = 2'd2,   // append an RX MS to a flow's MS List
    CMD_ACK      = 2'd3    // latest acknowledged byte: move the cursor
  } cmd_e;

  // Metadata that leads each RX header entry (first beat of the entry).
  typedef struct packed {
    logic [7:0]  magic;      // 8'hA5
    logic [2:0]  action;     // action_e
    logic        flow_hit;
    logic [3:0]  rsvd;
    logic [15:0] flow_id;
    logic [31:0] seq;        // sequence number of the packet
    logic [15:0] pay_len;    // payload bytes in the packet
    logic [15:0] trim;       // leading payload bytes dropped (case c)
    logic [7:0]  hdr_len;    // header bytes that follow (0 for deferred)
    logic [15:0] pkt_len;    // frame bytes that follow when deferred
  } rx_meta_t;

  // Sequence comparison in the 32-bit wrapping space.
  function automatic logic seq_lt(input seq_t a, input seq_t b);
    seq_t d;
    d = a - b;
    return d[SEQ_W-1];
  endfunction

  function automatic logic seq_le(input seq_t a, input seq_t b);
    return (a == b) || seq_lt(a, b);
  endfunction

endpackage
