// zn_nic: NIC data path with physically separated data and control paths.
//
// Payloads move between the network port and application buffers (in CPU or
// GPU memory) with no intermediate copy, while packet headers go to, and come
// from, a transport protocol that runs elsewhere (the control path). The NIC
// keeps just enough per-flow state to place every received payload at its
// final address before the protocol has seen the header, even when packets
// are reordered, lost or retransmitted:
//   Flow Table  5-tuple -> flow ID, flow cursor        (zn_flow_table)
//   MS List     per-flow posted receive buffers        (zn_ms_list)
//   MR Table    MR ID -> registered address range      (zn_mr_table)
//   IOMMU       virtual -> bus address cache           (zn_iommu)
// The RX split unit (zn_rx_split) decides, places payloads through the
// payload DMA engine and forwards headers through the header DMA engine
// (zn_hdr_dma) into a ring read by the control stack. The TX merge unit
// (zn_tx_merge) reads payloads of posted sends and merges them with the
// headers the protocol built, with segmentation offload.
//
// External interfaces (all valid/ready, 512-bit beats, bytes packed from
// byte 0, n = bytes in the beat):
//   net_rx_* / net_tx_*   frames from / to the Ethernet MAC
//   ctl_*, post_*         RX host commands and RX buffer postings
//   txr_*, cpl_*          TX requests and their completions
//   mr_wr_*               MR registration;  mmu_*  IOMMU fills and misses
//   ring_*, cons_idx, prod_idx  RX header-entry ring in control-stack memory
//   pay_wr_*, hdr_wr_*    memory writes (application memory, control memory)
//   rd_req_*, rd_rsp_*    memory reads for TX payloads
//   ev_*                  one-clock event pulses for monitoring
// The PCIe DMA IP, the Ethernet MAC and the memories are outside this block.
//
// Sizes: 8 zero-copy flows (the prototype's limit), 128 committed and 8K
// peak MS entries per flow from a 1M-entry store (the document's figures);
// the other sizes are this design's choices.
module zn_nic
  import zn_pkg::*;
#(
  parameter int unsigned FLOWS      = 8,
  parameter int unsigned POOL       = 1048576,
  parameter int unsigned COMMIT     = 128,
  parameter int unsigned PEAK       = 8192,
  parameter int unsigned MR_ENTRIES = 16,
  parameter int unsigned TLB        = 64,
  parameter int unsigned PKT_BEATS  = 512,
  parameter int unsigned TXQ        = 16,
  localparam int unsigned FID_W  = (FLOWS > 1) ? $clog2(FLOWS) : 1,
  localparam int unsigned MRS_W  = (MR_ENTRIES > 1) ? $clog2(MR_ENTRIES) : 1,
  localparam int unsigned HW     = 8 * HDR_MAX,
  localparam int unsigned C_W    = $clog2(POOL + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // network receive
  input  logic             net_rx_valid,
  output logic             net_rx_ready,
  input  logic [DW-1:0]    net_rx_data,
  input  nbytes_t          net_rx_n,
  input  logic             net_rx_last,
  // network transmit
  output logic             net_tx_valid,
  input  logic             net_tx_ready,
  output logic [DW-1:0]    net_tx_data,
  output nbytes_t          net_tx_n,
  output logic             net_tx_last,
  // RX host commands
  input  logic             ctl_valid,
  output logic             ctl_ready,
  input  cmd_e             ctl_op,
  input  logic [FID_W-1:0] ctl_fid,
  input  tuple_t           ctl_tuple,
  input  seq_t             ctl_seq,
  input  logic             post_valid,
  output logic             post_ready,
  input  logic [FID_W-1:0] post_fid,
  input  ms_t              post_ms,
  // TX requests and completions
  input  logic             txr_valid,
  output logic             txr_ready,
  input  logic [FID_W-1:0] txr_fid,
  input  logic [HW-1:0]    txr_hdr,
  input  logic [7:0]       txr_hlen,
  input  ms_t              txr_ms,
  input  logic [15:0]      txr_mss,
  output logic             cpl_valid,
  input  logic             cpl_ready,
  output logic [FID_W-1:0] cpl_fid,
  output logic [MSLEN_W-1:0] cpl_bytes,
  output logic [15:0]      cpl_frames,
  output logic             cpl_err,
  // MR registration
  input  logic             mr_wr_en,
  input  logic [MRS_W-1:0] mr_wr_slot,
  input  logic             mr_wr_valid,
  input  logic [MRID_W-1:0] mr_wr_id,
  input  addr_t            mr_wr_addr,
  input  addr_t            mr_wr_len,
  // IOMMU
  input  logic             mmu_inval,
  input  logic             mmu_fill_en,
  input  addr_t            mmu_fill_vaddr,
  input  addr_t            mmu_fill_paddr,
  output logic             mmu_rx_miss,
  output addr_t            mmu_rx_vaddr,
  output logic             mmu_tx_miss,
  output addr_t            mmu_tx_vaddr,
  // RX header-entry ring
  input  addr_t            ring_base,
  input  logic [4:0]       ring_log2,
  input  logic [4:0]       slot_log2,
  input  logic [31:0]      cons_idx,
  output logic [31:0]      prod_idx,
  // memory writes
  output logic             pay_wr_valid,
  input  logic             pay_wr_ready,
  output addr_t            pay_wr_addr,
  output logic [DW-1:0]    pay_wr_data,
  output nbytes_t          pay_wr_n,
  output logic             hdr_wr_valid,
  input  logic             hdr_wr_ready,
  output addr_t            hdr_wr_addr,
  output logic [DW-1:0]    hdr_wr_data,
  output nbytes_t          hdr_wr_n,
  // memory reads
  output logic             rd_req_valid,
  input  logic             rd_req_ready,
  output addr_t            rd_req_addr,
  output logic [15:0]      rd_req_len,
  input  logic             rd_rsp_valid,
  output logic             rd_rsp_ready,
  input  logic [DW-1:0]    rd_rsp_data,
  input  nbytes_t          rd_rsp_n,
  // monitoring
  output logic             ev_rx_pkt,
  output action_e          ev_rx_action,
  output logic             ev_mmu_miss,
  output logic             ev_post_refused,
  output logic             ev_walk_step,
  output logic             ev_tx_frame,
  output logic             ev_tso,
  output logic             ev_hdr_trunc,
  output logic [C_W-1:0]   ms_free_entries
);

  localparam int unsigned E_W = $clog2(POOL);

  // Flow Table
  logic             ft_wr_en, ft_wr_valid, ft_lk_hit, ft_adv_en, ft_ack_en;
  logic [FID_W-1:0] ft_wr_fid, ft_lk_fid, ft_adv_fid, ft_ack_fid;
  tuple_t           ft_wr_tuple, ft_lk_tuple;
  seq_t             ft_wr_cursor, ft_lk_cursor, ft_adv_cursor, ft_ack_cursor;

  zn_flow_table #(.FLOWS(FLOWS)) u_flow_table (
    .clk, .rst_n,
    .wr_en(ft_wr_en), .wr_fid(ft_wr_fid), .wr_valid(ft_wr_valid),
    .wr_tuple(ft_wr_tuple), .wr_cursor(ft_wr_cursor),
    .lk_tuple(ft_lk_tuple), .lk_hit(ft_lk_hit), .lk_fid(ft_lk_fid), .lk_cursor(ft_lk_cursor),
    .adv_en(ft_adv_en), .adv_fid(ft_adv_fid), .adv_cursor(ft_adv_cursor),
    .ack_en(ft_ack_en), .ack_fid(ft_ack_fid), .ack_cursor(ft_ack_cursor)
  );

  // MS List
  logic               ms_cmd_valid, ms_cmd_ready, ms_rsp_valid, ms_rsp_ok;
  logic [2:0]         ms_cmd_op;
  logic [FID_W-1:0]   ms_cmd_fid, ms_st_fid;
  seq_t               ms_cmd_pos, ms_rsp_ms_start, ms_st_base, ms_st_end;
  ms_t                ms_cmd_ms, ms_rsp_ms;
  logic [E_W-1:0]     ms_cmd_entry, ms_rsp_entry;
  logic [MSLEN_W-1:0] ms_rsp_within;
  logic [C_W-1:0]     ms_st_count;

  zn_ms_list #(.FLOWS(FLOWS), .POOL(POOL), .COMMIT(COMMIT), .PEAK(PEAK)) u_ms_list (
    .clk, .rst_n,
    .cmd_valid(ms_cmd_valid), .cmd_ready(ms_cmd_ready), .cmd_op(ms_cmd_op),
    .cmd_fid(ms_cmd_fid), .cmd_pos(ms_cmd_pos), .cmd_ms(ms_cmd_ms), .cmd_entry(ms_cmd_entry),
    .rsp_valid(ms_rsp_valid), .rsp_ok(ms_rsp_ok), .rsp_entry(ms_rsp_entry),
    .rsp_ms(ms_rsp_ms), .rsp_ms_start(ms_rsp_ms_start), .rsp_within(ms_rsp_within),
    .st_fid(ms_st_fid), .st_base(ms_st_base), .st_end(ms_st_end), .st_count(ms_st_count),
    .free_entries(ms_free_entries)
  );

  // MR Table
  logic [MRID_W-1:0] mr_a_id, mr_b_id;
  logic              mr_a_hit, mr_b_hit;
  addr_t             mr_a_addr, mr_a_len, mr_b_addr, mr_b_len;

  zn_mr_table #(.ENTRIES(MR_ENTRIES)) u_mr_table (
    .clk, .rst_n,
    .wr_en(mr_wr_en), .wr_slot(mr_wr_slot), .wr_valid(mr_wr_valid), .wr_mr_id(mr_wr_id),
    .wr_addr(mr_wr_addr), .wr_len(mr_wr_len),
    .a_mr_id(mr_a_id), .a_hit(mr_a_hit), .a_addr(mr_a_addr), .a_len(mr_a_len),
    .b_mr_id(mr_b_id), .b_hit(mr_b_hit), .b_addr(mr_b_addr), .b_len(mr_b_len)
  );

  // IOMMU
  logic  mmu_a_hit, mmu_b_hit;
  addr_t mmu_a_paddr, mmu_b_paddr;

  zn_iommu #(.ENTRIES(TLB)) u_iommu (
    .clk, .rst_n, .inval(mmu_inval),
    .fill_en(mmu_fill_en), .fill_vaddr(mmu_fill_vaddr), .fill_paddr(mmu_fill_paddr),
    .a_vaddr(mmu_rx_vaddr), .a_hit(mmu_a_hit), .a_paddr(mmu_a_paddr),
    .b_vaddr(mmu_tx_vaddr), .b_hit(mmu_b_hit), .b_paddr(mmu_b_paddr)
  );

  // RX split unit
  logic          e_valid, e_ready, e_last;
  logic [DW-1:0] e_data;
  nbytes_t       e_n;
  logic          rx_mmu_miss, tx_mmu_miss;

  zn_rx_split #(.FLOWS(FLOWS), .POOL(POOL), .PKT_BEATS(PKT_BEATS)) u_rx (
    .clk, .rst_n,
    .net_valid(net_rx_valid), .net_ready(net_rx_ready), .net_data(net_rx_data),
    .net_n(net_rx_n), .net_last(net_rx_last),
    .ctl_valid, .ctl_ready, .ctl_op, .ctl_fid, .ctl_tuple, .ctl_seq,
    .post_valid, .post_ready, .post_fid, .post_ms,
    .ft_wr_en, .ft_wr_fid, .ft_wr_valid, .ft_wr_tuple, .ft_wr_cursor,
    .ft_lk_tuple, .ft_lk_hit, .ft_lk_fid, .ft_lk_cursor,
    .ft_adv_en, .ft_adv_fid, .ft_adv_cursor, .ft_ack_en, .ft_ack_fid, .ft_ack_cursor,
    .ms_cmd_valid, .ms_cmd_ready, .ms_cmd_op, .ms_cmd_fid, .ms_cmd_pos, .ms_cmd_ms,
    .ms_cmd_entry, .ms_rsp_valid, .ms_rsp_ok, .ms_rsp_entry, .ms_rsp_ms,
    .ms_rsp_ms_start, .ms_rsp_within, .ms_st_fid, .ms_st_end,
    .mr_id(mr_a_id), .mr_hit(mr_a_hit), .mr_addr(mr_a_addr), .mr_len(mr_a_len),
    .mmu_vaddr(mmu_rx_vaddr), .mmu_hit(mmu_a_hit), .mmu_paddr(mmu_a_paddr),
    .mmu_miss(rx_mmu_miss),
    .pay_wr_valid, .pay_wr_ready, .pay_wr_addr, .pay_wr_data, .pay_wr_n,
    .e_valid, .e_ready, .e_data, .e_n, .e_last,
    .ev_pkt(ev_rx_pkt), .ev_action(ev_rx_action), .ev_mmu_miss(),
    .ev_post_refused, .ev_walk_step
  );

  // Header DMA engine
  zn_hdr_dma u_hdr_dma (
    .clk, .rst_n,
    .ring_base, .ring_log2, .slot_log2, .cons_idx, .prod_idx,
    .e_valid, .e_ready, .e_data, .e_n, .e_last,
    .wr_valid(hdr_wr_valid), .wr_ready(hdr_wr_ready), .wr_addr(hdr_wr_addr),
    .wr_data(hdr_wr_data), .wr_n(hdr_wr_n), .trunc(ev_hdr_trunc)
  );

  // TX merge unit
  zn_tx_merge #(.FLOWS(FLOWS), .TXQ(TXQ)) u_tx (
    .clk, .rst_n,
    .req_valid(txr_valid), .req_ready(txr_ready), .req_fid(txr_fid), .req_hdr(txr_hdr),
    .req_hlen(txr_hlen), .req_ms(txr_ms), .req_mss(txr_mss),
    .mr_id(mr_b_id), .mr_hit(mr_b_hit), .mr_addr(mr_b_addr), .mr_len(mr_b_len),
    .mmu_vaddr(mmu_tx_vaddr), .mmu_hit(mmu_b_hit), .mmu_paddr(mmu_b_paddr),
    .mmu_miss(tx_mmu_miss),
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_len,
    .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_data, .rd_rsp_n,
    .tx_valid(net_tx_valid), .tx_ready(net_tx_ready), .tx_data(net_tx_data),
    .tx_n(net_tx_n), .tx_last(net_tx_last),
    .cpl_valid, .cpl_ready, .cpl_fid, .cpl_bytes, .cpl_frames, .cpl_err,
    .ev_frame(ev_tx_frame), .ev_tso
  );

  assign mmu_rx_miss = rx_mmu_miss;
  assign mmu_tx_miss = tx_mmu_miss;
  assign ev_mmu_miss = rx_mmu_miss || tx_mmu_miss;

endmodule
