// zn_rx_split: RX split unit and RX control of the zero-copy NIC.
//
// Arriving frames are stored whole in a packet buffer while their first 128
// bytes are kept for parsing (Ethernet II, IPv4, TCP or UDP). For each frame
// the control state machine then
//   1. builds the 5-tuple and searches the Flow Table for the flow ID and
//      flow cursor, reads the end of the flow's posted MS space, and lets
//      zn_cursor_logic pick accept / drop / trim / accept-ahead / defer;
//   2. for accepted data asks the MS List for the MS holding the first byte
//      (a walk from the head for data beyond the cursor), then cuts the
//      payload into chunks that stop at MS ends and 4 KiB page ends,
//      translating MR ID + offset through the MR Table and the IOMMU, and
//      queues each chunk to the payload DMA engine; the payload bytes stream
//      out of the packet buffer through a byte gearbox at the same time;
//   3. advances the cursor for in-order data and retires the MSs it passed;
//   4. once the payload writes have drained, emits the RX header entry
//      (metadata beat, then header bytes) to the header DMA engine.
// Dropped frames are discarded; deferred frames (no flow entry, no payload,
// not TCP/UDP over IPv4, no MS for the data) are sent whole, behind a
// metadata beat, to the control path instead.
// When idle it also serves the host: flow add/remove and acknowledgement
// updates (ctl_*), and RX MS postings (post_*, queued; a posting the MS List
// refuses for lack of entries stays queued and is retried). Frames and host
// work alternate when both wait, so neither can starve the other.
//
// Interfaces: net_* frames in (valid/ready, bytes per beat, last);
// ft_*, ms_*, mr_*, mmu_* connect to the shared tables; pay_wr_* memory writes
// for payloads; e_* header-entry beats; ev_* one-clock event pulses.
// Timing: a frame is decided 2 clocks after its last beat is stored (plus
// one clock per MS walked and the IOMMU fill time on a miss); payload bytes
// then move at up to 64 bytes per clock.
//
// From the document: the parse/lookup/decide/place/forward sequence, the
// five actions, MS walking, cursor update and retirement, header forwarding
// after the data DMA, defer as the fallback. Own choices: frame formats
// accepted, buffer sizes, the command set, chunking at page ends, the entry
// layout and the policy of packets before host commands.
module zn_rx_split
  import zn_pkg::*;
#(
  parameter int unsigned FLOWS    = 8,
  parameter int unsigned POOL     = 1048576,
  parameter int unsigned PKT_BEATS = 512,
  parameter int unsigned DESCS    = 8,
  parameter int unsigned POSTQ    = 16,
  localparam int unsigned FID_W = (FLOWS > 1) ? $clog2(FLOWS) : 1,
  localparam int unsigned E_W   = $clog2(POOL),
  localparam int unsigned BCW   = $clog2(2 * DBYTES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // frames from the network port
  input  logic             net_valid,
  output logic             net_ready,
  input  logic [DW-1:0]    net_data,
  input  nbytes_t          net_n,
  input  logic             net_last,
  // host control commands (ADD_FLOW, DEL_FLOW, ACK)
  input  logic             ctl_valid,
  output logic             ctl_ready,
  input  cmd_e             ctl_op,
  input  logic [FID_W-1:0] ctl_fid,
  input  tuple_t           ctl_tuple,
  input  seq_t             ctl_seq,
  // host RX MS postings
  input  logic             post_valid,
  output logic             post_ready,
  input  logic [FID_W-1:0] post_fid,
  input  ms_t              post_ms,
  // Flow Table
  output logic             ft_wr_en,
  output logic [FID_W-1:0] ft_wr_fid,
  output logic             ft_wr_valid,
  output tuple_t           ft_wr_tuple,
  output seq_t             ft_wr_cursor,
  output tuple_t           ft_lk_tuple,
  input  logic             ft_lk_hit,
  input  logic [FID_W-1:0] ft_lk_fid,
  input  seq_t             ft_lk_cursor,
  output logic             ft_adv_en,
  output logic [FID_W-1:0] ft_adv_fid,
  output seq_t             ft_adv_cursor,
  output logic             ft_ack_en,
  output logic [FID_W-1:0] ft_ack_fid,
  output seq_t             ft_ack_cursor,
  // MS List
  output logic             ms_cmd_valid,
  input  logic             ms_cmd_ready,
  output logic [2:0]       ms_cmd_op,
  output logic [FID_W-1:0] ms_cmd_fid,
  output seq_t             ms_cmd_pos,
  output ms_t              ms_cmd_ms,
  output logic [E_W-1:0]   ms_cmd_entry,
  input  logic             ms_rsp_valid,
  input  logic             ms_rsp_ok,
  input  logic [E_W-1:0]   ms_rsp_entry,
  input  ms_t              ms_rsp_ms,
  input  seq_t             ms_rsp_ms_start,
  input  logic [MSLEN_W-1:0] ms_rsp_within,
  output logic [FID_W-1:0] ms_st_fid,
  input  seq_t             ms_st_end,
  // MR Table and IOMMU
  output logic [MRID_W-1:0] mr_id,
  input  logic             mr_hit,
  input  addr_t            mr_addr,
  input  addr_t            mr_len,
  output addr_t            mmu_vaddr,
  input  logic             mmu_hit,
  input  addr_t            mmu_paddr,
  output logic             mmu_miss,
  // payload DMA writes
  output logic             pay_wr_valid,
  input  logic             pay_wr_ready,
  output addr_t            pay_wr_addr,
  output logic [DW-1:0]    pay_wr_data,
  output nbytes_t          pay_wr_n,
  // RX header entries
  output logic             e_valid,
  input  logic             e_ready,
  output logic [DW-1:0]    e_data,
  output nbytes_t          e_n,
  output logic             e_last,
  // events
  output logic             ev_pkt,
  output action_e          ev_action,
  output logic             ev_mmu_miss,
  output logic             ev_post_refused,
  output logic             ev_walk_step
);

  localparam logic [2:0] OP_RESET = 3'd0, OP_APPEND = 3'd1, OP_SEEK = 3'd2,
                         OP_NEXT = 3'd3, OP_RETIRE = 3'd4, OP_FLUSH = 3'd5;
  localparam int unsigned HW = 8 * HDR_MAX;
  localparam int unsigned PAGE = 1 << PAGE_BITS;

  // ---------------------------------------------------------------- input
  logic            pf_in_ready, pf_out_valid, pf_out_ready;
  logic [DW+NB_W:0] pf_out;
  logic            df_in_ready, df_out_valid, df_out_ready;
  logic [HW+15:0]  df_out;
  logic [HW-1:0]   cap_q;
  logic [15:0]     len_q;
  logic            beat1_q;     // next beat is the second of its frame
  logic            first_q;     // next beat is the first of its frame

  assign net_ready = pf_in_ready && df_in_ready;

  zn_fifo #(.WIDTH(DW + NB_W + 1), .DEPTH(PKT_BEATS)) u_pkt (
    .clk, .rst_n,
    .in_valid(net_valid && net_ready), .in_ready(pf_in_ready),
    .in_data({net_last, net_n, net_data}),
    .out_valid(pf_out_valid), .out_ready(pf_out_ready), .out_data(pf_out),
    .level()
  );

  logic [HW-1:0] cap_next;
  always_comb begin
    cap_next = cap_q;
    if (first_q)      cap_next = {{(HW-DW){1'b0}}, net_data};
    else if (beat1_q) cap_next[HW-1:DW] = net_data;
  end

  zn_fifo #(.WIDTH(HW + 16), .DEPTH(DESCS)) u_desc (
    .clk, .rst_n,
    .in_valid(net_valid && net_ready && net_last), .in_ready(df_in_ready),
    .in_data({len_q + 16'(net_n), cap_next}),
    .out_valid(df_out_valid), .out_ready(df_out_ready), .out_data(df_out),
    .level()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_q   <= '0;
      len_q   <= '0;
      first_q <= 1'b1;
      beat1_q <= 1'b0;
    end else if (net_valid && net_ready) begin
      cap_q   <= cap_next;
      beat1_q <= first_q && !net_last;
      first_q <= net_last;
      len_q   <= net_last ? 16'd0 : len_q + 16'(net_n);
    end
  end

  // ---------------------------------------------------------------- parse
  logic [HW-1:0] ph;
  logic [15:0]   p_pkt_len;
  assign ph        = df_out[HW-1:0];
  assign p_pkt_len = df_out[HW+15:HW];

  function automatic logic [7:0] hb(input logic [HW-1:0] h, input int unsigned i);
    return 8'(h >> (8 * i));
  endfunction

  logic        p_ok, p_udp;
  tuple_t      p_tuple;
  seq_t        p_seq;
  logic [15:0] p_pay_len;
  logic [7:0]  p_hdr_len;
  always_comb begin
    int unsigned ihl, l4, l4len, tot;
    logic [7:0]  vihl, doff;
    vihl  = hb(ph, 14);
    ihl   = 4 * 32'(vihl[3:0]);
    l4    = 14 + ihl;
    tot   = 32'({hb(ph, 16), hb(ph, 17)});
    p_tuple.src_ip   = {hb(ph, 26), hb(ph, 27), hb(ph, 28), hb(ph, 29)};
    p_tuple.dst_ip   = {hb(ph, 30), hb(ph, 31), hb(ph, 32), hb(ph, 33)};
    p_tuple.proto    = hb(ph, 23);
    p_tuple.src_port = {hb(ph, l4), hb(ph, l4 + 1)};
    p_tuple.dst_port = {hb(ph, l4 + 2), hb(ph, l4 + 3)};
    p_udp = (p_tuple.proto == PROTO_UDP);
    p_seq = {hb(ph, l4 + 4), hb(ph, l4 + 5), hb(ph, l4 + 6), hb(ph, l4 + 7)};
    doff  = hb(ph, l4 + 12);
    l4len = p_udp ? 8 : 4 * 32'(doff[7:4]);
    p_ok  = {hb(ph, 12), hb(ph, 13)} == 16'h0800 && vihl[7:4] == 4'd4 &&
            ihl >= 20 && (p_tuple.proto == PROTO_TCP || p_udp) &&
            (p_udp || l4len >= 20) && l4 + l4len <= HDR_MAX &&
            tot >= ihl + l4len && 14 + tot <= int'(p_pkt_len);
    p_hdr_len = 8'(l4 + l4len);
    p_pay_len = p_ok ? 16'(tot - ihl - l4len) : 16'd0;
  end

  // ---------------------------------------------------------------- decide
  action_e     cl_action;
  seq_t        cl_start, cl_new_cursor;
  logic [15:0] cl_take, cl_trim;
  logic        cl_adv;

  assign ft_lk_tuple = p_tuple;
  assign ms_st_fid   = ft_lk_fid;

  zn_cursor_logic u_cursor (
    .hit(ft_lk_hit && p_ok), .udp(p_udp), .seq(p_seq), .len(p_pay_len),
    .cursor(ft_lk_cursor), .posted_end(ms_st_end),
    .action(cl_action), .start(cl_start), .take(cl_take), .trim(cl_trim),
    .adv(cl_adv), .new_cursor(cl_new_cursor)
  );

  // ---------------------------------------------------------------- reader
  // Moves the current frame from the packet buffer into the byte gearbox and
  // pops it: skip r_skip bytes, hand r_take bytes to the payload DMA or the
  // entry stream, discard the rest.
  logic [DW-1:0]  bf_out;
  logic [BCW-1:0] bf_cnt, bf_pop, pay_pop;
  logic           bf_in_ready;
  logic           r_active_q, r_in_done_q, r_to_pay_q;
  logic [15:0]    r_skip_q, r_take_q;
  logic [15:0]    avail16, n_skip, n_take, n_drain;
  logic           slow_emit;
  logic           r_done;

  assign avail16 = 16'(bf_cnt);
  assign pf_out_ready = r_active_q && !r_in_done_q && bf_in_ready;

  zn_byte_fifo #(.W(DBYTES)) u_bf (
    .clk, .rst_n, .clr(1'b0),
    .in_valid(pf_out_valid && r_active_q && !r_in_done_q), .in_ready(bf_in_ready),
    .in_data(pf_out[DW-1:0]), .in_n(BCW'(pf_out[DW+NB_W-1:DW])),
    .out_data(bf_out), .cnt(bf_cnt), .pop(bf_pop)
  );

  function automatic logic [15:0] min3(input logic [15:0] a, b, c);
    logic [15:0] m;
    m = (a < b) ? a : b;
    return (m < c) ? m : c;
  endfunction

  always_comb begin
    n_skip  = min3(avail16, 16'(DBYTES), r_skip_q);
    n_take  = min3(avail16, 16'(DBYTES), r_take_q);
    n_drain = min3(avail16, 16'(DBYTES), 16'hffff);
    bf_pop  = '0;
    if (r_active_q) begin
      if (r_skip_q != 0)       bf_pop = BCW'(n_skip);
      else if (r_take_q != 0)  bf_pop = r_to_pay_q ? pay_pop
                                                   : (slow_emit && e_ready ? BCW'(n_take) : '0);
      else                     bf_pop = BCW'(n_drain);
    end
  end

  assign r_done = r_active_q && r_in_done_q && r_skip_q == 0 && r_take_q == 0 && bf_cnt == 0;

  // ---------------------------------------------------------------- payload DMA
  logic        ch_valid, ch_ready, ch_discard;
  addr_t       ch_addr;
  logic [15:0] ch_len;
  logic        pay_idle;
  logic [BCW-1:0] pay_avail;

  assign pay_avail = (r_active_q && r_skip_q == 0 && r_take_q != 0 && r_to_pay_q)
                   ? BCW'((avail16 < r_take_q) ? avail16 : r_take_q) : '0;

  zn_pay_dma_wr u_pay (
    .clk, .rst_n,
    .ch_valid, .ch_ready, .ch_addr, .ch_len, .ch_discard,
    .src_data(bf_out), .src_avail(pay_avail), .src_pop(pay_pop),
    .wr_valid(pay_wr_valid), .wr_ready(pay_wr_ready), .wr_addr(pay_wr_addr),
    .wr_data(pay_wr_data), .wr_n(pay_wr_n), .idle(pay_idle)
  );

  // ---------------------------------------------------------------- control
  typedef enum logic [4:0] {
    S_IDLE, S_LOOK, S_SEEK, S_SEEK_W, S_SEG, S_NEXT, S_NEXT_W, S_RETIRE,
    S_RETIRE_W, S_WAIT, S_META, S_HDR0, S_HDR1, S_SLOW, S_DRAIN, S_DONE,
    S_CMD_FLUSH, S_CMD_FLUSH_W, S_CMD_RESET, S_CMD_RESET_W, S_CMD_RET,
    S_CMD_RET_W, S_POST, S_POST_W
  } state_e;
  state_e state_q;

  action_e          a_q;
  logic [FID_W-1:0] fid_q;
  logic             hit_q;
  seq_t             start_q, newc_q, seq_q;
  logic             adv_q, err_q;
  logic [15:0]      rem_q, trim_q, pay_len_q, pkt_len_q;
  logic [7:0]       hlen_q;
  logic [HW-1:0]    hdr_q;
  ms_t              ms_q;
  logic [E_W-1:0]   ent_q;
  seq_t             ms_start_q;
  logic [MSLEN_W-1:0] within_q;
  // host command being served
  logic             turn_q;     // 1: host work goes before the next frame
  logic             host_first;
  cmd_e             c_op_q;
  logic [FID_W-1:0] c_fid_q;
  seq_t             c_seq_q;

  // posting queue
  logic              pq_valid, pq_ready;
  logic [FID_W+$bits(ms_t)-1:0] pq_data;
  zn_fifo #(.WIDTH(FID_W + $bits(ms_t)), .DEPTH(POSTQ)) u_postq (
    .clk, .rst_n,
    .in_valid(post_valid), .in_ready(post_ready), .in_data({post_fid, post_ms}),
    .out_valid(pq_valid), .out_ready(pq_ready), .out_data(pq_data),
    .level()
  );

  // chunk for the current MS position
  addr_t       seg_vaddr;
  logic [15:0] seg_n;
  logic        seg_bad;
  always_comb begin
    logic [31:0] ms_left, pg_left, n;
    mr_id     = ms_q.mr_id;
    seg_vaddr = mr_addr + ADDR_W'(ms_q.offset) + ADDR_W'(within_q);
    mmu_vaddr = seg_vaddr;
    ms_left   = 32'(ms_q.len) - 32'(within_q);
    pg_left   = PAGE - 32'(seg_vaddr[PAGE_BITS-1:0]);
    n         = 32'(rem_q);
    if (ms_left < n) n = ms_left;
    if (pg_left < n) n = pg_left;
    seg_n     = 16'(n);
    seg_bad   = !mr_hit || (ADDR_W'(ms_q.offset) + ADDR_W'(ms_q.len) > mr_len);
  end

  assign slow_emit = (state_q == S_SLOW) && r_skip_q == 0 && r_take_q != 0 && n_take != 0;

  // entry stream
  rx_meta_t meta;
  always_comb begin
    meta          = '0;
    meta.magic    = 8'hA5;
    meta.action   = a_q;
    meta.flow_hit = hit_q;
    meta.rsvd     = {3'b000, err_q};
    meta.flow_id  = 16'(fid_q);
    meta.seq      = seq_q;
    meta.pay_len  = pay_len_q;
    meta.trim     = trim_q;
    meta.hdr_len  = (a_q == ACT_DEFER) ? 8'd0 : hlen_q;
    meta.pkt_len  = (a_q == ACT_DEFER) ? pkt_len_q : 16'd0;
    e_valid = 1'b0;
    e_data  = '0;
    e_n     = '0;
    e_last  = 1'b0;
    unique case (state_q)
      S_META: begin
        e_valid = 1'b1;
        e_data  = DW'(meta);
        e_n     = nbytes_t'(DBYTES);
        e_last  = (a_q != ACT_DEFER) && hlen_q == 0;
      end
      S_HDR0: begin
        e_valid = 1'b1;
        e_data  = hdr_q[DW-1:0];
        e_n     = (hlen_q > 8'(DBYTES)) ? nbytes_t'(DBYTES) : nbytes_t'(hlen_q);
        e_last  = (hlen_q <= 8'(DBYTES));
      end
      S_HDR1: begin
        e_valid = 1'b1;
        e_data  = hdr_q[HW-1:DW];
        e_n     = nbytes_t'(hlen_q - 8'(DBYTES));
        e_last  = 1'b1;
      end
      S_SLOW: begin
        e_valid = slow_emit;
        e_data  = bf_out & ~({DW{1'b1}} << (8 * n_take));
        e_n     = nbytes_t'(n_take);
        e_last  = (n_take == r_take_q);
      end
      default: ;
    endcase
  end

  // table and list commands
  always_comb begin
    ms_cmd_valid = 1'b0;
    ms_cmd_op    = OP_SEEK;
    ms_cmd_fid   = fid_q;
    ms_cmd_pos   = start_q;
    ms_cmd_ms    = '0;
    ms_cmd_entry = ent_q;
    unique case (state_q)
      S_SEEK:       begin ms_cmd_valid = 1'b1; ms_cmd_op = OP_SEEK; end
      S_NEXT:       begin ms_cmd_valid = 1'b1; ms_cmd_op = OP_NEXT; ms_cmd_pos = ms_start_q; end
      S_RETIRE:     begin ms_cmd_valid = 1'b1; ms_cmd_op = OP_RETIRE; ms_cmd_pos = newc_q; end
      S_CMD_FLUSH:  begin ms_cmd_valid = 1'b1; ms_cmd_op = OP_FLUSH; ms_cmd_fid = c_fid_q; end
      S_CMD_RESET:  begin ms_cmd_valid = 1'b1; ms_cmd_op = OP_RESET; ms_cmd_fid = c_fid_q;
                          ms_cmd_pos = c_seq_q; end
      S_CMD_RET:    begin ms_cmd_valid = 1'b1; ms_cmd_op = OP_RETIRE; ms_cmd_fid = c_fid_q;
                          ms_cmd_pos = c_seq_q; end
      S_POST:       begin ms_cmd_valid = 1'b1; ms_cmd_op = OP_APPEND;
                          ms_cmd_fid = pq_data[FID_W+$bits(ms_t)-1:$bits(ms_t)];
                          ms_cmd_ms  = pq_data[$bits(ms_t)-1:0]; end
      default: ;
    endcase
  end

  assign ch_valid   = (state_q == S_SEG) && (seg_bad || mmu_hit);
  assign ch_discard = seg_bad;
  // A chunk whose MR is missing or too short is written nowhere: its bytes
  // are consumed and the entry is flagged.
  assign ch_addr    = mmu_paddr;
  assign ch_len     = ch_discard ? rem_q : seg_n;
  assign mmu_miss   = (state_q == S_SEG) && !seg_bad && !mmu_hit;

  assign host_first    = !df_out_valid || turn_q;
  assign ft_wr_en      = (state_q == S_IDLE) && host_first && ctl_valid &&
                         (ctl_op == CMD_ADD_FLOW || ctl_op == CMD_DEL_FLOW);
  assign ft_wr_fid     = ctl_fid;
  assign ft_wr_valid   = (ctl_op == CMD_ADD_FLOW);
  assign ft_wr_tuple   = ctl_tuple;
  assign ft_wr_cursor  = ctl_seq;
  assign ft_ack_en     = (state_q == S_IDLE) && host_first && ctl_valid && ctl_op == CMD_ACK;
  assign ft_ack_fid    = ctl_fid;
  assign ft_ack_cursor = ctl_seq;
  assign ctl_ready     = (state_q == S_IDLE) && host_first;
  assign ft_adv_en     = (state_q == S_RETIRE) && ms_cmd_ready;
  assign ft_adv_fid    = fid_q;
  assign ft_adv_cursor = newc_q;
  assign pq_ready      = (state_q == S_POST_W) && ms_rsp_valid && ms_rsp_ok;
  assign df_out_ready  = (state_q == S_DONE);

  assign ev_pkt          = (state_q == S_LOOK);
  assign ev_action       = cl_action;
  assign ev_mmu_miss     = mmu_miss;
  assign ev_post_refused = (state_q == S_POST_W) && ms_rsp_valid && !ms_rsp_ok;
  assign ev_walk_step    = (state_q == S_SEEK_W) && !ms_rsp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      a_q <= ACT_DEFER; fid_q <= '0; hit_q <= 1'b0; start_q <= '0; newc_q <= '0;
      seq_q <= '0; adv_q <= 1'b0; err_q <= 1'b0; rem_q <= '0; trim_q <= '0;
      pay_len_q <= '0; pkt_len_q <= '0; hlen_q <= '0; hdr_q <= '0; ms_q <= '0;
      ent_q <= '0; ms_start_q <= '0; within_q <= '0;
      c_op_q <= CMD_ACK; c_fid_q <= '0; c_seq_q <= '0; turn_q <= 1'b0;
      r_active_q <= 1'b0; r_in_done_q <= 1'b0; r_to_pay_q <= 1'b0;
      r_skip_q <= '0; r_take_q <= '0;
    end else begin
      // reader bookkeeping
      if (pf_out_valid && pf_out_ready && pf_out[DW+NB_W]) r_in_done_q <= 1'b1;
      if (r_active_q) begin
        if (r_skip_q != 0)      r_skip_q <= r_skip_q - 16'(bf_pop);
        else if (r_take_q != 0) r_take_q <= r_take_q - 16'(bf_pop);
      end

      unique case (state_q)
        S_IDLE: begin
          if (df_out_valid && !(turn_q && (ctl_valid || pq_valid))) begin
            turn_q  <= 1'b1;
            state_q <= S_LOOK;
          end else if (ctl_valid) begin
            turn_q  <= 1'b0;
            c_op_q  <= ctl_op;
            c_fid_q <= ctl_fid;
            c_seq_q <= ctl_seq;
            state_q <= (ctl_op == CMD_ACK) ? S_CMD_RET : S_CMD_FLUSH;
          end else if (pq_valid) begin
            turn_q  <= 1'b0;
            state_q <= S_POST;
          end
        end

        S_LOOK: begin
          a_q       <= cl_action;
          fid_q     <= ft_lk_fid;
          hit_q     <= ft_lk_hit && p_ok;
          start_q   <= cl_start;
          newc_q    <= cl_new_cursor;
          adv_q     <= cl_adv;
          seq_q     <= p_seq;
          err_q     <= 1'b0;
          rem_q     <= cl_take;
          trim_q    <= cl_trim;
          pay_len_q <= p_pay_len;
          pkt_len_q <= p_pkt_len;
          hlen_q    <= p_hdr_len;
          hdr_q     <= ph & ~({HW{1'b1}} << (8 * p_hdr_len));
          r_active_q  <= 1'b1;
          r_in_done_q <= 1'b0;
          unique case (cl_action)
            ACT_DROP: begin
              r_skip_q <= '0; r_take_q <= '0; r_to_pay_q <= 1'b0;
              state_q  <= S_DRAIN;
            end
            ACT_DEFER: begin
              r_skip_q <= '0; r_take_q <= p_pkt_len; r_to_pay_q <= 1'b0;
              state_q  <= S_META;
            end
            default: begin
              r_skip_q <= 16'(p_hdr_len) + cl_trim; r_take_q <= cl_take; r_to_pay_q <= 1'b1;
              state_q  <= S_SEEK;
            end
          endcase
        end

        S_SEEK:   if (ms_cmd_ready) state_q <= S_SEEK_W;
        S_SEEK_W: if (ms_rsp_valid) begin
          ms_q       <= ms_rsp_ms;
          ent_q      <= ms_rsp_entry;
          ms_start_q <= ms_rsp_ms_start;
          within_q   <= ms_rsp_within;
          if (!ms_rsp_ok) begin
            err_q <= 1'b1;
            ms_q  <= '0;    // MR ID 0 with length 0: flagged as a bad segment
          end
          state_q <= S_SEG;
        end

        S_SEG: if (ch_valid && ch_ready) begin
          if (ch_discard) err_q <= 1'b1;
          rem_q    <= rem_q - ch_len;
          within_q <= within_q + MSLEN_W'(ch_len);
          if (rem_q == ch_len)                                   state_q <= adv_q ? S_RETIRE : S_WAIT;
          else if (32'(within_q) + 32'(ch_len) == 32'(ms_q.len)) state_q <= S_NEXT;
        end

        S_NEXT:   if (ms_cmd_ready) state_q <= S_NEXT_W;
        S_NEXT_W: if (ms_rsp_valid) begin
          ms_q       <= ms_rsp_ok ? ms_rsp_ms : '0;
          ent_q      <= ms_rsp_entry;
          ms_start_q <= ms_rsp_ms_start;
          within_q   <= '0;
          state_q    <= S_SEG;
        end

        S_RETIRE:   if (ms_cmd_ready) state_q <= S_RETIRE_W;
        S_RETIRE_W: if (ms_rsp_valid) state_q <= S_WAIT;
        S_WAIT:     if (r_done && pay_idle) begin
          r_active_q <= 1'b0;
          state_q    <= S_META;
        end

        S_META: if (e_ready) begin
          if (a_q == ACT_DEFER) state_q <= S_SLOW;
          else                  state_q <= (hlen_q == 0) ? S_DONE : S_HDR0;
        end
        S_HDR0: if (e_ready) state_q <= (hlen_q > 8'(DBYTES)) ? S_HDR1 : S_DONE;
        S_HDR1: if (e_ready) state_q <= S_DONE;
        S_SLOW: if (r_done) begin
          r_active_q <= 1'b0;
          state_q    <= S_DONE;
        end
        S_DRAIN: if (r_done) begin
          r_active_q <= 1'b0;
          state_q    <= S_DONE;
        end
        S_DONE: state_q <= S_IDLE;

        // host commands
        S_CMD_FLUSH:   if (ms_cmd_ready) state_q <= S_CMD_FLUSH_W;
        S_CMD_FLUSH_W: if (ms_rsp_valid)
                         state_q <= (c_op_q == CMD_ADD_FLOW) ? S_CMD_RESET : S_IDLE;
        S_CMD_RESET:   if (ms_cmd_ready) state_q <= S_CMD_RESET_W;
        S_CMD_RESET_W: if (ms_rsp_valid) state_q <= S_IDLE;
        S_CMD_RET:     if (ms_cmd_ready) state_q <= S_CMD_RET_W;
        S_CMD_RET_W:   if (ms_rsp_valid) state_q <= S_IDLE;
        S_POST:        if (ms_cmd_ready) state_q <= S_POST_W;
        S_POST_W:      if (ms_rsp_valid) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
