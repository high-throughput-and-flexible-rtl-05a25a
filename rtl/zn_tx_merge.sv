// zn_tx_merge: TX merge unit of the zero-copy NIC.
//
// The control stack posts one TX request per send the transport protocol
// has allowed: the packet header it built and the Memory Segment (MR ID,
// offset, length) holding the payload. Requests wait in a FIFO (the TX MS
// List) and are served strictly in order. For each request the unit
// translates the MS through the MR Table and the IOMMU, reads the payload
// from application memory with DMA read requests that never cross a 4 KiB
// page, and merges header and payload bytes through a byte gearbox into
// frames for the network port.
//
// Segmentation offload (TSO): when the request's MSS is non-zero and the
// payload is longer, the one MS serves several frames. Each frame gets a copy
// of the header with the IPv4 total length, IPv4 identification (+1 per
// frame), IPv4 header checksum and TCP sequence number rewritten, and FIN/PSH
// cleared on all but the last frame. The TCP checksum is left as posted.
// After the last frame's bytes have been read a completion (flow ID, bytes,
// frames) is returned to the control stack.
//
// Interfaces: req_* TX requests (valid/ready); mr_*, mmu_* table ports;
// rd_req_* / rd_rsp_* DMA reads (responses in order, bytes packed from byte
// 0); tx_* frames out (valid/ready, bytes per beat, last); cpl_* completions.
// Throughput: one 64-byte beat per clock once the read data flows; each frame
// waits for its payload read to finish before the next frame's header starts.
//
// From the document: in-order TX MS handling, DMA of the payload straight
// from the application buffer, merging header and payload, TSO splitting one
// MS over several headers, completion after transmission. Own choices: the
// request format, read chunking, which header fields TSO rewrites.
module zn_tx_merge
  import zn_pkg::*;
#(
  parameter int unsigned FLOWS = 8,
  parameter int unsigned TXQ   = 16,
  localparam int unsigned FID_W = (FLOWS > 1) ? $clog2(FLOWS) : 1,
  localparam int unsigned HW    = 8 * HDR_MAX,
  localparam int unsigned BCW   = $clog2(2 * DBYTES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [FID_W-1:0] req_fid,
  input  logic [HW-1:0]    req_hdr,
  input  logic [7:0]       req_hlen,
  input  ms_t              req_ms,
  input  logic [15:0]      req_mss,
  output logic [MRID_W-1:0] mr_id,
  input  logic             mr_hit,
  input  addr_t            mr_addr,
  input  addr_t            mr_len,
  output addr_t            mmu_vaddr,
  input  logic             mmu_hit,
  input  addr_t            mmu_paddr,
  output logic             mmu_miss,
  output logic             rd_req_valid,
  input  logic             rd_req_ready,
  output addr_t            rd_req_addr,
  output logic [15:0]      rd_req_len,
  input  logic             rd_rsp_valid,
  output logic             rd_rsp_ready,
  input  logic [DW-1:0]    rd_rsp_data,
  input  nbytes_t          rd_rsp_n,
  output logic             tx_valid,
  input  logic             tx_ready,
  output logic [DW-1:0]    tx_data,
  output nbytes_t          tx_n,
  output logic             tx_last,
  output logic             cpl_valid,
  input  logic             cpl_ready,
  output logic [FID_W-1:0] cpl_fid,
  output logic [MSLEN_W-1:0] cpl_bytes,
  output logic [15:0]      cpl_frames,
  output logic             cpl_err,
  output logic             ev_frame,
  output logic             ev_tso
);

  localparam int unsigned PAGE = 1 << PAGE_BITS;
  localparam int unsigned RW   = FID_W + HW + 8 + $bits(ms_t) + 16;

  // ---------------------------------------------------------------- TX MS List
  logic          q_valid, q_ready;
  logic [RW-1:0] q_data;
  zn_fifo #(.WIDTH(RW), .DEPTH(TXQ)) u_q (
    .clk, .rst_n,
    .in_valid(req_valid), .in_ready(req_ready),
    .in_data({req_fid, req_hdr, req_hlen, req_ms, req_mss}),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_data), .level()
  );

  // ---------------------------------------------------------------- header patch
  function automatic logic [7:0] gb(input logic [HW-1:0] h, input int unsigned i);
    return 8'(h >> (8 * i));
  endfunction
  function automatic logic [HW-1:0] sb(input logic [HW-1:0] h, input int unsigned i,
                                       input logic [7:0] v);
    logic [HW-1:0] m;
    m = HW'(8'hff) << (8 * i);
    return (h & ~m) | (HW'(v) << (8 * i));
  endfunction

  function automatic logic [HW-1:0] patch(input logic [HW-1:0] h, input logic [7:0] hlen,
                                          input logic [15:0] plen, input seq_t seq,
                                          input logic [15:0] ipid, input logic last);
    int unsigned ihl, l4;
    logic [7:0]  vihl;
    logic [15:0] tot;
    logic [31:0] sum;
    logic [HW-1:0] r;
    r   = h;
    vihl = gb(h, 14);
    ihl = 4 * 32'(vihl[3:0]);
    l4  = 14 + ihl;
    tot = 16'(hlen) - 16'd14 + plen;
    r = sb(r, 16, tot[15:8]);  r = sb(r, 17, tot[7:0]);
    r = sb(r, 18, ipid[15:8]); r = sb(r, 19, ipid[7:0]);
    r = sb(r, 24, 8'h00);      r = sb(r, 25, 8'h00);
    sum = '0;
    for (int unsigned i = 0; i < 30; i++)
      if (2 * i < ihl) sum += {16'h0, gb(r, 14 + 2 * i), gb(r, 15 + 2 * i)};
    sum = {16'h0, sum[15:0]} + {16'h0, sum[31:16]};
    sum = {16'h0, sum[15:0]} + {16'h0, sum[31:16]};
    r = sb(r, 24, ~sum[15:8]); r = sb(r, 25, ~sum[7:0]);
    r = sb(r, l4 + 4, seq[31:24]); r = sb(r, l4 + 5, seq[23:16]);
    r = sb(r, l4 + 6, seq[15:8]);  r = sb(r, l4 + 7, seq[7:0]);
    if (!last) r = sb(r, l4 + 13, gb(r, l4 + 13) & 8'hf6);
    return r;
  endfunction

  // ---------------------------------------------------------------- state
  typedef enum logic [3:0] {
    S_IDLE, S_CHECK, S_SEG, S_H0, S_H1, S_XLAT, S_PAYW, S_CPL
  } state_e;
  state_e state_q;

  logic [FID_W-1:0]   fid_q;
  logic [HW-1:0]      hdr_q, phdr_q;
  logic [7:0]         hlen_q;
  ms_t                ms_q;
  logic [15:0]        mss_q;
  logic [MSLEN_W-1:0] done_q;      // payload bytes already framed
  logic [15:0]        seg_len_q;   // payload bytes of the current frame
  logic [15:0]        req_off_q;   // bytes of this frame requested
  logic [15:0]        rsp_left_q;  // bytes of this frame still to arrive
  logic [15:0]        frames_q;
  logic [15:0]        ipid_q;
  seq_t               seq0_q;
  logic               err_q;
  logic               tcp_q;

  assign q_ready = (state_q == S_IDLE);

  // ---------------------------------------------------------------- gearbox
  logic [DW-1:0]  bf_out;
  logic [BCW-1:0] bf_cnt, bf_pop, bf_in_n;
  logic           bf_in_valid, bf_in_ready;
  logic [DW-1:0]  bf_in_data;

  zn_byte_fifo #(.W(DBYTES)) u_bf (
    .clk, .rst_n, .clr(1'b0),
    .in_valid(bf_in_valid), .in_ready(bf_in_ready), .in_data(bf_in_data), .in_n(bf_in_n),
    .out_data(bf_out), .cnt(bf_cnt), .pop(bf_pop)
  );

  always_comb begin
    bf_in_valid  = 1'b0;
    bf_in_data   = rd_rsp_data;
    bf_in_n      = BCW'(rd_rsp_n);
    rd_rsp_ready = 1'b0;
    unique case (state_q)
      S_H0: begin
        bf_in_valid = 1'b1;
        bf_in_data  = phdr_q[DW-1:0];
        bf_in_n     = (hlen_q > 8'(DBYTES)) ? BCW'(DBYTES) : BCW'(hlen_q);
      end
      S_H1: begin
        bf_in_valid = 1'b1;
        bf_in_data  = phdr_q[HW-1:DW];
        bf_in_n     = BCW'(hlen_q - 8'(DBYTES));
      end
      S_XLAT, S_PAYW: begin
        bf_in_valid  = rd_rsp_valid;
        rd_rsp_ready = bf_in_ready;
      end
      default: ;
    endcase
  end

  // frame lengths for the output side
  logic        lf_in_valid, lf_valid, lf_ready, lf_in_ready;
  logic [15:0] lf_len, out_left_q;
  logic        out_busy_q;
  zn_fifo #(.WIDTH(16), .DEPTH(4)) u_lenq (
    .clk, .rst_n,
    .in_valid(lf_in_valid), .in_ready(lf_in_ready), .in_data(16'(hlen_q) + seg_len_q),
    .out_valid(lf_valid), .out_ready(lf_ready), .out_data(lf_len), .level()
  );
  assign lf_in_valid = (state_q == S_SEG) && lf_in_ready;
  assign lf_ready    = !out_busy_q;

  logic [15:0] o_n;
  always_comb begin
    o_n      = (out_left_q > 16'(DBYTES)) ? 16'(DBYTES) : out_left_q;
    tx_valid = out_busy_q && (16'(bf_cnt) >= o_n) && o_n != 0;
    tx_data  = bf_out & ~({DW{1'b1}} << (8 * o_n));
    tx_n     = nbytes_t'(o_n);
    tx_last  = (o_n == out_left_q);
    bf_pop   = (tx_valid && tx_ready) ? BCW'(o_n) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_busy_q <= 1'b0;
      out_left_q <= '0;
    end else if (!out_busy_q) begin
      if (lf_valid) begin
        out_busy_q <= 1'b1;
        out_left_q <= lf_len;
      end
    end else if (tx_valid && tx_ready) begin
      out_left_q <= out_left_q - o_n;
      if (tx_last) out_busy_q <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- reads
  addr_t       vaddr;
  logic [15:0] rd_n;
  always_comb begin
    logic [31:0] pg_left, n;
    mr_id     = ms_q.mr_id;
    vaddr     = mr_addr + ADDR_W'(ms_q.offset) + ADDR_W'(done_q) + ADDR_W'(req_off_q);
    mmu_vaddr = vaddr;
    pg_left   = PAGE - 32'(vaddr[PAGE_BITS-1:0]);
    n         = 32'(seg_len_q - req_off_q);
    if (pg_left < n) n = pg_left;
    rd_n      = 16'(n);
  end

  assign rd_req_valid = (state_q == S_XLAT) && (req_off_q != seg_len_q) && mmu_hit;
  assign rd_req_addr  = mmu_paddr;
  assign rd_req_len   = rd_n;
  assign mmu_miss     = (state_q == S_XLAT) && (req_off_q != seg_len_q) && !mmu_hit;

  assign cpl_valid  = (state_q == S_CPL);
  assign cpl_fid    = fid_q;
  assign cpl_bytes  = err_q ? '0 : ms_q.len;
  assign cpl_frames = frames_q;
  assign cpl_err    = err_q;

  assign ev_frame = (state_q == S_SEG) && lf_in_ready;
  assign ev_tso   = ev_frame && frames_q == 16'd1;

  logic [15:0] seg_len_c;
  logic [MSLEN_W-1:0] left_c;
  assign left_c    = ms_q.len - done_q;
  assign seg_len_c = (mss_q != 0 && 32'(left_c) > 32'(mss_q)) ? mss_q : 16'(left_c);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      fid_q <= '0; hdr_q <= '0; phdr_q <= '0; hlen_q <= '0; ms_q <= '0; mss_q <= '0;
      done_q <= '0; seg_len_q <= '0; req_off_q <= '0; rsp_left_q <= '0;
      frames_q <= '0; ipid_q <= '0; seq0_q <= '0; err_q <= 1'b0; tcp_q <= 1'b0;
    end else begin
      if (rd_rsp_valid && rd_rsp_ready) rsp_left_q <= rsp_left_q - 16'(rd_rsp_n);
      unique case (state_q)
        S_IDLE: if (q_valid) begin
          logic [HW-1:0] h;
          int unsigned l4;
          logic [7:0] vihl;
          h = q_data[HW+8+$bits(ms_t)+16-1 -: HW];
          vihl = gb(h, 14);
          {fid_q, hdr_q, hlen_q, ms_q, mss_q} <= q_data;
          l4 = 14 + 4 * 32'(vihl[3:0]);
          seq0_q   <= {gb(h, l4 + 4), gb(h, l4 + 5), gb(h, l4 + 6), gb(h, l4 + 7)};
          ipid_q   <= {gb(h, 18), gb(h, 19)};
          tcp_q    <= {gb(h, 12), gb(h, 13)} == 16'h0800 && gb(h, 23) == PROTO_TCP;
          done_q   <= '0;
          frames_q <= '0;
          err_q    <= 1'b0;
          state_q  <= S_CHECK;
        end
        S_CHECK: begin
          if (!mr_hit || ADDR_W'(ms_q.offset) + ADDR_W'(ms_q.len) > mr_len) begin
            err_q   <= 1'b1;
            state_q <= S_CPL;
          end else begin
            if (!tcp_q) mss_q <= '0;   // only TCP frames are segmented
            state_q <= S_SEG;
          end
        end
        S_SEG: if (lf_in_ready) begin
          // frame header: rewritten when TSO is in use
          phdr_q     <= (mss_q != 0)
                        ? patch(hdr_q, hlen_q, seg_len_c, seq0_q + SEQ_W'(done_q),
                                ipid_q + frames_q, 32'(seg_len_c) == 32'(left_c))
                        : hdr_q;
          seg_len_q  <= seg_len_c;
          req_off_q  <= '0;
          rsp_left_q <= seg_len_c;
          frames_q   <= frames_q + 1'b1;
          state_q    <= S_H0;
        end
        S_H0: if (bf_in_ready) state_q <= (hlen_q > 8'(DBYTES)) ? S_H1 : S_XLAT;
        S_H1: if (bf_in_ready) state_q <= S_XLAT;
        S_XLAT: begin
          if (rd_req_valid && rd_req_ready) req_off_q <= req_off_q + rd_n;
          if (req_off_q == seg_len_q) state_q <= S_PAYW;
        end
        S_PAYW: if (rsp_left_q == 0) begin
          done_q <= done_q + MSLEN_W'(seg_len_q);
          if (32'(done_q) + 32'(seg_len_q) == 32'(ms_q.len)) state_q <= S_CPL;
          else                                                state_q <= S_SEG;
        end
        S_CPL: if (cpl_ready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
