// tb_zn_rx_split: self-checking testbench for the RX split unit.
//
// zn_rx_split is connected to real Flow Table, MS List, MR Table and IOMMU
// instances (small sizes), a behavioural host memory on the payload write
// port, an IOMMU fill responder (fixed page mapping, random delay) and a
// header-entry sink with random backpressure. Frames are sent with random
// gaps. Traffic per TCP flow mixes in-order segments, swapped pairs (data
// beyond the cursor), full retransmissions, overlapping retransmissions,
// pure ACKs and segments that run past the posted buffers; one UDP flow,
// unknown tuples and non-IPv4 frames are mixed in. The host side posts MSs
// (one burst overflows the peak allocation), sends ACK updates, posts one MS
// naming an unregistered MR, invalidates the IOMMU and finally removes flows.
//
// A reference model is evaluated when the DUT looks a frame up (ev_pkt), so
// traffic may be pipelined. It predicts the action, cursor, retired MSs and
// the header entry (metadata fields, header bytes or the whole frame), and
// records the expected byte at every bus address written. Monitors sample on
// the falling clock edge, i.e. what the next rising edge will act on. At the end, host
// memory is compared byte by byte and every mechanism must have occurred.
module tb_zn_rx_split;
  import zn_pkg::*;
  import tb_zn_pkt_pkg::*;

  localparam int NF = 4, POOL = 64, COMMIT = 4, PEAK = 16;
  localparam int E_W = $clog2(POOL), C_W = $clog2(POOL + 1);
  localparam int NPKT = 700;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // ---------------------------------------------------------------- DUT + tables
  logic net_valid, net_ready, net_last;
  logic [DW-1:0] net_data;
  nbytes_t net_n;
  logic ctl_valid, ctl_ready;
  cmd_e ctl_op;
  logic [1:0] ctl_fid;
  tuple_t ctl_tuple;
  seq_t ctl_seq;
  logic post_valid, post_ready;
  logic [1:0] post_fid;
  ms_t post_ms;
  logic ft_wr_en, ft_wr_valid, ft_lk_hit, ft_adv_en, ft_ack_en;
  logic [1:0] ft_wr_fid, ft_lk_fid, ft_adv_fid, ft_ack_fid;
  tuple_t ft_wr_tuple, ft_lk_tuple;
  seq_t ft_wr_cursor, ft_lk_cursor, ft_adv_cursor, ft_ack_cursor;
  logic ms_cmd_valid, ms_cmd_ready, ms_rsp_valid, ms_rsp_ok;
  logic [2:0] ms_cmd_op;
  logic [1:0] ms_cmd_fid, ms_st_fid;
  seq_t ms_cmd_pos, ms_rsp_ms_start, ms_st_end;
  ms_t ms_cmd_ms, ms_rsp_ms;
  logic [E_W-1:0] ms_cmd_entry, ms_rsp_entry;
  logic [MSLEN_W-1:0] ms_rsp_within;
  logic [C_W-1:0] free_entries;
  logic [MRID_W-1:0] mr_id;
  logic mr_hit;
  addr_t mr_addr, mr_len;
  addr_t mmu_vaddr, mmu_paddr;
  logic mmu_hit, mmu_miss;
  logic pay_wr_valid, pay_wr_ready;
  addr_t pay_wr_addr;
  logic [DW-1:0] pay_wr_data;
  nbytes_t pay_wr_n;
  logic e_valid, e_ready, e_last;
  logic [DW-1:0] e_data;
  nbytes_t e_n;
  logic ev_pkt, ev_mmu_miss, ev_post_refused, ev_walk_step;
  action_e ev_action;
  logic mrw_en, mrw_valid;
  logic [1:0] mrw_slot;
  logic [MRID_W-1:0] mrw_id;
  addr_t mrw_addr, mrw_len;
  logic fill_en, inval;
  addr_t fill_vaddr, fill_paddr;

  zn_rx_split #(.FLOWS(NF), .POOL(POOL), .PKT_BEATS(64), .DESCS(4), .POSTQ(4)) u_dut (.*);

  zn_flow_table #(.FLOWS(NF)) u_ft (
    .clk, .rst_n, .wr_en(ft_wr_en), .wr_fid(ft_wr_fid), .wr_valid(ft_wr_valid),
    .wr_tuple(ft_wr_tuple), .wr_cursor(ft_wr_cursor), .lk_tuple(ft_lk_tuple),
    .lk_hit(ft_lk_hit), .lk_fid(ft_lk_fid), .lk_cursor(ft_lk_cursor),
    .adv_en(ft_adv_en), .adv_fid(ft_adv_fid), .adv_cursor(ft_adv_cursor),
    .ack_en(ft_ack_en), .ack_fid(ft_ack_fid), .ack_cursor(ft_ack_cursor));

  seq_t st_base_u;
  logic [C_W-1:0] st_count_u;
  zn_ms_list #(.FLOWS(NF), .POOL(POOL), .COMMIT(COMMIT), .PEAK(PEAK)) u_ms (
    .clk, .rst_n, .cmd_valid(ms_cmd_valid), .cmd_ready(ms_cmd_ready), .cmd_op(ms_cmd_op),
    .cmd_fid(ms_cmd_fid), .cmd_pos(ms_cmd_pos), .cmd_ms(ms_cmd_ms), .cmd_entry(ms_cmd_entry),
    .rsp_valid(ms_rsp_valid), .rsp_ok(ms_rsp_ok), .rsp_entry(ms_rsp_entry), .rsp_ms(ms_rsp_ms),
    .rsp_ms_start(ms_rsp_ms_start), .rsp_within(ms_rsp_within), .st_fid(ms_st_fid),
    .st_base(st_base_u), .st_end(ms_st_end), .st_count(st_count_u), .free_entries(free_entries));

  logic b_hit_u; addr_t b_addr_u, b_len_u;
  zn_mr_table #(.ENTRIES(4)) u_mr (
    .clk, .rst_n, .wr_en(mrw_en), .wr_slot(mrw_slot), .wr_valid(mrw_valid), .wr_mr_id(mrw_id),
    .wr_addr(mrw_addr), .wr_len(mrw_len), .a_mr_id(mr_id), .a_hit(mr_hit), .a_addr(mr_addr),
    .a_len(mr_len), .b_mr_id(8'd0), .b_hit(b_hit_u), .b_addr(b_addr_u), .b_len(b_len_u));

  logic bh_u; addr_t bp_u;
  zn_iommu #(.ENTRIES(4)) u_mmu (
    .clk, .rst_n, .inval, .fill_en, .fill_vaddr, .fill_paddr,
    .a_vaddr(mmu_vaddr), .a_hit(mmu_hit), .a_paddr(mmu_paddr),
    .b_vaddr(64'd0), .b_hit(bh_u), .b_paddr(bp_u));

  logic wb_ready_u, rq_ready_u, rs_valid_u;
  logic [DW-1:0] rs_data_u;
  nbytes_t rs_n_u;
  tb_zn_host_mem u_mem (
    .clk, .rst_n, .stall_en(1'b1),
    .wa_valid(pay_wr_valid), .wa_ready(pay_wr_ready), .wa_addr(pay_wr_addr),
    .wa_data(pay_wr_data), .wa_n(pay_wr_n),
    .wb_valid(1'b0), .wb_ready(wb_ready_u), .wb_addr('0), .wb_data('0), .wb_n('0),
    .rq_valid(1'b0), .rq_ready(rq_ready_u), .rq_addr('0), .rq_len('0),
    .rs_valid(rs_valid_u), .rs_ready(1'b1), .rs_data(rs_data_u), .rs_n(rs_n_u));

  // IOMMU page mapping used by the fill responder (bijective on page numbers)
  function automatic addr_t xlate(addr_t va);
    return {(va[63:12] * 52'd7) + 52'h100, va[11:0]};
  endfunction

  int     n_act [5];
  int     n_walk = 0, n_miss = 0, n_refused = 0, n_err = 0, n_ack = 0;
  int fill_wait = -1;
  always @(negedge clk) begin
    fill_en <= 0;
    if (fill_wait > 0) fill_wait <= fill_wait - 1;
    else if (fill_wait == 0) begin
      fill_en <= 1; fill_vaddr <= mmu_vaddr; fill_paddr <= xlate(mmu_vaddr); fill_wait <= -1;
      n_miss++;
    end else if (mmu_miss && !fill_en) fill_wait <= $urandom_range(1, 8);
  end

  // ---------------------------------------------------------------- model state
  tuple_t tup [NF];
  seq_t   cur [NF];                // model flow cursor
  ms_t    pl  [NF][$];             // appended MSs not yet retired
  seq_t   pls [NF][$];             // their start sequence numbers
  seq_t   pend_end [NF];           // end of the appended MSs
  ms_t    postq_ms [$];            // posted, not yet appended (in order)
  int     postq_f  [$];
  bit     flow_on [NF];
  addr_t  mr_base [int];
  addr_t  mr_size [int];
  byte unsigned exp_mem [addr_t];

  typedef struct { int f; bit hit; bit ok; bit udp; seq_t seq; int len; int hlen; int id; } info_t;
  info_t  sent [$];
  bytes_t frames [int];
  bytes_t exp_e [$];
  int     exp_e_id [$];
  bytes_t cur_e;

  function automatic byte unsigned dbyte(int f, seq_t p);
    return 8'(p ^ (p >> 8) * 37 ^ (p >> 16) * 11 ^ f * 91);
  endfunction

  // place bytes [s, s+n) of flow f; returns 1 if a bad MR segment was met
  function automatic bit place(int f, seq_t s, int n, const ref bytes_t pay, input int poff);
    bit bad = 0;
    seq_t d;
    for (int i = 0; i < n; i++) begin
      seq_t p = s + seq_t'(i);
      int k = -1;
      foreach (pl[f][j]) if (seq_le(pls[f][j], p) && seq_lt(p, pls[f][j] + seq_t'(pl[f][j].len))) k = j;
      if (k < 0) return 1;
      if (!mr_base.exists(int'(pl[f][k].mr_id)) ||
          64'(pl[f][k].offset) + 64'(pl[f][k].len) > mr_size[int'(pl[f][k].mr_id)]) bad = 1;
      if (bad) return 1;
      d = p - pls[f][k];                  // offset inside the MS, modulo 2^32
      exp_mem[xlate(mr_base[int'(pl[f][k].mr_id)] + 64'(pl[f][k].offset) + 64'(d))] = pay[poff + i];
    end
    return 0;
  endfunction

  function automatic void retire(int f, seq_t pos);
    while (pl[f].size() != 0 && seq_le(pls[f][0] + seq_t'(pl[f][0].len), pos)) begin
      void'(pl[f].pop_front()); void'(pls[f].pop_front());
    end
  endfunction

  // decision check, at the clock the DUT looks the frame up
  always @(negedge clk) if (rst_n && ev_pkt) begin
    info_t in;
    action_e a;
    seq_t s, e;
    int take, trim, f;
    bit err;
    bytes_t fr, pay, en;
    rx_meta_t m;
    pay.delete(); en.delete();
    in = sent.pop_front();
    fr = frames[in.id];
    frames.delete(in.id);
    f = in.f;
    a = ACT_DEFER; take = 0; trim = 0; err = 0;
    s = in.udp ? cur[f] : in.seq;
    e = s + seq_t'(in.len);
    if (!in.hit || !in.ok || in.len == 0) a = ACT_DEFER;
    else if (seq_le(e, cur[f]))            a = ACT_DROP;
    else if (seq_lt(pend_end[f], e))       a = ACT_DEFER;
    else if (s == cur[f])                  begin a = ACT_ACCEPT; take = in.len; end
    else if (seq_lt(s, cur[f]))            begin a = ACT_TRIM; trim = int'(cur[f] - s); take = in.len - trim; end
    else                                   begin a = ACT_ACCEPT_F; take = in.len; end
    chk(ev_action == a, $sformatf("frame %0d flow %0d action %0d exp %0d", in.id, f, ev_action, a));
    n_act[int'(a)]++;
    if (a == ACT_ACCEPT || a == ACT_TRIM || a == ACT_ACCEPT_F) begin
      for (int i = 0; i < in.len; i++) pay.push_back(fr[in.hlen + i]);
      err = place(f, s + seq_t'(trim), take, pay, trim);
      if (a != ACT_ACCEPT_F) begin cur[f] = e; retire(f, e); end
    end
    if (a != ACT_DROP) begin
      m = '0;
      m.magic = 8'hA5; m.action = a; m.flow_hit = in.hit && in.ok; m.rsvd = {3'b0, err};
      m.flow_id = (in.hit && in.ok) ? 16'(f) : 16'(ft_lk_fid);
      m.seq = in.seq; m.pay_len = in.ok ? 16'(in.len) : 16'd0; m.trim = 16'(trim);
      m.hdr_len = (a == ACT_DEFER) ? 8'd0 : 8'(in.hlen);
      m.pkt_len = (a == ACT_DEFER) ? 16'(fr.size()) : 16'd0;
      for (int i = 0; i < 64; i++) en.push_back(8'(DW'(m) >> (8 * i)));
      if (a == ACT_DEFER) foreach (fr[i]) en.push_back(fr[i]);
      else for (int i = 0; i < in.hlen; i++) en.push_back(fr[i]);
      exp_e.push_back(en);
      exp_e_id.push_back(in.id);
      if (err) n_err++;
    end
  end

  // ACK and posting bookkeeping, at the DUT handshakes
  always @(negedge clk) if (rst_n) begin
    if (ctl_valid && ctl_ready && ctl_op == CMD_ACK) begin
      if (seq_lt(cur[int'(ctl_fid)], ctl_seq)) cur[int'(ctl_fid)] = ctl_seq;
      retire(int'(ctl_fid), ctl_seq);
      n_ack++;
    end
    if (u_dut.pq_ready || ev_post_refused) begin
      automatic int f = postq_f[0];
      if (u_dut.pq_ready) begin
        chk(u_dut.pq_data[$bits(ms_t)-1:0] == postq_ms[0], "posting order");
        pls[f].push_back(pend_end[f]);
        pl[f].push_back(postq_ms[0]);
        pend_end[f] += seq_t'(postq_ms[0].len);
        void'(postq_ms.pop_front()); void'(postq_f.pop_front());
      end else begin
        n_refused++;
        chk(pl[f].size() >= COMMIT, $sformatf("refusal below the committed count (%0d)", pl[f].size()));
      end
    end
    if (ev_walk_step) n_walk++;
  end

  // entry sink: compare each entry with the expected one
  always @(posedge clk) e_ready <= ($urandom_range(0, 3) != 0);
  always @(negedge clk) begin
    if (rst_n && e_valid && e_ready) begin
      for (int i = 0; i < int'(e_n); i++) cur_e.push_back(8'(e_data >> (8 * i)));
      if (e_last) begin
        if (exp_e.size() == 0) chk(0, "unexpected entry");
        else begin
          automatic bytes_t x = exp_e.pop_front();
          automatic int id = exp_e_id.pop_front();
          automatic bit same = (x.size() == cur_e.size());
          if (same) foreach (x[i]) if (x[i] != cur_e[i]) begin
            if (same && failures < 5) $display("  byte %0d got %h exp %h", i, cur_e[i], x[i]);
            same = 0;
          end
          chk(same, $sformatf("entry of frame %0d (%0d bytes, exp %0d)", id, cur_e.size(), x.size()));
        end
        cur_e.delete();
      end
    end
  end

  // ---------------------------------------------------------------- drivers
  // Inputs change one time unit after a rising edge; ready is looked at on
  // the falling edge.
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  int fid_id = 0;
  task automatic send(input bytes_t fr, input info_t in);
    in.id = fid_id++;
    frames[in.id] = fr;
    sent.push_back(in);
    for (int i = 0; i < fr.size(); i += 64) begin
      while ($urandom_range(0, 4) == 0) tick();
      net_valid = 1; net_last = (i + 64 >= fr.size());
      net_n = nbytes_t'((fr.size() - i > 64) ? 64 : fr.size() - i);
      for (int j = 0; j < 64; j++) net_data[8*j +: 8] = (i + j < fr.size()) ? fr[i + j] : 8'h00;
      do @(negedge clk); while (!net_ready);
      tick();
      net_valid = 0;
    end
  endtask

  task automatic ctl(input cmd_e op, input int f, input tuple_t t, input seq_t s);
    ctl_valid = 1; ctl_op = op; ctl_fid = 2'(f); ctl_tuple = t; ctl_seq = s;
    do @(negedge clk); while (!ctl_ready);
    tick();
    ctl_valid = 0;
  endtask

  // postings are queued here and handed to the DUT by a background thread
  ms_t swq_ms [$];
  int  swq_f  [$];
  task automatic post(input int f, input ms_t m);
    postq_ms.push_back(m); postq_f.push_back(f);
    swq_ms.push_back(m); swq_f.push_back(f);
  endtask
  initial begin
    post_valid = 0;
    forever begin
      tick();
      if (swq_ms.size() != 0) begin
        post_valid = 1; post_fid = 2'(swq_f.pop_front()); post_ms = swq_ms.pop_front();
        do @(negedge clk); while (!post_ready);
        tick();
        post_valid = 0;
      end
    end
  end

  task automatic mr_write(input int slot, input bit v, input int id, input addr_t a, input addr_t l);
    mrw_en = 1; mrw_slot = 2'(slot); mrw_valid = v; mrw_id = 8'(id); mrw_addr = a; mrw_len = l;
    if (v) begin mr_base[id] = a; mr_size[id] = l; end
    tick();
    mrw_en = 0;
  endtask

  // sender state per flow
  seq_t  nxt [NF];
  seq_t  poff [NF];                // next free MR offset for the flow's MSs
  seq_t  post_end_s [NF];          // end of everything posted (sender's view)

  task automatic post_more(input int f, input int bytes, input int maxlen);
    while (seq_lt(post_end_s[f], nxt[f] + seq_t'(bytes)) && postq_ms.size() < 3) begin
      ms_t m;
      int l = $urandom_range(64, maxlen);
      m.mr_id = (f == 2) ? 8'd9 : 8'd3;
      m.offset = poff[f]; m.len = 24'(l);
      poff[f] += seq_t'(l + $urandom_range(0, 1) * 64);
      post_end_s[f] += seq_t'(l);
      post(f, m);
    end
  endtask

  task automatic tcp_seg(input int f, input seq_t s, input int l);
    bytes_t pay, fr;
    info_t in;
    bit topt = $urandom_range(0, 1);
    for (int i = 0; i < l; i++) pay.push_back(dbyte(f, s + seq_t'(i)));
    fr = frame(tup[f], s, pay, topt, 16'(fid_id), 8'h18);
    in = '{f: f, hit: flow_on[f], ok: 1, udp: 0, seq: s, len: l, hlen: hdr_len(fr), id: 0};
    send(fr, in);
  endtask

  int pk = 0;
  initial begin
    net_valid = 0; ctl_valid = 0; mrw_en = 0; inval = 0; net_data = '0;
    net_n = '0; net_last = 0;
    for (int i = 0; i < 5; i++) n_act[i] = 0;
    repeat (4) tick();
    rst_n = 1;
    mr_write(0, 1, 3, 64'h0000_7f12_3400_0345, 64'h10_0000);
    mr_write(1, 1, 9, 64'h0000_0040_0000_0000, 64'h8_0000);
    for (int f = 0; f < NF; f++) begin
      tup[f] = '{src_ip: 32'h0a000001 + f, dst_ip: 32'h0a0000fe, src_port: 16'(1000 + f),
                 dst_port: 16'd4791, proto: (f == 3) ? PROTO_UDP : PROTO_TCP};
      nxt[f] = (f == 1) ? 32'hffff_f000 : $urandom;
      cur[f] = nxt[f]; pend_end[f] = nxt[f]; post_end_s[f] = nxt[f];
      poff[f] = seq_t'(f * 32'h4_0000 + 32'h123);
      if (f == 2) poff[f] = 32'h77;
      flow_on[f] = 1;
      ctl(CMD_ADD_FLOW, f, tup[f], nxt[f]);
    end
    chk(u_ft.valid_q[0] && u_ft.valid_q[3], "flows added");
    for (int f = 0; f < NF; f++) post_more(f, 6000, 3000);

    while (pk < NPKT) begin
      automatic int f = $urandom_range(0, NF - 1);
      automatic int r = $urandom_range(0, 99);
      int room;
      pk++;
      tick();
      // host-side events at fixed points
      if (pk == 150) begin                    // burst beyond the peak allocation
        for (int i = 0; i < PEAK + 2; i++) begin
          ms_t m; m.mr_id = 8'd3; m.offset = poff[0]; m.len = 24'd100;
          poff[0] += 100; post_end_s[0] += 100;
          post(0, m);
        end
      end
      if (pk == 60) begin                     // an MS naming an unregistered MR
        ms_t m; m.mr_id = 8'd44; m.offset = 0; m.len = 24'd500;
        post(2, m); post_end_s[2] += 500;
      end
      if (pk == 400) begin inval = 1; tick(); inval = 0; end
      if (postq_ms.size() < 3) post_more(f, 5000, 3000);
      if (f == 3) begin                       // UDP: lands at the cursor
        bytes_t pay, fr; info_t in;
        automatic int l = $urandom_range(1, 1400);
        pay.delete();
        for (int i = 0; i < l; i++) pay.push_back(8'($urandom));
        fr = frame(tup[3], 0, pay, 0, 16'(pk), 8'h00);
        in = '{f: 3, hit: 1, ok: 1, udp: 1, seq: {16'(8 + l), 16'h0}, len: l, hlen: 42, id: 0};
        send(fr, in);
        continue;
      end
      room = int'(post_end_s[f] - nxt[f]);
      if (r < 45) begin                                     // in order
        automatic int l = $urandom_range(1, 1400);
        if (room > 0 && l > room) l = room;
        if (room > 0) begin tcp_seg(f, nxt[f], l); nxt[f] += seq_t'(l); end
      end else if (r < 57 && room > 200) begin              // swapped pair
        automatic int a = $urandom_range(1, 90), b = $urandom_range(1, 900);
        if (a + b > room) b = room - a;
        tcp_seg(f, nxt[f] + seq_t'(a), b);
        tcp_seg(f, nxt[f], a);
        nxt[f] += seq_t'(a + b);
        if ($urandom_range(0, 1)) ctl(CMD_ACK, f, '0, nxt[f]);
      end else if (r < 67) begin                            // old retransmission
        automatic int l = $urandom_range(1, 300);
        tcp_seg(f, nxt[f] - seq_t'(l + $urandom_range(0, 200)), l);
      end else if (r < 77 && room > 0) begin                // overlapping retransmission
        automatic int k = $urandom_range(1, 200);
        automatic int l = k + $urandom_range(1, 600);
        if (l - k > room) l = k + room;
        tcp_seg(f, nxt[f] - seq_t'(k), l);
        nxt[f] += seq_t'(l - k);
      end else if (r < 82) begin                            // pure ACK
        tcp_seg(f, nxt[f], 0);
      end else if (r < 87 && room < 1200) begin             // runs past the posted buffers
        tcp_seg(f, nxt[f], (room < 0 ? 0 : room) + $urandom_range(1, 300));
      end else if (r < 91) begin                            // unknown flow
        automatic tuple_t t = tup[f]; t.src_port = 16'd9;
        begin bytes_t pay, fr; info_t in;
          pay.delete();
          for (int i = 0; i < 100; i++) pay.push_back(8'(i));
          fr = frame(t, 5, pay, 0, 0, 8'h10);
          in = '{f: 0, hit: 0, ok: 1, udp: 0, seq: 5, len: 100, hlen: 54, id: 0};
          send(fr, in);
        end
      end else if (r < 94) begin                            // not IPv4
        bytes_t fr; info_t in;
        fr.delete();
        for (int i = 0; i < 90; i++) fr.push_back((i < 12) ? 8'($urandom) : 8'h00);
        fr[12] = 8'h86; fr[13] = 8'hdd;
        in = '{f: 0, hit: 0, ok: 0, udp: 0, seq: 0, len: 0, hlen: 0, id: 0};
        send(fr, in);
      end else begin                                        // ACK update only
        ctl(CMD_ACK, f, '0, nxt[f]);
      end
    end

    // let everything drain
    wait (sent.size() == 0 && postq_ms.size() == 0);
    repeat (300) tick();
    chk(exp_e.size() == 0, $sformatf("%0d entries never emitted", exp_e.size()));
    chk(u_dut.state_q == 0, "engine idle");
    begin
      automatic int bad = 0;
      foreach (exp_mem[a]) begin
        checks++;
        if (!u_mem.mem.exists(a) || u_mem.mem[a] != exp_mem[a]) begin
          bad++;
          if (bad < 5) $display("FAIL: mem[%h] exists=%b got %h exp %h", a, u_mem.mem.exists(a), u_mem.mem[a], exp_mem[a]);
        end
      end
      failures += bad;
      chk(exp_mem.size() > 100000, $sformatf("bytes placed %0d", exp_mem.size()));
    end
    // removing every flow returns every MS entry
    for (int f = 0; f < NF; f++) begin ctl(CMD_DEL_FLOW, f, '0, 0); flow_on[f] = 0; end
    repeat (50) tick();
    chk(free_entries == C_W'(POOL), $sformatf("free entries %0d after removal", free_entries));
    tcp_seg(1, nxt[1], 10);
    wait (sent.size() == 0);
    repeat (50) tick();
    chk(exp_e.size() == 0, "entry after removal");

    $display("actions: accept=%0d drop=%0d trim=%0d ahead=%0d defer=%0d walk=%0d miss=%0d refused=%0d err=%0d ack=%0d",
             n_act[0], n_act[1], n_act[2], n_act[3], n_act[4], n_walk, n_miss, n_refused, n_err, n_ack);
    for (int i = 0; i < 5; i++) chk(n_act[i] > 5, $sformatf("action %0d seen %0d times", i, n_act[i]));
    chk(n_walk > 0, "MS walk"); chk(n_miss > 5, "IOMMU misses"); chk(n_refused > 0, "posting refused");
    chk(n_err > 0, "bad MR flagged"); chk(n_ack > 0, "ACK updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
