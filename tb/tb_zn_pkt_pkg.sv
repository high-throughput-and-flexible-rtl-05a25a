// tb_zn_pkt_pkg: frame building and parsing helpers for the testbenches.
// Builds Ethernet II / IPv4 / TCP (optionally with 12 option bytes) or UDP
// frames as byte queues, with a correct IPv4 header checksum, and reads
// fields back out of them. Network byte order throughout.
package tb_zn_pkt_pkg;
  import zn_pkg::*;

  typedef byte unsigned bytes_t [$];

  function automatic void put16(ref bytes_t b, input logic [15:0] v);
    b.push_back(v[15:8]); b.push_back(v[7:0]);
  endfunction
  function automatic void put32(ref bytes_t b, input logic [31:0] v);
    put16(b, v[31:16]); put16(b, v[15:0]);
  endfunction
  function automatic logic [15:0] get16(const ref bytes_t b, input int i);
    return {b[i], b[i + 1]};
  endfunction
  function automatic logic [31:0] get32(const ref bytes_t b, input int i);
    return {b[i], b[i + 1], b[i + 2], b[i + 3]};
  endfunction

  function automatic logic [15:0] ip_csum(const ref bytes_t b, input int off, input int len);
    logic [31:0] s = 0;
    for (int i = 0; i < len; i += 2) s += {16'h0, b[off + i], b[off + i + 1]};
    s = {16'h0, s[15:0]} + {16'h0, s[31:16]};
    s = {16'h0, s[15:0]} + {16'h0, s[31:16]};
    return ~s[15:0];
  endfunction

  // Frame = Ethernet + IPv4 + (TCP [+ 12 option bytes] | UDP) + payload.
  function automatic bytes_t frame(input tuple_t t, input seq_t seq, const ref bytes_t pay,
                                   input bit topt, input logic [15:0] ipid,
                                   input logic [7:0] flags);
    bytes_t b;
    int l4len, tot, ipcs;
    l4len = (t.proto == PROTO_UDP) ? 8 : (topt ? 32 : 20);
    tot = 20 + l4len + pay.size();
    put32(b, 32'h02000000); put16(b, 16'h0001);         // dst MAC
    put32(b, 32'h02000000); put16(b, 16'h0002);         // src MAC
    put16(b, 16'h0800);
    b.push_back(8'h45); b.push_back(8'h00); put16(b, 16'(tot));
    put16(b, ipid); put16(b, 16'h4000);
    b.push_back(8'd64); b.push_back(t.proto); put16(b, 16'h0000);
    put32(b, t.src_ip); put32(b, t.dst_ip);
    ipcs = 24;
    {b[ipcs], b[ipcs + 1]} = ip_csum(b, 14, 20);
    put16(b, t.src_port); put16(b, t.dst_port);
    if (t.proto == PROTO_UDP) begin
      put16(b, 16'(8 + pay.size())); put16(b, 16'h0000);
    end else begin
      put32(b, seq); put32(b, 32'h0);
      b.push_back(topt ? 8'h80 : 8'h50); b.push_back(flags);
      put16(b, 16'hffff); put16(b, 16'h0); put16(b, 16'h0);
      if (topt) begin
        b.push_back(8'h01); b.push_back(8'h01); b.push_back(8'h08); b.push_back(8'h0a);
        put32(b, 32'h1234_5678); put32(b, 32'h9abc_def0);
      end
    end
    foreach (pay[i]) b.push_back(pay[i]);
    while (b.size() < 60) b.push_back(8'h00);            // minimum frame padding
    return b;
  endfunction

  function automatic int hdr_len(const ref bytes_t b);
    int ihl;
    byte unsigned v, d;
    v = b[14];
    ihl = 4 * int'(v[3:0]);
    d = b[14 + ihl + 12];
    return 14 + ihl + ((b[23] == PROTO_UDP) ? 8 : 4 * int'(d[7:4]));
  endfunction

endpackage
