// zn_cursor_logic: decides what happens to an arriving packet's payload.
//
// The packet covers sequence numbers [seq, seq+len). The flow cursor marks
// the first byte not yet consumed in order; posted_end marks the end of the
// buffer space described by the flow's MS List. Comparisons wrap in the
// 32-bit sequence space. The decision (cases of the flow-cursor figure):
//   no flow entry, or no payload          -> DEFER (non-zero-copy path)
//   seq+len <= cursor (all old data)       -> DROP      (b)
//   seq+len >  posted_end (no MS for it)   -> DEFER     (e)
//   seq == cursor                          -> ACCEPT    (a), cursor = seq+len
//   seq <  cursor < seq+len                -> TRIM      (c), skip cursor-seq
//                                             bytes, cursor = seq+len
//   seq >  cursor (hole before it)         -> ACCEPT_F  (d), cursor unchanged
// For an unreliable protocol (udp = 1) the payload always lands at the
// cursor, the next free byte of the posted buffers.
// Purely combinational.
//
// From the document: the five cases and their actions, cursor movement only
// for in-order data, defer as the case (e) and no-flow-entry policy. Own
// choices: payload-less packets and packets that run past the posted buffers
// are deferred whole.
module zn_cursor_logic
  import zn_pkg::*;
(
  input  logic        hit,
  input  logic        udp,
  input  seq_t        seq,
  input  logic [15:0] len,
  input  seq_t        cursor,
  input  seq_t        posted_end,
  output action_e     action,
  output seq_t        start,       // first sequence number to place
  output logic [15:0] take,        // bytes to place
  output logic [15:0] trim,        // leading payload bytes skipped
  output logic        adv,         // cursor moves to new_cursor
  output seq_t        new_cursor
);

  seq_t s, e;
  assign s = udp ? cursor : seq;
  assign e = s + SEQ_W'(len);

  always_comb begin
    action     = ACT_DEFER;
    start      = s;
    take       = '0;
    trim       = '0;
    adv        = 1'b0;
    new_cursor = cursor;
    if (!hit || len == 0) begin
      action = ACT_DEFER;
    end else if (seq_le(e, cursor)) begin
      action = ACT_DROP;
    end else if (seq_lt(posted_end, e)) begin
      action = ACT_DEFER;
    end else if (s == cursor) begin
      action     = ACT_ACCEPT;
      take       = len;
      adv        = 1'b1;
      new_cursor = e;
    end else if (seq_lt(s, cursor)) begin
      action     = ACT_TRIM;
      trim       = 16'(cursor - s);
      take       = 16'(e - cursor);
      start      = cursor;
      adv        = 1'b1;
      new_cursor = e;
    end else begin
      action = ACT_ACCEPT_F;
      take   = len;
    end
  end

endmodule
