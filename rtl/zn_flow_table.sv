// zn_flow_table: content-addressable Flow Table.
//
// Each entry holds a valid bit, the flow's 5-tuple (the search key) and its
// flow cursor, the sequence number that follows the last in-order consumed
// byte. A search compares the key against all entries in parallel and returns
// the matching entry's index, which is the flow ID used to index the MS Lists
// and NIC queues. A tuple that matches nothing reports a miss (the packet then
// goes to the non-zero-copy path).
//
// The cursor only moves forward in the wrapping 32-bit sequence space. It is
// advanced from two sources in the same cycle if need be: the RX engine after
// it accepts in-order data (adv_*), and the control stack when it reports the
// latest acknowledged byte (ack_*). The larger of the candidates wins.
//
// Interface: lk_* is a combinational search; wr_* (add or remove an entry) and cursor updates take effect on the
// next clock edge. wr_* has priority over cursor updates to the same entry.
//
// From the document: CAM addressed by the 5-tuple, entry holds cursor and flow
// ID. Own choices: flow ID equals the entry index, update priority, max-merge.
module zn_flow_table
  import zn_pkg::*;
#(
  parameter int unsigned FLOWS = 8,
  localparam int unsigned FID_W = (FLOWS > 1) ? $clog2(FLOWS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // add / remove
  input  logic             wr_en,
  input  logic [FID_W-1:0] wr_fid,
  input  logic             wr_valid,
  input  tuple_t           wr_tuple,
  input  seq_t             wr_cursor,
  // search
  input  tuple_t           lk_tuple,
  output logic             lk_hit,
  output logic [FID_W-1:0] lk_fid,
  output seq_t             lk_cursor,
  // cursor advance by the RX engine
  input  logic             adv_en,
  input  logic [FID_W-1:0] adv_fid,
  input  seq_t             adv_cursor,
  // cursor update from the control stack (latest acknowledged byte)
  input  logic             ack_en,
  input  logic [FID_W-1:0] ack_fid,
  input  seq_t             ack_cursor
);

  logic   valid_q  [FLOWS];
  tuple_t tuple_q  [FLOWS];
  seq_t   cursor_q [FLOWS];

  always_comb begin
    lk_hit    = 1'b0;
    lk_fid    = '0;
    lk_cursor = '0;
    for (int i = FLOWS - 1; i >= 0; i--) begin
      if (valid_q[i] && tuple_q[i] == lk_tuple) begin
        lk_hit    = 1'b1;
        lk_fid    = FID_W'(i);
        lk_cursor = cursor_q[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < FLOWS; i++) begin
        valid_q[i]  <= 1'b0;
        tuple_q[i]  <= '0;
        cursor_q[i] <= '0;
      end
    end else begin
      for (int i = 0; i < FLOWS; i++) begin
        if (wr_en && wr_fid == FID_W'(i)) begin
          valid_q[i]  <= wr_valid;
          tuple_q[i]  <= wr_tuple;
          cursor_q[i] <= wr_cursor;
        end else begin
          seq_t c;
          c = cursor_q[i];
          if (adv_en && adv_fid == FID_W'(i) && seq_lt(c, adv_cursor)) c = adv_cursor;
          if (ack_en && ack_fid == FID_W'(i) && seq_lt(c, ack_cursor)) c = ack_cursor;
          cursor_q[i] <= c;
        end
      end
    end
  end

endmodule
