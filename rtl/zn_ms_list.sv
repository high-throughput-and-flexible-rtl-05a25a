// zn_ms_list: per-flow Memory Segment (MS) Lists in a shared backing store.
//
// Each zero-copy flow owns a linked list of MSs, the application buffers of
// its pending receive requests in posting order. An MS is (MR ID, offset in
// the MR, length). For every flow the block also keeps the stream position
// (TCP sequence number) of the first byte of its head MS, `base`, and the sum
// of the lengths in the list, so base + bytes is the end of the posted buffer
// space. A byte at sequence number s lands in the MS found by walking the
// list from the head and accumulating lengths until s - base falls inside one.
//
// Entries come from one pool of POOL entries. Every flow is guaranteed COMMIT
// entries (committed rate); above that a flow may grow to PEAK entries as long
// as the free pool stays larger than what the other flows are still owed
// (peak rate). An append that is not admitted is refused (rsp_ok = 0) and the
// request must be kept and retried by the caller. Freed entries are chained on
// a free list through their next pointers; entries never used yet are handed
// out from a watermark, so reset takes one clock whatever POOL is.
//
// Commands (cmd_valid && cmd_ready, one at a time; rsp_valid pulses when done):
//   OP_RESET  flow, pos  : empty the list bookkeeping, base = pos (list must be empty)
//   OP_APPEND flow, ms   : add an MS at the tail                  (1 clock)
//   OP_SEEK   flow, pos  : find the MS holding byte pos          (1 clock per MS walked)
//   OP_NEXT   flow, entry: the MS after `entry`                   (1 clock)
//   OP_RETIRE flow, pos  : free head MSs that end at or before pos (1 clock per MS)
//   OP_FLUSH  flow       : free the whole list                    (1 clock per MS)
// A SEEK/NEXT response gives the entry index, the MS, the MS's start sequence
// number and, for SEEK, the offset of pos inside the MS. rsp_ok = 0 means no
// MS holds pos (SEEK), there is no next MS (NEXT) or the append was refused.
//
// From the document: per-flow linked lists indexed by flow ID, walking with
// accumulated lengths, retiring MSs only when the cursor passes them, 8-byte
// MS records, 128 committed and 8K peak entries per list, a 1M-entry backing
// store. Own choices: command set, free-list scheme and the admission rule.
module zn_ms_list
  import zn_pkg::*;
#(
  parameter int unsigned FLOWS  = 8,
  parameter int unsigned POOL   = 1048576,
  parameter int unsigned COMMIT = 128,
  parameter int unsigned PEAK   = 8192,
  localparam int unsigned FID_W = (FLOWS > 1) ? $clog2(FLOWS) : 1,
  localparam int unsigned E_W   = $clog2(POOL),
  localparam int unsigned C_W   = $clog2(POOL + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  logic [2:0]       cmd_op,
  input  logic [FID_W-1:0] cmd_fid,
  input  seq_t             cmd_pos,
  input  ms_t              cmd_ms,
  input  logic [E_W-1:0]   cmd_entry,
  output logic             rsp_valid,
  output logic             rsp_ok,
  output logic [E_W-1:0]   rsp_entry,
  output ms_t              rsp_ms,
  output seq_t             rsp_ms_start,
  output logic [MSLEN_W-1:0] rsp_within,
  // status of one flow, combinational
  input  logic [FID_W-1:0] st_fid,
  output seq_t             st_base,
  output seq_t             st_end,
  output logic [C_W-1:0]   st_count,
  output logic [C_W-1:0]   free_entries
);

  localparam logic [2:0] OP_RESET = 3'd0, OP_APPEND = 3'd1, OP_SEEK = 3'd2,
                         OP_NEXT = 3'd3, OP_RETIRE = 3'd4, OP_FLUSH = 3'd5;

  // Backing store
  ms_t            ms_mem  [POOL];
  logic [E_W-1:0] nxt_mem [POOL];

  // Per-flow list heads
  logic [E_W-1:0] head_q  [FLOWS];
  logic [E_W-1:0] tail_q  [FLOWS];
  logic [C_W-1:0] count_q [FLOWS];
  seq_t           base_q  [FLOWS];
  seq_t           bytes_q [FLOWS];

  // Free space
  logic [E_W-1:0] free_head_q;
  logic [C_W-1:0] free_cnt_q;   // entries on the free list
  logic [C_W-1:0] wm_q;         // entries never handed out
  logic [C_W-1:0] used_q;
  logic [C_W-1:0] owed_q;       // committed entries not yet used, all flows

  typedef enum logic [1:0] {S_IDLE, S_WALK, S_RETIRE, S_FLUSH} state_e;
  state_e state_q;

  logic [FID_W-1:0] fid_q;
  seq_t             pos_q;      // SEEK: offset from base; RETIRE: cursor
  seq_t             acc_q;      // accumulated length before entry e_q
  logic [E_W-1:0]   e_q;
  logic [C_W-1:0]   left_q;     // MSs not yet visited

  assign cmd_ready    = (state_q == S_IDLE);
  assign st_base      = base_q[st_fid];
  assign st_end       = base_q[st_fid] + bytes_q[st_fid];
  assign st_count     = count_q[st_fid];
  assign free_entries = C_W'(POOL) - used_q;

  // Admission (committed / peak)
  logic admit;
  always_comb begin
    logic [C_W-1:0] cnt;
    cnt = count_q[cmd_fid];
    if (cnt < C_W'(COMMIT))      admit = 1'b1;
    else if (cnt < C_W'(PEAK))   admit = (free_entries > owed_q);
    else                         admit = 1'b0;
  end

  logic [E_W-1:0] alloc_e;
  assign alloc_e = (free_cnt_q != 0) ? free_head_q : E_W'(wm_q);

  // Head MS of the flow being retired / flushed
  logic [E_W-1:0] h_e;
  ms_t            h_ms;
  assign h_e  = head_q[fid_q];
  assign h_ms = ms_mem[h_e];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      free_head_q  <= '0;
      free_cnt_q   <= '0;
      wm_q         <= '0;
      used_q       <= '0;
      owed_q       <= C_W'(FLOWS * COMMIT);
      fid_q        <= '0;
      pos_q        <= '0;
      acc_q        <= '0;
      e_q          <= '0;
      left_q       <= '0;
      rsp_valid    <= 1'b0;
      rsp_ok       <= 1'b0;
      rsp_entry    <= '0;
      rsp_ms       <= '0;
      rsp_ms_start <= '0;
      rsp_within   <= '0;
      for (int f = 0; f < FLOWS; f++) begin
        head_q[f]  <= '0;
        tail_q[f]  <= '0;
        count_q[f] <= '0;
        base_q[f]  <= '0;
        bytes_q[f] <= '0;
      end
    end else begin
      rsp_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (cmd_valid) begin
          fid_q <= cmd_fid;
          unique case (cmd_op)
            OP_RESET: begin
              base_q[cmd_fid]  <= cmd_pos;
              bytes_q[cmd_fid] <= '0;
              rsp_valid <= 1'b1;
              rsp_ok    <= (count_q[cmd_fid] == 0);
            end
            OP_APPEND: begin
              rsp_valid <= 1'b1;
              rsp_ok    <= admit;
              if (admit) begin
                ms_mem[alloc_e] <= cmd_ms;
                if (count_q[cmd_fid] == 0) head_q[cmd_fid] <= alloc_e;
                else                       nxt_mem[tail_q[cmd_fid]] <= alloc_e;
                tail_q[cmd_fid]  <= alloc_e;
                count_q[cmd_fid] <= count_q[cmd_fid] + 1'b1;
                bytes_q[cmd_fid] <= bytes_q[cmd_fid] + SEQ_W'(cmd_ms.len);
                used_q <= used_q + 1'b1;
                if (count_q[cmd_fid] < C_W'(COMMIT)) owed_q <= owed_q - 1'b1;
                if (free_cnt_q != 0) begin
                  free_head_q <= nxt_mem[free_head_q];
                  free_cnt_q  <= free_cnt_q - 1'b1;
                end else begin
                  wm_q <= wm_q + 1'b1;
                end
                rsp_entry <= alloc_e;
              end
            end
            OP_SEEK: begin
              pos_q  <= cmd_pos - base_q[cmd_fid];
              acc_q  <= '0;
              e_q    <= head_q[cmd_fid];
              left_q <= count_q[cmd_fid];
              state_q <= S_WALK;
            end
            OP_NEXT: begin
              rsp_valid    <= 1'b1;
              rsp_ok       <= (cmd_entry != tail_q[cmd_fid]) && (count_q[cmd_fid] != 0);
              rsp_entry    <= nxt_mem[cmd_entry];
              rsp_ms       <= ms_mem[nxt_mem[cmd_entry]];
              rsp_ms_start <= cmd_pos + SEQ_W'(ms_mem[cmd_entry].len);
              rsp_within   <= '0;
            end
            OP_RETIRE: begin
              pos_q   <= cmd_pos;
              state_q <= S_RETIRE;
            end
            OP_FLUSH: state_q <= S_FLUSH;
            default: begin
              rsp_valid <= 1'b1;
              rsp_ok    <= 1'b0;
            end
          endcase
        end

        // One MS per clock: does the target offset fall inside MS e_q?
        S_WALK: begin
          if (left_q == 0) begin
            rsp_valid <= 1'b1;
            rsp_ok    <= 1'b0;
            state_q   <= S_IDLE;
          end else if (pos_q < acc_q + SEQ_W'(ms_mem[e_q].len)) begin
            rsp_valid    <= 1'b1;
            rsp_ok       <= 1'b1;
            rsp_entry    <= e_q;
            rsp_ms       <= ms_mem[e_q];
            rsp_ms_start <= base_q[fid_q] + acc_q;
            rsp_within   <= MSLEN_W'(pos_q - acc_q);
            state_q      <= S_IDLE;
          end else begin
            acc_q  <= acc_q + SEQ_W'(ms_mem[e_q].len);
            e_q    <= nxt_mem[e_q];
            left_q <= left_q - 1'b1;
          end
        end

        // Free head MSs whose last byte lies before the cursor.
        S_RETIRE, S_FLUSH: begin
          if (count_q[fid_q] != 0 &&
              (state_q == S_FLUSH ||
               seq_le(base_q[fid_q] + SEQ_W'(h_ms.len), pos_q))) begin
            base_q[fid_q]  <= base_q[fid_q] + SEQ_W'(h_ms.len);
            bytes_q[fid_q] <= bytes_q[fid_q] - SEQ_W'(h_ms.len);
            head_q[fid_q]  <= nxt_mem[h_e];
            count_q[fid_q] <= count_q[fid_q] - 1'b1;
            nxt_mem[h_e]   <= free_head_q;
            free_head_q    <= h_e;
            free_cnt_q     <= free_cnt_q + 1'b1;
            used_q         <= used_q - 1'b1;
            if (count_q[fid_q] <= C_W'(COMMIT)) owed_q <= owed_q + 1'b1;
          end else begin
            rsp_valid <= 1'b1;
            rsp_ok    <= 1'b1;
            state_q   <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The pool must be able to honour every flow's committed entries.
  initial assert (FLOWS * COMMIT <= POOL && COMMIT <= PEAK)
    else $error("zn_ms_list: FLOWS*COMMIT must fit in POOL");

endmodule
