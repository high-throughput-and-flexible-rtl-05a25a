// zn_hdr_dma: RX header-entry DMA engine into a NIC queue ring.
//
// Every packet the RX split unit hands to the control path becomes one RX
// header entry: a metadata beat followed by the header bytes (or, for a
// deferred packet, the whole frame). The control stack keeps the queue as a
// ring of 2**ring_log2 slots of 2**slot_log2 bytes in its own memory, set at
// run time. The engine writes entry beats one after another into the slot at
// the producer index and advances the index after the entry's last beat.
// Before starting an entry it waits until the ring has a free slot, judged
// from the consumer index the control stack reports. Bytes that do not fit
// in the slot are not written and the entry is marked by `trunc`.
//
// Interface: e_* entry beats (valid/ready, bytes per beat packed from byte 0,
// last marks the end of an entry); wr_* memory writes (valid/ready);
// prod_idx is the producer index (free-running, 32 bits).
// One beat per clock while the ring has room.
// From the document: header entries forwarded to the control path address
// space by a DMA engine; NIC queues are rings of user-configurable entry
// size. Own choices: index scheme, full rule, truncation.
module zn_hdr_dma
  import zn_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  addr_t         ring_base,
  input  logic [4:0]    ring_log2,
  input  logic [4:0]    slot_log2,
  input  logic [31:0]   cons_idx,
  output logic [31:0]   prod_idx,
  input  logic          e_valid,
  output logic          e_ready,
  input  logic [DW-1:0] e_data,
  input  nbytes_t       e_n,
  input  logic          e_last,
  output logic          wr_valid,
  input  logic          wr_ready,
  output addr_t         wr_addr,
  output logic [DW-1:0] wr_data,
  output nbytes_t       wr_n,
  output logic          trunc
);

  logic        in_entry_q;
  logic [31:0] off_q;
  logic        ring_full;
  logic        out_free;
  logic [31:0] slot_bytes, ring_size, slot_idx;

  assign slot_bytes = 32'd1 << slot_log2;
  assign ring_size  = 32'd1 << ring_log2;
  assign slot_idx   = prod_idx & (ring_size - 1);
  assign ring_full  = (prod_idx - cons_idx) >= ring_size;
  assign out_free   = !wr_valid || wr_ready;
  assign e_ready    = out_free && (in_entry_q || !ring_full);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_entry_q <= 1'b0;
      off_q      <= '0;
      prod_idx   <= '0;
      wr_valid   <= 1'b0;
      wr_addr    <= '0;
      wr_data    <= '0;
      wr_n       <= '0;
      trunc      <= 1'b0;
    end else begin
      if (wr_valid && wr_ready) wr_valid <= 1'b0;
      if (e_valid && e_ready) begin
        logic [31:0] room;
        logic [31:0] n;
        room = (off_q < slot_bytes) ? slot_bytes - off_q : 32'd0;
        n    = (32'(e_n) < room) ? 32'(e_n) : room;
        trunc <= (n != 32'(e_n));
        if (n != 0) begin
          wr_valid <= 1'b1;
          wr_addr  <= ring_base + (ADDR_W'(slot_idx) << slot_log2) + ADDR_W'(off_q);
          wr_data  <= e_data & ~({DW{1'b1}} << (8 * n));
          wr_n     <= nbytes_t'(n);
        end
        if (e_last) begin
          in_entry_q <= 1'b0;
          off_q      <= '0;
          prod_idx   <= prod_idx + 1'b1;
        end else begin
          in_entry_q <= 1'b1;
          off_q      <= off_q + 32'(e_n);
        end
      end
    end
  end

endmodule
