// zn_byte_fifo: two-beat byte gearbox used by the DMA engines.
//
// Packet payloads do not start on beat boundaries (they follow a header of
// any length) and a DMA chunk can end anywhere (at an MS or page boundary).
// This buffer accepts up to W bytes per clock, packed from byte 0, and lets
// the consumer take any number of bytes, up to W, from its front each clock.
// It holds 2W bytes; a push is accepted when the bytes left after this
// clock's pop leave room for a full beat, so a steady one beat per clock
// flows through while realigning by any byte offset.
//
// Interface: out_data shows the first W stored bytes and cnt how many bytes
// are stored; the consumer drives pop (bytes to remove, <= min(cnt, W)) in the
// same clock. clr empties the buffer. Byte 0 is bits [7:0].
// Own design; the document only says that payloads are DMAed to arbitrary
// (not page-aligned) addresses.
module zn_byte_fifo #(
  parameter int unsigned W = 64,
  localparam int unsigned CW = $clog2(2 * W + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [8*W-1:0]  in_data,
  input  logic [CW-1:0]   in_n,
  output logic [8*W-1:0]  out_data,
  output logic [CW-1:0]   cnt,
  input  logic [CW-1:0]   pop
);

  logic [16*W-1:0] buf_q;
  logic [CW-1:0]   cnt_q;
  logic [CW-1:0]   left;

  assign left     = cnt_q - pop;
  assign in_ready = (left <= CW'(W));
  assign out_data = buf_q[8*W-1:0];
  assign cnt      = cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (clr) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else begin
      logic [16*W-1:0] b;
      logic [16*W-1:0] mask;
      b    = buf_q >> (8 * pop);
      mask = ~({(16*W){1'b1}} << (8 * left));
      b    = b & mask;
      if (in_valid && in_ready) begin
        b = b | ({{(8*W){1'b0}}, in_data} << (8 * left));
        cnt_q <= left + in_n;
      end else begin
        cnt_q <= left;
      end
      buf_q <= b;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (pop <= cnt_q && pop <= CW'(W))
        else $error("zn_byte_fifo: pop of %0d with %0d stored", pop, cnt_q);
    end
  end

endmodule
