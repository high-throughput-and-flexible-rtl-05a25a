// zn_pay_dma_wr: RX payload DMA engine (zero-copy write to application memory).
//
// The RX split unit describes where a payload goes as a list of chunks, each
// a bus address and a byte count; a chunk never crosses an MS or a page
// boundary, so it is contiguous in the target memory. The payload bytes come
// from a byte gearbox (zn_byte_fifo). Each clock the engine takes
// n = min(bytes available, bytes left in the chunk, W) bytes and issues one
// memory write of n bytes at the chunk's current address, data packed from
// byte 0. A chunk marked discard consumes its bytes without writing them
// (used when the target MR is missing). Chunks queue in a CHUNKS-deep FIFO so that the RX control can run
// ahead of the data.
//
// Interface: ch_* chunk queue (valid/ready); src_* byte source, src_pop is
// combinational; wr_* memory write (valid/ready, held until accepted).
// idle is high when no chunk is queued or in progress and no write is
// pending. Throughput: one write of up to W bytes per clock.
// From the document: a DMA engine copies payload data directly to
// application memory. The chunked, byte-packed write format is this design's.
module zn_pay_dma_wr
  import zn_pkg::*;
#(
  parameter int unsigned CHUNKS = 16,
  localparam int unsigned CW = $clog2(2 * DBYTES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ch_valid,
  output logic          ch_ready,
  input  addr_t         ch_addr,
  input  logic [15:0]   ch_len,
  input  logic          ch_discard,
  input  logic [DW-1:0] src_data,
  input  logic [CW-1:0] src_avail,
  output logic [CW-1:0] src_pop,
  output logic          wr_valid,
  input  logic          wr_ready,
  output addr_t         wr_addr,
  output logic [DW-1:0] wr_data,
  output nbytes_t       wr_n,
  output logic          idle
);

  logic        q_valid, q_ready;
  logic [80:0] q_data;
  logic        cur_disc;
  logic        cur_v;
  addr_t       cur_addr;
  logic [15:0] cur_rem;
  logic [$clog2(CHUNKS+1)-1:0] q_level;

  zn_fifo #(.WIDTH(81), .DEPTH(CHUNKS)) u_chunks (
    .clk, .rst_n,
    .in_valid(ch_valid), .in_ready(ch_ready), .in_data({ch_discard, ch_addr, ch_len}),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_data),
    .level(q_level)
  );

  assign q_ready = !cur_v;

  logic          can_issue;
  logic [15:0]   n;
  assign can_issue = cur_v && (cur_disc || !wr_valid || wr_ready) && (src_avail != 0);

  always_comb begin
    n = 16'(src_avail);
    if (n > cur_rem)        n = cur_rem;
    if (n > 16'(DBYTES))    n = 16'(DBYTES);
    src_pop = can_issue ? CW'(n) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_v    <= 1'b0;
      cur_addr <= '0;
      cur_rem  <= '0;
      cur_disc <= 1'b0;
      wr_valid <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
      wr_n     <= '0;
    end else begin
      if (wr_valid && wr_ready) wr_valid <= 1'b0;
      if (!cur_v) begin
        if (q_valid) begin
          cur_v    <= (q_data[15:0] != 0);
          cur_addr <= q_data[79:16];
          cur_rem  <= q_data[15:0];
          cur_disc <= q_data[80];
        end
      end else if (can_issue) begin
        wr_valid <= !cur_disc;
        wr_addr  <= cur_addr;
        wr_data  <= src_data & ~({DW{1'b1}} << (8 * n));
        wr_n     <= nbytes_t'(n);
        cur_addr <= cur_addr + ADDR_W'(n);
        cur_rem  <= cur_rem - n;
        if (cur_rem == n) cur_v <= 1'b0;
      end
    end
  end

  assign idle = !cur_v && !q_valid && !wr_valid;

endmodule
