// zn_fifo: synchronous first-in first-out queue with valid/ready handshakes.
//
// DEPTH entries of WIDTH bits. in_ready is low when full; out_valid is high
// when an entry is stored and out_data shows the oldest one (first-word
// fall-through). A push and a pop may happen in the same clock. level gives
// the number of stored entries. Own helper, used for request queues and
// packet buffers.
module zn_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LW = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [LW-1:0]    level
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_q, wr_q;
  logic [LW-1:0]    cnt_q;
  logic             push, pop;

  assign in_ready  = (cnt_q != LW'(DEPTH));
  assign out_valid = (cnt_q != 0);
  assign out_data  = mem[rd_q];
  assign level     = cnt_q;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= inc(wr_q);
      if (pop)  rd_q <= inc(rd_q);
      cnt_q <= cnt_q + LW'(push) - LW'(pop);
    end
  end

endmodule
