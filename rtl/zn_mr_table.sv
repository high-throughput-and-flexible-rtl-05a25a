// zn_mr_table: content-addressable Memory Region table.
//
// An MR is a contiguous range of an application's virtual address space that
// has been registered with the NIC. Each entry holds a valid bit, the MR ID
// (the search key), the MR's start address and its length in bytes. Two
// independent combinational search ports serve the RX split unit and the TX
// merge unit. A search reports a miss when no valid entry has the MR ID.
//
// Registration and deregistration write one entry per clock (wr_*), addressed
// by entry slot; the host chooses the slot.
//
// From the document: MR Table entry = MR addr + MR len, looked up with the
// MS's MR ID, implemented as a CAM. Own choices: number of entries, two ports,
// slot-addressed writes.
module zn_mr_table
  import zn_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  localparam int unsigned SLOT_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [SLOT_W-1:0] wr_slot,
  input  logic              wr_valid,
  input  logic [MRID_W-1:0] wr_mr_id,
  input  addr_t             wr_addr,
  input  addr_t             wr_len,
  input  logic [MRID_W-1:0] a_mr_id,
  output logic              a_hit,
  output addr_t             a_addr,
  output addr_t             a_len,
  input  logic [MRID_W-1:0] b_mr_id,
  output logic              b_hit,
  output addr_t             b_addr,
  output addr_t             b_len
);

  logic              valid_q [ENTRIES];
  logic [MRID_W-1:0] id_q    [ENTRIES];
  addr_t             addr_q  [ENTRIES];
  addr_t             len_q   [ENTRIES];

  always_comb begin
    a_hit = 1'b0; a_addr = '0; a_len = '0;
    b_hit = 1'b0; b_addr = '0; b_len = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid_q[i] && id_q[i] == a_mr_id) begin
        a_hit = 1'b1; a_addr = addr_q[i]; a_len = len_q[i];
      end
      if (valid_q[i] && id_q[i] == b_mr_id) begin
        b_hit = 1'b1; b_addr = addr_q[i]; b_len = len_q[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        valid_q[i] <= 1'b0;
        id_q[i]    <= '0;
        addr_q[i]  <= '0;
        len_q[i]   <= '0;
      end
    end else if (wr_en) begin
      valid_q[wr_slot] <= wr_valid;
      id_q[wr_slot]    <= wr_mr_id;
      addr_q[wr_slot]  <= wr_addr;
      len_q[wr_slot]   <= wr_len;
    end
  end

endmodule
