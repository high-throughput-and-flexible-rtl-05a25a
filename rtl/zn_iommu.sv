// zn_iommu: translation cache for MR virtual addresses.
//
// MR addresses are application virtual addresses. Before a DMA the NIC
// translates them, one 4 KiB page at a time, to bus (PCIe) addresses. This
// block caches ENTRIES page translations in a fully associative table with
// two combinational lookup ports (RX and TX). A lookup that misses raises
// *_miss; the requester then waits while the host walks its page tables and
// installs the translation through fill_* (one per clock). Replacement is
// round robin. inval clears the whole cache (after an MR is deregistered).
//
// From the document: an IOMMU in the NIC translates virtual MR addresses and
// caches translations. Own choices: page size, size, associativity,
// replacement, and a host-filled miss path (the document does not say how
// misses are served).
module zn_iommu
  import zn_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  inval,
  input  logic  fill_en,
  input  addr_t fill_vaddr,   // any address inside the page
  input  addr_t fill_paddr,   // bus address of the same page
  input  addr_t a_vaddr,
  output logic  a_hit,
  output addr_t a_paddr,
  input  addr_t b_vaddr,
  output logic  b_hit,
  output addr_t b_paddr
);

  localparam int unsigned VPN_W = ADDR_W - PAGE_BITS;
  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic             valid_q [ENTRIES];
  logic [VPN_W-1:0] vpn_q   [ENTRIES];
  logic [VPN_W-1:0] ppn_q   [ENTRIES];
  logic [IDX_W-1:0] victim_q;

  always_comb begin
    a_hit = 1'b0; a_paddr = '0;
    b_hit = 1'b0; b_paddr = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && vpn_q[i] == a_vaddr[ADDR_W-1:PAGE_BITS]) begin
        a_hit = 1'b1; a_paddr = {ppn_q[i], a_vaddr[PAGE_BITS-1:0]};
      end
      if (valid_q[i] && vpn_q[i] == b_vaddr[ADDR_W-1:PAGE_BITS]) begin
        b_hit = 1'b1; b_paddr = {ppn_q[i], b_vaddr[PAGE_BITS-1:0]};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      victim_q <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        valid_q[i] <= 1'b0;
        vpn_q[i]   <= '0;
        ppn_q[i]   <= '0;
      end
    end else if (inval) begin
      for (int i = 0; i < ENTRIES; i++) valid_q[i] <= 1'b0;
    end else if (fill_en) begin
      valid_q[victim_q] <= 1'b1;
      vpn_q[victim_q]   <= fill_vaddr[ADDR_W-1:PAGE_BITS];
      ppn_q[victim_q]   <= fill_paddr[ADDR_W-1:PAGE_BITS];
      victim_q <= (victim_q == IDX_W'(ENTRIES - 1)) ? '0 : victim_q + 1'b1;
    end
  end

endmodule
