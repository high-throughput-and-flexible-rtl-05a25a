// tb_zn_iommu: self-checking test of the IOMMU translation cache.
// Fills page translations, checks hits (page offset kept, page number
// replaced) and misses on both ports, round-robin replacement once the cache
// is full, and invalidation.
module tb_zn_iommu;
  import zn_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic inval = 0, fill_en = 0;
  addr_t fill_vaddr = 0, fill_paddr = 0, a_vaddr = 0, b_vaddr = 0, a_paddr, b_paddr;
  logic a_hit, b_hit;

  zn_iommu #(.ENTRIES(N)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic addr_t vpg(int i); return 64'h7f00_0000_0000 + (64'(i) << PAGE_BITS); endfunction
  function automatic addr_t ppg(int i); return 64'h0000_00a0_0000_0000 + (64'(i * 7 + 3) << PAGE_BITS); endfunction

  task automatic fill(int i);
    @(negedge clk); fill_en = 1; fill_vaddr = vpg(i) + 64'h123; fill_paddr = ppg(i) + 64'h456;
    @(negedge clk); fill_en = 0;
  endtask

  task automatic expect_hit(int i, bit h);
    addr_t off;
    off = 64'($urandom_range(0, 4095));
    a_vaddr = vpg(i) + off; b_vaddr = vpg(i) + (off ^ 64'hfff); #1;
    check(a_hit == h && b_hit == h, $sformatf("page %0d hit=%0d exp %0d", i, a_hit, h));
    if (h) begin
      check(a_paddr == ppg(i) + off, $sformatf("page %0d a_paddr %h", i, a_paddr));
      check(b_paddr == ppg(i) + (off ^ 64'hfff), $sformatf("page %0d b_paddr %h", i, b_paddr));
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 12; i++) expect_hit(i, 0);
    for (int i = 0; i < N; i++) fill(i);
    for (int i = 0; i < N; i++) expect_hit(i, 1);
    expect_hit(N, 0);
    // the next fills replace the oldest entries in order
    fill(N); fill(N + 1);
    expect_hit(0, 0); expect_hit(1, 0); expect_hit(2, 1);
    expect_hit(N, 1); expect_hit(N + 1, 1);
    @(negedge clk); inval = 1; @(negedge clk); inval = 0;
    for (int i = 0; i < N + 2; i++) expect_hit(i, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
