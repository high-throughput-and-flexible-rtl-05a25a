// tb_zn_hdr_dma: self-checking test of the header-entry DMA engine.
// Random entries (1..6 beats of random byte counts, some longer than a slot)
// are written into a ring of 8 slots of 256 bytes while a slow consumer reads
// slots in order and checks each one against the entry it expects, then
// hands it back. A slot overwritten before it is consumed, a lost or
// reordered entry, or a missing truncation shows up as a mismatch.
module tb_zn_hdr_dma;
  import zn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, full_stalls = 0, truncs = 0;

  addr_t ring_base = 64'h0000_0040_0000_0000;
  logic [4:0] ring_log2 = 3, slot_log2 = 8;
  logic [31:0] cons_idx = 0, prod_idx;
  logic e_valid = 0, e_ready, e_last = 0;
  logic [DW-1:0] e_data = '0;
  nbytes_t e_n = 0;
  logic wr_valid, wr_ready = 0, trunc;
  addr_t wr_addr;
  logic [DW-1:0] wr_data;
  nbytes_t wr_n;

  zn_hdr_dma dut (.*);

  byte unsigned mem [addr_t];
  byte unsigned ent [$][$];
  localparam int NENT = 300;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (wr_valid && wr_ready)
      for (int i = 0; i < int'(wr_n); i++) mem[wr_addr + 64'(i)] = wr_data[8*i +: 8];
    wr_ready <= ($urandom_range(0, 3) != 0);
    if (e_valid && !e_ready && (prod_idx - cons_idx) >= 8) full_stalls++;
    if (trunc) truncs++;
  end

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // producer
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < NENT; k++) begin
      int nb;
      byte unsigned e [$];
      e.delete();
      nb = $urandom_range(1, (k % 10 == 0) ? 6 : 3);
      for (int b = 0; b < nb; b++) begin
        int n;
        n = (b == nb - 1) ? $urandom_range(1, 64) : 64;
        @(negedge clk);
        e_valid = 1; e_n = nbytes_t'(n); e_last = (b == nb - 1);
        for (int i = 0; i < 64; i++) e_data[8*i +: 8] = 8'($urandom);
        for (int i = 0; i < n; i++) e.push_back(e_data[8*i +: 8]);
        @(posedge clk); while (!e_ready) @(posedge clk);
      end
      ent.push_back(e);
      @(negedge clk); e_valid = 0;
    end
  end

  // consumer
  initial begin
    @(posedge rst_n);
    for (int k = 0; k < NENT; k++) begin
      addr_t s;
      bit ok;
      int len;
      while (prod_idx == cons_idx || ent.size() <= k) @(negedge clk);
      repeat ($urandom_range(0, 40)) @(negedge clk);
      repeat (4) @(negedge clk);   // let the last write land
      s = ring_base + 64'((k % 8) * 256);
      len = (ent[k].size() < 256) ? ent[k].size() : 256;
      ok = 1;
      for (int i = 0; i < len; i++) ok &= mem.exists(s + 64'(i)) && mem[s + 64'(i)] == ent[k][i];
      check(ok, $sformatf("entry %0d (%0d bytes) in slot %0d", k, ent[k].size(), k % 8));
      cons_idx = cons_idx + 1;
    end
    repeat (10) @(negedge clk);
    check(prod_idx == NENT, "producer index");
    check(full_stalls > 0, "ring-full stall exercised");
    check(truncs > 0, "truncation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
