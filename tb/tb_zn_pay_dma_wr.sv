// tb_zn_pay_dma_wr: self-checking test of the RX payload DMA engine.
// A byte stream is split over random chunks (random addresses and lengths,
// some marked discard) and fed with random source availability and random
// write backpressure. A byte-addressed memory model records the writes; every
// byte must land exactly at its chunk address, discarded bytes nowhere, and
// no write may exceed 64 bytes or its chunk. A final run with no stalls
// checks the rate of one 64-byte write per clock.
module tb_zn_pay_dma_wr;
  import zn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ch_valid = 0, ch_ready, ch_discard = 0;
  addr_t ch_addr = 0;
  logic [15:0] ch_len = 0;
  logic [DW-1:0] src_data;
  logic [7:0] src_avail, src_pop;
  logic wr_valid, wr_ready = 0, idle;
  addr_t wr_addr;
  logic [DW-1:0] wr_data;
  nbytes_t wr_n;

  zn_pay_dma_wr #(.CHUNKS(4)) dut (.*);

  byte unsigned stream [$];
  byte unsigned mem [addr_t];
  int avail_cap = 64;
  bit random_stall = 1;
  int writes = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // byte source
  always_comb begin
    src_data = '0;
    for (int i = 0; i < 64; i++) if (i < stream.size()) src_data[8*i +: 8] = stream[i];
    src_avail = 8'((stream.size() < avail_cap) ? stream.size() : avail_cap);
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < int'(src_pop); i++) void'(stream.pop_front());
    avail_cap <= random_stall ? $urandom_range(0, 70) : 64;
    if (wr_valid && wr_ready) begin
      writes++;
      if (wr_n == 0 || wr_n > 64) begin failures++; $display("FAIL: write size %0d", wr_n); end
      for (int i = 0; i < int'(wr_n); i++) mem[wr_addr + 64'(i)] = wr_data[8*i +: 8];
    end
    wr_ready <= random_stall ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  task automatic run(input int nchunks, input int maxlen);
    addr_t a [$]; int l [$]; bit d [$];
    byte unsigned exp [$];
    int tot;
    mem.delete();
    tot = 0;
    for (int c = 0; c < nchunks; c++) begin
      a.push_back({32'h0000_0010, $urandom} + 64'(c) * 64'h10_0000);
      l.push_back($urandom_range(1, maxlen));
      d.push_back(random_stall && $urandom_range(0, 7) == 0);
      for (int i = 0; i < l[c]; i++) begin
        byte unsigned b;
        b = 8'($urandom);
        stream.push_back(b);
        exp.push_back(b);
      end
    end
    fork
      for (int c = 0; c < nchunks; c++) begin
        @(negedge clk);
        ch_valid = 1; ch_addr = a[c]; ch_len = 16'(l[c]); ch_discard = d[c];
        @(posedge clk); while (!ch_ready) @(posedge clk);
        @(negedge clk); ch_valid = 0;
      end
    join
    @(negedge clk);
    while (!idle || stream.size() != 0) @(negedge clk);
    tot = 0;
    for (int c = 0; c < nchunks; c++) begin
      bit ok = 1;
      for (int i = 0; i < l[c]; i++) begin
        if (d[c]) ok &= !mem.exists(a[c] + 64'(i));
        else      ok &= mem.exists(a[c] + 64'(i)) && mem[a[c] + 64'(i)] == exp[tot + i];
      end
      check(ok, $sformatf("chunk %0d (len %0d discard %0d)", c, l[c], d[c]));
      tot += l[c];
    end
    // nothing written outside the chunks
    begin
      int nin = 0;
      for (int c = 0; c < nchunks; c++) if (!d[c]) nin += l[c];
      check(mem.size() == nin, $sformatf("bytes written %0d exp %0d", mem.size(), nin));
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, w0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) run($urandom_range(1, 10), (r % 2) ? 200 : 9000);
    // rate: one chunk of 64 KiB - 1 with no stalls
    random_stall = 0;
    repeat (3) @(negedge clk);
    w0 = writes;
    t0 = $time / 10;
    run(1, 1);   // warm-up of the queues
    w0 = writes;
    t0 = $time / 10;
    begin
      for (int i = 0; i < 64 * 200; i++) stream.push_back(8'(i));
      @(negedge clk); ch_valid = 1; ch_addr = 64'h1_0000_0000; ch_len = 16'(64 * 200); ch_discard = 0;
      @(negedge clk); ch_valid = 0;
      while (!idle || stream.size() != 0) @(negedge clk);
    end
    check(writes - w0 == 200, $sformatf("writes %0d for 200 beats", writes - w0));
    check(($time / 10) - t0 <= 200 + 8, $sformatf("cycles %0d for 200 beats", ($time / 10) - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
