// tb_zn_host_mem: behavioural model of the memories behind the PCIe links
// (host DRAM and GPU memory seen through one bus address space).
// Two write ports and one read port, each with random backpressure. Writes
// carry up to 64 bytes packed from byte 0. A read request of up to 4 KiB is
// answered, in order and after a random delay, with beats of up to 64 bytes.
// Contents live in a sparse byte array that testbenches read and preload
// hierarchically (mem). Bytes never written read as zero.
module tb_zn_host_mem
  import zn_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          stall_en,
  input  logic          wa_valid,
  output logic          wa_ready,
  input  addr_t         wa_addr,
  input  logic [DW-1:0] wa_data,
  input  nbytes_t       wa_n,
  input  logic          wb_valid,
  output logic          wb_ready,
  input  addr_t         wb_addr,
  input  logic [DW-1:0] wb_data,
  input  nbytes_t       wb_n,
  input  logic          rq_valid,
  output logic          rq_ready,
  input  addr_t         rq_addr,
  input  logic [15:0]   rq_len,
  output logic          rs_valid,
  input  logic          rs_ready,
  output logic [DW-1:0] rs_data,
  output nbytes_t       rs_n
);
  byte unsigned mem [addr_t];
  addr_t rq_a [$];
  int    rq_l [$];
  int    wait_q;
  int    writes = 0;

  function automatic byte unsigned rd(addr_t a);
    return mem.exists(a) ? mem[a] : 8'h00;
  endfunction

  always_comb begin
    int n;
    rs_valid = 0; rs_data = '0; rs_n = '0;
    if (rq_a.size() != 0 && wait_q == 0) begin
      n = (rq_l[0] > 64) ? 64 : rq_l[0];
      rs_valid = 1; rs_n = nbytes_t'(n);
      for (int i = 0; i < n; i++) rs_data[8*i +: 8] = rd(rq_a[0] + 64'(i));
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      wa_ready <= 0; wb_ready <= 0; rq_ready <= 0; wait_q <= 0;
    end else begin
      if (wa_valid && wa_ready) begin
        writes++;
        for (int i = 0; i < int'(wa_n); i++) mem[wa_addr + 64'(i)] = wa_data[8*i +: 8];
      end
      if (wb_valid && wb_ready) begin
        writes++;
        for (int i = 0; i < int'(wb_n); i++) mem[wb_addr + 64'(i)] = wb_data[8*i +: 8];
      end
      if (rs_valid && rs_ready) begin
        if (rq_l[0] > 64) begin rq_a[0] += 64; rq_l[0] -= 64; end
        else begin void'(rq_a.pop_front()); void'(rq_l.pop_front());
          wait_q <= stall_en ? $urandom_range(0, 6) : 0; end
      end else if (wait_q > 0) wait_q <= wait_q - 1;
      if (rq_valid && rq_ready) begin rq_a.push_back(rq_addr); rq_l.push_back(int'(rq_len)); end
      wa_ready <= !stall_en || ($urandom_range(0, 7) != 0);
      wb_ready <= !stall_en || ($urandom_range(0, 7) != 0);
      rq_ready <= (rq_a.size() < 4) && (!stall_en || $urandom_range(0, 3) != 0);
    end
  end
endmodule
