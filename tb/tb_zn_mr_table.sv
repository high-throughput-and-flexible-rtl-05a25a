// tb_zn_mr_table: self-checking test of the MR Table CAM.
// Registers MRs in random slots, searches both ports with registered and
// unregistered MR IDs, deregisters some, and compares with a model.
module tb_zn_mr_table;
  import zn_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0, wr_valid = 0;
  logic [3:0] wr_slot = 0;
  logic [MRID_W-1:0] wr_mr_id = 0, a_mr_id = 0, b_mr_id = 0;
  addr_t wr_addr = 0, wr_len = 0, a_addr, a_len, b_addr, b_len;
  logic a_hit, b_hit;

  zn_mr_table #(.ENTRIES(N)) dut (.*);

  logic              m_v  [N];
  logic [MRID_W-1:0] m_id [N];
  addr_t             m_a  [N], m_l [N];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model search: first valid slot with the ID (IDs are kept unique)
  task automatic probe(input logic [MRID_W-1:0] id, input bit port_b);
    bit h; addr_t ea, el;
    h = 0; ea = 0; el = 0;
    for (int i = 0; i < N; i++) if (m_v[i] && m_id[i] == id) begin h = 1; ea = m_a[i]; el = m_l[i]; end
    if (port_b) begin b_mr_id = id; #1;
      check(b_hit == h && (!h || (b_addr == ea && b_len == el)), $sformatf("port b id %0d", id));
    end else begin a_mr_id = id; #1;
      check(a_hit == h && (!h || (a_addr == ea && a_len == el)), $sformatf("port a id %0d", id));
    end
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin m_v[i] = 0; m_id[i] = 0; m_a[i] = 0; m_l[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int s;
      s = $urandom_range(0, N - 1);
      @(negedge clk);
      wr_en = 1; wr_slot = 4'(s);
      // MR ID i lives only in slot i or is absent, so IDs stay unique
      wr_mr_id = MRID_W'(s + 16 * $urandom_range(0, 1));
      for (int i = 0; i < N; i++) if (i != s && m_v[i] && m_id[i] == wr_mr_id) wr_mr_id = MRID_W'(s + 32);
      wr_valid = ($urandom_range(0, 3) != 0);
      wr_addr = {$urandom, $urandom}; wr_len = 64'($urandom);
      m_v[s] = wr_valid; m_id[s] = wr_mr_id; m_a[s] = wr_addr; m_l[s] = wr_len;
      @(negedge clk); wr_en = 0;
      probe(MRID_W'($urandom_range(0, 47)), 0);
      probe(MRID_W'($urandom_range(0, 47)), 1);
      probe(m_id[s], it % 2 == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
