// tb_zn_ms_list: self-checking test of the per-flow MS Lists.
// A reference model keeps each flow's MSs in a queue with its base sequence
// number. Random APPEND (including refusals under the committed/peak rule),
// SEEK to random positions (walks of many MSs), NEXT, RETIRE up to random
// cursors, FLUSH and RESET are applied to both and every response and status
// output is compared. Small sizes keep the pool under pressure.
module tb_zn_ms_list;
  import zn_pkg::*;
  localparam int FLOWS = 4, POOL = 64, COMMIT = 4, PEAK = 32;
  localparam int E_W = 6, C_W = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, refused = 0, walked = 0, retired = 0;

  logic cmd_valid = 0, cmd_ready, rsp_valid, rsp_ok;
  logic [2:0] cmd_op = 0;
  logic [1:0] cmd_fid = 0, st_fid = 0;
  seq_t cmd_pos = 0, rsp_ms_start, st_base, st_end;
  ms_t cmd_ms = '0, rsp_ms;
  logic [E_W-1:0] cmd_entry = 0, rsp_entry;
  logic [MSLEN_W-1:0] rsp_within;
  logic [C_W-1:0] st_count, free_entries;

  zn_ms_list #(.FLOWS(FLOWS), .POOL(POOL), .COMMIT(COMMIT), .PEAK(PEAK)) dut (.*);

  ms_t  q [FLOWS][$];
  seq_t base [FLOWS];
  int   used;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(input logic [2:0] op, input int f, input seq_t pos, input ms_t ms,
                       input logic [E_W-1:0] ent, output int cyc);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_fid = 2'(f); cmd_pos = pos; cmd_ms = ms; cmd_entry = ent;
    @(negedge clk); cmd_valid = 0;
    cyc = 1;
    while (!rsp_valid) begin @(negedge clk); cyc++; end
  endtask

  function automatic seq_t qbytes(int f);
    seq_t s = 0;
    foreach (q[f][i]) s += SEQ_W'(q[f][i].len);
    return s;
  endfunction

  task automatic status_check();
    for (int f = 0; f < FLOWS; f++) begin
      st_fid = 2'(f); #1;
      check(st_base == base[f] && st_end == base[f] + qbytes(f) && st_count == C_W'(q[f].size()),
            $sformatf("status flow %0d base %h/%h count %0d/%0d", f, st_base, base[f], st_count, q[f].size()));
    end
    check(free_entries == C_W'(POOL - used), "free entries");
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    used = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < FLOWS; f++) begin
      base[f] = $urandom;
      issue(3'd0, f, base[f], '0, '0, cyc);
      check(rsp_ok, "reset ok");
    end
    for (int it = 0; it < 3000; it++) begin
      int f, op;
      f  = $urandom_range(0, FLOWS - 1);
      op = $urandom_range(0, 9);
      if (op <= 4) begin   // APPEND
        ms_t m; bit exp_ok; int owed;
        m.mr_id = MRID_W'($urandom); m.offset = $urandom; m.len = MSLEN_W'($urandom_range(1, 5000));
        owed = 0;
        for (int g = 0; g < FLOWS; g++) if (q[g].size() < COMMIT) owed += COMMIT - q[g].size();
        if (q[f].size() < COMMIT)    exp_ok = 1;
        else if (q[f].size() < PEAK) exp_ok = (POOL - used) > owed;
        else                         exp_ok = 0;
        issue(3'd1, f, 0, m, '0, cyc);
        check(rsp_ok == exp_ok, $sformatf("append admit %0d exp %0d (flow %0d size %0d used %0d owed %0d)",
                                          rsp_ok, exp_ok, f, q[f].size(), used, owed));
        if (exp_ok) begin q[f].push_back(m); used++; end else refused++;
      end else if (op <= 7) begin   // SEEK, then NEXT from the found MS
        seq_t tot, off, acc; int idx;
        tot = qbytes(f);
        off = seq_t'($urandom_range(0, int'(tot) + 100));
        issue(3'd2, f, base[f] + off, '0, '0, cyc);
        idx = -1; acc = 0;
        foreach (q[f][i]) if (idx < 0) begin
          if (off < acc + SEQ_W'(q[f][i].len)) idx = i; else acc += SEQ_W'(q[f][i].len);
        end
        check(rsp_ok == (idx >= 0), $sformatf("seek found %0d exp %0d", rsp_ok, idx >= 0));
        if (idx >= 0 && rsp_ok) begin
          logic [E_W-1:0] e; seq_t st;
          check(rsp_ms == q[f][idx] && rsp_ms_start == base[f] + acc &&
                rsp_within == MSLEN_W'(off - acc), $sformatf("seek result idx %0d", idx));
          // the walk costs one clock per MS passed
          check(cyc == idx + 2, $sformatf("seek latency %0d for index %0d", cyc, idx));
          if (idx > 0) walked++;
          e = rsp_entry; st = rsp_ms_start;
          issue(3'd3, f, st, '0, e, cyc);
          check(rsp_ok == (idx + 1 < q[f].size()), "next exists");
          if (idx + 1 < q[f].size())
            check(rsp_ms == q[f][idx + 1] && rsp_ms_start == st + SEQ_W'(q[f][idx].len), "next MS");
        end
      end else if (op == 8) begin   // RETIRE to a cursor inside the posted space
        seq_t c;
        c = base[f] + seq_t'($urandom_range(0, int'(qbytes(f))));
        issue(3'd4, f, c, '0, '0, cyc);
        while (q[f].size() > 0 && seq_le(base[f] + SEQ_W'(q[f][0].len), c)) begin
          base[f] += SEQ_W'(q[f][0].len); void'(q[f].pop_front()); used--; retired++;
        end
      end else if ($urandom_range(0, 9) == 0) begin   // FLUSH and RESET
        issue(3'd5, f, 0, '0, '0, cyc);
        foreach (q[f][i]) base[f] += SEQ_W'(q[f][i].len);
        used -= q[f].size(); q[f].delete();
        base[f] = $urandom;
        issue(3'd0, f, base[f], '0, '0, cyc);
      end
      status_check();
    end
    check(refused > 0 && walked > 0 && retired > 0,
          $sformatf("coverage refused %0d walked %0d retired %0d", refused, walked, retired));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
