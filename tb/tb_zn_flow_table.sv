// tb_zn_flow_table: self-checking test of the Flow Table CAM.
// Adds flows, searches them by 5-tuple, moves cursors from both update
// sources (including sequence wrap-around and stale updates that must be
// ignored), removes a flow, and checks every result against a model kept in
// the testbench.
module tb_zn_flow_table;
  import zn_pkg::*;
  localparam int FLOWS = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0, wr_valid = 0, adv_en = 0, ack_en = 0;
  logic [2:0] wr_fid = 0, adv_fid = 0, ack_fid = 0, lk_fid;
  tuple_t wr_tuple = '0, lk_tuple = '0;
  seq_t wr_cursor = 0, adv_cursor = 0, ack_cursor = 0, lk_cursor;
  logic lk_hit;

  zn_flow_table #(.FLOWS(FLOWS)) dut (.*);

  tuple_t tup [FLOWS];
  seq_t   cur [FLOWS];
  logic   val [FLOWS];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic add(input int f, input tuple_t t, input seq_t c, input bit v);
    @(negedge clk); wr_en = 1; wr_fid = 3'(f); wr_tuple = t; wr_cursor = c; wr_valid = v;
    @(negedge clk); wr_en = 0;
    tup[f] = t; cur[f] = c; val[f] = v;
  endtask

  task automatic look_all();
    for (int f = 0; f < FLOWS; f++) begin
      lk_tuple = tup[f]; #1;
      check(lk_hit == val[f], $sformatf("hit flow %0d", f));
      if (val[f]) begin
        check(lk_fid == 3'(f), $sformatf("fid flow %0d got %0d", f, lk_fid));
        check(lk_cursor == cur[f], $sformatf("cursor flow %0d got %h exp %h", f, lk_cursor, cur[f]));
      end
    end
  endtask

  function automatic seq_t smax(seq_t a, seq_t b);
    return seq_lt(a, b) ? b : a;
  endfunction

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int f = 0; f < FLOWS; f++) begin tup[f] = '0; cur[f] = 0; val[f] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    // unknown tuple misses on an empty table
    lk_tuple = '{32'h0a000001, 32'h0a000002, 16'd1, 16'd2, PROTO_TCP}; #1;
    check(!lk_hit, "empty table miss");
    for (int f = 0; f < FLOWS; f++)
      add(f, '{32'h0a000001 + f, 32'h0a0000ff, 16'(1000 + f), 16'd5201,
               (f % 2) ? PROTO_UDP : PROTO_TCP}, $urandom, 1);
    look_all();
    // random cursor traffic from both sources
    for (int it = 0; it < 300; it++) begin
      int fa, fb;
      seq_t da, db;
      fa = $urandom_range(0, FLOWS - 1); fb = $urandom_range(0, FLOWS - 1);
      da = cur[fa] + $urandom_range(0, 20000) - 4000;   // some stale (behind)
      db = cur[fb] + $urandom_range(0, 20000) - 4000;
      @(negedge clk);
      adv_en = $urandom_range(0, 1); adv_fid = 3'(fa); adv_cursor = da;
      ack_en = $urandom_range(0, 1); ack_fid = 3'(fb); ack_cursor = db;
      if (adv_en) cur[fa] = smax(cur[fa], da);
      if (ack_en) cur[fb] = smax(cur[fb], db);
      @(negedge clk); adv_en = 0; ack_en = 0;
      look_all();
    end
    // wrap-around: cursor near 2^32 moves forward past zero
    add(3, tup[3], 32'hffff_ff00, 1);
    @(negedge clk); adv_en = 1; adv_fid = 3; adv_cursor = 32'h0000_0100;
    @(negedge clk); adv_en = 0; cur[3] = 32'h100;
    look_all();
    // remove a flow: its tuple misses
    add(5, tup[5], 0, 0);
    look_all();
    // duplicate tuple of a different protocol does not match
    lk_tuple = tup[2]; lk_tuple.proto = PROTO_UDP; #1;
    check(!lk_hit, "protocol is part of the key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
