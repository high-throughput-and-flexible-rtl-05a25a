// tb_zn_cursor_logic: self-checking test of the packet classification.
// Random packets around a random cursor (including positions that wrap the
// 32-bit sequence space) are classified by a reference written with signed
// 64-bit distances from the cursor, and each of the five outcomes is
// required to occur.
module tb_zn_cursor_logic;
  import zn_pkg::*;
  int checks = 0, failures = 0;
  int seen [5];

  logic hit, udp;
  seq_t seq, cursor, posted_end, start, new_cursor;
  logic [15:0] len, take, trim;
  action_e action;
  logic adv;

  zn_cursor_logic dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 5; i++) seen[i] = 0;
    for (int it = 0; it < 20000; it++) begin
      longint ds, de, dp;   // distances from the cursor
      action_e ea; longint estart, etake, etrim; bit eadv;
      hit = ($urandom_range(0, 19) != 0);
      udp = ($urandom_range(0, 9) == 0);
      cursor = (it % 3 == 0) ? 32'hffff_0000 + $urandom_range(0, 65535) : $urandom;
      len = 16'($urandom_range(0, 9000));
      if (it % 50 == 0) len = 0;
      dp = $urandom_range(0, 60000);
      posted_end = cursor + 32'(dp);
      case ($urandom_range(0, 4))
        0: ds = 0;
        1: ds = -longint'($urandom_range(1, 20000));
        2: ds = $urandom_range(1, 40000);
        3: ds = -longint'(len) + longint'($urandom_range(0, 3));
        default: ds = longint'(dp) - longint'(len) + longint'($urandom_range(0, 3)) - 1;
      endcase
      seq = cursor + 32'(ds);
      #1;
      if (udp) ds = 0;
      de = ds + longint'(len);
      estart = ds; etake = 0; etrim = 0; eadv = 0;
      if (!hit || len == 0)      ea = ACT_DEFER;
      else if (de <= 0)          ea = ACT_DROP;
      else if (de > dp)          ea = ACT_DEFER;
      else if (ds == 0)          begin ea = ACT_ACCEPT; etake = len; eadv = 1; end
      else if (ds < 0)           begin ea = ACT_TRIM; etrim = -ds; etake = de; estart = 0; eadv = 1; end
      else                       begin ea = ACT_ACCEPT_F; etake = len; end
      check(action == ea, $sformatf("it %0d action %s exp %s (ds=%0d len=%0d dp=%0d)",
                                    it, action.name(), ea.name(), ds, len, dp));
      if (action == ea && ea != ACT_DEFER && ea != ACT_DROP) begin
        check(start == cursor + 32'(estart), "start");
        check(take == 16'(etake) && trim == 16'(etrim), "take/trim");
        check(adv == eadv, "adv");
        if (eadv) check(new_cursor == cursor + 32'(de), "new cursor");
      end
      seen[int'(action)]++;
    end
    for (int i = 0; i < 5; i++) check(seen[i] > 0, $sformatf("action %0d never seen", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
