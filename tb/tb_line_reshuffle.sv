// tb_line_reshuffle: checks the reshuffling decoder.
//
// For R = 2 every one of the 16 fault patterns and 4 addresses is compared
// with the published mapping table (physical line -> address held). For
// R = 3 all 256 fault patterns are checked against a reference that lists
// the perfect lines in order for the low addresses and the imperfect lines
// from the top address down, and the selection must be one-hot and a
// bijection over the group.
module tb_line_reshuffle;
  int checks = 0, failures = 0;

  logic [3:0] f2;  logic [1:0] a2;  logic [3:0] sel2;  logic [1:0] line2;
  logic [7:0] f3;  logic [2:0] a3;  logic [7:0] sel3;  logic [2:0] line3;

  line_reshuffle #(.R(2)) dut2 (.f(f2), .a(a2), .sel(sel2), .line(line2));
  line_reshuffle #(.R(3)) dut3 (.f(f3), .a(a3), .sel(sel3), .line(line3));

  // Table rows indexed by (f0 f1 f2 f3) with f0 as the most significant
  // digit; entry k is the address placed in physical line k.
  int tbl [16][4] = '{
    '{0,1,2,3}, '{0,1,2,3}, '{0,1,3,2}, '{0,1,3,2},
    '{0,3,1,2}, '{0,3,1,2}, '{0,3,2,1}, '{0,3,2,1},
    '{3,0,1,2}, '{3,0,1,2}, '{3,0,2,1}, '{3,0,2,1},
    '{3,2,0,1}, '{3,2,0,1}, '{3,2,1,0}, '{3,2,1,0}};

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int row = 0; row < 16; row++) begin
      for (int k = 0; k < 4; k++) f2[k] = row[3-k];
      for (int a = 0; a < 4; a++) begin
        int exp_line;
        a2 = 2'(a);
        #1;
        exp_line = -1;
        for (int k = 0; k < 4; k++) if (tbl[row][k] == a) exp_line = k;
        check(line2 == 2'(exp_line) && sel2 == 4'(1 << exp_line),
              $sformatf("R=2 row %0d addr %0d: line %0d sel %b, want %0d", row, a, line2, sel2, exp_line));
      end
    end
    for (int pat = 0; pat < 256; pat++) begin
      int addr_of [8];
      int nxt_p, nxt_i;
      logic [7:0] seen;
      f3 = 8'(pat);
      nxt_p = 0; nxt_i = 7;
      for (int k = 0; k < 8; k++) begin
        if (!f3[k]) addr_of[k] = nxt_p++;
        else        addr_of[k] = nxt_i--;
      end
      seen = '0;
      for (int a = 0; a < 8; a++) begin
        a3 = 3'(a);
        #1;
        check($onehot(sel3) && sel3[line3] && addr_of[line3] == a,
              $sformatf("R=3 f=%b addr %0d: line %0d sel %b", f3, a, line3, sel3));
        seen[line3] = 1'b1;
        // low addresses must land on perfect lines while any remain
        if (a < 8 - $countones(f3)) check(!f3[line3], $sformatf("R=3 f=%b addr %0d on imperfect line", f3, a));
      end
      check(seen == 8'hff, $sformatf("R=3 f=%b not a bijection", f3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
