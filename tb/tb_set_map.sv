// tb_set_map: checks the per-way reshuffled rows and the set latency.
//
// A 4-way, 32-set map with groups of 8 and 2-bit latencies is filled with
// random latencies; for every set index the row of each way is compared
// with an independent reference placement, and the set latency with the
// largest latency among the selected lines.
module tb_set_map;
  localparam int WAYS = 4, SETS = 32, R = 3, LB = 2, N = 8;
  int checks = 0, failures = 0;

  logic [LB-1:0] line_lat [WAYS][SETS];
  logic [4:0]    idx;
  logic [4:0]    row [WAYS];
  logic [LB-1:0] set_lat;

  set_map #(.WAYS(WAYS), .SETS(SETS), .R(R), .LAT_BITS(LB)) dut (
    .line_lat(line_lat), .idx(idx), .row(row), .set_lat(set_lat));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 20; trial++) begin
      for (int w = 0; w < WAYS; w++)
        for (int s = 0; s < SETS; s++)
          line_lat[w][s] = ($urandom_range(0, 99) < 30) ? LB'($urandom_range(1, 3)) : '0;
      for (int s = 0; s < SETS; s++) begin
        int exp_lat;
        idx = 5'(s);
        #1;
        exp_lat = 0;
        for (int w = 0; w < WAYS; w++) begin
          int grp, a, cnt_p, cnt_i, exp_row;
          grp = s / N; a = s % N;
          cnt_p = 0; cnt_i = N - 1; exp_row = -1;
          for (int k = 0; k < N; k++) begin
            int slot;
            if (line_lat[w][grp*N+k] == 0) slot = cnt_p++;
            else                            slot = cnt_i--;
            if (slot == a) exp_row = grp*N + k;
          end
          check(row[w] == 5'(exp_row), $sformatf("set %0d way %0d row %0d want %0d", s, w, row[w], exp_row));
          if (int'(line_lat[w][exp_row]) > exp_lat) exp_lat = int'(line_lat[w][exp_row]);
        end
        check(set_lat == LB'(exp_lat), $sformatf("set %0d lat %0d want %0d", s, set_lat, exp_lat));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
