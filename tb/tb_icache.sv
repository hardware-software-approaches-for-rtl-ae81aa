// tb_icache: checks the variation-aware L1 instruction cache at 32 sets,
// 4 ways, reshuffling groups of 8.
//
// A random latency map (about 25% imperfect lines) is loaded; the latency
// table read port must match an independent reshuffle-and-max reference
// for every set. A behavioural next level answers refills after 12 cycles
// with a block computed from its address. The test checks: miss, refill
// and data; a hit that ends exactly req_lat edges after the request; a hit
// that waits for a late physical tag; the violation flag when the wait is
// shorter than the set's latency and its absence otherwise; LRU
// replacement; and that reprogramming the map invalidates the cache.
module tb_icache;
  import ifetch_pkg::*;
  localparam int SETS = 32, WAYS = 4, R = 3, N = 8, L2_LAT = 12;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic fm_we = 0; logic [1:0] fm_way = '0; logic [4:0] fm_row = '0; logic [0:0] fm_lat = '0;
  logic [4:0] tbl_idx = '0; logic [0:0] tbl_lat;
  logic ready, req_valid = 0, ptag_valid = 0;
  va_t req_va = '0; logic [LATC_W-1:0] req_lat = '0; pfn_t ptag = '0;
  logic resp_valid, resp_lat_violation, evt_miss, l2_req, l2_resp_valid = 0;
  blk_t resp_data, l2_resp_data = '0;
  logic [PA_W-OFF_W-1:0] l2_addr;
  int n_l2 = 0;

  icache #(.SETS(SETS), .WAYS(WAYS), .R(R), .LAT_BITS(1), .BASE_LAT(1)) dut (.*);
  always #5 clk = ~clk;

  bit lat_map [WAYS][SETS];

  function automatic blk_t mem_blk(logic [PA_W-OFF_W-1:0] a);
    blk_t b;
    for (int i = 0; i < BLK_INSTRS; i++) b[i*INSTR_W +: INSTR_W] = INSTR_W'(a * 131 + i * 17 + 5);
    return b;
  endfunction

  function automatic int ref_set_lat(int s);
    int lat = 0;
    for (int w = 0; w < WAYS; w++) begin
      int grp = s / N, cp = 0, ci = N - 1;
      for (int k = 0; k < N; k++) begin
        int slot;
        if (lat_map[w][grp*N+k]) begin slot = ci; ci--; end
        else begin slot = cp; cp++; end
        if (slot == s % N && lat_map[w][grp*N+k]) lat = 1;
      end
    end
    return lat;
  endfunction

  // next-level model
  initial begin
    forever begin
      @(negedge clk);
      if (l2_req) begin
        logic [PA_W-OFF_W-1:0] a;
        a = l2_addr;
        n_l2++;
        repeat (L2_LAT - 1) @(negedge clk);
        l2_resp_valid = 1; l2_resp_data = mem_blk(a);
        @(negedge clk);
        l2_resp_valid = 0;
      end
    end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one access; returns the cycles to the response and whether it missed
  task automatic access(int set, int pg, pfn_t tag, int lat, int tag_delay,
                        output int cyc, output bit missed, output bit viol);
    va_t va;
    va = va_t'(pg) << PO_W | va_t'(set) << OFF_W;
    while (!ready) @(negedge clk);
    req_valid = 1; req_va = va; req_lat = LATC_W'(lat); ptag_valid = (tag_delay == 0); ptag = tag;
    @(negedge clk);
    req_valid = 0;
    cyc = 1; missed = 0; viol = 0;
    while (!resp_valid && cyc < 200) begin
      if (cyc >= tag_delay) ptag_valid = 1;
      #1;
      if (resp_valid) break;
      missed |= evt_miss;
      @(negedge clk); cyc++;
    end
    viol = resp_lat_violation;
    check(resp_data == mem_blk({tag, va[PO_W-1:OFF_W]}), $sformatf("data set %0d tag %0h", set, tag));
    @(negedge clk);
    ptag_valid = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc; bit missed, viol;
    int slow_set, fast_set;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // latency map
    for (int w = 0; w < WAYS; w++)
      for (int s = 0; s < SETS; s++) begin
        lat_map[w][s] = ($urandom_range(0, 99) < 25);
        fm_we = 1; fm_way = 2'(w); fm_row = 5'(s); fm_lat = lat_map[w][s];
        @(negedge clk);
      end
    fm_we = 0;
    slow_set = -1; fast_set = -1;
    for (int s = 0; s < SETS; s++) begin
      tbl_idx = 5'(s); #1;
      check(int'(tbl_lat) == ref_set_lat(s), $sformatf("latency table set %0d", s));
      if (ref_set_lat(s) == 1 && slow_set < 0) slow_set = s;
      if (ref_set_lat(s) == 0 && fast_set < 0) fast_set = s;
    end
    check(slow_set >= 0 && fast_set >= 0, "map has both perfect and imperfect sets");
    if (slow_set < 0) slow_set = 0;
    if (fast_set < 0) fast_set = 1;

    // miss then hit on a perfect set
    access(fast_set, 1, pfn_t'(77), 1, 0, cyc, missed, viol);
    check(missed && cyc > L2_LAT, $sformatf("cold miss refills: %0d cycles", cyc));
    access(fast_set, 1, pfn_t'(77), 1, 0, cyc, missed, viol);
    check(!missed && cyc == 1 && !viol, $sformatf("perfect hit in 1 cycle: %0d viol %0d", cyc, viol));
    // late tag: translation takes 2 cycles
    access(fast_set, 1, pfn_t'(77), 1, 2, cyc, missed, viol);
    check(!missed && cyc == 2, $sformatf("hit waits for the tag: %0d", cyc));
    // imperfect set
    access(slow_set, 2, pfn_t'(91), 2, 0, cyc, missed, viol);
    check(missed, "imperfect set cold miss");
    access(slow_set, 2, pfn_t'(91), 2, 0, cyc, missed, viol);
    check(!missed && cyc == 2 && !viol, $sformatf("imperfect hit in 2 cycles: %0d viol %0d", cyc, viol));
    access(slow_set, 2, pfn_t'(91), 1, 0, cyc, missed, viol);
    check(!missed && cyc == 1 && viol, "too-short wait flagged as violation");

    // LRU on the perfect set: tags 77 (present), 78, 79, 80 fill the ways
    for (int t = 78; t <= 80; t++) begin
      access(fast_set, 1, pfn_t'(t), 1, 0, cyc, missed, viol);
      check(missed, $sformatf("fill tag %0d", t));
    end
    access(fast_set, 1, pfn_t'(77), 1, 0, cyc, missed, viol);   // 78 is now oldest
    check(!missed, "tag 77 still present");
    access(fast_set, 1, pfn_t'(81), 1, 0, cyc, missed, viol);   // evicts 78
    check(missed, "fifth tag misses");
    access(fast_set, 1, pfn_t'(78), 1, 0, cyc, missed, viol);
    check(missed, "LRU tag 78 was evicted");
    access(fast_set, 1, pfn_t'(77), 1, 0, cyc, missed, viol);
    check(!missed, "recently used tag 77 kept");

    // reprogramming the map invalidates
    fm_we = 1; fm_way = 0; fm_row = 0; fm_lat = lat_map[0][0]; @(negedge clk); fm_we = 0;
    access(fast_set, 1, pfn_t'(77), 1, 0, cyc, missed, viol);
    check(missed, "map write invalidates the cache");
    check(n_l2 == 8, $sformatf("refill count %0d", n_l2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
