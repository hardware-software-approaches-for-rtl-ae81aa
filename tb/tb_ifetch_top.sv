// tb_ifetch_top: end-to-end test of the fetch stage at its full size
// (64KB 4-way cache, 128-entry iTLB, 8KB pages, default parameters).
//
// The testbench plays the parts around the fetch stage:
//  - a March-test result: a random latency map with 15%, 25% and 40% of the
//    lines imperfect, one phase each, loaded through the map write port;
//  - the compiler: the code is an endless stream of hashed instruction
//    words, and the hint bit of the last word of every block is the latency
//    of the set that holds the next block, computed by the testbench's own
//    reshuffle-and-max reference (checked against the table read port);
//  - the core: pops 0-4 instructions per cycle and checks each against the
//    expected PC and word; it redirects to branch targets on a few pages,
//    passing the target set's latency as the hint (now and then a
//    conservative worst-case hint), and sometimes enters an exception
//    handler (interlocked);
//  - next level and page table: refills after 12 cycles, walks after 30.
// Every cache access that neither misses the cache nor the iTLB must end
// after max(1 + hint, 1 for a CFR hit or 2 for an iTLB lookup) cycles; no
// access may wait less than its set needs. Each mechanism (CFR hit, iTLB
// lookup, iTLB miss, slow set, interlock, cache miss, bypass, full queue,
// redirect) must occur at least once per phase.
module tb_ifetch_top;
  import ifetch_pkg::*;
  localparam int L2_LAT = 12, PTW_LAT = 30, PHASE_CYCLES = 20000;
  localparam va_t CODE_BASE = 64'h0000_0001_2000_0000;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic redirect_valid = 0, redirect_exc = 0, ctx_flush = 0;
  va_t redirect_pc = '0;
  logic [HINT_BITS-1:0] redirect_hint = '0;
  fq_entry_t fq_head [FETCH_W];
  logic [3:0] fq_count;
  logic [2:0] fq_pop_cnt = '0;
  pb_t fetch_pb;
  logic l2_req, l2_resp_valid = 0;
  logic [PA_W-OFF_W-1:0] l2_addr;
  blk_t l2_resp_data = '0;
  logic ptw_req, ptw_resp = 0;
  vpn_t ptw_vpn;
  pfn_t ptw_pfn = '0;
  pb_t ptw_pb = '0;
  logic fm_we = 0;
  logic [1:0] fm_way = '0;
  logic [7:0] fm_row = '0, tbl_idx = '0;
  logic [HINT_BITS-1:0] fm_lat = '0, tbl_lat;
  va_t pc;
  fetch_evt_t evt;

  ifetch_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ---------------- environment models ----------------
  localparam pfn_t PFN_OFS = pfn_t'(27'h40);
  bit lat_map [IC_WAYS][IC_SETS];
  int set_lat_ref [IC_SETS];

  function automatic pfn_t xl(vpn_t v);  return pfn_t'(v) + PFN_OFS; endfunction
  function automatic vpn_t unxl(pfn_t p); return vpn_t'(p - PFN_OFS) | (CODE_BASE >> PO_W & ~vpn_t'({PFN_W{1'b1}})); endfunction

  function automatic int set_of(va_t a); return int'(a[OFF_W +: $clog2(IC_SETS)]); endfunction

  function automatic instr_t code(va_t a);
    logic [31:0] h;
    h = 32'(a) * 32'h9e3779b1 ^ 32'(a >> 9) ^ 32'h5a5a0000;
    h[HINT_POS] = 1'b0;
    if (a[OFF_W-1:0] == OFF_W'(BLK_BYTES - INSTR_B))
      h[HINT_POS] = 1'(set_lat_ref[set_of(a + INSTR_B)]);
    return h;
  endfunction

  // next level: physical block address -> virtual block -> code
  initial forever begin
    @(posedge clk);
    if (l2_req) begin
      logic [PA_W-OFF_W-1:0] a;
      va_t vb;
      a = l2_addr;
      vb = {unxl(a[PA_W-OFF_W-1:PO_W-OFF_W]), a[PO_W-OFF_W-1:0], OFF_W'(0)};
      repeat (L2_LAT - 1) @(negedge clk);
      for (int i = 0; i < BLK_INSTRS; i++) l2_resp_data[i*INSTR_W +: INSTR_W] = code(vb + va_t'(i * INSTR_B));
      l2_resp_valid = 1;
      @(negedge clk);
      l2_resp_valid = 0;
    end
  end

  // page walker
  initial forever begin
    @(negedge clk);
    if (ptw_req) begin
      vpn_t v;
      v = ptw_vpn;
      repeat (PTW_LAT - 1) @(negedge clk);
      ptw_resp = 1; ptw_pfn = xl(v); ptw_pb = 3'b101;
      @(negedge clk);
      ptw_resp = 0;
    end
  end

  // ---------------- reference set latency ----------------
  task automatic compute_ref();
    int N = 1 << RESHUF_DEG;
    for (int s = 0; s < IC_SETS; s++) set_lat_ref[s] = 0;
    for (int w = 0; w < IC_WAYS; w++)
      for (int g = 0; g < IC_SETS / N; g++) begin
        int cp = 0, ci = N - 1;
        for (int k = 0; k < N; k++) begin
          if (lat_map[w][g*N+k]) begin set_lat_ref[g*N+ci] = 1; ci--; end
          else cp++;
        end
      end
  endtask

  // ---------------- monitors ----------------
  int cyc = 0;
  int n_cfr, n_tlb, n_tlbm, n_acc, n_slow, n_intl, n_miss, n_byp, n_viol, n_redir, n_full, n_timed, n_instr;
  int t0, want_lat, acc_set;
  bit acc_cfr, acc_irregular, acc_open = 0;

  // sampled in mid-cycle, when every signal of the cycle has settled
  always @(negedge clk) if (rst_n) begin
    cyc++;
    n_cfr   += int'(evt.cfr_hit);
    n_tlb   += int'(evt.tlb_access);
    n_tlbm  += int'(evt.tlb_miss);
    n_acc   += int'(evt.cache_access);
    n_slow  += int'(evt.slow_access);
    n_intl  += int'(evt.interlock);
    n_miss  += int'(evt.cache_miss);
    n_byp   += int'(evt.buf_bypass);
    n_viol  += int'(evt.lat_violation);
    n_redir += int'(evt.redirect);
    n_full  += int'(fq_count == 4'(FQ_DEPTH));
    if (evt.lat_violation) check(0, "latency violation");
    if (acc_open && (evt.cache_miss || evt.tlb_miss)) acc_irregular = 1;
    if (acc_open && dut.ic_resp_valid) begin
      acc_open = 0;
      if (!acc_irregular) begin
        int trans, exp_c;
        trans = acc_cfr ? 1 : TLB_LAT;
        exp_c = want_lat > trans ? want_lat : trans;
        n_timed++;
        check(cyc - t0 == exp_c, $sformatf("cycle %0d: access to set %0d took %0d cycles, want %0d", cyc, acc_set, cyc - t0, exp_c));
      end
    end
    if (evt.cache_access) begin
      acc_open = 1; acc_irregular = 0; t0 = cyc;
      want_lat = int'(dut.ic_req_lat); acc_cfr = evt.cfr_hit; acc_set = set_of(dut.ic_req_va);
      check(want_lat >= PERFECT_LAT + set_lat_ref[acc_set],
            $sformatf("set %0d needs %0d cycles, asked %0d", acc_set, PERFECT_LAT + set_lat_ref[acc_set], want_lat));
    end
  end

  // ---------------- core model ----------------
  va_t exp_pc;
  task automatic run_phase(int pct);
    int imperfect_sets, unshuffled_sets;
    n_cfr = 0; n_tlb = 0; n_tlbm = 0; n_acc = 0; n_slow = 0; n_intl = 0; n_miss = 0;
    n_byp = 0; n_viol = 0; n_redir = 0; n_full = 0; n_timed = 0; n_instr = 0;
    // March-test result
    for (int w = 0; w < IC_WAYS; w++)
      for (int s = 0; s < IC_SETS; s++) begin
        lat_map[w][s] = ($urandom_range(0, 99) < pct);
        @(negedge clk);
        fm_we = 1; fm_way = 2'(w); fm_row = 8'(s); fm_lat = HINT_BITS'(lat_map[w][s]);
      end
    @(negedge clk); fm_we = 0;
    compute_ref();
    imperfect_sets = 0; unshuffled_sets = 0;
    for (int s = 0; s < IC_SETS; s++) begin
      bit any;
      tbl_idx = 8'(s); #1;
      check(int'(tbl_lat) == set_lat_ref[s], $sformatf("latency table set %0d", s));
      imperfect_sets += set_lat_ref[s];
      any = 0;
      for (int w = 0; w < IC_WAYS; w++) any |= lat_map[w][s];
      unshuffled_sets += int'(any);
    end
    check(imperfect_sets <= unshuffled_sets, "reshuffling never adds imperfect sets");
    $display("phase %0d%%: imperfect sets %0d with reshuffling, %0d without", pct, imperfect_sets, unshuffled_sets);
    // start at an exception-like entry point
    @(negedge clk);
    redirect_valid = 1; redirect_exc = 1; redirect_pc = CODE_BASE; exp_pc = CODE_BASE;
    @(negedge clk); redirect_valid = 0; redirect_exc = 0;
    for (int t = 0; t < PHASE_CYCLES; t++) begin
      int r, np;
      // check and pop
      np = $urandom_range(0, 9) < 2 ? 0 : $urandom_range(1, FETCH_W);
      if (np > int'(fq_count)) np = int'(fq_count);
      for (int i = 0; i < np; i++) begin
        check(fq_head[i].pc == exp_pc && fq_head[i].instr == code(exp_pc),
              $sformatf("instr %0d: pc %0h want %0h", n_instr, fq_head[i].pc, exp_pc));
        exp_pc += INSTR_B;
        n_instr++;
      end
      r = $urandom_range(0, 999);
      if (r < 25) begin
        // branch: target on one of 4 pages, hint = target set latency
        va_t tgt;
        tgt = CODE_BASE + va_t'($urandom_range(0, 3)) * PAGE_BYTES
                        + va_t'($urandom_range(0, PAGE_BYTES / INSTR_B - 1)) * INSTR_B;
        if ($urandom_range(0, 99) < 10) tgt = CODE_BASE + va_t'($urandom_range(0, 40)) * PAGE_BYTES;
        redirect_valid = 1; redirect_pc = tgt;
        redirect_exc = (r < 2);
        redirect_hint = ($urandom_range(0, 9) == 0) ? '1 : HINT_BITS'(set_lat_ref[set_of(tgt)]);
        fq_pop_cnt = '0;
        exp_pc = tgt;
      end else begin
        redirect_valid = 0; redirect_exc = 0;
        fq_pop_cnt = 3'(np);
      end
      @(negedge clk);
      redirect_valid = 0; redirect_exc = 0; fq_pop_cnt = '0;
    end
    // drain the last access
    repeat (60) @(negedge clk);
    $display("phase %0d%%: %0d instrs, accesses %0d (timed %0d), CFR hits %0d, iTLB lookups %0d, iTLB misses %0d",
             pct, n_instr, n_acc, n_timed, n_cfr, n_tlb, n_tlbm);
    $display("           slow %0d, interlocks %0d, cache misses %0d, bypasses %0d, full-queue cycles %0d, redirects %0d",
             n_slow, n_intl, n_miss, n_byp, n_full, n_redir);
    check(n_instr > 1000, "instructions delivered");
    check(n_cfr > 0,  "CFR hit happened");
    check(n_tlb > 0,  "iTLB lookup happened");
    check(n_tlbm > 0, "iTLB miss happened");
    check(n_slow > 0, "slow-set access happened");
    check(n_intl > 0, "interlock happened");
    check(n_miss > 0, "cache miss happened");
    check(n_byp > 0,  "bypass happened");
    check(n_full > 0, "fetch queue filled");
    check(n_redir > 0, "redirect happened");
    check(n_timed > 0, "timed accesses happened");
    check(n_cfr > n_tlb, "most translations come from the CFR");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_phase(15);
    run_phase(25);
    run_phase(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
