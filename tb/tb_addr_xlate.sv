// tb_addr_xlate: checks HMCFR translation timing and CFR management.
//
// A behavioural page table answers walks after 30 cycles. The first
// request to a page walks (iTLB miss), the next request to the same page
// hits the CFR and completes one edge after the request without an iTLB
// lookup, a request to another page that is in the iTLB completes after the
// iTLB's two cycles and reloads the CFR, and a return to the first page
// then takes the iTLB path again.
module tb_addr_xlate;
  import ifetch_pkg::*;
  int checks = 0, failures = 0;
  int n_cfr = 0, n_tlb = 0, n_tlbm = 0;
  logic clk = 0, rst_n = 0, flush = 0, req = 0;
  vpn_t req_vpn = '0;
  logic done, ptw_req, ptw_resp = 0;
  pfn_t ptag, ptw_pfn = '0;
  pb_t  pb, ptw_pb = '0;
  vpn_t ptw_vpn;
  logic evt_cfr_hit, evt_tlb_access, evt_tlb_miss;

  addr_xlate dut (.*);
  always #5 clk = ~clk;

  function automatic pfn_t pt(vpn_t v);   // page table: a fixed hash
    return pfn_t'(v * 7 + 3);
  endfunction

  // page walker model
  initial begin
    forever begin
      @(negedge clk);
      if (ptw_req) begin
        repeat (29) @(negedge clk);
        ptw_resp = 1; ptw_pfn = pt(ptw_vpn); ptw_pb = PB_W'(ptw_vpn);
        @(negedge clk);
        ptw_resp = 0;
      end
    end
  end

  always @(posedge clk) begin
    n_cfr  += int'(evt_cfr_hit);
    n_tlb  += int'(evt_tlb_access);
    n_tlbm += int'(evt_tlb_miss);
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic translate(vpn_t v, output int lat);
    req = 1; req_vpn = v;
    @(negedge clk); req = 0;
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    check(ptag == pt(v) && pb == PB_W'(v), $sformatf("vpn %0h: ptag %0h want %0h", v, ptag, pt(v)));
    @(negedge clk);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    translate(vpn_t'(5), lat);
    check(lat > 30 && n_tlbm == 1, $sformatf("first access walks: lat %0d", lat));
    translate(vpn_t'(5), lat);
    check(lat == 1 && n_cfr == 1, $sformatf("CFR hit takes 1 cycle: lat %0d", lat));
    translate(vpn_t'(9), lat);              // walk for page 9
    translate(vpn_t'(5), lat);
    check(lat == TLB_LAT && n_tlbm == 2, $sformatf("iTLB hit takes %0d cycles: lat %0d", TLB_LAT, lat));
    translate(vpn_t'(5), lat);
    check(lat == 1, "CFR reloaded from the iTLB");
    for (int i = 0; i < 20; i++) begin
      translate(vpn_t'(5), lat);
      check(lat == 1, "stays in page: CFR hit");
    end
    check(n_tlb == 3, $sformatf("iTLB looked up only on CFR misses: %0d", n_tlb));
    flush = 1; @(negedge clk); flush = 0;
    translate(vpn_t'(5), lat);
    check(lat > 30, "flush drops CFR and iTLB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
