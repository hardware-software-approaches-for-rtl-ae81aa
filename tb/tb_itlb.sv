// tb_itlb: checks the instruction TLB with 8 entries and a 2-cycle
// latency: a lookup answers exactly two clock edges after it starts, hits
// return the filled PFN and protection bits, unknown VPNs miss, refilling a
// present VPN overwrites it, a full TLB replaces round robin, cancel drops
// a lookup and flush empties the TLB.
module tb_itlb;
  import ifetch_pkg::*;
  localparam int ENT = 8, LAT = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, flush = 0, lookup = 0, cancel = 0, fill = 0;
  vpn_t vpn = '0;
  logic resp_valid, resp_hit;
  pfn_t resp_pfn;
  pb_t  resp_pb;
  xlat_t fill_xlat = '0;

  itlb #(.ENTRIES(ENT), .LAT(LAT)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference contents
  pfn_t ref_pfn [vpn_t];

  task automatic do_fill(vpn_t v, pfn_t p);
    fill = 1; fill_xlat = '{vpn: v, pfn: p, pb: PB_W'(p)};
    @(negedge clk); fill = 0;
  endtask

  // start a lookup and count edges until resp_valid
  task automatic do_lookup(vpn_t v, output bit h, output pfn_t p, output int lat);
    lookup = 1; vpn = v;
    @(negedge clk); lookup = 0;
    lat = 1;
    while (!resp_valid && lat < 10) begin @(negedge clk); lat++; end
    h = resp_hit; p = resp_pfn;
    check(!resp_hit || resp_pb == PB_W'(resp_pfn), "protection bits");
    @(negedge clk);
    check(!resp_valid, "resp_valid is a single pulse");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit h; pfn_t p; int lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    do_lookup(51'h123, h, p, lat);
    check(!h && lat == LAT, $sformatf("empty TLB: hit %0d lat %0d", h, lat));
    for (int i = 0; i < ENT; i++) do_fill(vpn_t'(100 + i), pfn_t'(1000 + i));
    for (int i = 0; i < ENT; i++) begin
      do_lookup(vpn_t'(100 + i), h, p, lat);
      check(h && p == pfn_t'(1000 + i) && lat == LAT, $sformatf("entry %0d: hit %0d pfn %0d lat %0d", i, h, p, lat));
    end
    do_fill(vpn_t'(103), pfn_t'(7777));          // overwrite same VPN
    do_lookup(vpn_t'(103), h, p, lat);
    check(h && p == 7777, "overwrite of a present VPN");
    do_lookup(vpn_t'(100), h, p, lat);
    check(h && p == 1000, "other entries untouched");
    do_fill(vpn_t'(200), pfn_t'(2000));          // full: round robin evicts entry 0
    do_lookup(vpn_t'(200), h, p, lat);
    check(h && p == 2000, "new entry present");
    do_lookup(vpn_t'(100), h, p, lat);
    check(!h, "round-robin victim evicted");
    do_fill(vpn_t'(201), pfn_t'(2001));          // evicts entry 1
    do_lookup(vpn_t'(101), h, p, lat);
    check(!h, "second round-robin victim evicted");
    do_lookup(vpn_t'(102), h, p, lat);
    check(h && p == 1002, "third entry kept");
    // cancel
    lookup = 1; vpn = vpn_t'(200); @(negedge clk); lookup = 0; cancel = 1;
    @(negedge clk); cancel = 0;
    check(!resp_valid, "cancelled lookup gives no response");
    repeat (3) begin @(negedge clk); check(!resp_valid, "no late response"); end
    flush = 1; @(negedge clk); flush = 0;
    do_lookup(vpn_t'(200), h, p, lat);
    check(!h, "flush empties the TLB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
