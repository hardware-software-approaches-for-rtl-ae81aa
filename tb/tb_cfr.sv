// tb_cfr: checks the Current Frame Register: empty after reset, loads a
// translation, hits only on its own VPN, keeps it until replaced, and is
// cleared by flush.
module tb_cfr;
  import ifetch_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, flush = 0, upd = 0, hit;
  vpn_t pc_vpn = '0;
  pfn_t pfn;
  pb_t  pb;
  xlat_t upd_xlat = '0;

  cfr dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!hit, "hit after reset");
    for (int t = 0; t < 50; t++) begin
      vpn_t v; pfn_t p; pb_t b;
      v = {$urandom, $urandom}; p = PFN_W'($urandom); b = PB_W'($urandom);
      upd = 1; upd_xlat = '{vpn: v, pfn: p, pb: b};
      @(negedge clk);
      upd = 0;
      pc_vpn = v; #1;
      check(hit && pfn == p && pb == b, "hit on loaded VPN");
      pc_vpn = v ^ vpn_t'(1 << ($urandom % VPN_W)); #1;
      check(!hit, "hit on a different VPN");
      @(negedge clk);
      pc_vpn = v; #1;
      check(hit && pfn == p, "translation kept");
    end
    flush = 1; @(negedge clk); flush = 0; #1;
    check(!hit, "hit after flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
