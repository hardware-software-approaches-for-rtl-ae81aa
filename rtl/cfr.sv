// cfr: Current Frame Register.
//
// Holds the last virtual-to-physical instruction-page translation as
// [VPN | PFN | protection bits] and compares its VPN with the VPN of the
// PC. On a match (hit) the PFN here forms the physical tag and the iTLB is
// not needed. The register is loaded from the iTLB whenever a fetch leaves
// the current page.
//
// Interface: pc_vpn in, hit/pfn/pb out (combinational, same cycle).
// upd loads a new translation at the clock edge; flush (for example on a
// change of address space) clears it. Reset clears the valid bit; a
// valid bit and the flush input are this design's own additions.
module cfr
  import ifetch_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  vpn_t  pc_vpn,
  output logic  hit,
  output pfn_t  pfn,
  output pb_t   pb,
  input  logic  upd,
  input  xlat_t upd_xlat
);

  logic  valid_q;
  xlat_t xlat_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      xlat_q  <= '0;
    end else if (flush) begin
      valid_q <= 1'b0;
    end else if (upd) begin
      valid_q <= 1'b1;
      xlat_q  <= upd_xlat;
    end
  end

  assign hit = valid_q && (xlat_q.vpn == pc_vpn);
  assign pfn = xlat_q.pfn;
  assign pb  = xlat_q.pb;

endmodule
