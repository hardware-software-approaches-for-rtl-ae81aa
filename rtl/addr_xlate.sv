// addr_xlate: instruction address translation with a hardware-managed
// Current Frame Register (HMCFR).
//
// A fetch presents its VPN with `req`. In that same cycle the CFR compares
// its VPN with it. On a CFR hit the CFR's PFN is selected as the physical
// tag at once (done is high in the request cycle) and the iTLB is not
// enabled. On a CFR miss the iTLB lookup is enabled and the tag arrives
// after the iTLB's worst-case latency; the 2:1 select then takes the iTLB's
// PFN and the same translation is written into the CFR, so later fetches
// from the page hit it. If the iTLB misses, ptw_req is held high until
// ptw_resp returns the translation from the page table; it is written into
// both the iTLB and the CFR.
//
// done/ptag/pb stay valid from completion until the next req. Timing in
// clock edges after req: 1 on a CFR hit, LAT on an iTLB hit, LAT + the walk
// time on an iTLB miss. Enabling the
// iTLB only on a CFR miss follows the enable path of the lookup figure; the
// page-walk handshake is this design's own.
module addr_xlate
  import ifetch_pkg::*;
#(
  parameter int unsigned ENTRIES = TLB_ENTRIES,
  parameter int unsigned LAT     = TLB_LAT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  logic  req,
  input  vpn_t  req_vpn,
  output logic  done,
  output pfn_t  ptag,
  output pb_t   pb,
  // page walk
  output logic  ptw_req,
  output vpn_t  ptw_vpn,
  input  logic  ptw_resp,
  input  pfn_t  ptw_pfn,
  input  pb_t   ptw_pb,
  // events
  output logic  evt_cfr_hit,
  output logic  evt_tlb_access,
  output logic  evt_tlb_miss
);

  typedef enum logic [1:0] {XL_IDLE, XL_TLB, XL_WALK, XL_DONE} xl_state_e;
  xl_state_e state_q;
  vpn_t      vpn_q;
  pfn_t      pfn_q;
  pb_t       pb_q;

  logic  cfr_hit;
  pfn_t  cfr_pfn;
  pb_t   cfr_pb;
  logic  tlb_valid, tlb_hit;
  pfn_t  tlb_pfn;
  pb_t   tlb_pb;
  logic  upd;
  xlat_t upd_xlat;

  cfr u_cfr (
    .clk, .rst_n, .flush,
    .pc_vpn   (req_vpn),
    .hit      (cfr_hit),
    .pfn      (cfr_pfn),
    .pb       (cfr_pb),
    .upd      (upd),
    .upd_xlat (upd_xlat)
  );

  logic tlb_en;
  assign tlb_en = req && !cfr_hit;

  itlb #(.ENTRIES(ENTRIES), .LAT(LAT)) u_itlb (
    .clk, .rst_n, .flush,
    .lookup     (tlb_en),
    .vpn        (req_vpn),
    .cancel     (req && cfr_hit),
    .resp_valid (tlb_valid),
    .resp_hit   (tlb_hit),
    .resp_pfn   (tlb_pfn),
    .resp_pb    (tlb_pb),
    .fill       (ptw_resp && state_q == XL_WALK),
    .fill_xlat  ('{vpn: vpn_q, pfn: ptw_pfn, pb: ptw_pb})
  );

  logic tlb_done, walk_done;
  assign tlb_done  = state_q == XL_TLB && tlb_valid && tlb_hit;
  assign walk_done = state_q == XL_WALK && ptw_resp;

  // CFR update from the iTLB result or the page walk.
  assign upd      = tlb_done || walk_done;
  assign upd_xlat = tlb_done ? '{vpn: vpn_q, pfn: tlb_pfn, pb: tlb_pb}
                             : '{vpn: vpn_q, pfn: ptw_pfn, pb: ptw_pb};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= XL_IDLE;
      vpn_q   <= '0;
      pfn_q   <= '0;
      pb_q    <= '0;
    end else if (req) begin
      vpn_q <= req_vpn;
      if (cfr_hit) begin
        state_q <= XL_DONE;
        pfn_q   <= cfr_pfn;
        pb_q    <= cfr_pb;
      end else begin
        state_q <= XL_TLB;
      end
    end else begin
      unique case (state_q)
        XL_TLB: if (tlb_valid) begin
          if (tlb_hit) begin
            state_q <= XL_DONE;
            pfn_q   <= tlb_pfn;
            pb_q    <= tlb_pb;
          end else begin
            state_q <= XL_WALK;
          end
        end
        XL_WALK: if (ptw_resp) begin
          state_q <= XL_DONE;
          pfn_q   <= ptw_pfn;
          pb_q    <= ptw_pb;
        end
        default: ;
      endcase
    end
  end

  // 2:1 select of the physical tag: the iTLB's (or the page walk's) result
  // in the cycle it arrives, else the tag register, which was loaded from
  // the CFR on a hit. The cache's compare comes at least one edge after req,
  // so the CFR path never needs a combinational route from req.
  assign done = state_q == XL_DONE || tlb_done || walk_done;
  assign ptag = tlb_done ? tlb_pfn : (walk_done ? ptw_pfn : pfn_q);
  assign pb   = tlb_done ? tlb_pb  : (walk_done ? ptw_pb  : pb_q);

  assign ptw_req = state_q == XL_WALK;
  assign ptw_vpn = vpn_q;

  assign evt_cfr_hit    = req && cfr_hit;
  assign evt_tlb_access = tlb_en;
  assign evt_tlb_miss   = state_q == XL_TLB && tlb_valid && !tlb_hit;

endmodule
