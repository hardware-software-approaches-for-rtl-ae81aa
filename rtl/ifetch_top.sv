// ifetch_top: variation-tolerant instruction fetch stage.
//
// Joins the hardware-managed Current Frame Register translation path
// (addr_xlate: CFR + iTLB), the reshuffled, latency-annotated L1
// instruction cache (icache), the one-block fetch buffer, the fetch
// controller and the fetch queue. A fetch that stays in the buffered block
// costs nothing; a fetch that enters a new block costs one cycle when the
// CFR holds the page's translation and the compiler's hint says the set is
// perfect, and two cycles when either the translation must come from the
// iTLB or the set is imperfect (the larger of the two waits, not their
// sum).
//
// Ports: the core's redirect (PC, hint bits of the redirecting instruction,
// exception flag) and queue pop; the next-level refill port; the page-walk
// port for iTLB misses; the latency-map write port, loaded once with the
// March test result; the set-latency table read port for the compiler;
// ctx_flush, which drops the CFR, iTLB and fetch buffer on an address-space
// change; per-cycle event pulses.
//
// Parameters: the defaults give the single-cycle cache with one hint bit
// (1 or 2 cycles). LAT_BITS = 2 with BASE_LAT = 3 gives the slower
// non-pipelined cache with three latencies (3, 4 or 5 cycles, MAX_EXTRA =
// 2) that the design was also evaluated with; the port widths follow
// LAT_BITS.
module ifetch_top
  import ifetch_pkg::*;
#(
  parameter int unsigned LAT_BITS = HINT_BITS,    // hint bits per instruction
  parameter int unsigned BASE_LAT = PERFECT_LAT,  // cycles of a perfect set
  parameter int unsigned MAX_EXTRA = (1 << LAT_BITS) - 1  // interlock wait beyond BASE_LAT
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // core redirect
  input  logic                      redirect_valid,
  input  va_t                       redirect_pc,
  input  logic [LAT_BITS-1:0]       redirect_hint,
  input  logic                      redirect_exc,
  input  logic                      ctx_flush,
  // fetch queue to decode
  output fq_entry_t                 fq_head [FETCH_W],
  output logic [$clog2(FQ_DEPTH+1)-1:0] fq_count,
  input  logic [$clog2(FETCH_W+1)-1:0]  fq_pop_cnt,
  output pb_t                       fetch_pb,
  // next-level refill
  output logic                      l2_req,
  output logic [PA_W-OFF_W-1:0]     l2_addr,
  input  logic                      l2_resp_valid,
  input  blk_t                      l2_resp_data,
  // page walk
  output logic                      ptw_req,
  output vpn_t                      ptw_vpn,
  input  logic                      ptw_resp,
  input  pfn_t                      ptw_pfn,
  input  pb_t                       ptw_pb,
  // latency map and latency table
  input  logic                      fm_we,
  input  logic [$clog2(IC_WAYS)-1:0] fm_way,
  input  logic [$clog2(IC_SETS)-1:0] fm_row,
  input  logic [LAT_BITS-1:0]       fm_lat,
  input  logic [$clog2(IC_SETS)-1:0] tbl_idx,
  output logic [LAT_BITS-1:0]       tbl_lat,
  // events
  output va_t                       pc,
  output fetch_evt_t                evt
);

  // fetch controller <-> others
  logic [VA_W-OFF_W-1:0] look_blk, fill_blk;
  logic                  buf_hit, buf_bypass;
  blk_t                  buf_data;
  logic                  ic_ready, ic_req_valid, ic_resp_valid, ic_viol, ic_miss;
  va_t                   ic_req_va;
  logic [LATC_W-1:0]     ic_req_lat;
  blk_t                  ic_resp_data;
  logic                  xl_req, xl_done;
  vpn_t                  xl_vpn;
  pfn_t                  xl_ptag;
  logic [$clog2(FQ_DEPTH+1)-1:0] fq_free;
  logic [$clog2(FETCH_W+1)-1:0]  push_cnt;
  fq_entry_t             push [FETCH_W];
  logic                  e_cfr, e_tlb, e_tlbm, e_acc, e_slow, e_intl;

  fetch_ctrl #(.LAT_BITS(LAT_BITS), .BASE_LAT(BASE_LAT), .MAX_EXTRA(MAX_EXTRA)) u_ctrl (
    .clk, .rst_n,
    .redirect_valid, .redirect_pc, .redirect_hint, .redirect_exc,
    .look_blk, .buf_hit, .buf_data, .fill_blk,
    .ic_ready, .ic_req_valid, .ic_req_va, .ic_req_lat, .ic_resp_valid,
    .xl_req, .xl_vpn,
    .fq_free, .push_cnt, .push,
    .pc,
    .evt_access    (e_acc),
    .evt_slow      (e_slow),
    .evt_interlock (e_intl)
  );

  addr_xlate u_xlate (
    .clk, .rst_n,
    .flush          (ctx_flush),
    .req            (xl_req),
    .req_vpn        (xl_vpn),
    .done           (xl_done),
    .ptag           (xl_ptag),
    .pb             (fetch_pb),
    .ptw_req, .ptw_vpn, .ptw_resp, .ptw_pfn, .ptw_pb,
    .evt_cfr_hit    (e_cfr),
    .evt_tlb_access (e_tlb),
    .evt_tlb_miss   (e_tlbm)
  );

  icache #(.LAT_BITS(LAT_BITS), .BASE_LAT(BASE_LAT)) u_icache (
    .clk, .rst_n,
    .fm_we, .fm_way, .fm_row, .fm_lat,
    .tbl_idx, .tbl_lat,
    .ready              (ic_ready),
    .req_valid          (ic_req_valid),
    .req_va             (ic_req_va),
    .req_lat            (ic_req_lat),
    .ptag_valid         (xl_done),
    .ptag               (xl_ptag),
    .resp_valid         (ic_resp_valid),
    .resp_data          (ic_resp_data),
    .resp_lat_violation (ic_viol),
    .evt_miss           (ic_miss),
    .l2_req, .l2_addr, .l2_resp_valid, .l2_resp_data
  );

  fetch_buffer u_buf (
    .clk, .rst_n,
    .flush    (ctx_flush),
    .wr_en    (ic_resp_valid),
    .wr_blk   (fill_blk),
    .wr_data  (ic_resp_data),
    .look_blk (look_blk),
    .hit      (buf_hit),
    .bypass   (buf_bypass),
    .data     (buf_data)
  );

  fetch_queue u_fq (
    .clk, .rst_n,
    .flush    (redirect_valid),
    .push_cnt (push_cnt),
    .push     (push),
    .pop_cnt  (fq_pop_cnt),
    .head     (fq_head),
    .count    (fq_count),
    .free     (fq_free)
  );

  assign evt = '{cfr_hit:       e_cfr,
                 tlb_access:    e_tlb,
                 tlb_miss:      e_tlbm,
                 cache_access:  e_acc,
                 slow_access:   e_slow,
                 interlock:     e_intl,
                 cache_miss:    ic_miss,
                 buf_bypass:    buf_bypass,
                 lat_violation: ic_viol,
                 redirect:      redirect_valid};

endmodule
