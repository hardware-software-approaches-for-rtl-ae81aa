// itlb: fully associative instruction TLB with worst-case access latency.
//
// ENTRIES translations are held in a content-addressed array. A lookup
// started with `lookup` returns its result LAT clock edges later as a
// one-cycle resp_valid pulse with resp_hit, resp_pfn and resp_pb. Because
// some entries are slowed by process variation, every lookup is given the
// latency of the slowest entry (LAT = 2 cycles, against one cycle for a
// cache access). `cancel` drops a lookup in flight.
//
// fill writes a translation returned by a page walk: it overwrites an entry
// with the same VPN, else the first invalid entry, else the entry named by a
// round-robin pointer. The replacement policy and flush are this design's
// own choices.
module itlb
  import ifetch_pkg::*;
#(
  parameter int unsigned ENTRIES = TLB_ENTRIES,
  parameter int unsigned LAT     = TLB_LAT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  logic  lookup,
  input  vpn_t  vpn,
  input  logic  cancel,
  output logic  resp_valid,
  output logic  resp_hit,
  output pfn_t  resp_pfn,
  output pb_t   resp_pb,
  input  logic  fill,
  input  xlat_t fill_xlat
);

  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam int unsigned CW = (LAT > 1) ? $clog2(LAT) : 1;

  logic  [ENTRIES-1:0] valid_q;
  xlat_t               ent_q [ENTRIES];
  logic  [IW-1:0]      rr_q;
  logic                pend_q;
  logic  [CW-1:0]      cnt_q;
  vpn_t                vpn_q;

  // ---- CAM match on the registered VPN ----
  logic          match_any;
  logic [IW-1:0] match_idx;
  always_comb begin
    match_any = 1'b0;
    match_idx = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (!match_any && valid_q[i] && ent_q[i].vpn == vpn_q) begin
        match_any = 1'b1;
        match_idx = IW'(i);
      end
    end
  end

  assign resp_valid = pend_q && (cnt_q == '0);
  assign resp_hit   = match_any;
  assign resp_pfn   = ent_q[match_idx].pfn;
  assign resp_pb    = ent_q[match_idx].pb;

  // ---- fill victim: same VPN, else first invalid, else round robin ----
  logic          fill_same, fill_free;
  logic [IW-1:0] same_idx, free_idx, victim;
  always_comb begin
    fill_same = 1'b0;
    fill_free = 1'b0;
    same_idx  = '0;
    free_idx  = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (!fill_same && valid_q[i] && ent_q[i].vpn == fill_xlat.vpn) begin
        fill_same = 1'b1;
        same_idx  = IW'(i);
      end
      if (!fill_free && !valid_q[i]) begin
        fill_free = 1'b1;
        free_idx  = IW'(i);
      end
    end
    victim = fill_same ? same_idx : (fill_free ? free_idx : rr_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= 1'b0;
      cnt_q  <= '0;
      vpn_q  <= '0;
    end else if (lookup) begin
      pend_q <= 1'b1;
      cnt_q  <= CW'(LAT - 1);
      vpn_q  <= vpn;
    end else if (cancel || resp_valid) begin
      pend_q <= 1'b0;
    end else if (pend_q) begin
      cnt_q  <= cnt_q - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      rr_q    <= '0;
    end else if (flush) begin
      valid_q <= '0;
    end else if (fill) begin
      valid_q[victim] <= 1'b1;
      if (!fill_same && !fill_free) rr_q <= (rr_q == IW'(ENTRIES - 1)) ? '0 : rr_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (fill) ent_q[victim] <= fill_xlat;
  end

endmodule
