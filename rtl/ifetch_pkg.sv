// ifetch_pkg: constants and types shared by the variation-tolerant
// instruction fetch stage.
//
// Sizes follow the evaluated configuration: 64KB 4-way L1 instruction cache
// with 64-byte blocks, a 128-entry fully associative iTLB, 8KB pages, a fetch
// width of 4 instructions and an 8-entry fetch queue. Line reshuffling works
// on groups of 2^3 = 8 consecutive sets, and one hint bit per instruction
// encodes two access latencies (1 and 2 cycles).
//
// Address widths, the instruction width, the protection-bit width and the
// position of the hint bits are this design's own choices: a 64-bit virtual
// address, a 40-bit physical address, 32-bit Alpha-style instructions and
// three protection bits.
package ifetch_pkg;

  // ---- addresses and pages ----
  localparam int unsigned VA_W       = 64;
  localparam int unsigned PA_W       = 40;
  localparam int unsigned PAGE_BYTES = 8192;
  localparam int unsigned PO_W       = $clog2(PAGE_BYTES);   // page-offset bits
  localparam int unsigned VPN_W      = VA_W - PO_W;
  localparam int unsigned PFN_W      = PA_W - PO_W;
  localparam int unsigned PB_W       = 3;                    // protection bits

  // ---- instructions and cache blocks ----
  localparam int unsigned INSTR_W    = 32;
  localparam int unsigned INSTR_B    = INSTR_W / 8;
  localparam int unsigned BLK_BYTES  = 64;
  localparam int unsigned OFF_W      = $clog2(BLK_BYTES);
  localparam int unsigned BLK_BITS   = BLK_BYTES * 8;
  localparam int unsigned BLK_INSTRS = BLK_BYTES / INSTR_B;

  // ---- L1 instruction cache ----
  localparam int unsigned IC_BYTES   = 65536;
  localparam int unsigned IC_WAYS    = 4;
  localparam int unsigned IC_SETS    = IC_BYTES / (BLK_BYTES * IC_WAYS);
  localparam int unsigned RESHUF_DEG = 3;   // reshuffling degree r

  // ---- latency encoding ----
  localparam int unsigned HINT_BITS   = 1;  // hint bits per instruction
  localparam int unsigned PERFECT_LAT = 1;  // cycles for a perfect set
  localparam int unsigned HINT_POS   = 0;   // LSB of the hint field
  localparam int unsigned LATC_W     = 4;   // width of a cycle count

  // ---- iTLB ----
  localparam int unsigned TLB_ENTRIES = 128;
  localparam int unsigned TLB_LAT     = 2;  // worst-case translation cycles

  // ---- fetch ----
  localparam int unsigned FETCH_W    = 4;
  localparam int unsigned FQ_DEPTH   = 8;

  typedef logic [VPN_W-1:0]   vpn_t;
  typedef logic [PFN_W-1:0]   pfn_t;
  typedef logic [PB_W-1:0]    pb_t;
  typedef logic [VA_W-1:0]    va_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [BLK_BITS-1:0] blk_t;

  // One translation: what the CFR and each TLB entry hold.
  typedef struct packed {
    vpn_t vpn;
    pfn_t pfn;
    pb_t  pb;
  } xlat_t;

  // One fetched instruction as it enters the fetch queue.
  typedef struct packed {
    va_t    pc;
    instr_t instr;
  } fq_entry_t;

  // One-cycle event pulses of the fetch stage, for performance counting.
  typedef struct packed {
    logic cfr_hit;        // translation served by the CFR
    logic tlb_access;     // CFR missed, iTLB looked up
    logic tlb_miss;       // iTLB missed, page walk requested
    logic cache_access;   // a cache access was started
    logic slow_access;    // started with more than the base latency
    logic interlock;      // worst-case latency forced (exception entry)
    logic cache_miss;     // tag compare missed, refill requested
    logic buf_bypass;     // block delivered in the cycle it arrived
    logic lat_violation;  // waited less than the set's true latency
    logic redirect;       // PC redirected
  } fetch_evt_t;

endpackage
