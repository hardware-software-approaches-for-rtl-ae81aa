// fetch_ctrl: instruction fetch sequencing with compiler-annotated cache
// access latencies.
//
// The PC walks through the one-block fetch buffer, delivering up to W
// instructions per cycle to the fetch queue, never past the end of the block
// and never more than the queue has room for. When the PC leaves the
// buffered block, one access is started: the cache index and the VPN go out
// in the same cycle (cache indexing and translation in parallel), together
// with the number of cycles the cache must wait, BASE_LAT + hint. The hint
// is read from LAT_BITS spare bits of an instruction, starting at HINT_POS:
// for sequential flow it is the hint of the last instruction of the block
// just left, which the compiler wrote with the latency of the next set; for
// a redirect it is the hint of the branch that caused it, which the core
// passes in as redirect_hint. An exception or interrupt entry
// (redirect_exc) and the first fetch after reset are given the worst-case
// latency, BASE_LAT + MAX_EXTRA, because no annotated instruction precedes
// them.
//
// Redirect has priority: PC and hint are replaced and nothing is delivered
// in that cycle. An access already under way is allowed to finish; its
// block still goes into the buffer. Taking the first fetch after reset as
// an interlocked access, the RESET_PC parameter and passing the hint with
// the redirect are this design's own choices.
module fetch_ctrl
  import ifetch_pkg::*;
#(
  parameter int unsigned W         = FETCH_W,
  parameter int unsigned LAT_BITS  = HINT_BITS,
  parameter int unsigned BASE_LAT  = PERFECT_LAT,
  parameter int unsigned MAX_EXTRA = (1 << LAT_BITS) - 1,
  parameter int unsigned H_POS     = HINT_POS,
  parameter logic [VA_W-1:0] RESET_PC = '0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // redirect from the core
  input  logic                       redirect_valid,
  input  va_t                        redirect_pc,
  input  logic [LAT_BITS-1:0]        redirect_hint,
  input  logic                       redirect_exc,
  // fetch buffer
  output logic [VA_W-OFF_W-1:0]      look_blk,
  input  logic                       buf_hit,
  input  blk_t                       buf_data,
  output logic [VA_W-OFF_W-1:0]      fill_blk,
  // cache and translation
  input  logic                       ic_ready,
  output logic                       ic_req_valid,
  output va_t                        ic_req_va,
  output logic [LATC_W-1:0]          ic_req_lat,
  input  logic                       ic_resp_valid,
  output logic                       xl_req,
  output vpn_t                       xl_vpn,
  // fetch queue
  input  logic [$clog2(FQ_DEPTH+1)-1:0] fq_free,
  output logic [$clog2(W+1)-1:0]     push_cnt,
  output fq_entry_t                  push [W],
  // status and events
  output va_t                        pc,
  output logic                       evt_access,
  output logic                       evt_slow,
  output logic                       evt_interlock
);

  localparam int unsigned WI_W = $clog2(BLK_INSTRS);
  localparam int unsigned PCW  = $clog2(W+1);

  va_t                   pc_q;
  logic [LAT_BITS-1:0]   hint_q;
  logic                  worst_q;
  logic                  busy_q;
  logic [VA_W-OFF_W-1:0] req_blk_q;

  assign pc       = pc_q;
  assign look_blk = pc_q[VA_W-1:OFF_W];
  assign fill_blk = req_blk_q;

  // ---- instruction slots of the buffered block ----
  instr_t slot [BLK_INSTRS];
  always_comb begin
    for (int i = 0; i < BLK_INSTRS; i++) slot[i] = buf_data[i*INSTR_W +: INSTR_W];
  end

  logic [WI_W-1:0] off;
  assign off = pc_q[OFF_W-1:$clog2(INSTR_B)];

  // ---- delivery ----
  int unsigned n;
  logic        last_taken;
  always_comb begin
    int unsigned room;
    room = BLK_INSTRS - int'(off);
    n = W;
    if (room < n)         n = room;
    if (int'(fq_free) < n) n = int'(fq_free);
    if (!buf_hit || redirect_valid) n = 0;
    last_taken = (n != 0) && (int'(off) + n == BLK_INSTRS);
    push_cnt = PCW'(n);
    for (int i = 0; i < W; i++) begin
      push[i].pc    = pc_q + va_t'(i * INSTR_B);
      push[i].instr = slot[WI_W'((int'(off) + i) % BLK_INSTRS)];
    end
  end

  // ---- access start ----
  logic [LATC_W-1:0] lat;
  assign lat          = worst_q ? LATC_W'(BASE_LAT + MAX_EXTRA)
                                : LATC_W'(BASE_LAT) + LATC_W'(hint_q);
  assign ic_req_valid = !redirect_valid && !busy_q && !buf_hit && ic_ready;
  assign ic_req_va    = pc_q;
  assign ic_req_lat   = lat;
  assign xl_req       = ic_req_valid;
  assign xl_vpn       = pc_q[VA_W-1:PO_W];

  assign evt_access    = ic_req_valid;
  assign evt_slow      = ic_req_valid && lat > LATC_W'(BASE_LAT);
  assign evt_interlock = ic_req_valid && worst_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q      <= RESET_PC;
      hint_q    <= '0;
      worst_q   <= 1'b1;
      busy_q    <= 1'b0;
      req_blk_q <= '0;
    end else begin
      if (ic_req_valid) begin
        busy_q    <= 1'b1;
        worst_q   <= 1'b0;
        req_blk_q <= look_blk;
      end else if (ic_resp_valid) begin
        busy_q    <= 1'b0;
      end
      if (redirect_valid) begin
        pc_q    <= redirect_pc;
        hint_q  <= redirect_hint;
        worst_q <= redirect_exc;
      end else if (n != 0) begin
        pc_q <= pc_q + va_t'(n * INSTR_B);
        if (last_taken) begin
          // the block's last instruction carries the next set's latency,
          // which also ends an interlock that found its block buffered
          hint_q  <= slot[BLK_INSTRS-1][H_POS +: LAT_BITS];
          worst_q <= 1'b0;
        end
      end
    end
  end

endmodule
