// icache: virtually indexed, physically tagged L1 instruction cache whose
// lines have process-variation-dependent access latencies.
//
// Organisation: SETS sets x WAYS ways of BLK_BYTES-byte blocks, LRU
// replacement. The set index comes from the virtual address; the tag is the
// full physical frame number supplied by address translation. Each way has
// a programmable address decoder (set_map/line_reshuffle) that reshuffles
// the lines of every group of 2^R consecutive sets so that the perfect lines
// serve the low indices of the group. A per-line latency map (line_lat, 0 =
// perfect) records the March-test result; it is written through fm_we
// before operation, and writing it invalidates the cache because it moves
// lines. The set's extra latency (largest of its lines) can be read through
// tbl_idx/tbl_lat, which is the latency table the compiler consults.
//
// Access: req_valid with req_va and req_lat (cycles to wait, taken from the
// latency hint) is accepted when ready. The data and tag arrays are read
// req_lat clock edges later, provided ptag_valid is also high by then, so an
// access ends after max(req_lat, translation time). On a hit resp_valid
// pulses for one cycle with the block. On a miss the block is requested
// from the next level (l2_req pulse, physical block address), written into
// the LRU way when l2_resp_valid arrives, and the tag compare is replayed
// one cycle later. If req_lat is shorter than the set's true latency,
// resp_lat_violation flags the response: in silicon that read would return
// unreliable data. The violation flag, the refill handshake and the
// invalidate-on-reprogram rule are this design's own choices.
module icache
  import ifetch_pkg::*;
#(
  parameter int unsigned SETS     = IC_SETS,
  parameter int unsigned WAYS     = IC_WAYS,
  parameter int unsigned R        = RESHUF_DEG,
  parameter int unsigned LAT_BITS = HINT_BITS,
  parameter int unsigned BASE_LAT = PERFECT_LAT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // latency map (March test result)
  input  logic                    fm_we,
  input  logic [$clog2(WAYS)-1:0] fm_way,
  input  logic [$clog2(SETS)-1:0] fm_row,
  input  logic [LAT_BITS-1:0]     fm_lat,
  // set latency table read port
  input  logic [$clog2(SETS)-1:0] tbl_idx,
  output logic [LAT_BITS-1:0]     tbl_lat,
  // fetch access
  output logic                    ready,
  input  logic                    req_valid,
  input  va_t                     req_va,
  input  logic [LATC_W-1:0]       req_lat,
  input  logic                    ptag_valid,
  input  pfn_t                    ptag,
  output logic                    resp_valid,
  output blk_t                    resp_data,
  output logic                    resp_lat_violation,
  output logic                    evt_miss,
  // next level
  output logic                    l2_req,
  output logic [PA_W-OFF_W-1:0]   l2_addr,
  input  logic                    l2_resp_valid,
  input  blk_t                    l2_resp_data
);

  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned PGB_W = PO_W - OFF_W;   // block bits inside a page

  typedef enum logic [1:0] {IC_IDLE, IC_ACCESS, IC_REFILL} ic_state_e;

  ic_state_e            state_q;
  logic [LATC_W-1:0]    cnt_q;
  logic [IDX_W-1:0]     idx_q;
  logic [PGB_W-1:0]     pgb_q;
  logic                 viol_q;
  logic [IDX_W-1:0]     row_q [WAYS];

  logic [LAT_BITS-1:0]  line_lat [WAYS][SETS];
  logic [WAYS-1:0]      valid_q [SETS];
  pfn_t                 tag_q   [WAYS][SETS];
  blk_t                 data_q  [WAYS][SETS];
  logic [WAY_W-1:0]     age_q   [WAYS][SETS];   // LRU age per logical set

  // ---- reshuffled rows and set latency for the incoming request ----
  logic [IDX_W-1:0]    req_idx;
  logic [IDX_W-1:0]    req_row [WAYS];
  logic [LAT_BITS-1:0] req_set_lat;
  assign req_idx = req_va[OFF_W +: IDX_W];

  set_map #(.WAYS(WAYS), .SETS(SETS), .R(R), .LAT_BITS(LAT_BITS)) u_map (
    .line_lat (line_lat),
    .idx      (req_idx),
    .row      (req_row),
    .set_lat  (req_set_lat)
  );

  logic [IDX_W-1:0] tbl_row [WAYS];
  set_map #(.WAYS(WAYS), .SETS(SETS), .R(R), .LAT_BITS(LAT_BITS)) u_tbl (
    .line_lat (line_lat),
    .idx      (tbl_idx),
    .row      (tbl_row),
    .set_lat  (tbl_lat)
  );

  // ---- tag compare ----
  logic             hit;
  logic [WAY_W-1:0] hit_way;
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!hit && valid_q[row_q[w]][w] && tag_q[w][row_q[w]] == ptag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
  end

  // ---- victim: first invalid way, else the oldest ----
  logic [WAY_W-1:0] victim;
  always_comb begin
    logic found;
    found  = 1'b0;
    victim = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!found && !valid_q[row_q[w]][w]) begin
        found  = 1'b1;
        victim = WAY_W'(w);
      end
    end
    if (!found) begin
      for (int w = 0; w < WAYS; w++) begin
        if (age_q[w][idx_q] == WAY_W'(WAYS - 1)) victim = WAY_W'(w);
      end
    end
  end

  logic compare;
  assign compare            = state_q == IC_ACCESS && cnt_q == '0 && ptag_valid;
  assign ready              = state_q == IC_IDLE;
  assign resp_valid         = compare && hit;
  assign resp_data          = data_q[hit_way][row_q[hit_way]];
  assign resp_lat_violation = resp_valid && viol_q;
  assign evt_miss           = compare && !hit;
  assign l2_req             = evt_miss;
  assign l2_addr            = {ptag, pgb_q};

  // ---- LRU ages: the used way becomes 0, younger ways age by one ----
  logic             touch;
  logic [WAY_W-1:0] touch_way;
  assign touch     = resp_valid || (state_q == IC_REFILL && l2_resp_valid);
  assign touch_way = resp_valid ? hit_way : victim;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) age_q[w][s] <= WAY_W'(w);
    end else if (touch) begin
      for (int w = 0; w < WAYS; w++) begin
        if (WAY_W'(w) == touch_way)                        age_q[w][idx_q] <= '0;
        else if (age_q[w][idx_q] < age_q[touch_way][idx_q]) age_q[w][idx_q] <= age_q[w][idx_q] + 1'b1;
      end
    end
  end

  // ---- control ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IC_IDLE;
      cnt_q   <= '0;
      idx_q   <= '0;
      pgb_q   <= '0;
      viol_q  <= 1'b0;
      for (int w = 0; w < WAYS; w++) row_q[w] <= '0;
    end else begin
      unique case (state_q)
        IC_IDLE: if (req_valid) begin
          state_q <= IC_ACCESS;
          cnt_q   <= (req_lat == '0) ? '0 : req_lat - 1'b1;
          idx_q   <= req_idx;
          pgb_q   <= req_va[OFF_W +: PGB_W];
          viol_q  <= {1'b0, req_lat} < (LATC_W+1)'(BASE_LAT) + (LATC_W+1)'(req_set_lat);
          row_q   <= req_row;
        end
        IC_ACCESS: begin
          if (cnt_q != '0)   cnt_q   <= cnt_q - 1'b1;
          else if (compare)  state_q <= hit ? IC_IDLE : IC_REFILL;
        end
        IC_REFILL: if (l2_resp_valid) begin
          state_q <= IC_ACCESS;     // replay the compare next cycle
          viol_q  <= 1'b0;          // the block now comes from the refill
        end
        default: state_q <= IC_IDLE;
      endcase
    end
  end

  // ---- arrays ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) valid_q[s] <= '0;
    end else if (fm_we) begin
      for (int s = 0; s < SETS; s++) valid_q[s] <= '0;
    end else if (state_q == IC_REFILL && l2_resp_valid) begin
      valid_q[row_q[victim]][victim] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (state_q == IC_REFILL && l2_resp_valid) begin
      tag_q[victim][row_q[victim]]  <= ptag;
      data_q[victim][row_q[victim]] <= l2_resp_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < WAYS; w++)
        for (int s = 0; s < SETS; s++) line_lat[w][s] <= '0;
    end else if (fm_we) begin
      line_lat[fm_way][fm_row] <= fm_lat;
    end
  end

endmodule
