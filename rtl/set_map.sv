// set_map: reshuffled row of every way and the latency of a cache set.
//
// For a logical set index idx, each way's programmable decoder picks the
// physical row inside idx's reshuffling group (a line_reshuffle per way,
// driven by that way's per-line latencies). The set's latency is the
// largest latency among the lines it then uses, one per way, because the
// compiler can only know which set, not which line, an instruction will
// occupy.
//
// line_lat[w][row] is the extra access latency (in cycles, 0 = perfect) of
// physical line `row` of way w; a line is imperfect when it is non-zero.
// Outputs: row[w] for each way and set_lat, the set's extra latency.
// Purely combinational.
module set_map #(
  parameter int unsigned WAYS     = 4,
  parameter int unsigned SETS     = 256,
  parameter int unsigned R        = 3,
  parameter int unsigned LAT_BITS = 1
) (
  input  logic [LAT_BITS-1:0]      line_lat [WAYS][SETS],
  input  logic [$clog2(SETS)-1:0]  idx,
  output logic [$clog2(SETS)-1:0]  row [WAYS],
  output logic [LAT_BITS-1:0]      set_lat
);

  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned N     = 1 << R;
  localparam int unsigned GRP_W = IDX_W - R;

  logic [GRP_W-1:0] grp;
  assign grp = idx[IDX_W-1:R];

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [N-1:0] f;
    logic [N-1:0] sel;
    logic [R-1:0] line;
    always_comb begin
      for (int k = 0; k < N; k++) f[k] = |line_lat[w][{grp, R'(k)}];
    end
    line_reshuffle #(.R(R)) u_dec (
      .f    (f),
      .a    (idx[R-1:0]),
      .sel  (sel),
      .line (line)
    );
    assign row[w] = {grp, line};
  end

  always_comb begin
    set_lat = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (line_lat[w][row[w]] > set_lat) set_lat = line_lat[w][row[w]];
    end
  end

endmodule
