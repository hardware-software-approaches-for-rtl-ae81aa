// fetch_queue: instruction queue between the fetch stage and decode.
//
// A circular buffer of DEPTH entries (PC and instruction). Up to W entries
// are pushed per cycle (push_cnt, entries in push[0..push_cnt-1]) and up to
// W popped per cycle (pop_cnt, must not exceed count). The W oldest entries
// are always visible on head[]; count and free tell the occupancy. flush
// empties the queue (used on a PC redirect) and wins over push and pop.
// A push beyond the free space is a usage error, caught by an assertion.
module fetch_queue
  import ifetch_pkg::*;
#(
  parameter int unsigned DEPTH = FQ_DEPTH,
  parameter int unsigned W     = FETCH_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic [$clog2(W+1)-1:0]   push_cnt,
  input  fq_entry_t                push [W],
  input  logic [$clog2(W+1)-1:0]   pop_cnt,
  output fq_entry_t                head [W],
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] free
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  fq_entry_t     mem_q [DEPTH];
  logic [PW-1:0] rd_q, wr_q;
  logic [CW-1:0] cnt_q;

  assign count = cnt_q;
  assign free  = CW'(DEPTH) - cnt_q;

  always_comb begin
    for (int i = 0; i < W; i++) head[i] = mem_q[PW'((32'(rd_q) + i) % DEPTH)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else if (flush) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      rd_q  <= PW'((32'(rd_q) + 32'(pop_cnt)) % DEPTH);
      wr_q  <= PW'((32'(wr_q) + 32'(push_cnt)) % DEPTH);
      cnt_q <= cnt_q + CW'(push_cnt) - CW'(pop_cnt);
    end
  end

  always_ff @(posedge clk) begin
    if (!flush) begin
      for (int i = 0; i < W; i++)
        if (i < int'(push_cnt)) mem_q[PW'((32'(wr_q) + i) % DEPTH)] <= push[i];
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                  CW'(push_cnt) <= free + CW'(pop_cnt));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                   CW'(pop_cnt) <= cnt_q);

endmodule
