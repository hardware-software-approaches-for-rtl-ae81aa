// fetch_buffer: one-block buffer between the instruction cache and the core.
//
// Holds the last cache block read and its virtual block address. A fetch
// whose PC lies in that block is served from here without a cache access;
// a whole block is read from the cache only when the PC leaves it. When a
// block is being written (wr_en) it is also presented on the output in the
// same cycle, so fetch can take instructions from a block in the cycle the
// cache returns it (bypass, this design's own choice). A block written for
// another address does not disturb a hit on the stored block in that cycle:
// this happens when a redirect returns into the buffered block while the
// access for the block after it is still completing.
//
// Interface: look_blk (PC without its block-offset bits) in; hit, data and
// bypass out, combinational. wr_en/wr_blk/wr_data load at the clock edge;
// flush empties the buffer.
module fetch_buffer
  import ifetch_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  flush,
  input  logic                  wr_en,
  input  logic [VA_W-OFF_W-1:0] wr_blk,
  input  blk_t                  wr_data,
  input  logic [VA_W-OFF_W-1:0] look_blk,
  output logic                  hit,
  output logic                  bypass,
  output blk_t                  data
);

  logic                  valid_q;
  logic [VA_W-OFF_W-1:0] blk_q;
  blk_t                  data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      blk_q   <= '0;
    end else if (flush) begin
      valid_q <= 1'b0;
    end else if (wr_en) begin
      valid_q <= 1'b1;
      blk_q   <= wr_blk;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) data_q <= wr_data;
  end

  assign bypass = wr_en && (wr_blk == look_blk);
  assign hit    = bypass || (valid_q && blk_q == look_blk);
  assign data   = bypass ? wr_data : data_q;

endmodule
