// tb_fetch_buffer: checks the one-block buffer: empty after reset, a written
// block is presented in the same cycle (bypass) and kept afterwards, only
// its own block address hits, a new write replaces it, flush empties it.
// A write of another block in the cycle the stored block is looked up must
// not change the data of that hit.
module tb_fetch_buffer;
  import ifetch_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, flush = 0, wr_en = 0, hit, bypass;
  logic [VA_W-OFF_W-1:0] wr_blk = '0, look_blk = '0;
  blk_t wr_data = '0, data;

  fetch_buffer dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic blk_t rnd_blk();
    blk_t b;
    for (int i = 0; i < BLK_BITS / 32; i++) b[i*32 +: 32] = $urandom;
    return b;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!hit, "empty after reset");
    for (int t = 0; t < 40; t++) begin
      blk_t b; logic [VA_W-OFF_W-1:0] a;
      b = rnd_blk(); a = {$urandom, $urandom};
      wr_en = 1; wr_blk = a; wr_data = b; look_blk = a; #1;
      check(hit && bypass && data == b, "bypass in the write cycle");
      @(negedge clk); wr_en = 0; #1;
      check(hit && !bypass && data == b, "block kept");
      look_blk = a + 1; #1;
      check(!hit, "other block misses");
      look_blk = a;
      wr_en = 1; wr_blk = a + 1; wr_data = rnd_blk(); #1;
      check(hit && !bypass && data == b, "stored block hit while another block is written");
      @(negedge clk); wr_en = 0;
      wr_blk = a; wr_data = b; wr_en = 1;
      @(negedge clk); wr_en = 0;
    end
    flush = 1; @(negedge clk); flush = 0; #1;
    check(!hit, "flush empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
