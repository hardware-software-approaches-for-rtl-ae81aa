// tb_fetch_ctrl: checks the fetch controller against a simple buffer and
// cache model.
//
// Memory words are a hash of their address with a random hint bit in
// bit 0. The checks: every pushed instruction has the next expected PC and
// its memory word, at most 4 per cycle and never more than the queue's free
// space or past the block end; every cache request asks for exactly the
// expected wait: worst case after reset and after an exception redirect,
// the redirect's hint after a branch redirect, and otherwise 1 + the hint
// bit of the last instruction of the block just left (the hints of other
// instructions must be ignored).
module tb_fetch_ctrl;
  import ifetch_pkg::*;
  int checks = 0, failures = 0;
  int n_req = 0, n_slow = 0, n_intl = 0, n_redir = 0;

  logic clk = 0, rst_n = 0;
  logic redirect_valid = 0, redirect_exc = 0;
  va_t redirect_pc = '0;
  logic [0:0] redirect_hint = '0;
  logic [VA_W-OFF_W-1:0] look_blk, fill_blk;
  logic buf_hit;
  blk_t buf_data;
  logic ic_ready, ic_req_valid, ic_resp_valid, xl_req;
  va_t ic_req_va, pc;
  logic [LATC_W-1:0] ic_req_lat;
  vpn_t xl_vpn;
  logic [3:0] fq_free = 4'd8;
  logic [2:0] push_cnt;
  fq_entry_t push [FETCH_W];
  logic evt_access, evt_slow, evt_interlock;

  fetch_ctrl dut (.*);
  always #5 clk = ~clk;

  function automatic instr_t mem(va_t a);
    logic [31:0] h;
    h = 32'(a) * 32'h9e3779b1 ^ 32'(a >> 7);
    return {h[31:1], h[13]};
  endfunction
  function automatic blk_t mem_blk(logic [VA_W-OFF_W-1:0] b);
    blk_t d;
    for (int i = 0; i < BLK_INSTRS; i++) d[i*INSTR_W +: INSTR_W] = mem({b, OFF_W'(i * INSTR_B)});
    return d;
  endfunction

  // buffer and cache model
  logic bv = 0; logic [VA_W-OFF_W-1:0] bblk;
  int   wait_left = -1;
  logic [VA_W-OFF_W-1:0] pend_blk;
  assign buf_hit       = bv && bblk == look_blk;
  assign buf_data      = mem_blk(bblk);
  assign ic_ready      = wait_left < 0;
  assign ic_resp_valid = wait_left == 0;
  always @(posedge clk) begin
    if (ic_resp_valid) begin bv <= 1; bblk <= pend_blk; wait_left <= -1; end
    else if (wait_left > 0) wait_left <= wait_left - 1;
    if (ic_req_valid) begin wait_left <= int'(ic_req_lat) - 1; pend_blk <= ic_req_va[VA_W-1:OFF_W]; end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // expected state
  va_t exp_pc = '0;
  int  exp_lat = 2;
  always @(posedge clk) if (rst_n) begin
    if (ic_req_valid) begin
      n_req++;
      n_slow += int'(evt_slow);
      n_intl += int'(evt_interlock);
      check(int'(ic_req_lat) == exp_lat, $sformatf("request for %0h waits %0d, want %0d", ic_req_va, ic_req_lat, exp_lat));
      check(xl_req && xl_vpn == ic_req_va[VA_W-1:PO_W], "translation started with the access");
      check(ic_req_va == exp_pc, "request address");
    end
    if (redirect_valid) begin
      n_redir++;
      exp_pc  = redirect_pc;
      exp_lat = redirect_exc ? 2 : 1 + int'(redirect_hint);
      check(push_cnt == 0, "no delivery in a redirect cycle");
    end else begin
      check(push_cnt <= 3'(FETCH_W) && int'(push_cnt) <= int'(fq_free), "delivery limits");
      for (int i = 0; i < int'(push_cnt); i++) begin
        check(push[i].pc == exp_pc && push[i].instr == mem(exp_pc), $sformatf("pushed pc %0h want %0h", push[i].pc, exp_pc));
        if (exp_pc[OFF_W-1:0] == OFF_W'(BLK_BYTES - INSTR_B)) exp_lat = 1 + int'(mem(exp_pc)[0]);
        exp_pc += INSTR_B;
        check(i == int'(push_cnt) - 1 || exp_pc[OFF_W-1:0] != '0, "no delivery past the block end");
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      fq_free = 4'($urandom_range(0, 8));
      redirect_valid = ($urandom_range(0, 99) < 3);
      redirect_exc   = ($urandom_range(0, 3) == 0);
      redirect_hint  = 1'($urandom);
      redirect_pc    = va_t'($urandom_range(0, 1 << 16)) << 2;
    end
    @(negedge clk); redirect_valid = 0;
    repeat (20) @(negedge clk);
    check(n_req > 50 && n_slow > 10 && n_intl > 5 && n_redir > 20,
          $sformatf("coverage: req %0d slow %0d interlock %0d redirect %0d", n_req, n_slow, n_intl, n_redir));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
