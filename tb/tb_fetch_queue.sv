// tb_fetch_queue: random pushes and pops of up to 4 entries per cycle
// against a reference queue; checks order, count, free space and flush.
module tb_fetch_queue;
  import ifetch_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [2:0] push_cnt = '0, pop_cnt = '0;
  fq_entry_t push [FETCH_W];
  fq_entry_t head [FETCH_W];
  logic [3:0] count, free;
  fq_entry_t model [$];

  fetch_queue dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq = 0;
    for (int i = 0; i < FETCH_W; i++) push[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int np, nq;
      @(negedge clk);
      check(int'(count) == model.size() && int'(free) == FQ_DEPTH - model.size(), "occupancy");
      for (int i = 0; i < FETCH_W && i < model.size(); i++)
        check(head[i] == model[i], $sformatf("head %0d", i));
      flush = ($urandom_range(0, 99) == 0);
      nq = $urandom_range(0, FETCH_W); if (nq > model.size()) nq = model.size();
      np = $urandom_range(0, FETCH_W); if (np > int'(free)) np = int'(free);
      pop_cnt = 3'(nq); push_cnt = 3'(np);
      for (int i = 0; i < FETCH_W; i++) begin
        push[i].pc = va_t'(seq + i); push[i].instr = $urandom;
      end
      @(posedge clk); #1;
      if (flush) model.delete();
      else begin
        repeat (nq) void'(model.pop_front());
        for (int i = 0; i < np; i++) model.push_back(push[i]);
        seq += np;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
