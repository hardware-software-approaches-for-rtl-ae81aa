// line_reshuffle: programmable address decoder of one reshuffling group.
//
// A reshuffling group is the 2^R lines of one cache way that sit in 2^R
// consecutive sets. Each line k carries a fault bit f[k] (1 = imperfect,
// slow because of process variation) found by a March test. The decoder
// places the addresses of the group so that the low set-index values go to
// perfect lines and the high ones to imperfect lines: perfect line k takes
// address p(k), the number of perfect lines before it; imperfect line k
// takes address 2^R-1-m(k), where m(k) is the number of imperfect lines
// before it. For R = 2 and f = (1,0,1,0) the addresses 0,1,2,3 land in lines
// 1,3,2,0. This rule reproduces every row of the published 16-row mapping
// table for R = 2 and generalises it to any R.
//
// Inputs: f (fault bits of the group's lines), a (the R low set-index bits).
// Outputs: sel, the one-hot word-line enable, and line, its binary index.
// Purely combinational.
module line_reshuffle #(
  parameter int unsigned R = 3
) (
  input  logic [(1<<R)-1:0] f,
  input  logic [R-1:0]      a,
  output logic [(1<<R)-1:0] sel,
  output logic [R-1:0]      line
);

  localparam int unsigned N = 1 << R;

  always_comb begin
    logic [R:0] n_perf, n_imp;
    logic [R:0] slot;
    n_perf = '0;
    n_imp  = '0;
    sel    = '0;
    line   = '0;
    for (int k = 0; k < N; k++) begin
      if (f[k]) begin
        slot  = (R+1)'(N - 1) - n_imp;
        n_imp = n_imp + 1'b1;
      end else begin
        slot   = n_perf;
        n_perf = n_perf + 1'b1;
      end
      if (slot[R-1:0] == a) begin
        sel[k] = 1'b1;
        line   = R'(k);
      end
    end
  end

endmodule
