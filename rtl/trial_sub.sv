// trial_sub: trial subtraction and quotient-bit decision of one restoring
// division iteration, in dual-rail NCL logic.
//
// Input pr_top is the top M+1 bits of the partial remainder (PR), dinv the
// divisor already stored inverted. The M-bit ripple-carry adder forms
// pr_top[M-1:0] + dinv + 1 = pr_top[M-1:0] - D: its first column has the
// carry-in fixed at 1, so that column is sum = x XNOR y, carry = x OR y,
// built from ncl_dr_fn2; the other columns are ncl_full_adder cells. The
// quotient bit is q = pr_top[M] OR carry-out: the trial difference is
// non-negative either when the PR's top bit is 1 or when the adder carries
// out. diff is the low M bits of the trial difference, which is the new top
// of the PR whenever q = 1. All outputs are DATA only once every input is
// DATA. The subtraction through the inverted divisor, the OR and the bit
// ranges follow the document's description of the algorithm; the adder cells
// are this design's.
//
// Interface: pr_top[M:0], dinv[M-1:0] (dual-rail) in; diff[M-1:0], q
// (dual-rail) out. Purely combinational apart from gate hysteresis.
// Lint and synthesis report combinational loops through this block: they
// are the output feedback of its NCL threshold gates (see ncl_th) and,
// where handshakes close a ring, the asynchronous Ki/Ko loops. Both are
// intended: this is clockless, state-holding logic.
module trial_sub
  import ncl_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  dr_t [M:0]   pr_top,
  input  dr_t [M-1:0] dinv,
  output dr_t [M-1:0] diff,
  output dr_t         q
);

  dr_t [M:1] c;   // c[i] is the carry out of column i-1

  // column 0: carry-in is the constant 1 of the two's complement
  ncl_dr_fn2 #(.TRUTH(4'b1001)) u_s0 (.a(pr_top[0]), .b(dinv[0]), .y(diff[0]));
  ncl_dr_fn2 #(.TRUTH(4'b1110)) u_c0 (.a(pr_top[0]), .b(dinv[0]), .y(c[1]));

  for (genvar i = 1; i < M; i++) begin : g_col
    ncl_full_adder u_fa (.x(pr_top[i]), .y(dinv[i]), .ci(c[i]), .s(diff[i]), .co(c[i+1]));
  end

  ncl_dr_fn2 #(.TRUTH(4'b1110)) u_q (.a(pr_top[M]), .b(c[M]), .y(q));

endmodule
