// tb_trial_sub: exhaustive check of the trial subtractor and quotient bit.
//
// For every 5-bit partial-remainder top p and 4-bit divisor D, the inverted
// divisor is applied as DATA and the outputs must be diff = (p - D) mod 16
// and q = (p >= D). Before each full word, one input bit is left NULL: then
// at least one output must still be NULL (input-completeness). After each
// word all inputs return to NULL and all outputs must be NULL.
`timescale 1ns/1ps
module tb_trial_sub;
  import ncl_pkg::*;
  localparam int unsigned M = 4;
  dr_t [M:0]   pr_top;
  dr_t [M-1:0] dinv, diff;
  dr_t         q;
  int          checks = 0, failures = 0;

  trial_sub #(.M(M)) dut (.pr_top(pr_top), .dinv(dinv), .diff(diff), .q(q));

  function automatic logic all_out_data();
    for (int i = 0; i < M; i++) if (!dr_is_data(diff[i])) return 1'b0;
    return dr_is_data(q);
  endfunction

  initial begin
    logic [M-1:0] exp_diff, got_diff;
    int hole;
    pr_top = '0; dinv = '0;
    #1;
    for (int p = 0; p < 2**(M+1); p++)
      for (int dv = 0; dv < 2**M; dv++) begin
        hole = $urandom_range(2*M, 0);
        for (int i = 0; i <= M; i++) pr_top[i] = (i == hole) ? DR_NULL : dr_enc(p[i]);
        for (int i = 0; i < M; i++) dinv[i] = (i + M + 1 == hole) ? DR_NULL : dr_enc(!dv[i]);
        #1;
        checks++;
        if (all_out_data()) begin
          failures++;
          $display("p=%0d D=%0d: outputs complete with input bit %0d NULL", p, dv, hole);
        end
        for (int i = 0; i <= M; i++) pr_top[i] = dr_enc(p[i]);
        for (int i = 0; i < M; i++) dinv[i] = dr_enc(!dv[i]);
        #1;
        exp_diff = M'(p - dv);
        for (int i = 0; i < M; i++) got_diff[i] = diff[i].rail1;
        checks++;
        if (!all_out_data() || got_diff !== exp_diff || q.rail1 !== (p >= dv)) begin
          failures++;
          $display("p=%0d D=%0d: diff=%0d q=%0b expected diff=%0d q=%0b", p, dv, got_diff,
                   q.rail1, exp_diff, p >= dv);
        end
        pr_top = '0; dinv = '0;
        #1;
        checks++;
        if (diff != '0 || q != DR_NULL) begin
          failures++;
          $display("p=%0d D=%0d: outputs not NULL after NULL inputs", p, dv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
