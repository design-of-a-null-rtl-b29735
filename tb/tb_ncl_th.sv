// tb_ncl_th: checks the threshold gate against a step-by-step reference.
//
// Three gates are tested: TH23 (2 of 3), TH34w2 (threshold 3, first input
// weight 2) and a resettable TH22 that resets to 1. Random input vectors
// are applied one every 1 ns; the reference keeps the previous output and
// sets it when the weighted count reaches the threshold, clears it when all
// inputs are 0, and holds it otherwise (hysteresis).
`timescale 1ns/1ps
module tb_ncl_th;
  logic [2:0] a3;
  logic [3:0] a4;
  logic [1:0] a2;
  logic       rst;
  logic       z23, z34, z22;
  logic       r23, r34, r22;
  int         checks = 0, failures = 0;
  int         n_hold = 0;

  ncl_th #(.M(2), .N(3)) u_th23 (.a(a3), .rst(1'b0), .z(z23));
  ncl_th #(.M(3), .N(4), .W({4'd2, 4'd1, 4'd1, 4'd1})) u_th34w2 (.a(a4), .rst(1'b0), .z(z34));
  ncl_th #(.M(2), .N(2), .RST_VAL(1'b1)) u_th22d (.a(a2), .rst(rst), .z(z22));

  function automatic logic next(input logic prev, input int wsum, input int thr, input logic none);
    if (wsum >= thr) return 1'b1;
    if (none) return 1'b0;
    return prev;
  endfunction

  task automatic cmp(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0b expected %0b", name, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1;
    a3 = '0; a4 = '0; a2 = '0;
    #1;
    cmp("TH22D reset", z22, 1'b1);
    r22 = 1'b1; r23 = 1'b0; r34 = 1'b0;
    rst = 1'b0;
    a2 = 2'b01;
    #1;
    cmp("TH22D hold after reset", z22, 1'b1);
    for (int k = 0; k < 400; k++) begin
      a3 = 3'($urandom);
      a4 = 4'($urandom);
      a2 = 2'($urandom);
      #1;
      r23 = next(r23, int'(a3[0]) + int'(a3[1]) + int'(a3[2]), 2, a3 == 0);
      r34 = next(r34, 2 * int'(a4[3]) + int'(a4[2]) + int'(a4[1]) + int'(a4[0]), 3, a4 == 0);
      r22 = next(r22, int'(a2[0]) + int'(a2[1]), 2, a2 == 0);
      if (r23 && (int'(a3[0]) + int'(a3[1]) + int'(a3[2]) < 2)) n_hold++;
      cmp("TH23", z23, r23);
      cmp("TH34w2", z34, r34);
      cmp("TH22", z22, r22);
    end
    checks++;
    if (n_hold == 0) begin
      failures++;
      $display("hysteresis hold never exercised");
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
