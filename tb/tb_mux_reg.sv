// tb_mux_reg: checks the 4-bit MUX Reg.
//
// For random DATA words on D0 and D1 and a random DATA select per bit, the
// output must be D0 where S is DATA0 and D1 where S is DATA1, once Ki is
// rfd, and Ko must go rfn. The word must not pass while Ki is rfn, and is
// held while the inputs return to NULL until Ki goes rfn, after which the
// output is NULL and Ko rfd. Checks run 1 ns after each change.
`timescale 1ns/1ps
module tb_mux_reg;
  import ncl_pkg::*;
  localparam int unsigned W = 4;
  dr_t [W-1:0] d0, d1, s, f;
  logic        ki, rst, ko;
  int          checks = 0, failures = 0;

  mux_reg #(.W(W)) dut (.d0(d0), .d1(d1), .s(s), .ki(ki), .rst(rst), .f(f), .ko(ko));

  function automatic dr_t [W-1:0] enc(input logic [W-1:0] v);
    dr_t [W-1:0] x;
    for (int i = 0; i < W; i++) x[i] = dr_enc(v[i]);
    return x;
  endfunction

  task automatic expect_state(input string what, input dr_t [W-1:0] ef, input logic eko);
    #1;
    checks++;
    if (f !== ef || ko !== eko) begin
      failures++;
      $display("%s: f=%h ko=%b expected f=%h ko=%b", what, f, ko, ef, eko);
    end
  endtask

  initial begin
    logic [W-1:0] v0, v1, vs;
    rst = 1'b1; ki = 1'b0; d0 = '0; d1 = '0; s = '0;
    #1;
    rst = 1'b0;
    expect_state("reset", '0, 1'b1);
    for (int k = 0; k < 60; k++) begin
      v0 = W'($urandom); v1 = W'($urandom); vs = W'($urandom);
      d0 = enc(v0); d1 = enc(v1); s = enc(vs);
      expect_state("blocked by rfn", '0, 1'b1);
      ki = 1'b1;
      expect_state("selected word", enc((v1 & vs) | (v0 & ~vs)), 1'b0);
      d0 = '0; d1 = '0; s = '0;
      expect_state("held", enc((v1 & vs) | (v0 & ~vs)), 1'b0);
      ki = 1'b0;
      expect_state("NULL", '0, 1'b1);
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
