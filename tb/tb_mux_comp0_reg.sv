// tb_mux_comp0_reg: checks the 8-bit MUX COMP0 Reg.
//
// With S1 asserted and D1 DATA, nothing may pass until D0 is DATA too
// (input-completeness with respect to D0); then F = D1, Ko = rfn and ld = 1.
// With S0 asserted F = D0 and ld stays 0. NULL passes only after D0, D1,
// both selects and Ki are all low again. Checks run 1 ns after each change.
`timescale 1ns/1ps
module tb_mux_comp0_reg;
  import ncl_pkg::*;
  localparam int unsigned W = 8;
  dr_t [W-1:0] d0, d1, f;
  logic        s0, s1, ki, rst, ko, ld;
  int          checks = 0, failures = 0;

  mux_comp0_reg #(.W(W)) dut (
    .d0(d0), .d1(d1), .s0(s0), .s1(s1), .ki(ki), .rst(rst), .f(f), .ko(ko), .ld(ld));

  function automatic dr_t [W-1:0] enc(input logic [W-1:0] v);
    dr_t [W-1:0] x;
    for (int i = 0; i < W; i++) x[i] = dr_enc(v[i]);
    return x;
  endfunction

  task automatic expect_state(input string what, input dr_t [W-1:0] ef, input logic eko,
                              input logic eld);
    #1;
    checks++;
    if (f !== ef || ko !== eko || ld !== eld) begin
      failures++;
      $display("%s: f=%h ko=%b ld=%b expected f=%h ko=%b ld=%b", what, f, ko, ld, ef, eko, eld);
    end
  endtask

  task automatic to_null();
    d0 = '0; d1 = '0; s0 = 1'b0; s1 = 1'b0;
    #1;
    ki = 1'b0;
    #1;
    ki = 1'b1;
  endtask

  initial begin
    logic [W-1:0] v0, v1;
    rst = 1'b1; ki = 1'b1; d0 = '0; d1 = '0; s0 = 1'b0; s1 = 1'b0;
    #1;
    rst = 1'b0;
    expect_state("reset", '0, 1'b1, 1'b0);
    for (int k = 0; k < 40; k++) begin
      v0 = W'($urandom); v1 = W'($urandom);
      // load D1
      s1 = 1'b1; d1 = enc(v1);
      expect_state("D1 waits for D0", '0, 1'b1, 1'b0);
      d0 = enc(v0);
      expect_state("D1 loaded", enc(v1), 1'b0, 1'b1);
      d0 = '0; d1 = '0; s1 = 1'b0;
      expect_state("D1 held", enc(v1), 1'b0, 1'b1);
      ki = 1'b0;
      expect_state("NULL after D1", '0, 1'b1, 1'b0);
      ki = 1'b1;
      // feed back D0
      s0 = 1'b1; d0 = enc(v0); d1 = enc(~v0);
      expect_state("D0 selected", enc(v0), 1'b0, 1'b0);
      d0 = '0; s0 = 1'b0; d1 = '0;
      ki = 1'b0;
      expect_state("NULL after D0", '0, 1'b1, 1'b0);
      to_null();
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
