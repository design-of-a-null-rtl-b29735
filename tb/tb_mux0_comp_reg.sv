// tb_mux0_comp_reg: checks the 4-bit MUX0 COMP Reg.
//
// With S1 asserted the output must become all DATA0, but only once D0 is
// DATA (input-completeness with respect to D0); with S0 asserted the output
// is D0. Both must be blocked while Ki is rfn, and NULL passes once D0, the
// selects and Ki are low. Checks run 1 ns after each change.
`timescale 1ns/1ps
module tb_mux0_comp_reg;
  import ncl_pkg::*;
  localparam int unsigned W = 4;
  dr_t [W-1:0] d0, f;
  logic        s0, s1, ki, rst, ko;
  int          checks = 0, failures = 0;

  mux0_comp_reg #(.W(W)) dut (.d0(d0), .s0(s0), .s1(s1), .ki(ki), .rst(rst), .f(f), .ko(ko));

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
    logic [W-1:0] v0;
    rst = 1'b1; ki = 1'b0; d0 = '0; s0 = 1'b0; s1 = 1'b0;
    #1;
    rst = 1'b0;
    expect_state("reset", '0, 1'b1);
    for (int k = 0; k < 50; k++) begin
      v0 = W'($urandom);
      s1 = 1'b1;
      expect_state("zeros wait for D0 and Ki", '0, 1'b1);
      ki = 1'b1;
      expect_state("zeros wait for D0", '0, 1'b1);
      d0 = enc(v0);
      expect_state("zeros loaded", enc('0), 1'b0);
      d0 = '0; s1 = 1'b0;
      expect_state("zeros held", enc('0), 1'b0);
      ki = 1'b0;
      expect_state("NULL", '0, 1'b1);
      s0 = 1'b1; d0 = enc(v0);
      expect_state("D0 blocked by rfn", '0, 1'b1);
      ki = 1'b1;
      expect_state("D0 passed", enc(v0), 1'b0);
      d0 = '0; s0 = 1'b0;
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
