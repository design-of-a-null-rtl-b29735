// tb_select_reg: checks the 8-bit Select register.
//
// DATA must not pass while S is deasserted, even with Ki = rfd; with S
// asserted it passes and Ko goes rfn. NULL must not pass while S is still
// asserted, even with Ki = rfn; once S drops it passes and Ko goes rfd.
// Checks run 1 ns after each change.
`timescale 1ns/1ps
module tb_select_reg;
  import ncl_pkg::*;
  localparam int unsigned W = 8;
  dr_t [W-1:0] d, f;
  logic        s, ki, rst, ko;
  int          checks = 0, failures = 0;

  select_reg #(.W(W)) dut (.d(d), .s(s), .ki(ki), .rst(rst), .f(f), .ko(ko));

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
    logic [W-1:0] v;
    rst = 1'b1; ki = 1'b1; s = 1'b0; d = '0;
    #1;
    rst = 1'b0;
    expect_state("reset", '0, 1'b1);
    for (int k = 0; k < 50; k++) begin
      v = W'($urandom);
      d = enc(v);
      expect_state("DATA blocked, S low", '0, 1'b1);
      s = 1'b1;
      expect_state("DATA passed", enc(v), 1'b0);
      d = '0;
      ki = 1'b0;
      expect_state("NULL blocked, S high", enc(v), 1'b0);
      s = 1'b0;
      expect_state("NULL passed", '0, 1'b1);
      ki = 1'b1;
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
