// tb_ncl_reg: checks the dual-rail NCL register (4 bits, reset to DATA0)
// through its four-phase handshake.
//
// After reset the output must be DATA0 with Ko = rfn. Then, for random
// words: NULL is offered with Ki = rfd (must not pass), Ki = rfn lets NULL
// through (Ko = rfd); a DATA word is offered with Ki = rfn (must not pass),
// Ki = rfd lets it through (Ko = rfn), and it must be held when the input
// returns to NULL while Ki is still rfd. Checks run 1 ns after each change.
`timescale 1ns/1ps
module tb_ncl_reg;
  import ncl_pkg::*;
  localparam int unsigned W = 4;
  dr_t [W-1:0] d, f;
  logic        ki, rst, ko;
  int          checks = 0, failures = 0;

  ncl_reg #(.W(W), .RST_DATA0(1'b1)) dut (.d(d), .ki(ki), .rst(rst), .f(f), .ko(ko));

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
    rst = 1'b1; ki = 1'b1; d = '0;
    #1;
    rst = 1'b0;
    expect_state("reset", enc('0), 1'b0);
    for (int k = 0; k < 50; k++) begin
      v = W'($urandom);
      d = '0;
      expect_state("NULL blocked by rfd", f, 1'b0);
      ki = 1'b0;
      expect_state("NULL passed", '0, 1'b1);
      d = enc(v);
      expect_state("DATA blocked by rfn", '0, 1'b1);
      ki = 1'b1;
      expect_state("DATA passed", enc(v), 1'b0);
      d = '0;
      expect_state("DATA held", enc(v), 1'b0);
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
