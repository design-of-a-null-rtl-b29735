// tb_output_sequencer: checks the output sequencer against its output table.
//
// After reset the ring is stepped by toggling Ki (1, 0, 1, ...) for two full
// turns of 16 cycles, and S0/S1 are compared with the table after each step.
// Bit c of the expected vectors is the value in cycle c (bit 0 is the
// initial state after reset). The sequencer has no clock; the testbench
// waits 1 ns after every Ki change for the ring to settle.
`timescale 1ns/1ps
module tb_output_sequencer;
  logic ki, rst, s0, s1;
  int   checks = 0, failures = 0;

  localparam logic [16:0] EXP_S0 = 17'b1_1101_0101_0101_0101;
  localparam logic [16:0] EXP_S1 = 17'b0_1000_0000_0000_0000;

  output_sequencer #(.ITER(8)) dut (.ki(ki), .rst(rst), .s0(s0), .s1(s1));

  task automatic check(input int cyc);
    checks++;
    if (s0 !== EXP_S0[cyc] || s1 !== EXP_S1[cyc]) begin
      failures++;
      $display("cycle %0d: S0=%0b S1=%0b, expected S0=%0b S1=%0b", cyc, s0, s1,
               EXP_S0[cyc], EXP_S1[cyc]);
    end
  endtask

  initial begin
    rst = 1'b1;
    ki  = 1'b0;
    #5;
    rst = 1'b0;
    #1;
    check(0);
    for (int turn = 0; turn < 2; turn++)
      for (int c = 1; c <= 16; c++) begin
        ki = c[0];
        #1;
        check(c);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
