// tb_ncl_completion: checks the completion component (a 5-input C-element)
// against a reference that rises when all inputs are 1, falls when all are
// 0 and holds otherwise, for random input vectors and for the reset value.
`timescale 1ns/1ps
module tb_ncl_completion;
  logic [4:0] a;
  logic       rst, z, ref_z;
  int         checks = 0, failures = 0;

  ncl_completion #(.N(5), .RST_VAL(1'b1)) dut (.a(a), .rst(rst), .z(z));

  initial begin
    rst = 1'b1;
    a   = '0;
    #1;
    checks++;
    if (z !== 1'b1) begin failures++; $display("reset value wrong"); end
    rst = 1'b0;
    ref_z = 1'b1;
    a = 5'b00100;
    #1;
    for (int k = 0; k < 600; k++) begin
      // bias towards all-ones and all-zeros so that both edges happen
      case ($urandom_range(3, 0))
        0: a = '1;
        1: a = '0;
        default: a = 5'($urandom);
      endcase
      #1;
      if (a == '1) ref_z = 1'b1;
      else if (a == '0) ref_z = 1'b0;
      checks++;
      if (z !== ref_z) begin
        failures++;
        $display("a=%b z=%b expected %b", a, z, ref_z);
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
