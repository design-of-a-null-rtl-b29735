// ncl_th: NCL threshold gate THmn with hysteresis (optionally weighted and
// resettable).
//
// The output asserts once the weighted sum of the asserted inputs reaches
// the threshold M, and deasserts only when every input has deasserted
// again; in between it holds its value. This hysteresis is what makes
// every NCL gate state-holding. With all weights 1 and M = N the gate is an
// N-input C-element. A resettable gate (the "n"/"N" and "D" gates of the
// schematics) is forced to RST_VAL while rst is high; for a gate that is
// not resettable tie rst to 0.
//
// Interface: a[N-1:0] inputs, W packs one 4-bit weight per input (input i
// uses W[4*i +: 4]), z output. There is no clock: the state is held by
// feeding the output back into its own set/hold equation, which is how the
// gate maps onto a generic cell library without NCL cells. Tools therefore
// report a combinational loop through z; that loop is the gate's storage and
// is intended. (Written as a continuous assignment rather than always_latch
// so that a simulator re-evaluates the gate on every input change.) The
// threshold behaviour follows the NCL description of THmn gates; the
// feedback coding and the 4-bit weight field are this design's choice.
module ncl_th #(
  parameter int unsigned    M      = 2,
  parameter int unsigned    N      = 2,
  parameter logic [4*N-1:0] W      = {N{4'd1}},
  parameter bit             RST_VAL = 1'b0
) (
  input  logic [N-1:0] a,
  input  logic         rst,
  output logic         z
);

  logic [7:0] wsum;
  logic       set_c;
  logic       clr_c;

  always_comb begin
    wsum = '0;
    for (int unsigned i = 0; i < N; i++)
      if (a[i]) wsum = wsum + 8'(W[4*i +: 4]);
    set_c = (wsum >= 8'(M));
    clr_c = (a == '0);
  end

  // set/reset latch with the gate's output fed back: set wins, clear only
  // when every input is low, hold otherwise
  assign z = rst ? RST_VAL : (set_c | (z & ~clr_c));

endmodule
