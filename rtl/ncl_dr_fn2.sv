// ncl_dr_fn2: any Boolean function of two dual-rail inputs, built the
// input-complete NCL way.
//
// Four TH22 gates detect the four DATA combinations of (a, b); each output
// rail is the OR of the combinations for which the function is 1 (rail1) or
// 0 (rail0). The output is DATA only after both inputs are DATA and NULL
// only after both are NULL, and exactly one TH22 gate fires per wavefront,
// so the block is input-complete and observable. TRUTH[{a,b}] is the
// function's value for a, b. The divider uses it for the quotient bit
// (MSB OR carry) and for the first column of its subtractor. This
// construction is this design's; the document only names the functions.
//
// Interface: a, b (dual-rail) in; y (dual-rail) out. No state beyond the
// hysteresis of the TH22 gates.
// Lint and synthesis report combinational loops through this block: they
// are the output feedback of its NCL threshold gates (see ncl_th) and,
// where handshakes close a ring, the asynchronous Ki/Ko loops. Both are
// intended: this is clockless, state-holding logic.
module ncl_dr_fn2
  import ncl_pkg::*;
#(
  parameter logic [3:0] TRUTH = 4'b1110
) (
  input  dr_t a,
  input  dr_t b,
  output dr_t y
);

  logic [3:0] m;
  logic [3:0] m1;
  logic [3:0] m0;

  for (genvar k = 0; k < 4; k++) begin : g_min
    localparam bit AV = k[1];
    localparam bit BV = k[0];
    ncl_th #(.M(2), .N(2)) u_m (
      .a  ({AV ? a.rail1 : a.rail0, BV ? b.rail1 : b.rail0}),
      .rst(1'b0),
      .z  (m[k])
    );
  end

  assign m1      = m & TRUTH;
  assign m0      = m & ~TRUTH;
  assign y.rail1 = |m1;
  assign y.rail0 = |m0;

endmodule
