// mux_comp0_reg: W-bit "MUX COMP0 Reg", a dual-rail 2-to-1 multiplexer
// register that is input-complete with respect to its D0 input.
//
// D0 carries DATA on every iteration (the fed-back word); D1 only when a new
// operand is loaded. Per bit, a TH12 (OR) gate detects that D0 is DATA, and
// four TH44 gates (reset to NULL) each combine one data rail, one single-rail
// select (S0 for D0, S1 for D1), Ki and that D0-is-DATA signal. So F = D0
// when S0 is asserted and F = D1 when S1 is asserted, and in both cases the
// register waits for D0 to be DATA, so the fed-back wavefront is always
// consumed, also when it is discarded in favour of D1. NULL passes once D0,
// the selected D1 rail, both selects and Ki are all low. The per-bit Ko is
// the NOR of the four gates. The slice follows the document's MUX COMP0 Reg
// schematic.
//
// This design adds one output not in the schematic: ld, the C-element
// completion of "D1 was passed" over all bits (OR of the two D1 gates of a
// bit). It is 1 from the moment the whole D1 word has been taken until the
// D1 gates have returned to NULL, and the divider uses it to acknowledge the
// operand source.
//
// Interface: d0, d1 (dual-rail), s0, s1, ki, rst in; f (dual-rail), ko, ld
// out.
// Lint and synthesis report combinational loops through this block: they
// are the output feedback of its NCL threshold gates (see ncl_th) and,
// where handshakes close a ring, the asynchronous Ki/Ko loops. Both are
// intended: this is clockless, state-holding logic.
module mux_comp0_reg
  import ncl_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  dr_t [W-1:0] d0,
  input  dr_t [W-1:0] d1,
  input  logic        s0,
  input  logic        s1,
  input  logic        ki,
  input  logic        rst,
  output dr_t [W-1:0] f,
  output logic        ko,
  output logic        ld
);

  logic [W-1:0] bit_ko;
  logic [W-1:0] bit_ld;

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic d0v, g0_1, g0_0, g1_1, g1_0;
    assign d0v = d0[i].rail1 | d0[i].rail0;
    ncl_th #(.M(4), .N(4)) u_g0_1 (.a({d0v, ki, s0, d0[i].rail1}), .rst(rst), .z(g0_1));
    ncl_th #(.M(4), .N(4)) u_g0_0 (.a({d0v, ki, s0, d0[i].rail0}), .rst(rst), .z(g0_0));
    ncl_th #(.M(4), .N(4)) u_g1_1 (.a({d0v, ki, s1, d1[i].rail1}), .rst(rst), .z(g1_1));
    ncl_th #(.M(4), .N(4)) u_g1_0 (.a({d0v, ki, s1, d1[i].rail0}), .rst(rst), .z(g1_0));
    assign f[i].rail1 = g0_1 | g1_1;
    assign f[i].rail0 = g0_0 | g1_0;
    assign bit_ko[i]  = ~(g0_1 | g0_0 | g1_1 | g1_0);
    assign bit_ld[i]  = g1_1 | g1_0;
  end

  ncl_completion #(.N(W)) u_done (.a(bit_ko), .rst(rst), .z(ko));
  ncl_completion #(.N(W), .RST_VAL(1'b0)) u_ld (.a(bit_ld), .rst(rst), .z(ld));

endmodule
