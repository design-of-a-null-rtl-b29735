// mux_reg: W-bit "MUX Reg", a 2-to-1 dual-rail multiplexer with embedded
// NCL registration.
//
// Per bit, four TH33 gates (reset to NULL) each combine one data rail, one
// rail of the dual-rail select S and Ki: F = D0 when S is DATA0 and F = D1
// when S is DATA1, passed when Ki is rfd; NULL passes when S, the selected
// input and Ki are all back to NULL/rfn. The rails are merged by OR gates
// and the bit's Ko is the NOR of the four gate outputs. The multiplexer is
// input-incomplete with respect to D0 and D1 (the unselected input is not
// waited for): in the divider the adder and quotient logic in front of it
// make the stage input-complete as a whole. Each bit has its own select
// (the divider drives all of them from the quotient bit). The slice follows
// the document's MUX Reg schematic; the completion of the bit Ko's into one
// Ko is this design's.
//
// Interface: d0, d1, s (dual-rail), ki, rst in; f (dual-rail), ko out.
// Lint and synthesis report combinational loops through this block: they
// are the output feedback of its NCL threshold gates (see ncl_th) and,
// where handshakes close a ring, the asynchronous Ki/Ko loops. Both are
// intended: this is clockless, state-holding logic.
module mux_reg
  import ncl_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  dr_t [W-1:0] d0,
  input  dr_t [W-1:0] d1,
  input  dr_t [W-1:0] s,
  input  logic        ki,
  input  logic        rst,
  output dr_t [W-1:0] f,
  output logic        ko
);

  logic [W-1:0] bit_ko;

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic g0_1, g0_0, g1_1, g1_0;
    ncl_th #(.M(3), .N(3)) u_g0_1 (.a({ki, s[i].rail0, d0[i].rail1}), .rst(rst), .z(g0_1));
    ncl_th #(.M(3), .N(3)) u_g0_0 (.a({ki, s[i].rail0, d0[i].rail0}), .rst(rst), .z(g0_0));
    ncl_th #(.M(3), .N(3)) u_g1_1 (.a({ki, s[i].rail1, d1[i].rail1}), .rst(rst), .z(g1_1));
    ncl_th #(.M(3), .N(3)) u_g1_0 (.a({ki, s[i].rail1, d1[i].rail0}), .rst(rst), .z(g1_0));
    assign f[i].rail1 = g0_1 | g1_1;
    assign f[i].rail0 = g0_0 | g1_0;
    assign bit_ko[i]  = ~(g0_1 | g0_0 | g1_1 | g1_0);
  end

  ncl_completion #(.N(W)) u_done (.a(bit_ko), .rst(rst), .z(ko));

endmodule
