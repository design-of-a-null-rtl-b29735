// mux0_comp_reg: W-bit "MUX0 COMP Reg", a dual-rail register that passes
// either its D0 input or the constant DATA0, input-complete with respect to
// D0.
//
// Per bit: a TH33 gate (D0 rail1, S0, Ki) drives F rail1; a TH33 gate
// (D0 rail0, S0, Ki) and a weighted TH54w22 gate drive F rail0 through an OR.
// The TH54w22 gate has S1 and Ki with weight 2 and both D0 rails with weight
// 1, so it fires when S1 and Ki are high and D0 is DATA: F = DATA0 when S1 is
// asserted, after the fed-back D0 wavefront has arrived, and F = D0 when S0
// is asserted. The bit's Ko is the NOR of the three gates. In the divider
// this loads the leading zeros of the partial remainder. The gates, their
// thresholds and inputs follow the document's MUX0 COMP Reg schematic; the
// weights of the 5-threshold gate are this design's reading of it.
//
// Interface: d0 (dual-rail), s0, s1, ki, rst in; f (dual-rail), ko out.
// Lint and synthesis report combinational loops through this block: they
// are the output feedback of its NCL threshold gates (see ncl_th) and,
// where handshakes close a ring, the asynchronous Ki/Ko loops. Both are
// intended: this is clockless, state-holding logic.
module mux0_comp_reg
  import ncl_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  dr_t [W-1:0] d0,
  input  logic        s0,
  input  logic        s1,
  input  logic        ki,
  input  logic        rst,
  output dr_t [W-1:0] f,
  output logic        ko
);

  logic [W-1:0] bit_ko;

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic g_1, g_0, g_z;
    ncl_th #(.M(3), .N(3)) u_g_1 (.a({ki, s0, d0[i].rail1}), .rst(rst), .z(g_1));
    ncl_th #(.M(3), .N(3)) u_g_0 (.a({ki, s0, d0[i].rail0}), .rst(rst), .z(g_0));
    ncl_th #(.M(5), .N(4), .W({4'd2, 4'd2, 4'd1, 4'd1})) u_g_z (
      .a({s1, ki, d0[i].rail1, d0[i].rail0}), .rst(rst), .z(g_z));
    assign f[i].rail1 = g_1;
    assign f[i].rail0 = g_0 | g_z;
    assign bit_ko[i]  = ~(g_1 | g_0 | g_z);
  end

  ncl_completion #(.N(W)) u_done (.a(bit_ko), .rst(rst), .z(ko));

endmodule
