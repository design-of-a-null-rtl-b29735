// ncl_reg: standard W-bit dual-rail NCL register.
//
// Each rail of each bit is a TH22 gate of the data rail and Ki: DATA is
// passed when Ki is rfd (1) and NULL when Ki is rfn (0); in between the
// register holds its word. A bit's Ko is the NOR of its two rails, and the
// register's Ko is the C-element completion of all bit Ko's, so Ko falls
// (rfn) once the whole word is DATA and rises (rfd) once it is all NULL.
// RST_DATA0 selects the reset state: all NULL (0) or all DATA0 (1). The
// structure is the conventional NCL register the document refers to; the
// parameterisation is this design's.
//
// Interface: d (dual-rail word), ki, rst in; f (dual-rail word), ko out.
// Lint and synthesis report combinational loops through this block: they
// are the output feedback of its NCL threshold gates (see ncl_th) and,
// where handshakes close a ring, the asynchronous Ki/Ko loops. Both are
// intended: this is clockless, state-holding logic.
module ncl_reg
  import ncl_pkg::*;
#(
  parameter int unsigned W         = 4,
  parameter bit          RST_DATA0 = 1'b0
) (
  input  dr_t [W-1:0] d,
  input  logic        ki,
  input  logic        rst,
  output dr_t [W-1:0] f,
  output logic        ko
);

  logic [W-1:0] bit_ko;

  for (genvar i = 0; i < W; i++) begin : g_bit
    ncl_th #(.M(2), .N(2), .RST_VAL(1'b0)) u_r1 (
      .a({ki, d[i].rail1}), .rst(rst), .z(f[i].rail1));
    ncl_th #(.M(2), .N(2), .RST_VAL(RST_DATA0)) u_r0 (
      .a({ki, d[i].rail0}), .rst(rst), .z(f[i].rail0));
    assign bit_ko[i] = ~(f[i].rail1 | f[i].rail0);
  end

  ncl_completion #(.N(W), .RST_VAL(!RST_DATA0)) u_done (
    .a(bit_ko), .rst(rst), .z(ko));

endmodule
