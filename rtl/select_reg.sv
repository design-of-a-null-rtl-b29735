// select_reg: W-bit dual-rail "Select register", an NCL register with an
// extra single-rail input S.
//
// Each rail of each bit is a TH33 gate (reset to NULL) of the data rail, S
// and Ki, so DATA passes only while S is asserted (and Ki is rfd) and NULL
// passes only after S has been deasserted (and Ki is rfn). The bit's Ko is
// the NOR of its rails; the register's Ko is their C-element completion.
// The divider uses two of them, for the quotient and the remainder, and
// lets them take only the result of the last iteration. The slice follows
// the document's Select Reg schematic.
//
// Interface: d (dual-rail), s, ki, rst in; f (dual-rail), ko out.
// Lint and synthesis report combinational loops through this block: they
// are the output feedback of its NCL threshold gates (see ncl_th) and,
// where handshakes close a ring, the asynchronous Ki/Ko loops. Both are
// intended: this is clockless, state-holding logic.
module select_reg
  import ncl_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  dr_t [W-1:0] d,
  input  logic        s,
  input  logic        ki,
  input  logic        rst,
  output dr_t [W-1:0] f,
  output logic        ko
);

  logic [W-1:0] bit_ko;

  for (genvar i = 0; i < W; i++) begin : g_bit
    ncl_th #(.M(3), .N(3)) u_r1 (.a({ki, s, d[i].rail1}), .rst(rst), .z(f[i].rail1));
    ncl_th #(.M(3), .N(3)) u_r0 (.a({ki, s, d[i].rail0}), .rst(rst), .z(f[i].rail0));
    assign bit_ko[i] = ~(f[i].rail1 | f[i].rail0);
  end

  ncl_completion #(.N(W)) u_done (.a(bit_ko), .rst(rst), .z(ko));

endmodule
