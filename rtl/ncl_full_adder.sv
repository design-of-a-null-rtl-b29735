// ncl_full_adder: dual-rail NCL full adder, one column of the divider's
// ripple-carry subtractor.
//
// The carry rails are TH23 majority gates of the corresponding input rails;
// each sum rail is a TH34w2 gate whose weight-2 input is the opposite carry
// rail and whose other inputs are the three input rails of the same value
// (sum = 1 when all three inputs are 1, or when carry is 0 and at least one
// input is 1, and symmetrically for 0). This is the conventional NCL full
// adder; the document names a ripple-carry adder but does not draw its
// cells, so the choice of cell is this design's.
//
// Interface: x, y, ci (dual-rail) in; s, co (dual-rail) out.
// Lint and synthesis report combinational loops through this block: they
// are the output feedback of its NCL threshold gates (see ncl_th) and,
// where handshakes close a ring, the asynchronous Ki/Ko loops. Both are
// intended: this is clockless, state-holding logic.
module ncl_full_adder
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  input  dr_t ci,
  output dr_t s,
  output dr_t co
);

  ncl_th #(.M(2), .N(3)) u_co1 (.a({x.rail1, y.rail1, ci.rail1}), .rst(1'b0), .z(co.rail1));
  ncl_th #(.M(2), .N(3)) u_co0 (.a({x.rail0, y.rail0, ci.rail0}), .rst(1'b0), .z(co.rail0));
  ncl_th #(.M(3), .N(4), .W({4'd2, 4'd1, 4'd1, 4'd1})) u_s1 (
    .a({co.rail0, x.rail1, y.rail1, ci.rail1}), .rst(1'b0), .z(s.rail1));
  ncl_th #(.M(3), .N(4), .W({4'd2, 4'd1, 4'd1, 4'd1})) u_s0 (
    .a({co.rail1, x.rail0, y.rail0, ci.rail0}), .rst(1'b0), .z(s.rail0));

endmodule
