// ncl_completion: completion component that merges per-bit acknowledges.
//
// Its output goes to 1 only when all N inputs are 1 and back to 0 only when
// all are 0, holding its value in between; this is an N-input C-element,
// built as one THNN gate. It turns the per-bit Ko signals of a multi-bit
// register into the register's single Ko (rfd = 1, rfn = 0). The document
// names the completion components but does not draw them; a single wide
// C-element rather than a tree of smaller gates is this design's choice and
// has the same function. No clock; combinational apart from the hysteresis.
// Lint and synthesis report combinational loops through this block: they
// are the output feedback of its NCL threshold gates (see ncl_th) and,
// where handshakes close a ring, the asynchronous Ki/Ko loops. Both are
// intended: this is clockless, state-holding logic.
module ncl_completion #(
  parameter int unsigned N       = 4,
  parameter bit          RST_VAL = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic         rst,
  output logic         z
);

  ncl_th #(.M(N), .N(N), .RST_VAL(RST_VAL)) u_c (.a(a), .rst(rst), .z(z));

endmodule
