// output_sequencer: lets the quotient and remainder reach the output Select
// registers only after the last iteration, and stands in for those
// registers' handshake during the other iterations.
//
// It is a 2*ITER-stage single-rail ring (seq_ring) stepped by Ki, which in the
// divider is the acknowledge of the iteration register feeding both the
// feedback loop and the Select registers. S0 masks the Select registers'
// request through an AND gate outside this block: it alternates 1 (mimicked
// rfd) and 0 (mimicked rfn) for the first ITER-1 iterations and stays 1 in
// the last two phases, when the real Select-register request passes. S1 is
// high only in phase 2*ITER-1 and loads the final result into the Select
// registers. S0 resets to 1. For ITER = 8 this is the output sequencer table
// of the design (S0 = 1 in the initial state and cycles 2, 4, ..., 14, 15,
// 16; S1 = 1 in cycle 15). S1 is ring stage 0 and S0 the OR of stage 0 and
// the inverted odd stages; these taps are this design's, chosen to give
// that table.
//
// Interface: ki, rst in; s0, s1 out (single-rail, active high).
// Lint and synthesis report combinational loops through this block: they
// are the output feedback of its NCL threshold gates (see ncl_th) and,
// where handshakes close a ring, the asynchronous Ki/Ko loops. Both are
// intended: this is clockless, state-holding logic.
module output_sequencer #(
  parameter int unsigned ITER = 8
) (
  input  logic ki,
  input  logic rst,
  output logic s0,
  output logic s1
);

  localparam int unsigned STAGES = 2 * ITER;

  logic [STAGES-1:0] s;
  logic [STAGES-1:0] s_n;
  logic [STAGES-1:0] s0_taps;

  seq_ring #(.STAGES(STAGES)) u_ring (
    .ki (ki),
    .rst(rst),
    .s  (s),
    .s_n(s_n)
  );

  always_comb begin
    s0_taps = '0;
    for (int unsigned i = 1; i < STAGES; i += 2) s0_taps[i] = s_n[i];
    s0_taps[0] = s[0];
  end

  assign s0 = |s0_taps;
  assign s1 = s[0];

endmodule
