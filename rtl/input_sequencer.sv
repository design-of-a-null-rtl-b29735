// input_sequencer: decides, for each wavefront entering the divider's input
// multiplexer registers, whether it is a new operand pair or the fed-back
// partial remainder.
//
// It is a 2*ITER-stage single-rail ring (seq_ring) stepped by Ki, the
// combined request of the input multiplexer registers. Over one turn of the
// ring (2*ITER Ki transitions) S1 is asserted once, on the first rfd, to load
// the external operands; S0 is asserted on each of the following ITER-1 rfd
// phases to select the feedback inputs; on every rfn phase both are low so
// that NULL can pass the multiplexers. For ITER = 8 this is exactly the
// input sequencer output table of the design (S1 in cycle 1, S0 in cycles 3,
// 5, ..., 15). S1 is stage 2*ITER-2 and S0 is the OR of the even stages
// 0..2*ITER-4; these taps are this design's, chosen to give that table.
//
// Interface: ki, rst in; s0, s1 out (single-rail, active high).
// Lint and synthesis report combinational loops through this block: they
// are the output feedback of its NCL threshold gates (see ncl_th) and,
// where handshakes close a ring, the asynchronous Ki/Ko loops. Both are
// intended: this is clockless, state-holding logic.
module input_sequencer #(
  parameter int unsigned ITER = 8
) (
  input  logic ki,
  input  logic rst,
  output logic s0,
  output logic s1
);

  localparam int unsigned STAGES = 2 * ITER;

  logic [STAGES-1:0] s;
  logic [STAGES-1:0] s0_taps;

  seq_ring #(.STAGES(STAGES)) u_ring (
    .ki (ki),
    .rst(rst),
    .s  (s),
    .s_n()
  );

  always_comb begin
    s0_taps = '0;
    for (int unsigned i = 0; i + 4 <= STAGES; i += 2) s0_taps[i] = s[i];
  end

  assign s0 = |s0_taps;
  assign s1 = s[STAGES-2];

endmodule
