// seq_ring: single-rail NCL ring that both sequencers are built on.
//
// STAGES stages, each a 3-input C-element (a TH33 gate with hysteresis)
// whose inputs are the previous stage, the inverted next stage and the
// sequencer's Ki. While Ki is 1 only rising transitions can happen, so every
// DATA wavefront advances into the NULL run ahead of it until one NULL stage
// is left; while Ki is 0 the NULL wavefronts do the same. Reset loads the
// pattern 0,1,0,1,...,0,1,0,0: STAGES/2-1 tokens plus two bubbles (the run of
// three NULL stages at the end). Each Ki transition then moves the bubble pair
// back by one stage, so the ring state repeats every STAGES transitions of Ki.
//
// Interface: ki (request from the block the sequencer serves), rst, s (stage
// outputs) and s_n (the inverted stage outputs used for the feedback, bit i
// being ~s[i]). Purely asynchronous, no clock. The alternating reset-to-NULL
// and reset-to-DATA gates, ending in two reset-to-NULL gates, and the
// 16-stage length are taken from the sequencer schematics; the exact wiring of
// each gate is this design's reading of them, checked against the sequencer
// output tables.
// Lint and synthesis report combinational loops through this block: they
// are the output feedback of its NCL threshold gates (see ncl_th) and,
// where handshakes close a ring, the asynchronous Ki/Ko loops. Both are
// intended: this is clockless, state-holding logic.
module seq_ring #(
  parameter int unsigned STAGES = 16
) (
  input  logic              ki,
  input  logic              rst,
  output logic [STAGES-1:0] s,
  output logic [STAGES-1:0] s_n
);

  assign s_n = ~s;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    localparam bit RV = (i % 2 == 1) && (i < STAGES - 2);
    ncl_th #(.M(3), .N(3), .RST_VAL(RV)) u_c (
      .a  ({ki, s_n[(i + 1) % STAGES], s[(i + STAGES - 1) % STAGES]}),
      .rst(rst),
      .z  (s[i])
    );
  end

endmodule
