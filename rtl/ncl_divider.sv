// ncl_divider: unsigned N-bit by M-bit iterative restoring divider in NULL
// Convention Logic (NCL), delay-insensitive and without a clock.
//
// Algorithm. The (N+M)-bit partial remainder PR starts as M zeros followed
// by the dividend Z. Each of N iterations subtracts the divisor D from the
// top M+1 bits of PR; the quotient bit q is 1 when that difference is not
// negative (top PR bit set, or carry out of the M-bit subtractor). The new PR
// takes the difference (q = 1) or the old bits (q = 0) as its top M bits,
// the rest of PR shifted left by one, and q in the vacated bit 0. After N
// iterations the top M bits are the remainder R and the low N bits the
// quotient Q.
//
// Datapath. Everything is dual-rail; data and NULL wavefronts alternate and
// every register hands over with a Ki/Ko handshake. PR goes round a ring of
// three register stages:
//   stage 1  input multiplexer registers: mux0_comp_reg for the top M PR
//            bits (feedback or the leading zeros) and mux_comp0_reg for the
//            low N PR bits (feedback or Z). Both select from the input
//            sequencer's S0 (feedback) / S1 (new operands), and always wait
//            for the fed-back word, so it is consumed even when discarded.
//   stage 2  trial_sub in front of a mux_reg, selected by q, for the new top
//            M bits; an ncl_reg for the shifted low bits and q.
//   stage 3  output registers (ncl_reg), reset to DATA0 so that stage 1 can
//            take the first operands; their output is fed back to stage 1.
// The divisor has its own, shorter loop of three registers: a mux_comp0_reg
// (feedback or D, stored inverted by swapping its rails) on the same
// sequencer selects, a plain ncl_reg, and an ncl_reg reset to DATA0. The
// divisor register feeds both the subtractor and its own loop, so its
// request is the C-element of PR stage 2's Ko and divisor stage 2's Ko.
// With FOURTH_REG = 1 a fourth register, reset to NULL, sits between PR
// stages 2 and 3, so that DATA and NULL wavefronts can move round the PR
// ring more independently (the higher-throughput variant); the default is
// the three-register ring. The divisor loop is never lengthened.
// Stage 2's word also goes to the quotient and remainder select_reg's, which
// take it only in the last iteration (output sequencer S1).
//
// Control. The input sequencer is stepped by the joint Ko of all stage-1
// multiplexer registers (PR and divisor). Stage 2's Ki is
// the C-element of the next ring register's Ko and (Select registers' Ko AND output
// sequencer S0); that same signal steps the output sequencer. During the
// first N-1 iterations S0 toggles with the ring and so mimics the Select
// registers' handshake; in the last iteration it stays high and the real
// Select-register handshake passes, so the result cannot be lost.
//
// Interface (all dual-rail except ko_in, ki_out, rst):
//   z[N-1:0], d[M-1:0]  operands, DATA/NULL from the environment
//   ko_in               acknowledge to the operand source: falls (rfn) once
//                       the operands have been taken, rises (rfd) once the
//                       source has returned to NULL and the multiplexers
//                       have followed
//   q[N-1:0], r[M-1:0]  quotient and remainder, one DATA wavefront per
//                       division
//   ki_out              request from the result sink (1 = rfd)
//   rst                 asynchronous reset, held high before operation
// Throughput: one division per N trips round the feedback ring; the
// operands of the next division are loaded while the last iteration's
// result is written out. D = 0 gives Q = all ones and R = the low M bits of Z, as
// the restoring algorithm does.
//
// What follows the document: the algorithm and bit ranges, the three-stage
// feedback ring with stage 3 reset to DATA0, the sequencer behaviour, the
// three multiplexer register types, the Select registers and the AND-gate
// masking, the separate divisor loop and a fourth register in the PR loop
// only. This design's own choices: the exact handshake wiring between the
// two loops and the Select registers, the operand acknowledge ko_in (built from the
// ld output of mux_comp0_reg), the adder cells, and the completion
// components as single wide C-elements.
// Lint and synthesis report combinational loops through this block: they
// are the output feedback of its NCL threshold gates (see ncl_th) and,
// where handshakes close a ring, the asynchronous Ki/Ko loops. Both are
// intended: this is clockless, state-holding logic.
module ncl_divider
  import ncl_pkg::*;
#(
  parameter int unsigned N = 8,   // dividend and quotient width
  parameter int unsigned M = 4,   // divisor and remainder width
  parameter bit FOURTH_REG = 1'b0  // extra NULL-reset register in the ring
) (
  input  logic        rst,
  input  dr_t [N-1:0] z,
  input  dr_t [M-1:0] d,
  output logic        ko_in,
  output dr_t [N-1:0] q,
  output dr_t [M-1:0] r,
  input  logic        ki_out
);

  localparam int unsigned NM = N + M;

  // stage words
  dr_t [NM-1:0] pr1, pr2, pr3;
  dr_t [NM-1:0] pr2b;          // PR after the optional extra register
  dr_t [M-1:0]  dv1, dv2, dv3;
  dr_t [M-1:0]  d_inv;
  dr_t [M-1:0]  diff;
  dr_t          qbit;

  // handshakes
  logic ko1_hi, ko1_lo, ko1_pr, ko1_dv, ko1;
  logic ko2_mux, ko2_reg, ko2;   // PR stage 2
  logic ko2_dv, ki1_dv;          // divisor stage 2, divisor stage 1 request
  logic ko3, ko3_dv;
  logic ko2b;          // acknowledge seen by PR stage 2 from the feedback path
  logic ki2;           // PR stage 2 request, also steps the output sequencer
  logic ld_z, ld_d, ld_all;
  logic is_s0, is_s1, os_s0, os_s1;
  logic q_ko, r_ko, sel_ko, sel_ack;

  // ---------------------------------------------------------------- sequencers
  input_sequencer #(.ITER(N)) u_in_seq (
    .ki(ko1), .rst(rst), .s0(is_s0), .s1(is_s1));

  output_sequencer #(.ITER(N)) u_out_seq (
    .ki(ki2), .rst(rst), .s0(os_s0), .s1(os_s1));

  // ---------------------------------------------------------------- stage 1
  for (genvar i = 0; i < M; i++) begin : g_dinv
    assign d_inv[i] = '{rail1: d[i].rail0, rail0: d[i].rail1};
  end

  mux0_comp_reg #(.W(M)) u_pr_hi (
    .d0(pr3[NM-1:N]), .s0(is_s0), .s1(is_s1), .ki(ko2), .rst(rst),
    .f(pr1[NM-1:N]), .ko(ko1_hi));

  mux_comp0_reg #(.W(N)) u_pr_lo (
    .d0(pr3[N-1:0]), .d1(z), .s0(is_s0), .s1(is_s1), .ki(ko2), .rst(rst),
    .f(pr1[N-1:0]), .ko(ko1_lo), .ld(ld_z));

  // the divisor register feeds both the subtractor (acknowledged through PR
  // stage 2) and its own feedback loop, so it waits for both
  ncl_th #(.M(2), .N(2), .RST_VAL(1'b1)) u_ki1_dv (
    .a({ko2, ko2_dv}), .rst(rst), .z(ki1_dv));

  mux_comp0_reg #(.W(M)) u_dv (
    .d0(dv3), .d1(d_inv), .s0(is_s0), .s1(is_s1), .ki(ki1_dv), .rst(rst),
    .f(dv1), .ko(ko1_dv), .ld(ld_d));

  ncl_completion #(.N(2)) u_ko1_pr (.a({ko1_hi, ko1_lo}), .rst(rst), .z(ko1_pr));
  ncl_completion #(.N(2)) u_ko1 (.a({ko1_pr, ko1_dv}), .rst(rst), .z(ko1));

  ncl_completion #(.N(2), .RST_VAL(1'b0)) u_ld (.a({ld_z, ld_d}), .rst(rst), .z(ld_all));
  assign ko_in = ~ld_all;

  // ---------------------------------------------------------------- stage 2
  trial_sub #(.M(M)) u_sub (
    .pr_top(pr1[NM-1:N-1]), .dinv(dv1), .diff(diff), .q(qbit));

  mux_reg #(.W(M)) u_pr_new_hi (
    .d0(pr1[NM-2:N-1]), .d1(diff), .s({M{qbit}}), .ki(ki2), .rst(rst),
    .f(pr2[NM-1:N]), .ko(ko2_mux));

  ncl_reg #(.W(N), .RST_DATA0(1'b0)) u_pr_new_lo (
    .d({pr1[N-2:0], qbit}), .ki(ki2), .rst(rst),
    .f(pr2[N-1:0]), .ko(ko2_reg));

  ncl_completion #(.N(2)) u_ko2 (.a({ko2_mux, ko2_reg}), .rst(rst), .z(ko2));

  ncl_reg #(.W(M), .RST_DATA0(1'b0)) u_dv2 (
    .d(dv1), .ki(ko3_dv), .rst(rst), .f(dv2), .ko(ko2_dv));

  // ---------------------------------------------------------------- stage 3
  if (FOURTH_REG) begin : g_fourth
    ncl_reg #(.W(NM), .RST_DATA0(1'b0)) u_extra (
      .d(pr2), .ki(ko3), .rst(rst), .f(pr2b), .ko(ko2b));
  end else begin : g_three
    assign pr2b = pr2;
    assign ko2b = ko3;
  end

  ncl_reg #(.W(NM), .RST_DATA0(1'b1)) u_out (
    .d(pr2b), .ki(ko1_pr), .rst(rst), .f(pr3), .ko(ko3));

  ncl_reg #(.W(M), .RST_DATA0(1'b1)) u_dv3 (
    .d(dv2), .ki(ko1_dv), .rst(rst), .f(dv3), .ko(ko3_dv));

  // ------------------------------------------------ Select registers, masking
  select_reg #(.W(N)) u_q_reg (
    .d(pr2[N-1:0]), .s(os_s1), .ki(ki_out), .rst(rst), .f(q), .ko(q_ko));

  select_reg #(.W(M)) u_r_reg (
    .d(pr2[NM-1:N]), .s(os_s1), .ki(ki_out), .rst(rst), .f(r), .ko(r_ko));

  ncl_completion #(.N(2)) u_sel_ko (.a({q_ko, r_ko}), .rst(rst), .z(sel_ko));

  assign sel_ack = sel_ko & os_s0;

  ncl_th #(.M(2), .N(2), .RST_VAL(1'b0)) u_ki2 (
    .a({ko2b, sel_ack}), .rst(rst), .z(ki2));

endmodule
