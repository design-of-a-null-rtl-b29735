// tb_ncl_divider: end-to-end test of the NCL divider at its default size
// (8-bit dividend, 4-bit divisor).
//
// An operand source and a result sink follow the four-phase NCL handshake
// with random delays. The source sends every dividend with every non-zero
// divisor (3840 pairs) and then a few pairs with a zero divisor; each result
// is compared with the quotient and remainder computed by SystemVerilog's
// own / and % operators (all ones and the dividend's low M bits for a zero
// divisor, which is what restoring division yields). It also checks the dual-rail code (no rail pair {1,1}), that
// every division takes exactly N = 8 iterations (one load plus seven
// feedback passes), and counts the mechanisms of the design: operand loads,
// feedback iterations, iterations that keep (q = 0) or replace (q = 1) the
// partial-remainder top, iterations whose Select-register handshake was
// mimicked by the output sequencer, results held back by a slow sink, and
// operands presented while a division was still running. A mechanism that
// never happens counts as a failure. The design has no clock; time only
// orders the events.
`timescale 1ns/1ps
module tb_ncl_divider;
  import ncl_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned M = 4;
  localparam int unsigned NZERO = 8;   // extra divisions by zero

  logic        rst;
  dr_t [N-1:0] z;
  dr_t [M-1:0] d;
  logic        ko_in;
  dr_t [N-1:0] q;
  dr_t [M-1:0] r;
  logic        ki_out;

  int checks = 0, failures = 0;
  int n_loads = 0, n_feedback = 0, n_keep = 0, n_replace = 0, n_mimic = 0;
  int n_sink_slow = 0, n_early_operand = 0, n_results = 0;
  int iter_in_div = 0;

  ncl_divider dut (
    .rst(rst), .z(z), .d(d), .ko_in(ko_in), .q(q), .r(r), .ki_out(ki_out));

  // expected results, in issue order
  logic [N-1:0] exp_q[$];
  logic [M-1:0] exp_r[$];

  function automatic logic all_data_n(input dr_t [N-1:0] x);
    for (int i = 0; i < N; i++) if (!dr_is_data(x[i])) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic all_data_m(input dr_t [M-1:0] x);
    for (int i = 0; i < M; i++) if (!dr_is_data(x[i])) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic [N-1:0] dec_n(input dr_t [N-1:0] x);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = x[i].rail1;
    return v;
  endfunction
  function automatic logic [M-1:0] dec_m(input dr_t [M-1:0] x);
    logic [M-1:0] v;
    for (int i = 0; i < M; i++) v[i] = x[i].rail1;
    return v;
  endfunction
  function automatic logic illegal(input dr_t [N-1:0] a, input dr_t [M-1:0] b);
    for (int i = 0; i < N; i++) if (a[i].rail1 && a[i].rail0) return 1'b1;
    for (int i = 0; i < M; i++) if (b[i].rail1 && b[i].rail0) return 1'b1;
    return 1'b0;
  endfunction

  task automatic send(input logic [N-1:0] zv, input logic [M-1:0] dv);
    dr_t [N-1:0] zt;
    dr_t [M-1:0] dt;
    realtime     t_sent;
    wait (ko_in === 1'b1);
    #($urandom_range(3, 1));
    for (int i = 0; i < N; i++) zt[i] = dr_enc(zv[i]);
    for (int i = 0; i < M; i++) dt[i] = dr_enc(dv[i]);
    z = zt;
    d = dt;
    exp_q.push_back(dv == 0 ? '1 : N'(zv / dv));
    exp_r.push_back(dv == 0 ? zv[M-1:0] : M'(zv % dv));
    t_sent = $realtime;
    wait (ko_in === 1'b0);
    if ($realtime > t_sent) n_early_operand++;
    n_loads++;
    #($urandom_range(3, 1));
    z = '0;
    d = '0;
  endtask

  // operand source
  initial begin
    rst = 1'b1;
    z   = '0;
    d   = '0;
    #10;
    rst = 1'b0;
    for (int dv = 1; dv < 2**M; dv++)
      for (int zv = 0; zv < 2**N; zv++) send(N'(zv), M'(dv));
    for (int k = 0; k < NZERO; k++) send(N'($urandom), '0);
  end

  // result sink
  initial begin
    logic [N-1:0] eq;
    logic [M-1:0] er;
    ki_out = 1'b1;
    forever begin
      while (!(all_data_n(q) && all_data_m(r))) @(q, r);
      #1;
      checks++;
      n_results++;
      if (iter_in_div != N) begin
        failures++;
        $display("division %0d took %0d iterations, expected %0d", n_results, iter_in_div, N);
      end
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("result with no division issued");
      end else begin
        eq = exp_q.pop_front();
        er = exp_r.pop_front();
        if (dec_n(q) !== eq || dec_m(r) !== er) begin
          failures++;
          $display("result %0d: Q=%0d R=%0d, expected Q=%0d R=%0d", n_results,
                   dec_n(q), dec_m(r), eq, er);
        end
      end
      iter_in_div = 0;
      if ($urandom_range(3, 0) == 0) begin
        #20;   // slow sink: the next division must wait for this handshake
        n_sink_slow++;
      end
      ki_out = 1'b0;
      while (!(q == '0 && r == '0)) @(q, r);
      #($urandom_range(2, 1));
      ki_out = 1'b1;
      if (n_results == (2**M - 1) * 2**N + NZERO) finish_test();
    end
  end

  // iteration monitor: stage 2 takes one DATA word per iteration; its bit 0
  // is that iteration's quotient bit
  always @(negedge dut.ko2) begin
    if (!rst) begin
      iter_in_div++;
      if (dut.pr2[0].rail1) n_replace++;
      else n_keep++;
    end
  end
  always @(posedge dut.os_s0) if (!rst) n_mimic++;
  always @(posedge dut.u_in_seq.s0) n_feedback++;

  always @(q or r) begin
    if (illegal(q, r)) begin
      failures++;
      $display("illegal dual-rail code on the outputs");
    end
  end

  task automatic count_mech(input string name, input int n);
    checks++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("mechanism %s never happened", name);
    end
  endtask

  task automatic finish_test();
    count_mech("operand load", n_loads);
    count_mech("feedback iteration", n_feedback);
    count_mech("q=0 keep PR top", n_keep);
    count_mech("q=1 take difference", n_replace);
    count_mech("mimicked Select handshake", n_mimic);
    count_mech("slow result sink", n_sink_slow);
    count_mech("operand waiting for load", n_early_operand);
    checks++;
    if (n_mimic != n_loads * (N - 1)) begin
      failures++;
      $display("%0d mimicked handshakes for %0d loads", n_mimic, n_loads);
    end
    checks++;
    if (n_feedback != n_loads * (N - 1)) begin
      failures++;
      $display("%0d feedback passes for %0d loads", n_feedback, n_loads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    #5000000;
    failures++;
    $display("watchdog: %0d results", n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
