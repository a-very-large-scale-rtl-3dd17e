// olau_root4_net: test bench building block (not a design module): finds
// the root of x = P(x) = p4 x^4 + p3 x^3 + p2 x^2 + p1 x + p0 by the
// iteration x <- P(x), computed on-line, in two arrangements side by side,
// both starting from x0 = 0. Every evaluator (olau_root4_eval) is four
// units of M modules of W bits (N = W*M digits, unit latency LAT = M + 4,
// evaluator latency 4*LAT).
//
//   single: one evaluator. Its output digits come 4*LAT cycles after the x
//     digits entered; they wait N - 4*LAT more cycles in a buffer and
//     re-enter exactly when the evaluator has taken the N digits of the
//     current x, so an iteration starts every N cycles.
//   dual: two evaluators, each feeding its output straight into the other,
//     so a new iteration starts every 4*LAT cycles.
//
// Parameters: W, M, the run length MAXC in cycles, the expected cycle of the
// last digit of iterations 1 and 10 for both arrangements (EXP_S1, EXP_S10,
// EXP_D1, EXP_D10, counted from x_1) and the coefficients P0..P4 (N-bit two's
// complement, sign bit at weight -1/2). Ports: clk in; done, checks,
// failures out, valid once done is 1.
//
// Checks: every unit of every evaluator meets the residual bound for its own
// input digits in every complete pass; both arrangements produce the same
// digits in each of the 10 iterations; after 10 iterations |x - P(x)| < 2^-26;
// the timing figures above.
`timescale 1ns/1ps
module olau_root4_net
  import olau_pkg::*;
  import olau_tb_pkg::*;
#(
  parameter int W       = 16,
  parameter int M       = 2,
  parameter int MAXC    = 450,
  parameter int EXP_S1  = 55,
  parameter int EXP_S10 = 343,
  parameter int EXP_D1  = 55,
  parameter int EXP_D10 = 271,
  parameter logic [W*M-1:0] P0 = '0,
  parameter logic [W*M-1:0] P1 = '0,
  parameter logic [W*M-1:0] P2 = '0,
  parameter logic [W*M-1:0] P3 = '0,
  parameter logic [W*M-1:0] P4 = '0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int N = W * M, LAT = M + 4;
  localparam int ITER = 10;
  localparam int BUF = N - 4 * LAT;         // buffer that closes the single loop
  localparam int NE = 3;                    // evaluators: 0 single, 1 and 2 dual
  localparam int MAXI = 12;

  logic rst_n = 1'b0, start = 1'b0;
  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  sd_t  [3:0] ua [NE], ux [NE], ud [NE];
  logic [3:0] ui [NE];

  // single evaluator (s) and the two dual ones (p, q)
  sd_t  x_s, d_s, x_p, d_p, x_q, d_q;
  logic i_s, o_s, i_p, o_p, i_q, o_q;

  olau_root4_eval #(.W(W), .M(M), .P0(P0), .P1(P1), .P2(P2), .P3(P3), .P4(P4)) ev_s (
    .clk, .rst_n, .init(i_s), .x(x_s), .d(d_s), .init_out(o_s),
    .ua(ua[0]), .ux(ux[0]), .ud(ud[0]), .uinit(ui[0]));
  olau_root4_eval #(.W(W), .M(M), .P0(P0), .P1(P1), .P2(P2), .P3(P3), .P4(P4)) ev_p (
    .clk, .rst_n, .init(i_p), .x(x_p), .d(d_p), .init_out(o_p),
    .ua(ua[1]), .ux(ux[1]), .ud(ud[1]), .uinit(ui[1]));
  olau_root4_eval #(.W(W), .M(M), .P0(P0), .P1(P1), .P2(P2), .P3(P3), .P4(P4)) ev_q (
    .clk, .rst_n, .init(i_q), .x(x_q), .d(d_q), .init_out(o_q),
    .ua(ua[2]), .ux(ux[2]), .ud(ud[2]), .uinit(ui[2]));

  // single evaluator: output and its init back through an 8-stage buffer
  sd_t  fb  [BUF+1];
  logic fbi [BUF+1];
  assign fb[0]  = d_s;
  assign fbi[0] = o_s;
  always_ff @(posedge clk)
    for (int i = BUF; i > 0; i--) begin
      fb[i]  <= rst_n ? fb[i-1] : SD_ZERO;
      fbi[i] <= rst_n ? fbi[i-1] : 1'b0;
    end
  assign x_s = fb[BUF];                     // all zero during the first pass: x0 = 0
  assign i_s = start | fbi[BUF];

  // dual: each evaluator feeds the other
  assign x_p = d_q;
  assign i_p = start | o_q;
  assign x_q = d_p;
  assign i_q = o_p;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int ra[NE][4][MAXC], rx[NE][4][MAXC], rd[NE][4][MAXC];
  int st[NE][4][MAXI];
  int nst[NE][4];

  function automatic int v(sd_t s);
    return s.d ? (s.s ? -1 : 1) : 0;
  endfunction

  function automatic real tc(logic [N-1:0] b);
    return real'($signed(b)) / (2.0 ** N);
  endfunction

  always @(negedge clk) begin
    if (rst_n && cyc < MAXC)
      for (int e = 0; e < NE; e++)
        for (int u = 0; u < 4; u++) begin
          ra[e][u][cyc] <= v(ua[e][u]);
          rx[e][u][cyc] <= v(ux[e][u]);
          rd[e][u][cyc] <= v(ud[e][u]);
          if (ui[e][u] && nst[e][u] < MAXI) begin
            st[e][u][nst[e][u]] <= cyc;
            nst[e][u] <= nst[e][u] + 1;
          end
        end
  end

  // output digits of iteration k (1-based) of the single or the dual run
  function automatic int iter_digit(bit dual, int k, int j);
    if (!dual) return rd[0][3][st[0][3][k-1] + LAT + j];
    if (k % 2 == 1) return rd[1][3][st[1][3][(k-1)/2] + LAT + j];
    return rd[2][3][st[2][3][k/2-1] + LAT + j];
  endfunction

  function automatic int iter_last(bit dual, int k);
    int s;
    if (!dual)          s = st[0][3][k-1];
    else if (k % 2 == 1) s = st[1][3][(k-1)/2];
    else                s = st[2][3][k/2-1];
    return s + LAT + N - 1 - st[0][0][0];
  endfunction

  initial begin : run
    automatic int bad, fbj, c, nchk;
    automatic real xv, pv;
    automatic logic [N-1:0] bb[4];
    bb[0] = P3; bb[1] = P2; bb[2] = P1; bb[3] = P0;
    for (int e = 0; e < NE; e++)
      for (int u = 0; u < 4; u++) nst[e][u] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (cyc < MAXC - 1) @(negedge clk);

    // residual bounds for every unit of every evaluator and every complete pass
    for (int e = 0; e < NE; e++)
      for (int u = 0; u < 4; u++) begin
        nchk = 0;
        for (int k = 0; k < nst[e][u]; k++) begin
          automatic int qa[$], qx[$], qd[$];
          automatic logic signed [N-1:0] bs = bb[u];
          if (st[e][u][k] + N + LAT >= MAXC - 1) continue;
          for (int j = 0; j < N; j++) begin
            c = st[e][u][k] + j;
            qa.push_back(ra[e][u][c]);
            qx.push_back(rx[e][u][c]);
            qd.push_back(rd[e][u][c + LAT]);
          end
          bad = residual_violations(qa, qx, qd, big_t'(bs), N, N, fbj);
          checks += N;
          nchk++;
          if (bad != 0) begin
            failures += bad;
            if (failures < 10)
              $display("evaluator %0d unit %0d pass %0d: %0d violations from digit %0d", e, u, k, bad, fbj);
          end
        end
        checks++;
        if (nchk < ((e == 0) ? ITER : ITER / 2)) begin
          failures++; $display("evaluator %0d unit %0d: only %0d complete passes", e, u, nchk);
        end
      end

    // both arrangements compute the same sequence of x
    for (int k = 1; k <= ITER; k++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (iter_digit(0, k, j) != iter_digit(1, k, j)) begin
          failures++;
          if (failures < 10) $display("iteration %0d digit %0d differs between single and dual", k, j + 1);
        end
      end

    // convergence of the final x
    begin
      automatic int q[$];
      for (int j = 0; j < N; j++) q.push_back(iter_digit(0, ITER, j));
      xv = digits_value(q, N);
      pv = (((tc(P4) * xv + tc(P3)) * xv + tc(P2)) * xv + tc(P1)) * xv + tc(P0);
      $display("N=%0d: x after %0d iterations = %.10f, P(x) = %.10f", N, ITER, xv, pv);
      checks++;
      if (xv - pv > 1.0 / 67108864.0 || pv - xv > 1.0 / 67108864.0) begin
        failures++; $display("iteration did not converge");
      end
    end

    // timing
    $display("N=%0d single: last digit of iteration 1 at +%0d, of iteration %0d at +%0d cycles",
             N, iter_last(0, 1), ITER, iter_last(0, ITER));
    $display("N=%0d dual:   last digit of iteration 1 at +%0d, of iteration %0d at +%0d cycles",
             N, iter_last(1, 1), ITER, iter_last(1, ITER));
    checks += 4;
    if (iter_last(0, 1) != EXP_S1)     begin failures++; $display("N=%0d single: iteration 1 not done at +%0d", N, EXP_S1); end
    if (iter_last(0, ITER) != EXP_S10) begin failures++; $display("N=%0d single: iteration 10 not done at +%0d", N, EXP_S10); end
    if (iter_last(1, 1) != EXP_D1)     begin failures++; $display("N=%0d dual: iteration 1 not done at +%0d", N, EXP_D1); end
    if (iter_last(1, ITER) != EXP_D10) begin failures++; $display("N=%0d dual: iteration 10 not done at +%0d", N, EXP_D10); end
    done = 1'b1;
  end

endmodule
