// olau_poly3_net: test bench building block (not a design module): a
// third-degree polynomial evaluator made of three chained on-line units in
// Horner form, y2 = p3 x + p2, y1 = y2 x + p1, P = y1 x + p0, with its own
// stimulus and checks. Parameters: module width W and module count M of
// every unit (operands of N = W*M digits), number of evaluations NOPS, the
// expected cycle of the first and last result digit counted from x_1
// (EXP_FIRST, EXP_LAST), and EXAMPLE, which makes the first evaluation the
// worked 16-digit example (only meaningful for N = 16). Ports: clk in;
// done, checks, failures out, valid once done is 1.
//
// Network: AU3 takes x and p3 on-line and p2 off-line; AU2 takes AU3's
// output digits and x; AU1 takes AU2's output digits and x. Each unit has a
// latency of LAT = M + 4 cycles, so the x digits and the init pulse reach
// AU2 and AU1 through LAT- and 2*LAT-stage delay lines (the buffers of the
// network), and p1, p0 are presented with the init of their unit. The first
// result digit therefore leaves 3*LAT cycles after x_1, the last N - 1
// cycles later.
//
// Worked example: p0 = 1.1111101011010010, p1 = 1.1111000010110111 (two's
// complement), p2 = 0.0011011111011101, p3 = 0.0010111011011101,
// x = 0.000T110TTT00010T (T = -1); the expected 16-digit result is
// -0.0187836 = -1231 * 2^-16 (the exact polynomial value is -0.018787).
//
// Checks: the timing of the first evaluation against EXP_FIRST/EXP_LAST;
// for the example, the result exactly and to within 2^-14 of the exact
// value; for every evaluation and every unit, the residual bound
// -1/2 <= 2^j (B + A_j X_j - D_j) < 5/8 on that unit's own input and output
// digits. Random evaluations use |x| < 1/16, |p3| < 1/8, |p2|, |p1| <= 1/16
// and any p0, so that every unit's operands stay within |A| + |X| < 1/4.
`timescale 1ns/1ps
module olau_poly3_net
  import olau_pkg::*;
  import olau_tb_pkg::*;
#(
  parameter int W         = 8,
  parameter int M         = 2,
  parameter int NOPS      = 61,
  parameter int EXP_FIRST = 18,
  parameter int EXP_LAST  = 33,
  parameter bit EXAMPLE   = 1'b1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int N = W * M, LAT = M + 4;
  localparam int MAXC = NOPS * N + 200;

  logic rst_n = 1'b0;
  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  // external inputs
  logic         init_e = 1'b0;
  sd_t          x_e = SD_ZERO, p3_e = SD_ZERO;
  logic [N-1:0] p0_b = '0, p1_b = '0, p2_b = '0;

  // delay lines for x and init (buffers between units)
  sd_t  xd [2*LAT+1];
  logic id [2*LAT+1];
  always_ff @(posedge clk) begin
    for (int i = 2 * LAT; i > 0; i--) begin
      xd[i] <= rst_n ? xd[i-1] : SD_ZERO;
      id[i] <= rst_n ? id[i-1] : 1'b0;
    end
  end
  assign xd[0] = x_e;
  assign id[0] = init_e;

  // B registers of AU2 and AU1 follow their own init
  logic [N-1:0] p1q [LAT+1], p0q [2*LAT+1];
  always_ff @(posedge clk) begin
    for (int i = 2 * LAT; i > 0; i--) p0q[i] <= rst_n ? p0q[i-1] : '0;
    for (int i = LAT; i > 0; i--)     p1q[i] <= rst_n ? p1q[i-1] : '0;
  end
  assign p0q[0] = p0_b;
  assign p1q[0] = p1_b;

  sd_t d3, d2, d1;

  olau_unit #(.WIDTH(W), .MODULES(M)) au3 (.clk, .rst_n, .init(id[0]),   .a(p3_e), .x(xd[0]),   .b(p2_b),        .d(d3));
  olau_unit #(.WIDTH(W), .MODULES(M)) au2 (.clk, .rst_n, .init(id[LAT]), .a(d3),   .x(xd[LAT]), .b(p1q[LAT]),    .d(d2));
  olau_unit #(.WIDTH(W), .MODULES(M)) au1 (.clk, .rst_n, .init(id[2*LAT]), .a(d2), .x(xd[2*LAT]), .b(p0q[2*LAT]), .d(d1));

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // per-cycle record: [unit][cycle], unit 0 = AU3, 1 = AU2, 2 = AU1
  int ra[3][MAXC], rx[3][MAXC], rd[3][MAXC];
  int st[3][NOPS];
  logic [N-1:0] rb[3][NOPS];
  int nst[3];

  function automatic int v(sd_t s);
    return s.d ? (s.s ? -1 : 1) : 0;
  endfunction
  function automatic sd_t sd(int i);
    return (i > 0) ? SD_POS : (i < 0) ? SD_NEG : SD_ZERO;
  endfunction

  initial begin : run
    automatic int xs[NOPS][N], p3s[NOPS][N];
    automatic logic [N-1:0] c0[NOPS], c1[NOPS], c2[NOPS];
    automatic int ex_x[16] = '{0,0,0,-1,1,1,0,-1,-1,-1,0,0,0,1,0,-1};
    automatic logic [15:0] ex_p3 = 16'b0010111011011101;
    automatic int t0, fb, bad, c;
    automatic real xv, pv, yv, exact;
    for (int u = 0; u < 3; u++) nst[u] = 0;
    // operations: 0 = the example, then random ones
    for (int k = 0; k < NOPS; k++) begin
      if (EXAMPLE && k == 0) begin
        for (int j = 0; j < N; j++) begin
          xs[k][j] = ex_x[j % 16];
          p3s[k][j] = int'(ex_p3[15 - j % 16]);
        end
        c0[k] = N'($signed(16'b1111101011010010));
        c1[k] = N'($signed(16'b1111000010110111));
        c2[k] = N'($signed(16'b0011011111011101));
      end else begin
        for (int j = 0; j < N; j++) begin
          xs[k][j]  = (j < 4) ? 0 : int'($urandom_range(0, 2)) - 1;   // |x| < 1/16
          p3s[k][j] = (j < 3) ? 0 : int'($urandom_range(0, 2)) - 1;   // |p3| < 1/8
        end
        c2[k] = N'($signed(N'($urandom())) >>> 3);                   // |p2| <= 1/16
        c1[k] = N'($signed(N'($urandom())) >>> 3);
        c0[k] = N'($urandom());
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    t0 = cyc;
    for (int k = 0; k < NOPS; k++) begin
      for (int j = 0; j < N; j++) begin
        init_e = (j == 0);
        x_e  = sd(xs[k][j]);
        p3_e = sd(p3s[k][j]);
        if (j == 0) begin p0_b = c0[k]; p1_b = c1[k]; p2_b = c2[k]; end
        @(negedge clk);
      end
    end
    init_e = 1'b0; x_e = SD_ZERO; p3_e = SD_ZERO;
    repeat (3 * LAT + N + 4) @(negedge clk);

    // ---- timing of the first evaluation
    checks += 2;
    if (st[2][0] + LAT - st[0][0] != EXP_FIRST) begin
      failures++; $display("N=%0d, %0d-bit modules: first digit not at +%0d", N, W, EXP_FIRST);
    end
    if (st[2][0] + LAT + N - 1 - st[0][0] != EXP_LAST) begin
      failures++; $display("N=%0d, %0d-bit modules: last digit not at +%0d", N, W, EXP_LAST);
    end
    $display("N=%0d, %0d-bit modules: first result digit at +%0d, last at +%0d cycles",
             N, W, st[2][0] + LAT - st[0][0], st[2][0] + LAT + N - 1 - st[0][0]);

    // ---- example: value
    if (EXAMPLE) begin
      automatic int dq[$];
      for (int j = 0; j < N; j++) dq.push_back(rd[2][st[2][0] + j + LAT]);
      yv = digits_value(dq, N);
      xv = 0.0;
      for (int j = 0; j < N; j++) xv += real'(ex_x[j]) / real'(longint'(1) << (j + 1));
      exact = 0.0;
      // Horner with the exact coefficients
      pv = real'($signed(c2[0])) / 65536.0;
      exact = (real'($signed(ex_p3)) / 65536.0) * xv + pv;
      exact = exact * xv + real'($signed(c1[0])) / 65536.0;
      exact = exact * xv + real'($signed(c0[0])) / 65536.0;
      $display("example: result %f exact %f", yv, exact);
      checks += 2;
      if (yv != -1231.0 / 65536.0) begin
        failures++; $display("example result is not -1231 * 2^-16");
      end
      if (yv - exact > 1.0 / 16384.0 || exact - yv > 1.0 / 16384.0) begin
        failures++; $display("example result off by more than 2^-14");
      end
    end

    // ---- residual bounds of every unit for every operation
    for (int u = 0; u < 3; u++) begin
      checks++;
      if (nst[u] != NOPS) begin failures++; $display("unit %0d saw %0d inits", u, nst[u]); end
      for (int k = 0; k < nst[u]; k++) begin
        automatic int qa[$], qx[$], qd[$];
        automatic logic signed [N-1:0] bs = rb[u][k];
        for (int j = 0; j < N; j++) begin
          c = st[u][k] + j;
          qa.push_back(ra[u][c]);
          qx.push_back(rx[u][c]);
          qd.push_back(rd[u][c + LAT]);
        end
        bad = residual_violations(qa, qx, qd, big_t'(bs), N, N, fb);
        checks += N;
        if (bad != 0) begin
          failures += bad;
          if (failures < 10) $display("unit %0d op %0d: %0d violations from digit %0d", u, k, bad, fb);
        end
      end
    end
    done = 1'b1;
  end

  // recorder
  always @(negedge clk) begin
    if (rst_n && cyc < MAXC) begin
      ra[0][cyc] <= v(p3_e);   rx[0][cyc] <= v(xd[0]);      rd[0][cyc] <= v(d3);
      ra[1][cyc] <= v(d3);     rx[1][cyc] <= v(xd[LAT]);    rd[1][cyc] <= v(d2);
      ra[2][cyc] <= v(d2);     rx[2][cyc] <= v(xd[2*LAT]);  rd[2][cyc] <= v(d1);
      if (id[0] && nst[0] < NOPS)       begin st[0][nst[0]] <= cyc; rb[0][nst[0]] <= p2_b;        nst[0] <= nst[0] + 1; end
      if (id[LAT] && nst[1] < NOPS)     begin st[1][nst[1]] <= cyc; rb[1][nst[1]] <= p1q[LAT];    nst[1] <= nst[1] + 1; end
      if (id[2*LAT] && nst[2] < NOPS)   begin st[2][nst[2]] <= cyc; rb[2][nst[2]] <= p0q[2*LAT];  nst[2] <= nst[2] + 1; end
    end
  end

endmodule
