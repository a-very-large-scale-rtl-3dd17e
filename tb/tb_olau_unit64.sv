// tb_olau_unit64: the on-line unit at 64-digit operands, in the two
// partitions discussed for that size: eight 8-bit modules (latency 12) and
// four 16-bit modules (latency 8).
//
// Both units receive the same stream of operations: random A, X
// (|A|, |X| < 1/8) as signed digits, random 64-bit B, `init` with the first
// digit pair, and 0..3 idle cycles or none between operations. For each unit
// every output digit is taken exactly MODULES + 4 cycles after its input
// digits, and the residual bound -1/2 <= 2^j (B + A_j X_j - D_j) < 5/8 is
// checked exactly for every digit, so a wrong latency fails. The test also
// measures the latency directly (the first operation has B = 1/4, so its
// first digit is a +1 and nothing may come out earlier): 12 and 8 cycles,
// so a full 64-digit result has left the unit 76 and 72 cycles after its
// first input digits arrived. Mechanisms counted (each must occur): nonzero
// output digits and traffic on the carry wires between the two least
// significant modules, in both units; back-to-back operations.
`timescale 1ns/1ps
module tb_olau_unit64;
  import olau_pkg::*;
  import olau_tb_pkg::*;

  localparam int N    = 64;
  localparam int NCFG = 2;
  localparam int CW[NCFG] = '{8, 16};
  localparam int CM[NCFG] = '{8, 4};
  localparam int NOPS = 40;
  localparam int MAXC = NOPS * (N + 4) + 100;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         init = 1'b0;
  sd_t          a = SD_ZERO, x = SD_ZERO;
  logic [N-1:0] b = '0;
  sd_t          d [NCFG];
  logic         xc [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    olau_unit #(.WIDTH(CW[g]), .MODULES(CM[g])) dut (.clk, .rst_n, .init, .a, .x, .b, .d(d[g]));
    assign xc[g] = dut.cp_o[CM[g]-2] | (|dut.c_o[CM[g]-2]);
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  int in_a[MAXC], in_x[MAXC], out_d[NCFG][MAXC];
  int op_start[NOPS], op_len[NOPS];
  logic [N-1:0] op_b[NOPS];
  int n_b2b = 0;
  int n_xcarry[NCFG] = '{0, 0};

  function automatic sd_t to_sd(int v);
    return (v > 0) ? SD_POS : (v < 0) ? SD_NEG : SD_ZERO;
  endfunction

  function automatic int from_sd(sd_t v);
    return v.d ? (v.s ? -1 : 1) : 0;
  endfunction

  task automatic gen_operand(output int dig[N]);
    real v;
    forever begin
      v = 0.0;
      for (int j = 0; j < N; j++) begin
        dig[j] = (j < 2) ? 0 : int'($urandom_range(0, 2)) - 1;
        v = v + real'(dig[j]) / (2.0 ** (j + 1));
      end
      if (v < 0.125 && v > -0.125) break;
    end
  endtask

  initial begin : watchdog
    repeat (MAXC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk)
    if (rst_n)
      for (int g = 0; g < NCFG; g++) if (xc[g]) n_xcarry[g]++;

  initial begin : stim
    int t, ga[N], gx[N], gap;
    for (int i = 0; i < MAXC; i++) begin
      in_a[i] = 0; in_x[i] = 0;
      for (int g = 0; g < NCFG; g++) out_d[g][i] = 0;
    end
    t = 10;
    for (int k = 0; k < NOPS; k++) begin
      gen_operand(ga);
      gen_operand(gx);
      op_b[k] = {$urandom(), $urandom()};
      if (k == 0) op_b[k] = {2'b01, {(N-2){1'b0}}};   // B = 1/4 forces d_1 = +1
      op_start[k] = t;
      for (int j = 0; j < N; j++) begin
        in_a[t + j] = ga[j];
        in_x[t + j] = gx[j];
      end
      gap = ($urandom_range(0, 1) == 0) ? 0 : int'($urandom_range(1, 3));
      if (gap == 0 && k > 0) n_b2b++;
      op_len[k] = N + gap;
      t = t + N + gap;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (cyc < t + 20) begin
      @(negedge clk);
      init = 1'b0;
      for (int k = 0; k < NOPS; k++)
        if (op_start[k] == cyc) begin
          init = 1'b1;
          b = op_b[k];
        end
      a = to_sd(in_a[cyc]);
      x = to_sd(in_x[cyc]);
      for (int g = 0; g < NCFG; g++) out_d[g][cyc] = from_sd(d[g]);
    end

    for (int g = 0; g < NCFG; g++) begin
      automatic int lat = CM[g] + 4;
      automatic int nz = 0, first = -1;
      // measured latency: the first operation has B = 1/4, so its first
      // result digit is +1 and nothing else may come out before it
      for (int c = 0; c < MAXC && first < 0; c++) if (out_d[g][c] != 0) first = c;
      checks += 2;
      if (first - op_start[0] != ((CW[g] == 8) ? 12 : 8)) begin
        failures++; $display("%0d-bit modules: latency %0d", CW[g], first - op_start[0]);
      end
      if (N + first - op_start[0] != ((CW[g] == 8) ? 76 : 72)) begin
        failures++; $display("%0d-bit modules: %0d cycles per operand", CW[g], N + first - op_start[0]);
      end
      $display("%0d modules of %0d bits: latency %0d, a 64-digit result is complete %0d cycles after its first inputs",
               CM[g], CW[g], first - op_start[0], N + first - op_start[0]);
      for (int k = 0; k < NOPS; k++) begin
        automatic int qa[$], qx[$], qd[$];
        automatic int fb = 0, bad = 0;
        automatic logic signed [N-1:0] bs = op_b[k];
        for (int j = 0; j < op_len[k]; j++) begin
          qa.push_back(in_a[op_start[k] + j]);
          qx.push_back(in_x[op_start[k] + j]);
          qd.push_back(out_d[g][op_start[k] + j + lat]);
          if (out_d[g][op_start[k] + j + lat] != 0) nz++;
        end
        bad = residual_violations(qa, qx, qd, big_t'(bs), N, op_len[k], fb);
        checks += op_len[k];
        if (bad != 0) begin
          failures += bad;
          if (failures < 10)
            $display("%0d-bit modules, op %0d: %0d residual violations, first at digit %0d",
                     CW[g], k, bad, fb);
        end
      end
      checks += 2;
      if (nz == 0) begin failures++; $display("%0d-bit modules: only zero digits", CW[g]); end
      if (n_xcarry[g] == 0) begin
        failures++; $display("%0d-bit modules: no inter-module traffic", CW[g]);
      end
    end
    checks++;
    if (n_b2b == 0) begin failures++; $display("no back-to-back operation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
