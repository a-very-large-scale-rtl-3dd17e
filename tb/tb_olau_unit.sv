// tb_olau_unit: end-to-end test of the on-line arithmetic unit at its
// default size (two 8-bit modules, 16-digit operands).
//
// A stream of operations is applied: random A, X (|A|, |X| < 1/8) in
// signed digits and random B, each started with `init` on its first digit
// pair, followed by 0..4 idle cycles (zero digits) or none at all, so that
// operations also follow each other back to back. Every output digit is
// taken exactly LATENCY = MODULES + 4 cycles after its input digits and the
// residual bound -1/2 <= 2^j (B + A_j X_j - D_j) < 5/8 is checked exactly for
// every digit the schedule lets through (N plus the idle cycles), which
// checks value, digit timing and latency together. Some operations use
// corner values (largest operands, B = -1/2, B just below 1/2).
//
// Mechanisms counted (each must occur): output digits +1, 0 and -1; -1
// digits on A and on X (complement and +1 correction path); a leading -1
// that turns the sign positions negative; back-to-back operations; carries
// and residual bits crossing between modules.
`timescale 1ns/1ps
module tb_olau_unit;
  import olau_pkg::*;
  import olau_tb_pkg::*;

  localparam int WIDTH   = 8;
  localparam int MODULES = 2;
  localparam int N       = WIDTH * MODULES;
  localparam int LAT     = MODULES + 4;
  localparam int NOPS    = 300;
  localparam int MAXC    = NOPS * (N + 6) + 100;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         init = 1'b0;
  sd_t          a = SD_ZERO, x = SD_ZERO;
  logic [N-1:0] b = '0;
  sd_t          d;

  olau_unit dut (.clk, .rst_n, .init, .a, .x, .b, .d);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  // input schedule and output record, indexed by cycle
  int in_a[MAXC], in_x[MAXC], out_d[MAXC];
  int op_start[NOPS], op_len[NOPS];
  logic [N-1:0] op_b[NOPS];

  int n_dpos = 0, n_dzero = 0, n_dneg = 0, n_aneg = 0, n_xneg = 0;
  int n_signflip = 0, n_b2b = 0, n_xcarry = 0;

  function automatic sd_t to_sd(int v);
    return (v > 0) ? SD_POS : (v < 0) ? SD_NEG : SD_ZERO;
  endfunction

  function automatic int from_sd(sd_t v);
    return v.d ? (v.s ? -1 : 1) : 0;
  endfunction

  // random signed-digit operand with |value| < 1/8
  task automatic gen_operand(output int dig[N], input int mode);
    real v;
    forever begin
      v = 0.0;
      for (int j = 0; j < N; j++) begin
        if (mode == 1)      dig[j] = (j < 3) ? 0 : 1;
        else if (mode == 2) dig[j] = (j < 3) ? 0 : -1;
        else if (j < 2)     dig[j] = 0;
        else                dig[j] = int'($urandom_range(0, 2)) - 1;
        v = v + real'(dig[j]) / real'(longint'(1) << (j + 1));
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

  // inter-module traffic (mechanism count only)
  always @(negedge clk)
    if (rst_n && (dut.cp_o[1] || dut.c_o[1] != 2'b00)) n_xcarry++;

  initial begin : stim
    int t, ga[N], gx[N], gap;
    for (int i = 0; i < MAXC; i++) begin
      in_a[i] = 0; in_x[i] = 0; out_d[i] = 0;
    end
    // build the schedule
    t = 10;
    for (int k = 0; k < NOPS; k++) begin
      gen_operand(ga, (k == 1) ? 1 : (k == 2) ? 2 : 0);
      gen_operand(gx, (k == 1) ? 1 : (k == 2) ? 1 : 0);
      op_b[k] = N'($urandom()) ^ (N'($urandom()) << 16);
      if (k == 1) op_b[k] = {1'b0, {(N-1){1'b1}}};
      if (k == 2) op_b[k] = {1'b1, {(N-1){1'b0}}};
      op_start[k] = t;
      for (int j = 0; j < N; j++) begin
        in_a[t + j] = ga[j];
        in_x[t + j] = gx[j];
      end
      gap = ($urandom_range(0, 2) == 0) ? 0 : int'($urandom_range(1, 4));
      if (gap == 0 && k > 0) n_b2b++;
      op_len[k] = N + gap;
      t = t + N + gap;
    end
    // run
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (cyc < t + LAT + 4) begin
      @(negedge clk);
      init = 1'b0;
      for (int k = 0; k < NOPS; k++) begin
        if (op_start[k] == cyc) begin
          init = 1'b1;
          b = op_b[k];
        end
      end
      a = to_sd(in_a[cyc]);
      x = to_sd(in_x[cyc]);
      out_d[cyc] = from_sd(d);
    end
    // check
    for (int k = 0; k < NOPS; k++) begin
      automatic int qa[$], qx[$], qd[$];
      automatic int fb = 0, bad = 0, seen_nz = 0, c0 = 0;
      automatic logic signed [N-1:0] bs;
      for (int j = 0; j < op_len[k]; j++) begin
        c0 = op_start[k] + j;
        qa.push_back(in_a[c0]);
        qx.push_back(in_x[c0]);
        qd.push_back(out_d[c0 + LAT]);
        if (in_a[c0] < 0) n_aneg++;
        if (in_x[c0] < 0) n_xneg++;
        if (seen_nz == 0 && in_x[c0] != 0) begin
          seen_nz = 1;
          if (in_x[c0] < 0) n_signflip++;
        end
        case (out_d[c0 + LAT])
          1: n_dpos++;
          -1: n_dneg++;
          default: n_dzero++;
        endcase
      end
      bs = op_b[k];
      bad = residual_violations(qa, qx, qd, big_t'(bs), N, op_len[k], fb);
      checks += op_len[k];
      if (bad != 0) begin
        failures += bad;
        if (failures < 10)
          $display("op %0d: %0d residual violations, first at digit %0d", k, bad, fb);
      end
    end
    // mechanisms
    checks += 8;
    if (n_dpos == 0)     begin failures++; $display("never produced d=+1"); end
    if (n_dzero == 0)    begin failures++; $display("never produced d=0"); end
    if (n_dneg == 0)     begin failures++; $display("never produced d=-1"); end
    if (n_aneg == 0)     begin failures++; $display("no -1 digit on A"); end
    if (n_xneg == 0)     begin failures++; $display("no -1 digit on X"); end
    if (n_signflip == 0) begin failures++; $display("no negative leading digit"); end
    if (n_b2b == 0)      begin failures++; $display("no back-to-back operation"); end
    if (n_xcarry == 0)   begin failures++; $display("no inter-module traffic"); end
    $display("mechanisms: d+1=%0d d0=%0d d-1=%0d a-1=%0d x-1=%0d lead-1=%0d back2back=%0d intermodule=%0d",
             n_dpos, n_dzero, n_dneg, n_aneg, n_xneg, n_signflip, n_b2b, n_xcarry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
