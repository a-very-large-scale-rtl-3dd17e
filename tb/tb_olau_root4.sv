// tb_olau_root4: root of x = P(x) for a fourth-degree polynomial by the
// iteration x <- P(x) on on-line evaluators (four units each), with one
// evaluator and a buffer closing the loop, and with two evaluators feeding
// each other (olau_root4_net runs both and checks them). Two sizes:
//   - 32-digit operands, units of two 16-bit modules (evaluator latency 24):
//     iteration 1 complete after 55 cycles; 10 iterations after 343 cycles
//     with one evaluator, 271 with two;
//   - 64-digit operands, units of four 16-bit modules (evaluator latency 32):
//     95 cycles; 671 with one evaluator, 383 with two.
// The coefficients (0.05, -0.1, 0.1, -0.05, 0.1 for p0..p4, rounded to the
// operand width) are this bench's own choice. This bench runs the two sizes
// side by side, adds up their counts and has the watchdog.
`timescale 1ns/1ps
module tb_olau_root4;

  localparam int NNET = 2;
  localparam int MAXCYC = 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NNET-1:0] done;
  int chk [NNET];
  int fail [NNET];

  olau_root4_net #(.W(16), .M(2), .MAXC(450),
                   .EXP_S1(55), .EXP_S10(343), .EXP_D1(55), .EXP_D10(271),
                   .P0(32'h0CCC_CCCD), .P1(32'hE666_6666), .P2(32'h1999_999A),
                   .P3(32'hF333_3333), .P4(32'h1999_999A))
    u_32 (.clk, .done(done[0]), .checks(chk[0]), .failures(fail[0]));

  olau_root4_net #(.W(16), .M(4), .MAXC(760),
                   .EXP_S1(95), .EXP_S10(671), .EXP_D1(95), .EXP_D10(383),
                   .P0(64'h0CCC_CCCC_CCCC_CCCD), .P1(64'hE666_6666_6666_6666),
                   .P2(64'h1999_9999_9999_999A), .P3(64'hF333_3333_3333_3333),
                   .P4(64'h1999_9999_9999_999A))
    u_64 (.clk, .done(done[1]), .checks(chk[1]), .failures(fail[1]));

  function automatic int sum(int v [NNET]);
    int s = 0;
    for (int i = 0; i < NNET; i++) s += v[i];
    return s;
  endfunction

  initial begin : watchdog
    repeat (MAXCYC) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(chk), sum(fail) + 1);
    $finish;
  end

  initial begin : finish
    wait (&done);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", sum(chk), sum(fail));
    $finish;
  end

endmodule
