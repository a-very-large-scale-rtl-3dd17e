// tb_olau_poly3: third-degree polynomial evaluation on three chained
// on-line units, at the three sizes of interest:
//   - 16-digit operands, units of two 8-bit modules: first result digit
//     18 cycles and last 33 cycles after x_1; the first evaluation is the
//     worked example with result -1231 * 2^-16;
//   - 32-digit operands, units of two 16-bit modules: 18 and 49 cycles;
//   - 32-digit operands, units of four 8-bit modules: 24 and 55 cycles.
// Each network (olau_poly3_net) runs its own stream of evaluations back to
// back, checks every unit's residual bound and its cycle counts; this bench
// runs the three side by side, adds up their counts and has the watchdog.
`timescale 1ns/1ps
module tb_olau_poly3;

  localparam int NNET = 3;
  localparam int MAXCYC = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NNET-1:0] done;
  int chk [NNET];
  int fail [NNET];

  olau_poly3_net #(.W(8),  .M(2), .NOPS(61), .EXP_FIRST(18), .EXP_LAST(33), .EXAMPLE(1'b1))
    u_16x8 (.clk, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  olau_poly3_net #(.W(16), .M(2), .NOPS(30), .EXP_FIRST(18), .EXP_LAST(49), .EXAMPLE(1'b0))
    u_32x16 (.clk, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  olau_poly3_net #(.W(8),  .M(4), .NOPS(30), .EXP_FIRST(24), .EXP_LAST(55), .EXAMPLE(1'b0))
    u_32x8 (.clk, .done(done[2]), .checks(chk[2]), .failures(fail[2]));

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
