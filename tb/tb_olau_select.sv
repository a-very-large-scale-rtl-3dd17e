// tb_olau_select: self-checking test of the digit selection logic.
//
// Random five-bit tops of C and S are applied every cycle, with occasional
// `start` pulses. The testbench keeps its own copy of the z register and
// works out, by plain arithmetic, w_hat = z + C[-1..1] + S[-1..1] (mod 4),
// the carry cin out of C[2..3] + S[2..3], the digit (d = +1 if
// w_hat + cin/2 >= 1/2, -1 if it is <= -1, else 0) and the next z (the low
// two bits of w_hat - d). Combinations that the convergence bounds exclude
// are not checked for d. Every legal row of the selection table must occur.
`timescale 1ns/1ps
module tb_olau_select;
  import olau_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, b0 = 1'b0;
  logic [4:0] c_top = '0, s_top = '0;
  sd_t        d;
  logic [1:0] z;

  olau_select dut (.clk, .rst_n, .c_top, .s_top, .start, .b0, .d, .z);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen[16];

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [1:0] zm;
    automatic int v, cin, e, dexp, dgot, zh;
    automatic logic [2:0] w3, zh3;
    automatic logic [1:0] zn;
    automatic logic dc;
    for (int i = 0; i < 16; i++) seen[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    zm = 2'b00;
    for (int i = 0; i < 30000; i++) begin
      c_top = 5'($urandom()); s_top = 5'($urandom());
      start = ($urandom_range(0, 15) == 0);
      b0    = 1'($urandom());
      // reference
      w3  = 3'({zm, 1'b0} + {1'b0, c_top[4:2]} + {1'b0, s_top[4:2]});
      v   = int'($signed(w3));                   // halves
      cin = ((c_top[1:0] + s_top[1:0]) >= 4) ? 1 : 0;
      e   = v + cin;
      dexp = (e >= 1) ? 1 : (e <= -2) ? -1 : 0;
      dc  = (v == 2 && cin == 1) || (v == 3) || (v == -4 && cin == 0);
      zh  = v - 2 * dexp;
      zh3 = 3'(zh);
      zn  = zh3[1:0];
      @(negedge clk);
      dgot = d.d ? (d.s ? -1 : 1) : 0;
      if (!dc) begin
        seen[{w3, cin[0]}]++;
        checks += 3;
        if (dgot != dexp) begin
          failures++;
          if (failures < 10) $display("w_hat %b cin %0d: d %0d expected %0d", w3, cin, dgot, dexp);
        end
        if (zh3[2] != zh3[1]) begin
          failures++;
          $display("w_hat - d out of range for w_hat %b cin %0d", w3, cin);
        end
        if (!start && z !== zn) begin
          failures++;
          if (failures < 10) $display("w_hat %b cin %0d: z %b expected %b", w3, cin, z, zn);
        end
      end
      if (start) begin
        checks++;
        if (z !== {b0, b0}) failures++;
      end
      zm = z;   // follow the hardware's z so excluded rows do not derail it
    end
    for (int r = 0; r < 16; r++) begin
      if (!(r == 5 || r == 6 || r == 7 || r == 8)) begin
        checks++;
        if (seen[r] == 0) begin failures++; $display("table row %b never exercised", r); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
