// tb_olau_csa: self-checking test of the two carry-save adder levels.
// For random inputs the outputs must conserve the sum exactly:
//   p1 + p2 + c2 + s2 + cin1 + cin2 = s_new + 2*k2 + cin2 + 2^W * k1[W-1]
// (all as integers), and c_new must be k2 shifted up one place with cin2 at
// the bottom, so c_new + s_new is the input sum modulo 2^W.
`timescale 1ns/1ps
module tb_olau_csa;

  localparam int W = 10;
  logic [W-1:0] p1, p2, c2, s2, c_new, s_new, k1, k2;
  logic         cin1, cin2;

  olau_csa #(.WIDTH(W)) dut (.p1, .p2, .c2, .s2, .cin1, .cin2, .c_new, .s_new, .k1, .k2);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic longint lhs, rhs;
    for (int i = 0; i < 5000; i++) begin
      p1 = W'($urandom()); p2 = W'($urandom());
      c2 = W'($urandom()); s2 = W'($urandom());
      cin1 = 1'($urandom()); cin2 = 1'($urandom());
      #1;
      lhs = longint'(p1) + longint'(p2) + longint'(c2) + longint'(s2) + longint'(cin1) + longint'(cin2);
      rhs = longint'(s_new) + 2 * longint'(k2) + longint'(cin2) + (longint'(k1[W-1]) << W);
      checks += 2;
      if (lhs != rhs) begin
        failures++;
        if (failures < 10) $display("sum mismatch %0d vs %0d", lhs, rhs);
      end
      if (c_new !== {k2[W-2:0], cin2}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
