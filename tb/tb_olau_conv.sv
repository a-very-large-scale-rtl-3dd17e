// tb_olau_conv: self-checking test of the signed-digit to two's complement
// operand register.
//
// Random signed-digit operands of 8 digits (positions 1..8 below two sign
// positions) are loaded with a travelling one-hot load pulse; `init` comes
// with the first digit and operations follow each other directly or after
// idle cycles. After every cycle the register's two's complement value must
// equal the value of the digit prefix received so far, and the set of
// unconfirmed positions must be exactly: the position just loaded, plus the
// earlier positions (sign positions included) after which only zero digits
// have arrived.
`timescale 1ns/1ps
module tb_olau_conv;
  import olau_pkg::*;

  localparam int ND = 8;
  localparam int W  = ND + 2;

  logic         clk = 1'b0, rst_n = 1'b0, init = 1'b0;
  sd_t          digit = SD_ZERO;
  logic [W-1:0] ld = '0, value, unconf;

  olau_conv #(.WIDTH(W), .SIGN_BITS(2)) dut (.clk, .rst_n, .init, .digit, .ld, .value, .unconf);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    automatic int dg[ND+1];
    automatic int expv, gotv, lastnz;
    automatic logic [W-1:0] expu;
    automatic int n_flip = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 1000; op++) begin
      lastnz = -1;  // position of the last nonzero digit (-1 = none yet)
      for (int j = 1; j <= ND; j++) begin
        dg[j] = int'($urandom_range(0, 2)) - 1;
        init  = (j == 1);
        digit = (dg[j] > 0) ? SD_POS : (dg[j] < 0) ? SD_NEG : SD_ZERO;
        ld    = '0;
        ld[ND - j] = 1'b1;
        if (dg[j] < 0 && j > 1) n_flip++;
        @(negedge clk);
        // expected value, scaled by 2^ND
        expv = 0;
        for (int i = 1; i <= j; i++) expv += dg[i] * (1 << (ND - i));
        gotv = int'($signed(value));
        // expected unconfirmed set
        expu = '0;
        expu[ND - j] = 1'b1;
        if (dg[j] != 0) lastnz = j;
        // positions lastnz..j-1 (lastnz itself when nonzero) stay unconfirmed
        for (int p = -1; p < j; p++) begin
          if (p >= lastnz) expu[ND - p] = 1'b1;
        end
        checks += 2;
        if (gotv != expv) begin
          failures++;
          if (failures < 10) $display("op %0d digit %0d: value %0d expected %0d", op, j, gotv, expv);
        end
        if (unconf !== expu) begin
          failures++;
          if (failures < 10) $display("op %0d digit %0d: flags %b expected %b", op, j, unconf, expu);
        end
      end
      init = 1'b0;
      ld = '0;
      digit = SD_ZERO;
      if ($urandom_range(0, 1) == 1) @(negedge clk);
    end
    checks++;
    if (n_flip == 0) begin failures++; $display("no complementing digit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
