// tb_olau_mult: self-checking test of the digit-by-vector multiplier.
// For random vectors and each digit value, prod + corr must equal
// digit * vec modulo 2^WIDTH, and corr must be set exactly for digit -1.
`timescale 1ns/1ps
module tb_olau_mult;
  import olau_pkg::*;

  localparam int W = 10;
  logic [W-1:0] vec, prod;
  sd_t          digit;
  logic         corr;

  olau_mult #(.WIDTH(W)) dut (.vec, .digit, .prod, .corr);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int dv;
    automatic logic [W-1:0] expp;
    for (int i = 0; i < 3000; i++) begin
      vec = W'($urandom());
      dv  = i % 3 - 1;
      digit = (dv > 0) ? SD_POS : (dv < 0) ? SD_NEG : SD_ZERO;
      #1;
      expp = W'(dv * int'(vec));
      checks += 2;
      if (W'(prod + W'(corr)) !== expp) begin
        failures++;
        if (failures < 10) $display("vec %h digit %0d: prod %h corr %b", vec, dv, prod, corr);
      end
      if (corr !== (dv < 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
