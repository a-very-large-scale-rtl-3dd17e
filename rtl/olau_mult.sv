// olau_mult: digit-by-vector multiplier of the bit slices.
//
// Multiplies a two's complement vector by one signed digit. Each bit is a
// three-way selection: the vector bit for +1, zero for 0, the inverted bit
// for -1. Negation in two's complement also needs +1 in the least
// significant place; instead of propagating it, the request is returned on
// `corr` and added later through a free carry slot of the carry-save adders
// in the least significant module.
// Purely combinational.
module olau_mult
  import olau_pkg::*;
#(
  parameter int unsigned WIDTH = 10
) (
  input  logic [WIDTH-1:0] vec,
  input  sd_t              digit,
  output logic [WIDTH-1:0] prod,
  output logic             corr
);

  always_comb begin
    if (!digit.d)     prod = '0;
    else if (digit.s) prod = ~vec;
    else              prod = vec;
    corr = sd_is_neg(digit);
  end

endmodule
