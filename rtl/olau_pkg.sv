// olau_pkg: types and helpers shared by the on-line arithmetic unit.
//
// Operands and results travel one radix-2 signed digit per clock cycle, most
// significant digit first. A signed digit is carried on two wires, a sign
// bit and a magnitude bit, with the encoding used throughout the design:
//   -1 = 2'b11,  0 = 2'b00,  +1 = 2'b01.
// The pattern 2'b10 never appears on an output; an input carrying it is read
// as zero (magnitude bit clear).
package olau_pkg;

  typedef struct packed {
    logic s;   // sign: 1 = negative
    logic d;   // magnitude: 1 = digit is nonzero
  } sd_t;

  localparam sd_t SD_ZERO = '{s: 1'b0, d: 1'b0};
  localparam sd_t SD_POS  = '{s: 1'b0, d: 1'b1};
  localparam sd_t SD_NEG  = '{s: 1'b1, d: 1'b1};

  function automatic logic sd_is_neg(sd_t v);
    return v.s & v.d;
  endfunction

  function automatic logic sd_is_pos(sd_t v);
    return ~v.s & v.d;
  endfunction

endpackage
