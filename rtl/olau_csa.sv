// olau_csa: the two carry-save adder levels of one module's bit slices.
//
// The first level adds the two multiplier outputs (p1 = A*x_j, p2 = X*a_j)
// and the carry half of the previous residual, shifted one place (c2). The
// second level adds the first level's sum, its carries shifted one place,
// and the sum half of the previous residual, shifted (s2). The results are
// the carry half `c_new` and sum half `s_new` of the new residual w, so that
// c_new + s_new equals p1 + p2 + c2 + s2 + cin1 + cin2 modulo 2^WIDTH, with
// no carry propagation.
//
// Bit index b has the higher weight for higher b. `cin1` enters the second
// level at bit 0 in place of a first-level carry from below, and `cin2`
// becomes bit 0 of `c_new` in place of a second-level carry from below: in a
// chain of modules these come from the next lower module, in the lowest one
// they carry the +1 corrections of the multipliers. `k1` and `k2` are the
// raw carry vectors of the two levels (carry out of bit b, weight b+1); the
// module sends the ones of its top slice to the next higher module.
// Purely combinational.
module olau_csa #(
  parameter int unsigned WIDTH = 10
) (
  input  logic [WIDTH-1:0] p1,
  input  logic [WIDTH-1:0] p2,
  input  logic [WIDTH-1:0] c2,
  input  logic [WIDTH-1:0] s2,
  input  logic             cin1,
  input  logic             cin2,
  output logic [WIDTH-1:0] c_new,
  output logic [WIDTH-1:0] s_new,
  output logic [WIDTH-1:0] k1,
  output logic [WIDTH-1:0] k2
);

  logic [WIDTH-1:0] s1, k1_in;

  always_comb begin
    // first level: full adders on p1, p2, c2
    s1 = p1 ^ p2 ^ c2;
    k1 = (p1 & p2) | (p1 & c2) | (p2 & c2);
    // second level: s1, shifted first-level carries, s2
    k1_in = {k1[WIDTH-2:0], cin1};
    s_new = s1 ^ k1_in ^ s2;
    k2    = (s1 & k1_in) | (s1 & s2) | (k1_in & s2);
    c_new = {k2[WIDTH-2:0], cin2};
  end

endmodule
