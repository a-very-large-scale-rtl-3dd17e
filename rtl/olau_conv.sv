// olau_conv: operand register with on-the-fly signed-digit to two's
// complement conversion (the A or X register of every bit slice).
//
// Each bit position keeps a value bit and a flag that says whether the bit
// is unconfirmed (may still be complemented) or confirmed. Every cycle one
// signed digit is presented on `digit`; the position whose `ld` bit is set
// takes the digit's magnitude and becomes unconfirmed. In the same cycle all
// other unconfirmed positions react to the digit: +1 confirms them, -1
// complements and confirms them, 0 leaves them alone. Positions never react
// to one another, so the update is fully parallel and its delay does not
// depend on the operand length. At every step the register holds exactly the
// value of the signed-digit prefix received so far.
//
// `init` clears all positions to "0 confirmed" except the SIGN_BITS most
// significant ones, which become "0 unconfirmed" so that a leading -1 digit
// turns them into sign bits. When `init` and a digit arrive in the same
// cycle, the digit is applied to the freshly initialised state.
//
// Interface: bit index b of `value` has weight 2^(b-WIDTH+SIGN_BITS) relative
// to the first digit position, i.e. the highest index is the most
// significant (sign) position. `ld` is one-hot (or zero) over the positions.
// Timing: one register stage; `value` reflects the digit one cycle later.
//
// The per-bit transition table follows the document; the synchronous
// active-low reset is this design's own addition (the document only has init).
module olau_conv
  import olau_pkg::*;
#(
  parameter int unsigned WIDTH     = 10,
  parameter int unsigned SIGN_BITS = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  sd_t              digit,
  input  logic [WIDTH-1:0] ld,
  output logic [WIDTH-1:0] value,
  output logic [WIDTH-1:0] unconf
);

  logic [WIDTH-1:0] base_v, base_u, next_v, next_u;

  always_comb begin
    base_v = init ? '0 : value;
    base_u = init ? {{SIGN_BITS{1'b1}}, {(WIDTH-SIGN_BITS){1'b0}}} : unconf;
    for (int b = 0; b < WIDTH; b++) begin
      next_v[b] = base_v[b];
      next_u[b] = base_u[b];
      if (ld[b]) begin
        next_v[b] = digit.d;
        next_u[b] = 1'b1;
      end else if (digit.d && base_u[b]) begin
        next_v[b] = base_v[b] ^ digit.s;
        next_u[b] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      value  <= '0;
      unconf <= '0;
    end else begin
      value  <= next_v;
      unconf <= next_u;
    end
  end

endmodule
