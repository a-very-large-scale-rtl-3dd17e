// olau_select: output digit selection and residual top-bit update.
//
// Each cycle this block receives the five most significant bits (positions
// -1, 0, 1, 2, 3, i.e. weights 2, 1, 1/2, 1/4, 1/8) of the carry half C and
// sum half S of the residual w produced by the carry-save adders. The top
// two positions of C and S were computed without the previous residual's
// top bits; those are held here in the 2-bit register `z` instead.
//
//   w_hat = z + C[-1..1] + S[-1..1]        (3 bits, two's complement, mod 4)
//   cin   = carry out of C[2..3] + S[2..3] = C2 S2 + (C2 + S2) C3 S3
//
// From w_hat and cin the output digit d is chosen by the selection table
// (d = +1 when the estimate w_hat + cin/2 is at least 1/2, -1 when it is at
// most -1, 0 otherwise) and the residual's new top part w_hat - d is formed.
// Its bits reduce to z1 = W1 and z0 = z-1 = W1 | cin; shifted one place for
// the next step they become the new `z` = {W1 | cin, W1}. Table entries that
// the convergence bounds rule out (w_hat = 01.1, 01.0 with cin, 10.0 without
// cin) select the digit of the nearest legal entry.
//
// `start` marks the cycle before the first selection of a new operation: z
// is then loaded with the sign extension {b0, b0} of the off-line addend B,
// so the first residual is B itself.
// Timing: `d` and `z` are registered; d appears the cycle after its inputs.
//
// The table, the cin formula and the z equations follow the document; the
// entries for impossible rows and the reset are this design's choices.
module olau_select
  import olau_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] c_top,   // C[-1], C[0], C[1], C[2], C[3] (bit 4 = C[-1])
  input  logic [4:0] s_top,   // same positions of S
  input  logic       start,
  input  logic       b0,      // sign bit of B
  output sd_t        d,
  output logic [1:0] z
);

  logic [2:0] w_hat;
  logic       cin;
  sd_t        d_next;

  always_comb begin
    w_hat = {z, 1'b0} + c_top[4:2] + s_top[4:2];
    cin   = (c_top[1] & s_top[1]) | ((c_top[1] | s_top[1]) & c_top[0] & s_top[0]);
    unique case ({w_hat, cin})
      4'b000_0: d_next = SD_ZERO;
      4'b000_1: d_next = SD_POS;
      4'b001_0,
      4'b001_1: d_next = SD_POS;
      4'b010_0,
      4'b010_1,
      4'b011_0,
      4'b011_1: d_next = SD_POS;
      4'b100_0,
      4'b100_1,
      4'b101_0,
      4'b101_1,
      4'b110_0: d_next = SD_NEG;
      4'b110_1: d_next = SD_ZERO;
      default:  d_next = SD_ZERO;   // 111_x
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d <= SD_ZERO;
      z <= 2'b00;
    end else begin
      d <= d_next;
      z <= start ? {b0, b0} : {w_hat[0] | cin, w_hat[0]};
    end
  end

endmodule
