// olau_unit: on-line arithmetic unit Y = A*X + B of MODULES chained modules.
//
// A and X enter as radix-2 signed digits, one pair per cycle, most
// significant first (digit j has weight 2^-j, j = 1..N with
// N = WIDTH*MODULES); for convergence |A|, |X| < 1/8 (more precisely
// |A| + |X| < 1/4). B is a two's complement number of N bits whose sign bit
// b[N-1] has weight -1/2, so |B| <= 1/2. Y leaves as signed digits d_1, d_2,
// ... on `d`, one per cycle, and keeps coming for as long as the unit is
// clocked; digits of A or X beyond N must be zero unless the other operand
// is complete by then.
//
// Nearest-neighbour chaining, least significant module first: the operand
// digits and `init` enter the least significant module and ripple one module
// per cycle towards the most significant one, so each module runs one cycle
// behind the one below it. That leaves a full cycle for the four residual
// bits each module passes upward. The load pulse starts at the most
// significant module, whose ld_in is the init arriving at its init_in (as
// in the document's inter-module wiring), and travels down through the
// modules, one slice per cycle.
//
// Pins that have no neighbour are left unused: the digit, init and
// residual outputs of the most significant module, the ld output of the
// least significant one, and the digit outputs of all but the most
// significant module (only its selection logic sees the full residual).
//
// Timing: `init` is asserted together with the first digit pair. d_j is on
// `d` LATENCY = MODULES + 4 cycles after a_j, x_j were on the inputs (5 cycles
// for one module plus one per extra module). A new operation may start in the
// cycle right after the last digit pair of the previous one; the previous
// result's remaining digits still come out first.
//
// The module count, the chaining and the latency formula follow the
// document; 2 modules of 8 bits (16-digit operands) is the configuration of
// its worked example.
module olau_unit
  import olau_pkg::*;
#(
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned MODULES = 2,
  parameter int unsigned N       = WIDTH * MODULES
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  sd_t          a,
  input  sd_t          x,
  input  logic [N-1:0] b,
  output sd_t          d
);

  logic [MODULES-1:0]       init_o, ld_o, s_o, cp_o, init_i, ld_i, s_i, cp_i;
  logic [MODULES-1:0][1:0]  c_o, c_i;
  sd_t  [MODULES-1:0]       a_o, x_o, a_i, x_i, d_o;

  for (genvar k = 0; k < MODULES; k++) begin : g_mod
    // module 0 is the most significant
    if (k == MODULES - 1) begin : g_low
      assign init_i[k] = init;
      assign a_i[k]    = a;
      assign x_i[k]    = x;
      assign c_i[k]    = 2'b00;
      assign s_i[k]    = 1'b0;
      assign cp_i[k]   = 1'b0;
    end else begin : g_mid
      assign init_i[k] = init_o[k+1];
      assign a_i[k]    = a_o[k+1];
      assign x_i[k]    = x_o[k+1];
      assign c_i[k]    = c_o[k+1];
      assign s_i[k]    = s_o[k+1];
      assign cp_i[k]   = cp_o[k+1];
    end
    if (k == 0) begin : g_top
      assign ld_i[k] = init_i[0];
    end else begin : g_below
      assign ld_i[k] = ld_o[k-1];
    end

    olau_module #(.WIDTH(WIDTH)) u_mod (
      .clk, .rst_n,
      .lob     (k == MODULES - 1),
      .init_in (init_i[k]),
      .a_in    (a_i[k]),
      .x_in    (x_i[k]),
      .ld_in   (ld_i[k]),
      .b_in    (b[N-1-WIDTH*k -: WIDTH]),
      .c_in    (c_i[k]),
      .s_in    (s_i[k]),
      .cp_in   (cp_i[k]),
      .init_out(init_o[k]),
      .a_out   (a_o[k]),
      .x_out   (x_o[k]),
      .ld_out  (ld_o[k]),
      .c_out   (c_o[k]),
      .s_out   (s_o[k]),
      .cp_out  (cp_o[k]),
      .d_out   (d_o[k])
    );
  end

  assign d = d_o[0];

endmodule
