// olau_module: one module (chip) of the on-line arithmetic unit Y = A*X + B.
//
// A and X arrive one signed digit per cycle, most significant first; B is
// an off-line two's complement number whose sign bit sits at the 1/2
// position. The module evaluates the residual recurrence
//     w_j = 2 (w_{j-1} - d_{j-1}) + X_j a_j + A_{j-1} x_j ,   w_0 = B
// over WIDTH bit slices (its share of the operand positions) plus two
// sign-extension slices (positions -1 and 0, used only in the most
// significant module) and, in the most significant module, selects one
// output digit d_j per cycle. Any number of identical modules can be chained
// (see olau_unit); `lob` marks the least significant one.
//
// Pipeline, for the digit pair (a_j, x_j) on the pins in cycle t:
//   t   input registers (also forwarded to the next higher module)
//   t+1 conversion: X register becomes X_j, A register becomes A_{j-1}
//       (A is loaded one cycle behind X, with one-cycle-old digits)
//   t+2 multipliers: Ax = A_{j-1} x_j and Xa = X_j a_j, registered
//   t+3 two carry-save levels -> C and S registers (the only loop per slice)
//   t+4 selection -> d_j register; d_j is on `d_out` in cycle t+5
// The selection stage feeds nothing back into the slices, which is why it
// can sit in its own pipeline stage.
//
// Loading: `ld_in` marks, in the cycle the digit pair is on the pins, the
// digit that belongs to this module's first slice; it is registered like
// the digits and then travels one slice per cycle. `ld_out` leaves one slice
// before the end, so it reaches the next lower module in that module's pin
// cycle for the following digit. In the most significant module `ld_in` is
// wired to the init arriving at its `init_in`. WIDTH must be at least 2. `init_in` comes with the first digit pair of an operation and
// restarts the module, so operations can follow each other back to back.
//
// Inter-module signals (all registered, from lower to higher module, which
// runs one cycle behind): c_out = {second-level carry of the top slice,
// previous C bit of the top slice}, s_out = previous S bit of the top slice,
// cp_out = first-level carry of the top slice. In the least significant
// module these inputs are ignored: the previous C/S bits shifted in are 0
// and the two free carry slots carry the +1 corrections of the multipliers.
//
// Bit index b of internal vectors holds local position WIDTH-b: b = 0 is the
// lowest slice, b = WIDTH-1 the highest slice, b = WIDTH and WIDTH+1 the two
// sign-extension positions. `b_in` uses the same order (b_in[WIDTH-1] is the
// first B bit of this module, the sign bit of B in the top module).
//
// The recurrence, the slice structure, the 5-cycle latency, the inter-module
// bit set and the low-to-high chaining follow the document. The exact split
// of work between pipeline stages, the mux that injects B at the first step
// (instead of loading it into the C register) and the reset are this
// design's own choices. The unconfirmed flags of the A and X registers and
// the z register of the selection are read only inside those blocks and
// are left unconnected here.
module olau_module
  import olau_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lob,
  input  logic             init_in,
  input  sd_t              a_in,
  input  sd_t              x_in,
  input  logic             ld_in,
  input  logic [WIDTH-1:0] b_in,
  input  logic [1:0]       c_in,
  input  logic             s_in,
  input  logic             cp_in,
  output logic             init_out,
  output sd_t              a_out,
  output sd_t              x_out,
  output logic             ld_out,
  output logic [1:0]       c_out,
  output logic             s_out,
  output logic             cp_out,
  output sd_t              d_out
);

  localparam int unsigned FW = WIDTH + 2;

  // ---------------------------------------------------------------- input
  sd_t  in_a, in_x, a_dly;
  logic in_init;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_a    <= SD_ZERO;
      in_x    <= SD_ZERO;
      in_init <= 1'b0;
      a_dly   <= SD_ZERO;
    end else begin
      in_a    <= a_in;
      in_x    <= x_in;
      in_init <= init_in;
      a_dly   <= in_a;
    end
  end

  assign init_out = in_init;
  assign a_out    = in_a;
  assign x_out    = in_x;

  // ------------------------------------------------------ load shift chain
  logic [WIDTH-1:0] ldv, ld_a;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ldv  <= '0;
      ld_a <= '0;
    end else begin
      ldv  <= {ld_in, ldv[WIDTH-1:1]};
      ld_a <= ldv;
    end
  end

  assign ld_out = ldv[1];

  // ------------------------------------------------------------ conversion
  logic [FW-1:0] x_val, x_unc, a_val, a_unc;
  sd_t           a_dig;
  logic [FW-1:0] a_ld;

  always_comb begin
    a_dig = in_init ? SD_ZERO : a_dly;
    a_ld  = in_init ? '0 : {2'b00, ld_a};
  end

  olau_conv #(.WIDTH(FW), .SIGN_BITS(2)) u_xreg (
    .clk, .rst_n, .init(in_init), .digit(in_x), .ld({2'b00, ldv}),
    .value(x_val), .unconf(x_unc)
  );

  olau_conv #(.WIDTH(FW), .SIGN_BITS(2)) u_areg (
    .clk, .rst_n, .init(in_init), .digit(a_dig), .ld(a_ld),
    .value(a_val), .unconf(a_unc)
  );

  sd_t  pa, px;
  logic st2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pa  <= SD_ZERO;
      px  <= SD_ZERO;
      st2 <= 1'b0;
    end else begin
      pa  <= in_a;
      px  <= in_x;
      st2 <= in_init;
    end
  end

  // ----------------------------------------------------------- multipliers
  logic [FW-1:0] ax, xa, ax_r, xa_r;
  logic          corr_x, corr_a, corr_x_r, corr_a_r, st3;

  olau_mult #(.WIDTH(FW)) u_mul_ax (.vec(a_val), .digit(px), .prod(ax), .corr(corr_x));
  olau_mult #(.WIDTH(FW)) u_mul_xa (.vec(x_val), .digit(pa), .prod(xa), .corr(corr_a));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ax_r     <= '0;
      xa_r     <= '0;
      corr_x_r <= 1'b0;
      corr_a_r <= 1'b0;
      st3      <= 1'b0;
    end else begin
      ax_r     <= ax;
      xa_r     <= xa;
      corr_x_r <= corr_x;
      corr_a_r <= corr_a;
      st3      <= st2;
    end
  end

  // ------------------------------------------------- carry-save recurrence
  logic [FW-1:0] c_reg, s_reg, c_src, s_src, c2, s2, c_new, s_new, k1, k2;
  logic          c_prev_lo, s_prev_lo, cin1, cin2;

  always_comb begin
    // first step of an operation: the previous residual is B (in C), S = 0
    c_src     = st3 ? {2'b00, b_in} : c_reg;
    s_src     = st3 ? '0 : s_reg;
    c_prev_lo = lob ? 1'b0 : c_in[0];
    s_prev_lo = lob ? 1'b0 : s_in;
    // 2*(w - top part): positions >= 2 shifted up one place; the two
    // sign-extension positions get zeros (their share lives in z)
    c2   = {2'b00, c_src[WIDTH-2:0], c_prev_lo};
    s2   = {2'b00, s_src[WIDTH-2:0], s_prev_lo};
    cin1 = lob ? corr_x_r : cp_in;
    cin2 = lob ? corr_a_r : c_in[1];
  end

  olau_csa #(.WIDTH(FW)) u_csa (
    .p1(ax_r), .p2(xa_r), .c2, .s2, .cin1, .cin2,
    .c_new, .s_new, .k1, .k2
  );

  logic cp_o, cc_o, cprev_o, sprev_o;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_reg   <= '0;
      s_reg   <= '0;
      cp_o    <= 1'b0;
      cc_o    <= 1'b0;
      cprev_o <= 1'b0;
      sprev_o <= 1'b0;
    end else begin
      c_reg   <= c_new;
      s_reg   <= s_new;
      cp_o    <= k1[WIDTH-1];
      cc_o    <= k2[WIDTH-1];
      cprev_o <= c_src[WIDTH-1];
      sprev_o <= s_src[WIDTH-1];
    end
  end

  assign c_out  = {cc_o, cprev_o};
  assign s_out  = sprev_o;
  assign cp_out = cp_o;

  // ------------------------------------------------------------- selection
  logic [1:0] z;

  olau_select u_sel (
    .clk, .rst_n,
    .c_top(c_reg[FW-1:WIDTH-3]),
    .s_top(s_reg[FW-1:WIDTH-3]),
    .start(st3),
    .b0(b_in[WIDTH-1]),
    .d(d_out),
    .z
  );

endmodule
