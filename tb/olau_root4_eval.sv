// olau_root4_eval: test bench building block (not a design module): one
// on-line evaluator of P(x) = p4 x^4 + p3 x^3 + p2 x^2 + p1 x + p0 in Horner
// form, four chained on-line units of M modules of W bits (N = W*M digits).
//
// AU4 takes x and p4 on-line and p3 off-line; AU3, AU2 and AU1 each take the
// previous unit's output digits and x, with p2, p1, p0 off-line. x and init
// reach AU3, AU2 and AU1 through delay lines of LAT, 2*LAT and 3*LAT stages
// (LAT = M + 4, the unit latency). The p4 digits are produced here from the
// coefficient, one per cycle starting with init.
//
// Ports: clk, rst_n; init with x_1, then the digits of x on `x`. Out: `d`,
// the digits of P(x) (AU1's output), whose first digit comes 4*LAT cycles
// after init; `init_out`, init delayed 4*LAT cycles so that it marks that
// first digit; and, for checking, the on-line inputs (ua, ux), outputs (ud)
// and init (uinit) of every unit, index 0 = AU4 ... 3 = AU1.
`timescale 1ns/1ps
module olau_root4_eval
  import olau_pkg::*;
#(
  parameter int W = 16,
  parameter int M = 2,
  parameter logic [W*M-1:0] P0 = '0,
  parameter logic [W*M-1:0] P1 = '0,
  parameter logic [W*M-1:0] P2 = '0,
  parameter logic [W*M-1:0] P3 = '0,
  parameter logic [W*M-1:0] P4 = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  sd_t        x,
  output sd_t        d,
  output logic       init_out,
  output sd_t  [3:0] ua,
  output sd_t  [3:0] ux,
  output sd_t  [3:0] ud,
  output logic [3:0] uinit
);

  localparam int N = W * M, LAT = M + 4;

  // delay lines: xd[k], id[k] are x and init delayed k cycles (k >= 1)
  sd_t  xd [1:4*LAT];
  logic id [1:4*LAT];
  int   cnt;
  sd_t  p4;

  // p4 digit for the current cycle
  always_comb begin
    if (init)         p4 = P4[N-1] ? SD_POS : SD_ZERO;
    else if (cnt < N) p4 = P4[N-1-cnt] ? SD_POS : SD_ZERO;
    else              p4 = SD_ZERO;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        cnt <= N;
    else if (init)     cnt <= 1;
    else if (cnt < N)  cnt <= cnt + 1;
    for (int i = 4 * LAT; i > 1; i--) begin
      xd[i] <= rst_n ? xd[i-1] : SD_ZERO;
      id[i] <= rst_n ? id[i-1] : 1'b0;
    end
    xd[1] <= rst_n ? x : SD_ZERO;
    id[1] <= rst_n ? init : 1'b0;
  end
  assign init_out = id[4*LAT];

  sd_t d4, d3, d2, d1;
  olau_unit #(.WIDTH(W), .MODULES(M)) au4 (.clk, .rst_n, .init(init),      .a(p4), .x(x),          .b(P3), .d(d4));
  olau_unit #(.WIDTH(W), .MODULES(M)) au3 (.clk, .rst_n, .init(id[LAT]),   .a(d4), .x(xd[LAT]),   .b(P2), .d(d3));
  olau_unit #(.WIDTH(W), .MODULES(M)) au2 (.clk, .rst_n, .init(id[2*LAT]), .a(d3), .x(xd[2*LAT]), .b(P1), .d(d2));
  olau_unit #(.WIDTH(W), .MODULES(M)) au1 (.clk, .rst_n, .init(id[3*LAT]), .a(d2), .x(xd[3*LAT]), .b(P0), .d(d1));
  assign d = d1;

  assign ua    = {d2, d3, d4, p4};
  assign ux    = {xd[3*LAT], xd[2*LAT], xd[LAT], x};
  assign ud    = {d1, d2, d3, d4};
  assign uinit = {id[3*LAT], id[2*LAT], id[LAT], init};

endmodule
