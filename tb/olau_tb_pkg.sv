// olau_tb_pkg: reference arithmetic shared by the on-line unit testbenches.
//
// The unit's promise is a bound on the residual: after output digit d_j,
//   z_j = 2^j * (B + A_j * X_j - D_j)   satisfies   -1/2 <= z_j < 5/8,
// where A_j, X_j are the operand prefixes up to digit j and
// D_j = sum_{i<=j} d_i 2^-i. The checker evaluates z_j exactly with wide
// integers, independently of how the hardware represents the residual, so a
// wrong digit, a digit in the wrong cycle or a mis-weighted operand shows as
// a bound violation.
package olau_tb_pkg;

  localparam int WB = 448;
  typedef logic signed [WB-1:0] big_t;

  // digits are ints in {-1,0,1}; index 0 holds digit 1.
  // b is B scaled by 2^nb (a signed integer). Returns the number of steps j
  // (1..len) whose residual is out of bounds; first_bad is the first such j.
  function automatic int residual_violations(input int a[$], input int x[$],
                                             input int d[$], input big_t b,
                                             input int nb, input int len,
                                             output int first_bad);
    big_t aj, xj, dj, e, lo, hi, bs;
    int   bad;
    int   sc;
    bad = 0;
    first_bad = 0;
    sc = len;                         // prefixes scaled by 2^sc
    aj = '0; xj = '0; dj = '0;
    bs = b <<< (2*sc - nb);           // B scaled by 2^(2 sc)
    lo = -(big_t'(1) <<< (2*sc - 1));
    hi = big_t'(5) <<< (2*sc - 3);
    for (int j = 1; j <= len; j++) begin
      aj = aj + (big_t'(a[j-1]) <<< (sc - j));
      xj = xj + (big_t'(x[j-1]) <<< (sc - j));
      dj = dj + (big_t'(d[j-1]) <<< (sc - j));
      e  = (bs + aj * xj - (dj <<< sc)) <<< j;
      if (e < lo || e >= hi) begin
        if (bad == 0) first_bad = j;
        bad++;
      end
    end
    return bad;
  endfunction

  // value of a digit string as a real number (index 0 = weight 1/2)
  function automatic real digits_value(input int v[$], input int len);
    real r, w;
    r = 0.0;
    w = 0.5;
    for (int j = 0; j < len; j++) begin
      r = r + w * real'(v[j]);
      w = w / 2.0;
    end
    return r;
  endfunction

endpackage
