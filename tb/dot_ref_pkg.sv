// dot_ref_pkg - reference model shared by the testbenches.
//
// Computes the kernel matrices and transforms with formulas written
// independently of the RTL package: the DHT kernel as sqrt(2)*cos(theta - pi/4)
// scaled by 1/sqrt(2) (i.e. cos(theta - pi/4)), the Hadamard sign by walking
// the bits of i and k one at a time, and the transform as a plain 64-bit
// dot product.
package dot_ref_pkg;

  localparam real RPI = 3.141592653589793;

  // transform code: 0 = DCT, 1 = DHT, 2 = Hadamard
  function automatic longint ref_coef(int t, int n, int l, int i, int k);
    real s, v;
    int  sgn;
    s = 2.0 ** (l - 1) - 1.0;
    if (t == 0) begin
      v = $cos(RPI * real'(i) * (2.0 * real'(k) + 1.0) / (2.0 * real'(n)));
      if (i == 0) v = v * 0.7071067811865476;
      return longint'($floor(v * s + 0.5));
    end else if (t == 1) begin
      v = $cos(2.0 * RPI * real'(i) * real'(k) / real'(n) - RPI / 4.0);
      return longint'($floor(v * s + 0.5));
    end else begin
      sgn = 1;
      for (int b = 0; b < 31; b++)
        if (((i >> b) & 1) == 1 && ((k >> b) & 1) == 1) sgn = -sgn;
      return longint'(sgn);
    end
  endfunction

  function automatic longint ref_y(int t, int n, int l, int i, longint xs[]);
    longint acc;
    acc = 0;
    for (int k = 0; k < n; k++) acc += ref_coef(t, n, l, i, k) * xs[k];
    return acc;
  endfunction

  // Random signed w-bit value; every fourth draw is an extreme value.
  function automatic longint rand_word(int w);
    int unsigned r;
    longint      lo, hi;
    lo = -(longint'(1) << (w - 1));
    hi = (longint'(1) << (w - 1)) - 1;
    r  = $urandom % 16;
    if (r == 0) return lo;
    if (r == 1) return hi;
    if (r == 2) return 0;
    if (r == 3) return -1;
    return lo + longint'($urandom) % (longint'(1) << w);
  endfunction

endpackage
