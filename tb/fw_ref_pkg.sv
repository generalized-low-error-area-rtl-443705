// fw_ref_pkg -- reference models for the fixed-width multiplier testbenches.
//
// Works on the Baugh-Wooley partial-product matrix of two n-bit
// two's-complement operands (bit x_i*y_j in column i+j, complemented when
// exactly one of i, j is n-1) and evaluates the error-compensation biases
// straight from their defining formulas with integer arithmetic, scaled by
// 2^n so that no fractions are needed. Nothing here mirrors the array
// structure of the RTL. Valid for n <= 16.
package fw_ref_pkg;

  // Two's-complement value of the low n bits of v.
  function automatic longint sval(longint unsigned v, int n);
    longint unsigned m = (64'd1 << n) - 1;
    longint t = longint'(v & m);
    if (t >= (64'sd1 <<< (n - 1))) t -= (64'sd1 <<< n);
    return t;
  endfunction

  // Baugh-Wooley bit x_i*y_j (i, j in 0..n-1).
  function automatic int bw_bit(longint unsigned x, longint unsigned y, int n, int i, int j);
    int b = int'((x >> i) & (y >> j) & 1);
    if ((i == n - 1) != (j == n - 1)) b ^= 1;
    return b;
  endfunction

  // Number of ones in column c (0 <= c <= n-1) of the matrix.
  function automatic int col_sum(longint unsigned x, longint unsigned y, int n, int c);
    int s = 0;
    for (int i = 0; i <= c; i++)
      if (i < n && c - i < n) s += bw_bit(x, y, n, i, c - i);
    return s;
  endfunction

  // Value of the n least significant columns (what a fixed-width product drops).
  function automatic longint low_part(longint unsigned x, longint unsigned y, int n);
    longint lp = 0;
    for (int c = 0; c < n; c++) lp += longint'(col_sum(x, y, n, c)) <<< c;
    return lp;
  endfunction

  // Type 1 bias with index theta_{Q=0,w}, w >= 1, literally
  //   floor( E_main/2 + E_remain/2 + theta/2^w - E_reduct,w + 1/2 - [theta>0]/2^w )
  // with every term multiplied by 2^n.
  function automatic longint sigma_type1(longint unsigned x, longint unsigned y, int n, int w);
    longint e_main   = longint'(col_sum(x, y, n, n - 1)) <<< (n - 1);
    longint e_remain = 0;
    longint e_reduct = 0;
    longint theta    = col_sum(x, y, n, n - 1 - w);
    longint t;
    for (int c = 0; c <= n - 2; c++) e_remain += longint'(col_sum(x, y, n, c)) <<< c;
    for (int c = 0; c <= n - 1 - w; c++) e_reduct += longint'(col_sum(x, y, n, c)) <<< c;
    t = e_main + e_remain + (theta <<< (n - w)) - e_reduct + (64'sd1 <<< (n - 1));
    if (theta > 0) t -= (64'sd1 <<< (n - w));
    return t >>> n;
  endfunction

  // Type 2 bias at w = 0 with index theta_{Q,0}:
  //   x_{n-2}y_1 + ... + x_1y_{n-2} + [theta_Q < n].
  function automatic longint sigma_type2(longint unsigned x, longint unsigned y, int n,
                                         longint unsigned q);
    int theta = 0;
    int mid = 0;
    for (int k = 0; k < n; k++) begin
      int i = n - 1 - k;
      int b = int'((x >> i) & (y >> k) & 1);
      if (k != 0 && k != n - 1) mid += b;
      theta += b ^ int'((q >> i) & 1);
    end
    return longint'(mid + ((theta < n) ? 1 : 0));
  endfunction

  // Fixed-width product: the n high bits of the true product, with the
  // dropped columns replaced by the bias sigma, as an n-bit pattern.
  function automatic longint unsigned fixed_width(longint unsigned x, longint unsigned y,
                                                  int n, longint sigma);
    longint prod = sval(x, n) * sval(y, n);
    longint hi   = (prod - low_part(x, y, n)) >>> n;
    return longint'(hi + sigma) & ((64'd1 << n) - 1);
  endfunction

endpackage
