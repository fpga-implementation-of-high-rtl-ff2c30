// tb_roba_ref_pkg: arithmetic reference model of the truncated rounding-based
// approximate multiplier, used by the testbenches.
//
// It works on plain integers, not on the bit-level equations of the design:
// the nearest power of two is found by searching all powers of two and
// comparing distances, and the truncated products are ordinary integer
// products shifted right.
package tb_roba_ref_pkg;

  // Nearest power of two to v (0 for 0). A value exactly between two powers
  // rounds to the larger one, except 3, which rounds to 2.
  function automatic longint nearest_pow2(longint v);
    longint best;
    longint bestd;
    if (v == 0) return 0;
    if (v == 3) return 2;
    best  = 1;
    bestd = v - 1;
    for (int p = 1; p < 40; p++) begin
      longint c = longint'(1) << p;
      longint d = (c > v) ? c - v : v - c;
      if (d <= bestd) begin
        best  = c;
        bestd = d;
      end
    end
    return best;
  endfunction

  // Constant added before the guard columns are dropped.
  function automatic longint corr_value(int k, int corr);
    return (k > 0) ? longint'(corr) + (longint'(1) << (k - 1)) : longint'(corr);
  endfunction

  // Unsigned approximate product in kept columns (before the sign and before
  // dropping the guard columns).
  function automatic longint kept_value(longint ma, longint mb, int n, int k, int corr);
    longint ar = nearest_pow2(ma);
    longint br = nearest_pow2(mb);
    int     s  = n - k;
    return ((ma * br) >>> s) + ((mb * ar) >>> s) + corr_value(k, corr) - ((ar * br) >>> s);
  endfunction

  // Expected N-bit output for raw operands a and b.
  function automatic longint roba_ref(longint a, longint b, int n, int k, int corr, bit is_signed);
    longint ma = a, mb = b, v;
    bit neg = 1'b0;
    if (is_signed) begin
      if (a >= (longint'(1) << (n - 1))) begin ma = (longint'(1) << n) - a; neg = ~neg; end
      if (b >= (longint'(1) << (n - 1))) begin mb = (longint'(1) << n) - b; neg = ~neg; end
    end
    v = kept_value(ma, mb, n, k, corr) >>> k;
    if (neg) v = -v;
    return v & ((longint'(1) << n) - 1);
  endfunction

endpackage
