// gcd_ref_pkg: reference model of the plus-minus GCD algorithm for the
// testbenches, written on wide integers, independent of the bit-serial RTL.
package gcd_ref_pkg;

  typedef logic signed [191:0] val_t;

  // One reduction step. pm = 1 for plus-minus, plus = 1 when A + B was used.
  function automatic void ref_step(inout val_t a, inout val_t b,
                                   output bit pm, output bit plus);
    val_t s;
    plus = 1'b0;
    if (b[0] == 1'b0) begin
      pm = 1'b0;
      b  = b >>> 1;
    end else begin
      pm   = 1'b1;
      plus = (a[1] != b[1]);
      s    = plus ? a + b : a - b;
      a    = b;
      b    = s >>> 2;
    end
  endfunction

  // Number of trailing zeros of x (x != 0).
  function automatic int ctz(val_t x);
    int k = 0;
    while (x[k] == 1'b0 && k < $bits(val_t) - 1) k++;
    return k;
  endfunction

  function automatic val_t absval(val_t x);
    return (x < 0) ? -x : x;
  endfunction

  function automatic val_t gcd(val_t x, val_t y);
    val_t t;
    x = absval(x);
    y = absval(y);
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  // Random value of n bits magnitude, either sign when neg_ok.
  function automatic val_t rand_val(int n, bit neg_ok);
    val_t v = '0;
    for (int i = 0; i < n; i++) v[i] = 1'($urandom);
    if (neg_ok && $urandom % 2 == 1) v = -v;
    return v;
  endfunction

  // Link lines at frame position p (p may lie beyond the frame: the
  // operands are sign-extended by construction).
  function automatic gcd_pkg::link_t link_at(val_t a, val_t b, int p, bit start);
    gcd_pkg::link_t l;
    l.start = start;
    l.a0 = a[p];
    l.a1 = a[p+1];
    l.b0 = b[p];
    l.b1 = b[p+1];
    return l;
  endfunction

  // Random odd A and any B with |A|, |B| < 2**(w-2), so that every value the
  // algorithm produces fits a w-bit frame.
  function automatic void rand_pair(int w, output val_t a, output val_t b);
    a = rand_val(w - 3, 1'b1);
    a[0] = 1'b1;
    if (a < 0) a = a - 2;  // keep odd and in range after sign flip
    if (absval(a) >= (val_t'(1) <<< (w - 2))) a = 1;
    b = rand_val(w - 3, 1'b1);
  endfunction

endpackage
