// tb_fp16_pkg: reference half-precision arithmetic for the testbenches.
//
// Works on `real` values, independently of the bit-level RTL: the exact
// product or sum of two fp16 numbers fits a double, and to_fp16() rounds it
// with the rules the fabric's MACs use: round to nearest even, results below
// 2^-14 in magnitude flushed to zero, magnitudes that round to 2^16 or above
// become Inf. Subnormal inputs read as zero.
package tb_fp16_pkg;

  function automatic real pow2(int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real to_real(logic [15:0] h);
    real m;
    if (h[14:10] == 5'd0) return 0.0;
    m = real'(1024 + int'(h[9:0])) * pow2(int'(h[14:10]) - 25);
    return h[15] ? -m : m;
  endfunction

  function automatic logic [15:0] to_fp16(real x);
    logic s;
    real  a, m, fr;
    int   e, mi;
    if (x == 0.0) return 16'h0000;
    s = (x < 0.0);
    a = s ? -x : x;
    e = 0;
    while (a >= pow2(e + 1)) e++;
    while (a < pow2(e)) e--;
    if (e < -14) return {s, 15'd0};
    m  = a / pow2(e - 10);        // in [1024, 2048)
    mi = int'($floor(m));
    fr = m - real'(mi);
    if (fr > 0.5 || (fr == 0.5 && (mi % 2) == 1)) mi++;
    if (mi == 2048) begin
      mi = 1024;
      e++;
    end
    if (e > 15) return {s, 5'h1F, 10'd0};
    return {s, 5'(e + 15), 10'(mi - 1024)};
  endfunction

  function automatic logic [15:0] mul(logic [15:0] a, logic [15:0] b);
    return to_fp16(to_real(a) * to_real(b));
  endfunction

  function automatic logic [15:0] add(logic [15:0] a, logic [15:0] b);
    return to_fp16(to_real(a) + to_real(b));
  endfunction

  // Equal as values (+0 and -0 compare equal).
  function automatic bit same(logic [15:0] a, logic [15:0] b);
    return (a == b) || (a[14:0] == 15'd0 && b[14:0] == 15'd0);
  endfunction

  // Random finite fp16 with exponent field in [lo, hi].
  function automatic logic [15:0] rand_fp16(int lo, int hi);
    return {1'($urandom), 5'(lo + int'($urandom % 32'(hi - lo + 1))), 10'($urandom)};
  endfunction

endpackage
