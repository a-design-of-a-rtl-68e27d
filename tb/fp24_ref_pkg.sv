// fp24_ref_pkg: reference arithmetic for the FPU testbenches.
//
// Converts between the fp24 format ({sign, 7-bit exponent biased by 63,
// 16-bit fraction}, zero for a zero exponent, no infinities) and real, and
// forms reference results with IEEE double arithmetic followed by
// truncation toward zero, saturation on overflow and flush to zero on
// underflow. Products of two fp24 values and sums whose exponents differ by
// less than 36 are exact in double, so for those the reference equals the
// correctly truncated result bit for bit.
package fp24_ref_pkg;

  function automatic real to_real(logic [23:0] f);
    real m;
    if (f[22:16] == 0) return 0.0;
    m = 1.0 + real'(f[15:0]) / 65536.0;
    m = m * $pow(2.0, real'(int'(f[22:16]) - 63));
    return f[23] ? -m : m;
  endfunction

  function automatic logic [23:0] from_real(real r);
    real m;
    int  e;
    logic s;
    if (r == 0.0) return 24'h0;
    s = (r < 0.0);
    m = s ? -r : r;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    if (e + 63 > 127) return {s, 7'h7f, 16'hffff};
    if (e + 63 < 1)   return 24'h0;
    return {s, 7'(e + 63), 16'($rtoi((m - 1.0) * 65536.0))};
  endfunction

  // For exponent gaps above 40 the double sum is no longer exact; the
  // truncated result is then the larger operand, or for opposite signs the
  // next value toward zero from it.
  function automatic logic [23:0] ref_add(logic [23:0] a, logic [23:0] b);
    logic [23:0] big, sml;
    if (a[22:16] != 0 && b[22:16] != 0 && (int'(a[22:16]) - int'(b[22:16]) > 40 ||
                                           int'(b[22:16]) - int'(a[22:16]) > 40)) begin
      big = (a[22:16] > b[22:16]) ? a : b;
      sml = (a[22:16] > b[22:16]) ? b : a;
      if (big[23] == sml[23]) return big;
      if (big[15:0] != 0) return {big[23:16], big[15:0] - 16'd1};
      return (big[22:16] == 7'd1) ? 24'h0 : {big[23], big[22:16] - 7'd1, 16'hffff};
    end
    return from_real(to_real(a) + to_real(b));
  endfunction

  function automatic logic [23:0] ref_mul(logic [23:0] a, logic [23:0] b);
    return from_real(to_real(a) * to_real(b));
  endfunction

  // random fp24 with unbiased exponent in [lo, hi]
  function automatic logic [23:0] rnd(int lo, int hi);
    int e;
    e = lo + int'($urandom_range(hi - lo));
    return {1'($urandom), 7'(e + 63), 16'($urandom)};
  endfunction

  // relative error |got - exp| / |exp|
  function automatic real rel_err(logic [23:0] got, real expv);
    real d;
    d = to_real(got) - expv;
    if (d < 0.0) d = -d;
    return (expv == 0.0) ? d : d / ((expv < 0.0) ? -expv : expv);
  endfunction

endpackage
