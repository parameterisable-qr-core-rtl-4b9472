// qr_tb_pkg: conversions between real numbers and the array's floating-point
// words, for the testbenches. r2f truncates, like the array's operators.
package qr_tb_pkg;
  import qr_pkg::*;

  function automatic real pow2(int e);
    real p;
    p = 1.0;
    for (int i = 0; i < e; i++) p = p * 2.0;
    for (int i = 0; i > e; i--) p = p / 2.0;
    return p;
  endfunction

  function automatic fp_t r2f(real v);
    logic   s;
    int     e;
    real    f;
    longint frac;
    if (v == 0.0) return '0;
    s = v < 0.0;
    f = s ? -v : v;
    e = 0;
    while (f >= 2.0) begin f = f / 2.0; e++; end
    while (f < 1.0)  begin f = f * 2.0; e--; end
    frac = longint'((f - 1.0) * pow2(MAN_W) - 0.5);
    if (frac < 0) frac = 0;
    return {s, EXP_W'(e + BIAS), MAN_W'(frac)};
  endfunction

  function automatic real f2r(fp_t v);
    real f;
    int  e;
    if (v[FP_W-2 -: EXP_W] == '0) return 0.0;
    e = int'(v[FP_W-2 -: EXP_W]) - BIAS;
    f = (1.0 + real'(v[MAN_W-1:0]) / pow2(MAN_W)) * pow2(e);
    return v[FP_W-1] ? -f : f;
  endfunction

  // uniform in [-1, 1]
  function automatic real rnd();
    return (real'($urandom_range(0, 2000000)) / 1000000.0) - 1.0;
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // |got - want| within tol relative to max(1, |want|)
  function automatic bit close(real got, real want, real tol);
    return fabs(got - want) <= tol * (1.0 + fabs(want));
  endfunction
endpackage
