// dwt_ref_pkg: reference models used by the testbenches. They recompute the
// lifting transforms in plain integer arithmetic, written independently of
// the RTL: the rounded lifting product is
//   r(coef, s) = sign * floor((|s| * |coef| + 2**(FRAC-1)) / 2**FRAC),
//   sign = sign(s) * sign(coef),
// and every sample wraps to 16 bits two's complement. Whole passes are
// computed one after the other (all predicts, then all updates), which is
// the textbook order, not the processor's interleaved schedule.
package dwt_ref_pkg;

  localparam int FRAC = 12;

  // coefficients as signed integers scaled by 2**FRAC
  localparam int K_ALPHA = -6497;
  localparam int K_BETA  = -217;
  localparam int K_GAMMA = 3616;
  localparam int K_DELTA = 1817;
  localparam int K_ZETA  = 4709;
  localparam int K_IZETA = 3563;

  function automatic int wrap16(longint v);
    return int'(shortint'(v));
  endfunction

  function automatic longint rmul(int coef, longint s);
    longint m, r;
    m = (s < 0 ? -s : s) * longint'(coef < 0 ? -coef : coef);
    r = (m + (longint'(1) << (FRAC - 1))) >>> FRAC;
    return ((s < 0) != (coef < 0)) ? -r : r;
  endfunction

  // forward predict + update on x[0..n-1]
  function automatic void fwd(ref int x[], input int n, input int cp, input int cu);
    int m = n / 2;
    for (int i = 0; i < m; i++) begin
      int r = (i == m - 1) ? x[2*i] : x[2*i+2];
      x[2*i+1] = wrap16(x[2*i+1] + rmul(cp, longint'(x[2*i]) + r));
    end
    for (int i = 0; i < m; i++) begin
      int l = (i == 0) ? x[1] : x[2*i-1];
      x[2*i] = wrap16(x[2*i] + rmul(cu, longint'(x[2*i+1]) + l));
    end
  endfunction

  // inverse of fwd
  function automatic void inv(ref int x[], input int n, input int cp, input int cu);
    int m = n / 2;
    for (int i = 0; i < m; i++) begin
      int l = (i == 0) ? x[1] : x[2*i-1];
      x[2*i] = wrap16(x[2*i] - rmul(cu, longint'(x[2*i+1]) + l));
    end
    for (int i = 0; i < m; i++) begin
      int r = (i == m - 1) ? x[2*i] : x[2*i+2];
      x[2*i+1] = wrap16(x[2*i+1] - rmul(cp, longint'(x[2*i]) + r));
    end
  endfunction

  function automatic void scale(ref int x[], input int n, input int ce, input int co);
    for (int i = 0; i < n / 2; i++) begin
      x[2*i]   = wrap16(rmul(ce, x[2*i]));
      x[2*i+1] = wrap16(rmul(co, x[2*i+1]));
    end
  endfunction

  // complete 9/7 line transform, results interleaved (a at even, d at odd)
  function automatic void dwt97(ref int x[], input int n);
    fwd(x, n, K_ALPHA, K_BETA);
    fwd(x, n, K_GAMMA, K_DELTA);
    scale(x, n, K_ZETA, K_IZETA);
  endfunction

  // floating-point 9/7 line transform with the unrounded coefficients
  function automatic void dwt97_real(ref real x[], input int n);
    real c[4] = '{-1.58613, -0.0529, 0.882911, 0.44350};
    int m = n / 2;
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < m; i++)
        x[2*i+1] += c[2*s] * (x[2*i] + ((i == m - 1) ? x[2*i] : x[2*i+2]));
      for (int i = 0; i < m; i++)
        x[2*i] += c[2*s+1] * (x[2*i+1] + ((i == 0) ? x[1] : x[2*i-1]));
    end
    for (int i = 0; i < m; i++) begin
      x[2*i]   *= 1.1496;
      x[2*i+1] /= 1.1496;
    end
  endfunction

endpackage
