// dwt_ref_pkg: software reference of the fixed-point (9,7) lifting DWT, used
// by the testbenches to work out expected values independently of the RTL
// (lift_steps also serves other lifting filters).
// It lifts whole lines in place, the textbook way (all predict outputs of a
// step, then all update outputs), with symmetric extension at both ends,
// instead of the systolic slot schedule of the hardware.  Coefficients are
// re-derived here from the real-valued constants: round(c * 2^14).
// Fixed point: a product is rounded toward minus infinity (floor division by
// 2^14) and every result wraps to the sample width.
package dwt_ref_pkg;

  localparam int  RCF   = 14;
  localparam real ALPHA = -1.586134342;
  localparam real BETA  = -0.05298011854;
  localparam real GAMMA = 0.8829110762;
  localparam real DELTA = 0.4435068522;
  localparam real ZETA  = 1.149604398;

  function automatic longint qc(real c);
    real s;
    s = c * real'(longint'(1) << RCF);
    return (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
  endfunction

  function automatic longint coef97(int i);
    case (i)
      0: return qc(ALPHA);
      1: return qc(BETA);
      2: return qc(GAMMA);
      default: return qc(DELTA);
    endcase
  endfunction

  // floor(x / 2^RCF) by integer division
  function automatic longint fdiv(longint x);
    longint d;
    d = longint'(1) << RCF;
    if (x >= 0) return x / d;
    return -((-x + d - 1) / d);
  endfunction

  function automatic longint wrapw(longint v, int w);
    longint m;
    m = (longint'(1) << w) - 1;
    v = v & m;
    if (v >= (longint'(1) << (w - 1))) v = v - (longint'(1) << w);
    return v;
  endfunction

  function automatic longint step(longint a, longint b, longint c, longint coef, int w);
    return wrapw(a + fdiv((b + c) * coef), w);
  endfunction

  // In-place lifting with any even number of symmetric steps: step s uses the
  // Q14 coefficient coefs[s]; even s predicts odd samples, odd s updates even
  // ones.  lift97 below is the same for the four (9,7) steps.
  function automatic void lift_steps(ref longint x [], input int n, input int w,
                                     input longint coefs [], input int nsteps);
    longint l, r;
    for (int s = 0; s < nsteps; s++) begin
      if (s % 2 == 0) begin
        for (int i = 1; i < n; i += 2) begin
          r = (i + 1 < n) ? x[i+1] : x[i-1];
          x[i] = step(x[i], x[i-1], r, coefs[s], w);
        end
      end else begin
        for (int i = 0; i < n; i += 2) begin
          l = (i > 0) ? x[i-1] : x[i+1];
          x[i] = step(x[i], l, x[i+1], coefs[s], w);
        end
      end
    end
  endfunction

  // In-place lifting of x[0..n-1]: afterwards x[2j] = low j, x[2j+1] = high j.
  function automatic void lift97(ref longint x [], input int n, input int w);
    longint l, r;
    for (int s = 0; s < 4; s++) begin
      if (s % 2 == 0) begin
        for (int i = 1; i < n; i += 2) begin
          r = (i + 1 < n) ? x[i+1] : x[i-1];
          x[i] = step(x[i], x[i-1], r, coef97(s), w);
        end
      end else begin
        for (int i = 0; i < n; i += 2) begin
          l = (i > 0) ? x[i-1] : x[i+1];
          x[i] = step(x[i], l, x[i+1], coef97(s), w);
        end
      end
    end
  endfunction

  // Floating-point (9,7) lifting of one line, no quantisation, same extension.
  function automatic void lift97_real(ref real x [], input int n);
    real c [4];
    real l, r;
    c = '{ALPHA, BETA, GAMMA, DELTA};
    for (int s = 0; s < 4; s++) begin
      if (s % 2 == 0) begin
        for (int i = 1; i < n; i += 2) begin
          r = (i + 1 < n) ? x[i+1] : x[i-1];
          x[i] = x[i] + c[s] * (x[i-1] + r);
        end
      end else begin
        for (int i = 0; i < n; i += 2) begin
          l = (i > 0) ? x[i-1] : x[i+1];
          x[i] = x[i] + c[s] * (l + x[i+1]);
        end
      end
    end
  endfunction

  // Full one-level 2-D transform of an m x n image of pixels (row major),
  // pixels scaled by 2^frac.  Result img[r*n+c]: rows/columns even = low.
  // Then LL *= zeta^2 and HH /= zeta^2 (quantised like the coefficients).
  function automatic void dwt2d(ref longint img [], input int n, input int m,
                                input int frac, input int w);
    longint line [];
    line = new[n];
    for (int r = 0; r < m; r++) begin
      for (int c = 0; c < n; c++) line[c] = img[r*n+c] <<< frac;
      lift97(line, n, w);
      for (int c = 0; c < n; c++) img[r*n+c] = line[c];
    end
    line = new[m];
    for (int c = 0; c < n; c++) begin
      for (int r = 0; r < m; r++) line[r] = img[r*n+c];
      lift97(line, m, w);
      for (int r = 0; r < m; r++) img[r*n+c] = line[r];
    end
    for (int r = 0; r < m; r += 2)
      for (int c = 0; c < n; c += 2) begin
        img[r*n+c] = wrapw(fdiv(img[r*n+c] * qc(ZETA * ZETA)), w);
        img[(r+1)*n+c+1] = wrapw(fdiv(img[(r+1)*n+c+1] * qc(1.0 / (ZETA * ZETA))), w);
      end
  endfunction

endpackage
