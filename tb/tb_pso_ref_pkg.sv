// tb_pso_ref_pkg: reference arithmetic for the PSO testbenches.
//
// Software models of the fixed-point rules of the processor, written without
// the shift operators the RTL uses: a product rounded toward minus infinity
// is formed by integer division with an explicit correction for negative
// numerators. Values are plain longints in the FRAC-fraction-bit format.
package tb_pso_ref_pkg;
  import pso_pkg::*;

  localparam longint SCALE = longint'(1) << FRAC;   // 1.0

  // floor(n / 2^k) for any sign of n
  function automatic longint fdiv(longint n, int k);
    longint d;
    d = longint'(1) << k;
    if (n >= 0) return n / d;
    return -((-n + d - 1) / d);
  endfunction

  function automatic longint rmul(longint a, longint b);
    return fdiv(a * b, FRAC);
  endfunction

  localparam real PI = 3.14159265358979323846;

  function automatic longint fx(real r);          // nearest fixed-point value
    return longint'($floor(r * real'(SCALE) + 0.5));
  endfunction

  // cos(2*pi*ph/1024), nearest fixed-point value
  function automatic longint rcos(longint ph);
    ph = ph % 1024;
    if (ph < 0) ph += 1024;
    return fx($cos(2.0 * PI * real'(ph) / 1024.0));
  endfunction

  // exp(-u) as 2^-(u*log2 e): integer part as a shift, fraction by table
  function automatic longint rexp(longint u);
    longint v, k, f;
    if (u < 0) u = 0;
    v = fdiv(u * 94548, 16);
    k = v / SCALE;
    f = v % SCALE;
    if (k > FRAC) return 0;
    return fx($pow(2.0, -real'(f) / real'(SCALE))) / (longint'(1) << k);
  endfunction

  // Reference benchmark value for position x (already shifted: z = x - shift)
  function automatic longint ref_fit(func_e fn, longint z[]);
    longint f, s1, s2, s2sq, pre, t;
    int n;
    n = z.size();
    f = 0;
    case (fn)
      FN_SPHERE: for (int i = 0; i < n; i++) f = f + rmul(z[i], z[i]);
      FN_ZAKHAROV: begin
        s1 = 0; s2 = 0;
        for (int i = 0; i < n; i++) begin
          s1 = s1 + rmul(z[i], z[i]);
          s2 = s2 + fdiv((i + 1) * z[i], 1);
        end
        s2sq = rmul(s2, s2);
        f = s1 + s2sq + rmul(s2sq, s2sq);
      end
      FN_VARDIM: begin
        s1 = 0; s2 = 0;
        for (int i = 0; i < n; i++) begin
          t  = z[i] - SCALE;
          s1 = s1 + rmul(t, t);
          s2 = s2 + (i + 1) * t;
        end
        s2sq = rmul(s2, s2);
        f = s1 + s2sq + rmul(s2sq, s2sq);
      end
      FN_SCHWEFEL12: begin
        pre = 0;
        for (int i = 0; i < n; i++) begin
          pre = pre + z[i];
          f = f + rmul(pre, pre);
        end
      end
      FN_B2: begin
        f = rmul(z[0], z[0]) + 2 * rmul(z[1], z[1]) - rmul(fx(0.3), rcos(3 * z[0]))
          - rmul(fx(0.4), rcos(4 * z[1])) + fx(0.3) + fx(0.4);
      end
      FN_BRANIN: begin
        t = z[1] - rmul(fx(5.1 / (4.0 * PI * PI)), rmul(z[0], z[0])) + rmul(fx(5.0 / PI), z[0])
          - 6 * SCALE;
        f = rmul(t, t) + rmul(fx(10.0 * (1.0 - 1.0 / (8.0 * PI))), rcos(fdiv(z[0] * 20861, 16)))
          + 10 * SCALE;
      end
      FN_GOLDSTEIN: begin
        longint x11, x22, x12, a, b, c, d;
        x11 = rmul(z[0], z[0]); x22 = rmul(z[1], z[1]); x12 = rmul(z[0], z[1]);
        a = z[0] + z[1] + SCALE;
        b = 19 * SCALE - 14 * z[0] + 3 * x11 - 14 * z[1] + 6 * x12 + 3 * x22;
        c = 2 * z[0] - 3 * z[1];
        d = 18 * SCALE - 32 * z[0] + 12 * x11 + 48 * z[1] - 36 * x12 + 27 * x22;
        f = rmul(SCALE + rmul(rmul(a, a), b), 30 * SCALE + rmul(rmul(c, c), d));
      end
      FN_HARTMANN3: begin
        real am [4][3] = '{'{3.0, 10.0, 30.0}, '{0.1, 10.0, 35.0}, '{3.0, 10.0, 30.0}, '{0.1, 10.0, 35.0}};
        real pm [4][3] = '{'{0.3689, 0.1170, 0.2673}, '{0.4699, 0.4387, 0.7470},
                           '{0.1091, 0.8732, 0.5547}, '{0.0381, 0.5743, 0.8828}};
        real al [4] = '{1.0, 1.2, 3.0, 3.2};
        for (int i = 0; i < 4; i++) begin
          longint in;
          in = 0;
          for (int j = 0; j < 3; j++) begin
            t = z[j] - fx(pm[i][j]);
            in = in + rmul(fx(am[i][j]), rmul(t, t));
          end
          f = f - rmul(fx(al[i]), rexp(in));
        end
      end
      FN_RASTRIGIN: for (int i = 0; i < n; i++)
        f = f + rmul(z[i], z[i]) - 10 * rcos(2 * z[i]) + 10 * SCALE;
      FN_ELLIPTIC: for (int i = 0; i < n; i++)
        f = f + rmul(fx($pow(1.0e6, (n > 1) ? real'(i) / real'(n - 1) : 0.0)), rmul(z[i], z[i]));
      default: for (int i = 0; i + 1 < n; i++) begin
        t = z[i+1] - rmul(z[i], z[i]);
        f = f + rmul(100 * SCALE, rmul(t, t)) + rmul(z[i] - SCALE, z[i] - SCALE);
      end
    endcase
    return f;
  endfunction

  // Reference velocity update of one dimension
  function automatic longint ref_vel(longint x, longint v, longint p, longint g,
                                     longint r1, longint r2, longint w, longint c1,
                                     longint c2, longint vmin, longint vmax);
    longint c1r1, c2r2, s;
    c1r1 = (c1 * r1) / (longint'(1) << R_W);
    c2r2 = (c2 * r2) / (longint'(1) << R_W);
    s = rmul(w, v) + rmul(c1r1, p - x) + rmul(c2r2, g - x);
    if (s > vmax) return vmax;
    if (s < vmin) return vmin;
    return s;
  endfunction

  // Random initial value lo + r*(hi-lo)
  function automatic longint ref_init(longint lo, longint hi, longint r);
    return lo + fdiv((hi - lo) * r, R_W);
  endfunction
endpackage
