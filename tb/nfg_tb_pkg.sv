// nfg_tb_pkg: table generator and reference model for the NFG testbenches.
//
// nfg_program plays the part of the generator's offline synthesis flow:
//  * segment(): splits the input domain into non-uniform segments.  Each
//    segment [s, e] is approximated by the chord through (s, f(s)) and
//    (e, f(e)); the largest positive and negative deviations of f from the
//    chord are found by scanning every representable x in [s, e]; the
//    chord is shifted by v = (max + min) / 2 and the error is
//    (max - min) / 2.  A segment whose error exceeds the acceptable
//    approximation error is split at the point of largest |deviation| and
//    both halves are treated the same way.
//  * quantize(): turns each segment into a coefficients-table word
//    (-s_i, sign of c1_i, shift l_i, |c1_i| * 2^-l_i, f(s_i) + v_i).  l_i is
//    the smallest shift that makes the scaled magnitude fit C1_W bits.
//  * build_cascade(): fills the LUT cascade.  With the sign bit of x
//    inverted so that bit order is numeric order, the rails after the LUT
//    that has seen the low K bits of x carry
//        rank_K(x) = #{ j >= 1 : (s_j mod 2^K) <= (x mod 2^K) }.
//    LUT k maps (rank of the low bits, next bits) to the rank of the longer
//    low part, which is well defined because all low parts with the same
//    rank compare alike against every boundary.  For all bits the rank is
//    the segment index.  Inner LUTs store a dense code of the rank (the
//    distinct ranks numbered in order), so their rails need only
//    min(K, SEG_W) bits; rail_w() gives the width per LUT.
//  * model_y(): bit-exact model of the datapath, written from the number
//    formats, and seg_of(): segment index by binary search.
package nfg_tb_pkg;

  localparam real PI = 3.14159265358979323846;

  typedef enum int {
    F_SIN, F_COS, F_TAN, F_RECIP, F_RSQRT, F_SQRT, F_SQRT_NLN,
    F_EXP2, F_SIGMOID, F_GAUSS, F_LOG2, F_LN, F_SIN2, F_COS2
  } func_e;

  function automatic real f_eval(func_e fn, real x);
    case (fn)
      F_SIN:      return $sin(PI * x);
      F_COS:      return $cos(PI * x);
      F_TAN:      return $tan(PI * x);
      F_RECIP:    return 1.0 / x;
      F_RSQRT:    return 1.0 / $sqrt(x);
      F_SQRT:     return $sqrt(x);
      F_SQRT_NLN: return $sqrt(-$ln(x));
      F_EXP2:     return $pow(2.0, x);
      F_SIGMOID:  return 1.0 / (1.0 + $exp(-4.0 * x));
      F_GAUSS:    return $exp(-x * x / 2.0) / $sqrt(2.0 * PI);
      F_LOG2:     return $ln(x) / $ln(2.0);
      F_LN:       return $ln(x);
      F_SIN2:     return $sin(2.0 * PI * x);
      F_COS2:     return $cos(2.0 * PI * x);
      default:    return 0.0;
    endcase
  endfunction

  function automatic string f_name(func_e fn);
    case (fn)
      F_SIN:      return "sin(pi x)";
      F_COS:      return "cos(pi x)";
      F_TAN:      return "tan(pi x)";
      F_RECIP:    return "1/x";
      F_RSQRT:    return "1/sqrt(x)";
      F_SQRT:     return "sqrt(x)";
      F_SQRT_NLN: return "sqrt(-ln x)";
      F_EXP2:     return "2^x";
      F_SIGMOID:  return "sigmoid";
      F_GAUSS:    return "gaussian";
      F_LOG2:     return "log2(x)";
      F_LN:       return "ln(x)";
      F_SIN2:     return "sin(2 pi x)";
      F_COS2:     return "cos(2 pi x)";
      default:    return "?";
    endcase
  endfunction

  function automatic longint round_r(real v);
    return longint'($floor(v + 0.5));
  endfunction

  class nfg_program;
    // formats
    int x_w, x_frac, seg_w, n_cas, first_w, rest_w;
    int c1_w, c1_frac, l_w, y_w, y_frac, guard, a_w, a_frac, p_frac;
    bit use_shift, use_sign;
    // function and domain (integer codes of x, inclusive)
    func_e fn;
    longint lo, hi;
    bit  exhaustive;   // f tabulated at every x (small domains)
    real fv[];
    // segments (real coefficients)
    longint seg_s[$];
    real seg_c1[$];
    real seg_c0[$];
    real max_seg_err;
    // coefficient words
    longint q_negs[$];
    bit     q_neg[$];
    int     q_shl[$];
    longint q_mag[$];
    longint q_c0[$];
    bit     fits;   // every word fits its field
    // cascade contents: LUT k occupies lut[lut_base[k] +: lut_size[k]]
    int lut[];
    int lut_base[];
    int lut_size[];

    function new(int x_w_, int x_frac_, int seg_w_, int n_cas_, int first_w_,
                 int c1_w_, int c1_frac_, int l_w_, int y_w_, int y_frac_,
                 int guard_, bit use_shift_, bit use_sign_);
      x_w = x_w_; x_frac = x_frac_; seg_w = seg_w_; n_cas = n_cas_;
      first_w = first_w_; rest_w = (x_w - first_w) / (n_cas - 1);
      c1_w = c1_w_; c1_frac = c1_frac_; l_w = l_w_;
      y_w = y_w_; y_frac = y_frac_; guard = guard_;
      a_w = y_w + guard; a_frac = y_frac + guard; p_frac = c1_frac + x_frac;
      use_shift = use_shift_; use_sign = use_sign_;
      fits = 1'b1;
    endfunction

    function real xr(longint code);
      return real'(code) / real'(64'(1) << x_frac);
    endfunction

    // ---------------------------------------------------------- segment
    function real f_at(longint code);
      return exhaustive ? fv[code - lo] : f_eval(fn, xr(code));
    endfunction

    // Domains of up to 2^22 points are scanned at every x.  In larger ones
    // a segment longer than SAMPLES points is scanned on an even grid of
    // SAMPLES+1 points, so its error is estimated, not bounded.
    localparam longint EXHAUSTIVE_MAX = longint'(1) << 22;
    localparam longint SAMPLES = 4096;

    function void segment(func_e fn_, longint lo_, longint hi_, real aae);
      longint st_s[$], st_e[$];
      fn = fn_; lo = lo_; hi = hi_;
      exhaustive = (hi - lo + 1 <= EXHAUSTIVE_MAX);
      if (exhaustive) begin
        fv = new[int'(hi - lo + 1)];
        for (longint c = lo; c <= hi; c++) fv[c - lo] = f_eval(fn, xr(c));
      end
      seg_s.delete(); seg_c1.delete(); seg_c0.delete();
      max_seg_err = 0.0;
      st_s.push_back(lo); st_e.push_back(hi);
      while (st_s.size() > 0) begin
        longint s, e, pmax, pmin, p, n, step_n;
        real c1, fs, mx, mn, dev, err, v;
        s = st_s.pop_back(); e = st_e.pop_back();
        fs = f_at(s);
        c1 = (e == s) ? 0.0 : (f_at(e) - fs) / (xr(e) - xr(s));
        mx = 0.0; mn = 0.0; pmax = s; pmin = s;
        n = (e - s > SAMPLES) ? SAMPLES : e - s;
        for (longint j = 0; j <= n; j++) begin
          longint c;
          step_n = (n == 0) ? 0 : ((e - s) * j) / n;
          c = s + step_n;
          dev = f_at(c) - (fs + c1 * (xr(c) - xr(s)));
          if (dev > mx) begin mx = dev; pmax = c; end
          if (dev < mn) begin mn = dev; pmin = c; end
        end
        err = (mx - mn) / 2.0;
        v   = (mx + mn) / 2.0;
        if (err <= aae || e - s <= 1) begin
          seg_s.push_back(s); seg_c1.push_back(c1); seg_c0.push_back(fs + v);
          if (err > max_seg_err) max_seg_err = err;
        end else begin
          p = (mx > -mn) ? pmax : pmin;
          if (p <= s || p >= e) p = (s + e) / 2;
          st_s.push_back(p); st_e.push_back(e);   // right half later
          st_s.push_back(s); st_e.push_back(p);   // left half first
        end
      end
    endfunction

    // ---------------------------------------------------------- quantize
    function void quantize();
      q_negs.delete(); q_neg.delete(); q_shl.delete(); q_mag.delete(); q_c0.delete();
      if (seg_s.size() > (1 << seg_w)) fits = 1'b0;
      foreach (seg_s[i]) begin
        real m;
        int l;
        longint mag;
        m = (seg_c1[i] < 0.0) ? -seg_c1[i] : seg_c1[i];
        l = 0;
        mag = round_r(m * $pow(2.0, real'(c1_frac)));
        while (mag >= (longint'(1) << c1_w)) begin
          l++;
          mag = round_r(m * $pow(2.0, real'(c1_frac - l)));
        end
        if (l > (1 << l_w) - 1 || (!use_shift && l != 0)) fits = 1'b0;
        if (!use_sign && seg_c1[i] < 0.0 && mag != 0) fits = 1'b0;
        q_negs.push_back((-seg_s[i]) & ((longint'(1) << x_w) - 1));
        q_neg.push_back(seg_c1[i] < 0.0 && use_sign);
        q_shl.push_back(l);
        q_mag.push_back(mag);
        q_c0.push_back(round_r(seg_c0[i] * $pow(2.0, real'(a_frac))));
      end
    endfunction

    // coefficients-table word, most significant field first; up to 128 bits
    function logic [127:0] coef_word_wide(int i);
      logic [127:0] w;
      w = 128'(q_negs[i]);
      w = (w << 1)    | 128'(q_neg[i]);
      w = (w << l_w)  | 128'(q_shl[i]);
      w = (w << c1_w) | 128'(q_mag[i]);
      w = (w << a_w)  | (128'(q_c0[i]) & ((128'(1) << a_w) - 1));
      return w;
    endfunction

    // the same for words of at most 64 bits
    function logic [63:0] coef_word(int i);
      return 64'(coef_word_wide(i));
    endfunction

    // ---------------------------------------------------------- cascade
    // number of boundaries whose low k bits (sign-adjusted) are <= low
    function int rank(longint low, int k, ref longint lows[$]);
      int a, b, m;
      a = 0; b = lows.size();
      while (a < b) begin
        m = (a + b) / 2;
        if (lows[m] <= low) a = m + 1; else b = m;
      end
      return a;
    endfunction

    // width of the rails leaving LUT k (matches the cascade hardware)
    function int rail_w(int k);
      int kb;
      kb = first_w + k * rest_w;
      if (k == n_cas - 1 || kb > seg_w) return seg_w;
      return kb;
    endfunction

    // sign-adjusted low kbits of every boundary s_1..s_{t-1}, sorted
    function void boundary_lows(int kbits, ref longint lows[$]);
      longint flip;
      flip = longint'(1) << (x_w - 1);
      lows.delete();
      for (int j = 1; j < seg_s.size(); j++)
        lows.push_back(((longint'(seg_s[j]) & ((longint'(1) << x_w) - 1)) ^ flip)
                       & ((longint'(1) << kbits) - 1));
      lows.sort();
    endfunction

    function void build_cascade();
      int kbits, kprev, total, ncode, r, w;
      longint lows[$];
      int code_of[int];       // rank -> dense rail code, current LUT
      longint rep_prev[];     // rail code of the previous LUT -> low part
      longint rep_cur[];
      lut_base = new[n_cas]; lut_size = new[n_cas];
      total = 0;
      for (int k = 0; k < n_cas; k++) begin
        lut_base[k] = total;
        lut_size[k] = (k == 0) ? (1 << first_w) : (1 << (rail_w(k - 1) + rest_w));
        total += lut_size[k];
      end
      lut = new[total];
      foreach (lut[i]) lut[i] = 0;
      for (int k = 0; k < n_cas; k++) begin
        kbits = first_w + k * rest_w;
        boundary_lows(kbits, lows);
        // inner LUTs: number the distinct ranks of all low parts densely
        // (rank is monotonic in the low part, so codes follow its order)
        code_of.delete();
        ncode = 0;
        if (k < n_cas - 1) begin
          // the rank changes only at the boundaries' low parts, so the
          // smallest low part of every rank is 0 or one of those
          longint cand[$];
          rep_cur = new[1 << rail_w(k)];
          cand.push_back(0);
          foreach (lows[j]) cand.push_back(lows[j]);
          foreach (cand[j]) begin
            r = rank(cand[j], kbits, lows);
            if (!code_of.exists(r)) begin
              code_of[r] = ncode;
              rep_cur[ncode] = cand[j];
              ncode++;
            end
          end
        end
        if (k == 0) begin
          for (int a = 0; a < (1 << first_w); a++)
            lut[lut_base[0] + a] = code_of[rank(longint'(a), kbits, lows)];
        end else begin
          kprev = kbits - rest_w;
          w = rail_w(k - 1);
          for (int c = 0; c < rep_prev.size(); c++)
            for (int q = 0; q < (1 << rest_w); q++) begin
              longint qf, low;
              qf = longint'(q);
              if (k == n_cas - 1) qf = qf ^ (longint'(1) << (rest_w - 1));
              low = (qf << kprev) | rep_prev[c];
              r = rank(low, kbits, lows);
              lut[lut_base[k] + (c << rest_w) + q] = (k == n_cas - 1) ? r : code_of[r];
            end
        end
        if (k < n_cas - 1) rep_prev = new[ncode](rep_cur);
      end
    endfunction

    // ---------------------------------------------------------- reference
    function int seg_of(longint code);
      int a, b, m;
      a = 0; b = seg_s.size() - 1;
      while (a < b) begin
        m = (a + b + 1) / 2;
        if (seg_s[m] <= code) a = m; else b = m - 1;
      end
      return a;
    endfunction

    function longint model_y(longint code);
      int i;
      longint d, p, m, t, sum, yv;
      i = seg_of(code);
      d = code - seg_s[i];
      p = q_mag[i] * d;
      m = ((p << q_shl[i]) >> (p_frac - a_frac)) & ((longint'(1) << a_w) - 1);
      t = q_neg[i] ? -m : m;
      sum = q_c0[i] + t;
      yv = (sum + (longint'(1) << (guard - 1))) >>> guard;
      // keep y_w bits, sign-extended
      yv = yv & ((longint'(1) << y_w) - 1);
      if (yv >= (longint'(1) << (y_w - 1))) yv = yv - (longint'(1) << y_w);
      return yv;
    endfunction

  endclass

endpackage
