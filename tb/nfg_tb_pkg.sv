// Table generator and reference model for the quadratic NFG testbenches.
//
// Given a function f, a domain [a, b] and an acceptable approximation error,
// nfg_gen does in software what is needed to program the generator:
//   1. non-uniform segmentation: starting at a, each segment is made as wide
//      as possible such that (e-s)^3/192 * max|f'''| <= error; the end point
//      is found bit by bit from the MSB of the offset (O(n) trials);
//   2. the widest segments are halved until the count is a power of two;
//   3. per segment, the 2nd-order Chebyshev interpolant about the midpoint q
//      (nodes q and q +- h*sqrt(3)/2, h the half width) gives c2, c'1, c'0,
//      quantised to mantissa/exponent form for the coefficients table;
//   4. the LUT cascade contents for the segment index function: at each cut
//      the rails carry the class of the remaining sub-function, which is
//      "constant segment k" or, if a segment boundary lies inside, a class of
//      its own (a monotone index function has no other repeats).
// f''' is estimated from third differences with a fixed step, taken inwards
// near the ends of the domain. Everything here is real-number arithmetic,
// independent of the RTL.
package nfg_tb_pkg;

  typedef enum int {
    F_EXP2, F_RECIP, F_SQRT, F_RSQRT, F_LOG2, F_LN, F_SIN, F_COS, F_TAN,
    F_SQRT_NLN, F_TAN2P1, F_ENTROPY, F_SIGMOID, F_GAUSS,
    // Functions of the comparisons with uniform-segmentation generators.
    F_SIN_Q, F_EXP, F_EXP2M1, F_SIN_PI4
  } func_e;

  localparam int NUM_FUNCS = 14;   // the segment-count evaluation set
  localparam int NUM_ALL   = 18;
  localparam real PI = 3.14159265358979323846;

  function automatic real f_eval(func_e fid, real x);
    case (fid)
      F_EXP2:     return $pow(2.0, x);
      F_RECIP:    return 1.0 / x;
      F_SQRT:     return $sqrt(x);
      F_RSQRT:    return 1.0 / $sqrt(x);
      F_LOG2:     return $ln(x) / $ln(2.0);
      F_LN:       return $ln(x);
      F_SIN:      return $sin(PI * x);
      F_COS:      return $cos(PI * x);
      F_TAN:      return $tan(PI * x);
      F_SQRT_NLN: return (x >= 1.0) ? 0.0 : $sqrt(-$ln(x));
      F_TAN2P1:   return $tan(PI * x) * $tan(PI * x) + 1.0;
      F_ENTROPY:  return -x * $ln(x) / $ln(2.0) - (1.0 - x) * $ln(1.0 - x) / $ln(2.0);
      F_SIGMOID:  return 1.0 / (1.0 + $exp(-4.0 * x));
      F_GAUSS:    return $exp(-x * x / 2.0) / $sqrt(2.0 * PI);
      F_SIN_Q:    return $sin(PI * x);
      F_EXP:      return $exp(x);
      F_EXP2M1:   return $pow(2.0, x) - 1.0;
      F_SIN_PI4:  return $sin(PI * x / 4.0);
      default:    return 0.0;
    endcase
  endfunction

  function automatic string f_name(func_e fid);
    case (fid)
      F_EXP2: return "2^x";           F_RECIP: return "1/x";
      F_SQRT: return "sqrt(x)";       F_RSQRT: return "1/sqrt(x)";
      F_LOG2: return "log2(x)";       F_LN: return "ln(x)";
      F_SIN: return "sin(pi x)";      F_COS: return "cos(pi x)";
      F_TAN: return "tan(pi x)";      F_SQRT_NLN: return "sqrt(-ln x)";
      F_TAN2P1: return "tan^2(pi x)+1"; F_ENTROPY: return "entropy";
      F_SIGMOID: return "sigmoid";    F_GAUSS: return "gaussian";
      F_SIN_Q: return "sin(pi x)[0,1/4]"; F_EXP: return "exp(x)";
      F_EXP2M1: return "2^x-1";       F_SIN_PI4: return "sin(pi x/4)";
      default: return "?";
    endcase
  endfunction

  // Domains of the evaluated functions (upper ends of [1,2] and [1/32,2]
  // are one input LSB short of 2, which a signed input with two integer
  // bits cannot hold; the generator clips to the representable range).
  function automatic void f_domain(func_e fid, output real a, output real b);
    case (fid)
      F_EXP2, F_SIGMOID:           begin a = 0.0;        b = 1.0;         end
      F_RECIP, F_RSQRT, F_LOG2, F_LN: begin a = 1.0;     b = 2.0;         end
      F_SQRT:                      begin a = 1.0 / 32.0; b = 2.0;         end
      F_SIN, F_COS, F_GAUSS:       begin a = 0.0;        b = 0.5;         end
      F_TAN, F_TAN2P1:             begin a = 0.0;        b = 0.25;        end
      F_SQRT_NLN:                  begin a = 1.0 / 32.0; b = 1.0;         end
      F_SIN_Q:                     begin a = 0.0;        b = 0.25;        end
      F_EXP, F_EXP2M1:             begin a = 0.0;        b = 1.0;         end
      F_SIN_PI4:                   begin a = 0.0;        b = 1.0 - 1.0 / 16777216.0; end
      F_ENTROPY:                   begin a = 1.0 / 256.0; b = 255.0 / 256.0; end
      default:                     begin a = 0.0;        b = 1.0;         end
    endcase
  endfunction

  // Input range near a singular end of the domain (unbounded derivatives)
  // where no quadratic on the input grid meets the error bound; accuracy
  // against f is not claimed there.
  function automatic bit f_near_singularity(func_e fid, real x);
    return (fid == F_SQRT_NLN) && (x > 1.0 - 1.0 / 4096.0);
  endfunction

  // Segment counts printed for 2nd-order Chebyshev, non-uniform
  // segmentation, at errors 2^-17 and 2^-25, for comparison.
  function automatic int paper_segments(func_e fid, bit fine);
    int c17 [NUM_FUNCS] = '{7, 11, 24, 8, 10, 9, 12, 12, 12, 52, 17, 40, 13, 4};
    int c25 [NUM_FUNCS] = '{44, 64, 138, 46, 56, 50, 74, 74, 73, 331, 101, 234, 76, 18};
    if (int'(fid) >= NUM_FUNCS) return 0;     // not published
    return fine ? c25[int'(fid)] : c17[int'(fid)];
  endfunction

  class nfg_gen;
    // Hardware sizes (must match the DUT).
    int N, XF, K, NCAS, R, C2W, C1W, LW, YI, GUARD;
    bit allow_shift;
    // Problem.
    func_e fid;
    real   a, b, aae;
    longint a_code, b_code;
    // Results.
    longint ends[$];        // segment i covers codes (ends[i-1], ends[i]]
    int     t_raw;          // segments before splitting
    longint neg_q[$];
    longint m2[$], l2[$], m1[$], l1[$], c0[$];
    real    a2r[$], a1r[$], a0r[$];   // unquantised coefficients about q
    bit     forced[$];                // segment kept at 1 LSB, bound not met
    int     lut_sel[$];
    longint lut_addr[$], lut_data[$];
    int     max_classes;
    int     classes[$];       // rail classes at each cut
    bit     ok;
    string  why;
    int     d_drop = 0;   // high bits of x - q the hardware drops

    function new(int n, int xf, int k, int ncas, int r, int c2w, int c1w,
                 int lw, int yi, int guard, bit allow_shift);
      N = n; XF = xf; K = k; NCAS = ncas; R = r; C2W = c2w; C1W = c1w;
      LW = lw; YI = yi; GUARD = guard; this.allow_shift = allow_shift;
    endfunction

    function real lsb();
      return $pow(2.0, -XF);
    endfunction

    function real code2real(longint c);
      return real'(c) * lsb();
    endfunction

    // Third derivative by differences with step hd, kept inside [a, b].
    function real f3(real x);
      real hd, x0;
      hd = h3;
      if ((b - a) < 8.0 * hd) hd = (b - a) / 8.0;
      if (x - 1.5 * hd < a)      x0 = a + 1.5 * hd;
      else if (x + 1.5 * hd > b) x0 = b - 1.5 * hd;
      else                       x0 = x;
      return (f_eval(fid, x0 + 1.5 * hd) - 3.0 * f_eval(fid, x0 + 0.5 * hd)
              + 3.0 * f_eval(fid, x0 - 0.5 * hd) - f_eval(fid, x0 - 1.5 * hd))
             / (hd * hd * hd);
    endfunction

    real h3;   // difference step used by f3

    function real eps2(real s, real e);
      real mx, v;
      mx = 0.0;
      h3 = (e - s) / 4.0;
      if (h3 < 1.0 / 16384.0) h3 = 1.0 / 16384.0;
      if (h3 > 1.0 / 1024.0)  h3 = 1.0 / 1024.0;
      for (int j = 0; j <= 16; j++) begin
        v = f3(s + (e - s) * real'(j) / 16.0);
        if (v < 0.0) v = -v;
        if (v > mx) mx = v;
      end
      return (e - s) * (e - s) * (e - s) / 192.0 * mx;
    endfunction

    // Non-uniform segmentation, then halving up to a power of two.
    function void segment();
      longint s, w, cand;
      int t, k, widest;
      longint wmax;
      ends.delete(); forced.delete();
      s = a_code;
      while (1) begin
        w = 0;
        for (int bit_i = N - 1; bit_i >= 0; bit_i--) begin
          cand = w | (longint'(1) << bit_i);
          if (s + cand <= b_code && eps2(code2real(s), code2real(s + cand)) <= aae)
            w = cand;
          else if (s + cand > b_code && eps2(code2real(s), code2real(b_code)) <= aae) begin
            w = b_code - s;
            break;
          end
        end
        if (w == 0) begin
          w = 1;
          forced.push_back(1'b1);
        end else begin
          forced.push_back(1'b0);
        end
        if (s + w >= b_code) begin
          ends.push_back(b_code);
          break;
        end
        ends.push_back(s + w);
        s = s + w;
      end
      t_raw = ends.size();
      t = t_raw;
      k = 0;
      while ((1 << k) < t) k++;
      while (ends.size() < (1 << k)) begin
        widest = -1; wmax = 1;
        for (int i = 0; i < ends.size(); i++) begin
          longint st;
          st = (i == 0) ? a_code : ends[i-1];
          if (ends[i] - st > wmax) begin wmax = ends[i] - st; widest = i; end
        end
        if (widest < 0) break;
        begin
          longint st;
          st = (widest == 0) ? a_code : ends[widest-1];
          ends.insert(widest, st + wmax / 2);
          forced.insert(widest, forced[widest]);
        end
      end
    endfunction

    // Mantissa/exponent form: c = m * 2^(l - (w-2)), |m| < 2^(w-2).
    function void scale(real c, int w, output longint m, output longint l);
      real v;
      longint lim;
      lim = longint'(1) << (w - 2);
      l = 0;
      if (allow_shift) begin
        l = -(longint'(1) << (LW - 1));
        v = c;
        if (v < 0) v = -v;
        while (l < (longint'(1) << (LW - 1)) - 1 && v * $pow(2.0, -real'(l)) >= 1.0) l++;
        if (v * $pow(2.0, -real'(l)) >= 1.0) begin
          ok = 0;
          why = $sformatf("exponent out of range for %g", c);
        end
      end
      m = longint'($floor(c * $pow(2.0, real'(w - 2) - real'(l)) + 0.5));
      if (m >= 2 * lim || m < -2 * lim) begin
        ok = 0;
        why = $sformatf("mantissa out of range for %g", c);
      end
    endfunction

    function void coefficients();
      real s, e, q, h, u, fp, fm, f0;
      neg_q.delete(); m2.delete(); l2.delete(); m1.delete(); l1.delete(); c0.delete();
      a2r.delete(); a1r.delete(); a0r.delete();
      for (int i = 0; i < ends.size(); i++) begin
        longint sc, ec, mm, ll;
        sc = (i == 0) ? a_code : ends[i-1];
        ec = ends[i];
        s = code2real(sc); e = code2real(ec);
        q = (s + e) / 2.0; h = (e - s) / 2.0;
        u = h * $sqrt(3.0) / 2.0;
        f0 = f_eval(fid, q);
        if (u > 0.0) begin
          fp = f_eval(fid, q + u); fm = f_eval(fid, q - u);
        end else begin
          fp = f0; fm = f0; u = 1.0;
        end
        neg_q.push_back(-(sc + ec));
        a2r.push_back((fp + fm - 2.0 * f0) / (2.0 * u * u));
        a1r.push_back((fp - fm) / (2.0 * u));
        a0r.push_back(f0);
        scale((fp + fm - 2.0 * f0) / (2.0 * u * u), C2W, mm, ll); m2.push_back(mm); l2.push_back(ll);
        scale((fp - fm) / (2.0 * u), C1W, mm, ll); m1.push_back(mm); l1.push_back(ll);
        c0.push_back(longint'($floor(f0 * $pow(2.0, real'(XF + GUARD)) + 0.5)));
      end
    endfunction

    // Segment index of a raw (unsigned) input code; codes outside the
    // domain clamp to the first or last segment, keeping it monotone.
    function int seg_of_u(longint u);
      longint xs;
      xs = (u >= (longint'(1) << (N - 1))) ? u - (longint'(1) << N) : u;
      if (xs < 0) return ends.size() - 1;     // negative x: out of domain
      if (xs > ends[ends.size() - 1]) return ends.size() - 1;
      begin
        int lo, hi, mid;
        lo = 0; hi = ends.size() - 1;     // first i with xs <= ends[i]
        while (lo < hi) begin
          mid = (lo + hi) / 2;
          if (xs <= ends[mid]) hi = mid; else lo = mid + 1;
        end
        return lo;
      end
    endfunction

    // Class key of the prefix 'p' of 'bits' bits.
    function longint class_key(longint p, int bits);
      longint lo, hi;
      int slo, shi;
      lo = p << (N - bits);
      hi = lo + (longint'(1) << (N - bits)) - 1;
      slo = seg_of_u(lo); shi = seg_of_u(hi);
      if (slo == shi) return longint'(slo);
      return (longint'(1) << 40) | lo;
    endfunction

    function void cascade();
      int G;
      longint rep_prev[$], rep_cur[$];
      int id_of[longint];
      G = N / NCAS;
      lut_sel.delete(); lut_addr.delete(); lut_data.delete();
      max_classes = 0;
      classes.delete();
      rep_prev.delete();
      for (int j = 0; j < NCAS; j++) begin
        id_of.delete(); rep_cur.delete();
        for (int c = 0; c < ((j == 0) ? 1 : rep_prev.size()); c++) begin
          for (longint g = 0; g < (longint'(1) << G); g++) begin
            longint p, key;
            int id;
            p = (j == 0) ? g : ((rep_prev[c] << G) | g);
            if (j == NCAS - 1) begin
              id = seg_of_u(p);
            end else begin
              key = class_key(p, (j + 1) * G);
              if (!id_of.exists(key)) begin
                id_of[key] = rep_cur.size();
                rep_cur.push_back(p);
              end
              id = id_of[key];
            end
            lut_sel.push_back(j);
            lut_addr.push_back((j == 0) ? g : ((longint'(c) << G) | g));
            lut_data.push_back(longint'(id));
          end
        end
        if (j < NCAS - 1) begin
          classes.push_back(rep_cur.size());
          if (rep_cur.size() > max_classes) max_classes = rep_cur.size();
          if (rep_cur.size() > (1 << R)) begin
            ok = 0;
            why = $sformatf("%0d rail classes", rep_cur.size());
          end
        end
        rep_prev = rep_cur;
      end
    endfunction

    // Build everything for one function; returns 1 if it fits the hardware.
    function bit build(func_e f, real err);
      real lo, hi;
      fid = f; aae = err; ok = 1; why = "";
      f_domain(f, lo, hi);
      a = lo; b = hi;
      if (b > code2real((longint'(1) << (N - 1)) - 1)) b = code2real((longint'(1) << (N - 1)) - 1);
      a_code = longint'($ceil(a / lsb()));
      b_code = longint'($floor(b / lsb()));
      a = code2real(a_code); b = code2real(b_code);
      segment();
      if (ends.size() > (1 << K)) begin
        ok = 0;
        why = "too many segments";
      end
      coefficients();
      for (int i = 0; i < ends.size(); i++) begin
        longint st;
        st = (i == 0) ? a_code : ends[i-1];
        // |x - q| <= (e - s)/2 must stay below 2^(N+1-d_drop-XF).
        if (real'(ends[i] - st) / 2.0 * lsb() >= $pow(2.0, real'(N + 1 - d_drop - XF))) begin
          ok = 0;
          why = "segment too wide for the narrowed x - q";
        end
      end
      if (ok) cascade();
      return ok;
    endfunction

    // Memory bits of a build sized for this function alone, with the same
    // LUT grouping and word formats: each cut gets ceil(log2 classes) rails,
    // the last LUT ceil(log2 t) outputs, the table t words.
    function longint tailored_bits();
      longint total;
      int G, rin, rout, k;
      G = N / NCAS;
      k = 0;
      while ((1 << k) < ends.size()) k++;
      total = longint'(ends.size()) * longint'(N + 2 + C2W + 2 * LW + C1W + YI + XF + GUARD);
      rin = 0;
      for (int j = 0; j < NCAS; j++) begin
        if (j == NCAS - 1) rout = k;
        else begin
          rout = 0;
          while ((1 << rout) < classes[j]) rout++;
        end
        total += (longint'(1) << (rin + G)) * longint'(rout);
        rin = rout;
      end
      return total;
    endfunction

    // Value of the segment's real quadratic at input code xc.
    function real g_eval(longint xc);
      int i;
      real u;
      i = seg_of_u(xc & ((longint'(1) << N) - 1));
      u = code2real(xc) + real'(neg_q[i]) * $pow(2.0, -real'(XF + 1));
      return (a2r[i] * u + a1r[i]) * u + a0r[i];
    endfunction

    // Coefficient word {neg_q, m2, l2, m1, l1, c0} as a bit vector.
    function logic [511:0] coef_word(int i);
      logic [511:0] wv;
      int DW, C0W, pos;
      DW = N + 2; C0W = YI + XF + GUARD;
      wv = '0; pos = 0;
      for (int j = 0; j < C0W; j++) wv[pos + j] = c0[i][j];  pos += C0W;
      for (int j = 0; j < LW;  j++) wv[pos + j] = l1[i][j];  pos += LW;
      for (int j = 0; j < C1W; j++) wv[pos + j] = m1[i][j];  pos += C1W;
      for (int j = 0; j < LW;  j++) wv[pos + j] = l2[i][j];  pos += LW;
      for (int j = 0; j < C2W; j++) wv[pos + j] = m2[i][j];  pos += C2W;
      for (int j = 0; j < DW;  j++) wv[pos + j] = neg_q[i][j];
      return wv;
    endfunction
  endclass

endpackage
