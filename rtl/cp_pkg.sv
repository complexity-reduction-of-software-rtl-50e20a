// cp_pkg: shared types, constants and elaboration-time functions of the
// coefficient-partitioned (CP) channel filter.
//
// A constant coefficient c is an integer holding the value c * 2^-B (B is
// the coefficient wordlength, 16 for the D-AMPS filter). The functions
// below turn c into the shift-and-add recipe that cp_tap_mult builds:
//
//   1. canonic signed digit (CSD) coding of c (csd_digit);
//   2. horizontal common subexpression elimination: a nonzero digit that is
//      followed two places lower by another nonzero digit forms the pattern
//      [1 0 1] (subexpression x2 = x1 + x1>>2) or [1 0 -1] (x3 = x1 - x1>>2),
//      or their negations; the scan runs from the MSB and pairs greedily;
//      every digit left over is a plain x1 term (scan_terms, term_at);
//   3. pseudo floating point: the leading term's position is the "shift";
//      the distance from the leading digit of the first term to the leading
//      digit of the last term is the "span" M (tap_span);
//   4. partitioning: terms whose relative position is at most floor(M/2)
//      form the MSB part h1, the rest the LSB part h2 (tap_split); h2 is
//      summed at its own scale and aligned only at the final adder.
//
// Term values are exact integers: a term {neg, src, e} stands for
// (neg ? -1 : 1) * src * 2^e, where src is x1, or x2/x3 as the integers
// 5*x1 and 3*x1 (x1 + x1>>2 and x1 - x1>>2 scaled by 4). Summing all terms
// gives exactly x1 * c, so a tap never rounds.
//
// The lowpass prototype (lowpass_coef) is this design's own stand-in for
// the filter-design step: a Blackman-windowed sinc, quantised to B bits
// with its largest tap scaled to PEAK.
package cp_pkg;

  // D-AMPS channel filter (Example 1): 1180 taps, 16-bit CSD coefficients,
  // 34.02 MHz wideband rate, downsampling by 350.
  localparam int unsigned DAMPS_TAPS   = 1180;
  localparam int unsigned DAMPS_COEF_W = 16;
  localparam int unsigned DAMPS_DECIM  = 350;
  // Cutoff midway between the 30 kHz pass-band and 30.5 kHz stop-band edges,
  // normalised to the 34.02 MHz sampling rate.
  localparam real DAMPS_FC_NORM = 30250.0 / 34.02e6;
  // Input sample width: not given by the method, chosen here.
  localparam int unsigned DEFAULT_IN_W = 12;
  // Largest coefficient magnitude after scaling (fraction of 1.0).
  localparam real COEF_PEAK = 0.75;

  // Maximum number of CSD digits handled (B up to 30).
  localparam int MAX_DIGITS = 32;

  typedef enum logic [1:0] {
    SRC_X1 = 2'd0,   // the input itself
    SRC_X2 = 2'd1,   // x1 + x1>>2, pattern [1 0 1]
    SRC_X3 = 2'd2    // x1 - x1>>2, pattern [1 0 -1]
  } src_e;

  typedef struct packed {
    logic       neg;  // term is subtracted
    src_e       src;  // which signal is shifted
    logic [7:0] e;    // weight 2^e of the term's lowest digit
  } term_t;

  // CSD digit i (weight 2^i) of c: +1, -1 or 0.
  function automatic int csd_digit(int c, int i);
    int v;
    int d;
    v = c;
    d = 0;
    for (int k = 0; k <= i; k++) begin
      if ((v & 1) != 0) d = ((v & 3) == 1) ? 1 : -1;
      else              d = 0;
      v = (v - d) >>> 1;
    end
    return d;
  endfunction

  // Number of CSD digits to scan for a B-bit coefficient.
  function automatic int n_digits(int b);
    return b + 2;
  endfunction

  // Scan of coefficient c after 2-bit CSE, MSB first. Returns the j-th term
  // (all zero when there is none) or, with count set, the number of terms
  // in its e field.
  function automatic term_t scan_terms(int c, int b, int j, bit count);
    int d [MAX_DIGITS];
    int i, n;
    term_t t, cur;
    int v;
    // CSD digits in one pass, LSB first (same recurrence as csd_digit).
    v = c;
    for (int k = 0; k < MAX_DIGITS; k++) begin
      if (k < n_digits(b) && (v & 1) != 0) d[k] = ((v & 3) == 1) ? 1 : -1;
      else                                 d[k] = 0;
      v = (v - d[k]) >>> 1;
    end
    n = 0;
    t = '0;
    i = n_digits(b) - 1;
    while (i >= 0) begin
      if (d[i] != 0) begin
        cur.neg = (d[i] < 0);
        if (i >= 2 && d[i-2] != 0) begin
          cur.src = (d[i-2] == d[i]) ? SRC_X2 : SRC_X3;
          cur.e   = 8'(i - 2);
          i = i - 3;
        end else begin
          cur.src = SRC_X1;
          cur.e   = 8'(i);
          i = i - 1;
        end
        if (!count && n == j) t = cur;
        n++;
      end else begin
        i = i - 1;
      end
    end
    if (count) begin
      t = '0;
      t.e = 8'(n);
    end
    return t;
  endfunction

  // j-th term (MSB first) of coefficient c.
  function automatic term_t term_at(int c, int b, int j);
    return scan_terms(c, b, j, 1'b0);
  endfunction

  function automatic int tap_num_terms(int c, int b);
    term_t t;
    t = scan_terms(c, b, 0, 1'b1);
    return int'(t.e);
  endfunction

  // Exponent of a term's leading (most significant) digit.
  function automatic int lead_exp(term_t t);
    return int'(t.e) + ((t.src == SRC_X1) ? 0 : 2);
  endfunction

  // Integer value of the shifted signal: x1 = 1, x2 = 5, x3 = 3 (times x1).
  function automatic int src_weight(src_e s);
    case (s)
      SRC_X2:  return 5;
      SRC_X3:  return 3;
      default: return 1;
    endcase
  endfunction

  // PFP span M: distance between the leading digits of the first and the
  // last term (0 for a coefficient with a single term or none).
  function automatic int tap_span(int c, int b);
    int n;
    n = tap_num_terms(c, b);
    if (n < 2) return 0;
    return lead_exp(term_at(c, b, 0)) - lead_exp(term_at(c, b, n - 1));
  endfunction

  // Number of terms in the MSB part h1: those whose relative position is at
  // most floor(M/2). The remaining terms form the LSB part h2.
  function automatic int tap_split(int c, int b);
    int n, m, n1, top;
    n = tap_num_terms(c, b);
    m = tap_span(c, b);
    if (n < 2) return n;
    top = lead_exp(term_at(c, b, 0));
    n1 = 0;
    for (int j = 0; j < n; j++)
      if (2 * (top - lead_exp(term_at(c, b, j))) <= m) n1++;
    return n1;
  endfunction

  // Sum of |term weights| of terms lo..hi-1, relative to 2^e_ref.
  function automatic longint part_abs_sum(int c, int b, int lo, int hi, int e_ref);
    longint s;
    term_t t;
    s = 0;
    for (int j = lo; j < hi; j++) begin
      t = term_at(c, b, j);
      s += longint'(src_weight(t.src)) <<< (int'(t.e) - e_ref);
    end
    return s;
  endfunction

  // Signed width that holds any sum of terms lo..hi-1 (relative to 2^e_ref)
  // for an in_w-bit signed input.
  function automatic int part_width(int c, int b, int lo, int hi, int e_ref, int in_w);
    longint a;
    int w;
    a = part_abs_sum(c, b, lo, hi, e_ref);
    w = 0;
    while ((longint'(1) <<< w) < a) w++;
    return in_w + w + 1;
  endfunction

  // Blackman-windowed sinc lowpass tap k of n, cutoff fc (cycles/sample),
  // quantised to b fractional bits with the largest tap near COEF_PEAK.
  function automatic real lowpass_raw(int k, int n, real fc);
    real pi, t, s, w;
    pi = 3.14159265358979323846;
    t = real'(k) - real'(n - 1) / 2.0;
    if (t == 0.0) s = 1.0;
    else          s = $sin(2.0 * pi * fc * t) / (2.0 * pi * fc * t);
    if (n > 1) w = 0.42 - 0.5 * $cos(2.0 * pi * k / (n - 1)) + 0.08 * $cos(4.0 * pi * k / (n - 1));
    else       w = 1.0;
    return s * w;
  endfunction

  function automatic int lowpass_coef(int k, int n, int b, real fc);
    real peak;
    peak = lowpass_raw(n / 2, n, fc);
    if (peak < 0.0) peak = -peak;
    return int'(COEF_PEAK * (2.0 ** b) * lowpass_raw(k, n, fc) / peak);
  endfunction

endpackage
