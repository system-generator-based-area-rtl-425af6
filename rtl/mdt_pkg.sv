// mdt_pkg: shared fixed-point formats, types and elaboration-time coefficient
// arithmetic for the merged-delay-transformation (MDT) IIR decimation filters.
//
// Number formats (all two's complement, this design's choice):
//   sample_t  DATA_W  = 16 bits, DATA_FRAC  = 15 fraction bits (Q1.15), the
//             filter input and output. 16-bit input and output ports plus a
//             clock account for the 33 I/O pins reported for both MDT filters.
//   coef_t    COEF_W  = 18 bits, COEF_FRAC  = 16 fraction bits (range [-2, 2)),
//             one 18-bit multiplier operand as in an FPGA DSP slice.
//   state_t   STATE_W = 24 bits, STATE_FRAC = 20 fraction bits (range [-8, 8)),
//             the recursive state y[n-M] fed back through the merged delay.
//   acc_t     ACC_W   = 48 bits with STATE_FRAC + COEF_FRAC fraction bits, the
//             sum of products, as wide as a DSP-slice accumulator; it holds
//             the sum of up to 64 full-scale products without overflow.
//
// Coefficients are not typed in as numbers: the functions below derive them
// while the design elaborates, from the sampling rate, the cut-off frequency
// and the decimation factor M. The Butterworth prototypes are the bilinear
// transform designs, prewarped with K = tan(pi*fc/fs):
//   1st order: H(z) = g(1 + z^-1)/(1 - p z^-1), g = K/(1+K), p = (1-K)/(1+K)
//              split into H(z) = k + r/(1 - p z^-1) with k = -g/p, r = g - k.
//   2nd order: H(z) = (b0 + b1 z^-1 + b2 z^-2)/(1 + a1 z^-1 + a2 z^-2) with
//              b0 = b2 = K^2/a0, b1 = 2 b0, a1 = (2K^2 - 2)/a0,
//              a2 = (1 - sqrt2 K + K^2)/a0, a0 = 1 + sqrt2 K + K^2; split into
//              H(z) = k + r/(1 - p z^-1) + conj(r)/(1 - conj(p) z^-1) with
//              p = -a1/2 + j sqrt(a2 - a1^2/4), k = b2/a2, u = b0 - k,
//              v = b1 - k a1, Re(r) = u/2, Im(r) = -(u Re(p) + v)/(2 Im(p)).
// The MDT of a pole section r/(1 - p z^-1) with M merged delays is
//   y[n] = p^M y[n-M] + sum_{i=0}^{M-1} r p^i x[n-i]
// so the feedback coefficient is p^M and the feed-forward taps are r p^i.
package mdt_pkg;

  localparam int DATA_W     = 16;
  localparam int DATA_FRAC  = 15;
  localparam int COEF_W     = 18;
  localparam int COEF_FRAC  = 16;
  localparam int STATE_W    = 24;
  localparam int STATE_FRAC = 20;
  localparam int ACC_W      = 48;
  localparam int PROD_W     = STATE_W + COEF_W;
  localparam int XSH        = STATE_FRAC - DATA_FRAC;  // aligns x products to state products
  localparam int MAX_M      = 63;                      // largest M the accumulator holds

  typedef logic signed [DATA_W-1:0]  sample_t;
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic signed [STATE_W-1:0] state_t;
  typedef logic signed [PROD_W-1:0]  prod_t;
  typedef logic signed [ACC_W-1:0]   acc_t;

  localparam real PI_R    = 3.14159265358979323846;
  localparam real SQRT2_R = 1.41421356237309504880;

  // Round a real coefficient to the nearest coef_t step, saturating.
  function automatic coef_t to_coef(real v);
    real scaled;
    int  q;
    scaled = v * (2.0 ** COEF_FRAC);
    q = $rtoi(scaled + ((scaled >= 0.0) ? 0.5 : -0.5));
    if (q > (1 << (COEF_W - 1)) - 1) q = (1 << (COEF_W - 1)) - 1;
    if (q < -(1 << (COEF_W - 1)))    q = -(1 << (COEF_W - 1));
    return coef_t'(q);
  endfunction

  // Round a state_t value to the nearest sample_t step (ties round up) and
  // saturate it to the sample range.
  function automatic sample_t state_to_sample(state_t s);
    localparam int SH = STATE_FRAC - DATA_FRAC;
    logic signed [STATE_W:0] r;
    r = ($signed({s[STATE_W-1], s}) + (STATE_W+1)'(1 << (SH - 1))) >>> SH;
    if (r > (STATE_W+1)'((1 << (DATA_W - 1)) - 1))  return sample_t'((1 << (DATA_W - 1)) - 1);
    if (r < -(STATE_W+1)'(1 << (DATA_W - 1)))        return sample_t'(-(1 << (DATA_W - 1)));
    return sample_t'(r);
  endfunction

  // Product of a coefficient and a state value, fraction STATE_FRAC+COEF_FRAC.
  function automatic acc_t mul_state(coef_t c, state_t v);
    prod_t p;
    p = c * v;
    return acc_t'(p);
  endfunction

  // Product of a coefficient and an input sample, aligned to the same
  // fraction STATE_FRAC+COEF_FRAC as mul_state.
  function automatic acc_t mul_sample(coef_t c, sample_t x);
    prod_t p;
    p = c * x;
    return acc_t'(p) <<< XSH;
  endfunction

  // Round an accumulator to the state grid (ties round up), saturating.
  function automatic state_t acc_to_state(acc_t a);
    acc_t r;
    r = (a + acc_t'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > acc_t'((1 << (STATE_W - 1)) - 1)) return state_t'((1 << (STATE_W - 1)) - 1);
    if (r < -acc_t'(1 << (STATE_W - 1)))      return state_t'(-(1 << (STATE_W - 1)));
    return state_t'(r);
  endfunction

  // Real or imaginary part (part = 0 / 1) of (cr + j ci) * (pr + j pim)^n.
  function automatic real cmul_pow(real cr, real ci, real pr, real pim, int n, int part);
    real ar, ai, t;
    ar = cr;
    ai = ci;
    for (int i = 0; i < n; i++) begin
      t  = ar * pr - ai * pim;
      ai = ar * pim + ai * pr;
      ar = t;
    end
    return (part == 0) ? ar : ai;
  endfunction

  // ---------------- first-order Butterworth, parallel form ----------------
  function automatic real bw1_pole(real fs, real fc);
    real kk;
    kk = $tan(PI_R * fc / fs);
    return (1.0 - kk) / (1.0 + kk);
  endfunction

  function automatic real bw1_direct(real fs, real fc);
    real kk;
    kk = $tan(PI_R * fc / fs);
    return -(kk / (1.0 + kk)) / bw1_pole(fs, fc);
  endfunction

  function automatic real bw1_residue(real fs, real fc);
    real kk;
    kk = $tan(PI_R * fc / fs);
    return kk / (1.0 + kk) - bw1_direct(fs, fc);
  endfunction

  // MDT coefficients of the first-order section: feedback p^M, taps r p^i.
  function automatic coef_t bw1_fb(real fs, real fc, int m);
    return to_coef(cmul_pow(1.0, 0.0, bw1_pole(fs, fc), 0.0, m, 0));
  endfunction

  function automatic coef_t bw1_ff(real fs, real fc, int i);
    return to_coef(cmul_pow(bw1_residue(fs, fc), 0.0, bw1_pole(fs, fc), 0.0, i, 0));
  endfunction

  function automatic coef_t bw1_k(real fs, real fc);
    return to_coef(bw1_direct(fs, fc));
  endfunction

  // ---------------- second-order Butterworth, parallel form ---------------
  // sel: 0 = b0, 1 = b1, 2 = b2, 3 = a1, 4 = a2
  function automatic real bw2_tf(real fs, real fc, int sel);
    real kk, c, a0;
    kk = $tan(PI_R * fc / fs);
    c  = kk * kk;
    a0 = 1.0 + SQRT2_R * kk + c;
    case (sel)
      0, 2:    return c / a0;
      1:       return 2.0 * c / a0;
      3:       return (2.0 * c - 2.0) / a0;
      default: return (1.0 - SQRT2_R * kk + c) / a0;
    endcase
  endfunction

  function automatic real bw2_pole_re(real fs, real fc);
    return -bw2_tf(fs, fc, 3) / 2.0;
  endfunction

  function automatic real bw2_pole_im(real fs, real fc);
    real a1, a2;
    a1 = bw2_tf(fs, fc, 3);
    a2 = bw2_tf(fs, fc, 4);
    return $sqrt(a2 - a1 * a1 / 4.0);
  endfunction

  function automatic real bw2_direct(real fs, real fc);
    return bw2_tf(fs, fc, 2) / bw2_tf(fs, fc, 4);
  endfunction

  function automatic real bw2_res_re(real fs, real fc);
    return (bw2_tf(fs, fc, 0) - bw2_direct(fs, fc)) / 2.0;
  endfunction

  function automatic real bw2_res_im(real fs, real fc);
    real u, v;
    u = bw2_tf(fs, fc, 0) - bw2_direct(fs, fc);
    v = bw2_tf(fs, fc, 1) - bw2_direct(fs, fc) * bw2_tf(fs, fc, 3);
    return -(u * bw2_pole_re(fs, fc) + v) / (2.0 * bw2_pole_im(fs, fc));
  endfunction

  // MDT coefficients of the second-order section:
  //   A + jB = p^M (feedback), C_i + jD_i = r p^i (taps), k (direct path).
  function automatic coef_t bw2_fb(real fs, real fc, int m, int part);
    return to_coef(cmul_pow(1.0, 0.0, bw2_pole_re(fs, fc), bw2_pole_im(fs, fc), m, part));
  endfunction

  function automatic coef_t bw2_ff(real fs, real fc, int i, int part);
    return to_coef(cmul_pow(bw2_res_re(fs, fc), bw2_res_im(fs, fc),
                            bw2_pole_re(fs, fc), bw2_pole_im(fs, fc), i, part));
  endfunction

  function automatic coef_t bw2_k(real fs, real fc);
    return to_coef(bw2_direct(fs, fc));
  endfunction

endpackage
