// tb_mdt_iir_decimation_top: end-to-end test of both MDT decimation filters
// with every parameter at its default (fs = 44.2 kHz, fc = 20 kHz, M = 4).
//
// One input stream drives the top; the testbench runs the undecimated
// first- and second-order Butterworth filters (bilinear transform, direct
// form, floating point) on every input sample and compares every M-th
// reference sample, rounded and clipped to Q1.15, with each filter's output.
// The parallel-section filter is loaded with a third-order Butterworth
// low-pass at the same fs and fc, which the testbench expands itself into a
// real pole and a conjugate pole pair (partial fractions of the bilinear
// design 1/((s+1)(s^2+s+1))); its reference is the undecimated cascade of a
// first-order and a biquad section in direct form.
// Stimuli, as in the evaluation of the filters: sine waves of amplitude 0.9
// at 1, 10 and 21 kHz, then a full-scale square wave and random samples.
// Random idle cycles are inserted between input samples, and the run is
// repeated after a reset in mid-stream to show that both filters restart
// from rest. Counted mechanisms: decimated outputs of each filter (exactly
// one per M inputs, one clock after the M-th), idle input cycles, outputs
// clipped to full scale (the square wave overshoots), and the mid-stream
// reset; a mechanism that never happens counts as a failure.
module tb_mdt_iir_decimation_top;
  import mdt_pkg::*;
  localparam int  M       = 4;
  localparam real FS      = 44200.0;
  localparam real FC      = 20000.0;
  localparam int  NSAMP   = 5000;   // input samples per run
  localparam real TOL_LSB = 3.0;
  localparam real PI      = 3.14159265358979;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    in_valid;
  sample_t in_sample;
  logic    fo_valid, so_valid;
  sample_t fo_sample, so_sample;
  coef_t   par_k;
  coef_t   par_fo_fb [1];
  coef_t   par_fo_ff [1][M];
  coef_t   par_so_a [1], par_so_b [1];
  coef_t   par_so_c [1][M], par_so_d [1][M];
  logic    par_valid;
  sample_t par_sample;
  int      checks = 0, failures = 0;
  int      n_fo = 0, n_so = 0, n_par = 0, n_idle = 0, n_reset = 0, n_clip = 0;
  real     max_fo = 0.0, max_so = 0.0, max_par = 0.0;

  always #5 clk = ~clk;

  mdt_iir_decimation_top dut (
    .clk, .rst_n, .in_valid, .in_sample,
    .fo_valid, .fo_sample, .so_valid, .so_sample,
    .par_k, .par_fo_fb, .par_fo_ff, .par_so_a, .par_so_b, .par_so_c, .par_so_d,
    .par_valid, .par_sample
  );

  function automatic int qc(real v);
    return $rtoi(v * 65536.0 + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  task automatic cmul(input real ar, ai, br, bi, output real cr, ci);
    cr = ar * br - ai * bi;
    ci = ar * bi + ai * br;
  endtask

  task automatic cdiv(input real ar, ai, br, bi, output real cr, ci);
    real d;
    d  = br * br + bi * bi;
    cr = (ar * br + ai * bi) / d;
    ci = (ai * br - ar * bi) / d;
  endtask

  // third-order Butterworth, bilinear transform, split into k + one real
  // pole + one conjugate pair; loads the MDT coefficients of the sections
  real g3, p3, b3, a13, a23;   // cascade reference coefficients
  task automatic load_third_order();
    real kk, a0, p2r, p2i, wr, wi, nr, ni, dr, di, tr, ti, r1, r2r, r2i, ar, ai;
    kk  = $tan(PI * FC / FS);
    g3  = kk / (1.0 + kk);
    p3  = (1.0 - kk) / (1.0 + kk);
    a0  = 1.0 + kk + kk * kk;
    b3  = kk * kk / a0;
    a13 = (2.0 * kk * kk - 2.0) / a0;
    a23 = (1.0 - kk + kk * kk) / a0;
    p2r = -a13 / 2.0;
    p2i = $sqrt(a23 - a13 * a13 / 4.0);
    // direct term: limit of H for z^-1 -> infinity
    par_k = coef_t'(qc(-g3 * b3 / (p3 * a23)));
    // real pole: r1 = g b0 (1 + 1/p1)^3 / (1 + a1/p1 + a2/p1^2)
    tr = 1.0 + 1.0 / p3;
    r1 = g3 * b3 * tr * tr * tr / (1.0 + a13 / p3 + a23 / (p3 * p3));
    // complex pole: w = 1/p2, r2 = g b0 (1 + w)^3 / ((1 - p1 w)(1 - conj(p2) w))
    cdiv(1.0, 0.0, p2r, p2i, wr, wi);
    cmul(1.0 + wr, wi, 1.0 + wr, wi, tr, ti);
    cmul(tr, ti, 1.0 + wr, wi, nr, ni);
    cmul(p2r, -p2i, wr, wi, tr, ti);                   // conj(p2) w
    cmul(1.0 - p3 * wr, -p3 * wi, 1.0 - tr, -ti, dr, di);
    cdiv(nr, ni, dr, di, r2r, r2i);
    r2r = r2r * g3 * b3;
    r2i = r2i * g3 * b3;
    // MDT coefficients
    tr = r1;
    for (int i = 0; i < M; i++) begin
      par_fo_ff[0][i] = coef_t'(qc(tr));
      tr = tr * p3;
    end
    tr = 1.0;
    for (int i = 0; i < M; i++) tr = tr * p3;
    par_fo_fb[0] = coef_t'(qc(tr));
    ar = r2r;
    ai = r2i;
    for (int i = 0; i < M; i++) begin
      par_so_c[0][i] = coef_t'(qc(ar));
      par_so_d[0][i] = coef_t'(qc(ai));
      cmul(ar, ai, p2r, p2i, ar, ai);
    end
    ar = 1.0;
    ai = 0.0;
    for (int i = 0; i < M; i++) cmul(ar, ai, p2r, p2i, ar, ai);
    par_so_a[0] = coef_t'(qc(ar));
    par_so_b[0] = coef_t'(qc(ai));
    $display("third-order expansion: k=%f r1=%f p1=%f r2=%f + j(%f) p2=%f + j(%f)",
             -g3 * b3 / (p3 * a23), r1, p3, r2r, r2i, p2r, p2i);
  endtask

  function automatic real clip(real v);
    if (v > 32767.0 / 32768.0) return 32767.0 / 32768.0;
    if (v < -1.0) return -1.0;
    return v;
  endfunction

  function automatic sample_t stimulus(int n);
    real v;
    case ((n / 1000) % 5)
      0:       v = 0.9 * $sin(2.0 * PI * 1000.0 * real'(n) / FS);
      1:       v = 0.9 * $sin(2.0 * PI * 10000.0 * real'(n) / FS);
      2:       v = 0.9 * $sin(2.0 * PI * 21000.0 * real'(n) / FS);
      3:       v = ((n / 29) % 2 == 0) ? 0.999 : -0.999;
      default: v = real'(int'($urandom_range(0, 65535)) - 32768) / 32768.0;
    endcase
    return sample_t'($rtoi(v * 32768.0));
  endfunction

  task automatic compare(input sample_t got, input real expv, inout real maxe, input string what);
    real err;
    err = real'(got) - expv * 32768.0;
    if (err < 0.0) err = -err;
    if (err > maxe) maxe = err;
    checks++;
    if (err > TOL_LSB) begin
      failures++;
      if (failures < 20) $display("FAIL %s=%0d expected %f at %0t", what, got, expv * 32768.0, $time);
    end
  endtask

  // one run of NSAMP input samples from rest
  task automatic run();
    real kk, g, p1, y1, x1;                      // first-order reference
    real c, a0, b0, b1, a1, a2, y2, y2p, u1, u2; // second-order reference
    real y3, y3p, v1, v2, e3;   // third-order cascade reference
    real xr, t, e1, e2;
    bit  expect_out;
    int  n_in;
    kk = $tan(PI * FC / FS);
    g  = kk / (1.0 + kk);
    p1 = (kk - 1.0) / (kk + 1.0);
    c  = kk * kk;
    a0 = 1.0 + $sqrt(2.0) * kk + c;
    b0 = c / a0;
    b1 = 2.0 * b0;
    a1 = (2.0 * c - 2.0) / a0;
    a2 = (1.0 - $sqrt(2.0) * kk + c) / a0;
    y1 = 0.0; x1 = 0.0; y2 = 0.0; y2p = 0.0; u1 = 0.0; u2 = 0.0;
    e1 = 0.0; e2 = 0.0; e3 = 0.0;
    y3 = 0.0; y3p = 0.0; v1 = 0.0; v2 = 0.0;
    expect_out = 1'b0;
    n_in = 0;
    while (n_in < NSAMP || expect_out) begin
      checks += 3;
      if (par_valid !== expect_out) begin
        failures++;
        $display("FAIL par_valid=%0b expected %0b at %0t", par_valid, expect_out, $time);
      end
      if (expect_out && par_valid) begin
        n_par++;
        compare(par_sample, e3, max_par, "par_sample");
      end
      if (fo_valid !== expect_out) begin
        failures++;
        $display("FAIL fo_valid=%0b expected %0b at %0t", fo_valid, expect_out, $time);
      end
      if (so_valid !== expect_out) begin
        failures++;
        $display("FAIL so_valid=%0b expected %0b at %0t", so_valid, expect_out, $time);
      end
      if (expect_out && fo_valid) begin
        n_fo++;
        compare(fo_sample, e1, max_fo, "fo_sample");
      end
      if (expect_out && so_valid) begin
        n_so++;
        compare(so_sample, e2, max_so, "so_sample");
      end
      expect_out = 1'b0;
      in_valid = (n_in < NSAMP) && ($urandom_range(0, 4) != 0);
      if (n_in < NSAMP && !in_valid) n_idle++;
      if (in_valid) begin
        in_sample = stimulus(n_in);
        xr = real'(in_sample) / 32768.0;
        y1 = g * (xr + x1) - p1 * y1;
        x1 = xr;
        // biquad (Q = 1) on the first-order output gives the third order
        t   = b3 * (y1 + 2.0 * v1 + v2) - a13 * y3 - a23 * y3p;
        y3p = y3;
        y3  = t;
        v2  = v1;
        v1  = y1;
        t  = b0 * (xr + u2) + b1 * u1 - a1 * y2 - a2 * y2p;
        y2p = y2;
        y2  = t;
        u2  = u1;
        u1  = xr;
        if (n_in % M == M - 1) begin
          expect_out = 1'b1;
          e1 = clip(y1);
          e2 = clip(y2);
          e3 = clip(y3);
          if (e1 != y1 || e2 != y2) n_clip++;
        end
        n_in++;
      end else begin
        in_sample = sample_t'($urandom);
      end
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (NSAMP * 4) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    in_sample = '0;
    repeat (3) @(posedge clk);
    load_third_order();
    #1 rst_n = 1'b1;
    run();
    // reset in mid-stream: the filters must restart from rest
    in_valid = 1'b1;
    in_sample = sample_t'(16'h4000);
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    in_valid = 1'b0;
    n_reset++;
    checks += 2;
    if (fo_valid) failures++;
    if (so_valid) failures++;
    checks++;
    if (par_valid) failures++;
    run();
    checks += 6;
    if (n_par != 2 * (NSAMP / M)) begin
      failures++;
      $display("FAIL %0d parallel-filter outputs", n_par);
    end
    if (n_clip == 0) begin
      failures++;
      $display("FAIL no output reached the clipping limit");
    end
    if (n_fo != 2 * (NSAMP / M)) begin
      failures++;
      $display("FAIL %0d first-order outputs", n_fo);
    end
    if (n_so != 2 * (NSAMP / M)) begin
      failures++;
      $display("FAIL %0d second-order outputs", n_so);
    end
    if (n_idle == 0) begin
      failures++;
      $display("FAIL no idle input cycle");
    end
    if (n_reset == 0) failures++;
    $display("first-order outputs %0d (max error %f LSB), second-order outputs %0d (max error %f LSB)",
             n_fo, max_fo, n_so, max_so);
    $display("third-order parallel outputs %0d (max error %f LSB)", n_par, max_par);
    $display("idle input cycles %0d, mid-stream resets %0d, clipped reference outputs %0d",
             n_idle, n_reset, n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
