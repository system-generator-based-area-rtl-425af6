// tb_mdt_parallel_decimator: self-checking test of the parallel-section MDT
// decimator, at its default size (one first-order and one second-order
// section) and at two sections of each kind.
//
// For 12 random stable partial-fraction expansions (real poles, conjugate
// pole pairs, residues, direct term) the testbench quantises the MDT
// coefficients itself, streams random input samples with idle cycles, and
// runs the undecimated filter k x[n] + sum r_j/(1 - p_j z^-1) +
// sum 2 Re r_l/(1 - p_l z^-1) in floating point on every input sample. Every
// M-th reference sample, rounded and clipped to Q1.15, must match the output
// that appears one clock after the M-th input, within TOL_LSB.
module tb_mdt_parallel_decimator;
  import mdt_pkg::*;
  localparam int  M       = 4;
  localparam int  NSETS   = 12;
  localparam int  NSAMP   = 600;
  localparam real TOL_LSB = 4.0;
  localparam real PI      = 3.14159265358979;
  localparam int  NMAX    = 2;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    in_valid;
  sample_t x;
  coef_t   k_c;
  coef_t   fo_fb [NMAX];
  coef_t   fo_ff [NMAX][M];
  coef_t   so_a  [NMAX];
  coef_t   so_b  [NMAX];
  coef_t   so_c  [NMAX][M];
  coef_t   so_d  [NMAX][M];
  logic    v_small, v_big;
  sample_t y_small, y_big;
  int      checks = 0, failures = 0, n_out = 0;
  real     max_err = 0.0;

  always #5 clk = ~clk;

  // default size: one section of each kind (uses index 0 of the arrays)
  coef_t fo_fb1 [1];
  coef_t fo_ff1 [1][M];
  coef_t so_a1 [1], so_b1 [1];
  coef_t so_c1 [1][M], so_d1 [1][M];
  assign fo_fb1[0] = fo_fb[0];
  assign fo_ff1[0] = fo_ff[0];
  assign so_a1[0]  = so_a[0];
  assign so_b1[0]  = so_b[0];
  assign so_c1[0]  = so_c[0];
  assign so_d1[0]  = so_d[0];

  mdt_parallel_decimator dut_small (
    .clk, .rst_n, .in_valid, .x, .k_c,
    .fo_fb(fo_fb1), .fo_ff(fo_ff1), .so_a(so_a1), .so_b(so_b1), .so_c(so_c1), .so_d(so_d1),
    .out_valid(v_small), .y(y_small)
  );

  mdt_parallel_decimator #(.M(M), .NFO(NMAX), .NSO(NMAX)) dut_big (
    .clk, .rst_n, .in_valid, .x, .k_c,
    .fo_fb, .fo_ff, .so_a, .so_b, .so_c, .so_d,
    .out_valid(v_big), .y(y_big)
  );

  function automatic int qc(real v);
    return $rtoi(v * 65536.0 + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  function automatic real clip(real v);
    if (v > 32767.0 / 32768.0) return 32767.0 / 32768.0;
    if (v < -1.0) return -1.0;
    return v;
  endfunction

  task automatic compare(input logic v, input sample_t got, input real expv, input string what);
    real err;
    checks++;
    if (!v) begin
      failures++;
      $display("FAIL %s: no output when expected at %0t", what, $time);
      return;
    end
    err = real'(got) - expv * 32768.0;
    if (err < 0.0) err = -err;
    if (err > max_err) max_err = err;
    checks++;
    if (err > TOL_LSB) begin
      failures++;
      if (failures < 20) $display("FAIL %s=%0d expected %f at %0t", what, got, expv * 32768.0, $time);
    end
  endtask

  initial begin
    repeat (NSETS * NSAMP * 3) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real fp [NMAX], fr [NMAX], fy [NMAX];
    real sp_r [NMAX], sp_i [NMAX], sr_r [NMAX], sr_i [NMAX], sy_r [NMAX], sy_i [NMAX];
    real k, xr, t, ar, ai, rad, ang, e_small, e_big, acc;
    bit  expect_out;
    int  n_in;
    rst_n = 1'b0;
    in_valid = 1'b0;
    x = '0;
    for (int s = 0; s < NSETS; s++) begin
      k = rnd(-0.5, 0.5);
      k_c = coef_t'(qc(k));
      for (int j = 0; j < NMAX; j++) begin
        fp[j] = rnd(-0.9, 0.9);
        fr[j] = rnd(-0.15, 0.15);
        t = fr[j];
        for (int i = 0; i < M; i++) begin
          fo_ff[j][i] = coef_t'(qc(t));
          t = t * fp[j];
        end
        fo_fb[j] = coef_t'(qc(t / fr[j]));
        rad = rnd(0.2, 0.85);
        ang = rnd(0.05, PI - 0.05);
        sp_r[j] = rad * $cos(ang);
        sp_i[j] = rad * $sin(ang);
        sr_r[j] = rnd(-0.1, 0.1);
        sr_i[j] = rnd(-0.1, 0.1);
        ar = sr_r[j];
        ai = sr_i[j];
        for (int i = 0; i < M; i++) begin
          so_c[j][i] = coef_t'(qc(ar));
          so_d[j][i] = coef_t'(qc(ai));
          t  = ar * sp_r[j] - ai * sp_i[j];
          ai = ar * sp_i[j] + ai * sp_r[j];
          ar = t;
        end
        ar = 1.0;
        ai = 0.0;
        for (int i = 0; i < M; i++) begin
          t  = ar * sp_r[j] - ai * sp_i[j];
          ai = ar * sp_i[j] + ai * sp_r[j];
          ar = t;
        end
        so_a[j] = coef_t'(qc(ar));
        so_b[j] = coef_t'(qc(ai));
        fy[j] = 0.0;
        sy_r[j] = 0.0;
        sy_i[j] = 0.0;
      end
      rst_n = 1'b0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      expect_out = 1'b0;
      e_small = 0.0;
      e_big = 0.0;
      n_in = 0;
      while (n_in < NSAMP || expect_out) begin
        checks += 2;
        if (v_small !== expect_out) failures++;
        if (v_big !== expect_out) failures++;
        if (expect_out) begin
          n_out++;
          compare(v_small, y_small, e_small, "y (1+1 sections)");
          compare(v_big, y_big, e_big, "y (2+2 sections)");
        end
        expect_out = 1'b0;
        in_valid = (n_in < NSAMP) && ($urandom_range(0, 5) != 0);
        if (in_valid) begin
          x  = sample_t'($urandom_range(0, 65535) - 32768);
          xr = real'(x) / 32768.0;
          for (int j = 0; j < NMAX; j++) begin
            fy[j] = fp[j] * fy[j] + fr[j] * xr;
            t       = sp_r[j] * sy_r[j] - sp_i[j] * sy_i[j] + sr_r[j] * xr;
            sy_i[j] = sp_r[j] * sy_i[j] + sp_i[j] * sy_r[j] + sr_i[j] * xr;
            sy_r[j] = t;
          end
          if (n_in % M == M - 1) begin
            expect_out = 1'b1;
            e_small = clip(k * xr + fy[0] + 2.0 * sy_r[0]);
            acc = k * xr;
            for (int j = 0; j < NMAX; j++) acc += fy[j] + 2.0 * sy_r[j];
            e_big = clip(acc);
          end
          n_in++;
        end else begin
          x = sample_t'($urandom);
        end
        @(posedge clk);
        #1;
      end
      in_valid = 1'b0;
    end
    checks++;
    if (n_out != NSETS * (NSAMP / M)) failures++;
    $display("outputs %0d, max error %f LSB", n_out, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
