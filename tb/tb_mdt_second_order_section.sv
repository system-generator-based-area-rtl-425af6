// tb_mdt_second_order_section: self-checking test of the second-order MDT section.
//
// For 24 random stable conjugate pole pairs (pole radius 0.2..0.85, any
// angle), complex residue r and direct term k, the testbench computes and
// quantises A + jB = p^M, C_i + jD_i = r p^i and k itself, streams random
// input samples, and runs the undecimated complex recursion
// y1[n] = p y1[n-1] + r x[n] in floating point at the input rate. Every M-th
// sample it fires the section and checks, one clock later, the output
// k x[n] + 2 Re y1[n] and the state Re/Im y1[n] against that reference. It
// also checks that y_valid follows fire by exactly one cycle.
module tb_mdt_second_order_section;
  import mdt_pkg::*;
  localparam int  M      = 4;
  localparam int  NSETS  = 24;
  localparam int  NSAMP  = 400;
  localparam real TOL    = 1.5e-4;
  localparam real PI     = 3.14159265358979;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    fire;
  sample_t win [M];
  coef_t   fb_a, fb_b, k_c;
  coef_t   ff_c [M];
  coef_t   ff_d [M];
  state_t  y1r, y1i, y;
  logic    y_valid;
  int      checks = 0, failures = 0;
  real     max_err = 0.0;

  always #5 clk = ~clk;

  mdt_second_order_section #(.M(M)) dut (
    .clk, .rst_n, .fire, .win, .fb_a, .fb_b, .ff_c, .ff_d, .k_c,
    .y1r, .y1i, .y, .y_valid
  );

  function automatic int qc(real v);
    return $rtoi(v * 65536.0 + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check_close(input real got, input real exp, input string what);
    real err;
    err = absr(got - exp);
    if (err > max_err) max_err = err;
    checks++;
    if (err >= TOL) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %f expected %f at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pr, pim, rr, ri, k, yr, yi, t, xr, ar, ai, rad, ang, sc;
    int  phase;
    fire = 1'b0;
    for (int i = 0; i < M; i++) win[i] = '0;
    for (int s = 0; s < NSETS; s++) begin
      rad = rnd(0.2, 0.85);
      ang = rnd(0.05, PI - 0.05);
      pr  = rad * $cos(ang);
      pim = rad * $sin(ang);
      rr  = rnd(-0.2, 0.2);
      ri  = rnd(-0.2, 0.2);
      k   = (s % 4 == 0) ? 0.0 : rnd(-1.0, 1.0);
      ar = rr;
      ai = ri;
      for (int i = 0; i < M; i++) begin
        ff_c[i] = coef_t'(qc(ar));
        ff_d[i] = coef_t'(qc(ai));
        t  = ar * pr - ai * pim;
        ai = ar * pim + ai * pr;
        ar = t;
      end
      // ar + j ai is now r p^M; p^M itself is that divided by r
      ar = 1.0;
      ai = 0.0;
      for (int i = 0; i < M; i++) begin
        t  = ar * pr - ai * pim;
        ai = ar * pim + ai * pr;
        ar = t;
      end
      fb_a = coef_t'(qc(ar));
      fb_b = coef_t'(qc(ai));
      k_c  = coef_t'(qc(k));
      rst_n = 1'b0;
      fire  = 1'b0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      checks++;
      if (y_valid !== 1'b0) failures++;
      yr = 0.0;
      yi = 0.0;
      phase = 0;
      sc = real'(1 << STATE_FRAC);
      for (int n = 0; n < NSAMP; n++) begin
        for (int i = M - 1; i > 0; i--) win[i] = win[i-1];
        win[0] = sample_t'($urandom_range(0, 65535) - 32768);
        xr = real'(win[0]) / 32768.0;
        t  = pr * yr - pim * yi + rr * xr;
        yi = pr * yi + pim * yr + ri * xr;
        yr = t;
        fire = (phase == M - 1);
        @(posedge clk);
        #1;
        checks++;
        if (y_valid !== fire) begin
          failures++;
          $display("FAIL y_valid does not follow fire at %0t", $time);
        end
        if (fire) begin
          check_close(real'(y) / sc, k * xr + 2.0 * yr, $sformatf("set %0d n %0d y", s, n));
          check_close(real'(y1r) / sc, yr, $sformatf("set %0d n %0d y1r", s, n));
          check_close(real'(y1i) / sc, yi, $sformatf("set %0d n %0d y1i", s, n));
        end
        phase = (phase + 1) % M;
      end
      for (int i = 0; i < M; i++) win[i] = '0;
    end
    $display("max abs error %e", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
