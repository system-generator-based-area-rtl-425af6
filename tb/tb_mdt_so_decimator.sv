// tb_mdt_so_decimator: end-to-end test of the second-order MDT decimator at
// its default configuration (fs = 44.2 kHz, fc = 20 kHz, M = 4).
//
// The reference is the undecimated second-order Butterworth filter in direct
// form I, y[n] = b0 x[n] + b1 x[n-1] + b2 x[n-2] - a1 y[n-1] - a2 y[n-2], with
// the bilinear-transform coefficients (K = tan(pi fc/fs), c = K^2,
// a0 = 1 + sqrt2 K + c, b0 = b2 = c/a0, b1 = 2 b0, a1 = (2c - 2)/a0,
// a2 = (1 - sqrt2 K + c)/a0), run in floating point on every input sample; the expected output is every M-th reference sample, rounded and
// clipped to Q1.15. Stimuli: a 2 kHz and a 15 kHz sine of amplitude 0.9, a
// full-scale square wave and random samples, with random idle cycles between
// samples. Checks each output value (within TOL_LSB), that out_valid comes
// exactly one clock after every M-th input sample and at no other time, and
// that the number of outputs is the number of inputs divided by M. A second
// instance with M = 2, the case for which the section equations are usually
// written out (A = Re p^2, B = Im p^2, C + jD = r, E + jF = r p), is checked
// the same way against every second reference sample.
module tb_mdt_so_decimator;
  import mdt_pkg::*;
  localparam int  M       = 4;
  localparam real FS      = 44200.0;
  localparam real FC      = 20000.0;
  localparam int  NSAMP   = 4000;
  localparam real TOL_LSB = 3.0;
  localparam real PI      = 3.14159265358979;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    in_valid;
  sample_t x;
  logic    out_valid;
  sample_t y;
  int      checks = 0, failures = 0;
  int      n_in = 0, n_out = 0, n_idle = 0;
  real     max_err = 0.0;

  always #5 clk = ~clk;

  mdt_so_decimator dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  logic    out_valid2;
  sample_t y2;
  int      n_out2 = 0;
  mdt_so_decimator #(.M(2), .FS_HZ(FS), .FC_HZ(FC)) dut_m2 (
    .clk, .rst_n, .in_valid, .x, .out_valid(out_valid2), .y(y2)
  );

  function automatic real clip(real v);
    if (v > 32767.0 / 32768.0) return 32767.0 / 32768.0;
    if (v < -1.0) return -1.0;
    return v;
  endfunction

  function automatic sample_t stimulus(int n);
    real v;
    case ((n / 1000) % 4)
      0:       v = 0.9 * $sin(2.0 * PI * 2000.0 * real'(n) / FS);
      1:       v = 0.9 * $sin(2.0 * PI * 15000.0 * real'(n) / FS);
      2:       v = ((n / 37) % 2 == 0) ? 0.999 : -0.999;
      default: v = real'(int'($urandom_range(0, 65535)) - 32768) / 32768.0;
    endcase
    return sample_t'($rtoi(v * 32768.0));
  endfunction

  initial begin
    repeat (NSAMP * 3) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real kk, c, a0, b0, b1, a1, a2, yref, yprev, xprev, xprev2, xr, err, expv;
    bit  expect_out, expect2;
    real expv2;
    kk = $tan(PI * FC / FS);
    c  = kk * kk;
    a0 = 1.0 + $sqrt(2.0) * kk + c;
    b0 = c / a0;
    b1 = 2.0 * b0;
    a1 = (2.0 * c - 2.0) / a0;
    a2 = (1.0 - $sqrt(2.0) * kk + c) / a0;
    yref = 0.0;
    yprev = 0.0;
    xprev = 0.0;
    xprev2 = 0.0;
    expv = 0.0;
    expect_out = 1'b0;
    expect2 = 1'b0;
    expv2 = 0.0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (n_in < NSAMP || expect_out) begin
      // check the outputs of the previous cycle's input
      checks++;
      if (out_valid !== expect_out) begin
        failures++;
        $display("FAIL out_valid=%0b expected %0b at %0t", out_valid, expect_out, $time);
      end
      if (expect_out && out_valid) begin
        n_out++;
        err = real'(y) - expv * 32768.0;
        if (err < 0.0) err = -err;
        if (err > max_err) max_err = err;
        checks++;
        if (err > TOL_LSB) begin
          failures++;
          if (failures < 20) $display("FAIL y=%0d expected %f (input %0d)", y, expv * 32768.0, n_in);
        end
      end
      checks++;
      if (out_valid2 !== expect2) begin
        failures++;
        $display("FAIL M=2 out_valid=%0b expected %0b at %0t", out_valid2, expect2, $time);
      end
      if (expect2 && out_valid2) begin
        n_out2++;
        err = real'(y2) - expv2 * 32768.0;
        if (err < 0.0) err = -err;
        if (err > max_err) max_err = err;
        checks++;
        if (err > TOL_LSB) begin
          failures++;
          if (failures < 20) $display("FAIL M=2 y=%0d expected %f (input %0d)", y2, expv2 * 32768.0, n_in);
        end
      end
      expect_out = 1'b0;
      expect2 = 1'b0;
      // drive the next input, with random idle cycles
      in_valid = (n_in < NSAMP) && ($urandom_range(0, 4) != 0);
      if (n_in < NSAMP && !in_valid) n_idle++;
      if (in_valid) begin
        x  = stimulus(n_in);
        xr = real'(x) / 32768.0;
        err    = b0 * (xr + xprev2) + b1 * xprev - a1 * yref - a2 * yprev;
        yprev  = yref;
        yref   = err;
        xprev2 = xprev;
        xprev  = xr;
        if (n_in % 2 == 1) begin
          expect2 = 1'b1;
          expv2 = clip(yref);
        end
        if (n_in % M == M - 1) begin
          expect_out = 1'b1;
          expv = clip(yref);
        end
        n_in++;
      end else begin
        x = sample_t'($urandom);
      end
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    repeat (3) begin
      @(posedge clk);
      #1;
      checks++;
      if (out_valid || out_valid2) failures++;
    end
    checks++;
    if (n_out != NSAMP / M) begin
      failures++;
      $display("FAIL %0d outputs for %0d inputs", n_out, NSAMP);
    end
    checks++;
    if (n_out2 != NSAMP / 2) begin
      failures++;
      $display("FAIL %0d outputs of the M=2 filter", n_out2);
    end
    checks++;
    if (n_idle == 0) failures++;
    $display("M=2 outputs %0d", n_out2);
    $display("outputs %0d, inputs %0d, idle cycles %0d, max error %f LSB", n_out, n_in, n_idle, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
