// tb_mdt_fo_decimator: end-to-end test of the first-order MDT decimator at
// its default configuration (fs = 44.2 kHz, fc = 20 kHz, M = 4).
//
// The reference is the undecimated first-order Butterworth filter in direct
// form, y[n] = g (x[n] + x[n-1]) - a1 y[n-1] with K = tan(pi fc/fs),
// g = K/(1+K), a1 = (K-1)/(K+1), run in floating point on every input
// sample; the expected output is every M-th reference sample, rounded and
// clipped to Q1.15. Stimuli: a 2 kHz and a 15 kHz sine of amplitude 0.9, a
// full-scale square wave and random samples, with random idle cycles between
// samples. Checks each output value (within TOL_LSB), that out_valid comes
// exactly one clock after every M-th input sample and at no other time, and
// that the number of outputs is the number of inputs divided by M.
module tb_mdt_fo_decimator;
  import mdt_pkg::*;
  localparam int  M       = 4;
  localparam real FS      = 44200.0;
  localparam real FC      = 20000.0;
  localparam int  NSAMP   = 4000;
  localparam real TOL_LSB = 2.0;
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

  mdt_fo_decimator dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

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
    real kk, g, a1, yref, xprev, xr, err, expv;
    bit  expect_out;
    kk = $tan(PI * FC / FS);
    g  = kk / (1.0 + kk);
    a1 = (kk - 1.0) / (kk + 1.0);
    yref = 0.0;
    xprev = 0.0;
    expv = 0.0;
    expect_out = 1'b0;
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
      expect_out = 1'b0;
      // drive the next input, with random idle cycles
      in_valid = (n_in < NSAMP) && ($urandom_range(0, 4) != 0);
      if (n_in < NSAMP && !in_valid) n_idle++;
      if (in_valid) begin
        x  = stimulus(n_in);
        xr = real'(x) / 32768.0;
        yref  = g * (xr + xprev) - a1 * yref;
        xprev = xr;
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
      if (out_valid) failures++;
    end
    checks++;
    if (n_out != NSAMP / M) begin
      failures++;
      $display("FAIL %0d outputs for %0d inputs", n_out, NSAMP);
    end
    checks++;
    if (n_idle == 0) failures++;
    $display("outputs %0d, inputs %0d, idle cycles %0d, max error %f LSB", n_out, n_in, n_idle, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
