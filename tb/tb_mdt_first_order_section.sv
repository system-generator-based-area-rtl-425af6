// tb_mdt_first_order_section: self-checking test of the first-order MDT section.
//
// For 24 random stable sections (pole p in (-0.9, 0.9), residue r, direct
// term k) the testbench quantises the MDT coefficients p^M, r p^i and k
// itself, streams random input samples, and runs the original recursion
// y1[n] = p y1[n-1] + r x[n] in floating point at the full input rate. Every
// M-th sample it fires the section and checks that, one clock later, the
// section output equals k x[n] + y1[n] of the undecimated filter within a
// tolerance that covers coefficient quantisation and rounding. It also
// checks that y_valid is high exactly in the cycle after each fire.
module tb_mdt_first_order_section;
  import mdt_pkg::*;
  localparam int  M      = 4;
  localparam int  NSETS  = 24;
  localparam int  NSAMP  = 400;
  localparam real TOL    = 1.0e-4;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    fire;
  sample_t win [M];
  coef_t   fb_c, k_c;
  coef_t   ff_c [M];
  state_t  y1, y;
  logic    y_valid;
  int      checks = 0, failures = 0;
  real     max_err = 0.0;

  always #5 clk = ~clk;

  mdt_first_order_section #(.M(M)) dut (
    .clk, .rst_n, .fire, .win, .fb_c, .ff_c, .k_c, .y1, .y, .y_valid
  );

  function automatic int qc(real v);
    return $rtoi(v * 65536.0 + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
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
    real p, r, k, yref, xr, pw, err, got;
    int  phase;
    fire = 1'b0;
    for (int i = 0; i < M; i++) win[i] = '0;
    for (int s = 0; s < NSETS; s++) begin
      p = rnd(-0.9, 0.9);
      r = rnd(-0.5, 0.5);
      k = (s % 3 == 0) ? 0.0 : rnd(-1.0, 1.0);
      pw = 1.0;
      for (int i = 0; i < M; i++) begin
        ff_c[i] = coef_t'(qc(r * pw));
        pw = pw * p;
      end
      fb_c = coef_t'(qc(pw));
      k_c  = coef_t'(qc(k));
      rst_n = 1'b0;
      fire  = 1'b0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      check(y_valid == 1'b0, "y_valid low after reset");
      yref  = 0.0;
      phase = 0;
      for (int n = 0; n < NSAMP; n++) begin
        for (int i = M - 1; i > 0; i--) win[i] = win[i-1];
        win[0] = (n < 100 && s == 1) ? sample_t'(16'h7fff) : sample_t'($urandom_range(0, 65535) - 32768);
        xr     = real'(win[0]) / 32768.0;
        yref   = p * yref + r * xr;
        fire   = (phase == M - 1);
        @(posedge clk);
        #1;
        check(y_valid == fire, "y_valid one cycle after fire");
        if (fire) begin
          got = real'(y) / real'(1 << STATE_FRAC);
          err = got - (k * xr + yref);
          if (err < 0.0) err = -err;
          if (err > max_err) max_err = err;
          check(err < TOL, $sformatf("set %0d sample %0d: y=%f expected %f", s, n, got, k * xr + yref));
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
