// mdt_parallel_decimator: higher-order IIR decimation filter built from
// parallel merged-delay-transformation sections.
//
// An Nth-order transfer function is expanded in partial fractions,
//   H(z) = k + sum_j r_j/(1 - p_j z^-1) + sum_l 2 Re[ r_l/(1 - p_l z^-1) ]
// with NFO real poles p_j and NSO complex-conjugate pole pairs p_l. Each real
// pole becomes a first-order MDT section and each conjugate pair one
// second-order MDT section; all sections share one phase counter and one
// input delay line, fire on the same input sample and their outputs are
// added together with the direct term k x[n]. Decimation by M therefore costs
// one pass of every section per M input samples, for any filter order.
// The decomposition into parallel sections follows the document; sharing the
// counter and delay line and the single direct-term multiplier are this
// design's choices.
//
// Coefficients are inputs (coef_t): per first-order section fo_fb = p^M and
// fo_ff[i] = r p^i; per second-order section so_a + j so_b = p^M and
// so_c[i] + j so_d[i] = r p^i; and the overall direct term k_c. They may be
// constants or registers loaded by a host; change them only with the filter
// in reset. NFO and NSO must each be at least 1.
// Interface: x and y are Q1.15; y is rounded and saturated.
// Timing: the output for input sample n = M-1, 2M-1, ... appears with
// `out_valid` one clock after that input sample, once per M input samples.
module mdt_parallel_decimator
  import mdt_pkg::*;
#(
  parameter int M   = 4,
  parameter int NFO = 1,
  parameter int NSO = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x,
  input  coef_t   k_c,
  input  coef_t   fo_fb [NFO],
  input  coef_t   fo_ff [NFO][M],
  input  coef_t   so_a  [NSO],
  input  coef_t   so_b  [NSO],
  input  coef_t   so_c  [NSO][M],
  input  coef_t   so_d  [NSO][M],
  output logic    out_valid,
  output sample_t y
);
  sample_t win [M];
  logic    fire;
  state_t  fo_y  [NFO];
  state_t  so_y  [NSO];
  logic    fo_v  [NFO];
  logic    so_v  [NSO];
  state_t  kx_q;
  acc_t    sum;

  mdt_phase_ctrl #(.M(M)) u_phase (
    .clk, .rst_n, .in_valid, .phase(), .fire
  );

  mdt_input_delay #(.M(M)) u_delay (
    .clk, .rst_n, .in_valid, .x, .win
  );

  for (genvar j = 0; j < NFO; j++) begin : g_fo
    mdt_first_order_section #(.M(M)) u_sec (
      .clk, .rst_n, .fire, .win,
      .fb_c(fo_fb[j]), .ff_c(fo_ff[j]), .k_c('0),
      .y1(), .y(fo_y[j]), .y_valid(fo_v[j])
    );
  end

  for (genvar l = 0; l < NSO; l++) begin : g_so
    mdt_second_order_section #(.M(M)) u_sec (
      .clk, .rst_n, .fire, .win,
      .fb_a(so_a[l]), .fb_b(so_b[l]), .ff_c(so_c[l]), .ff_d(so_d[l]), .k_c('0),
      .y1r(), .y1i(), .y(so_y[l]), .y_valid(so_v[l])
    );
  end

  // direct term, registered alongside the section outputs
  always_ff @(posedge clk) begin
    if (!rst_n)    kx_q <= '0;
    else if (fire) kx_q <= acc_to_state(mul_sample(k_c, win[0]));
  end

  always_comb begin
    sum = acc_t'(kx_q);
    for (int j = 0; j < NFO; j++) sum += acc_t'(fo_y[j]);
    for (int l = 0; l < NSO; l++) sum += acc_t'(so_y[l]);
  end

  assign y         = state_to_sample(acc_to_state(sum <<< COEF_FRAC));
  assign out_valid = fo_v[0] && so_v[0];   // all sections fire together

  initial assert (NFO >= 1 && NSO >= 1) else $error("NFO and NSO must be at least 1");

endmodule
