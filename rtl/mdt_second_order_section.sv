// mdt_second_order_section: one second-order IIR section (a complex-conjugate
// pole pair) under the merged delay transformation, computing every M-th output.
//
// The pair is written in parallel form, H(z) = k + r/(1 - p z^-1) +
// conj(r)/(1 - conj(p) z^-1). The two first-order parts have conjugate outputs,
// so only one of them, y1 = y1R + j y1I, is computed and the imaginary parts
// cancel: y[n] = k x[n] + 2 y1R[n]. With A + jB = p^M and C_i + jD_i = r p^i,
// the MDT recursion of y1 split into real arithmetic is
//   y1R[n] = A y1R[n-M] - B y1I[n-M] + sum_i C_i x[n-i]
//   y1I[n] = A y1I[n-M] + B y1R[n-M] + sum_i D_i x[n-i]
// 4 feedback and 2M feed-forward multipliers, the direct term k and the
// doubling (a shift here) make the 2M + 6 multiplications the document counts.
//
// Interface: `fire` (one cycle) says that `win` holds x[n] .. x[n-M+1].
// Coefficients arrive on ports: fb_a = A, fb_b = B, ff_c[i] = C_i,
// ff_d[i] = D_i, k_c = k, in coef_t format.
// Timing: y, y1r and y1i are registered and valid in the cycle after `fire`
// (`y_valid`); all products are computed in parallel. Synchronous active-low
// reset clears the state. Rounding and saturation are this design's choice.
module mdt_second_order_section
  import mdt_pkg::*;
#(
  parameter int M = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    fire,
  input  sample_t win [M],
  input  coef_t   fb_a,
  input  coef_t   fb_b,
  input  coef_t   ff_c [M],
  input  coef_t   ff_d [M],
  input  coef_t   k_c,
  output state_t  y1r,       // Re y1[n] (loop state)
  output state_t  y1i,       // Im y1[n] (loop state)
  output state_t  y,         // section output k x[n] + 2 y1R[n]
  output logic    y_valid
);
  acc_t   acc_r, acc_i;
  state_t y1r_next, y1i_next, y_next;

  always_comb begin
    acc_r = mul_state(fb_a, y1r) - mul_state(fb_b, y1i);
    acc_i = mul_state(fb_a, y1i) + mul_state(fb_b, y1r);
    for (int i = 0; i < M; i++) begin
      acc_r += mul_sample(ff_c[i], win[i]);
      acc_i += mul_sample(ff_d[i], win[i]);
    end
    y1r_next = acc_to_state(acc_r);
    y1i_next = acc_to_state(acc_i);
    y_next   = acc_to_state(mul_sample(k_c, win[0]) + (acc_t'(y1r_next) <<< (COEF_FRAC + 1)));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y1r     <= '0;
      y1i     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= fire;
      if (fire) begin
        y1r <= y1r_next;
        y1i <= y1i_next;
        y   <= y_next;
      end
    end
  end

  initial assert (M >= 1 && M <= MAX_M) else $error("M out of range");

endmodule
