// mdt_first_order_section: one first-order IIR section under the merged delay
// transformation (MDT), computing only every M-th output.
//
// The section realises H(z) = k + r/(1 - p z^-1). Substituting the recursion
// into itself M-1 times gives
//   y1[n] = p^M y1[n-M] + sum_{i=0}^{M-1} r p^i x[n-i],   y[n] = k x[n] + y1[n]
// so one output needs only the output M samples back and the last M inputs:
// the M unit delays of the recursive loop merge into one register that is
// loaded once per M input samples. That is M+1 multiplications per output
// (one more for a non-zero direct term k) instead of 2M when every output
// is computed. With k = 0 this is exactly the first-order MDT filter of the
// document; the direct term is this design's addition, needed to map the
// first-order Butterworth filter (numerator 1 + z^-1) onto the section.
//
// Interface: `fire` (one cycle) says that `win` holds x[n] .. x[n-M+1] for an
// output instant n. Coefficients arrive on ports (constants in a real filter):
// fb_c = p^M, ff_c[i] = r p^i, k_c = k, all in coef_t format.
// Timing: y and y1 are registered and valid in the cycle after `fire`, marked
// by `y_valid`; all M+2 products are computed in parallel in that one cycle.
// Synchronous active-low reset clears the loop state (filter at rest).
// Rounding to nearest and saturation of the state are this design's choice.
module mdt_first_order_section
  import mdt_pkg::*;
#(
  parameter int M = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    fire,
  input  sample_t win [M],
  input  coef_t   fb_c,
  input  coef_t   ff_c [M],
  input  coef_t   k_c,
  output state_t  y1,        // pole-section output y1[n] (loop state)
  output state_t  y,         // section output k x[n] + y1[n]
  output logic    y_valid
);
  acc_t   acc;
  state_t y1_next;
  state_t y_next;

  always_comb begin
    acc = mul_state(fb_c, y1);
    for (int i = 0; i < M; i++) acc += mul_sample(ff_c[i], win[i]);
    y1_next = acc_to_state(acc);
    y_next  = acc_to_state(mul_sample(k_c, win[0]) + (acc_t'(y1_next) <<< COEF_FRAC));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y1      <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= fire;
      if (fire) begin
        y1 <= y1_next;
        y  <= y_next;
      end
    end
  end

  initial assert (M >= 1 && M <= MAX_M) else $error("M out of range");

endmodule
