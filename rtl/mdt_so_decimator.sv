// mdt_so_decimator: second-order Butterworth low-pass filter with M-fold
// decimation, realised with the merged delay transformation.
//
// The second-order transfer function is split into a direct term k and a
// complex-conjugate pole pair. Only one pole of the pair is computed, in real
// and imaginary parts, by a second-order MDT section; the output is
// k x[n] + 2 Re(y1[n]). As in the first-order filter, a phase counter and a
// tapped input delay line feed the section once per M input samples.
//
// Defaults follow the document's evaluated filter: sampling rate 44.2 kHz,
// cut-off 20 kHz, M = 4. The coefficients (A, B, C_i, D_i, k) are derived
// from FS_HZ, FC_HZ and M while the design elaborates (see mdt_pkg); the
// bilinear design method and the fixed-point formats are this design's choice.
//
// Interface: x is Q1.15, y is Q1.15 rounded and saturated.
// Timing: the output for input sample n = M-1, 2M-1, ... appears with
// `out_valid` one clock after that input sample, once per M input samples.
module mdt_so_decimator
  import mdt_pkg::*;
#(
  parameter int  M     = 4,
  parameter real FS_HZ = 44200.0,
  parameter real FC_HZ = 20000.0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x,
  output logic    out_valid,
  output sample_t y
);
  localparam coef_t FB_A = bw2_fb(FS_HZ, FC_HZ, M, 0);
  localparam coef_t FB_B = bw2_fb(FS_HZ, FC_HZ, M, 1);
  localparam coef_t KC   = bw2_k(FS_HZ, FC_HZ);

  coef_t   ff_c [M];
  coef_t   ff_d [M];
  sample_t win [M];
  logic    fire;
  state_t  sec_y, sec_y1r, sec_y1i;
  logic    sec_valid;

  for (genvar i = 0; i < M; i++) begin : g_ff
    assign ff_c[i] = bw2_ff(FS_HZ, FC_HZ, i, 0);
    assign ff_d[i] = bw2_ff(FS_HZ, FC_HZ, i, 1);
  end

  mdt_phase_ctrl #(.M(M)) u_phase (
    .clk, .rst_n, .in_valid, .phase(), .fire
  );

  mdt_input_delay #(.M(M)) u_delay (
    .clk, .rst_n, .in_valid, .x, .win
  );

  mdt_second_order_section #(.M(M)) u_sec (
    .clk, .rst_n, .fire, .win,
    .fb_a(FB_A), .fb_b(FB_B), .ff_c, .ff_d, .k_c(KC),
    .y1r(sec_y1r), .y1i(sec_y1i), .y(sec_y), .y_valid(sec_valid)
  );

  assign y         = state_to_sample(sec_y);
  assign out_valid = sec_valid;

endmodule
