// mdt_fo_decimator: first-order Butterworth low-pass filter with M-fold
// decimation, realised with the merged delay transformation.
//
// One input sample per `in_valid` cycle enters a tapped delay line; a phase
// counter picks every M-th sample, and on that sample a first-order MDT
// section computes the filter output directly from the previous decimated
// output and the last M inputs. The intermediate outputs are never formed,
// so the filter runs its multipliers once per output, at the low rate.
//
// Defaults follow the document's evaluated filter: sampling rate 44.2 kHz,
// cut-off 20 kHz, M = 4. The coefficients are derived from FS_HZ, FC_HZ and
// M while the design elaborates (bilinear-transform Butterworth design split
// into a direct term and one real pole; see mdt_pkg); the bilinear design
// method and the fixed-point formats are this design's choice.
//
// Interface: x is Q1.15, y is Q1.15 rounded and saturated.
// Timing: the output for input sample n = M-1, 2M-1, ... (counting from 0
// after reset) appears with `out_valid` one clock after that input sample;
// out_valid is high for one cycle per M input samples.
module mdt_fo_decimator
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
  localparam coef_t FB = bw1_fb(FS_HZ, FC_HZ, M);
  localparam coef_t KC = bw1_k(FS_HZ, FC_HZ);

  coef_t   ff [M];
  sample_t win [M];
  logic    fire;
  state_t  sec_y, sec_y1;
  logic    sec_valid;

  for (genvar i = 0; i < M; i++) begin : g_ff
    assign ff[i] = bw1_ff(FS_HZ, FC_HZ, i);
  end

  mdt_phase_ctrl #(.M(M)) u_phase (
    .clk, .rst_n, .in_valid, .phase(), .fire
  );

  mdt_input_delay #(.M(M)) u_delay (
    .clk, .rst_n, .in_valid, .x, .win
  );

  mdt_first_order_section #(.M(M)) u_sec (
    .clk, .rst_n, .fire, .win,
    .fb_c(FB), .ff_c(ff), .k_c(KC),
    .y1(sec_y1), .y(sec_y), .y_valid(sec_valid)
  );

  assign y         = state_to_sample(sec_y);
  assign out_valid = sec_valid;

endmodule
