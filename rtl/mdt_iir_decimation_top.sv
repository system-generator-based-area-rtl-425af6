// mdt_iir_decimation_top: the MDT decimation filters side by side, all
// decimating by M:
//   fo  - first-order Butterworth low-pass (fixed coefficients),
//   so  - second-order Butterworth low-pass (fixed coefficients),
//   par - a higher-order filter of NFO first-order and NSO second-order MDT
//         sections in parallel, with its coefficients on input ports.
//
// All three read the same input stream, so their outputs can be compared on
// one signal; each keeps its own phase counter, delay line and sections, as
// independent filters would. Defaults are the evaluated configuration:
// fs = 44.2 kHz, fc = 20 kHz, M = 4; the parallel filter defaults to one
// section of each kind (an odd third-order filter). Sharing the input port
// and bringing the parallel filter's coefficients out as ports are this
// design's choices.
//
// Interface: one Q1.15 input sample per cycle with `in_valid` high (gaps
// allowed); each filter delivers one Q1.15 output per M input samples, one
// clock after the sample that completes the group, marked by its own valid.
// The par_* coefficient inputs follow mdt_parallel_decimator.
module mdt_iir_decimation_top
  import mdt_pkg::*;
#(
  parameter int  M     = 4,
  parameter real FS_HZ = 44200.0,
  parameter real FC_HZ = 20000.0,
  parameter int  NFO   = 1,
  parameter int  NSO   = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_sample,
  output logic    fo_valid,
  output sample_t fo_sample,
  output logic    so_valid,
  output sample_t so_sample,
  input  coef_t   par_k,
  input  coef_t   par_fo_fb [NFO],
  input  coef_t   par_fo_ff [NFO][M],
  input  coef_t   par_so_a  [NSO],
  input  coef_t   par_so_b  [NSO],
  input  coef_t   par_so_c  [NSO][M],
  input  coef_t   par_so_d  [NSO][M],
  output logic    par_valid,
  output sample_t par_sample
);

  mdt_fo_decimator #(.M(M), .FS_HZ(FS_HZ), .FC_HZ(FC_HZ)) u_fo (
    .clk, .rst_n, .in_valid, .x(in_sample), .out_valid(fo_valid), .y(fo_sample)
  );

  mdt_so_decimator #(.M(M), .FS_HZ(FS_HZ), .FC_HZ(FC_HZ)) u_so (
    .clk, .rst_n, .in_valid, .x(in_sample), .out_valid(so_valid), .y(so_sample)
  );

  mdt_parallel_decimator #(.M(M), .NFO(NFO), .NSO(NSO)) u_par (
    .clk, .rst_n, .in_valid, .x(in_sample),
    .k_c(par_k), .fo_fb(par_fo_fb), .fo_ff(par_fo_ff),
    .so_a(par_so_a), .so_b(par_so_b), .so_c(par_so_c), .so_d(par_so_d),
    .out_valid(par_valid), .y(par_sample)
  );

endmodule
