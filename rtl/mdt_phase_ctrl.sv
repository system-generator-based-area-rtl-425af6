// mdt_phase_ctrl: decimation phase counter of an M-fold MDT decimator.
//
// Counts accepted input samples modulo M. The input sample that completes a
// group of M (the M-th, 2M-th, ... sample after reset) raises `fire` in the
// same cycle, which tells the filter sections to compute one output from the
// last M inputs and the output M input samples back. Only one output per M
// inputs is computed; the intermediate outputs never exist.
//
// Interface: `in_valid` marks a cycle that carries an input sample; idle
// cycles between samples are allowed and leave the phase unchanged. `phase`
// is the index (0..M-1) of the sample now being presented.
// Timing: combinational `fire` = in_valid && phase == M-1; phase register
// updates on the clock edge. Synchronous active-low reset to phase 0.
// The document states the one-output-per-M-inputs behaviour; the counter
// itself and the valid handshake are this design's choice.
module mdt_phase_ctrl #(
  parameter int M = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  output logic [$clog2(M+1)-1:0]       phase,
  output logic                         fire
);
  localparam int PW = $clog2(M + 1);

  assign fire = in_valid && (phase == PW'(M - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)        phase <= '0;
    else if (fire)     phase <= '0;
    else if (in_valid) phase <= phase + 1'b1;
  end

  property p_phase_in_range;
    @(posedge clk) disable iff (!rst_n) phase < PW'(M);
  endproperty
  a_phase_in_range: assert property (p_phase_in_range);

endmodule
