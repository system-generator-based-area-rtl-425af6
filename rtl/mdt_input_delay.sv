// mdt_input_delay: input tapped delay line of an M-fold MDT decimator.
//
// Presents the window of the current and the M-1 previous input samples,
// win[0] = x[n] (the sample on `x` now) and win[i] = x[n-i], which the
// feed-forward multipliers of the MDT sections weight by r*p^i. The M-1
// registers shift by one on every cycle with `in_valid` high and hold
// otherwise, so the window counts samples, not clock cycles.
//
// Timing: win[0] is combinational from `x`; win[1..M-1] are registers.
// Synchronous active-low reset clears them, so the first window after reset
// sees zero history, matching a filter that starts from rest.
// The delay chain follows the filter structure of the document; its reset
// and valid handling are this design's choice.
module mdt_input_delay
  import mdt_pkg::*;
#(
  parameter int M = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x,
  output sample_t win [M]
);
  sample_t dly [M];   // dly[0] unused; dly[i] holds x[n-i]

  assign win[0] = x;
  assign dly[0] = x;

  for (genvar i = 1; i < M; i++) begin : g_tap
    always_ff @(posedge clk) begin
      if (!rst_n)        dly[i] <= '0;
      else if (in_valid) dly[i] <= dly[i-1];
    end
    assign win[i] = dly[i];
  end

endmodule
