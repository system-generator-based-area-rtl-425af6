// tb_mdt_input_delay: self-checking test of the MDT input tapped delay line.
//
// Feeds random samples with a random in_valid pattern and keeps a software
// history of the accepted samples. Each cycle it checks win[0] = current
// input and win[i] = the i-th previously accepted sample (zero before enough
// samples have arrived after reset), for M = 4.
module tb_mdt_input_delay;
  import mdt_pkg::*;
  localparam int M = 4;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    in_valid;
  sample_t x;
  sample_t win [M];
  sample_t hist [M];      // hist[i] = i-th previous accepted sample
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  mdt_input_delay #(.M(M)) dut (.clk, .rst_n, .in_valid, .x, .win);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    x        = '0;
    for (int i = 0; i < M; i++) hist[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 1500; c++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      x        = sample_t'($urandom);
      #1;
      checks++;
      if (win[0] !== x) begin
        failures++;
        $display("FAIL win[0] at %0t", $time);
      end
      for (int i = 1; i < M; i++) begin
        checks++;
        if (win[i] !== hist[i]) begin
          failures++;
          $display("FAIL win[%0d]=%0d expected %0d at %0t", i, win[i], hist[i], $time);
        end
      end
      @(posedge clk);
      if (in_valid) begin
        for (int i = M - 1; i > 1; i--) hist[i] = hist[i-1];
        hist[1] = x;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
