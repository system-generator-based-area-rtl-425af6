// tb_mdt_phase_ctrl: self-checking test of the decimation phase counter.
//
// Drives a random in_valid pattern (about 70 % busy) and keeps its own count
// of accepted samples. Every cycle it checks that `fire` is high exactly on
// the M-th, 2M-th, ... valid sample and that `phase` equals the number of
// samples accepted since the last fire. Also checks that reset returns the
// phase to 0 in the middle of a group. Runs with M = 4 (the default) and
// with M = 3 in a second instance.
module tb_mdt_phase_ctrl;
  localparam int M  = 4;
  localparam int M3 = 3;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [$clog2(M+1)-1:0]  phase;
  logic [$clog2(M3+1)-1:0] phase3;
  logic fire, fire3;
  int   checks = 0, failures = 0;
  int   cnt = 0, cnt3 = 0, fires = 0;

  always #5 clk = ~clk;

  mdt_phase_ctrl #(.M(M))  dut  (.clk, .rst_n, .in_valid, .phase(phase),  .fire(fire));
  mdt_phase_ctrl #(.M(M3)) dut3 (.clk, .rst_n, .in_valid, .phase(phase3), .fire(fire3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

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
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      in_valid = ($urandom_range(0, 9) < 7);
      if (c == 1000) begin
        // reset in the middle of a group
        rst_n = 1'b0;
        in_valid = 1'b1;
      end
      #1;
      if (rst_n) begin
        check(phase  == cnt,  "phase (M=4)");
        check(phase3 == cnt3, "phase (M=3)");
        check(fire  == (in_valid && cnt  == M  - 1), "fire (M=4)");
        check(fire3 == (in_valid && cnt3 == M3 - 1), "fire (M=3)");
      end
      @(posedge clk);
      if (!rst_n) begin
        cnt  = 0;
        cnt3 = 0;
      end else if (in_valid) begin
        if (cnt == M - 1) fires++;
        cnt  = (cnt  + 1) % M;
        cnt3 = (cnt3 + 1) % M3;
      end
      #1 rst_n = 1'b1;
    end
    check(fires > 100, "enough fire events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
