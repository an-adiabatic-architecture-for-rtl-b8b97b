// tb_adi_phase_gen: self-checking test of the four-phase counter.
//
// After reset the phase must be 0 and then step 1, 2, 3, 0, ... one phase
// per clock, so that every phase occurs once in each period of four clocks.
module tb_adi_phase_gen;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] phase;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  adi_phase_gen dut (.*);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (phase != 2'd0) begin
      failures++;
      $display("FAIL: phase %0d in reset", phase);
    end
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      checks++;
      if (phase != 2'(n % 4)) begin
        failures++;
        $display("FAIL: clock %0d phase %0d", n, phase);
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
