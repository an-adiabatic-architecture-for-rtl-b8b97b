// tb_adi_inv: self-checking test of two phase-aligned adiabatic inverters.
//
// As in the document's two-inverter example, gate 1 is aligned with phase 1
// and gate 2 with phase 2. A random bit is applied in each phase-1 window.
// Gate 1 must hold its complement for exactly two phases (valid from phase 1
// to the end of phase 2, recovered at phase 3); gate 2 must show the
// original bit two phases after it was applied, valid for two phases.
module tb_adi_inv;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] phase;
  logic in_bit = 1'b0;
  logic mid, mid_v, out, out_v;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  adi_phase_gen u_ph (.clk, .rst_n, .phase);
  adi_inv #(.PHASE(2'd1)) u1 (.clk, .rst_n, .phase, .i(in_bit), .o(mid), .o_valid(mid_v));
  adi_inv #(.PHASE(2'd2)) u2 (.clk, .rst_n, .phase, .i(mid), .o(out), .o_valid(out_v));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Phase p is shown during the clock after the edge that starts it; a gate
  // aligned with p has sampled at that edge.
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      if (phase == 2'd0) in_bit = $urandom_range(1);
      @(posedge clk);
      #1;
      if (n >= 8) begin
        checks++;
        case (phase)
          2'd1: if (!(mid_v && mid == ~in_bit) || out_v) begin
                  failures++;
                  $display("FAIL: phase 1 mid=%0d/%0d out_v=%0d", mid, mid_v, out_v);
                end
          2'd2: if (!(mid_v && out_v && out == in_bit)) begin
                  failures++;
                  $display("FAIL: phase 2");
                end
          2'd3: if (mid_v || !(out_v && out == in_bit)) begin
                  failures++;
                  $display("FAIL: phase 3");
                end
          default: if (mid_v || out_v) begin
                  failures++;
                  $display("FAIL: phase 0 valid");
                end
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
