// tb_cordic_scale_stage: self-checking test of the gain-compensation stage.
//
// Three stages with shift 3 and directions (+1 orthogonal, -1 hyperbolic),
// (-1, 0) and (0, +1) are driven with random slots; each output must be
// x + e*(x >>> 3) for both paths, with e the direction of the slot's mode,
// and 0 for linear, set, copy and idle slots. Latency is one clock.
module tb_cordic_scale_stage;
  import adi_pkg::*;

  localparam int DATA_W = 22;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [DATA_W-1:0] x_i, y_i;
  tag_t tag_i;
  logic signed [DATA_W-1:0] xo [3];
  logic signed [DATA_W-1:0] yo [3];
  tag_t to_ [3];

  int checks = 0;
  int failures = 0;
  localparam int DORT [3] = '{1, -1, 0};
  localparam int DHYP [3] = '{-1, 0, 1};

  always #5 clk = ~clk;

  for (genvar g = 0; g < 3; g++) begin : g_dut
    cordic_scale_stage #(.DATA_W(DATA_W), .SHIFT(3), .DIR_ORT(DORT[g]), .DIR_HYP(DHYP[g])) dut (
      .clk, .rst_n, .x_i, .y_i, .tag_i, .x_o(xo[g]), .y_o(yo[g]), .tag_o(to_[g]));
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    logic signed [DATA_W-1:0] xe, ye;
    x_i = '0; y_i = '0; tag_i = TAG_IDLE;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      x_i = DATA_W'($urandom_range(400000) - 200000);
      y_i = DATA_W'($urandom_range(400000) - 200000);
      tag_i.valid = ($urandom_range(7) != 0);
      tag_i.first = $urandom_range(1);
      tag_i.v2    = $urandom_range(1);
      tag_i.mode  = mode_e'($urandom_range(4));
      @(posedge clk);
      #1;
      for (int g = 0; g < 3; g++) begin
        e = 0;
        if (tag_i.valid && tag_i.mode == MODE_ORT) e = DORT[g];
        if (tag_i.valid && tag_i.mode == MODE_HYP) e = DHYP[g];
        xe = x_i + DATA_W'(e * int'(x_i >>> 3));
        ye = y_i + DATA_W'(e * int'(y_i >>> 3));
        checks++;
        if (xo[g] !== xe || yo[g] !== ye || to_[g] !== tag_i) begin
          failures++;
          $display("FAIL stage %0d mode %0d: got %0d,%0d exp %0d,%0d", g, tag_i.mode, xo[g], yo[g], xe, ye);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
