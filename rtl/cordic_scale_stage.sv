// cordic_scale_stage: one gain-compensation stage of the CORDIC device.
//
// Both paths are multiplied by (1 + e * 2^-SHIFT): each adder adds,
// subtracts or passes ("+/-/0") its own value shifted right by SHIFT bits.
// e is a constant per mode (DIR_ORT for the orthogonal mode, DIR_HYP for the
// hyperbolic mode, 0 otherwise), chosen at elaboration so that the chain of
// scaling stages cancels the CORDIC gain and, in orthogonal mode, applies the
// forgetting factor. Its CTRL therefore needs no data input.
// Timing: one register stage, latency 1 clock, one slot per clock.
// The self-fed adders follow the document's cell figure; the per-mode
// constant directions are this design's choice.
module cordic_scale_stage
  import adi_pkg::*;
#(
  parameter int DATA_W  = 22,
  parameter int SHIFT   = 0,
  parameter int DIR_ORT = 0,
  parameter int DIR_HYP = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] x_i,
  input  logic signed [DATA_W-1:0] y_i,
  input  tag_t                     tag_i,
  output logic signed [DATA_W-1:0] x_o,
  output logic signed [DATA_W-1:0] y_o,
  output tag_t                     tag_o
);

  int e;
  logic signed [DATA_W-1:0] x_n, y_n;

  always_comb begin
    e = 0;
    if (tag_i.valid) begin
      if (tag_i.mode == MODE_ORT) e = DIR_ORT;
      else if (tag_i.mode == MODE_HYP) e = DIR_HYP;
    end
    x_n = x_i;
    y_n = y_i;
    if (e > 0) begin
      x_n = x_i + (x_i >>> SHIFT);
      y_n = y_i + (y_i >>> SHIFT);
    end else if (e < 0) begin
      x_n = x_i - (x_i >>> SHIFT);
      y_n = y_i - (y_i >>> SHIFT);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_o   <= '0;
      y_o   <= '0;
      tag_o <= TAG_IDLE;
    end else begin
      x_o   <= x_n;
      y_o   <= y_n;
      tag_o <= tag_i;
    end
  end

endmodule
