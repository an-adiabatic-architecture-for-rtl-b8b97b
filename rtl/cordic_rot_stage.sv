// cordic_rot_stage: one micro-rotation stage of the CORDIC device.
//
// Two adders, each of which adds, subtracts or passes ("+/-/0") the other
// path's value shifted right by SHIFT bits:
//   x' = x - mu * d * (y >>> SHIFT)      mu = +1 orthogonal, 0 linear, -1 hyperbolic
//   y' = y +      d * (x >>> SHIFT)
// The CTRL part chooses d. In the vector slot (tag.first) it picks
// d = -sign(x) * sign(y), which drives y towards zero, and it stores d in a
// register of its own. In the following rotation slots of the same row it
// applies the stored d. This self-feedback of the CTRL is what lets one
// device play both the vector cell and the rotation cells of a row.
// A stage whose shift is a repeated one (REPEAT) works only in hyperbolic
// mode; a stage with shift 0 is bypassed in hyperbolic mode. Set, copy and
// idle slots pass through unchanged.
// Timing: one register stage, latency 1 clock, one slot per clock.
// The adder structure and CTRL follow the document's cell figure; the sign
// rule, the per-mode bypass and the two's-complement truncating shift are
// this design's choices.
module cordic_rot_stage
  import adi_pkg::*;
#(
  parameter int DATA_W = 22,
  parameter int SHIFT  = 0,
  parameter bit REPEAT = 1'b0
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

  dir_t d_q;      // direction stored in the vector slot
  dir_t d;        // direction applied in this slot
  logic active;   // this stage takes part in the slot's mode
  logic signed [DATA_W-1:0] xs, ys;
  logic signed [DATA_W-1:0] x_n, y_n;

  always_comb begin
    unique case (tag_i.mode)
      MODE_ORT, MODE_LIN: active = tag_i.valid && !REPEAT;
      MODE_HYP:           active = tag_i.valid && (SHIFT != 0);
      default:            active = 1'b0;
    endcase
  end

  always_comb begin
    if (!active)
      d = 2'sd0;
    else if (tag_i.first)
      d = (x_i[DATA_W-1] == y_i[DATA_W-1]) ? -2'sd1 : 2'sd1;
    else
      d = d_q;
  end

  assign xs = x_i >>> SHIFT;
  assign ys = y_i >>> SHIFT;

  always_comb begin
    x_n = x_i;
    y_n = y_i;
    if (d == 2'sd1) begin
      y_n = y_i + xs;
      if (tag_i.mode == MODE_ORT) x_n = x_i - ys;
      else if (tag_i.mode == MODE_HYP) x_n = x_i + ys;
    end else if (d == -2'sd1) begin
      y_n = y_i - xs;
      if (tag_i.mode == MODE_ORT) x_n = x_i + ys;
      else if (tag_i.mode == MODE_HYP) x_n = x_i - ys;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q   <= 2'sd0;
      x_o   <= '0;
      y_o   <= '0;
      tag_o <= TAG_IDLE;
    end else begin
      if (tag_i.valid && tag_i.first) d_q <= d;
      x_o   <= x_n;
      y_o   <= y_n;
      tag_o <= tag_i;
    end
  end

endmodule
