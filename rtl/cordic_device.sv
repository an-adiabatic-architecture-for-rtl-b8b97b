// cordic_device: area-optimised CORDIC device for one row of the array.
//
// The device is a ring of NSTAGE pipelined stages: NROT micro-rotation
// stages followed by NSCALE scaling stages. The x output of the last stage
// is fed back to the x input of the first, so the ring holds NSTAGE
// circulating slots; each slot stores one entry of the row's part of V1/V2.
// The y path is not fed back: it carries the input column (an element of
// W1/W2) down from the device above and out to the device below.
//
// A row arrives as consecutive columns, one per clock, aligned to the ring
// slots. The first column (tag.first) meets the row's diagonal entry: the
// device works as the "vector" cell and every stage chooses and stores its
// rotation direction. The remaining columns meet the other entries of the
// row, and the stages apply the stored directions: the device works as the
// "rotation" cells. Modes:
//   orthogonal  circular rotation, gain-compensated (times the forgetting factor)
//   linear      x kept, y' = y - (w/v) x   (Schur complement step)
//   hyperbolic  hyperbolic rotation, gain-compensated
//   set         diagonal slot loads the input, other slots load 0, y passes
//   copy        the first column selects the row (input != 0); selected
//               V2-part slots send their stored value down in place of y
// Set and copy are done by a multiplexer at the ring entry; all stages then
// pass the data unchanged.
//
// Output: the y path of the last stage. The first column's y (the
// annihilated element) is dropped, and the next column is marked first so
// that the device below takes it as its own diagonal column.
//
// Timing: latency NSTAGE clocks from y_i to y_o; one column per clock; rows
// must start on the same ring slot (a multiple of NSTAGE clocks apart).
// The ring, the stage structure and the modes follow the document; the
// mux-based set/copy, the copy row selection and the output re-tagging are
// this design's choices.
module cordic_device
  import adi_pkg::*;
#(
  parameter int DATA_W     = 22,
  parameter int FRAC_W     = 16,
  parameter int FORGET_Q16 = 65536
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] y_i,
  input  tag_t                     tag_i,
  output logic signed [DATA_W-1:0] y_o,
  output tag_t                     tag_o
);

  localparam int NROT   = num_rot_stages(FRAC_W);
  localparam int NSCALE = FRAC_W + 1;
  localparam int NSTAGE = NROT + NSCALE;

  // Stage k reads xi/yi/ti[k] and drives xo/yo/tq[k].
  logic signed [DATA_W-1:0] xi [NSTAGE];
  logic signed [DATA_W-1:0] yi [NSTAGE];
  tag_t                     ti [NSTAGE];
  logic signed [DATA_W-1:0] xo [NSTAGE];
  logic signed [DATA_W-1:0] yo [NSTAGE];
  tag_t                     tq [NSTAGE];

  // ---- ring entry: feedback and the set / copy multiplexer ----
  logic sel_q;   // copy mode: this row is selected
  logic signed [DATA_W-1:0] x_fb;

  assign x_fb = xo[NSTAGE-1];

  always_comb begin
    for (int k = 1; k < NSTAGE; k++) begin
      xi[k] = xo[k-1];
      yi[k] = yo[k-1];
      ti[k] = tq[k-1];
    end
    ti[0] = tag_i;
    xi[0] = x_fb;
    yi[0] = y_i;
    if (tag_i.valid) begin
      if (tag_i.mode == MODE_SET) begin
        xi[0] = tag_i.first ? y_i : '0;
        yi[0] = tag_i.first ? '0 : y_i;
      end else if (tag_i.mode == MODE_COPY) begin
        if (tag_i.first)
          yi[0] = '0;
        else if (tag_i.v2 && sel_q)
          yi[0] = x_fb;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      sel_q <= 1'b0;
    else if (tag_i.valid && tag_i.first && tag_i.mode == MODE_COPY)
      sel_q <= (y_i != '0);
  end

  // ---- micro-rotation stages ----
  for (genvar k = 0; k < NROT; k++) begin : g_rot
    cordic_rot_stage #(
      .DATA_W(DATA_W),
      .SHIFT (rot_shift(FRAC_W, k)),
      .REPEAT(rot_repeat(FRAC_W, k))
    ) u_stage (
      .clk  (clk),
      .rst_n(rst_n),
      .x_i  (xi[k]),
      .y_i  (yi[k]),
      .tag_i(ti[k]),
      .x_o  (xo[k]),
      .y_o  (yo[k]),
      .tag_o(tq[k])
    );
  end

  // ---- scaling stages ----
  for (genvar j = 0; j < NSCALE; j++) begin : g_scale
    cordic_scale_stage #(
      .DATA_W (DATA_W),
      .SHIFT  (j),
      .DIR_ORT(scale_dir(ort_scale_target(FORGET_Q16), NSCALE, j)),
      .DIR_HYP(scale_dir(INV_K_HYP_Q30, NSCALE, j))
    ) u_stage (
      .clk  (clk),
      .rst_n(rst_n),
      .x_i  (xi[NROT+j]),
      .y_i  (yi[NROT+j]),
      .tag_i(ti[NROT+j]),
      .x_o  (xo[NROT+j]),
      .y_o  (yo[NROT+j]),
      .tag_o(tq[NROT+j])
    );
  end

  // ---- output re-tagging ----
  logic was_first_q;
  tag_t t_last;

  assign t_last = tq[NSTAGE-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) was_first_q <= 1'b0;
    else        was_first_q <= t_last.valid && t_last.first;
  end

  always_comb begin
    tag_o       = t_last;
    tag_o.valid = t_last.valid && !t_last.first;
    tag_o.first = t_last.valid && !t_last.first && was_first_q;
  end

  assign y_o = yo[NSTAGE-1];

endmodule
