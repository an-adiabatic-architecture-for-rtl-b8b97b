// cordic_column_array: the area-optimised CORDIC array.
//
// It computes Theta * [V1 V2; W1 W2] = [V1' V2'; 0 W2'] row by row, where
// V1 (N_V1 x N_V1, upper triangular) and V2 (N_V1 x N_V2) are held inside
// the array and each input row [W1 W2] is annihilated in its W1 part. The
// triangular array of one vector cell and several rotation cells per row is
// collapsed into a single column of N_V1 CORDIC devices: device r holds row
// r of [V1 V2] in the slots of its pipeline ring and handles columns r..N-1
// of each input row one after the other. The mode of each input row
// (orthogonal, linear, hyperbolic, set, copy) travels with its columns.
//
// Interface: rows in with in_valid/in_ready; W2' rows out with a one-clock
// out_valid. Timing: one row per NSTAGE clocks, where NSTAGE is the ring
// length of a device (36 at the default precision); latency from the first
// column entering device 0 to out_valid is N_V1*NSTAGE + N_V1 + N_V2 clocks.
// The collapsed column and the modes are the document's; word length,
// precision and the row interface are this design's choices.
module cordic_column_array
  import adi_pkg::*;
#(
  parameter int N_V1       = 4,
  parameter int N_V2       = 4,
  parameter int DATA_W     = 22,
  parameter int FRAC_W     = 16,
  parameter int FORGET_Q16 = 65536
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  mode_e                    in_mode,
  input  logic signed [DATA_W-1:0] in_w1 [N_V1],
  input  logic signed [DATA_W-1:0] in_w2 [N_V2],
  output logic                     out_valid,
  output mode_e                    out_mode,
  output logic signed [DATA_W-1:0] out_w2 [N_V2]
);

  localparam int NSTAGE = num_rot_stages(FRAC_W) + FRAC_W + 1;

  logic signed [DATA_W-1:0] y_dev [N_V1+1];
  tag_t                     t_dev [N_V1+1];

  row_input_buffer #(
    .N_V1  (N_V1),
    .N_V2  (N_V2),
    .DATA_W(DATA_W),
    .NSLOT (NSTAGE)
  ) u_in (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(in_valid),
    .in_ready(in_ready),
    .in_mode (in_mode),
    .in_w1   (in_w1),
    .in_w2   (in_w2),
    .y_o     (y_dev[0]),
    .tag_o   (t_dev[0])
  );

  for (genvar r = 0; r < N_V1; r++) begin : g_row
    cordic_device #(
      .DATA_W    (DATA_W),
      .FRAC_W    (FRAC_W),
      .FORGET_Q16(FORGET_Q16)
    ) u_dev (
      .clk  (clk),
      .rst_n(rst_n),
      .y_i  (y_dev[r]),
      .tag_i(t_dev[r]),
      .y_o  (y_dev[r+1]),
      .tag_o(t_dev[r+1])
    );
  end

  row_output_buffer #(
    .N_V2  (N_V2),
    .DATA_W(DATA_W)
  ) u_out (
    .clk      (clk),
    .rst_n    (rst_n),
    .y_i      (y_dev[N_V1]),
    .tag_i    (t_dev[N_V1]),
    .out_valid(out_valid),
    .out_mode (out_mode),
    .out_w2   (out_w2)
  );

endmodule
