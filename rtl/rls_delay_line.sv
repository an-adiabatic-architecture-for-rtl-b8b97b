// rls_delay_line: front end of the adaptive RLS filter example.
//
// A tapped delay line of N_V1 samples turns a received sequence x into the
// rows of its convolution (Toeplitz) matrix: when sample x_i is accepted the
// taps become [x_i, x_{i-1}, ..., x_{i-N_V1+1}]. From them it forms one row
// for the CORDIC array:
//   training (smp_train=1): W1 =  taps, W2 = [y_i, 0, ...], orthogonal mode
//                           (QR update of the least-squares problem)
//   filtering (smp_train=0): W1 = -taps, W2 = 0, linear mode, so that the
//                           array returns W2'[0] = taps * w, the equalised sample
// A clear request sends a set-mode row of zeros (V1 = 0, V2 = 0) and empties
// the delay line, which starts a new estimation.
// Interface: samples and clears come in with valid/ready and leave as one
// row with row_valid/row_ready; clear has priority. Timing: a request is
// accepted whenever the row register is empty or being taken; the row appears
// one clock later.
// The delay line, the row contents and the mode switch follow the document's
// RLS example; the handshakes and the clear request are this design's.
module rls_delay_line
  import adi_pkg::*;
#(
  parameter int N_V1   = 4,
  parameter int N_V2   = 4,
  parameter int DATA_W = 22
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr_valid,
  output logic                     clr_ready,
  input  logic                     smp_valid,
  output logic                     smp_ready,
  input  logic signed [DATA_W-1:0] smp_x,
  input  logic signed [DATA_W-1:0] smp_y,
  input  logic                     smp_train,
  output logic                     row_valid,
  input  logic                     row_ready,
  output mode_e                    row_mode,
  output logic signed [DATA_W-1:0] row_w1 [N_V1],
  output logic signed [DATA_W-1:0] row_w2 [N_V2]
);

  logic signed [DATA_W-1:0] taps_q [N_V1];
  logic                     free;

  assign free      = !row_valid || row_ready;
  assign clr_ready = free;
  assign smp_ready = free && !clr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_valid <= 1'b0;
      row_mode  <= MODE_SET;
      for (int k = 0; k < N_V1; k++) begin
        taps_q[k] <= '0;
        row_w1[k] <= '0;
      end
      for (int k = 0; k < N_V2; k++) row_w2[k] <= '0;
    end else begin
      if (row_valid && row_ready) row_valid <= 1'b0;
      if (clr_valid && clr_ready) begin
        row_valid <= 1'b1;
        row_mode  <= MODE_SET;
        for (int k = 0; k < N_V1; k++) begin
          taps_q[k] <= '0;
          row_w1[k] <= '0;
        end
        for (int k = 0; k < N_V2; k++) row_w2[k] <= '0;
      end else if (smp_valid && smp_ready) begin
        row_valid <= 1'b1;
        row_mode  <= smp_train ? MODE_ORT : MODE_LIN;
        taps_q[0] <= smp_x;
        row_w1[0] <= smp_train ? smp_x : -smp_x;
        for (int k = 1; k < N_V1; k++) begin
          taps_q[k] <= taps_q[k-1];
          row_w1[k] <= smp_train ? taps_q[k-1] : -taps_q[k-1];
        end
        row_w2[0] <= smp_train ? smp_y : '0;
        for (int k = 1; k < N_V2; k++) row_w2[k] <= '0;
      end
    end
  end

endmodule
