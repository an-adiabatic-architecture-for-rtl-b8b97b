// row_output_buffer: gathers the output row W2' behind the last device.
//
// The last CORDIC device sends the columns it did not annihilate, one per
// clock; those marked as V2 part are the elements of W2'. They are stored in
// order, and when N_V2 of them have arrived the row is presented for one
// clock with out_valid, together with the mode of the row.
// Timing: out_valid rises one clock after the last V2 column leaves the last
// device. There is no back-pressure: the array produces at most one row per
// ring period, and the receiver must take it in the cycle it is shown.
// Only the valid, v2 and mode fields of the tag are used; the first flag is
// meaningless behind the last device and is left unread.
// The document only shows this as a box below the array; the rest is this
// design's choice.
module row_output_buffer
  import adi_pkg::*;
#(
  parameter int N_V2   = 4,
  parameter int DATA_W = 22
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] y_i,
  input  tag_t                     tag_i,
  output logic                     out_valid,
  output mode_e                    out_mode,
  output logic signed [DATA_W-1:0] out_w2 [N_V2]
);

  localparam int CW = $clog2(N_V2 + 1);

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      out_valid <= 1'b0;
      out_mode  <= MODE_ORT;
      for (int c = 0; c < N_V2; c++) out_w2[c] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (tag_i.valid && tag_i.v2) begin
        for (int c = 0; c < N_V2; c++)
          if (cnt_q == CW'(c)) out_w2[c] <= y_i;
        out_mode      <= tag_i.mode;
        if (cnt_q == CW'(N_V2 - 1)) begin
          cnt_q     <= '0;
          out_valid <= 1'b1;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

endmodule
