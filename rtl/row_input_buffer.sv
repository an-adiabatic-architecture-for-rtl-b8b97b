// row_input_buffer: feeds one input row [W1 W2] into the first CORDIC device.
//
// A row (N_V1 values of W1, N_V2 values of W2 and a mode) is accepted with
// a valid/ready handshake into a pending register. A free-running slot
// counter (0..NSLOT-1) mirrors the ring slots of the devices. When the
// counter is at its last value and a row is pending, the row moves to the
// stream register and is sent from slot 0 on, one column per clock, column 0
// marked first and columns N_V1.. marked as V2 part. Starting every row on
// slot 0 keeps each column in the same ring slot of every device.
// Timing: at most one row per NSLOT clocks; a row waits at most NSLOT clocks
// for slot 0; in_ready is high whenever the pending register is empty.
// The document only shows this as a box in front of the array; the
// handshake, the double register and the slot alignment are this design's.
module row_input_buffer
  import adi_pkg::*;
#(
  parameter int N_V1   = 4,
  parameter int N_V2   = 4,
  parameter int DATA_W = 22,
  parameter int NSLOT  = 36
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  mode_e                    in_mode,
  input  logic signed [DATA_W-1:0] in_w1 [N_V1],
  input  logic signed [DATA_W-1:0] in_w2 [N_V2],
  output logic signed [DATA_W-1:0] y_o,
  output tag_t                     tag_o
);

  localparam int NCOL = N_V1 + N_V2;
  localparam int CW   = $clog2(NSLOT + 1);

  logic signed [DATA_W-1:0] pend_q [NCOL];
  mode_e                    pend_mode_q;
  logic                     pend_q_valid;
  logic signed [DATA_W-1:0] strm_q [NCOL];
  mode_e                    strm_mode_q;
  logic                     streaming_q;
  logic [CW-1:0]            idx_q;
  logic [CW-1:0]            slot_q;
  logic                     start;

  assign in_ready = !pend_q_valid;
  assign start    = pend_q_valid && (slot_q == CW'(NSLOT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q       <= '0;
      pend_q_valid <= 1'b0;
      pend_mode_q  <= MODE_ORT;
      strm_mode_q  <= MODE_ORT;
      streaming_q  <= 1'b0;
      idx_q        <= '0;
      for (int c = 0; c < NCOL; c++) begin
        pend_q[c] <= '0;
        strm_q[c] <= '0;
      end
    end else begin
      slot_q <= (slot_q == CW'(NSLOT - 1)) ? '0 : slot_q + 1'b1;

      if (streaming_q) begin
        if (idx_q == CW'(NCOL - 1)) streaming_q <= 1'b0;
        idx_q <= idx_q + 1'b1;
      end

      if (start) begin
        strm_q       <= pend_q;
        strm_mode_q  <= pend_mode_q;
        streaming_q  <= 1'b1;
        idx_q        <= '0;
        pend_q_valid <= 1'b0;
      end

      if (in_valid && in_ready) begin
        for (int c = 0; c < N_V1; c++) pend_q[c] <= in_w1[c];
        for (int c = 0; c < N_V2; c++) pend_q[N_V1+c] <= in_w2[c];
        pend_mode_q  <= in_mode;
        pend_q_valid <= 1'b1;
      end
    end
  end

  always_comb begin
    y_o        = '0;
    tag_o      = TAG_IDLE;
    if (streaming_q) begin
      for (int c = 0; c < NCOL; c++)
        if (idx_q == CW'(c)) y_o = strm_q[c];
      tag_o.valid = 1'b1;
      tag_o.first = (idx_q == '0);
      tag_o.v2    = (idx_q >= CW'(N_V1));
      tag_o.mode  = strm_mode_q;
    end
  end

  initial begin
    assert (NCOL <= NSLOT)
      else $error("row_input_buffer: %0d columns do not fit in %0d ring slots", NCOL, NSLOT);
  end

endmodule
