// tb_row_input_buffer: self-checking test of the row input buffer.
//
// Random rows are offered with random gaps. Each accepted row must appear
// on the column stream complete and in order (column 0 first, columns N_V1..
// marked V2, the row's mode on every column), starting exactly at slot 0 of
// the ring (a multiple of NSLOT clocks after reset release), with at most one
// row per ring period, and no stream outside those windows.
module tb_row_input_buffer;
  import adi_pkg::*;

  localparam int N_V1 = 3;
  localparam int N_V2 = 2;
  localparam int NCOL = N_V1 + N_V2;
  localparam int DATA_W = 12;
  localparam int NSLOT = 7;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  mode_e in_mode = MODE_ORT;
  logic signed [DATA_W-1:0] in_w1 [N_V1];
  logic signed [DATA_W-1:0] in_w2 [N_V2];
  logic signed [DATA_W-1:0] y_o;
  tag_t tag_o;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int t_rel = -1;   // cycle count since reset release
  int rows_in = 0;
  int rows_out = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  row_input_buffer #(.N_V1(N_V1), .N_V2(N_V2), .DATA_W(DATA_W), .NSLOT(NSLOT)) dut (.*);

  logic signed [DATA_W-1:0] exp_v [$];
  mode_e exp_m [$];
  int col = 0;
  int last_start = -100;

  always @(posedge clk) begin
    if (rst_n) begin
      t_rel <= t_rel + 1;
      if (in_valid && in_ready) begin
        rows_in++;
        for (int c = 0; c < N_V1; c++) exp_v.push_back(in_w1[c]);
        for (int c = 0; c < N_V2; c++) exp_v.push_back(in_w2[c]);
        exp_m.push_back(in_mode);
      end
      if (tag_o.valid) begin
        checks++;
        if (col == 0) begin
          if ((t_rel + 1) % NSLOT != 0 || t_rel + 1 - last_start < NSLOT) begin
            failures++;
            $display("FAIL: row starts at slot %0d", (t_rel + 1) % NSLOT);
          end
          last_start = t_rel + 1;
        end
        if (exp_v.size() == 0) begin
          failures++;
          $display("FAIL: column without row");
        end else if (y_o !== exp_v.pop_front() || tag_o.first != (col == 0) ||
                     tag_o.v2 != (col >= N_V1) || tag_o.mode != exp_m[0]) begin
          failures++;
          $display("FAIL: column %0d wrong", col);
        end
        if (col == NCOL - 1) begin
          col = 0;
          rows_out++;
          void'(exp_m.pop_front());
        end else col++;
      end else if (col != 0) begin
        failures++;
        checks++;
        $display("FAIL: gap inside a row");
        col = 0;
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N_V1; c++) in_w1[c] = '0;
    for (int c = 0; c < N_V2; c++) in_w2[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      repeat ($urandom_range(n < 100 ? 0 : 12)) @(posedge clk);
      #1;
      in_valid = 1'b1;
      in_mode = mode_e'($urandom_range(4));
      for (int c = 0; c < N_V1; c++) in_w1[c] = DATA_W'($urandom);
      for (int c = 0; c < N_V2; c++) in_w2[c] = DATA_W'($urandom);
      #1;  // let the ready signal settle
      while (!in_ready) begin
        @(posedge clk);
        #1;
      end
      @(posedge clk);
      #1 in_valid = 1'b0;
    end
    repeat (3 * NSLOT) @(posedge clk);
    checks++;
    if (rows_out != rows_in || rows_in != 200) begin
      failures++;
      $display("FAIL: %0d rows in, %0d out", rows_in, rows_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
