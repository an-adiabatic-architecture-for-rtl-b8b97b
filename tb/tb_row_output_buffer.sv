// tb_row_output_buffer: self-checking test of the output row collector.
//
// Streams of columns as the last device sends them (V1-part columns, then
// N_V2 V2-part columns, with idle slots in between) are fed in; each group
// of N_V2 V2-part values must come out as one row, in order, with the row's
// mode, one clock after its last column, and nothing else may come out.
module tb_row_output_buffer;
  import adi_pkg::*;

  localparam int N_V2 = 3;
  localparam int DATA_W = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [DATA_W-1:0] y_i = '0;
  tag_t tag_i = TAG_IDLE;
  logic out_valid;
  mode_e out_mode;
  logic signed [DATA_W-1:0] out_w2 [N_V2];

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  row_output_buffer #(.N_V2(N_V2), .DATA_W(DATA_W)) dut (.*);

  logic signed [DATA_W-1:0] exp_v [$];
  mode_e exp_m [$];
  int due = 0;     // an output row is due now
  int rows = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid != (due != 0)) begin
        failures++;
        $display("FAIL: out_valid=%0d due=%0d", out_valid, due);
      end
      if (out_valid) begin
        checks++;
        rows++;
        if (out_mode != exp_m.pop_front()) begin
          failures++;
          $display("FAIL: mode");
        end
        for (int c = 0; c < N_V2; c++)
          if (out_w2[c] !== exp_v.pop_front()) begin
            failures++;
            $display("FAIL: element %0d", c);
          end
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
    mode_e m;
    int nv1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      m = mode_e'($urandom_range(4));
      nv1 = $urandom_range(3);
      for (int c = 0; c < nv1 + N_V2; c++) begin
        y_i = DATA_W'($urandom);
        tag_i.valid = 1'b1;
        tag_i.first = (c == 0);
        tag_i.v2 = (c >= nv1);
        tag_i.mode = m;
        if (c >= nv1) exp_v.push_back(y_i);
        due = 0;
        @(posedge clk);
        #1;
        if (c == nv1 + N_V2 - 1) due = 1;
      end
      exp_m.push_back(m);
      tag_i = TAG_IDLE;
      y_i = DATA_W'($urandom);
      repeat ($urandom_range(1, 4)) begin
        @(posedge clk);
        #1 due = 0;
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (rows != 100) begin
      failures++;
      $display("FAIL: %0d rows", rows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
