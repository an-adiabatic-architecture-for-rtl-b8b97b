// tb_rls_delay_line: self-checking test of the RLS front end.
//
// Random samples (training and filtering) and clear requests go in, with a
// consumer that takes rows at random times. Each row must hold the last
// N_V1 samples newest first (negated when filtering), y_i in W2[0] when
// training and zeros otherwise, the orthogonal or linear mode, and a clear
// must give a set-mode row of zeros and empty the delay line. Samples must
// not be lost or duplicated under back-pressure.
module tb_rls_delay_line;
  import adi_pkg::*;

  localparam int N_V1 = 4;
  localparam int N_V2 = 2;
  localparam int DATA_W = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr_valid = 1'b0;
  logic clr_ready;
  logic smp_valid = 1'b0;
  logic smp_ready;
  logic signed [DATA_W-1:0] smp_x = '0;
  logic signed [DATA_W-1:0] smp_y = '0;
  logic smp_train = 1'b0;
  logic row_valid;
  logic row_ready = 1'b0;
  mode_e row_mode;
  logic signed [DATA_W-1:0] row_w1 [N_V1];
  logic signed [DATA_W-1:0] row_w2 [N_V2];

  int checks = 0;
  int failures = 0;
  int stalls = 0;

  always #5 clk = ~clk;

  rls_delay_line #(.N_V1(N_V1), .N_V2(N_V2), .DATA_W(DATA_W)) dut (.*);

  // reference: history of accepted samples and expected rows
  logic signed [DATA_W-1:0] hist [N_V1];
  logic signed [DATA_W-1:0] exp_w1 [$];
  logic signed [DATA_W-1:0] exp_w2 [$];
  mode_e exp_m [$];

  always @(posedge clk) begin
    if (rst_n) begin
      if ((smp_valid && !smp_ready) || (clr_valid && !clr_ready)) stalls++;
      if (clr_valid && clr_ready) begin
        for (int k = 0; k < N_V1; k++) begin
          hist[k] = '0;
          exp_w1.push_back('0);
        end
        for (int k = 0; k < N_V2; k++) exp_w2.push_back('0);
        exp_m.push_back(MODE_SET);
      end else if (smp_valid && smp_ready) begin
        for (int k = N_V1 - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = smp_x;
        for (int k = 0; k < N_V1; k++) exp_w1.push_back(smp_train ? hist[k] : -hist[k]);
        exp_w2.push_back(smp_train ? smp_y : '0);
        for (int k = 1; k < N_V2; k++) exp_w2.push_back('0);
        exp_m.push_back(smp_train ? MODE_ORT : MODE_LIN);
      end
      if (row_valid && row_ready) begin
        checks++;
        if (exp_m.size() == 0 || row_mode != exp_m.pop_front()) begin
          failures++;
          $display("FAIL: row mode %0d", row_mode);
        end
        for (int k = 0; k < N_V1; k++)
          if (row_w1[k] !== exp_w1.pop_front()) begin
            failures++;
            $display("FAIL: w1[%0d]", k);
          end
        for (int k = 0; k < N_V2; k++)
          if (row_w2[k] !== exp_w2.pop_front()) begin
            failures++;
            $display("FAIL: w2[%0d]", k);
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
    for (int k = 0; k < N_V1; k++) hist[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      row_ready = ($urandom_range(2) == 0);
      if (!smp_valid || smp_ready) begin
        smp_valid = ($urandom_range(1) == 1);
        smp_x = DATA_W'($urandom_range(2000) - 1000);
        smp_y = DATA_W'($urandom_range(2000) - 1000);
        smp_train = $urandom_range(1);
      end
      if (!clr_valid || clr_ready) clr_valid = ($urandom_range(40) == 0);
      @(posedge clk);
      #1;
    end
    smp_valid = 1'b0;
    clr_valid = 1'b0;
    row_ready = 1'b1;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_m.size() != 0 || stalls == 0) begin
      failures++;
      $display("FAIL: %0d rows left, %0d stalls", exp_m.size(), stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
