// tb_cordic_device: self-checking test of one collapsed CORDIC device.
//
// The device is fed rows of NCOL columns directly with slot tags (column 0
// first, columns NV1.. marked V2), one row per ring period, in set,
// orthogonal, hyperbolic, copy (selected and not selected) and linear mode.
// Its outputs are compared with a one-row floating-point model: columns
// 1..NCOL-1 must leave exactly NSTAGE clocks after they entered, column 1
// marked first, column 0 dropped, and their values must match the model.
module tb_cordic_device;
  import adi_pkg::*;
  import array_model_pkg::*;

  localparam int DATA_W = 22;
  localparam int FRAC_W = 16;
  localparam int NCOL   = 6;
  localparam int NV1    = 2;
  localparam int NSTAGE = num_rot_stages(FRAC_W) + FRAC_W + 1;
  localparam real SCALE = real'(1 << FRAC_W);
  localparam real TOL   = 5.0e-4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [DATA_W-1:0] y_i = '0;
  tag_t tag_i = TAG_IDLE;
  logic signed [DATA_W-1:0] y_o;
  tag_t tag_o;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cordic_device #(.DATA_W(DATA_W), .FRAC_W(FRAC_W), .FORGET_Q16(65536)) dut (.*);

  array_model model;
  real exp_v [$];
  int  exp_c [$];   // cycle at which each output is due
  int  exp_col [$];

  function automatic logic signed [DATA_W-1:0] to_fix(real x);
    return DATA_W'($rtoi(x * SCALE + (x >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic real rnd(real amp);
    return amp * (real'($urandom_range(2000)) / 1000.0 - 1.0);
  endfunction

  // send one row starting now (caller keeps rows NSTAGE clocks apart)
  task automatic send(mode_e m, row_t w);
    row_t q;
    int   t0;
    for (int c = 0; c < NCOL; c++) q[c] = real'(to_fix(w[c])) / SCALE;
    model.step(m, q);
    t0 = cycle;
    for (int c = 1; c < NCOL; c++) begin
      exp_v.push_back(q[c]);
      exp_c.push_back(t0 + c + NSTAGE);
      exp_col.push_back(c);
    end
    for (int c = 0; c < NCOL; c++) begin
      y_i = to_fix(w[c]);
      tag_i.valid = 1'b1;
      tag_i.first = (c == 0);
      tag_i.v2 = (c >= NV1);
      tag_i.mode = m;
      @(posedge clk);
      #1;
    end
    tag_i = TAG_IDLE;
    y_i = '0;
    repeat (NSTAGE - NCOL) @(posedge clk);
    #1;
  endtask

  always @(posedge clk) begin
    if (rst_n && tag_o.valid) begin
      real got, err, e;
      int  col;
      got = real'(y_o) / SCALE;
      checks++;
      if (exp_v.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        e = exp_v.pop_front();
        col = exp_col.pop_front();
        if (exp_c.pop_front() != cycle) begin
          failures++;
          $display("FAIL: column %0d at cycle %0d, latency wrong", col, cycle);
        end
        if (tag_o.first != (col == 1) || tag_o.v2 != (col >= NV1)) begin
          failures++;
          $display("FAIL: column %0d tag first=%0d v2=%0d", col, tag_o.first, tag_o.v2);
        end
        err = got - e;
        if (err < 0.0) err = -err;
        if (err > TOL) begin
          failures++;
          $display("FAIL: mode %0d column %0d got %f expected %f", tag_o.mode, col, got, e);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_t w, xs;
    model = new(1, NCOL, NV1, 1.0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < NCOL; c++) w[c] = rnd(0.5);
    w[0] = -0.45;
    send(MODE_SET, w);
    for (int k = 0; k < 5; k++) begin
      for (int c = 0; c < NCOL; c++) w[c] = rnd(0.7);
      send(MODE_ORT, w);
    end
    for (int c = 0; c < NCOL; c++) w[c] = rnd(0.2);
    xs = w;
    send(MODE_ORT, w);
    send(MODE_HYP, xs);
    for (int c = 0; c < NCOL; c++) w[c] = rnd(0.5);
    w[0] = 0.0;
    send(MODE_COPY, w);    // not selected: W passes
    w[0] = 1.0;
    send(MODE_COPY, w);    // selected: V2 part read out
    for (int k = 0; k < 3; k++) begin
      for (int c = 0; c < NCOL; c++) w[c] = rnd(0.8);
      send(MODE_LIN, w);
    end
    // set again over a filled state: the V2 part must be cleared
    for (int c = 0; c < NCOL; c++) w[c] = rnd(0.5);
    w[0] = 0.6;
    send(MODE_SET, w);
    for (int c = 0; c < NCOL; c++) w[c] = 0.0;
    w[0] = 1.0;
    send(MODE_COPY, w);
    for (int c = 0; c < NCOL; c++) w[c] = rnd(0.7);
    send(MODE_ORT, w);
    repeat (2 * NSTAGE) @(posedge clk);
    checks++;
    if (exp_v.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", exp_v.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
