// tb_rls_forgetting: RLS equaliser with a forgetting factor of 0.97.
//
// The whole design runs with FORGET_Q16 = 63570 (0.97): every orthogonal
// rotation shrinks the vectors it rotates by 0.97, so old training rows fade.
// The channel changes half-way through training: NTRAIN samples are
// generated with filter w0, then NTRAIN2 with filter w1. Every output row is
// compared with the floating-point model (exponentially weighted least
// squares), and the filtered outputs must follow w1: their error against
// the w1 filter must be far smaller than against w0.
module tb_rls_forgetting;
  import adi_pkg::*;
  import array_model_pkg::*;

  localparam int N_V1 = 4;
  localparam int N_V2 = 4;
  localparam int NCOL = N_V1 + N_V2;
  localparam int DATA_W = 22;
  localparam int FRAC_W = 16;
  localparam int NSTAGE = num_rot_stages(FRAC_W) + FRAC_W + 1;
  localparam real SCALE = real'(1 << FRAC_W);
  localparam real TOL = 2.0e-3;
  localparam int NTRAIN = 24;
  localparam int NFILT = 16;
  localparam int NTRAIN2 = 100;  // after the channel change: 0.97^100 = 0.05
  localparam real W0 [N_V1] = '{0.55, -0.30, 0.20, 0.10};
  localparam real W1 [N_V1] = '{-0.25, 0.40, 0.35, -0.15};
  localparam int  FORGET_Q16 = 63570;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic src_rls = 1'b1;
  logic host_valid = 1'b0;
  logic host_ready;
  mode_e host_mode = MODE_ORT;
  logic signed [DATA_W-1:0] host_w1 [N_V1];
  logic signed [DATA_W-1:0] host_w2 [N_V2];
  logic clr_valid = 1'b0;
  logic clr_ready;
  logic smp_valid = 1'b0;
  logic smp_ready;
  logic signed [DATA_W-1:0] smp_x = '0;
  logic signed [DATA_W-1:0] smp_y = '0;
  logic smp_train = 1'b1;
  logic out_valid;
  mode_e out_mode;
  logic signed [DATA_W-1:0] out_w2 [N_V2];
  logic inv_in = 1'b0;
  logic [1:0] phase;
  logic inv_mid, inv_mid_valid, inv_out, inv_out_valid;

  int checks = 0;
  int failures = 0;
  int n_mode [5];
  int n_stall = 0;
  int n_rls_rows = 0;
  int n_host_rows = 0;
  int n_inv = 0;
  int n_filter_checked = 0;
  real max_err = 0.0;

  always #5 clk = ~clk;

  adiabatic_top #(.FORGET_Q16(FORGET_Q16)) dut (.*);
  bit use_w1 = 1'b0;
  real err_w0 = 0.0;
  real err_w1 = 0.0;

  array_model model;
  real exp_v [$];
  real exp_f [$];      // filter result with w1, or a huge value if none
  real f0_q [$];       // filter result with w0
  real hist [N_V1];

  function automatic logic signed [DATA_W-1:0] to_fix(real x);
    return DATA_W'($rtoi(x * SCALE + (x >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic real q(real x);
    return real'(to_fix(x)) / SCALE;
  endfunction

  function automatic real rnd(real amp);
    return amp * (real'($urandom_range(2000)) / 1000.0 - 1.0);
  endfunction

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic expect_row(mode_e m, row_t w, real filt);
    model.step(m, w);
    for (int c = 0; c < N_V2; c++) exp_v.push_back(w[N_V1 + c]);
    exp_f.push_back(filt);
  endtask

  // one sample through the delay line; the model sees the same row
  task automatic send_sample(real x, bit train);
    row_t w;
    real  yv, f;
    for (int k = N_V1 - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = q(x);
    yv = 0.0;
    for (int k = 0; k < N_V1; k++) yv += (use_w1 ? W1[k] : W0[k]) * hist[k];
    yv = q(yv);
    for (int c = 0; c < NCOL; c++) w[c] = 0.0;
    for (int k = 0; k < N_V1; k++) w[k] = train ? hist[k] : -hist[k];
    if (train) w[N_V1] = yv;
    f = 0.0;
    for (int k = 0; k < N_V1; k++) f += W1[k] * hist[k];
    f0_q.push_back(0.0);
    for (int k = 0; k < N_V1; k++) f0_q[$] += W0[k] * hist[k];
    expect_row(train ? MODE_ORT : MODE_LIN, w, train ? 1.0e9 : f);
    smp_x = to_fix(x);
    smp_y = to_fix(yv);
    smp_train = train;
    smp_valid = 1'b1;
    #1;  // let the ready signal settle
    while (!smp_ready) begin
      @(posedge clk);
      #1;
    end
    @(posedge clk);
    #1 smp_valid = 1'b0;
  endtask

  task automatic send_host(mode_e m, row_t w);
    row_t wq;
    for (int c = 0; c < NCOL; c++) wq[c] = q(w[c]);
    expect_row(m, wq, 1.0e9);
    host_mode = m;
    for (int c = 0; c < N_V1; c++) host_w1[c] = to_fix(w[c]);
    for (int c = 0; c < N_V2; c++) host_w2[c] = to_fix(w[N_V1 + c]);
    host_valid = 1'b1;
    #1;  // let the ready signal settle
    while (!host_ready) begin
      @(posedge clk);
      #1;
    end
    @(posedge clk);
    #1 host_valid = 1'b0;
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n) begin
      if (smp_valid && !smp_ready) n_stall++;
      if (dut.u_array.in_valid && dut.u_array.in_ready) begin
        if (src_rls) n_rls_rows++;
        else n_host_rows++;
      end
      if (out_valid) begin
        real got, e, f, err;
        n_mode[int'(out_mode)]++;
        if (exp_f.size() == 0) begin
          failures++;
          $display("FAIL: unexpected output row");
        end else begin
          f = exp_f.pop_front();
          for (int c = 0; c < N_V2; c++) begin
            got = real'(out_w2[c]) / SCALE;
            e = exp_v.pop_front();
            err = absr(got - e);
            if (err > max_err) max_err = err;
            checks++;
            if (err > TOL) begin
              failures++;
              $display("FAIL: mode %0d col %0d got %f model %f", out_mode, c, got, e);
            end
          end
          if (f < 1.0e8) begin
            got = real'(out_w2[0]) / SCALE;
            n_filter_checked++;
            err_w1 += absr(got - f);
            err_w0 += absr(got - f0_q[0]);
          end
          if (f0_q.size() != 0 && f < 1.0e8) void'(f0_q.pop_front());
          else if (f0_q.size() != 0 && f >= 1.0e8) void'(f0_q.pop_front());
        end
      end
    end
  end

  // inverter example: two gates aligned with phases 1 and 2
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      if (phase == 2'd0) inv_in <= $urandom_range(1);
      if (phase == 2'd1) begin
        checks++;
        if (!(inv_mid_valid && inv_mid == ~inv_in)) begin
          failures++;
          $display("FAIL: inverter 1");
        end
      end
      if (phase == 2'd2) begin
        checks++;
        n_inv++;
        if (!(inv_out_valid && inv_out == inv_in)) begin
          failures++;
          $display("FAIL: inverter 2");
        end
      end
    end
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_t w;
    model = new(N_V1, NCOL, N_V1, real'(FORGET_Q16) / 65536.0);
    for (int k = 0; k < N_V1; k++) hist[k] = 0.0;
    for (int c = 0; c < N_V1; c++) host_w1[c] = '0;
    for (int c = 0; c < N_V2; c++) host_w2[c] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;

    // clear: set-mode row of zeros
    for (int c = 0; c < NCOL; c++) w[c] = 0.0;
    expect_row(MODE_SET, w, 1.0e9);
    clr_valid = 1'b1;
    #1;
    while (!clr_ready) begin
      @(posedge clk);
      #1;
    end
    @(posedge clk);
    #1 clr_valid = 1'b0;

    // training, then filtering
    for (int n = 0; n < NTRAIN; n++) send_sample(rnd(0.6), 1'b1);
    use_w1 = 1'b1;
    for (int n = 0; n < NTRAIN2; n++) send_sample(rnd(0.6), 1'b1);
    for (int n = 0; n < NFILT; n++) send_sample(rnd(0.6), 1'b0);

    // host: wait for the RLS rows to enter, then switch source
    repeat (3 * NSTAGE) @(posedge clk);
    #1 src_rls = 1'b0;
    for (int k = 0; k < N_V1; k++) begin
      for (int c = 0; c < NCOL; c++) w[c] = 0.0;
      w[k] = 1.0;
      send_host(MODE_COPY, w);
    end
    for (int c = 0; c < NCOL; c++) w[c] = rnd(0.1);
    send_host(MODE_HYP, w);
    for (int c = 0; c < NCOL; c++) w[c] = rnd(0.5);
    send_host(MODE_SET, w);

    while (exp_f.size() != 0) @(posedge clk);
    repeat (10) @(posedge clk);

    for (int m = 0; m < 5; m++) begin
      checks++;
      $display("mode %0d rows: %0d", m, n_mode[m]);
      if (n_mode[m] == 0) begin
        failures++;
        $display("FAIL: mode %0d never happened", m);
      end
    end
    $display("back-pressure cycles %0d, RLS rows %0d, host rows %0d, inverter outputs %0d, filter outputs checked %0d",
             n_stall, n_rls_rows, n_host_rows, n_inv, n_filter_checked);
    checks++;
    if (n_stall == 0 || n_rls_rows != 1 + NTRAIN + NTRAIN2 + NFILT || n_host_rows != N_V1 + 2 ||
        n_inv == 0 || n_filter_checked != NFILT) begin
      failures++;
      $display("FAIL: a mechanism did not happen as planned");
    end
    $display("mean filter error against w1 %f, against w0 %f", err_w1 / NFILT, err_w0 / NFILT);
    checks++;
    if (!(err_w1 < 0.25 * err_w0)) begin
      failures++;
      $display("FAIL: the filter did not follow the new channel");
    end
    $display("max abs error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
