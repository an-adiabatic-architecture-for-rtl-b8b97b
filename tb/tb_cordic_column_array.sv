// tb_cordic_column_array: self-checking test of the collapsed CORDIC array.
//
// Sends a sequence of rows in every mode and compares each output row W2'
// with array_model_pkg, a floating-point model of the same transformations:
//   set (initial diagonal), orthogonal QR updates, a hyperbolic downdate,
//   copy (read back V2 one row at a time), linear (Schur complement), and the
//   matrix product A*B (orthogonal run with W1 = I, W2 = B after clearing,
//   then a linear run with W1 = A, W2 = 0, giving -A*B), and the matrix
//   inverse (orthogonal run with W1 = A, W2 = I, then a linear run with
//   W1 = -I, W2 = 0), also checked independently as A * A^-1 = I, and the
//   best linear estimator w = (X^T X + sigma^2 I)^-1 X^T y (set, orthogonal,
//   linear runs), also checked against the normal equations solved directly.
// Rows are offered back to back, so it also checks the rate: consecutive
// output rows must be exactly one ring period (NSTAGE clocks) apart, and the
// first row must appear within the latency the array documents.
module tb_cordic_column_array;
  import adi_pkg::*;
  import array_model_pkg::*;

  localparam int N_V1   = 4;
  localparam int N_V2   = 4;
  localparam int NCOL   = N_V1 + N_V2;
  localparam int DATA_W = 22;
  localparam int FRAC_W = 16;
  localparam int NSTAGE = num_rot_stages(FRAC_W) + FRAC_W + 1;
  localparam real SCALE = real'(1 << FRAC_W);
  localparam real TOL   = 1.0e-3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  mode_e in_mode = MODE_ORT;
  logic signed [DATA_W-1:0] in_w1 [N_V1];
  logic signed [DATA_W-1:0] in_w2 [N_V2];
  logic out_valid;
  mode_e out_mode;
  logic signed [DATA_W-1:0] out_w2 [N_V2];

  int checks = 0;
  int failures = 0;
  real max_err = 0.0;

  always #5 clk = ~clk;

  cordic_column_array #(
    .N_V1(N_V1), .N_V2(N_V2), .DATA_W(DATA_W), .FRAC_W(FRAC_W), .FORGET_Q16(65536)
  ) dut (.*);

  array_model model;
  real   exp_q [$];
  mode_e exp_mode_q [$];
  int    out_cycles [$];
  int    cycle = 0;
  int    accept_cycle0 = -1;
  int    mode_seen [5];
  real   amat [N_V1][N_V1];     // matrix A of the inverse test
  real   ainv [N_V1][N_V2];     // rows of A^-1 as returned by the array
  int    inv_first = 1 << 30;   // index of the first output row of A^-1
  localparam int  NBLE  = 8;
  localparam real SIGMA = 0.375;
  real   xmat [NBLE][N_V1];     // data of the best-linear-estimator test
  real   yvec [NBLE];
  real   west [N_V1];           // estimate returned by the array
  int    ble_first = 1 << 30;

  // Solves (X^T X + sigma^2 I) w = X^T y by Gaussian elimination and returns
  // the largest deviation of the array's estimate from it.
  function automatic real ble_error();
    real m [N_V1][N_V1+1];
    real f, e, worst;
    real sol [N_V1];
    for (int i = 0; i < N_V1; i++) begin
      for (int j = 0; j < N_V1; j++) begin
        m[i][j] = (i == j) ? SIGMA * SIGMA : 0.0;
        for (int k = 0; k < NBLE; k++) m[i][j] += xmat[k][i] * xmat[k][j];
      end
      m[i][N_V1] = 0.0;
      for (int k = 0; k < NBLE; k++) m[i][N_V1] += xmat[k][i] * yvec[k];
    end
    for (int p = 0; p < N_V1; p++)
      for (int i = p + 1; i < N_V1; i++) begin
        f = m[i][p] / m[p][p];
        for (int j = p; j <= N_V1; j++) m[i][j] -= f * m[p][j];
      end
    for (int i = N_V1 - 1; i >= 0; i--) begin
      sol[i] = m[i][N_V1];
      for (int j = i + 1; j < N_V1; j++) sol[i] -= m[i][j] * sol[j];
      sol[i] = sol[i] / m[i][i];
    end
    worst = 0.0;
    for (int i = 0; i < N_V1; i++) begin
      e = sol[i] - west[i];
      if (e < 0.0) e = -e;
      if (e > worst) worst = e;
    end
    return worst;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic signed [DATA_W-1:0] to_fix(real x);
    return DATA_W'($rtoi(x * SCALE + (x >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic real rnd(real amp);
    return amp * (real'($urandom_range(2000)) / 1000.0 - 1.0);
  endfunction

  task automatic send(mode_e m, row_t w);
    row_t q;
    for (int c = 0; c < NCOL; c++) q[c] = real'(to_fix(w[c])) / SCALE;
    model.step(m, q);
    for (int c = 0; c < N_V2; c++) exp_q.push_back(q[N_V1 + c]);
    exp_mode_q.push_back(m);
    mode_seen[int'(m)]++;
    in_mode = m;
    for (int c = 0; c < N_V1; c++) in_w1[c] = to_fix(w[c]);
    for (int c = 0; c < N_V2; c++) in_w2[c] = to_fix(w[N_V1 + c]);
    in_valid = 1'b1;
    #1;  // let the ready signal settle
    while (!in_ready) begin
      @(posedge clk);
      #1;
    end
    @(posedge clk);  // accepted at this edge
    if (accept_cycle0 < 0) accept_cycle0 = cycle;
    #1 in_valid = 1'b0;
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real e, got, err;
      out_cycles.push_back(cycle);
      if (out_cycles.size() > inv_first && out_cycles.size() <= inv_first + N_V1)
        for (int c = 0; c < N_V2; c++)
          ainv[out_cycles.size() - 1 - inv_first][c] = real'(out_w2[c]) / SCALE;
      if (out_cycles.size() > ble_first && out_cycles.size() <= ble_first + N_V1)
        west[out_cycles.size() - 1 - ble_first] = real'(out_w2[0]) / SCALE;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output row");
      end else begin
        checks++;
        if (out_mode != exp_mode_q.pop_front()) begin
          failures++;
          $display("FAIL: output mode %0d", out_mode);
        end
        for (int c = 0; c < N_V2; c++) begin
          e   = exp_q.pop_front();
          got = real'(out_w2[c]) / SCALE;
          err = got - e;
          if (err < 0.0) err = -err;
          if (err > max_err) max_err = err;
          checks++;
          if (err > TOL) begin
            failures++;
            $display("FAIL: mode %0d col %0d got %f expected %f", out_mode, c, got, e);
          end
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
    row_t w, xsave;
    model = new(N_V1, NCOL, N_V1, 1.0);
    for (int c = 0; c < N_V1; c++) in_w1[c] = '0;
    for (int c = 0; c < N_V2; c++) in_w2[c] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;

    // set mode: V1 = diag, V2 = 0, W2 passes
    for (int c = 0; c < NCOL; c++) w[c] = rnd(0.5);
    w[0] = 0.6; w[1] = -0.4; w[2] = 0.7; w[3] = 0.3;
    send(MODE_SET, w);
    // orthogonal QR updates
    for (int k = 0; k < 6; k++) begin
      for (int c = 0; c < NCOL; c++) w[c] = rnd(0.6);
      send(MODE_ORT, w);
    end
    // orthogonal update followed by the hyperbolic downdate of the same row
    for (int c = 0; c < NCOL; c++) w[c] = rnd(0.15);
    xsave = w;
    send(MODE_ORT, w);
    send(MODE_HYP, xsave);
    // copy: read back V2 row by row (W1 = e_k, W2 = 0)
    for (int k = 0; k < N_V1; k++) begin
      for (int c = 0; c < NCOL; c++) w[c] = 0.0;
      w[k] = 1.0;
      send(MODE_COPY, w);
    end
    // linear: Schur complement W2 - W1 V1^-1 V2
    for (int k = 0; k < 3; k++) begin
      for (int c = 0; c < NCOL; c++) w[c] = rnd(0.3);
      send(MODE_LIN, w);
    end
    // matrix product: clear, load V1 = I, V2 = B, then W1 = A, W2 = 0
    for (int c = 0; c < NCOL; c++) w[c] = 0.0;
    send(MODE_SET, w);
    for (int k = 0; k < N_V1; k++) begin
      for (int c = 0; c < NCOL; c++) w[c] = 0.0;
      w[k] = 1.0;
      for (int c = 0; c < N_V2; c++) w[N_V1 + c] = rnd(0.8);
      send(MODE_ORT, w);
    end
    for (int k = 0; k < N_V1; k++) begin
      for (int c = 0; c < NCOL; c++) w[c] = 0.0;
      for (int c = 0; c < N_V1; c++) w[c] = rnd(0.8);
      send(MODE_LIN, w);
    end

    // matrix inverse: clear, orthogonal run with W1 = A, W2 = I (V1 = R,
    // V2 = Q^H), then a linear run with W1 = -I, W2 = 0 gives W2' = A^-1
    for (int c = 0; c < NCOL; c++) w[c] = 0.0;
    send(MODE_SET, w);
    for (int k = 0; k < N_V1; k++) begin
      for (int c = 0; c < NCOL; c++) w[c] = 0.0;
      for (int c = 0; c < N_V1; c++) begin
        amat[k][c] = real'(to_fix((c == k ? 1.5 : 0.0) + rnd(0.3))) / SCALE;
        w[c] = amat[k][c];
      end
      w[N_V1 + k] = 1.0;
      send(MODE_ORT, w);
    end
    inv_first = out_cycles.size() + exp_q.size() / N_V2;
    for (int k = 0; k < N_V1; k++) begin
      for (int c = 0; c < NCOL; c++) w[c] = 0.0;
      w[k] = -1.0;
      send(MODE_LIN, w);
    end

    // best linear estimator: set V1 = sigma*I, V2 = 0; orthogonal run with
    // W1 = X, W2 = [y 0 ..]; linear run with W1 = -I, W2 = 0 gives
    // w = (X^T X + sigma^2 I)^-1 X^T y in column 0
    for (int c = 0; c < NCOL; c++) w[c] = 0.0;
    for (int c = 0; c < N_V1; c++) w[c] = SIGMA;
    send(MODE_SET, w);
    for (int k = 0; k < NBLE; k++) begin
      for (int c = 0; c < NCOL; c++) w[c] = 0.0;
      for (int c = 0; c < N_V1; c++) begin
        xmat[k][c] = real'(to_fix(rnd(0.6))) / SCALE;
        w[c] = xmat[k][c];
      end
      yvec[k] = real'(to_fix(rnd(0.6))) / SCALE;
      w[N_V1] = yvec[k];
      send(MODE_ORT, w);
    end
    ble_first = out_cycles.size() + exp_q.size() / N_V2;
    for (int k = 0; k < N_V1; k++) begin
      for (int c = 0; c < NCOL; c++) w[c] = 0.0;
      w[k] = -1.0;
      send(MODE_LIN, w);
    end

    // drain
    while (exp_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);

    // rate: rows offered back to back leave one ring period apart
    for (int i = 1; i < out_cycles.size(); i++) begin
      checks++;
      if (out_cycles[i] - out_cycles[i-1] != NSTAGE) begin
        failures++;
        $display("FAIL: output spacing %0d, expected %0d", out_cycles[i] - out_cycles[i-1], NSTAGE);
      end
    end
    // latency of the first row: N_V1*NSTAGE + NCOL after its first column,
    // which enters within one ring period of acceptance
    checks++;
    if (out_cycles.size() == 0 ||
        out_cycles[0] - accept_cycle0 < N_V1 * NSTAGE + NCOL ||
        out_cycles[0] - accept_cycle0 > N_V1 * NSTAGE + NCOL + NSTAGE + 1) begin
      failures++;
      $display("FAIL: first-row latency");
    end else begin
      $display("first-row latency %0d clocks", out_cycles[0] - accept_cycle0);
    end
    // independent check of the inverse: A * A^-1 = I
    $display("A^-1[0][0..1] = %f %f, A[0][0] = %f", ainv[0][0], ainv[0][1], amat[0][0]);
    for (int i = 0; i < N_V1; i++)
      for (int j = 0; j < N_V1; j++) begin
        real acc;
        acc = 0.0;
        for (int k = 0; k < N_V1; k++) acc += amat[i][k] * ainv[k][j];
        if (i == j) acc -= 1.0;
        checks++;
        if (acc > 2.0e-3 || acc < -2.0e-3) begin
          failures++;
          $display("FAIL: (A * A^-1 - I)[%0d][%0d] = %f", i, j, acc);
        end
      end
    checks++;
    $display("best linear estimate w[0..1] = %f %f, deviation %f", west[0], west[1], ble_error());
    if (ble_error() > 2.0e-3) begin
      failures++;
      $display("FAIL: best linear estimate");
    end
    for (int m = 0; m < 5; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin
        failures++;
        $display("FAIL: mode %0d never exercised", m);
      end
    end
    $display("max abs error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
