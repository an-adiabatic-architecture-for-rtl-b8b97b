// tb_qr_downdate: QR updating and downdating of a least-squares problem on
// the collapsed CORDIC array at its default size.
//
// The array is cleared (set mode, zeros), NLS rows [x_k y_k 0 0 0] are added
// in orthogonal mode (QR updating, V1 = R, V2 = Q^T y), and then NDROP of
// those rows are removed again in hyperbolic mode (QR downdating). A linear
// run with W1 = -CSOL*I, W2 = 0 then returns CSOL times the least-squares
// solution, one element per output row in column 0; CSOL < 1 keeps the
// linear-mode ratio |w/v| below 2 even where a diagonal of R is small.
// That solution must equal the one of the NKEEP remaining rows alone, which
// this testbench computes from the normal equations by Gaussian elimination,
// independently of the array and of its reference model. Every output row is
// also compared with the floating-point reference model. The removed rows
// are smaller than the others and are added last: that keeps every
// hyperbolic rotation inside the CORDIC convergence range (|w/v| < 0.8) and
// keeps the partial R well conditioned while the first rows come in; the
// first N_V1 rows are also diagonally dominant for the same reason (the
// 16-bit fraction cannot resolve a nearly singular R). The process is
// repeated for NTRIAL random problems.
module tb_qr_downdate;
  import adi_pkg::*;
  import array_model_pkg::*;

  localparam int N_V1   = 4;
  localparam int N_V2   = 4;
  localparam int NCOL   = N_V1 + N_V2;
  localparam int DATA_W = 22;
  localparam int FRAC_W = 16;
  localparam real SCALE = real'(1 << FRAC_W);
  localparam real TOL   = 1.0e-3;
  localparam int NLS    = 10;
  localparam int NDROP  = 2;
  localparam int NKEEP  = NLS - NDROP;
  localparam int NTRIAL = 3;
  localparam real CSOL  = 0.5;

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

  cordic_column_array dut (.*);

  array_model model;
  real   exp_q [$];
  mode_e exp_mode_q [$];
  int    n_out = 0;
  int    sol_first = 1 << 30;
  real   xmat [NLS][N_V1];
  real   yvec [NLS];
  real   west [N_V1];

  function automatic logic signed [DATA_W-1:0] to_fix(real x);
    return DATA_W'($rtoi(x * SCALE + (x >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic real rnd(real amp);
    return amp * (real'($urandom_range(2000)) / 1000.0 - 1.0);
  endfunction

  // Least-squares solution of rows 0..NKEEP-1 from the normal equations;
  // returns the largest deviation of the array's solution from it.
  function automatic real ls_error();
    real m [N_V1][N_V1+1];
    real sol [N_V1];
    real f, e, worst;
    for (int i = 0; i < N_V1; i++) begin
      for (int j = 0; j <= N_V1; j++) m[i][j] = 0.0;
      for (int k = 0; k < NKEEP; k++) begin
        for (int j = 0; j < N_V1; j++) m[i][j] += xmat[k][i] * xmat[k][j];
        m[i][N_V1] += xmat[k][i] * yvec[k];
      end
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
    $display("solution %f %f %f %f, deviation %f", west[0], west[1], west[2], west[3], worst);
    return worst;
  endfunction

  task automatic send(mode_e m, row_t w);
    row_t q;
    for (int c = 0; c < NCOL; c++) q[c] = real'(to_fix(w[c])) / SCALE;
    model.step(m, q);
    for (int c = 0; c < N_V2; c++) exp_q.push_back(q[N_V1 + c]);
    exp_mode_q.push_back(m);
    in_mode = m;
    for (int c = 0; c < N_V1; c++) in_w1[c] = to_fix(w[c]);
    for (int c = 0; c < N_V2; c++) in_w2[c] = to_fix(w[N_V1 + c]);
    in_valid = 1'b1;
    #1;
    while (!in_ready) begin
      @(posedge clk);
      #1;
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real e, got, err;
      if (n_out >= sol_first && n_out < sol_first + N_V1)
        west[n_out - sol_first] = real'(out_w2[0]) / SCALE / CSOL;
      n_out++;
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
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_t w;
    model = new(N_V1, NCOL, N_V1, 1.0);
    for (int c = 0; c < N_V1; c++) in_w1[c] = '0;
    for (int c = 0; c < N_V2; c++) in_w2[c] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;

    for (int t = 0; t < NTRIAL; t++) begin
      // clear
      for (int c = 0; c < NCOL; c++) w[c] = 0.0;
      send(MODE_SET, w);
      // update with all rows; rows NKEEP..NLS-1 are the small ones
      for (int k = 0; k < NLS; k++) begin
        for (int c = 0; c < NCOL; c++) w[c] = 0.0;
        for (int c = 0; c < N_V1; c++) begin
          xmat[k][c] = real'(to_fix(rnd(k >= NKEEP ? 0.15 : 0.6) +
                                    ((k == c) ? 0.8 : 0.0))) / SCALE;
          w[c] = xmat[k][c];
        end
        yvec[k] = real'(to_fix(rnd(k >= NKEEP ? 0.15 : 0.7))) / SCALE;
        w[N_V1] = yvec[k];
        send(MODE_ORT, w);
      end
      // downdate: remove rows NKEEP..NLS-1 again
      for (int k = NKEEP; k < NLS; k++) begin
        for (int c = 0; c < NCOL; c++) w[c] = 0.0;
        for (int c = 0; c < N_V1; c++) w[c] = xmat[k][c];
        w[N_V1] = yvec[k];
        send(MODE_HYP, w);
      end
      // solve: W1 = -CSOL*I, W2 = 0
      sol_first = n_out + exp_q.size() / N_V2;
      for (int k = 0; k < N_V1; k++) begin
        for (int c = 0; c < NCOL; c++) w[c] = 0.0;
        w[k] = -CSOL;
        send(MODE_LIN, w);
      end
      while (exp_q.size() != 0) @(posedge clk);
      repeat (2) @(posedge clk);
      #1;
      checks++;
      if (ls_error() > 3.0e-3) begin
        failures++;
        $display("FAIL: downdated least-squares solution, trial %0d", t);
      end
    end

    $display("max abs error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
