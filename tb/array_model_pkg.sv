// array_model_pkg: floating-point reference model of the CORDIC array.
//
// It applies, row by row, the exact elementary transformation each mode
// defines (Givens rotation, hyperbolic rotation, Gaussian elimination step,
// set, copy) to a state matrix V = [V1 V2] held in reals, using the same
// sign conventions as the hardware: the diagonal keeps its sign (zero counts
// as positive), and in orthogonal mode every rotation is scaled by the
// forgetting factor lambda. Rows r = 0..nr-1 are processed; columns nv1.. form
// the V2 part. The testbenches compare the fixed-point hardware with it
// within a tolerance.
package array_model_pkg;
  import adi_pkg::*;

  localparam int MAXR = 8;
  localparam int MAXC = 40;

  typedef real row_t [MAXC];

  class array_model;
    int  nr;
    int  nc;
    int  nv1;
    real lambda;
    real v [MAXR][MAXC];

    function new(int nr_, int nc_, int nv1_, real lambda_);
      nr     = nr_;
      nc     = nc_;
      nv1    = nv1_;
      lambda = lambda_;
      clear();
    endfunction

    function void clear();
      for (int r = 0; r < MAXR; r++)
        for (int c = 0; c < MAXC; c++) v[r][c] = 0.0;
    endfunction

    // Processes one input row w in place; w afterwards holds W' (columns
    // r..nc-1 of row r are what device r sends down).
    function void step(mode_e m, ref row_t w);
      real a, b, rp, c, s, vj, wj, z;
      bit  sel;
      for (int r = 0; r < nr; r++) begin
        a = v[r][r];
        b = w[r];
        case (m)
          MODE_ORT: begin
            rp = $sqrt(a * a + b * b);
            if (a < 0.0) rp = -rp;
            if (rp == 0.0) begin c = 1.0; s = 0.0; end
            else begin c = a / rp; s = b / rp; end
            for (int j = r; j < nc; j++) begin
              vj = v[r][j];
              wj = w[j];
              v[r][j] = lambda * (c * vj + s * wj);
              w[j]    = lambda * (-s * vj + c * wj);
            end
          end
          MODE_HYP: begin
            rp = $sqrt(a * a - b * b);
            if (a < 0.0) rp = -rp;
            c = a / rp;
            s = b / rp;
            for (int j = r; j < nc; j++) begin
              vj = v[r][j];
              wj = w[j];
              v[r][j] = c * vj - s * wj;
              w[j]    = -s * vj + c * wj;
            end
          end
          MODE_LIN: begin
            z = b / a;
            for (int j = r; j < nc; j++) w[j] = w[j] - z * v[r][j];
          end
          MODE_SET: begin
            v[r][r] = b;
            for (int j = r + 1; j < nc; j++) v[r][j] = 0.0;
          end
          default: begin  // MODE_COPY
            sel = (b != 0.0);
            if (sel)
              for (int j = nv1; j < nc; j++) w[j] = v[r][j];
          end
        endcase
        w[r] = 0.0;
      end
    endfunction
  endclass

endpackage
