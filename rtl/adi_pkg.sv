// adi_pkg: types and constant functions shared by the CORDIC column array.
//
// The array runs one of five run-time modes (orthogonal, linear, hyperbolic,
// set, copy). Every word that travels through a CORDIC device carries a slot
// tag: whether the slot holds data, whether it is the first column of a row
// (the "vector" slot in which the device decides its rotation), whether the
// column belongs to the V2/W2 part, and the mode of the row.
//
// The micro-rotation stages use the shift sequence 0,1,2,3,4,4,5,...,13,13,...
// up to FRAC_W: the repeated shifts (4, 13, 40) are needed only for the
// hyperbolic mode to converge, and are bypassed (direction 0) in the other
// modes. Shift 0 is bypassed in hyperbolic mode. The scaling stages have
// shifts 0..FRAC_W; their per-mode directions are chosen at elaboration by a
// greedy search so that the product of (1 + e_j 2^-j) approximates the
// inverse CORDIC gain (times the forgetting factor in orthogonal mode).
// The mode set is the document's; the shift sequence, the repeats and the
// greedy scaling table are this design's choices.
package adi_pkg;

  typedef enum logic [2:0] {
    MODE_ORT  = 3'd0,   // orthogonal (circular) transformation
    MODE_LIN  = 3'd1,   // linear: Schur complement W2 - W1 V1^-1 V2
    MODE_HYP  = 3'd2,   // hyperbolic (J-orthogonal) transformation
    MODE_SET  = 3'd3,   // V1' = diag(W1), V2' = 0
    MODE_COPY = 3'd4    // W2' = selected row of V2, V unchanged
  } mode_e;

  typedef struct packed {
    logic  valid;   // slot carries a column of an input row
    logic  first;   // first column of the row in this device (vector slot)
    logic  v2;      // column belongs to the V2 / W2 part
    mode_e mode;    // mode of the row
  } tag_t;

  localparam tag_t TAG_IDLE = '{valid: 1'b0, first: 1'b0, v2: 1'b0, mode: MODE_ORT};

  // Direction of a micro-rotation or scaling step: -1, 0 or +1.
  typedef logic signed [1:0] dir_t;

  // 1/K for the circular CORDIC (shifts 0,1,2,...) and the hyperbolic one
  // (shifts 1,2,..., with 4 and 13 repeated), as Q30 fractions.
  // K_circ = prod_s sqrt(1 + 2^-2s), K_hyp = prod_s sqrt(1 - 2^-2s).
  localparam longint INV_K_CIRC_Q30 = 64'd652032874;    // 0.6072529350
  localparam longint INV_K_HYP_Q30  = 64'd1296540104;   // 1.2074970677

  function automatic bit is_repeat_shift(int s);
    return (s == 4) || (s == 13) || (s == 40);
  endfunction

  // Number of micro-rotation stages for a fraction width.
  function automatic int num_rot_stages(int frac);
    int n;
    n = 0;
    for (int s = 0; s <= frac; s++) begin
      n++;
      if (is_repeat_shift(s)) n++;
    end
    return n;
  endfunction

  // Shift of micro-rotation stage k.
  function automatic int rot_shift(int frac, int k);
    int idx;
    int res;
    idx = 0;
    res = 0;
    for (int s = 0; s <= frac; s++) begin
      if (idx == k) res = s;
      idx++;
      if (is_repeat_shift(s)) begin
        if (idx == k) res = s;
        idx++;
      end
    end
    return res;
  endfunction

  // Whether micro-rotation stage k is the second stage of a repeated shift.
  function automatic bit rot_repeat(int frac, int k);
    int idx;
    bit res;
    idx = 0;
    res = 1'b0;
    for (int s = 0; s <= frac; s++) begin
      idx++;
      if (is_repeat_shift(s)) begin
        if (idx == k) res = 1'b1;
        idx++;
      end
    end
    return res;
  endfunction

  function automatic longint abs_l(longint v);
    return (v < 0) ? -v : v;
  endfunction

  // Direction of scaling stage j (shift j) out of nstages, chosen greedily so
  // that prod (1 + e_j 2^-j) approaches target (Q30).
  function automatic int scale_dir(longint target, int nstages, int j);
    longint f;
    longint up;
    longint dn;
    int     res;
    int     d;
    f   = 64'sd1 <<< 30;
    res = 0;
    for (int s = 0; s < nstages; s++) begin
      up = f + (f >>> s);
      dn = f - (f >>> s);
      d  = 0;
      if (abs_l(up - target) < abs_l(f - target) && abs_l(up - target) <= abs_l(dn - target))
        d = 1;
      else if (abs_l(dn - target) < abs_l(f - target))
        d = -1;
      if (s == j) res = d;
      if (d == 1) f = up;
      else if (d == -1) f = dn;
    end
    return res;
  endfunction

  // Scaling target of the orthogonal mode: forgetting factor (Q16) / K_circ.
  function automatic longint ort_scale_target(int forget_q16);
    return (INV_K_CIRC_Q30 * longint'(forget_q16)) >>> 16;
  endfunction

endpackage
