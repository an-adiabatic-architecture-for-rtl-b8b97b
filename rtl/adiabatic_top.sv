// adiabatic_top: the CORDIC column array with its RLS front end, next to the
// two-inverter example of phase-aligned adiabatic logic.
//
// Array part: rows reach the cordic_column_array either from the host port
// (src_rls = 0) or from the rls_delay_line (src_rls = 1), which turns a
// sample stream into training rows (orthogonal mode) or filtering rows
// (linear mode) of the adaptive RLS equaliser. The array's output rows W2'
// are brought out unchanged; in filtering, out_w2[0] is the equalised
// sample. The host port stays usable for every mode (set, copy, hyperbolic,
// ...); while src_rls is high it is not ready, and vice versa.
// Inverter part: adi_phase_gen names the four phases of the global clock and
// two adi_inv gates, aligned with phases INV1_PHASE and INV1_PHASE+1, form
// the two-stage pipeline of the document's inverter example: inv_out follows
// inv_in two phases later, inv_mid is its complement one phase earlier.
// Timing: see cordic_column_array (one row per 36 clocks at the defaults,
// latency 4*36+8 clocks from the first column in) and adi_inv.
module adiabatic_top
  import adi_pkg::*;
#(
  parameter int         N_V1       = 4,
  parameter int         N_V2       = 4,
  parameter int         DATA_W     = 22,
  parameter int         FRAC_W     = 16,
  parameter int         FORGET_Q16 = 65536,
  parameter logic [1:0] INV1_PHASE = 2'd1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // row source select
  input  logic                     src_rls,
  // host row port
  input  logic                     host_valid,
  output logic                     host_ready,
  input  mode_e                    host_mode,
  input  logic signed [DATA_W-1:0] host_w1 [N_V1],
  input  logic signed [DATA_W-1:0] host_w2 [N_V2],
  // RLS sample port
  input  logic                     clr_valid,
  output logic                     clr_ready,
  input  logic                     smp_valid,
  output logic                     smp_ready,
  input  logic signed [DATA_W-1:0] smp_x,
  input  logic signed [DATA_W-1:0] smp_y,
  input  logic                     smp_train,
  // output rows
  output logic                     out_valid,
  output mode_e                    out_mode,
  output logic signed [DATA_W-1:0] out_w2 [N_V2],
  // adiabatic inverter example
  input  logic                     inv_in,
  output logic [1:0]               phase,
  output logic                     inv_mid,
  output logic                     inv_mid_valid,
  output logic                     inv_out,
  output logic                     inv_out_valid
);

  // ---- RLS front end ----
  logic                     rls_valid, rls_ready;
  mode_e                    rls_mode;
  logic signed [DATA_W-1:0] rls_w1 [N_V1];
  logic signed [DATA_W-1:0] rls_w2 [N_V2];

  rls_delay_line #(
    .N_V1  (N_V1),
    .N_V2  (N_V2),
    .DATA_W(DATA_W)
  ) u_rls (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr_valid(clr_valid),
    .clr_ready(clr_ready),
    .smp_valid(smp_valid),
    .smp_ready(smp_ready),
    .smp_x    (smp_x),
    .smp_y    (smp_y),
    .smp_train(smp_train),
    .row_valid(rls_valid),
    .row_ready(rls_ready),
    .row_mode (rls_mode),
    .row_w1   (rls_w1),
    .row_w2   (rls_w2)
  );

  // ---- source multiplexer ----
  logic                     arr_valid, arr_ready;
  mode_e                    arr_mode;
  logic signed [DATA_W-1:0] arr_w1 [N_V1];
  logic signed [DATA_W-1:0] arr_w2 [N_V2];

  always_comb begin
    arr_valid  = src_rls ? rls_valid : host_valid;
    arr_mode   = src_rls ? rls_mode : host_mode;
    arr_w1     = src_rls ? rls_w1 : host_w1;
    arr_w2     = src_rls ? rls_w2 : host_w2;
    rls_ready  = src_rls && arr_ready;
    host_ready = !src_rls && arr_ready;
  end

  cordic_column_array #(
    .N_V1      (N_V1),
    .N_V2      (N_V2),
    .DATA_W    (DATA_W),
    .FRAC_W    (FRAC_W),
    .FORGET_Q16(FORGET_Q16)
  ) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (arr_valid),
    .in_ready (arr_ready),
    .in_mode  (arr_mode),
    .in_w1    (arr_w1),
    .in_w2    (arr_w2),
    .out_valid(out_valid),
    .out_mode (out_mode),
    .out_w2   (out_w2)
  );

  // ---- adiabatic inverter example ----
  adi_phase_gen u_phase (
    .clk  (clk),
    .rst_n(rst_n),
    .phase(phase)
  );

  adi_inv #(.PHASE(INV1_PHASE)) u_inv1 (
    .clk    (clk),
    .rst_n  (rst_n),
    .phase  (phase),
    .i      (inv_in),
    .o      (inv_mid),
    .o_valid(inv_mid_valid)
  );

  adi_inv #(.PHASE(INV1_PHASE + 2'd1)) u_inv2 (
    .clk    (clk),
    .rst_n  (rst_n),
    .phase  (phase),
    .i      (inv_mid),
    .o      (inv_out),
    .o_valid(inv_out_valid)
  );

endmodule
