// tb_cordic_rot_stage: self-checking test of one micro-rotation stage.
//
// Drives random slots through stages with shift 2 (plain) and shift 4
// (repeated) and compares with an integer model: the direction chosen in a
// vector slot (tag.first) from the signs of x and y, reused in the following
// rotation slots; the mode-dependent x update; bypass of the repeated stage
// outside hyperbolic mode and of idle, set and copy slots. Latency is one
// clock.
module tb_cordic_rot_stage;
  import adi_pkg::*;

  localparam int DATA_W = 22;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [DATA_W-1:0] x_i, y_i;
  tag_t tag_i;
  logic signed [DATA_W-1:0] xa_o, ya_o, xb_o, yb_o;
  tag_t ta_o, tb_o;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  cordic_rot_stage #(.DATA_W(DATA_W), .SHIFT(2), .REPEAT(1'b0)) dut_a (
    .clk, .rst_n, .x_i, .y_i, .tag_i, .x_o(xa_o), .y_o(ya_o), .tag_o(ta_o));
  cordic_rot_stage #(.DATA_W(DATA_W), .SHIFT(4), .REPEAT(1'b1)) dut_b (
    .clk, .rst_n, .x_i, .y_i, .tag_i, .x_o(xb_o), .y_o(yb_o), .tag_o(tb_o));

  int dq_a = 0;
  int dq_b = 0;

  // integer model of one stage
  task automatic model(input int shift, input bit rep, inout int dq,
                       output logic signed [DATA_W-1:0] xe, output logic signed [DATA_W-1:0] ye);
    int d;
    bit act;
    act = tag_i.valid &&
          (((tag_i.mode == MODE_ORT || tag_i.mode == MODE_LIN) && !rep) ||
           (tag_i.mode == MODE_HYP && shift != 0));
    if (!act) d = 0;
    else if (tag_i.first) d = ((x_i < 0) == (y_i < 0)) ? -1 : 1;
    else d = dq;
    if (tag_i.valid && tag_i.first) dq = d;
    ye = y_i + DATA_W'(d * int'(x_i >>> shift));
    case (tag_i.mode)
      MODE_ORT: xe = x_i - DATA_W'(d * int'(y_i >>> shift));
      MODE_HYP: xe = x_i + DATA_W'(d * int'(y_i >>> shift));
      default:  xe = x_i;
    endcase
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [DATA_W-1:0] xea, yea, xeb, yeb;
    mode_e m;
    x_i = '0; y_i = '0; tag_i = TAG_IDLE;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      m = mode_e'($urandom_range(4));
      x_i = DATA_W'($urandom_range(200000) - 100000);
      y_i = DATA_W'($urandom_range(200000) - 100000);
      tag_i.valid = ($urandom_range(9) != 0);
      tag_i.first = ($urandom_range(3) == 0);
      tag_i.v2    = $urandom_range(1);
      tag_i.mode  = m;
      model(2, 1'b0, dq_a, xea, yea);
      model(4, 1'b1, dq_b, xeb, yeb);
      @(posedge clk);
      #1;
      checks += 3;
      if (xa_o !== xea || ya_o !== yea) begin
        failures++;
        $display("FAIL plain: mode %0d got %0d,%0d exp %0d,%0d", m, xa_o, ya_o, xea, yea);
      end
      if (xb_o !== xeb || yb_o !== yeb) begin
        failures++;
        $display("FAIL repeat: mode %0d got %0d,%0d exp %0d,%0d", m, xb_o, yb_o, xeb, yeb);
      end
      if (ta_o !== tag_i) begin
        failures++;
        $display("FAIL: tag not delayed");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
