// alu: arithmetic logic unit of the MPU.
//
// Computes a result from the A register (a) and the operand bus (b), as the
// design's ALU works "according to inside register and data-bus". The
// operation set is this implementation's own: pass A, pass B, add, subtract,
// and, or, xor, logical shift right of A, and ACW, the motor acceleration
// calculation (Wd = a, Wi = b), present only when HW_ACCEL = 1 (otherwise ACW
// yields b unchanged; the decoder also flags it illegal). c is the carry of
// ADD, the borrow of SUB and the bit shifted out by SHR; c_valid says whether
// the operation defines it. DATA_W is the configurable bus width (8 by
// default, at least 8); ACW works on the low 8 bits, the width of the motor
// speed values, and zero-extends its result. Combinational.
module alu
  import mpu_pkg::*;
#(
  parameter int DATA_W   = mpu_pkg::BASE_DATA_W,
  parameter bit HW_ACCEL = 1'b1
) (
  input  alu_op_e           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y,
  output logic    z,
  output logic    c,
  output logic    c_valid
);

  logic [DATA_W-1:0] acw_wo;

  if (HW_ACCEL) begin : g_accel
    data_t wo8, aw8;
    accel_unit u_accel (.wd(a[7:0]), .wi(b[7:0]), .aw(aw8), .wo(wo8));
    assign acw_wo = DATA_W'(wo8);
  end else begin : g_no_accel
    assign acw_wo = b;
  end

  logic [DATA_W:0] sum;

  always_comb begin
    sum     = '0;
    c       = 1'b0;
    c_valid = 1'b0;
    unique case (op)
      ALU_PASS_A: y = a;
      ALU_PASS_B: y = b;
      ALU_ADD: begin
        sum = {1'b0, a} + {1'b0, b};
        y = sum[DATA_W-1:0]; c = sum[DATA_W]; c_valid = 1'b1;
      end
      ALU_SUB: begin
        sum = {1'b0, a} - {1'b0, b};
        y = sum[DATA_W-1:0]; c = sum[DATA_W]; c_valid = 1'b1;
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SHR: begin
        y = {1'b0, a[DATA_W-1:1]}; c = a[0]; c_valid = 1'b1;
      end
      ALU_ACW: y = acw_wo;
      default: y = b;
    endcase
    z = (y == '0);
  end

endmodule
