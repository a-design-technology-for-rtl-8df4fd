// selector: the data-bus source multiplexer (the "Selector (MUX)" of the
// MPU). Puts the command's immediate field, the selected register-file
// output or the top of the stack onto the operand bus that feeds the ALU.
// Which sources exist is this implementation's choice. DATA_W is the bus
// width. Combinational.
module selector
  import mpu_pkg::*;
#(
  parameter int DATA_W = mpu_pkg::BASE_DATA_W
) (
  input  src_e              src,
  input  logic [DATA_W-1:0] imm,
  input  logic [DATA_W-1:0] rf,
  input  logic [DATA_W-1:0] stk,
  output logic [DATA_W-1:0] bus
);

  always_comb begin
    unique case (src)
      SRC_IMM:   bus = imm;
      SRC_REG:   bus = rf;
      SRC_STACK: bus = stk;
      default:   bus = imm;
    endcase
  end

endmodule
