// command_decoder: analyses the command on the command register.
//
// Splits the 16-bit command into opcode [15:12], register number [11:8] and
// immediate [7:0], and turns the opcode into the control word ctrl_t that
// the command controller applies in the execute cycle: ALU operation,
// operand-bus source, which units take the result (A, flags, register, PC),
// jump condition and stack push/pop. New application hardware is added as a
// new command here: ACW drives the acceleration unit inside the ALU and is
// decoded only when HW_ACCEL = 1; otherwise it is reported illegal and does
// nothing. Combinational. The command set is this implementation's own.
module command_decoder
  import mpu_pkg::*;
#(
  parameter bit HW_ACCEL = 1'b1
) (
  input  instr_t     instr,
  output ctrl_t      ctrl,
  output logic [3:0] rsel,
  output data_t      imm
);

  opcode_e op;

  assign op   = opcode_e'(instr[15:12]);
  assign rsel = instr[11:8];
  assign imm  = instr[7:0];

  always_comb begin
    ctrl          = '0;
    ctrl.alu_op   = ALU_PASS_B;
    ctrl.src      = SRC_IMM;
    ctrl.cond     = cond_e'(instr[9:8]);
    unique case (op)
      OP_NOP: ;
      OP_LDI: begin ctrl.a_we = 1'b1; ctrl.flags_we = 1'b1; end
      OP_LD:  begin ctrl.src = SRC_REG; ctrl.a_we = 1'b1; ctrl.flags_we = 1'b1; end
      OP_ST:  begin ctrl.alu_op = ALU_PASS_A; ctrl.rf_we = 1'b1; end
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR: begin
        ctrl.src      = SRC_REG;
        ctrl.a_we     = 1'b1;
        ctrl.flags_we = 1'b1;
        unique case (op)
          OP_ADD:  ctrl.alu_op = ALU_ADD;
          OP_SUB:  ctrl.alu_op = ALU_SUB;
          OP_AND:  ctrl.alu_op = ALU_AND;
          OP_OR:   ctrl.alu_op = ALU_OR;
          default: ctrl.alu_op = ALU_XOR;
        endcase
      end
      OP_SHR:  begin ctrl.alu_op = ALU_SHR; ctrl.a_we = 1'b1; ctrl.flags_we = 1'b1; end
      OP_ADDI: begin ctrl.alu_op = ALU_ADD; ctrl.a_we = 1'b1; ctrl.flags_we = 1'b1; end
      OP_JMP:  ctrl.pc_load = 1'b1;
      OP_JCC:  begin ctrl.pc_load = 1'b1; ctrl.cond_en = 1'b1; end
      OP_CALL: begin ctrl.pc_load = 1'b1; ctrl.push = 1'b1; end
      OP_RET:  begin ctrl.src = SRC_STACK; ctrl.pc_load = 1'b1; ctrl.pop = 1'b1; end
      OP_ACW: begin
        if (HW_ACCEL) begin
          ctrl.src      = SRC_REG;
          ctrl.alu_op   = ALU_ACW;
          ctrl.a_we     = 1'b1;
          ctrl.flags_we = 1'b1;
        end else begin
          ctrl.illegal  = 1'b1;
        end
      end
      default: ctrl.illegal = 1'b1;
    endcase
  end

endmodule
