// tb_command_decoder: every opcode is decoded in both models (with and
// without the hardware acceleration unit) and the control fields are
// compared with an expected table; field extraction is checked on random
// commands.
module tb_command_decoder;
  import mpu_pkg::*;

  instr_t instr;
  ctrl_t c1, c0;
  logic [3:0] r1, r0;
  data_t i1, i0;
  int checks = 0, failures = 0;

  command_decoder #(.HW_ACCEL(1'b1)) dut1 (.instr, .ctrl(c1), .rsel(r1), .imm(i1));
  command_decoder #(.HW_ACCEL(1'b0)) dut0 (.instr, .ctrl(c0), .rsel(r0), .imm(i0));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int n = 0; n < 160; n++) begin
      logic [3:0] op;
      op = 4'(n % 16);
      instr = {op, 4'($urandom), 8'($urandom)};
      #1;
      chk(r1 == instr[11:8] && i1 == instr[7:0], "fields");
      // Expected (a_we, rf_we, pc_load, push, pop, src)
      case (op)
        4'h0: chk(!c1.a_we && !c1.rf_we && !c1.pc_load && !c1.illegal, "NOP");
        4'h1: chk(c1.a_we && c1.src == SRC_IMM && c1.alu_op == ALU_PASS_B && c1.flags_we, "LDI");
        4'h2: chk(c1.a_we && c1.src == SRC_REG && c1.alu_op == ALU_PASS_B, "LD");
        4'h3: chk(c1.rf_we && !c1.a_we && c1.alu_op == ALU_PASS_A, "ST");
        4'h4: chk(c1.a_we && c1.src == SRC_REG && c1.alu_op == ALU_ADD, "ADD");
        4'h5: chk(c1.a_we && c1.src == SRC_REG && c1.alu_op == ALU_SUB, "SUB");
        4'h6: chk(c1.a_we && c1.alu_op == ALU_AND, "AND");
        4'h7: chk(c1.a_we && c1.alu_op == ALU_OR, "OR");
        4'h8: chk(c1.a_we && c1.alu_op == ALU_XOR, "XOR");
        4'h9: chk(c1.a_we && c1.alu_op == ALU_SHR, "SHR");
        4'hA: chk(c1.a_we && c1.src == SRC_IMM && c1.alu_op == ALU_ADD, "ADDI");
        4'hB: chk(c1.pc_load && !c1.cond_en && !c1.push && c1.src == SRC_IMM, "JMP");
        4'hC: chk(c1.pc_load && c1.cond_en && c1.cond == cond_e'(instr[9:8]), "JCC");
        4'hD: chk(c1.pc_load && c1.push && !c1.pop, "CALL");
        4'hE: chk(c1.pc_load && c1.pop && c1.src == SRC_STACK, "RET");
        default: begin
          chk(c1.alu_op == ALU_ACW && c1.a_we && c1.src == SRC_REG && !c1.illegal, "ACW hw");
          chk(c0.illegal && !c0.a_we, "ACW without hw unit");
        end
      endcase
      if (op != 4'hF) chk(c0 == c1, "models differ");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
