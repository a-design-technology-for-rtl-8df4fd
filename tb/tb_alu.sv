// tb_alu: random operands for every ALU operation, compared with
// independently computed results, zero flag and carry/borrow, at the
// default 8-bit width; a second, 16-bit instance checks ADD/SUB/SHR and ACW
// at a configured bus width.
module tb_alu;
  import mpu_pkg::*;
  import mpu_programs::*;

  alu_op_e op;
  data_t a, b, y;
  logic z, c, cv;
  int checks = 0, failures = 0;

  alu #(.HW_ACCEL(1'b1)) dut (.op, .a, .b, .y, .z, .c, .c_valid(cv));

  logic [15:0] a16, b16, y16;
  logic z16, c16, cv16;
  alu #(.DATA_W(16), .HW_ACCEL(1'b1)) dut16 (.op, .a(a16), .b(b16), .y(y16), .z(z16), .c(c16), .c_valid(cv16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ey, ec, ecv;
    for (int n = 0; n < 3000; n++) begin
      op = alu_op_e'(n % 9);
      a = 8'($urandom); b = 8'($urandom);
      if (n < 9) begin a = 8'hFF; b = 8'h01; end
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (op == ALU_ACW) begin a16[15:8] = 0; b16[15:8] = 0; end
      #1;
      begin
        longint e16, c16e;
        c16e = -1;
        case (op)
          ALU_ADD: begin e16 = (longint'(a16) + longint'(b16)) % 65536; c16e = (longint'(a16) + longint'(b16)) > 65535; end
          ALU_SUB: begin e16 = (longint'(a16) - longint'(b16) + 65536) % 65536; c16e = a16 < b16; end
          ALU_SHR: begin e16 = longint'(a16) / 2; c16e = a16[0]; end
          ALU_ACW: e16 = ref_wo(int'(a16), int'(b16));
          default: e16 = longint'(y16);
        endcase
        checks++;
        if (longint'(y16) != e16 || (c16e >= 0 && longint'(c16) != c16e)) begin
          failures++;
          if (failures < 10) $display("FAIL 16-bit op=%0d a=%0h b=%0h y=%0h exp %0h", op, a16, b16, y16, e16);
        end
      end
      ec = 0; ecv = 0;
      case (op)
        ALU_PASS_A: ey = a;
        ALU_PASS_B: ey = b;
        ALU_ADD: begin ey = (a + b) % 256; ec = (int'(a) + int'(b)) > 255; ecv = 1; end
        ALU_SUB: begin ey = (int'(a) - int'(b) + 256) % 256; ec = int'(a) < int'(b); ecv = 1; end
        ALU_AND: ey = a & b;
        ALU_OR:  ey = a | b;
        ALU_XOR: ey = a ^ b;
        ALU_SHR: begin ey = int'(a) / 2; ec = int'(a) % 2; ecv = 1; end
        default: ey = ref_wo(a, b);
      endcase
      checks++;
      if (int'(y) != ey || z != (ey == 0) || int'(cv) != ecv || (ecv != 0 && int'(c) != ec)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%0d b=%0d y=%0d exp %0d c=%0d", op, a, b, y, ey, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
