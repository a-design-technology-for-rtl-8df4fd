// mpu_programs: test programs and reference model for the MPU testbenches.
//
// sw_program   the motor speed loop with the acceleration computed in
//              software (compare, branch, shift, CALL/RET);
// hw_program   the same loop using the ACW command of the hardware
//              acceleration unit;
// recurse_program  a subroutine that calls itself, to overflow the stack.
// Both loop programs: set the PWM timer (R12) to 3 and enable the PWM
// (R13 = 1), then forever: Wi <- R10, Wd <- R14, Wo <- Wd + Aw, R11 <- Wo,
// R15 <- R15 + 1 (iteration counter, visible on the I/O output pins).
// ref_wo is an independent model of Wo = Wd + Aw written with integers.
package mpu_programs;
  import mpu_pkg::*;

  localparam int PROG_MAX = 64;
  typedef instr_t prog_t [PROG_MAX];

  function automatic instr_t I(opcode_e op, int r = 0, int imm = 0);
    return mk_instr(op, 4'(r), 8'(imm));
  endfunction

  function automatic void fill_nop(ref prog_t p);
    for (int i = 0; i < PROG_MAX; i++) p[i] = I(OP_NOP);
  endfunction

  function automatic void pwm_setup(ref prog_t p);
    p[0] = I(OP_LDI, 0, 3);   p[1] = I(OP_ST, REG_PWM_TIMER);
    p[2] = I(OP_LDI, 0, 1);   p[3] = I(OP_ST, REG_PWM_SETUP);
  endfunction

  function automatic prog_t hw_program();
    prog_t p;
    fill_nop(p);
    pwm_setup(p);
    p[4]  = I(OP_LD,  REG_GPIO_IN);
    p[5]  = I(OP_ST,  0);
    p[6]  = I(OP_LD,  REG_SPEED_IN);
    p[7]  = I(OP_ACW, 0);              // A <- Wd + Aw(Wd = A, Wi = R0)
    p[8]  = I(OP_ST,  REG_PWM_SPEED);
    p[9]  = I(OP_LD,  REG_GPIO_OUT);
    p[10] = I(OP_ADDI, 0, 1);
    p[11] = I(OP_ST,  REG_GPIO_OUT);
    p[12] = I(OP_JMP, 0, 4);
    return p;
  endfunction

  // Labels of the software acceleration subroutine.
  localparam int L_CALC = 14, L_SETAW = 26, L_BIGPOS = 28, L_ZERO = 30,
                 L_NEG = 32, L_BIGNEG = 41, L_OUT = 47;

  function automatic prog_t sw_program();
    prog_t p;
    fill_nop(p);
    pwm_setup(p);
    p[4]  = I(OP_LD,  REG_GPIO_IN);    // Wi
    p[5]  = I(OP_ST,  0);
    p[6]  = I(OP_LD,  REG_SPEED_IN);   // Wd
    p[7]  = I(OP_ST,  1);
    p[8]  = I(OP_CALL, 0, L_CALC);     // A <- Wo
    p[9]  = I(OP_ST,  REG_PWM_SPEED);
    p[10] = I(OP_LD,  REG_GPIO_OUT);
    p[11] = I(OP_ADDI, 0, 1);
    p[12] = I(OP_ST,  REG_GPIO_OUT);
    p[13] = I(OP_JMP, 0, 4);
    // calc: R3 <- Aw, A <- R1 + R3
    p[14] = I(OP_LD,  1);
    p[15] = I(OP_SUB, 0);              // A = Wd - Wi (mod 256), C = Wd < Wi
    p[16] = I(OP_JCC, int'(CC_Z), L_ZERO);
    p[17] = I(OP_JCC, int'(CC_C), L_NEG);
    p[18] = I(OP_ST,  2);              // d = Diff > 0
    p[19] = I(OP_LDI, 0, 8);
    p[20] = I(OP_SUB, 2);              // borrow if d > 8
    p[21] = I(OP_JCC, int'(CC_C), L_BIGPOS);
    p[22] = I(OP_LD,  2);
    p[23] = I(OP_SHR);                 // d/2
    p[24] = I(OP_JCC, int'(CC_NZ), L_SETAW);
    p[25] = I(OP_LDI, 0, 1);           // d/2 == 0 -> 1
    p[26] = I(OP_ST,  3);              // setaw
    p[27] = I(OP_JMP, 0, L_OUT);
    p[28] = I(OP_LDI, 0, 1);           // bigpos
    p[29] = I(OP_JMP, 0, L_SETAW);
    p[30] = I(OP_LDI, 0, 0);           // zero
    p[31] = I(OP_JMP, 0, L_SETAW);
    p[32] = I(OP_ST,  2);              // neg: A = 256 - m
    p[33] = I(OP_LDI, 0, 0);
    p[34] = I(OP_SUB, 2);              // m = Wi - Wd
    p[35] = I(OP_ST,  4);
    p[36] = I(OP_LDI, 0, 8);
    p[37] = I(OP_SUB, 4);              // borrow if m > 8
    p[38] = I(OP_JCC, int'(CC_C), L_BIGNEG);
    p[39] = I(OP_LDI, 0, 8'hFF);       // Aw = -1
    p[40] = I(OP_JMP, 0, L_SETAW);
    p[41] = I(OP_LD,  4);              // bigneg
    p[42] = I(OP_SHR);                 // m/2
    p[43] = I(OP_ST,  5);
    p[44] = I(OP_LDI, 0, 0);
    p[45] = I(OP_SUB, 5);              // -(m/2)
    p[46] = I(OP_JMP, 0, L_SETAW);
    p[47] = I(OP_LD,  1);              // out
    p[48] = I(OP_ADD, 3);
    p[49] = I(OP_RET);
    return p;
  endfunction

  function automatic prog_t recurse_program();
    prog_t p;
    fill_nop(p);
    p[0] = I(OP_CALL, 0, 0);
    return p;
  endfunction

  // Class of Diff = Wd - Wi: 0 big positive, 1 small positive, 2 zero,
  // 3 small negative, 4 big negative.
  function automatic int diff_class(int wd, int wi);
    int d = wd - wi;
    if (d > 8)       return 0;
    else if (d > 0)  return 1;
    else if (d == 0) return 2;
    else if (d >= -8) return 3;
    else             return 4;
  endfunction

  function automatic int ref_aw(int wd, int wi);
    int d = wd - wi;
    case (diff_class(wd, wi))
      0: return 1;
      1: return (d / 2 == 0) ? 1 : d / 2;
      2: return 0;
      3: return -1;
      default: return d / 2;
    endcase
  endfunction

  function automatic int ref_wo(int wd, int wi);
    return (wd + ref_aw(wd, wi) + 256) % 256;
  endfunction

endpackage
