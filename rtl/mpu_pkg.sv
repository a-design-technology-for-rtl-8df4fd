// mpu_pkg: types and constants shared by the 8-bit re-configurable MPU.
//
// The MPU is an 8-bit accumulator machine: every command is one 16-bit word
// [15:12] opcode, [11:8] register number, [7:0] immediate or jump address.
// The 8-bit data width is the design's stated width; the command format,
// opcode set and register map are this implementation's own choices.
// The register map places the general-purpose input in R10 and the PWM speed
// register in R11, as the reference control program reads and writes them.
package mpu_pkg;

  localparam int BASE_DATA_W = 8;  // default MPU width; the MPU modules take DATA_W as a parameter
  localparam int INSTR_W = 16;
  localparam int PC_W    = 8;

  typedef logic [BASE_DATA_W-1:0] data_t;
  typedef logic [INSTR_W-1:0] instr_t;

  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,  // no operation
    OP_LDI  = 4'h1,  // A <= imm                      (Z)
    OP_LD   = 4'h2,  // A <= R[r]                     (Z)
    OP_ST   = 4'h3,  // R[r] <= A
    OP_ADD  = 4'h4,  // A <= A + R[r]                 (Z, C = carry)
    OP_SUB  = 4'h5,  // A <= A - R[r]                 (Z, C = borrow)
    OP_AND  = 4'h6,  // A <= A & R[r]                 (Z)
    OP_OR   = 4'h7,  // A <= A | R[r]                 (Z)
    OP_XOR  = 4'h8,  // A <= A ^ R[r]                 (Z)
    OP_SHR  = 4'h9,  // A <= A >> 1, logical          (Z, C = bit 0)
    OP_ADDI = 4'hA,  // A <= A + imm                  (Z, C)
    OP_JMP  = 4'hB,  // PC <= imm
    OP_JCC  = 4'hC,  // if cond(r[1:0]) PC <= imm
    OP_CALL = 4'hD,  // push PC; PC <= imm
    OP_RET  = 4'hE,  // PC <= pop
    OP_ACW  = 4'hF   // A <= Wd + Aw(Wd = A, Wi = R[r])  (hardware acceleration unit)
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_PASS_A, ALU_PASS_B, ALU_ADD, ALU_SUB, ALU_AND,
    ALU_OR, ALU_XOR, ALU_SHR, ALU_ACW
  } alu_op_e;

  // Source of the operand bus (output of the selector).
  typedef enum logic [1:0] {
    SRC_IMM   = 2'd0,
    SRC_REG   = 2'd1,
    SRC_STACK = 2'd2
  } src_e;

  typedef enum logic [1:0] {
    CC_Z  = 2'd0,
    CC_NZ = 2'd1,
    CC_C  = 2'd2,
    CC_NC = 2'd3
  } cond_e;

  // Decoded command, produced by the command decoder.
  typedef struct packed {
    alu_op_e alu_op;
    src_e    src;
    logic    a_we;      // result bus -> A register
    logic    flags_we;  // update Z (and C where the ALU defines it)
    logic    rf_we;     // result bus -> R[r]
    logic    pc_load;   // result bus -> PC
    logic    cond_en;   // pc_load only if cond holds
    cond_e   cond;
    logic    push;      // record PC in the stack unit
    logic    pop;
    logic    illegal;
  } ctrl_t;

  // Register map of the experiment system.
  localparam int REG_GPIO_IN   = 10;  // Wi, general-purpose input
  localparam int REG_PWM_SPEED = 11;  // Wo, PWM speed control register
  localparam int REG_PWM_TIMER = 12;  // PWM timer register
  localparam int REG_PWM_SETUP = 13;  // PWM setup register
  localparam int REG_SPEED_IN  = 14;  // Wd, detected speed from the A/D input
  localparam int REG_GPIO_OUT  = 15;  // general-purpose output

  function automatic instr_t mk_instr(opcode_e op, logic [3:0] r, logic [7:0] imm);
    return {op, r, imm};
  endfunction

endpackage
