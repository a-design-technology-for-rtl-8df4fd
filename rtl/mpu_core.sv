// mpu_core: the re-configurable MPU (8-bit by default).
//
// This module is the "union" of the MPU's function modules: program counter,
// command register, command decoder, command controller, register file,
// selector, A register, ALU and stack unit all exchange values only through
// the signals wired here, so adding an ALU or a command means changing this
// module and the decoder only.
//   Command path: PC -> pm_addr; the program memory (outside this module)
//   returns the word on pm_rdata one clock later; it is latched in the
//   command register and decoded.
//   Data path: the selector puts imm, R[r] or the stack top on the operand
//   bus; the ALU combines it with A; the result bus feeds A, the register
//   file and the PC (its low PC_W bits).
// External units reach the register file directly (ext_we/ext_wdata in,
// regs_q out) and may load the PC directly (ext_pc_load, which also drops a
// command fetched from the old PC). Three clocks per command.
// DATA_W is the configurable bus and A-register width; the 8-bit immediate
// and the PC are zero-extended onto the bus. The module structure follows
// the design's block diagram; the command set, register count, stack depth
// and flags are own choices.
module mpu_core
  import mpu_pkg::*;
#(
  parameter int DATA_W      = mpu_pkg::BASE_DATA_W,
  parameter int NREGS       = 16,
  parameter int STACK_DEPTH = 4,
  parameter bit HW_ACCEL    = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              run,
  // command bus
  output logic [PC_W-1:0]   pm_addr,
  output logic              pm_re,
  input  instr_t            pm_rdata,
  // register-file access for external units
  input  logic [NREGS-1:0]  ext_we,
  input  logic [DATA_W-1:0] ext_wdata [NREGS],
  output logic [DATA_W-1:0] regs_q [NREGS],
  output logic              rf_we_o,
  output logic [3:0]        rf_waddr_o,
  // program-counter access for external units
  input  logic              ext_pc_load,
  input  logic [PC_W-1:0]   ext_pc_value,
  output logic [PC_W-1:0]   pc_o,
  // status
  output logic              stack_err,
  output logic              illegal
);

  localparam int RAW = $clog2(NREGS);

  instr_t     cmd;
  ctrl_t      ctrl;
  logic [3:0] rsel;
  data_t      imm;

  logic pc_inc, pc_load, a_we, flags_we, rf_we, push, pop, cr_load, exec;
  logic [1:0] state;

  logic [DATA_W-1:0] a_q, rf_rdata, opnd_bus, result_bus;
  logic [PC_W-1:0]   pc, stack_top;
  logic       z_flag, c_flag, alu_z, alu_c, alu_c_valid;
  logic       stack_empty, stack_full;

  program_counter #(.PC_W(PC_W)) u_pc (
    .clk, .rst, .inc(pc_inc), .load(pc_load), .din(result_bus[PC_W-1:0]),
    .ext_load(ext_pc_load), .ext_din(ext_pc_value), .pc
  );

  command_register #(.WIDTH(INSTR_W)) u_cr (
    .clk, .rst, .load(cr_load), .din(pm_rdata), .q(cmd)
  );

  command_decoder #(.HW_ACCEL(HW_ACCEL)) u_dec (
    .instr(cmd), .ctrl, .rsel, .imm
  );

  command_controller u_ctl (
    .clk, .rst, .run, .restart(ext_pc_load), .ctrl, .flag_z(z_flag), .flag_c(c_flag),
    .pm_re, .cr_load, .pc_inc, .pc_load, .a_we, .flags_we, .rf_we,
    .push, .pop, .exec, .state
  );

  register_file #(.NREGS(NREGS), .DATA_W(DATA_W)) u_rf (
    .clk, .rst, .raddr(rsel[RAW-1:0]), .rdata(rf_rdata),
    .we(rf_we), .waddr(rsel[RAW-1:0]), .wdata(result_bus),
    .ext_we, .ext_wdata, .q(regs_q)
  );

  stack_unit #(.DEPTH(STACK_DEPTH), .WIDTH(PC_W)) u_stack (
    .clk, .rst, .push, .pop, .din(pc), .top(stack_top),
    .empty(stack_empty), .full(stack_full), .err(stack_err)
  );

  selector #(.DATA_W(DATA_W)) u_sel (
    .src(ctrl.src), .imm(DATA_W'(imm)), .rf(rf_rdata), .stk(DATA_W'(stack_top)), .bus(opnd_bus)
  );

  alu #(.DATA_W(DATA_W), .HW_ACCEL(HW_ACCEL)) u_alu (
    .op(ctrl.alu_op), .a(a_q), .b(opnd_bus), .y(result_bus),
    .z(alu_z), .c(alu_c), .c_valid(alu_c_valid)
  );

  a_register #(.DATA_W(DATA_W)) u_a (
    .clk, .rst, .we(a_we), .d(result_bus), .flags_we, .z_in(alu_z),
    .c_we(alu_c_valid), .c_in(alu_c), .q(a_q), .z(z_flag), .c(c_flag)
  );

  always_ff @(posedge clk) begin
    if (rst)                       illegal <= 1'b0;
    else if (exec && ctrl.illegal) illegal <= 1'b1;
  end

  assign pm_addr    = pc;
  assign pc_o       = pc;
  assign rf_we_o    = rf_we;
  assign rf_waddr_o = rsel;

endmodule
