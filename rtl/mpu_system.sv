// mpu_system: motor speed control system built around the 8-bit MPU.
//
// One FPGA holds the MPU, its program memory and the application hardware.
// The application hardware talks to the MPU through registers, not a
// shared bus, so no bus arbitration is needed:
//   R10  general-purpose input (indicated speed Wi), written by ext_io
//   R11  PWM speed control register (Wo), written by software
//   R12  PWM timer register, R13 PWM setup register, written by software
//   R14  detected speed Wd from the A/D input, written by pwm_controller
//   R15  general-purpose output, copied to gpio_out by ext_io
// The program is written into the program memory over the external bus
// (pm_we/pm_waddr/pm_wdata) while run = 0; with run = 1 the MPU executes it,
// three clocks per command. The reset controller turns arst_n into the
// synchronous reset of every block. HW_ACCEL = 1 builds the MPU with the
// hardware acceleration unit (ACW command); HW_ACCEL = 0 is the model in
// which the acceleration is computed in software. With HW_ACCEL = 1 every
// opcode is defined, so illegal_cmd can only rise in the HW_ACCEL = 0 build.
// The register numbers of
// Wi and Wo follow the design's reference program; the rest is own choice.
module mpu_system
  import mpu_pkg::*;
#(
  parameter bit HW_ACCEL    = 1'b1,
  parameter int NREGS       = 16,
  parameter int PROG_DEPTH  = 256,
  parameter int STACK_DEPTH = 4
) (
  input  logic        clk,
  input  logic        arst_n,
  input  logic        run,
  // external bus: program loading
  input  logic        pm_we,
  input  logic [PC_W-1:0] pm_waddr,
  input  instr_t      pm_wdata,
  // general-purpose I/O
  input  data_t       gpio_in,
  output data_t       gpio_out,
  // motor
  input  data_t       speed_in,
  output logic        pwm_out,
  output data_t       pwm_speed,
  output logic        pwm_period_end,
  // status
  output logic        stack_overflow,
  output logic        illegal_cmd
);

  logic rst;
  logic [PC_W-1:0] pm_addr, pc;
  logic pm_re, rf_we;
  logic [3:0] rf_waddr;
  instr_t pm_rdata;
  data_t  regs [NREGS];
  data_t  ext_wdata [NREGS];
  logic [NREGS-1:0] ext_we;
  data_t  gpio_q, speed_q, timer_active;

  reset_controller u_rstc (.clk, .arst_n, .rst);

  program_memory #(.DEPTH(PROG_DEPTH), .WIDTH(INSTR_W)) u_pm (
    .clk, .we(pm_we), .waddr(pm_waddr[$clog2(PROG_DEPTH)-1:0]), .wdata(pm_wdata),
    .re(pm_re), .raddr(pm_addr[$clog2(PROG_DEPTH)-1:0]), .rdata(pm_rdata)
  );

  mpu_core #(.NREGS(NREGS), .STACK_DEPTH(STACK_DEPTH), .HW_ACCEL(HW_ACCEL)) u_mpu (
    .clk, .rst, .run, .pm_addr, .pm_re, .pm_rdata,
    .ext_we, .ext_wdata, .regs_q(regs), .rf_we_o(rf_we), .rf_waddr_o(rf_waddr),
    .ext_pc_load(1'b0), .ext_pc_value('0), .pc_o(pc),
    .stack_err(stack_overflow), .illegal(illegal_cmd)
  );

  ext_io u_io (
    .clk, .rst, .pin_in(gpio_in), .in_q(gpio_q),
    .out_reg(regs[REG_GPIO_OUT]), .pin_out(gpio_out)
  );

  pwm_controller u_pwm (
    .clk, .rst, .speed_reg(regs[REG_PWM_SPEED]), .timer_reg(regs[REG_PWM_TIMER]),
    .setup_reg(regs[REG_PWM_SETUP]), .speed_in, .speed_q,
    .pwm_out, .period_end(pwm_period_end), .timer_active
  );

  // The input registers are refreshed by their units every cycle.
  always_comb begin
    ext_we    = '0;
    for (int i = 0; i < NREGS; i++) ext_wdata[i] = '0;
    ext_we[REG_GPIO_IN]     = 1'b1;
    ext_wdata[REG_GPIO_IN]  = gpio_q;
    ext_we[REG_SPEED_IN]    = 1'b1;
    ext_wdata[REG_SPEED_IN] = speed_q;
  end

  assign pwm_speed = regs[REG_PWM_SPEED];

endmodule
