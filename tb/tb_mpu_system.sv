// tb_mpu_system: end-to-end test of the motor speed control system at its
// default parameters.
//
// Phase 1 loads the hardware-accelerated control program over the external
// bus, runs it and, for a list of (Wi, Wd) pairs covering every branch of
// the acceleration rule plus random pairs, waits two loop iterations (seen
// as increments of the iteration counter on gpio_out) and compares the PWM
// speed register with the reference Wo = Wd + Aw. It also measures one PWM
// period and checks the high time equals speed * (timer + 1) clocks.
// Phase 2 resets the system and repeats the check with the software
// version of the calculation (CALL/RET and conditional jumps).
// Phase 3 runs a self-calling subroutine and checks the stack overflow flag.
// Each mechanism is counted; one that never happened is a failure.
module tb_mpu_system;
  import mpu_pkg::*;
  import mpu_programs::*;

  logic clk = 1'b0;
  logic arst_n, run, pm_we;
  logic [7:0] pm_waddr;
  instr_t pm_wdata;
  data_t gpio_in, gpio_out, speed_in, pwm_speed;
  logic pwm_out, pwm_period_end, stack_overflow, illegal_cmd;

  int checks = 0, failures = 0;
  int n_class [5] = '{default: 0};
  int n_hw = 0, n_sw = 0, n_pwm_period = 0, n_overflow = 0, n_load = 0;

  always #5 clk = ~clk;

  mpu_system dut (
    .clk, .arst_n, .run, .pm_we, .pm_waddr, .pm_wdata,
    .gpio_in, .gpio_out, .speed_in, .pwm_out, .pwm_speed,
    .pwm_period_end, .stack_overflow, .illegal_cmd
  );

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic reset_and_load(prog_t p);
    arst_n = 1'b0; run = 1'b0; pm_we = 1'b0;
    repeat (3) @(posedge clk);
    arst_n = 1'b1;
    repeat (6) @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      pm_we    <= 1'b1;
      pm_waddr <= 8'(i);
      pm_wdata <= (i < PROG_MAX) ? p[i] : mk_instr(OP_NOP, 4'h0, 8'h00);
      @(posedge clk);
    end
    pm_we <= 1'b0;
    n_load++;
    @(posedge clk);
    run <= 1'b1;
  endtask

  task automatic wait_iterations(int n);
    data_t last;
    for (int k = 0; k < n; k++) begin
      last = gpio_out;
      while (gpio_out == last) @(posedge clk);
    end
  endtask

  task automatic run_vectors(bit hw);
    int wi, wd, exp_wo;
    int dirs [12][2] = '{'{100, 130}, '{100, 108}, '{100, 105}, '{100, 101},
                         '{77, 77}, '{100, 99}, '{100, 92}, '{100, 91},
                         '{200, 10}, '{0, 255}, '{255, 0}, '{3, 250}};
    for (int v = 0; v < 40; v++) begin
      if (v < 12) begin wi = dirs[v][0]; wd = dirs[v][1]; end
      else begin wi = int'($urandom_range(0, 255)); wd = int'($urandom_range(0, 255)); end
      gpio_in  = 8'(wi);
      speed_in = 8'(wd);
      wait_iterations(2);
      exp_wo = ref_wo(wd, wi);
      check(int'(pwm_speed) == exp_wo,
            $sformatf("%s Wi=%0d Wd=%0d Wo=%0d expected %0d", hw ? "hw" : "sw",
                      wi, wd, pwm_speed, exp_wo));
      n_class[diff_class(wd, wi)]++;
      if (hw) n_hw++; else n_sw++;
    end
  endtask

  task automatic measure_pwm();
    int high = 0, len = 0;
    gpio_in = 8'd50; speed_in = 8'd60;          // Wo = 61, held steady
    wait_iterations(2);
    @(posedge clk iff pwm_period_end);
    @(posedge clk);
    while (!pwm_period_end) begin
      len++;
      if (pwm_out) high++;
      @(posedge clk);
    end
    len++; if (pwm_out) high++;
    check(len == 256 * 4, $sformatf("PWM period %0d clocks, expected 1024", len));
    check(high == int'(pwm_speed) * 4,
          $sformatf("PWM high %0d clocks, expected %0d", high, int'(pwm_speed) * 4));
    n_pwm_period++;
  endtask

  initial begin
    gpio_in = '0; speed_in = '0; pm_waddr = '0; pm_wdata = '0;
    // Phase 1: hardware acceleration unit.
    reset_and_load(hw_program());
    run_vectors(1'b1);
    measure_pwm();
    check(!illegal_cmd, "illegal command in hw program");
    // Phase 2: acceleration computed in software.
    reset_and_load(sw_program());
    run_vectors(1'b0);
    check(!stack_overflow, "stack error in sw program");
    // Phase 3: stack overflow.
    reset_and_load(recurse_program());
    repeat (100) @(posedge clk);
    check(stack_overflow, "stack overflow not flagged");
    if (stack_overflow) n_overflow++;

    for (int c = 0; c < 5; c++) begin
      $display("branch class %0d exercised %0d times", c, n_class[c]);
      check(n_class[c] > 0, $sformatf("branch class %0d never exercised", c));
    end
    $display("hw vectors %0d, sw vectors %0d, pwm periods %0d, overflows %0d, loads %0d",
             n_hw, n_sw, n_pwm_period, n_overflow, n_load);
    check(n_hw > 0 && n_sw > 0 && n_pwm_period > 0 && n_overflow > 0 && n_load == 3,
          "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
