// tb_models: the two models of the motor speed loop side by side.
//
// hw_sys is the system with the hardware acceleration unit running the
// ACW program; sw_sys is built without the unit (HW_ACCEL = 0) and runs the
// software program. Both get the same indicated and detected speeds. For
// each input pair the test checks that both PWM speed registers equal the
// reference Wo, and measures the loop time between two increments of the
// iteration counter: 27 clocks for the hardware model (9 commands) and
// 3 clocks per command on the path the software takes through its rule
// (20 to 32 commands). Finally it runs ACW on the software-only build and
// checks that the command is reported illegal.
module tb_models;
  import mpu_pkg::*;
  import mpu_programs::*;

  logic clk = 1'b0;
  logic arst_n, run_hw, run_sw, pm_we;
  logic [7:0] pm_waddr;
  instr_t pm_wdata;
  data_t gpio_in, speed_in;
  data_t out_hw, out_sw, spd_hw, spd_sw;
  logic pwm_hw, pwm_sw, pe_hw, pe_sw, ovf_hw, ovf_sw, ill_hw, ill_sw;
  logic we_hw, we_sw;

  int checks = 0, failures = 0;
  int n_class [5] = '{default: 0};

  always #5 clk = ~clk;

  mpu_system #(.HW_ACCEL(1'b1)) hw_sys (
    .clk, .arst_n, .run(run_hw), .pm_we(we_hw), .pm_waddr, .pm_wdata,
    .gpio_in, .gpio_out(out_hw), .speed_in, .pwm_out(pwm_hw), .pwm_speed(spd_hw),
    .pwm_period_end(pe_hw), .stack_overflow(ovf_hw), .illegal_cmd(ill_hw)
  );

  mpu_system #(.HW_ACCEL(1'b0)) sw_sys (
    .clk, .arst_n, .run(run_sw), .pm_we(we_sw), .pm_waddr, .pm_wdata,
    .gpio_in, .gpio_out(out_sw), .speed_in, .pwm_out(pwm_sw), .pwm_speed(spd_sw),
    .pwm_period_end(pe_sw), .stack_overflow(ovf_sw), .illegal_cmd(ill_sw)
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
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(bit to_sw, prog_t p);
    for (int i = 0; i < PROG_MAX; i++) begin
      we_hw <= !to_sw; we_sw <= to_sw;
      pm_waddr <= 8'(i); pm_wdata <= p[i];
      @(posedge clk);
    end
    we_hw <= 1'b0; we_sw <= 1'b0;
    @(posedge clk);
  endtask

  // Clocks between two successive increments of an iteration counter.
  task automatic loop_time(bit sw, output int t);
    data_t last;
    int c;
    last = sw ? out_sw : out_hw;
    while ((sw ? out_sw : out_hw) == last) @(posedge clk);
    last = sw ? out_sw : out_hw;
    c = 0;
    while ((sw ? out_sw : out_hw) == last) begin @(posedge clk); c++; end
    t = c;
  endtask

  // Commands in one pass of the software loop, by branch class of Diff.
  function automatic int sw_commands(int wd, int wi);
    case (diff_class(wd, wi))
      0: return 25;
      1: return (wd - wi == 1) ? 27 : 26;
      2: return 20;
      3: return 28;
      default: return 32;
    endcase
  endfunction

  initial begin
    int wi, wd, t_hw, t_sw, exp_wo;
    arst_n = 1'b0; run_hw = 0; run_sw = 0; we_hw = 0; we_sw = 0;
    pm_waddr = '0; pm_wdata = '0; gpio_in = '0; speed_in = '0;
    repeat (3) @(posedge clk);
    arst_n = 1'b1;
    repeat (6) @(posedge clk);
    load(1'b0, hw_program());
    load(1'b1, sw_program());
    run_hw <= 1'b1; run_sw <= 1'b1;
    for (int v = 0; v < 30; v++) begin
      if (v < 10) begin
        int dd [10] = '{30, 8, 3, 1, 0, -1, -8, -9, -60, 2};
        wi = 120; wd = 120 + dd[v];
      end else begin
        wi = int'($urandom_range(0, 255)); wd = int'($urandom_range(0, 255));
      end
      gpio_in = 8'(wi); speed_in = 8'(wd);
      // Let both loops see the new inputs, then time one pass of each.
      loop_time(1'b1, t_sw);
      loop_time(1'b1, t_sw);
      loop_time(1'b0, t_hw);
      exp_wo = ref_wo(wd, wi);
      check(int'(spd_hw) == exp_wo, $sformatf("hw Wo=%0d expected %0d (Wi=%0d Wd=%0d)", spd_hw, exp_wo, wi, wd));
      check(int'(spd_sw) == exp_wo, $sformatf("sw Wo=%0d expected %0d (Wi=%0d Wd=%0d)", spd_sw, exp_wo, wi, wd));
      check(t_hw == 27, $sformatf("hw loop %0d clocks, expected 27", t_hw));
      check(t_sw == 3 * sw_commands(wd, wi),
            $sformatf("sw loop %0d clocks, expected %0d (Diff=%0d)", t_sw, 3 * sw_commands(wd, wi), wd - wi));
      n_class[diff_class(wd, wi)]++;
    end
    check(!ill_hw && !ill_sw && !ovf_hw && !ovf_sw, "status flags during the loops");
    // ACW on the software-only build.
    run_sw <= 1'b0;
    arst_n = 1'b0; @(posedge clk); arst_n = 1'b1;
    repeat (6) @(posedge clk);
    begin
      prog_t p;
      fill_nop(p);
      p[0] = I(OP_ACW, 0);
      p[1] = I(OP_JMP, 0, 1);
      load(1'b1, p);
    end
    run_sw <= 1'b1;
    repeat (30) @(posedge clk);
    check(ill_sw, "ACW not reported illegal without the hardware unit");
    for (int c = 0; c < 5; c++) check(n_class[c] > 0, $sformatf("branch class %0d never exercised", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
