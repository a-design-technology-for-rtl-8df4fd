// tb_pwm_controller: measures PWM period and high time for several speed
// and timer values, checks that a timer write takes effect only at the next
// period end while a speed write takes effect at once, that setup bit 0
// gates the output, and that the A/D input reaches speed_q two clocks later.
module tb_pwm_controller;
  import mpu_pkg::*;
  logic clk = 0, rst, pwm_out, period_end;
  data_t speed_reg, timer_reg, setup_reg, speed_in, speed_q, timer_active;
  int checks = 0, failures = 0;
  int n_deferred = 0;

  always #5 clk = ~clk;
  pwm_controller dut (.clk, .rst, .speed_reg, .timer_reg, .setup_reg, .speed_in, .speed_q,
                      .pwm_out, .period_end, .timer_active);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // Measure one full period, starting after a period_end pulse.
  task automatic measure(output int len, output int high);
    len = 0; high = 0;
    wait_end();
    do begin
      @(posedge clk); #1;
      len++; if (pwm_out) high++;
    end while (!period_end);
  endtask

  task automatic wait_end();
    do begin @(posedge clk); #1; end while (!period_end);
  endtask

  initial begin
    int len, high;
    data_t d1, d2;
    int sp [4] = '{0, 1, 128, 255};
    int tm [4] = '{0, 1, 3, 2};
    rst = 1; speed_reg = 0; timer_reg = 0; setup_reg = 0; speed_in = 0;
    @(posedge clk); #1 rst = 0;
    repeat (50) begin
      @(posedge clk); #1;
      chk(!pwm_out && !period_end, "disabled output low");
    end
    // A/D path
    for (int n = 0; n < 50; n++) begin
      speed_in = 8'($urandom); @(posedge clk); #1; d1 = speed_in;
      speed_in = 8'($urandom); @(posedge clk); #1; d2 = speed_in;
      chk(speed_q == d1, "A/D latency");
    end
    for (int k = 0; k < 4; k++) begin
      setup_reg = 0; @(posedge clk); #1;
      speed_reg = 8'(sp[k]); timer_reg = 8'(tm[k]); setup_reg = 8'h01;
      measure(len, high);
      chk(len == 256 * (tm[k] + 1), $sformatf("period %0d for timer %0d", len, tm[k]));
      chk(high == sp[k] * (tm[k] + 1), $sformatf("high %0d for speed %0d", high, sp[k]));
    end
    // Timer write mid-period is deferred; speed write is immediate.
    speed_reg = 8'd64; timer_reg = 8'd0;
    wait_end();
    repeat (100) @(posedge clk); #1;
    timer_reg = 8'd1;
    repeat (3) begin @(posedge clk); #1; end
    chk(timer_active == 8'd0, "timer not deferred");
    wait_end(); @(posedge clk); #1;
    chk(timer_active == 8'd1, "timer not taken at period end");
    if (timer_active == 8'd1) n_deferred++;
    measure(len, high);
    chk(len == 512 && high == 128, "period after timer change");
    speed_reg = 8'd200;
    @(posedge clk); @(posedge clk); #1;
    chk(pwm_out == 1'b1, "speed change immediate");
    setup_reg = 8'h00;
    @(posedge clk); @(posedge clk); #1;
    chk(!pwm_out, "disable immediate");
    chk(n_deferred > 0, "deferred timer update never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
