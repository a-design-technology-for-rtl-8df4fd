// pwm_controller: the motor control unit.
//
// Drives the motor by PWM from three registers that live in the MPU's
// register file: the speed control register (duty), the timer register and
// the setup register. An 8-bit counter runs through 0..255 once per PWM
// period and advances every timer+1 clocks; pwm_out is high while the
// counter is below the speed value. Speed and setup take effect at once; a
// new timer value is taken only at the end of a period (period_end), since
// only the timer register is not reflected in real time. Setup bit 0 enables
// the output (other bits unused). The 8-bit detected-speed input from the
// A/D converter arrives asynchronously and is passed through a two-flop
// synchroniser to speed_q, which is written into an MPU register every cycle.
// Register meanings beyond their names, the 8-bit counter and the
// synchroniser are this implementation's choices.
module pwm_controller
  import mpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  data_t speed_reg,
  input  data_t timer_reg,
  input  data_t setup_reg,
  input  data_t speed_in,
  output data_t speed_q,
  output logic  pwm_out,
  output logic  period_end,
  output data_t timer_active
);

  data_t            cnt;
  data_t            presc;
  data_t            sync1;
  logic             enable;
  logic             tick;

  assign enable     = setup_reg[0];
  assign tick       = (presc == timer_active);
  assign period_end = enable && tick && (cnt == '1);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt          <= '0;
      presc        <= '0;
      timer_active <= '0;
      pwm_out      <= 1'b0;
    end else if (!enable) begin
      cnt          <= '0;
      presc        <= '0;
      timer_active <= timer_reg;
      pwm_out      <= 1'b0;
    end else begin
      if (tick) begin
        presc <= '0;
        cnt   <= cnt + 1'b1;
        if (cnt == '1) timer_active <= timer_reg;
      end else begin
        presc <= presc + 1'b1;
      end
      pwm_out <= (speed_reg > cnt);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1   <= '0;
      speed_q <= '0;
    end else begin
      sync1   <= speed_in;
      speed_q <= sync1;
    end
  end

endmodule
