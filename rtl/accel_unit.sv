// accel_unit: hardware acceleration calculation of the motor speed loop.
//
// From the detected speed Wd and the indicated speed Wi (both unsigned 8-bit)
// it forms Diff = Wd - Wi as a 9-bit signed value and chooses the revolution
// acceleration Aw:
//   Diff >  8          Aw = +1
//   0 < Diff <= 8      Aw = Diff/2, or +1 if that is 0
//   Diff == 0          Aw =  0
//   -8 <= Diff < 0     Aw = -1
//   Diff < -8          Aw = Diff/2
// and outputs the new PWM value Wo = Wd + Aw (modulo 256).
// The branch structure and both thresholds follow the design's control rules;
// division truncating toward zero and Wo wrapping at 8 bits follow the C types
// of the reference software (16-bit signed difference, 8-bit unsigned output).
// Purely combinational; used by the ALU for the ACW command when the MPU is
// built with the hardware acceleration unit.
module accel_unit
  import mpu_pkg::*;
(
  input  data_t wd,
  input  data_t wi,
  output data_t aw,
  output data_t wo
);

  logic signed [8:0] diff;
  logic signed [8:0] half;    // Diff/2, truncated toward zero
  logic signed [8:0] aw_full;

  always_comb begin
    diff = $signed({1'b0, wd}) - $signed({1'b0, wi});
    half = (diff < 0) ? -((-diff) >>> 1) : (diff >>> 1);
    if (diff > 9'sd8)        aw_full = 9'sd1;
    else if (diff > 9'sd0)   aw_full = (half == 9'sd0) ? 9'sd1 : half;
    else if (diff == 9'sd0)  aw_full = 9'sd0;
    else if (diff >= -9'sd8) aw_full = -9'sd1;
    else                     aw_full = half;
    aw = aw_full[7:0];
    wo = wd + aw_full[7:0];
  end

endmodule
