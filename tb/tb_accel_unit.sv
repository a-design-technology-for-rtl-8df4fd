// tb_accel_unit: exhaustive check of the acceleration calculation.
// Every (Wd, Wi) pair of 8-bit values is applied and Aw and Wo are compared
// with the integer reference model of mpu_programs.
module tb_accel_unit;
  import mpu_pkg::*;
  import mpu_programs::*;

  data_t wd, wi, aw, wo;
  int checks = 0, failures = 0;

  accel_unit dut (.wd, .wi, .aw, .wo);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 256; d++) begin
      for (int i = 0; i < 256; i++) begin
        wd = 8'(d); wi = 8'(i);
        #1;
        checks++;
        if (int'($signed(aw)) != ref_aw(d, i) || int'(wo) != ref_wo(d, i)) begin
          failures++;
          if (failures < 10)
            $display("FAIL Wd=%0d Wi=%0d Aw=%0d Wo=%0d expected %0d %0d", d, i,
                     $signed(aw), wo, ref_aw(d, i), ref_wo(d, i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
