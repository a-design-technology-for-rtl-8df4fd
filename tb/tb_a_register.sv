// tb_a_register: accumulator and flag write enables, carry written only
// with c_we, reset clearing all.
module tb_a_register;
  import mpu_pkg::*;
  logic clk = 0, rst, we, flags_we, z_in, c_we, c_in, z, c;
  data_t d, q;
  int checks = 0, failures = 0;
  int mq, mz, mc;

  always #5 clk = ~clk;
  a_register dut (.clk, .rst, .we, .d, .flags_we, .z_in, .c_we, .c_in, .q, .z, .c);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; flags_we = 0; z_in = 0; c_we = 0; c_in = 0; d = 0;
    @(posedge clk); #1 rst = 0; mq = 0; mz = 0; mc = 0;
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); flags_we = 1'($urandom); c_we = 1'($urandom);
      z_in = 1'($urandom); c_in = 1'($urandom); d = 8'($urandom);
      @(posedge clk); #1;
      if (we) mq = d;
      if (flags_we) begin mz = z_in; if (c_we) mc = c_in; end
      checks++;
      if (int'(q) != mq || int'(z) != mz || int'(c) != mc) begin
        failures++; if (failures < 10) $display("FAIL q=%0d z=%0d c=%0d", q, z, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
