// tb_ext_io: input pins reach in_q two clocks later, output register
// reaches the pins one clock later.
module tb_ext_io;
  import mpu_pkg::*;
  logic clk = 0, rst;
  data_t pin_in, in_q, out_reg, pin_out;
  data_t hin [3];
  data_t hout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ext_io dut (.clk, .rst, .pin_in, .in_q, .out_reg, .pin_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pin_in = 0; out_reg = 0;
    @(posedge clk); #1 rst = 0;
    checks++; if (in_q != 0 || pin_out != 0) begin failures++; $display("FAIL reset"); end
    hin = '{0, 0, 0};
    for (int n = 0; n < 1000; n++) begin
      pin_in = 8'($urandom); out_reg = 8'($urandom);
      hin[2] = hin[1]; hin[1] = hin[0]; hin[0] = pin_in; hout = out_reg;
      @(posedge clk); #1;
      if (n >= 2) begin
        checks++;
        if (in_q != hin[1] || pin_out != hout) begin
          failures++; if (failures < 10) $display("FAIL in_q=%0h exp %0h", in_q, hin[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
