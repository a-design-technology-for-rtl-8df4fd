// tb_command_register: load-enable behaviour and reset to NOP.
module tb_command_register;
  logic clk = 0, rst, load;
  logic [15:0] din, q, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  command_register #(.WIDTH(16)) dut (.clk, .rst, .load, .din, .q);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 1; din = 16'hFFFF;
    @(posedge clk); #1 rst = 0; model = 0;
    checks++; if (q != 0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 1000; n++) begin
      load = 1'($urandom); din = 16'($urandom);
      @(posedge clk); #1;
      if (load) model = din;
      checks++;
      if (q != model) begin failures++; if (failures < 10) $display("FAIL q=%h exp %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
