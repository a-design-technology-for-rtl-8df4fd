// tb_program_counter: random inc/load/ext_load sequences against a model,
// including wrap-around and the priority ext_load > load > inc.
module tb_program_counter;
  logic clk = 0, rst, inc, load, ext_load;
  logic [7:0] din, ext_din, pc;
  int checks = 0, failures = 0;
  int model;

  always #5 clk = ~clk;
  program_counter #(.PC_W(8)) dut (.clk, .rst, .inc, .load, .din, .ext_load, .ext_din, .pc);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; inc = 0; load = 0; ext_load = 0; din = 0; ext_din = 0;
    @(posedge clk); #1 rst = 0; model = 0;
    checks++; if (pc != 0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 2000; n++) begin
      inc = 1'($urandom); load = ($urandom % 4) == 0; ext_load = ($urandom % 8) == 0;
      din = 8'($urandom); ext_din = 8'($urandom);
      if (n < 300) begin inc = 1; load = 0; ext_load = 0; end
      @(posedge clk); #1;
      if (ext_load) model = ext_din; else if (load) model = din; else if (inc) model = (model + 1) % 256;
      checks++;
      if (int'(pc) != model) begin failures++; if (failures < 10) $display("FAIL pc=%0d exp %0d", pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
