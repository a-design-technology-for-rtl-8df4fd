// tb_stack_unit: random push/pop against a queue model, including
// overflow and underflow setting the sticky error flag.
module tb_stack_unit;
  logic clk = 0, rst, push, pop, empty, full, err;
  logic [7:0] din, top;
  logic [7:0] model [$];
  int checks = 0, failures = 0;
  int merr;

  always #5 clk = ~clk;
  stack_unit #(.DEPTH(4), .WIDTH(8)) dut (.clk, .rst, .push, .pop, .din, .top, .empty, .full, .err);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; push = 0; pop = 0; din = 0;
    @(posedge clk); #1 rst = 0; merr = 0;
    for (int n = 0; n < 2000; n++) begin
      if (n == 1000) begin rst = 1; @(posedge clk); #1 rst = 0; model.delete(); merr = 0; end
      push = 1'($urandom); pop = !push && 1'($urandom); din = 8'($urandom);
      @(posedge clk); #1;
      if (push) begin if (model.size() == 4) merr = 1; else model.push_back(din); end
      if (pop)  begin if (model.size() == 0) merr = 1; else void'(model.pop_back()); end
      checks++;
      if (int'(err) != merr || empty != (model.size() == 0) || full != (model.size() == 4) ||
          (model.size() > 0 && top != model[$])) begin
        failures++; if (failures < 10) $display("FAIL n=%0d top=%0h err=%0d", n, top, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
