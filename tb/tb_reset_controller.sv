// tb_reset_controller: rst rises as soon as arst_n falls (before any clock)
// and falls exactly HOLD clocks after arst_n rises.
module tb_reset_controller;
  logic clk = 0, arst_n, rst;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  reset_controller #(.HOLD(4)) dut (.clk, .arst_n, .rst);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt;
    for (int k = 0; k < 20; k++) begin
      @(posedge clk); #2 arst_n = 1'b0;
      #1;
      checks++; if (!rst) begin failures++; $display("FAIL not asynchronous"); end
      repeat (1 + k % 3) @(posedge clk);
      #1 arst_n = 1'b1;
      cnt = 0;
      while (rst) begin @(posedge clk); #1; cnt++; end
      checks++;
      if (cnt != 4) begin failures++; $display("FAIL released after %0d clocks", cnt); end
      repeat (5 + k) @(posedge clk);
      checks++; if (rst) begin failures++; $display("FAIL reset re-asserted"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
