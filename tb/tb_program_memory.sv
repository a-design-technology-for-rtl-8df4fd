// tb_program_memory: fills the memory through the write port, reads every
// address back and checks the one-clock read latency and read enable hold.
module tb_program_memory;
  logic clk = 0, we, re;
  logic [7:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  program_memory #(.DEPTH(256), .WIDTH(16)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      model[i] = 16'($urandom);
      we = 1; waddr = 8'(i); wdata = model[i];
      @(posedge clk); #1;
    end
    we = 0;
    for (int n = 0; n < 1000; n++) begin
      raddr = 8'($urandom); re = 1;
      @(posedge clk); #1;
      checks++;
      if (rdata != model[raddr]) begin failures++; if (failures < 10) $display("FAIL addr %0d", raddr); end
      re = 0; raddr = raddr + 1;
      @(posedge clk); #1;
      checks++;
      if (rdata != model[raddr - 1]) begin failures++; if (failures < 10) $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
