// tb_register_file: random MPU and external writes against a model; checks
// the read port, the parallel outputs and that an external write wins.
module tb_register_file;
  import mpu_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst, we;
  logic [3:0] raddr, waddr;
  data_t rdata, wdata;
  logic [N-1:0] ext_we;
  data_t ext_wdata [N];
  data_t q [N];
  data_t model [N];
  int checks = 0, failures = 0;
  int n_conflict = 0;

  always #5 clk = ~clk;
  register_file #(.NREGS(N)) dut (.clk, .rst, .raddr, .rdata, .we, .waddr, .wdata, .ext_we, .ext_wdata, .q);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; waddr = 0; raddr = 0; wdata = 0; ext_we = '0;
    for (int i = 0; i < N; i++) ext_wdata[i] = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < N; i++) model[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      we = 1'($urandom); waddr = 4'($urandom); wdata = 8'($urandom);
      for (int i = 0; i < N; i++) begin
        ext_we[i] = ($urandom % 6) == 0; ext_wdata[i] = 8'($urandom);
      end
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) begin
        if (ext_we[i]) begin
          model[i] = ext_wdata[i];
          if (we && int'(waddr) == i) n_conflict++;
        end else if (we && int'(waddr) == i) model[i] = wdata;
      end
      raddr = 4'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) begin failures++; if (failures < 10) $display("FAIL read r%0d", raddr); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (q[i] != model[i]) begin failures++; if (failures < 10) $display("FAIL q[%0d]", i); end
      end
    end
    checks++; if (n_conflict == 0) begin failures++; $display("FAIL no write conflict exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
