// tb_selector: each source select with random data must route the right input.
module tb_selector;
  import mpu_pkg::*;

  src_e src;
  data_t imm, rf, stk, bus;
  int checks = 0, failures = 0;

  selector #(.DATA_W(8)) dut (.src, .imm, .rf, .stk, .bus);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t e;
    for (int n = 0; n < 300; n++) begin
      src = src_e'(n % 3);
      imm = 8'($urandom); rf = 8'($urandom); stk = 8'($urandom);
      #1;
      e = (n % 3 == 0) ? imm : (n % 3 == 1) ? rf : stk;
      checks++;
      if (bus != e) begin failures++; $display("FAIL src=%0d bus=%0h exp %0h", src, bus, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
