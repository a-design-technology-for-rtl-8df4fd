// tb_command_controller: checks the FETCH/LOAD/EXEC sequence (three clocks
// per command), that run = 0 holds it in FETCH, that controls are applied
// only in EXEC, and the jump condition for each Z/C combination.
module tb_command_controller;
  import mpu_pkg::*;
  logic clk = 0, rst, run, restart, fz, fc;
  ctrl_t ctrl;
  logic pm_re, cr_load, pc_inc, pc_load, a_we, flags_we, rf_we, push, pop, exec;
  logic [1:0] state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  command_controller dut (.clk, .rst, .run, .restart, .ctrl, .flag_z(fz), .flag_c(fc), .pm_re, .cr_load,
                          .pc_inc, .pc_load, .a_we, .flags_we, .rf_we, .push, .pop, .exec, .state);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    bit cok;
    rst = 1; run = 0; restart = 0; ctrl = '0; fz = 0; fc = 0;
    @(posedge clk); #1 rst = 0;
    repeat (5) begin
      @(posedge clk); #1;
      chk(state == 2'd0 && !pm_re && !cr_load && !exec, "hold while run = 0");
    end
    run = 1;
    for (int n = 0; n < 500; n++) begin
      ctrl = ctrl_t'($urandom);
      ctrl.alu_op = ALU_ADD;
      ctrl.src = SRC_REG;
      fz = 1'($urandom); fc = 1'($urandom);
      #1;
      chk(state == 2'd0 && pm_re && !cr_load && !a_we && !rf_we && !pc_load && !push && !pop, "FETCH");
      @(posedge clk); #1;
      chk(state == 2'd1 && cr_load && pc_inc && !pm_re && !a_we && !rf_we && !pc_load, "LOAD");
      @(posedge clk); #1;
      case (ctrl.cond)
        CC_Z: cok = fz; CC_NZ: cok = !fz; CC_C: cok = fc; default: cok = !fc;
      endcase
      chk(state == 2'd2 && exec && !pc_inc && !cr_load, "EXEC state");
      chk(a_we == ctrl.a_we && rf_we == ctrl.rf_we && flags_we == ctrl.flags_we &&
          push == ctrl.push && pop == ctrl.pop, "EXEC strobes");
      chk(pc_load == (ctrl.pc_load && (!ctrl.cond_en || cok)), "jump condition");
      @(posedge clk); #1;
    end
    // restart from LOAD drops the command: back to FETCH, no EXEC.
    @(posedge clk); #1;
    chk(state == 2'd1, "in LOAD");
    restart = 1;
    @(posedge clk); #1 restart = 0;
    chk(state == 2'd0 && !exec, "restart returns to FETCH");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
