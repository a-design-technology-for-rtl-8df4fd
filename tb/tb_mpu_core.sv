// tb_mpu_core: runs a directed program on the MPU core with a testbench
// program memory (one-clock read latency). The program uses every command:
// loads, stores, ADD/SUB/AND/OR/XOR/SHR/ADDI with carry and borrow, taken
// and not-taken conditional jumps on Z and C, CALL/RET and ACW. External
// units are modelled by holding R10 through the external write port and by
// loading the PC directly. Checks the final registers against values worked
// out by hand and that the 33rd command writes its result 99 clocks after
// run rises (three clocks per command).
module tb_mpu_core;
  import mpu_pkg::*;
  import mpu_programs::*;

  localparam int N = 16;
  logic clk = 0, rst, run, pm_re, rf_we, ext_pc_load, stack_err, illegal;
  logic [7:0] pm_addr, pc, ext_pc_value;
  logic [3:0] rf_waddr;
  instr_t pm_rdata;
  logic [N-1:0] ext_we;
  data_t ext_wdata [N];
  data_t regs [N];
  instr_t mem [256];
  int checks = 0, failures = 0;
  int cyc = 0, r12_cycle = -1;

  always #5 clk = ~clk;

  mpu_core #(.NREGS(N), .STACK_DEPTH(4), .HW_ACCEL(1'b1)) dut (
    .clk, .rst, .run, .pm_addr, .pm_re, .pm_rdata, .ext_we, .ext_wdata, .regs_q(regs),
    .rf_we_o(rf_we), .rf_waddr_o(rf_waddr), .ext_pc_load, .ext_pc_value, .pc_o(pc),
    .stack_err, .illegal
  );

  always_ff @(posedge clk) if (pm_re) pm_rdata <= mem[pm_addr];

  always @(posedge clk) begin
    if (run) cyc <= cyc + 1;
    if (run && rf_we && rf_waddr == 4'd12 && r12_cycle < 0) r12_cycle <= cyc + 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = I(OP_NOP);
    mem[0]  = I(OP_LDI, 0, 8'h5A);  mem[1]  = I(OP_ST, 1);
    mem[2]  = I(OP_LDI, 0, 8'h0F);  mem[3]  = I(OP_AND, 1);   mem[4] = I(OP_ST, 2);   // R2 = 0A
    mem[5]  = I(OP_LDI, 0, 8'hF0);  mem[6]  = I(OP_OR, 1);    mem[7] = I(OP_ST, 3);   // R3 = FA
    mem[8]  = I(OP_XOR, 1);         mem[9]  = I(OP_ST, 4);                            // R4 = A0
    mem[10] = I(OP_ADD, 1);         mem[11] = I(OP_ADDI, 0, 8'h10); mem[12] = I(OP_ST, 5); // R5 = 0A, C = 1
    mem[13] = I(OP_JCC, int'(CC_C), 15);  mem[14] = I(OP_ST, 6);
    mem[15] = I(OP_SUB, 1);         mem[16] = I(OP_ST, 7);                            // R7 = B0
    mem[17] = I(OP_SHR);            mem[18] = I(OP_ST, 8);                            // R8 = 58, C = 0
    mem[19] = I(OP_JCC, int'(CC_NC), 21); mem[20] = I(OP_ST, 6);
    mem[21] = I(OP_CALL, 0, 40);    mem[22] = I(OP_ST, 9);                            // R9 = 77
    mem[23] = I(OP_LD, 10);         mem[24] = I(OP_ACW, 2);   mem[25] = I(OP_ST, 11); // R11 = 34
    mem[26] = I(OP_LDI, 0, 0);      mem[27] = I(OP_JCC, int'(CC_Z), 29); mem[28] = I(OP_ST, 6);
    mem[29] = I(OP_JCC, int'(CC_NZ), 28); mem[30] = I(OP_LDI, 0, 1); mem[31] = I(OP_JCC, CC_Z, 28);
    mem[32] = I(OP_JMP, 0, 50);
    mem[40] = I(OP_LDI, 0, 8'h77);  mem[41] = I(OP_RET);
    mem[50] = I(OP_ST, 12);         mem[51] = I(OP_JMP, 0, 51);                       // R12 = 01
    mem[60] = I(OP_LDI, 0, 8'h42);  mem[61] = I(OP_ST, 13);   mem[62] = I(OP_JMP, 0, 62);

    rst = 1; run = 0; ext_pc_load = 0; ext_pc_value = 0; ext_we = '0;
    for (int i = 0; i < N; i++) ext_wdata[i] = '0;
    ext_we[10] = 1'b1; ext_wdata[10] = 8'h33;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1 run = 1;
    repeat (200) @(posedge clk);
    #1;
    chk(regs[1] == 8'h5A, "R1"); chk(regs[2] == 8'h0A, "AND"); chk(regs[3] == 8'hFA, "OR");
    chk(regs[4] == 8'hA0, "XOR"); chk(regs[5] == 8'h0A, "ADD/ADDI");
    chk(regs[6] == 8'h00, "a skipped store was executed"); chk(regs[7] == 8'hB0, "SUB");
    chk(regs[8] == 8'h58, "SHR"); chk(regs[9] == 8'h77, "CALL/RET");
    chk(int'(regs[11]) == ref_wo(8'h33, 8'h0A), "ACW"); chk(regs[12] == 8'h01, "JMP");
    chk(regs[10] == 8'h33, "external write");
    chk(pc == 8'd51 || pc == 8'd52, $sformatf("halt loop pc=%0d", pc));
    chk(r12_cycle == 99, $sformatf("33 commands took %0d clocks, expected 99", r12_cycle));
    chk(!stack_err && !illegal, "status flags");
    // External unit loads the PC directly.
    @(posedge clk); #1 ext_pc_load = 1; ext_pc_value = 8'd60;
    @(posedge clk); #1 ext_pc_load = 0;
    repeat (30) @(posedge clk);
    #1 chk(regs[13] == 8'h42, "external PC load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
