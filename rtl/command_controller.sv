// command_controller: sequences the MPU and drives the other modules.
//
// Each command takes three clocks (own choice):
//   FETCH  program memory reads the word at PC (synchronous read),
//   LOAD   the word is loaded into the command register and PC advances,
//   EXEC   the decoded controls are applied: A, flags, register file, PC and
//          stack are written from the result bus.
// A conditional jump loads the PC only if its condition on Z/C holds. While
// run = 0 the controller waits in FETCH and issues nothing. restart (an
// external unit loading the PC) sends the sequencer back to FETCH, so a
// command fetched from the old PC is dropped; a command already in EXEC
// completes, except that the external PC value wins over its jump.
module command_controller
  import mpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  run,
  input  logic  restart,
  input  ctrl_t ctrl,
  input  logic  flag_z,
  input  logic  flag_c,
  output logic  pm_re,
  output logic  cr_load,
  output logic  pc_inc,
  output logic  pc_load,
  output logic  a_we,
  output logic  flags_we,
  output logic  rf_we,
  output logic  push,
  output logic  pop,
  output logic  exec,
  output logic [1:0] state
);

  typedef enum logic [1:0] {S_FETCH = 2'd0, S_LOAD = 2'd1, S_EXEC = 2'd2} state_e;
  state_e st;

  logic cond_ok;

  always_ff @(posedge clk) begin
    if (rst || restart) st <= S_FETCH;
    else begin
      unique case (st)
        S_FETCH: if (run) st <= S_LOAD;
        S_LOAD:  st <= S_EXEC;
        default: st <= S_FETCH;
      endcase
    end
  end

  always_comb begin
    unique case (ctrl.cond)
      CC_Z:    cond_ok = flag_z;
      CC_NZ:   cond_ok = !flag_z;
      CC_C:    cond_ok = flag_c;
      default: cond_ok = !flag_c;
    endcase
  end

  assign state    = st;
  assign exec     = (st == S_EXEC);
  assign pm_re    = (st == S_FETCH) && run;
  assign cr_load  = (st == S_LOAD);
  assign pc_inc   = (st == S_LOAD);
  assign a_we     = exec && ctrl.a_we;
  assign flags_we = exec && ctrl.flags_we;
  assign rf_we    = exec && ctrl.rf_we;
  assign pc_load  = exec && ctrl.pc_load && (!ctrl.cond_en || cond_ok);
  assign push     = exec && ctrl.push;
  assign pop      = exec && ctrl.pop;

endmodule
