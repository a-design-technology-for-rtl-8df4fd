// program_counter: the MPU's PC register.
//
// As the design describes, the program counter either increments the PC
// register or loads it from the data bus under the command controller; an
// external unit may also load it directly. Priority (own choice):
// ext_load, then load, then inc. Reset clears the PC to 0. One clock per update.
module program_counter #(
  parameter int PC_W = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            inc,
  input  logic            load,
  input  logic [PC_W-1:0] din,
  input  logic            ext_load,
  input  logic [PC_W-1:0] ext_din,
  output logic [PC_W-1:0] pc
);

  always_ff @(posedge clk) begin
    if (rst)           pc <= '0;
    else if (ext_load) pc <= ext_din;
    else if (load)     pc <= din;
    else if (inc)      pc <= pc + 1'b1;
  end

endmodule
