// program_memory: on-chip SRAM holding the MPU program.
//
// The program memory sits inside the FPGA with the MPU. It has one write
// port, through which the object code is transferred from outside before
// execution, and one read port, the command bus, with one cycle of latency
// (rdata holds the word at raddr sampled on the last clock with re = 1), as
// FPGA block RAM has. DEPTH and WIDTH are this implementation's choice.
module program_memory #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
