// a_register: the accumulator (A register) of the MPU and its flags.
//
// A is the ALU's inside register: it is one ALU input and receives ALU
// results. The zero flag Z and carry flag C are this implementation's
// addition so programs can compare and branch. flags_we writes Z; C is
// written only when c_we is also 1. Reset clears A and both flags. DATA_W
// is the configurable width of A (8 by default).
module a_register #(
  parameter int DATA_W = mpu_pkg::BASE_DATA_W
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  we,
  input  logic [DATA_W-1:0] d,
  input  logic  flags_we,
  input  logic  z_in,
  input  logic  c_we,
  input  logic  c_in,
  output logic [DATA_W-1:0] q,
  output logic  z,
  output logic  c
);

  always_ff @(posedge clk) begin
    if (rst) begin
      q <= '0;
      z <= 1'b0;
      c <= 1'b0;
    end else begin
      if (we) q <= d;
      if (flags_we) begin
        z <= z_in;
        if (c_we) c <= c_in;
      end
    end
  end

endmodule
