// command_register: holds the command fetched over the command bus while the
// command decoder and controller execute it. Loads din when load = 1; reset
// clears it to 0, which decodes as NOP. One clock of latency.
module command_register #(
  parameter int WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= din;
  end

endmodule
