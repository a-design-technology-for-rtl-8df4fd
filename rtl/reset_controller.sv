// reset_controller: produces the system reset.
//
// An active-low reset request arst_n asserts rst at once (asynchronously)
// and rst is released synchronously, HOLD clocks after arst_n returns high,
// so every module leaves reset on the same clock edge. HOLD is own choice.
module reset_controller #(
  parameter int HOLD = 4
) (
  input  logic clk,
  input  logic arst_n,
  output logic rst
);

  logic [HOLD-1:0] sh;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) sh <= '1;
    else         sh <= {sh[HOLD-2:0], 1'b0};
  end

  assign rst = sh[HOLD-1];

endmodule
