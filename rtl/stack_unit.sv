// stack_unit: return-address stack of the MPU.
//
// Records the PC value when the command controller pushes (CALL) and gives
// it back on pop (RET). top shows the most recent entry combinationally, so
// RET can put it on the data bus in the same cycle as the pop. A push when
// full or a pop when empty is ignored and sets the sticky err flag. DEPTH is
// this implementation's choice. One clock per push or pop.
module stack_unit #(
  parameter int DEPTH = 4,
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic             pop,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] top,
  output logic             empty,
  output logic             full,
  output logic             err
);

  localparam int CW = $clog2(DEPTH + 1);
  localparam int IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [CW-1:0]    cnt;

  assign empty = (cnt == '0);
  assign full  = (cnt == CW'(DEPTH));
  assign top   = empty ? '0 : mem[IW'(cnt - 1'b1)];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      err <= 1'b0;
    end else if (push && !pop) begin
      if (full) err <= 1'b1;
      else begin
        mem[IW'(cnt)] <= din;
        cnt      <= cnt + 1'b1;
      end
    end else if (pop && !push) begin
      if (empty) err <= 1'b1;
      else       cnt <= cnt - 1'b1;
    end
  end

  // push and pop are never requested together by the command controller.
  assert property (@(posedge clk) disable iff (rst) !(push && pop));

endmodule
