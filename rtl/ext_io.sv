// ext_io: 8-bit general-purpose I/O attached directly to MPU registers.
//
// The input pins pass a two-flop synchroniser and appear on in_q, which is
// written into an MPU register every cycle; the output pins are a register
// that copies an MPU register, so software reads and writes I/O by reading
// and writing those registers. Two clocks from pin to register, one clock
// from register to pin. Synchroniser and output register are own choices.
module ext_io
  import mpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  data_t pin_in,
  output data_t in_q,
  input  data_t out_reg,
  output data_t pin_out
);

  data_t sync1;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1   <= '0;
      in_q    <= '0;
      pin_out <= '0;
    end else begin
      sync1   <= pin_in;
      in_q    <= sync1;
      pin_out <= out_reg;
    end
  end

endmodule
