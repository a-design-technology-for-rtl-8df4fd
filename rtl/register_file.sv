// register_file: the MPU's n general registers.
//
// The command controller reads one register onto the data bus (raddr ->
// rdata, combinational) and writes the result bus into one register (we,
// waddr, wdata, on the clock edge). External units are attached to the
// register file directly: each register r has its own write strobe
// ext_we[r] with data ext_wdata[r], and all contents are visible on q, so a
// peripheral can both feed and observe registers without a bus arbiter.
// An external write wins over an MPU write to the same register in the same
// cycle (own choice). Reset clears every register. NREGS (the n of the
// block diagram) and DATA_W are parameters.
module register_file #(
  parameter int NREGS  = 16,
  parameter int DATA_W = mpu_pkg::BASE_DATA_W,
  localparam int RAW   = $clog2(NREGS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [RAW-1:0]    raddr,
  output logic [DATA_W-1:0] rdata,
  input  logic              we,
  input  logic [RAW-1:0]    waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [NREGS-1:0]  ext_we,
  input  logic [DATA_W-1:0] ext_wdata [NREGS],
  output logic [DATA_W-1:0] q [NREGS]
);

  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < NREGS; i++) begin
        if (ext_we[i])                       regs[i] <= ext_wdata[i];
        else if (we && waddr == RAW'(i))     regs[i] <= wdata;
      end
    end
  end

  assign rdata = regs[raddr];
  assign q     = regs;

endmodule
