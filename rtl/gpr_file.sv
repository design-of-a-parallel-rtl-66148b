// gpr_file: general-purpose register file of the execution unit.
//
// REGS x WIDTH registers (16 x 32 by default). The R1 decoder selects the
// register driven on port A and the register written; the R2 decoder
// selects the register driven on port B. Reads are combinational; the write
// of `wdata` into register `r1` happens on a clock edge with `we` high (the
// original writes on CLK4 when the write control is asserted). Registers
// reset to zero: the original has no initialisation routine beyond loading
// the dedicated registers from the host, so the reset value is this design's
// choice.
module gpr_file #(
  parameter int REGS  = 16,
  parameter int WIDTH = 32,
  parameter int RW    = $clog2(REGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [RW-1:0]    r1,
  input  logic [RW-1:0]    r2,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] b
);
  logic [WIDTH-1:0] regs [REGS];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < REGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[r1] <= wdata;
    end
  end
  assign a = regs[r1];
  assign b = regs[r2];
endmodule
