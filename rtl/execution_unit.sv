// execution_unit: data path of the microcode control engine.
//
// Register file (16 x 32), A and B latches, BMUX (B operand from the
// register file or from the MBR), ALU, shifter, 32-bit memory buffer
// register (MBR) and 16-bit memory address register (MAR).
//
// Timing within one microinstruction (phase enables from four_phase_clock):
//   CLK2  A_LATCH <= R1 register, B_LATCH <= R2 register or MBR
//   CLK3  ALU / shifter result settles; `z`, `n` reflect it for the flag
//         register, which the control unit loads on this phase
//   CLK4  result written to R1 (reg_we), MBR loaded (from the shifter or
//         from the internal bus `bus_in`), MAR loaded from the A latch
// `mbr` drives the internal data path (SRAM, NEQ, PARIO, interrupt
// register); `mar` drives the SRAM address.
//
// The component set and the MBR operations follow the document. The phase
// on which each register loads is this design's own reading of the
// four-phase clock.
module execution_unit
  import pdes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  ph,
  input  logic [3:0]  r1,
  input  logic [3:0]  r2,
  input  alu_op_e     alu_op,
  input  shift_op_e   shift_op,
  input  logic        bmux_mbr,
  input  logic        reg_we,
  input  mbr_op_e     mbr_op,
  input  logic        mar_load,
  input  logic [31:0] bus_in,
  output logic [31:0] mbr,
  output logic [15:0] mar,
  output logic        z,
  output logic        n
);

  logic [31:0] a_reg, b_reg, a_latch, b_latch, alu_y, sh_y;

  gpr_file #(.REGS(16), .WIDTH(32)) u_gpr (
    .clk, .rst, .r1, .r2, .we(reg_we && ph[3]), .wdata(sh_y), .a(a_reg), .b(b_reg)
  );

  alu #(.WIDTH(32)) u_alu (.op(alu_op), .a(a_latch), .b(b_latch), .y(alu_y), .z, .n);

  shifter #(.WIDTH(32)) u_sh (.op(shift_op), .d(alu_y), .y(sh_y));

  always_ff @(posedge clk) begin
    if (rst) begin
      a_latch <= '0;
      b_latch <= '0;
      mbr     <= '0;
      mar     <= '0;
    end else begin
      if (ph[1]) begin
        a_latch <= a_reg;
        b_latch <= bmux_mbr ? mbr : b_reg;
      end
      if (ph[3]) begin
        unique case (mbr_op)
          MBR_LOAD_SHIFTER: mbr <= sh_y;
          MBR_LOAD_BUS:     mbr <= bus_in;
          default: ;
        endcase
        if (mar_load) mar <= a_latch[15:0];
      end
    end
  end

endmodule
