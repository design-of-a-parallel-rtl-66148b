// control_unit: sequencer of the microcode control engine.
//
// Holds the micro-program counter (MPC), the microinstruction decode unit
// with registered output, the branch target latch, the micro-sequencing
// logic (MSL) with its mapping multiplexer and incrementer, and the NZ flag
// register.
//
// Microinstruction format (16 bits): [15:10] microinstruction number
// (0..63, see uinstr_e), [9:0] either a 10-bit absolute branch target or
// {2'b00, R1[3:0], R2[3:0]}.
//
// Timing within one microinstruction (phase enables from four_phase_clock):
//   CLK1  decode `uinstr` (the control-store word at `mpc`) into `ctrl`
//   CLK3  NZ flags <= ALU z/n when the instruction operates on registers
//   CLK4  MPC <= branch target if the MSL condition holds, else MPC + 1
// Reset: the MPC clears on CLK1 while `rst` is high (the phase generator
// holds CLK1 during reset) and the decoded control word is a no-op.
//
// Branch conditions: negative, zero, status(1)=0 (no host data), status(0)=1
// (output buffer still full), NEQ not ready, NEQ error, always. "NEQ not
// ready" is false while the NEQ sits in an error state, so a wait loop on it
// falls through to the error test that follows it.
//
// The 64 microinstructions and the eight MSL conditions follow the
// document. The 16-bit layout, the control word and the meaning given to
// microinstructions 33, 41 and 42 (whose descriptions are one-line names)
// are this design's own.
module control_unit
  import pdes_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       ph,
  input  logic [15:0]      uinstr,
  input  logic [1:0]       status,     // status register bits 1..0
  input  logic             neq_ready,
  input  logic             neq_error,
  input  logic             z,
  input  logic             n,
  output logic [UPC_W-1:0] mpc,
  output uctrl_t           ctrl
);

  function automatic uctrl_t decode(input logic [15:0] w);
    uctrl_t c;
    logic [5:0] num;
    num = w[15:10];
    c = '0;
    c.alu_op   = ALU_PASSB;
    c.shift_op = SH_NONE;
    c.mbr_op   = MBR_NOP;
    c.bus_src  = BUS_PARIO;
    c.neq_cmd  = NEQ_NOP;
    c.msl_op   = MSL_NEXT;
    c.r1       = w[7:4];
    c.r2       = w[3:0];
    c.target   = w[UPC_W-1:0];
    if (num >= 6'd1 && num <= 6'd30 || num == 6'd34) begin
      // register operations
      c.flag_we = 1'b1;
      c.reg_we  = !(num >= 6'd8 && num <= 6'd15);
      unique case (num)
        6'd1, 6'd8, 6'd20, 6'd27:  c.alu_op = ALU_AND;
        6'd2, 6'd9, 6'd21, 6'd28:  c.alu_op = ALU_XOR;
        6'd3, 6'd10, 6'd22, 6'd29, 6'd34: c.alu_op = ALU_OR;
        6'd4, 6'd11, 6'd23, 6'd30: c.alu_op = ALU_ADD;
        6'd5, 6'd12, 6'd24:        c.alu_op = ALU_SUB;
        6'd6, 6'd13, 6'd25:        c.alu_op = ALU_INC;
        6'd7, 6'd14, 6'd26:        c.alu_op = ALU_DEC;
        default:                   c.alu_op = ALU_PASSB;   // 15..19
      endcase
      unique case (num)
        6'd16:                     c.shift_op = SH_L1;
        6'd17:                     c.shift_op = SH_R1;
        6'd18, 6'd34:              c.shift_op = SH_L8;
        6'd19:                     c.shift_op = SH_R8;
        6'd20, 6'd21, 6'd22, 6'd23, 6'd24, 6'd25, 6'd26: c.shift_op = SH_L1;
        6'd27, 6'd28, 6'd29, 6'd30: c.shift_op = SH_R1;
        default:                   c.shift_op = SH_NONE;
      endcase
    end else begin
      unique case (num)
        6'd0:  begin c.sram_we = 1'b1; c.adj_addr = 1'b1; end          // Adj RAM write
        6'd31: begin c.sram_rd = 1'b1; c.adj_addr = 1'b1;                // Adj RAM read
                     c.mbr_op = MBR_LOAD_BUS; c.bus_src = BUS_SRAM; end
        6'd32: c.mar_load = 1'b1;                                         // mov(MAR,R1)
        6'd33: begin c.neq_cmd = NEQ_OUT_ADDR;                            // NEQ output addr -> MBR
                     c.mbr_op = MBR_LOAD_BUS; c.bus_src = BUS_NEQ_ADDR; end
        6'd35: c.intr_req = 1'b1;
        6'd36: begin c.sram_rd = 1'b1; c.mbr_op = MBR_LOAD_BUS; c.bus_src = BUS_SRAM; end
        6'd37: c.sram_we = 1'b1;
        6'd38, 6'd39, 6'd40, 6'd45: c.neq_cmd = NEQ_GO;                   // init / clear / reserve / search
        6'd41: begin c.neq_cmd = NEQ_OUT_ADDR;                            // MBR -> SRAM at NEQ address
                     c.sram_we = 1'b1; c.adj_addr = 1'b1; end
        6'd42: begin c.neq_cmd = NEQ_OUT_DATA;                            // NEQ read -> MBR
                     c.mbr_op = MBR_LOAD_BUS; c.bus_src = BUS_NEQ_DATA; end
        6'd43: c.neq_cmd = NEQ_WRITE;
        6'd44: c.neq_cmd = NEQ_FINDMIN;
        6'd46: begin c.mbr_op = MBR_LOAD_BUS; c.bus_src = BUS_PARIO; end  // MBR <= PARIO in
        6'd47: c.pario_we = 1'b1;                                         // PARIO out <= MBR
        6'd48: begin c.mar_load = 1'b1; c.mbr_op = MBR_LOAD_SHIFTER; end  // MAR<=R1, MBR<=R2
        6'd49: begin c.bmux_mbr = 1'b1; c.reg_we = 1'b1; c.flag_we = 1'b1; end // R1 <= MBR
        6'd50: c.mbr_op = MBR_LOAD_SHIFTER;                               // MBR <= R2
        6'd51: begin c.reg_we = 1'b1; c.flag_we = 1'b1; end               // R1 <= R2
        6'd52: c.st_toggle = 4'b0101;
        6'd53: c.st_toggle = 4'b1000;
        6'd54: c.st_toggle = 4'b0100;
        6'd55: c.st_toggle = 4'b0010;
        6'd56: c.st_toggle = 4'b0001;
        6'd57: c.msl_op = MSL_ZERO;
        6'd58: c.msl_op = MSL_NEG;
        6'd59: c.msl_op = MSL_NOT_ST1;
        6'd60: c.msl_op = MSL_ST0;
        6'd61: c.msl_op = MSL_NEQ_BUSY;
        6'd62: c.msl_op = MSL_NEQ_ERR;
        6'd63: c.msl_op = MSL_JUMP;
        default: ;
      endcase
    end
    return c;
  endfunction

  logic flag_z, flag_n, take;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl        <= '0;
      ctrl.msl_op <= MSL_NEXT;
      flag_z <= 1'b0;
      flag_n <= 1'b0;
      if (ph[0]) mpc <= '0;
    end else begin
      if (ph[0]) ctrl <= decode(uinstr);
      if (ph[2] && ctrl.flag_we) begin
        flag_z <= z;
        flag_n <= n;
      end
      if (ph[3]) mpc <= take ? ctrl.target : mpc + UPC_W'(1);
    end
  end

  always_comb begin
    unique case (ctrl.msl_op)
      MSL_NEG:      take = flag_n;
      MSL_NEQ_ERR:  take = neq_error;
      MSL_ZERO:     take = flag_z;
      MSL_NOT_ST1:  take = !status[1];
      MSL_ST0:      take = status[0];
      MSL_JUMP:     take = 1'b1;
      MSL_NEQ_BUSY: take = !neq_ready && !neq_error;
      default:      take = 1'b0;
    endcase
  end

endmodule
