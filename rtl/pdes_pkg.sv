// pdes_pkg: types and constants shared by the PDES coprocessor.
//
// Holds the ESAM word layout (valid bit, recipient LP, sender node/LP,
// reserved bit, 17-bit time tag), the ESAM operation codes, the NEQ
// component command codes, the ALU / shifter / MBR / micro-sequencer
// control encodings, the microinstruction numbers and the host status
// register bit positions.
//
// Field positions, ALU, shifter, MBR and micro-sequencer encodings and the
// 64 microinstruction numbers follow the coprocessor's published tables.
// The esam_op_e encoding, the NEQ command codes beyond those in the NEQ
// state tables, and the bus source selector are this design's own choices.
package pdes_pkg;

  // ---------------- ESAM word format ----------------
  localparam int ESAM_WORDS = 32;
  localparam int ESAM_WIDTH = 32;
  localparam int ESAM_AW    = 5;

  localparam int EW_VALID    = 31;     // valid bit (NEQ control unit)
  localparam int EW_TOLP_HI  = 30;     // recipient LP 30..26
  localparam int EW_TOLP_LO  = 26;
  localparam int EW_FNODE_HI = 25;     // sender node 25..23
  localparam int EW_FNODE_LO = 23;
  localparam int EW_FLP_HI   = 22;     // sender LP 22..18
  localparam int EW_FLP_LO   = 18;
  localparam int EW_RSV      = 17;     // reserved bit (NEQ control unit)
  localparam int EW_TIME_HI  = 16;     // time tag 16..0

  localparam logic [31:0] M_VALID = 32'h8000_0000;
  localparam logic [31:0] M_TOLP  = 32'h7C00_0000;
  localparam logic [31:0] M_FROM  = 32'h03FC_0000;  // sender node + LP
  localparam logic [31:0] M_RSV   = 32'h0002_0000;
  localparam logic [31:0] M_TIME  = 32'h0001_FFFF;

  // ---------------- ESAM operations ----------------
  typedef enum logic [3:0] {
    ESAM_NOP        = 4'd0,
    ESAM_SRCH_EQ    = 4'd1,
    ESAM_SRCH_NEQ   = 4'd2,
    ESAM_SRCH_MIN   = 4'd3,
    ESAM_SRCH_NMIN  = 4'd4,
    ESAM_SRCH_MAX   = 4'd5,
    ESAM_SRCH_NMAX  = 4'd6,
    ESAM_WRITE_ALL  = 4'd7,
    ESAM_WRITE_SUB  = 4'd8,
    ESAM_WRITE_WORD = 4'd9,
    ESAM_READ_WORD  = 4'd10
  } esam_op_e;

  // ---------------- NEQ component commands (FSM_CTRL(2:0)) ----------------
  // Values taken from the input columns of the NEQ state tables.
  typedef enum logic [2:0] {
    NEQ_NOP      = 3'b000,
    NEQ_GO       = 3'b001,  // idle1: init, reserve1: reserve arc, idle2: search, error: clear
    NEQ_WRITE    = 3'b010,
    NEQ_FINDMIN  = 3'b011,
    NEQ_OUT_DATA = 3'b100,
    NEQ_OUT_ADDR = 3'b101
  } neq_cmd_e;

  // Adjacent-SRAM region for ESAM words: base | 5-bit ESAM address.
  localparam logic [15:0] ADJ_BASE = 16'h7FE0;

  // ---------------- Execution unit encodings ----------------
  typedef enum logic [2:0] {
    ALU_ADD  = 3'b000, ALU_INC = 3'b001, ALU_XOR = 3'b010, ALU_OR   = 3'b011,
    ALU_SUB  = 3'b100, ALU_AND = 3'b101, ALU_DEC = 3'b110, ALU_PASSB = 3'b111
  } alu_op_e;

  typedef enum logic [2:0] {
    SH_NONE = 3'b000, SH_L1 = 3'b001, SH_R1 = 3'b010, SH_L8 = 3'b011, SH_R8 = 3'b100
  } shift_op_e;

  typedef enum logic [1:0] {
    MBR_NOP = 2'b00, MBR_LOAD_SHIFTER = 2'b01, MBR_LOAD_BUS = 2'b10, MBR_OUTPUT = 2'b11
  } mbr_op_e;

  // Micro-sequencing logic conditions
  typedef enum logic [2:0] {
    MSL_NEG = 3'b000, MSL_NEQ_ERR = 3'b001, MSL_ZERO = 3'b010, MSL_NOT_ST1 = 3'b011,
    MSL_ST0 = 3'b100, MSL_JUMP = 3'b101, MSL_NEQ_BUSY = 3'b110, MSL_NEXT = 3'b111
  } msl_op_e;

  // Source of the internal data bus when the MBR loads from it
  typedef enum logic [1:0] {
    BUS_PARIO = 2'd0, BUS_SRAM = 2'd1, BUS_NEQ_DATA = 2'd2, BUS_NEQ_ADDR = 2'd3
  } bus_src_e;

  // ---------------- Microinstruction format ----------------
  // [15:10] microinstruction number, [9:0] branch target or {2'b0,R1,R2}
  localparam int UPC_W = 10;
  localparam int CS_DEPTH = 1024;

  typedef enum logic [5:0] {
    UI_ADJ_WR   = 6'd0,  UI_AND    = 6'd1,  UI_XOR    = 6'd2,  UI_OR     = 6'd3,
    UI_ADD      = 6'd4,  UI_SUB    = 6'd5,  UI_INC    = 6'd6,  UI_DEC    = 6'd7,
    UI_NZ_AND   = 6'd8,  UI_NZ_XOR = 6'd9,  UI_NZ_OR  = 6'd10, UI_NZ_ADD = 6'd11,
    UI_NZ_SUB   = 6'd12, UI_NZ_INC = 6'd13, UI_NZ_DEC = 6'd14, UI_NZ_R2  = 6'd15,
    UI_LSH      = 6'd16, UI_RSH    = 6'd17, UI_LSH8   = 6'd18, UI_RSH8   = 6'd19,
    UI_LSH_AND  = 6'd20, UI_LSH_XOR = 6'd21, UI_LSH_OR = 6'd22, UI_LSH_ADD = 6'd23,
    UI_LSH_SUB  = 6'd24, UI_LSH_INC = 6'd25, UI_LSH_DEC = 6'd26, UI_RSH_AND = 6'd27,
    UI_RSH_XOR  = 6'd28, UI_RSH_OR = 6'd29, UI_RSH_ADD = 6'd30, UI_ADJ_RD  = 6'd31,
    UI_MOV_MAR  = 6'd32, UI_NEQ_OADDR = 6'd33, UI_LSH8_OR = 6'd34, UI_INTR = 6'd35,
    UI_SRAM_RD  = 6'd36, UI_SRAM_WR = 6'd37, UI_NEQ_INIT = 6'd38, UI_NEQ_CLR = 6'd39,
    UI_NEQ_RSV  = 6'd40, UI_NEQ_OADDR_MBR = 6'd41, UI_NEQ_READ = 6'd42, UI_NEQ_WRITE = 6'd43,
    UI_NEQ_FMIN = 6'd44, UI_NEQ_SRCH = 6'd45, UI_MBR_PARIO = 6'd46, UI_PARIO_MBR = 6'd47,
    UI_MAR_MBR  = 6'd48, UI_R1_MBR = 6'd49, UI_MBR_R2 = 6'd50, UI_MOV = 6'd51,
    UI_TGL_ST20 = 6'd52, UI_TGL_ST3 = 6'd53, UI_TGL_ST2 = 6'd54, UI_TGL_ST1 = 6'd55,
    UI_TGL_ST0  = 6'd56, UI_JZ = 6'd57, UI_JN = 6'd58, UI_J_NST1 = 6'd59,
    UI_J_ST0    = 6'd60, UI_J_NEQ_BUSY = 6'd61, UI_J_NEQ_ERR = 6'd62, UI_JMP = 6'd63
  } uinstr_e;

  // Decoded control word produced by the microinstruction decode unit
  typedef struct packed {
    logic [3:0] r1;
    logic [3:0] r2;
    alu_op_e    alu_op;
    shift_op_e  shift_op;
    logic       bmux_mbr;    // B operand from MBR instead of R2
    logic       reg_we;      // write shifter output to R1
    logic       flag_we;     // update NZ flags
    mbr_op_e    mbr_op;
    bus_src_e   bus_src;
    logic       mar_load;    // MAR <= A[15:0]
    logic       sram_rd;     // MBR <= SRAM[addr]
    logic       sram_we;     // SRAM[addr] <= MBR
    logic       adj_addr;    // SRAM address from the NEQ component, not MAR
    neq_cmd_e   neq_cmd;
    logic       intr_req;
    logic       pario_we;    // PARIO output buffer <= MBR
    logic [3:0] st_toggle;   // coprocessor toggles of status bits
    msl_op_e    msl_op;
    logic [UPC_W-1:0] target;
  } uctrl_t;

  // ---------------- Host status register ----------------
  localparam int ST_DATA_OUT = 0;
  localparam int ST_DATA_IN  = 1;
  localparam int ST_ERROR    = 2;
  localparam int ST_READY    = 3;

  // ---------------- Macroinstruction opcodes (bits 31..26) ----------------
  localparam logic [5:0] OP_INIT_COPRO = 6'b000000;
  localparam logic [5:0] OP_INIT_SIM   = 6'b000100;
  localparam logic [5:0] OP_POST_EVENT = 6'b001000;
  localparam logic [5:0] OP_GET_EVENT  = 6'b010000;
  localparam logic [5:0] OP_POST_MSG   = 6'b100000;

endpackage
