// des_coprocessor: Parallel Discrete Event Simulation coprocessor (top).
//
// Offloads the synchronization work of one host node of a conservative
// (Chandy-Misra null-message) parallel simulation. The host sends 32-bit
// macroinstructions (Initialize Simulation, Post Message, Get Event, Post
// Event) and their operands through the interface unit; a microcoded
// control engine runs the matching routine, keeps per-LP state in the SRAM,
// keeps the next-event queue in the associative NEQ component, and returns
// results (real events, null messages to send, error vectors) through
// interrupts and the PARIO buffer.
//
// Parts: four_phase_clock (CLK1..CLK4 enables; CLK4 is also the clock
// filter), control_unit + control_store + execution_unit (the microcode
// control engine), neq_component (ESAM next-event queue), sram (64k x 32,
// shared), interface_unit (host port). One microinstruction takes four
// master clocks; the NEQ component and the status register advance once per
// four master clocks.
//
// Internal data bus: the MBR drives the SRAM write data, the NEQ data input,
// the PARIO output buffer and the interrupt register; the MBR loads from
// the PARIO input buffer, the SRAM, or the NEQ data / address outputs.
// The SRAM address comes from the MAR, or from the NEQ component for
// adjacent-data (event pointer) accesses.
//
// Host ports follow the coprocessor's interface signal list, with the
// bidirectional data bus split in two. The architecture follows the
// document; the bus multiplexing and single-clock phase enables are this
// design's way of building it.
module des_coprocessor
  import pdes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        cs_data,
  input  logic        cs_status,
  input  logic        w_r,
  input  logic        inta,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        intr
);

  logic [3:0]       ph;
  logic [UPC_W-1:0] mpc;
  logic [15:0]      uinstr;
  uctrl_t           ctrl;
  logic [31:0]      mbr, bus, pario_in, sram_rdata, neq_bus;
  logic [15:0]      mar, neq_sram_addr, sram_addr;
  logic [4:0]       neq_esam_addr;
  logic [3:0]       status;
  logic             z, n, neq_ready, neq_error;

  four_phase_clock u_clk (.clk, .rst, .ph);

  control_store u_cs (.addr(mpc), .uinstr);

  control_unit u_cu (
    .clk, .rst, .ph, .uinstr, .status(status[1:0]),
    .neq_ready, .neq_error, .z, .n, .mpc, .ctrl
  );

  execution_unit u_eu (
    .clk, .rst, .ph, .r1(ctrl.r1), .r2(ctrl.r2), .alu_op(ctrl.alu_op),
    .shift_op(ctrl.shift_op), .bmux_mbr(ctrl.bmux_mbr), .reg_we(ctrl.reg_we),
    .mbr_op(ctrl.mbr_op), .mar_load(ctrl.mar_load), .bus_in(bus),
    .mbr, .mar, .z, .n
  );

  neq_component #(.WORDS(32)) u_neq (
    .clk, .rst, .ce(ph[3]), .cmd(ctrl.neq_cmd), .bus_in(mbr), .bus_out(neq_bus),
    .sram_addr(neq_sram_addr), .esam_addr(neq_esam_addr),
    .ready(neq_ready), .error(neq_error)
  );

  assign sram_addr = ctrl.adj_addr ? neq_sram_addr : mar;

  sram #(.DEPTH(65536), .WIDTH(32)) u_sram (
    .clk, .re(ctrl.sram_rd && ph[1]), .we(ctrl.sram_we && ph[3]),
    .addr(sram_addr), .wdata(mbr), .rdata(sram_rdata)
  );

  interface_unit u_if (
    .clk, .rst, .ce(ph[3]), .cs_data, .cs_status, .w_r, .inta, .host_wdata,
    .host_rdata, .intr, .bus_in(mbr), .pario_we(ctrl.pario_we),
    .intr_req(ctrl.intr_req), .copro_toggle(ctrl.st_toggle),
    .pario_in, .status
  );

  always_comb begin
    unique case (ctrl.bus_src)
      BUS_PARIO:    bus = pario_in;
      BUS_SRAM:     bus = sram_rdata;
      BUS_NEQ_DATA,
      BUS_NEQ_ADDR: bus = neq_bus;
      default:      bus = pario_in;
    endcase
  end

  // The ESAM word index is also visible as the low bits of the SRAM address.
  logic unused_addr;
  assign unused_addr = ^{neq_esam_addr, status[3:2]};

endmodule
