// neq_component: the Next Event Queue component.
//
// Keeps one ESAM word per queued message (valid bit, recipient LP, sender
// node/LP, reserved bit, 17-bit time tag) and finds the minimum-time event
// of an LP in a fixed number of steps whatever the queue occupancy. The
// event's 32-bit memory pointer is not stored here but in the shared SRAM
// at the address this component reports (adjacent data).
//
// Parts: the ESAM, the NEQ control unit (FSM), the ESAM_DATA_IN,
// ESAM_DATA_OUT and ESAM_ADDR_OUT latches, the address encoder, and the
// clock filter, which is the `ce` input: the component advances one step on
// each master-clock edge where `ce` is high (one edge in four in the
// coprocessor).
//
// Interface: `cmd` and `bus_in` are sampled on enabled edges while the
// component is idle; `ready` falls on the next enabled edge and rises when
// the operation is done; `error` flags a full ESAM, an empty queue, an arc
// with no event, or too many reservations. While idle, cmd=NEQ_OUT_DATA
// drives ESAM_DATA_OUT and cmd=NEQ_OUT_ADDR drives the 16-bit adjacent SRAM
// address onto `bus_out` (zero otherwise). `sram_addr` always carries the
// ESAM_ADDR_OUT latch as an SRAM address.
//
// Structure follows the document. Driving the valid and reserved bits from
// the FSM over the latched data word also follows it (DATA_IN(31) and
// DATA_IN(17) are FSM outputs there).
module neq_component
  import pdes_pkg::*;
#(
  parameter int WORDS = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  neq_cmd_e    cmd,
  input  logic [31:0] bus_in,
  output logic [31:0] bus_out,
  output logic [15:0] sram_addr,
  output logic [$clog2(WORDS)-1:0] esam_addr,
  output logic        ready,
  output logic        error
);

  esam_op_e    fsm_op, op;
  logic        subset, force_v, v_bit, force_r, r_bit;
  logic [31:0] mask, data_in_q, data_out_q, esam_data, rdata;
  logic        ld_data_in, ld_data_out, ld_addr, oe_data, oe_addr;
  logic        match_stat, wdsel_stat;
  logic [WORDS-1:0] match, sel;
  logic [$clog2(WORDS)-1:0] enc_addr, addr_q;
  logic [15:0] enc_sram, sram_q;

  neq_ctrl_unit u_ctrl (
    .clk, .rst, .ce, .cmd, .match_stat, .wdsel_stat,
    .esam_op(fsm_op), .esam_subset(subset), .force_v, .v_bit, .force_r, .r_bit,
    .mask, .ld_data_in, .ld_data_out, .ld_addr, .oe_data, .oe_addr, .ready, .error
  );

  always_comb begin
    esam_data = data_in_q;
    if (force_v) esam_data[EW_VALID] = v_bit;
    if (force_r) esam_data[EW_RSV]   = r_bit;
  end

  assign op = ce ? fsm_op : ESAM_NOP;

  esam #(.WORDS(WORDS), .WIDTH(32)) u_esam (
    .clk, .rst, .op, .subset, .data(esam_data), .mask,
    .match, .match_stat, .wdsel_stat, .sel, .rdata
  );

  neq_addr_encoder #(.WORDS(WORDS)) u_enc (
    .sel, .addr(enc_addr), .sram_addr(enc_sram)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      data_in_q  <= '0;
      data_out_q <= '0;
      addr_q     <= '0;
      sram_q     <= ADJ_BASE;
    end else begin
      if (ld_data_in)       data_in_q  <= bus_in;
      if (ce && ld_data_out) data_out_q <= rdata;
      if (ce && ld_addr) begin
        addr_q <= enc_addr;
        sram_q <= enc_sram;
      end
    end
  end

  assign esam_addr = addr_q;
  assign sram_addr = sram_q;
  assign bus_out   = oe_data ? data_out_q :
                     oe_addr ? {16'h0000, sram_addr} : '0;

  // The full match vector is used only inside the ESAM.
  logic unused_match;
  assign unused_match = ^match;

endmodule
