// interface_unit: host interface of the coprocessor.
//
// A general-purpose 32-bit I/O port. Parts:
//   * signal generator: decodes CS_DATA, CS_STATUS, W_R and INTA
//       W_R CS_DATA CS_STATUS
//        1     1       0      host writes the PARIO input buffer
//        0     1       0      host reads the PARIO output buffer
//        1     0       1      host toggles status bits (1s in data[3:0])
//        0     0       1      host reads the status register
//       INTA returns the interrupt vector on data[7:0] and drops INTR.
//   * PARIO buffer: a 32-bit input buffer (host -> coprocessor) and a
//     32-bit output buffer (coprocessor -> host).
//   * STATUS_WORD: 4 bits, changed only by toggling. Bit 3 ready, bit 2
//     error, bit 1 data-in full, bit 0 data-out full. The host sets bit 1
//     after writing data and clears bit 0 after reading; the coprocessor
//     does the reverse.
//   * INTERRUPT_REG: 8-bit vector latched from the internal bus (low byte of
//     the MBR) when the coprocessor requests an interrupt.
//   * clock filter: status toggles from both sides take effect on edges with
//     `ce` high (once per four master clocks); host toggles that arrive in
//     between are held until then and combined by XOR with the
//     coprocessor's.
// Host accesses are single-cycle strobes; reads are combinational on
// `host_rdata`. The bidirectional host data bus of the original is split
// into `host_wdata` and `host_rdata`.
//
// Register set, status-bit meaning, toggle protocol and truth table follow
// the document. Holding early host toggles until the filter edge and
// splitting the data bus are this design's choices.
module interface_unit (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  // host side
  input  logic        cs_data,
  input  logic        cs_status,
  input  logic        w_r,
  input  logic        inta,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        intr,
  // coprocessor side
  input  logic [31:0] bus_in,      // MBR
  input  logic        pario_we,    // output buffer <= bus_in (on ce)
  input  logic        intr_req,    // vector <= bus_in[7:0], INTR high (on ce)
  input  logic [3:0]  copro_toggle,
  output logic [31:0] pario_in,    // input buffer towards the MBR
  output logic [3:0]  status
);
  logic [31:0] out_buf;
  logic [7:0]  vector;
  logic [3:0]  host_pending;
  logic        host_wr_data, host_tgl;

  assign host_wr_data = cs_data && !cs_status && w_r;
  assign host_tgl     = cs_status && !cs_data && w_r;

  always_ff @(posedge clk) begin
    if (rst) begin
      pario_in     <= '0;
      out_buf      <= '0;
      vector       <= '0;
      intr         <= 1'b0;
      status       <= '0;
      host_pending <= '0;
    end else begin
      if (host_wr_data) pario_in <= host_wdata;
      if (ce) begin
        status       <= status ^ host_pending ^ copro_toggle ^ (host_tgl ? host_wdata[3:0] : 4'b0);
        host_pending <= '0;
        if (pario_we) out_buf <= bus_in;
      end else if (host_tgl) begin
        host_pending <= host_pending ^ host_wdata[3:0];
      end
      if (inta) intr <= 1'b0;
      if (ce && intr_req) begin
        vector <= bus_in[7:0];
        intr   <= 1'b1;
      end
    end
  end

  always_comb begin
    host_rdata = '0;
    if (inta)                         host_rdata = {24'h0, vector};
    else if (cs_data && !w_r)         host_rdata = out_buf;
    else if (cs_status && !w_r)       host_rdata = {28'h0, status};
  end

  // Only one of the two buffers may be selected at a time.
  always_ff @(posedge clk) begin
    if (!rst) assert (!(cs_data && cs_status))
      else $error("interface_unit: CS_DATA and CS_STATUS both asserted");
  end
endmodule
