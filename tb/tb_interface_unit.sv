// tb_interface_unit: self-checking test of the host interface (status
// register, PARIO input/output buffers, interrupt vector register).
//
// The coprocessor side is stepped by `ce` (one master clock in four, the
// CLK4 phase). 3000 random cycles mix host data writes, host status
// toggles (at any clock, including on the ce clock), coprocessor toggles,
// coprocessor writes of the output buffer, interrupt requests, interrupt
// acknowledges and host reads. A model kept here predicts the status
// register (changed only by toggling, host toggles taking effect on the
// next ce edge, so within four clocks), the buffers, INTR and the vector.
// Host reads are combinational and are checked in the same cycle.
module tb_interface_unit;
  logic clk = 0, rst = 1, ce = 0;
  logic cs_data = 0, cs_status = 0, w_r = 0, inta = 0;
  logic [31:0] host_wdata = 0, host_rdata, bus_in = 0, pario_in;
  logic intr, pario_we = 0, intr_req = 0;
  logic [3:0] copro_toggle = 0, status;
  int checks = 0, failures = 0;
  int n_same_cycle = 0, n_intr = 0;

  interface_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [3:0] m_status = 0, m_pending = 0;
  logic [31:0] m_in = 0, m_out = 0;
  logic [7:0] m_vec = 0;
  logic m_intr = 0;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    #1 check(status === 0 && intr === 0 && pario_in === 0, "reset state");
    for (int c = 0; c < 3000; c++) begin
      int act;
      @(negedge clk);
      ce = (c % 4 == 3);
      cs_data = 0; cs_status = 0; w_r = 0; inta = 0;
      pario_we = 0; intr_req = 0; copro_toggle = 0;
      act = $urandom_range(0, 5);
      host_wdata = $urandom;
      case (act)
        0: begin cs_data = 1; w_r = 1; end
        1: begin cs_status = 1; w_r = 1; end
        2: begin cs_data = 1; end
        3: begin cs_status = 1; end
        4: if (m_intr) inta = 1;
        default: ;
      endcase
      if (ce) begin
        copro_toggle = 4'($urandom);
        pario_we = $urandom_range(0, 1);
        intr_req = ($urandom_range(0, 7) == 0);
        bus_in = $urandom;
      end
      #1;
      // combinational host reads
      if (inta) check(host_rdata === {24'h0, m_vec}, "INTA returns vector");
      else if (act == 2) check(host_rdata === m_out, "host reads output buffer");
      else if (act == 3) check(host_rdata === {28'h0, m_status}, $sformatf("status %b exp %b", host_rdata[3:0], m_status));
      // model update for this edge
      if (cs_data && w_r) m_in = host_wdata;
      if (ce) begin
        if (cs_status && w_r) n_same_cycle++;
        m_status = m_status ^ m_pending ^ copro_toggle ^ ((cs_status && w_r) ? host_wdata[3:0] : 4'h0);
        m_pending = 0;
        if (pario_we) m_out = bus_in;
      end else if (cs_status && w_r) m_pending ^= host_wdata[3:0];
      if (inta) m_intr = 0;
      if (ce && intr_req) begin m_intr = 1; m_vec = bus_in[7:0]; n_intr++; end
      @(posedge clk); #1;
      check(status === m_status, $sformatf("cycle %0d status %b exp %b", c, status, m_status));
      check(pario_in === m_in && intr === m_intr, "buffer / INTR");
    end
    check(n_same_cycle > 0 && n_intr > 0, "host toggle on ce clock and interrupts occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
