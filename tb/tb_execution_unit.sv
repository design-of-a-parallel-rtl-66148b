// tb_execution_unit: self-checking test of the execution unit data path
// (register file, A/B latches, BMUX, ALU, shifter, MBR, MAR).
//
// The four phase enables are generated here (CLK1..CLK4 one-hot, one per
// master clock). Each microinstruction holds its control fields for one
// four-clock period. 1500 random microinstructions (random registers,
// ALU and shift operations, B operand from register or MBR, register
// write, MBR load from shifter or bus, MAR load) are checked against a
// shadow model: the ALU zero/negative outputs during CLK3, and registers,
// MBR and MAR after CLK4. Timing checks: nothing is written before the
// CLK4 edge (register, MBR and MAR unchanged after the CLK1..CLK3 edges),
// so one microinstruction takes exactly four master clocks.
module tb_execution_unit;
  import pdes_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] ph = 4'b0001;
  logic [3:0] r1 = 0, r2 = 0;
  alu_op_e alu_op = ALU_PASSB;
  shift_op_e shift_op = SH_NONE;
  logic bmux_mbr = 0, reg_we = 0, mar_load = 0;
  mbr_op_e mbr_op = MBR_NOP;
  logic [31:0] bus_in = 0, mbr;
  logic [15:0] mar;
  logic z, n;
  logic [31:0] regs [16];
  logic [31:0] m_mbr = 0;
  logic [15:0] m_mar = 0;
  int checks = 0, failures = 0;

  execution_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ph <= rst ? 4'b0001 : {ph[2:0], ph[3]};

  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] alu_m(alu_op_e o, logic [31:0] a, logic [31:0] b);
    unique case (o)
      ALU_ADD: return a + b;   ALU_INC: return a + 1;   ALU_XOR: return a ^ b;
      ALU_OR:  return a | b;   ALU_SUB: return a - b;   ALU_AND: return a & b;
      ALU_DEC: return a - 1;   default: return b;
    endcase
  endfunction

  function automatic logic [31:0] sh_m(shift_op_e o, logic [31:0] d);
    unique case (o)
      SH_L1: return d << 1; SH_R1: return d >> 1; SH_L8: return d << 8; SH_R8: return d >> 8;
      default: return d;
    endcase
  endfunction

  initial begin
    alu_op_e aops [8] = '{ALU_ADD, ALU_INC, ALU_XOR, ALU_OR, ALU_SUB, ALU_AND, ALU_DEC, ALU_PASSB};
    shift_op_e sops [5] = '{SH_NONE, SH_L1, SH_R1, SH_L8, SH_R8};
    mbr_op_e mops [3] = '{MBR_NOP, MBR_LOAD_SHIFTER, MBR_LOAD_BUS};
    foreach (regs[i]) regs[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // align: the next edge is the CLK1 edge when ph[0] is high
    for (int k = 0; k < 1500; k++) begin
      logic [31:0] a, b, y, s;
      logic [31:0] r_before;
      logic [31:0] mbr_before;
      wait (ph[0]); @(negedge clk);
      // controls for this microinstruction, stable for four clocks
      r1 = 4'($urandom); r2 = 4'($urandom);
      alu_op = aops[$urandom_range(0, 7)];
      shift_op = sops[$urandom_range(0, 4)];
      bmux_mbr = $urandom_range(0, 1);
      reg_we = $urandom_range(0, 1);
      mbr_op = mops[$urandom_range(0, 2)];
      mar_load = $urandom_range(0, 1);
      bus_in = (k % 7 == 0) ? 0 : $urandom;
      a = regs[r1];
      b = bmux_mbr ? m_mbr : regs[r2];
      y = alu_m(alu_op, a, b);
      s = sh_m(shift_op, y);
      r_before = regs[r1];
      mbr_before = mbr;
      // CLK1, CLK2, CLK3 edges: nothing visible changes
      repeat (3) begin
        @(posedge clk); #1;
        check(dut.u_gpr.regs[r1] === r_before && mbr === mbr_before && mar === m_mar,
              "state changed before CLK4");
      end
      check(z === (y == 0) && n === y[31], $sformatf("flags op=%s y=%h z=%b n=%b", alu_op.name(), y, z, n));
      @(posedge clk); #1;     // CLK4 edge
      if (reg_we) regs[r1] = s;
      if (mbr_op == MBR_LOAD_SHIFTER) m_mbr = s;
      else if (mbr_op == MBR_LOAD_BUS) m_mbr = bus_in;
      if (mar_load) m_mar = a[15:0];
      check(mbr === m_mbr, $sformatf("MBR %h exp %h", mbr, m_mbr));
      check(mar === m_mar, $sformatf("MAR %h exp %h", mar, m_mar));
      for (int i = 0; i < 16; i++)
        check(dut.u_gpr.regs[i] === regs[i], $sformatf("R%0d %h exp %h", i, dut.u_gpr.regs[i], regs[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
