// tb_control_unit: self-checking test of the microcode sequencer (MPC,
// decode unit, micro-sequencing logic, NZ flag register).
//
// A small microprogram held here replaces the control store. It exercises
// every branch condition both taken and not taken (negative, zero,
// status(1)=0, status(0)=1, NEQ not ready, NEQ error, jump), the flag
// register (loaded only by register operations, during CLK3) and the
// reset of the MPC. The test drives z/n, the status bits and the NEQ
// ready/error lines for each address and compares the MPC trace with the
// expected one. It also checks the decoded control word for a
// representative set of microinstructions, and that the MPC changes only
// on the CLK4 edge, exactly once every four master clocks.
module tb_control_unit;
  import pdes_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] ph = 4'b0001;
  logic [15:0] uinstr;
  logic [1:0] status = 0;
  logic neq_ready = 1, neq_error = 0, z = 0, n = 0;
  logic [9:0] mpc;
  uctrl_t ctrl;
  logic [15:0] rom [1024];
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ph <= rst ? 4'b0001 : {ph[2:0], ph[3]};
  assign uinstr = rom[mpc];

  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] J(uinstr_e op, int t);
    return {op, 10'(t)};
  endfunction
  function automatic logic [15:0] R(uinstr_e op, int a, int b);
    return {op, 2'b00, 4'(a), 4'(b)};
  endfunction

  // inputs driven while the instruction at each address executes
  function automatic void drive(int a);
    z = 0; n = 0; status = 2'b00; neq_ready = 1; neq_error = 0;
    case (a)
      0:  z = 1;                 // ADD sets Z
      11: status = 2'b10;        // J_NST1 not taken
      12: status = 2'b01;        // J_ST0 taken
      20: neq_ready = 0;         // J_NEQ_BUSY taken
      30: neq_error = 1;         // J_NEQ_BUSY not taken (error), J_NEQ_ERR follows
      31: neq_error = 1;         // J_NEQ_ERR taken
      40: n = 1;                 // AND sets N
      42: z = 1;                 // MBR_R2 does not load flags
      default: ;
    endcase
  endfunction

  int exp_trace [] = '{0, 1, 10, 11, 12, 20, 30, 31, 40, 41, 42, 43, 44, 45, 46};

  initial begin
    int last_change;
    foreach (rom[i]) rom[i] = J(UI_JMP, 0);
    rom[0]  = R(UI_ADD, 3, 4);
    rom[1]  = J(UI_JZ, 10);
    rom[11] = J(UI_J_NST1, 90);
    rom[12] = J(UI_J_ST0, 20);
    rom[20] = J(UI_J_NEQ_BUSY, 30);
    rom[30] = J(UI_J_NEQ_BUSY, 90);
    rom[31] = J(UI_J_NEQ_ERR, 40);
    rom[40] = R(UI_AND, 1, 2);
    rom[41] = J(UI_JN, 42);
    rom[42] = R(UI_MBR_R2, 0, 5);
    rom[43] = J(UI_JZ, 90);
    rom[44] = J(UI_JN, 45);
    rom[45] = R(UI_TGL_ST3, 0, 0);
    rom[46] = J(UI_JMP, 100);
    rom[10] = J(UI_J_NST1, 11);           // status(1)=0: taken, target is the next address
    repeat (3) @(posedge clk);
    check(mpc === 0, "MPC cleared by reset");
    @(negedge clk) rst = 0;
    last_change = 0;
    for (int i = 0; i < exp_trace.size(); i++) begin
      int cyc;
      check(mpc === 10'(exp_trace[i]), $sformatf("step %0d: MPC %0d exp %0d", i, mpc, exp_trace[i]));
      drive(mpc);
      cyc = 0;
      // the instruction runs for 4 clocks; MPC must hold for the first 3
      repeat (3) begin
        @(posedge clk); #1 cyc++;
        check(mpc === 10'(exp_trace[i]), "MPC changed before CLK4");
        if (ph[3]) begin       // CLK3 edge done: check the decoded control word
          case (exp_trace[i])
            0:  check(ctrl.alu_op == ALU_ADD && ctrl.reg_we && ctrl.flag_we && ctrl.r1 == 3 && ctrl.r2 == 4, "decode ADD");
            40: check(ctrl.alu_op == ALU_AND && ctrl.reg_we && ctrl.flag_we, "decode AND");
            42: check(ctrl.mbr_op == MBR_LOAD_SHIFTER && !ctrl.reg_we && !ctrl.flag_we && ctrl.r2 == 5, "decode MBR<-R2");
            45: check(ctrl.st_toggle == 4'b1000 && ctrl.msl_op == MSL_NEXT, "decode toggle ready");
            1:  check(ctrl.msl_op == MSL_ZERO && ctrl.target == 10, "decode JZ");
            default: ;
          endcase
        end
      end
      @(posedge clk); #1;
    end
    // decode of one-word operations, one per four clocks
    begin
      uinstr_e ops [10] = '{UI_ADJ_WR, UI_ADJ_RD, UI_INTR, UI_SRAM_RD, UI_SRAM_WR, UI_NEQ_WRITE,
                            UI_NEQ_FMIN, UI_NEQ_READ, UI_MBR_PARIO, UI_PARIO_MBR};
      for (int k = 0; k < 10; k++) rom[100 + k] = R(ops[k], 0, 0);
      rom[110] = J(UI_JMP, 110);
      wait (mpc == 100);
      for (int k = 0; k < 10; k++) begin
        wait (ph[1]); @(posedge clk); #1;   // ctrl decoded for this address
        unique case (ops[k])
          UI_ADJ_WR:    check(ctrl.sram_we && ctrl.adj_addr, "decode adjacent write");
          UI_ADJ_RD:    check(ctrl.sram_rd && ctrl.adj_addr && ctrl.bus_src == BUS_SRAM, "decode adjacent read");
          UI_INTR:      check(ctrl.intr_req, "decode interrupt");
          UI_SRAM_RD:   check(ctrl.sram_rd && !ctrl.adj_addr && ctrl.mbr_op == MBR_LOAD_BUS, "decode SRAM read");
          UI_SRAM_WR:   check(ctrl.sram_we && !ctrl.adj_addr, "decode SRAM write");
          UI_NEQ_WRITE: check(ctrl.neq_cmd == NEQ_WRITE, "decode NEQ write");
          UI_NEQ_FMIN:  check(ctrl.neq_cmd == NEQ_FINDMIN, "decode NEQ findmin");
          UI_NEQ_READ:  check(ctrl.neq_cmd == NEQ_OUT_DATA && ctrl.bus_src == BUS_NEQ_DATA, "decode NEQ read");
          UI_MBR_PARIO: check(ctrl.mbr_op == MBR_LOAD_BUS && ctrl.bus_src == BUS_PARIO, "decode MBR<-PARIO");
          UI_PARIO_MBR: check(ctrl.pario_we, "decode PARIO<-MBR");
          default: ;
        endcase
        wait (ph[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rate: the MPC changes only on the CLK4 edge, four clocks apart
  int since = 0, changes = 0;
  logic [9:0] prev_mpc = 0;
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      since++;
      if (mpc != prev_mpc) begin
        changes++;
        checks++;
        if (ph != 4'b0001 || (changes > 1 && since != 4)) begin
          failures++;
          $display("FAIL MPC changed after %0d clocks, phase %b", since, ph);
        end
        since = 0;
      end
    end
    prev_mpc = mpc;
  end
endmodule
