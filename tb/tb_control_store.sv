// tb_control_store: self-checking test of the 1024 x 16 microcode control
// store.
//
// Reads every word through the address port (combinational, checked 1 time
// unit after the address changes) and checks the assembled microprogram
// for consistency: the overlap marker in the last word is absent; the reset
// entry sets the ready bit and the fetch loop waits for host data at its
// own address; the fetch routine dispatches to the four macroinstruction
// routines; every branch target lands on a word that belongs to a
// routine; unused words send the sequencer back to address 0.
module tb_control_store;
  import pdes_pkg::*;
  import microcode_pkg::*;
  logic [9:0] addr;
  logic [15:0] uinstr;
  logic [15:0] w [1024];
  int checks = 0, failures = 0;

  control_store dut (.addr, .uinstr);

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic bit is_branch(logic [5:0] op);
    return op >= 6'd57;
  endfunction

  initial begin
    bit seen_pm, seen_ge, seen_pe, seen_is;
    int used;
    seen_pm = 0; seen_ge = 0; seen_pe = 0; seen_is = 0; used = 0;
    for (int a = 0; a < 1024; a++) begin
      addr = 10'(a); #1;
      w[a] = uinstr;
    end
    check(w[1023] != BAD_MARK, "routines overlap");
    check(w[A_INIT][15:10] == UI_TGL_ST3, "reset entry toggles ready");
    check(w[A_FETCH] == {UI_J_NST1, 10'(A_FETCH)}, "fetch waits for host data");
    for (int a = 0; a < 1024; a++) begin
      if (w[a] != FILL) used++;
      if (is_branch(w[a][15:10])) begin
        int t;
        t = int'(w[a][9:0]);
        check(w[t] != FILL || t == 0, $sformatf("branch at %0d to unused word %0d", a, t));
      end
      if (a >= A_FETCH && a < A_POST_MSG && w[a][15:10] == UI_JN) begin
        if (w[a][9:0] == A_POST_MSG) seen_pm = 1;
        if (w[a][9:0] == A_GET_EVT)  seen_ge = 1;
        if (w[a][9:0] == A_POST_EVT) seen_pe = 1;
        if (w[a][9:0] == A_INIT_SIM) seen_is = 1;
      end
    end
    check(seen_pm && seen_ge && seen_pe && seen_is, "fetch dispatches to all four routines");
    check(used > 200, $sformatf("only %0d words used", used));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
