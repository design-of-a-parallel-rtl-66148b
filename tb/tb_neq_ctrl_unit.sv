// tb_neq_ctrl_unit: self-checking test of the NEQ control unit (FSM).
//
// The ESAM is replaced by the test: `match_stat` / `wdsel_stat` are driven
// directly. Each command is issued on a clock-filter edge (`ce`, one master
// clock in four, as in the coprocessor) and the FSM is then stepped with
// no command until `ready` or `error` rises. For each command the sequence
// of ESAM operations issued, their masks, the number of enabled edges taken
// (the NEQ latency) and the latch strobes are compared with the expected
// algorithm. It also checks that nothing moves on edges without `ce`.
// Covered: init, reserve (ok and out-of-words -> error1 -> idle1),
// write into a reserved word, into an unreserved word, ESAM full ->
// error2 -> idle2, findmin (ok and empty queue), search (hit and miss), and
// the data/address output enables. Latencies are this design's (one ESAM
// operation per state); the algorithms follow the document.
module tb_neq_ctrl_unit;
  import pdes_pkg::*;
  logic clk = 0, rst = 1, ce = 0;
  neq_cmd_e cmd = NEQ_NOP;
  logic match_stat = 0, wdsel_stat = 0;
  esam_op_e esam_op;
  logic esam_subset, force_v, v_bit, force_r, r_bit;
  logic [31:0] mask;
  logic ld_data_in, ld_data_out, ld_addr, oe_data, oe_addr, ready, error;
  int checks = 0, failures = 0;

  neq_ctrl_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  esam_op_e ops [$];
  logic [31:0] masks [$];
  int n_ld_in, n_ld_out, n_ld_addr;

  // One clock-filter period: 3 idle master clocks, then one enabled edge.
  task automatic tick(neq_cmd_e c);
    logic r0, e0;
    r0 = ready; e0 = error;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); cmd = c; ce = 0;
      @(posedge clk); #1;
      check(ready === r0 && error === e0, "state moved without ce");
    end
    @(negedge clk); cmd = c; ce = 1;
    if (esam_op != ESAM_NOP) begin ops.push_back(esam_op); masks.push_back(mask); end
    if (ld_data_in) n_ld_in++;
    if (ld_data_out) n_ld_out++;
    if (ld_addr) n_ld_addr++;
    @(posedge clk); #1;
    ce = 0; cmd = NEQ_NOP;
  endtask

  // Issue `c`, then step until ready/error. Returns the number of enabled
  // edges from the command edge to the one that made ready/error visible.
  task automatic run(neq_cmd_e c, output int edges);
    ops.delete(); masks.delete(); n_ld_in = 0; n_ld_out = 0; n_ld_addr = 0;
    tick(c);
    edges = 1;
    while (!ready && !error && edges < 40) begin tick(NEQ_NOP); edges++; end
  endtask

  function automatic string opstr();
    string s = "";
    foreach (ops[i]) s = {s, " ", ops[i].name()};
    return s;
  endfunction

  initial begin
    int e;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    check(ready && !error && esam_op == ESAM_NOP, "idle1 after reset");

    // init: write-all, search-all-equal
    run(NEQ_GO, e);
    check(e == 3 && ready, $sformatf("init took %0d edges", e));
    check(ops.size() == 2 && ops[0] == ESAM_WRITE_ALL && ops[1] == ESAM_SRCH_EQ, {"init ops", opstr()});
    check(n_ld_in == 1, "init latched ESAM_DATA_IN");

    // reserve ok
    wdsel_stat = 1;
    run(NEQ_GO, e);
    check(e == 3 && ready && !error, $sformatf("reserve took %0d edges", e));
    check(ops.size() == 1 && ops[0] == ESAM_WRITE_WORD && masks[0] == '1, {"reserve ops", opstr()});

    // reserve with no word left -> error1, GO -> idle1, re-init
    wdsel_stat = 0;
    run(NEQ_GO, e);
    check(error && !ready, "reserve overflow -> error1");
    run(NEQ_GO, e);
    check(ready && !error, "error1 cleared to idle1");
    run(NEQ_GO, e);
    check(ready && e == 3, "re-init");

    // write into a reserved word (first search hits)
    match_stat = 1;
    run(NEQ_WRITE, e);
    check(e == 5 && ready, $sformatf("reserved write took %0d edges", e));
    check(ops.size() == 2 && ops[0] == ESAM_SRCH_EQ && ops[1] == ESAM_WRITE_WORD, {"reserved write ops", opstr()});
    check(masks.size() == 2 && masks[0] == (M_VALID | M_RSV | M_TOLP | M_FROM) && masks[1] == ~M_RSV, "reserved write masks");
    check(n_ld_addr == 1, "address latched after write");

    // write into an unreserved word: first search misses, second hits
    fork
      run(NEQ_WRITE, e);
      begin
        wait (dut.state == dut.S_WRITE2); match_stat = 0;
        wait (dut.state == dut.S_WRITE4); match_stat = 1;
      end
    join
    check(e == 7 && ready, $sformatf("unreserved write took %0d edges", e));
    check(ops.size() == 3 && ops[1] == ESAM_SRCH_EQ && masks[1] == (M_VALID | M_RSV) && ops[2] == ESAM_WRITE_WORD,
          {"unreserved write ops", opstr()});

    // ESAM full
    match_stat = 0;
    run(NEQ_WRITE, e);
    check(error && !ready && e == 5, $sformatf("ESAM full -> error2 after %0d edges", e));
    run(NEQ_GO, e);
    check(ready && !error && e == 1, "error2 cleared to idle2");

    // findmin
    match_stat = 1;
    run(NEQ_FINDMIN, e);
    check(e == 9 && ready, $sformatf("findmin took %0d edges", e));
    check(ops.size() == 6 && ops[0] == ESAM_SRCH_EQ && ops[1] == ESAM_SRCH_MIN && ops[2] == ESAM_READ_WORD
          && ops[3] == ESAM_SRCH_EQ && ops[4] == ESAM_SRCH_MIN && ops[5] == ESAM_WRITE_WORD, {"findmin ops", opstr()});
    check(masks.size() == 6 && masks[1] == M_TIME && masks[5] == M_VALID, "findmin masks");
    check(n_ld_out == 1 && n_ld_addr == 1, "findmin latched data and address");

    // findmin on an empty queue
    match_stat = 0;
    run(NEQ_FINDMIN, e);
    check(error && e == 3, "findmin empty -> error2");
    run(NEQ_GO, e);

    // search hit / miss
    match_stat = 1;
    run(NEQ_GO, e);
    check(ready && e == 3 && ops.size() == 1 && masks[0] == (M_VALID | M_TOLP | M_FROM), "search hit");
    match_stat = 0;
    run(NEQ_GO, e);
    check(error && e == 3, "search miss -> error2");
    run(NEQ_GO, e);

    // output enables only in idle2 with the matching command
    @(negedge clk); cmd = NEQ_OUT_DATA; #1;
    check(oe_data && !oe_addr, "OUT_DATA enables data latch");
    cmd = NEQ_OUT_ADDR; #1;
    check(oe_addr && !oe_data, "OUT_ADDR enables address latch");
    cmd = NEQ_NOP; #1;
    check(!oe_addr && !oe_data, "no output enable on NOP");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
