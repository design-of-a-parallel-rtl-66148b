// tb_neq_component: self-checking test of the Next Event Queue component
// (FSM + ESAM + latches + address encoder).
//
// A queue-level reference model is kept here: reserved words per input
// arc, valid events with recipient LP, sender and time tag, and the
// adjacent-memory address each event was given. After init and four
// reservations, 3000 random commands are applied: Write (post a message),
// FindMin for an LP (must return the smallest time tag of that LP, the
// same ESAM address the event got on write, and remove it), Search for an
// event on a given arc, and Clear after each error. Errors (ESAM full,
// empty queue, no event on arc) must occur exactly when the model says so.
// Commands are given on clock-filter edges (`ce` once per 4 master
// clocks). The document's key property, that FindMin takes the same time
// whatever the queue occupancy, is checked: every successful FindMin must
// take the same number of enabled edges (9 here).
module tb_neq_component;
  import pdes_pkg::*;
  logic clk = 0, rst = 1, ce = 0;
  neq_cmd_e cmd = NEQ_NOP;
  logic [31:0] bus_in = 0, bus_out;
  logic [15:0] sram_addr;
  logic [4:0] esam_addr;
  logic ready, error;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_min = 0, n_srch_hit = 0, n_srch_miss = 0, n_rsv_wr = 0;

  neq_component #(.WORDS(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic tick(neq_cmd_e c, logic [31:0] d);
    repeat (3) begin @(negedge clk); ce = 0; cmd = NEQ_NOP; @(posedge clk); end
    @(negedge clk); ce = 1; cmd = c; bus_in = d;
    @(posedge clk); #1 ce = 0; cmd = NEQ_NOP;
  endtask

  task automatic run(neq_cmd_e c, logic [31:0] d, output int edges);
    tick(c, d);
    edges = 1;
    while (!ready && !error && edges < 40) begin tick(NEQ_NOP, 0); edges++; end
  endtask

  function automatic logic [31:0] word(int lp, int from, int t);
    return {1'b0, 5'(lp), 8'(from), 1'b0, 17'(t)};
  endfunction

  // ---- reference model ----
  typedef struct { int lp; int from; int t; int addr; } ev_t;
  ev_t evs [$];
  int rsv_keys [$];          // lp*256+from of each reserved word
  bit used_t [int];

  function automatic bit rsv_free(int key);
    int nrsv = 0, nvalid = 0;
    foreach (rsv_keys[i]) if (rsv_keys[i] == key) nrsv++;
    foreach (evs[i]) if (evs[i].lp * 256 + evs[i].from == key && evs[i].addr >= 1000) nvalid++;
    return nrsv > nvalid;
  endfunction

  int n_unrsv_used = 0;

  initial begin
    int e, lps [4] = '{1, 1, 2, 3}, froms [4] = '{9, 18, 9, 0};
    int min_edges = -1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    run(NEQ_GO, 0, e);
    check(ready && !error, "init");
    foreach (lps[i]) begin
      run(NEQ_GO, word(lps[i], froms[i], 0), e);
      check(ready && !error, "reserve");
      rsv_keys.push_back(lps[i] * 256 + froms[i]);
    end
    for (int it = 0; it < 3000; it++) begin
      int kind, lp, from, t;
      kind = $urandom_range(0, 9);
      lp = $urandom_range(0, 3);
      from = (kind < 5) ? froms[$urandom_range(0, 3)] : $urandom_range(0, 20);
      if (kind < 6) begin
        // ---- write ----
        bit to_rsv, ok;
        do t = $urandom_range(1, 131071); while (used_t.exists(t));
        to_rsv = rsv_free(lp * 256 + from);
        ok = to_rsv || (n_unrsv_used < 32 - rsv_keys.size());
        run(NEQ_WRITE, word(lp, from, t), e);
        if (!ok) begin
          check(error, "ESAM full not flagged");
          n_full++;
          run(NEQ_GO, 0, e);
          check(ready, "clear after full");
        end else begin
          ev_t v;
          check(ready && !error, $sformatf("write failed (rsv=%0d used=%0d)", to_rsv, n_unrsv_used));
          @(negedge clk) cmd = NEQ_OUT_ADDR; #1;
          check(bus_out == {16'h0, ADJ_BASE | 16'(esam_addr)}, "OUT_ADDR value");
          cmd = NEQ_NOP;
          v.lp = lp; v.from = from; v.t = t;
          // reserved words are marked by addr+1000 in the model
          v.addr = to_rsv ? 1000 + int'(esam_addr) : int'(esam_addr);
          if (to_rsv) n_rsv_wr++; else n_unrsv_used++;
          evs.push_back(v);
          used_t[t] = 1;
        end
      end else if (kind < 8) begin
        // ---- findmin ----
        int best;
        best = -1;
        foreach (evs[i]) if (evs[i].lp == lp && (best < 0 || evs[i].t < evs[best].t)) best = i;
        run(NEQ_FINDMIN, word(lp, 0, 0), e);
        if (best < 0) begin
          check(error, "empty queue not flagged");
          n_empty++;
          run(NEQ_GO, 0, e);
        end else begin
          check(ready && !error, "findmin failed");
          if (min_edges < 0) min_edges = e;
          check(e == min_edges, $sformatf("findmin took %0d edges, earlier %0d", e, min_edges));
          @(negedge clk) cmd = NEQ_OUT_DATA; #1;
          check(bus_out[EW_VALID] && bus_out[16:0] == 17'(evs[best].t) && bus_out[30:26] == 5'(lp)
                && bus_out[25:18] == 8'(evs[best].from),
                $sformatf("findmin lp %0d word %h exp t=%0d from=%0d", lp, bus_out, evs[best].t, evs[best].from));
          check(int'(esam_addr) == evs[best].addr % 1000, "findmin address");
          cmd = NEQ_NOP;
          if (evs[best].addr < 1000) n_unrsv_used--;
          used_t.delete(evs[best].t);
          evs.delete(best);
          n_min++;
        end
      end else begin
        // ---- search ----
        bit any;
        any = 0;
        foreach (evs[i]) if (evs[i].lp == lp && evs[i].from == from) any = 1;
        run(NEQ_GO, word(lp, from, 0), e);
        if (any) begin check(ready && !error, "search hit"); n_srch_hit++; end
        else begin check(error, "search miss not flagged"); n_srch_miss++; run(NEQ_GO, 0, e); end
      end
    end
    $display("full=%0d empty=%0d min=%0d srch_hit=%0d srch_miss=%0d rsv_writes=%0d min_edges=%0d",
             n_full, n_empty, n_min, n_srch_hit, n_srch_miss, n_rsv_wr, min_edges);
    check(n_full > 0 && n_empty > 0 && n_min > 0 && n_srch_hit > 0 && n_srch_miss > 0 && n_rsv_wr > 0,
          "every path exercised");
    check(min_edges == 9, "findmin latency 9 clock-filter edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
