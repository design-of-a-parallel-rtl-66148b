// tb_des_coprocessor: end-to-end test of the coprocessor at its default
// parameters.
//
// A behavioural host drives the interface unit the way a node processor
// would: it polls the status register, writes opcodes and operands into the
// PARIO buffer and toggles the data-in bit, acknowledges interrupts and
// reads each interrupt's operands, and reads error vectors.
//
// Sequence (LP 2 on node 2, three input arcs from 0/0, 1/1, 2/2, three
// output arcs to 2/2, 3/3, 4/4, LP delay 5):
//   1  Initialize Coprocessor with the dedicated register values
//   2  Initialize Simulation       -> null messages at time 5 on 3 arcs
//   3  Post Message null t=5 from 0/0, real t=7 ptr 15 from 1/1,
//      real t=8 ptr 31 from 2/2
//   4  Get Event                   -> null retrieved: nulls at time 10
//   5  Get Event                   -> arc 0/0 now empty: error vector 255
//   6  Post Message real t=9 from 0/0, Get Event -> real event t=7 ptr 15
//   7  Post Event (real message sent to 3/3 at t=12) -> nulls to 2/2, 4/4
//   8  Post Messages from an arc with no reserved word until the ESAM is
//      full -> error vector 1 on the 30th (29 unreserved words)
// Every reply is compared with values worked out here from the protocol.
// Mechanisms counted (each must occur): null/real/post-event interrupts,
// unsafe error, ESAM-full error, writes into reserved and unreserved ESAM
// words, an arc becoming empty on Get Event, the control engine waiting on
// the NEQ component. The rate of one microinstruction per four master
// clocks is checked on every clock.
module tb_des_coprocessor;
  import pdes_pkg::*;

  logic clk = 0, rst = 1;
  logic cs_data = 0, cs_status = 0, w_r = 0, inta = 0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic intr;

  int checks = 0, failures = 0;
  int n_null_int = 0, n_real_int = 0, n_pe_int = 0, n_err_unsafe = 0, n_err_full = 0;
  int n_wr_rsv = 0, n_wr_unrsv = 0, n_arc_empty = 0, n_neq_wait = 0;

  des_coprocessor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------- mechanism probes ----------
  logic [9:0] last_mpc;
  int since_change = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_neq.u_ctrl.ce && dut.u_neq.u_ctrl.state == dut.u_neq.u_ctrl.S_WRITE2 && dut.u_neq.match_stat)
      n_wr_rsv++;
    if (dut.u_neq.u_ctrl.ce && dut.u_neq.u_ctrl.state == dut.u_neq.u_ctrl.S_WRITE5 && dut.u_neq.match_stat)
      n_wr_unrsv++;
    if (dut.u_neq.u_ctrl.ce && dut.u_neq.u_ctrl.state == dut.u_neq.u_ctrl.S_SRCH2 && !dut.u_neq.match_stat)
      n_arc_empty++;
    if (dut.ph[3] && dut.ctrl.msl_op == MSL_NEQ_BUSY && !dut.neq_ready)
      n_neq_wait++;
  end

  // MPC may only change on the CLK4 edge: one microinstruction per 4 clocks.
  int rate_errs = 0;
  always @(posedge clk) begin
    if (!rst && dut.mpc != last_mpc && !$past(dut.ph[3])) rate_errs++;
    last_mpc <= dut.mpc;
  end

  // ---------- host bus primitives ----------
  task automatic bus_write(input bit data_not_status, input logic [31:0] d);
    @(negedge clk);
    cs_data = data_not_status; cs_status = !data_not_status; w_r = 1; host_wdata = d;
    @(negedge clk);
    cs_data = 0; cs_status = 0; w_r = 0;
  endtask

  task automatic bus_read(input bit data_not_status, output logic [31:0] d);
    @(negedge clk);
    cs_data = data_not_status; cs_status = !data_not_status; w_r = 0;
    #1 d = host_rdata;
    @(negedge clk);
    cs_data = 0; cs_status = 0;
  endtask

  task automatic get_status(output logic [3:0] s);
    logic [31:0] d;
    bus_read(0, d);
    s = d[3:0];
  endtask

  task automatic send_word(input logic [31:0] w, input bit is_opcode);
    logic [3:0] s;
    do get_status(s); while (s[ST_DATA_IN] || (is_opcode && !s[ST_READY]));
    bus_write(1, w);
    bus_write(0, 32'h2);            // data-in full
    repeat (6) @(posedge clk);
  endtask

  task automatic recv_word(output logic [31:0] w);
    logic [3:0] s;
    do get_status(s); while (!s[ST_DATA_OUT]);
    bus_read(1, w);
    bus_write(0, 32'h1);            // data-out empty
    repeat (6) @(posedge clk);
  endtask

  function automatic logic [31:0] opw(logic [5:0] id, int tn, int tl, int fn, int fl, int cnt);
    return {id, 3'(tn), 5'(tl), 3'(fn), 5'(fl), 10'(cnt)};
  endfunction
  function automatic logic [31:0] arc(int nd, int lp);
    return {14'h0, 3'(nd), 5'(lp), 10'h0};
  endfunction
  function automatic logic [31:0] hdr(int tn, int tl, int fn, int fl, int cnt);
    return {6'h0, 3'(tn), 5'(tl), 3'(fn), 5'(fl), 10'(cnt)};
  endfunction

  // ---------- replies ----------
  typedef struct { logic [7:0] vec; logic [31:0] h; logic [31:0] t; logic [31:0] p; } msg_t;
  msg_t got[$];
  logic [31:0] err_vec;
  bit got_err;

  // Collect interrupts / error vectors until the coprocessor is ready again.
  task automatic collect();
    logic [3:0] s;
    logic [31:0] d;
    msg_t m;
    got.delete();
    got_err = 0;
    forever begin
      if (intr) begin
        @(negedge clk); inta = 1; #1 m.vec = host_rdata[7:0];
        @(negedge clk); inta = 0;
        recv_word(m.h);
        recv_word(m.t);
        m.p = '0;
        if (m.h[9:0] == 10'd2) recv_word(m.p);
        got.push_back(m);
        continue;
      end
      get_status(s);
      if (s[ST_ERROR] && s[ST_DATA_OUT]) begin
        recv_word(err_vec);
        got_err = 1;
        continue;
      end
      if (s[ST_READY] && !s[ST_DATA_IN] && !intr) break;
    end
  endtask

  task automatic expect_null(int idx, logic [7:0] vec, int tn, int tl, int fn, int fl, int t);
    if (idx >= got.size()) begin check(0, $sformatf("missing reply %0d", idx)); return; end
    check(got[idx].vec == vec, $sformatf("reply %0d vector %0d exp %0d", idx, got[idx].vec, vec));
    check(got[idx].h == hdr(tn, tl, fn, fl, 1), $sformatf("reply %0d header %h exp %h", idx, got[idx].h, hdr(tn,tl,fn,fl,1)));
    check(got[idx].t == 32'(t), $sformatf("reply %0d time %0d exp %0d", idx, got[idx].t, t));
  endtask

  int t0;
  initial begin
    logic [31:0] w;
    repeat (5) @(posedge clk);
    rst = 0;

    // 1. Initialize Coprocessor: R1, R3, R4, R5, R6, R7, R9
    send_word(32'h0, 1);
    send_word(32'h0001_FFFF, 0);
    send_word(32'h0000_0000, 0);
    send_word(32'h007F_FC00, 0);
    send_word(32'h0000_03FF, 0);
    send_word(32'h03FC_0000, 0);
    send_word(32'h0003_FC00, 0);
    send_word(32'h0000_0000, 0);
    collect();
    check(got.size() == 0 && !got_err, "init coprocessor: no replies");

    // 2. Initialize Simulation, node 2 / LP 2
    send_word(opw(OP_INIT_SIM, 2, 2, 0, 0, 9), 1);
    send_word(32'd5, 0);                       // LP delay
    send_word(32'd0, 0);                       // initial time
    send_word({16'd3, 16'd3}, 0);              // 3 out / 3 in
    send_word(arc(0, 0), 0); send_word(arc(1, 1), 0); send_word(arc(2, 2), 0);
    send_word(arc(2, 2), 0); send_word(arc(3, 3), 0); send_word(arc(4, 4), 0);
    collect();
    check(got.size() == 3, $sformatf("init sim: %0d null messages, exp 3", got.size()));
    expect_null(0, 8'd255, 2, 2, 2, 2, 5);
    expect_null(1, 8'd255, 3, 3, 2, 2, 5);
    expect_null(2, 8'd255, 4, 4, 2, 2, 5);
    n_null_int += got.size();

    // 3. Post Messages
    send_word(opw(OP_POST_MSG, 2, 2, 0, 0, 1), 1); send_word(32'd5, 0);
    collect(); check(!got_err && got.size() == 0, "post null message accepted");
    send_word(opw(OP_POST_MSG, 2, 2, 1, 1, 2), 1); send_word(32'd7, 0); send_word(32'd15, 0);
    collect(); check(!got_err && got.size() == 0, "post real message 1 accepted");
    send_word(opw(OP_POST_MSG, 2, 2, 2, 2, 2), 1); send_word(32'd8, 0); send_word(32'd31, 0);
    collect(); check(!got_err && got.size() == 0, "post real message 2 accepted");

    // 4. Get Event: null at t=5 -> nulls at 10 on all outputs
    t0 = $time;
    send_word(opw(OP_GET_EVENT, 2, 2, 0, 0, 0), 1);
    collect();
    check(!got_err, "get event 1: no error");
    check(got.size() == 3, $sformatf("get event 1: %0d null messages, exp 3", got.size()));
    expect_null(0, 8'd255, 2, 2, 2, 2, 10);
    expect_null(1, 8'd255, 3, 3, 2, 2, 10);
    expect_null(2, 8'd255, 4, 4, 2, 2, 10);
    n_null_int += got.size();

    // 5. Get Event: arc 0/0 is empty -> unsafe
    send_word(opw(OP_GET_EVENT, 2, 2, 0, 0, 0), 1);
    collect();
    check(got_err && err_vec[7:0] == 8'd255 && got.size() == 0, $sformatf("get event 2: unsafe error (err=%0d vec=%0d)", got_err, err_vec));
    if (got_err && err_vec[7:0] == 8'd255) n_err_unsafe++;

    // 6. Fill arc 0/0 again, Get Event -> real message t=7 ptr 15 from 1/1
    send_word(opw(OP_POST_MSG, 2, 2, 0, 0, 2), 1); send_word(32'd9, 0); send_word(32'h1234, 0);
    collect(); check(!got_err, "post real message 3 accepted");
    send_word(opw(OP_GET_EVENT, 2, 2, 0, 0, 0), 1);
    collect();
    check(!got_err && got.size() == 1, $sformatf("get event 3: %0d replies, exp 1", got.size()));
    if (got.size() == 1) begin
      check(got[0].vec == 8'd254, "real event vector 254");
      check(got[0].h == hdr(2, 2, 1, 1, 2), $sformatf("real event header %h", got[0].h));
      check(got[0].t == 32'd7, $sformatf("real event time %0d exp 7", got[0].t));
      check(got[0].p == 32'd15, $sformatf("real event pointer %0d exp 15", got[0].p));
      if (got[0].vec == 8'd254) n_real_int++;
    end
    check(dut.u_sram.mem[16'h0842] == 32'd7, "LP simulation time updated in SRAM");

    // 7. Post Event: LP 2/2 sent a real message to 3/3 at t=12
    send_word(opw(OP_POST_EVENT, 3, 3, 2, 2, 1), 1); send_word(32'd12, 0);
    collect();
    check(got.size() == 2, $sformatf("post event: %0d null messages, exp 2", got.size()));
    expect_null(0, 8'd3, 2, 2, 2, 2, 12);
    expect_null(1, 8'd3, 4, 4, 2, 2, 12);
    foreach (got[i]) if (got[i].vec == 8'd3) n_pe_int++;

    // 8. ESAM full: 3 words stay reserved for LP 2's input arcs, so an arc
    //    without a reserved word has 29 words; the 30th post overflows
    for (int i = 0; i < 30; i++) begin
      send_word(opw(OP_POST_MSG, 2, 2, 5, 5, 2), 1); send_word(32'(100 + i), 0); send_word(32'(i + 1), 0);
      collect();
      if (i < 29) check(!got_err, $sformatf("post %0d into free word", i));
      else begin
        check(got_err && err_vec[7:0] == 8'd1, $sformatf("ESAM full error (err=%0d vec=%0d)", got_err, err_vec));
        if (got_err && err_vec[7:0] == 8'd1) n_err_full++;
      end
    end

    check(rate_errs == 0, $sformatf("MPC changed off CLK4 %0d times", rate_errs));
    $display("mechanisms: null_int=%0d real_int=%0d post_event_int=%0d unsafe=%0d full=%0d wr_reserved=%0d wr_unreserved=%0d arc_empty=%0d neq_waits=%0d",
             n_null_int, n_real_int, n_pe_int, n_err_unsafe, n_err_full, n_wr_rsv, n_wr_unrsv, n_arc_empty, n_neq_wait);
    check(n_null_int > 0, "null-message interrupts happened");
    check(n_real_int > 0, "real-event interrupt happened");
    check(n_pe_int > 0, "post-event interrupts happened");
    check(n_err_unsafe > 0, "unsafe Get Event happened");
    check(n_err_full > 0, "ESAM full happened");
    check(n_wr_rsv > 0, "write into reserved word happened");
    check(n_wr_unrsv > 0, "write into unreserved word happened");
    check(n_arc_empty > 0, "arc emptied by Get Event");
    check(n_neq_wait > 0, "engine waited on NEQ component");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
