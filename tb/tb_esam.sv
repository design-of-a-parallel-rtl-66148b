// tb_esam: self-checking test of the 32 x 32 Extended Search Associative
// Memory.
//
// A reference model kept here holds the memory contents and the match set.
// 4000 random operations (searches equal / not equal / minimum / not
// minimum / maximum / not maximum over all words or over the previous
// match subset, masked write-all, write-subset, write-word and read-word)
// are applied; after each one the match set, match status, word-select
// status, word-select vector, read data and all 32 stored words are
// compared with the model. Minimum and maximum are computed arithmetically
// on the masked value, independent of the bit-serial circuit. Data are
// drawn from a small value set so ties are frequent.
// Each operation completes on one clock edge; the results are checked
// right after that edge (single-cycle latency is part of the check).
// Operations follow the document; resolving ties at the lowest word index
// is this design's choice.
module tb_esam;
  import pdes_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst = 1;
  esam_op_e op = ESAM_NOP;
  logic subset = 0;
  logic [31:0] data = 0, mask = 0, rdata;
  logic [N-1:0] match, sel;
  logic match_stat, wdsel_stat;

  logic [31:0] m_mem [N];
  logic [N-1:0] m_match = 0, m_sel = 0;
  logic [31:0] m_rdata = 0;
  logic m_wdsel = 0;
  int checks = 0, failures = 0;
  int n_ties = 0;

  esam #(.WORDS(N), .WIDTH(32)) dut (.clk, .rst, .op, .subset, .data, .mask,
    .match, .match_stat, .wdsel_stat, .sel, .rdata);

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

  function automatic logic [31:0] small_word();
    // few distinct values in each field so ties and equal matches are common
    return {1'($urandom), 5'($urandom_range(0, 3)), 8'($urandom_range(0, 3)), 1'($urandom), 17'($urandom_range(0, 7))};
  endfunction

  task automatic model(esam_op_e o, bit s, logic [31:0] d, logic [31:0] k);
    logic [N-1:0] cand, eq, ext;
    logic [31:0] best;
    bit found, want_max;
    cand = s ? m_match : '1;
    for (int w = 0; w < N; w++) eq[w] = cand[w] && (((m_mem[w] ^ d) & k) == 0);
    want_max = (o == ESAM_SRCH_MAX || o == ESAM_SRCH_NMAX);
    found = 0; best = 0;
    for (int w = 0; w < N; w++)
      if (cand[w]) begin
        if (!found || (want_max ? (m_mem[w] & k) > best : (m_mem[w] & k) < best)) best = m_mem[w] & k;
        found = 1;
      end
    for (int w = 0; w < N; w++) ext[w] = cand[w] && ((m_mem[w] & k) == best);
    if ((o == ESAM_SRCH_MIN || o == ESAM_SRCH_MAX) && $countones(ext) > 1) n_ties++;
    case (o)
      ESAM_SRCH_EQ:   m_match = eq;
      ESAM_SRCH_NEQ:  m_match = cand & ~eq;
      ESAM_SRCH_MIN, ESAM_SRCH_MAX:   m_match = ext;
      ESAM_SRCH_NMIN, ESAM_SRCH_NMAX: m_match = cand & ~ext;
      ESAM_WRITE_ALL: for (int w = 0; w < N; w++) m_mem[w] = (m_mem[w] & ~k) | (d & k);
      ESAM_WRITE_SUB: for (int w = 0; w < N; w++) if (m_match[w]) m_mem[w] = (m_mem[w] & ~k) | (d & k);
      ESAM_WRITE_WORD, ESAM_READ_WORD: begin
        int first;
        first = -1;
        for (int w = N - 1; w >= 0; w--) if (m_match[w]) first = w;
        m_wdsel = (first >= 0);
        m_sel = (first >= 0) ? N'(1) << first : '0;
        if (first >= 0) begin
          m_match[first] = 0;
          if (o == ESAM_WRITE_WORD) m_mem[first] = (m_mem[first] & ~k) | (d & k);
          else m_rdata = m_mem[first];
        end
      end
      default: ;
    endcase
  endtask

  task automatic do_op(esam_op_e o, bit s, logic [31:0] d, logic [31:0] k);
    @(negedge clk);
    op = o; subset = s; data = d; mask = k;
    model(o, s, d, k);
    @(posedge clk); #1;
    op = ESAM_NOP;
    check(match === m_match, $sformatf("%s: match %h exp %h", o.name(), match, m_match));
    check(match_stat === (m_match != 0), "match status");
    check(wdsel_stat === m_wdsel && sel === m_sel, $sformatf("%s: sel %h exp %h", o.name(), sel, m_sel));
    check(rdata === m_rdata, $sformatf("%s: rdata %h exp %h", o.name(), rdata, m_rdata));
    for (int w = 0; w < N; w++)
      check(dut.mem[w] === m_mem[w], $sformatf("%s: word %0d = %h exp %h", o.name(), w, dut.mem[w], m_mem[w]));
  endtask

  initial begin
    logic [31:0] masks [6] = '{M_TIME, M_VALID | M_TOLP, M_VALID | M_FROM | M_RSV, '1, M_TOLP | M_TIME, 32'h0};
    esam_op_e ops [11] = '{ESAM_NOP, ESAM_SRCH_EQ, ESAM_SRCH_NEQ, ESAM_SRCH_MIN, ESAM_SRCH_NMIN,
                           ESAM_SRCH_MAX, ESAM_SRCH_NMAX, ESAM_WRITE_ALL, ESAM_WRITE_SUB,
                           ESAM_WRITE_WORD, ESAM_READ_WORD};
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    check(match === 0 && sel === 0 && wdsel_stat === 0 && rdata === 0, "reset state");
    // the array itself is not reset: the model starts from whatever it holds
    for (int w = 0; w < N; w++) m_mem[w] = dut.mem[w];
    // fill every word: select all, then write word by word
    do_op(ESAM_SRCH_EQ, 0, 0, 0);
    for (int w = 0; w < N; w++) do_op(ESAM_WRITE_WORD, 1, small_word(), '1);
    do_op(ESAM_WRITE_WORD, 1, 0, '1);           // empty match set: no write
    for (int i = 0; i < 4000; i++) begin
      esam_op_e o;
      o = ops[$urandom_range(0, 10)];
      // keep the contents varied: full-word writes dominate writes
      do_op(o, $urandom_range(0, 1), small_word(),
            (o == ESAM_WRITE_ALL) ? masks[$urandom_range(0, 2)] : masks[$urandom_range(0, 5)]);
    end
    check(n_ties > 0, "ties in min/max searches occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
