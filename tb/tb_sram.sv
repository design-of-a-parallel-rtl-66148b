// tb_sram: self-checking test of the 64k x 32 shared SRAM model.
//
// Writes random data to 500 random addresses (kept in an associative
// shadow), then reads them back in random order. A read presents the word
// on `rdata` after exactly one clock edge (registered read); the test
// checks that `rdata` has not yet changed prev_q that edge and is correct
// after it. Also checks that a read with `re` low leaves `rdata` unchanged.
module tb_sram;
  logic clk = 0, re = 0, we = 0;
  logic [15:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] shadow [logic [15:0]];
  logic [15:0] keys [$];
  int checks = 0, failures = 0;

  sram #(.DEPTH(65536), .WIDTH(32)) dut (.clk, .re, .we, .addr, .wdata, .rdata);

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

  initial begin
    logic [31:0] prev_q;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      addr = 16'($urandom); wdata = $urandom; we = 1;
      if (!shadow.exists(addr)) keys.push_back(addr);
      shadow[addr] = wdata;
      @(posedge clk); #1 we = 0;
    end
    keys.shuffle();
    foreach (keys[i]) begin
      @(negedge clk);
      addr = keys[i]; re = 1;
      prev_q = rdata;
      #1 check(rdata === prev_q, "read data changed prev_q the clock edge");
      @(posedge clk); #1;
      check(rdata === shadow[keys[i]], $sformatf("addr %h read %h exp %h", keys[i], rdata, shadow[keys[i]]));
      re = 0;
      addr = ~addr;           // a different word: rdata must still hold
      prev_q = rdata;
      @(posedge clk); #1;
      check(rdata === prev_q, "rdata changed with re low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
