// tb_gpr_file: self-checking test of the 16 x 32 general purpose register
// file.
//
// Checks that every register reads zero after reset, then performs 2000
// random writes through port R1 while reading two random registers on the
// asynchronous ports A (R1) and B (R2), comparing with a shadow copy. A
// write becomes visible on the read ports after the clock edge on which
// `we` is high (one-cycle write latency).
module tb_gpr_file;
  logic clk = 0, rst = 1, we = 0;
  logic [3:0] r1 = 0, r2 = 0;
  logic [31:0] wdata = 0, a, b;
  logic [31:0] shadow [16];
  int checks = 0, failures = 0;

  gpr_file #(.REGS(16), .WIDTH(32)) dut (.clk, .rst, .r1, .r2, .we, .wdata, .a, .b);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 16; i++) begin
      r1 = 4'(i); r2 = 4'(15 - i); #1;
      check(a === 0 && b === 0, $sformatf("reg %0d not zero after reset", i));
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      r1 = 4'($urandom); r2 = 4'($urandom); we = $urandom_range(0, 1); wdata = $urandom;
      #1;
      check(a === shadow[r1] && b === shadow[r2], $sformatf("read r1=%0d a=%h b=%h", r1, a, b));
      @(posedge clk);
      if (we) shadow[r1] = wdata;
      #1;
      check(a === shadow[r1], $sformatf("write r%0d not visible one cycle later", r1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
