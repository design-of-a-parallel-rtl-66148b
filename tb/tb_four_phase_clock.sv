// tb_four_phase_clock: self-checking test of the four-phase clock
// generator.
//
// Checks that CLK1 is held during reset, that exactly one phase is active
// on every master clock, that the phases run CLK1, CLK2, CLK3, CLK4 in
// order, and that each phase recurs every 4 master clocks (one
// microinstruction per four master clock periods).
module tb_four_phase_clock;
  logic clk = 0, rst = 1;
  logic [3:0] ph;
  int checks = 0, failures = 0;
  int last_seen [4];

  four_phase_clock dut (.clk, .rst, .ph);

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
    logic [3:0] prev;
    foreach (last_seen[i]) last_seen[i] = -1;
    repeat (3) begin @(posedge clk); #1 check(ph === 4'b0001, "CLK1 not held in reset"); end
    @(negedge clk) rst = 0;
    prev = ph;
    for (int c = 0; c < 400; c++) begin
      @(posedge clk); #1;
      check($countones(ph) == 1, $sformatf("phase vector %b not one-hot", ph));
      check(ph === {prev[2:0], prev[3]}, $sformatf("phase %b did not follow %b", ph, prev));
      for (int p = 0; p < 4; p++)
        if (ph[p]) begin
          if (last_seen[p] >= 0) check(c - last_seen[p] == 4, $sformatf("phase %0d period %0d", p, c - last_seen[p]));
          last_seen[p] = c;
        end
      prev = ph;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
