// tb_shifter: self-checking test of the execution-unit shifter.
//
// Checks the five shift operations (none, left 1, right 1, left 8,
// right 8; all logical) on directed patterns and 1000 random words against
// a reference computed here. Combinational: checked 1 time unit after the
// inputs change. Shift codes follow the document; logical (zero-fill)
// right shifts are this design's reading.
module tb_shifter;
  import pdes_pkg::*;
  shift_op_e op;
  logic [31:0] d, y;
  int checks = 0, failures = 0;

  shifter #(.WIDTH(32)) dut (.op, .d, .y);

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic try(shift_op_e o, logic [31:0] x);
    logic [31:0] e;
    op = o; d = x;
    #1;
    unique case (o)
      SH_L1:   e = x << 1;
      SH_R1:   e = x >> 1;
      SH_L8:   e = x << 8;
      SH_R8:   e = x >> 8;
      default: e = x;
    endcase
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL op=%s d=%h y=%h exp %h", o.name(), x, y, e);
    end
  endtask

  initial begin
    shift_op_e ops[5] = '{SH_NONE, SH_L1, SH_R1, SH_L8, SH_R8};
    foreach (ops[i]) begin
      try(ops[i], 32'h8000_0001);
      try(ops[i], 32'hFFFF_FFFF);
      try(ops[i], 32'h0000_0000);
    end
    for (int i = 0; i < 1000; i++) try(ops[$urandom_range(0, 4)], $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
